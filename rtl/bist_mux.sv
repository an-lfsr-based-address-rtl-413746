// bist_mux: the test-mode multiplexers in front of the memory.
//
// Three 2:1 multiplexers, selected by BIST_CS, choose whether the memory's
// Address, Data_in and W/R come from the functional (normal working mode)
// logic or from the BIST controller. bist_cs = 1 selects the BIST side.
// Purely combinational. The three multiplexers and their select follow the
// source; the polarity of bist_cs is this design's choice.
module bist_mux #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32
) (
  input  logic          bist_cs,
  input  logic [AW-1:0] norm_addr,
  input  logic [DW-1:0] norm_data,
  input  logic          norm_w_r,
  input  logic [AW-1:0] bist_addr,
  input  logic [DW-1:0] bist_data,
  input  logic          bist_w_r,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_data,
  output logic          mem_w_r
);

  always_comb begin
    if (bist_cs) begin
      mem_addr = bist_addr;
      mem_data = bist_data;
      mem_w_r  = bist_w_r;
    end else begin
      mem_addr = norm_addr;
      mem_data = norm_data;
      mem_w_r  = norm_w_r;
    end
  end

endmodule
