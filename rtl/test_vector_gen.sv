// test_vector_gen: data side of the BIST controller.
//
// For each March operation issued by the controller it produces the word to
// write (BIST_Data) and, for a read, the word the memory must return (Ideal
// data). A March operation carries one logical value x (W0/W1, R0/R1); the
// word for x = 0 is the data background BACKGROUND and the word for x = 1 is
// its complement. Because the memory returns read data one clock after the
// read is issued, the ideal data and the compare strobe are registered: they
// line up with data_out of the memory in the cycle after a read.
//
// Interface: op_valid/op_write/op_value describe the operation issued this
// cycle; bist_data is combinational from op_value; ideal_data and cmp_en are
// valid one cycle later. The source names the block and its outputs; the
// background encoding and the one-cycle alignment are this design's choices
// (default background all zeros, the solid pattern).
module test_vector_gen #(
  parameter int unsigned    DW         = 32,
  parameter logic [DW-1:0]  BACKGROUND = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          op_valid,
  input  logic          op_write,
  input  logic          op_value,
  output logic [DW-1:0] bist_data,
  output logic [DW-1:0] ideal_data,
  output logic          cmp_en
);

  assign bist_data = op_value ? ~BACKGROUND : BACKGROUND;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ideal_data <= '0;
      cmp_en     <= 1'b0;
    end else begin
      cmp_en <= op_valid && !op_write;
      if (op_valid && !op_write) ideal_data <= bist_data;
    end
  end

endmodule
