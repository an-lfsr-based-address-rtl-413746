// data_comparator: checks what the memory returns during the test.
//
// In each cycle with cmp_en high it compares the memory's data_out with the
// ideal data. The first mismatch sets test_fail, which stays set until clear,
// and stores the faulty word in fault_data (the syndrome, data_out XOR ideal,
// is fault_data XOR fault_ideal). clear is pulsed by the controller when a
// test starts.
//
// The source gives the block's role and its Test fail and Fault data outputs;
// keeping the first failing word, the fault_ideal output and the sticky flag
// are this design's choices. Timing: inputs sampled on the rising clock edge;
// outputs are registers, valid after the edge that sampled the mismatch.
module data_comparator #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          cmp_en,
  input  logic [DW-1:0] ideal_data,
  input  logic [DW-1:0] data_out,
  output logic          test_fail,
  output logic [DW-1:0] fault_data,
  output logic [DW-1:0] fault_ideal
);

  logic mismatch;

  assign mismatch = cmp_en && (data_out != ideal_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_fail   <= 1'b0;
      fault_data  <= '0;
      fault_ideal <= '0;
    end else if (clear) begin
      test_fail   <= 1'b0;
      fault_data  <= '0;
      fault_ideal <= '0;
    end else if (mismatch && !test_fail) begin
      test_fail   <= 1'b1;
      fault_data  <= data_out;
      fault_ideal <= ideal_data;
    end
  end

endmodule
