// test_vector_gen_tb: self-checking test of the data side of the
// controller, with a non-trivial background (0F0F_A5A5) so that both the
// background and its complement are seen. Random operations are applied;
// bist_data must be the background or its complement at once, and
// ideal_data / cmp_en must describe the previous cycle's read one clock
// later.
module test_vector_gen_tb;

  localparam int DW = 32;
  localparam logic [DW-1:0] BG = 32'h0F0F_A5A5;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic op_valid = 1'b0, op_write = 1'b0, op_value = 1'b0;
  logic [DW-1:0] bist_data, ideal_data;
  logic cmp_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_vector_gen #(.DW(DW), .BACKGROUND(BG)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic was_read, was_value;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!cmp_en, "no compare after reset");
    for (int i = 0; i < 500; i++) begin
      op_valid = 1'($urandom); op_write = 1'($urandom); op_value = 1'($urandom);
      #1;
      check(bist_data == (op_value ? ~BG : BG), "bist_data");
      was_read = op_valid && !op_write; was_value = op_value;
      @(negedge clk);
      check(cmp_en == was_read, "cmp_en one cycle after a read");
      if (was_read) check(ideal_data == (was_value ? ~BG : BG), "ideal_data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
