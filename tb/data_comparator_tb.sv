// data_comparator_tb: self-checking test of the read-data comparator.
// Matching reads must not flag; a mismatch with cmp_en low must be ignored;
// the first enabled mismatch must set test_fail and capture that word, and a
// later mismatch must not overwrite it; clear must reset everything; a
// single flipped bit must be caught in every bit position.
module data_comparator_tb;

  localparam int DW = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic clear = 1'b0, cmp_en = 1'b0;
  logic [DW-1:0] ideal_data = '0, data_out = '0;
  logic test_fail;
  logic [DW-1:0] fault_data, fault_ideal;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_comparator #(.DW(DW)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input logic en, input logic [DW-1:0] ideal, input logic [DW-1:0] got);
    cmp_en = en; ideal_data = ideal; data_out = got;
    @(negedge clk);
    cmp_en = 1'b0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] v;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!test_fail, "no fail after reset");
    for (int i = 0; i < 100; i++) begin
      v = $urandom;
      apply(1'b1, v, v);
    end
    check(!test_fail, "matching reads do not fail");
    apply(1'b0, 32'h0, 32'hFFFF_FFFF);
    check(!test_fail, "mismatch without cmp_en ignored");
    apply(1'b1, 32'h0000_0000, 32'h0000_0100);
    check(test_fail, "mismatch sets test_fail");
    check(fault_data == 32'h0000_0100 && fault_ideal == 32'h0, "first fault captured");
    apply(1'b1, 32'hFFFF_FFFF, 32'h7FFF_FFFF);
    check(test_fail && fault_data == 32'h0000_0100, "first fault kept");
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(!test_fail && fault_data == '0, "clear resets the flag");
    apply(1'b1, 32'hFFFF_FFFF, 32'hFFFF_FFFE);
    check(test_fail && fault_data == 32'hFFFF_FFFE && fault_ideal == 32'hFFFF_FFFF,
          "single-bit fault after clear");
    // every bit position must be compared
    for (int b = 0; b < DW; b++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      v = $urandom;
      apply(1'b1, v, v ^ (DW'(1) << b));
      check(test_fail && fault_data == (v ^ (DW'(1) << b)), $sformatf("bit %0d compared", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
