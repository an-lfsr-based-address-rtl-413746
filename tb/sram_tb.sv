// sram_tb: self-checking test of the memory model at a reduced size
// (AW = 8, DW = 32). Writes a pattern derived from each address, reads every
// word back (data one cycle after the read), then rewrites a random subset
// and checks again against a reference array kept in the testbench.
module sram_tb;

  localparam int AW = 8;
  localparam int DW = 32;

  logic clk = 1'b0;
  logic w_r = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data_in = '0;
  logic [DW-1:0] data_out;
  logic [DW-1:0] ref_mem [1 << AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram #(.AW(AW), .DW(DW)) dut (.clk, .w_r, .addr, .data_in, .data_out);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all();
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      w_r = 1'b0; addr = AW'(a);
      @(negedge clk);
      check(data_out == ref_mem[a], $sformatf("read %h: %h, expected %h", a, data_out, ref_mem[a]));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      w_r = 1'b1; addr = AW'(a); data_in = {AW'(a), 24'h5A_C3_00} ^ DW'(a * 32'h01010101);
      ref_mem[a] = data_in;
    end
    read_all();
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      w_r = 1'b1; addr = AW'($urandom); data_in = $urandom;
      ref_mem[addr] = data_in;
    end
    // a write must not disturb data_out
    @(negedge clk);
    w_r = 1'b0; addr = '0;
    @(negedge clk);
    w_r = 1'b1; addr = 8'd1; data_in = ~ref_mem[0];
    ref_mem[1] = data_in;
    @(negedge clk);
    check(data_out == ref_mem[0], "data_out held during a write");
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
