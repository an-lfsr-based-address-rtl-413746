// bist_controller_tb: self-checking test of the March sequencer.
//
// The controller drives a binary address model (addr_counter_model, 64
// addresses). The testbench builds, from the March table, the exact stream
// of (address, write, value) operations that must be issued and checks every
// cycle with op_valid against it. It also checks: the cycle count (12 ops per
// address plus one SETDIR cycle per element and at the end plus three MOVE
// cycles), that updn changes only after a cycle with adv low, test_passed
// with a clean comparator, test_passed low when test_fail is reported, the
// clear pulse at the start, and the return to IDLE.
module bist_controller_tb;
  import mbist_pkg::*;

  localparam int AW = 6;
  localparam int M  = 1 << AW;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic bist_test = 1'b0;
  logic test_fail = 1'b0;
  logic at_end, bist_cs, bist_w_r, op_valid, op_value, updn, adv, clear, test_done, test_passed;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller dut (.*);
  addr_counter_model #(.AW(AW)) u_gen (.clk, .rst_n, .updn, .adv, .addr, .at_end);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected operation stream
  typedef struct packed { logic [AW-1:0] a; logic w; logic v; } op_t;
  op_t exp_ops [$];
  int  op_ptr;
  int  cs_cycles;
  logic adv_q = 1'b0;

  function automatic void build_stream();
    exp_ops.delete();
    for (int e = 0; e < MARCH_N; e++)
      for (int k = 0; k < M; k++) begin
        int a;
        a = MARCH_ALG[e].down ? M - 1 - k : k;
        for (int o = 0; o < int'(MARCH_ALG[e].n_ops); o++)
          exp_ops.push_back('{a: AW'(a), w: MARCH_ALG[e].ops[o][1], v: MARCH_ALG[e].ops[o][0]});
      end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if ($changed(updn)) check(!adv_q, "updn changed after a cycle with adv high");
      adv_q <= adv;
      if (bist_cs) cs_cycles++;
      if (op_valid) begin
        if (op_ptr < exp_ops.size()) begin
          check(addr == exp_ops[op_ptr].a && bist_w_r == exp_ops[op_ptr].w &&
                op_value == exp_ops[op_ptr].v,
                $sformatf("op %0d: addr %0d w %0d v %0d, expected addr %0d w %0d v %0d", op_ptr,
                          addr, bist_w_r, op_value, exp_ops[op_ptr].a, exp_ops[op_ptr].w,
                          exp_ops[op_ptr].v));
        end else begin
          check(1'b0, "more operations than the algorithm has");
        end
        op_ptr++;
      end
    end
  end

  task automatic run_test(input logic inject_fail, input logic expect_pass);
    int cyc;
    op_ptr = 0; cs_cycles = 0;
    @(negedge clk);
    bist_test = 1'b1;
    #1;
    check(clear, "clear pulses when the test starts");
    cyc = 0;
    while (!test_done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
      if (inject_fail && op_ptr == 500) test_fail = 1'b1;
    end
    check(test_done, "test_done reached");
    check(op_ptr == exp_ops.size(), $sformatf("%0d operations, expected %0d", op_ptr, exp_ops.size()));
    check(cs_cycles == 12 * M + 6 + 3, $sformatf("bist_cs high %0d cycles, expected %0d", cs_cycles, 12 * M + 9));
    check(test_passed == expect_pass, "test_passed");
    check(addr == '0 && !bist_cs, "generator back on the seed, memory released");
    repeat (3) @(negedge clk);
    check(test_done, "test_done held while bist_test is high");
    bist_test = 1'b0;
    @(negedge clk);
    check(!test_done && !test_passed, "back to idle");
    test_fail = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_stream();
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!bist_cs && !test_done && !op_valid, "idle after reset");
    run_test(1'b0, 1'b1);
    run_test(1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
