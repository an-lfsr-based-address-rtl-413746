// mbist_top_tb: end-to-end test of the memory BIST at its full size
// (64k x 32 SRAM, 16-bit LFSR address generator, default March algorithm),
// with no parameter overridden.
//
//  1. Normal mode: words written and read back through the norm_* ports.
//  2. BIST run on a good memory: every element must visit all 65 536
//     addresses once per pass; the first pass fixes the order, every other
//     up pass must repeat it and every down pass must be its exact reverse;
//     the address bus must toggle 151 552 (25000h) times per pass including
//     the wrap; the run must take 12 x 65 536 operation cycles plus 9
//     re-aiming cycles; test_passed must be high.
//  3. BIST run with one memory bit flipped after the first element: the
//     following R0 must catch it; test_fail and fault_data must show it.
//  4. Normal mode again after the test.
// Mechanisms counted, each must occur: up pass, down pass, updn change,
// H_LFSR_CLK edge, wrap step between elements, BIST read, BIST write,
// detected fault, passed test, normal-mode access.
module mbist_top_tb;

  localparam int AW = 16;
  localparam int DW = 32;
  localparam int NA = 1 << AW;
  localparam int TOGGLES = 13 * (1 << 12) + (1 << 13) * 3 * (1 << 2);

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic bist_test = 1'b0;
  logic [AW-1:0] norm_addr = '0;
  logic [DW-1:0] norm_data = '0;
  logic          norm_w_r = 1'b0;
  logic [DW-1:0] data_out, fault_data, fault_ideal;
  logic          bist_cs, test_done, test_passed, test_fail, h_lfsr_clk;
  logic [AW-1:0] bist_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbist_top dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ monitors
  int n_up_pass = 0, n_down_pass = 0, n_updn_chg = 0, n_hclk = 0, n_move = 0;
  int n_reads = 0, n_writes = 0, n_fail = 0, n_pass = 0, n_norm = 0;
  int cs_cycles = 0;

  logic [AW-1:0] order [NA];
  bit            have_order = 1'b0;
  bit            visited [NA];
  int            pass_idx = 0;
  int            pass_toggles = 0;
  logic [AW-1:0] pass_first, prev_addr;
  logic          pass_down;
  bit            order_ok;

  always @(posedge h_lfsr_clk) n_hclk++;

  always @(posedge clk) begin
    if (rst_n) begin
      if ($changed(dut.updn)) n_updn_chg++;
      if (bist_cs) cs_cycles++;
      if (dut.adv && !dut.op_valid) n_move++;
      if (dut.op_valid) begin
        if (dut.bist_w_r) n_writes++; else n_reads++;
      end
      // one record per address per element: the cycle of its last operation
      if (dut.op_valid && dut.u_ctrl.last_op) begin
        if (pass_idx == 0) begin
          foreach (visited[i]) visited[i] = 1'b0;
          pass_first   = bist_addr;
          pass_down    = dut.updn;
          pass_toggles = 0;
          order_ok     = 1'b1;
        end else begin
          pass_toggles += $countones(prev_addr ^ bist_addr);
        end
        if (visited[bist_addr]) order_ok = 1'b0;
        visited[bist_addr] = 1'b1;
        if (have_order) begin
          if (bist_addr != (pass_down ? order[NA - 1 - pass_idx] : order[pass_idx])) order_ok = 1'b0;
        end else begin
          order[pass_idx] = bist_addr;
        end
        prev_addr = bist_addr;
        pass_idx++;
        if (dut.at_end) begin
          pass_toggles += $countones(bist_addr ^ pass_first);
          check(pass_idx == NA, $sformatf("pass visited %0d addresses", pass_idx));
          check(order_ok, "pass order: every address once, up = first order, down = reverse");
          check(pass_toggles == TOGGLES,
                $sformatf("pass toggles %0d, expected %0d", pass_toggles, TOGGLES));
          if (!have_order) begin
            check(!pass_down && order[0] == 16'hFFFF && order[1] == 16'hFFFE &&
                  order[2] == 16'hFFFD && order[3] == 16'hFFFA && order[NA-1] == 16'h7FFB,
                  "first pass order FFFF FFFE FFFD FFFA ... 7FFB");
            have_order = 1'b1;
          end
          if (pass_down) n_down_pass++; else n_up_pass++;
          pass_idx = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic norm_write(input logic [AW-1:0] a, input logic [DW-1:0] d);
    @(negedge clk);
    norm_addr = a; norm_data = d; norm_w_r = 1'b1;
    @(negedge clk);
    norm_w_r = 1'b0;
    n_norm++;
  endtask

  task automatic norm_read_check(input logic [AW-1:0] a, input logic [DW-1:0] d);
    @(negedge clk);
    norm_addr = a; norm_w_r = 1'b0;
    @(negedge clk);
    check(data_out == d, $sformatf("normal read %h: %h, expected %h", a, data_out, d));
    n_norm++;
  endtask

  task automatic run_bist(input bit inject, output int cycles);
    cycles = 0; cs_cycles = 0;
    @(negedge clk);
    bist_test = 1'b1;
    while (!test_done && cycles < 2_000_000) begin
      @(negedge clk);
      cycles++;
      // flip one bit of one word once the W0 element is over
      if (inject && dut.u_ctrl.elem == 1 && dut.u_ctrl.op_idx == 0 && cycles < 70000 &&
          dut.op_valid && bist_addr == 16'hFFFF) begin
        dut.u_mem.mem[16'h1234] = 32'h0000_0400;
        inject = 1'b0;
      end
    end
    check(test_done, "test_done reached");
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(bist_addr == 16'hFFFF && !bist_cs && !test_done, "reset state");

    // 1. normal mode
    norm_write(16'h0000, 32'hDEAD_BEEF);
    norm_write(16'hFFFF, 32'h1234_5678);
    norm_read_check(16'h0000, 32'hDEAD_BEEF);
    norm_read_check(16'hFFFF, 32'h1234_5678);

    // 2. clean run
    run_bist(1'b0, cycles);
    check(cs_cycles == 12 * NA + 9, $sformatf("BIST took %0d cycles, expected %0d", cs_cycles, 12 * NA + 9));
    check(test_passed && !test_fail, "good memory passes");
    if (test_passed) n_pass++;
    check(n_up_pass == 3 && n_down_pass == 2, $sformatf("%0d up / %0d down passes", n_up_pass, n_down_pass));
    check(bist_addr == 16'hFFFF, "generator back on FFFF");
    // the last element read 0 everywhere and wrote nothing after it
    norm_read_check(16'h0000, 32'h0);
    bist_test = 1'b0;
    @(negedge clk);

    // 3. run with an injected fault
    run_bist(1'b1, cycles);
    check(test_fail && !test_passed, "flipped bit is detected");
    check(fault_data == 32'h0000_0400 && fault_ideal == 32'h0, "fault data shows the flipped bit");
    if (test_fail) n_fail++;
    bist_test = 1'b0;
    @(negedge clk);

    // 4. normal mode after the test
    norm_write(16'h1234, 32'hCAFE_F00D);
    norm_read_check(16'h1234, 32'hCAFE_F00D);

    $display("mechanisms: up_pass=%0d down_pass=%0d updn_change=%0d h_lfsr_clk=%0d wrap_step=%0d",
             n_up_pass, n_down_pass, n_updn_chg, n_hclk, n_move);
    $display("            bist_read=%0d bist_write=%0d fault_detected=%0d passed=%0d normal_access=%0d",
             n_reads, n_writes, n_fail, n_pass, n_norm);
    check(n_up_pass > 0,   "up pass happened");
    check(n_down_pass > 0, "down pass happened");
    check(n_updn_chg > 0,  "direction change happened");
    check(n_hclk > 0,      "H_LFSR_CLK edge happened");
    check(n_move > 0,      "wrap step happened");
    check(n_reads > 0,     "BIST read happened");
    check(n_writes > 0,    "BIST write happened");
    check(n_fail > 0,      "fault detection happened");
    check(n_pass > 0,      "passed test happened");
    check(n_norm > 0,      "normal access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
