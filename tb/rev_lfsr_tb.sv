// rev_lfsr_tb: self-checking test of the reversible complete LFSR.
//
// Two instances, 3 and 13 stages. The 3-stage one must step through the
// low-address order 7,6,5,2,4,0,1,3 forwards and 3,1,0,4,2,5,6,7 backwards.
// The 13-stage one is run for a full period: every one of the 8192 states
// must appear exactly once, the state after 0FFF must be 1FFF (the wrap of
// the 16-bit address order FFFF ... 7FFB), the output must toggle exactly
// 13 * 2^12 times, and stepping backwards must replay the recorded forward
// sequence in reverse. en = 0 must hold the state.
module rev_lfsr_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // driven low at 1 ns so the asynchronous reset sees an edge
  logic en = 1'b0;
  logic updn = 1'b0;
  logic [2:0]  q3;
  logic [12:0] q13;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rev_lfsr #(.WIDTH(3))  dut3  (.clk, .rst_n, .en, .updn, .q(q3));
  rev_lfsr #(.WIDTH(13)) dut13 (.clk, .rst_n, .en, .updn, .q(q13));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [2:0] FWD3 [8] = '{3'd7, 3'd6, 3'd5, 3'd2, 3'd4, 3'd0, 3'd1, 3'd3};

  logic [12:0] seq [8192];
  bit          seen [8192];
  int          toggles;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q3 == 3'd7 && q13 == 13'h1FFF, "reset state is all ones");

    // hold
    en = 1'b0;
    repeat (3) @(negedge clk);
    check(q3 == 3'd7 && q13 == 13'h1FFF, "en=0 holds the state");

    // forward: record 13-bit sequence, check 3-bit order
    en = 1'b1; updn = 1'b0;
    toggles = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int i = 0; i < 8192; i++) begin
      logic [12:0] prev_q;
      seq[i] = q13;
      check(!seen[q13], $sformatf("13-bit state %h repeated", q13));
      seen[q13] = 1'b1;
      if (i < 16) check(q3 == FWD3[i % 8], $sformatf("3-bit forward step %0d: %0d", i, q3));
      prev_q = q13;
      @(negedge clk);
      toggles += $countones(prev_q ^ q13);
      if (prev_q == 13'h0FFF) check(q13 == 13'h1FFF, "0FFF is followed by 1FFF");
    end
    check(q13 == 13'h1FFF, "13-bit period is 8192");
    check(toggles == 13 * 4096, $sformatf("13-bit toggles %0d", toggles));

    // backward from the seed: replay in reverse
    updn = 1'b1;
    for (int i = 8191; i >= 0; i--) begin
      @(negedge clk);
      check(q13 == seq[i], $sformatf("13-bit backward step to index %0d", i));
    end
    // 3-bit backward order from the current 3-bit state
    begin
      int idx;
      idx = -1;
      for (int k = 0; k < 8; k++) if (FWD3[k] == q3) idx = k;
      check(idx >= 0, "3-bit state is on the order");
      for (int k = 1; k <= 8; k++) begin
        @(negedge clk);
        check(q3 == FWD3[(idx - k + 16) % 8], $sformatf("3-bit backward step %0d", k));
      end
    end
    en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
