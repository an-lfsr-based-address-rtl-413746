// hclk_div_tb: self-checking test of the H_LFSR_CLK divider (DIV_BITS = 3).
//
// With en held high h_clk must rise exactly once every 8 clk cycles, one
// clock after the position counter passes 7 (going up) or 0 (going down).
// With en low nothing may move. Changing updn between steps must not produce
// an h_clk edge by itself. The expected position and wrap points come from a
// counter kept in the testbench.
module hclk_div_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // driven low at 1 ns so the asynchronous reset sees an edge
  logic en = 1'b0;
  logic updn = 1'b0;
  logic [2:0] pos;
  logic h_clk;
  int checks = 0, failures = 0;
  int model_pos = 0;
  int rises = 0;
  logic h_prev = 1'b0;
  logic exp_h = 1'b0;

  always #5 clk = ~clk;

  hclk_div #(.DIV_BITS(3)) dut (.clk, .rst_n, .en, .updn, .pos, .h_clk);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model, updated on each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      exp_h <= en && (updn ? (model_pos == 0) : (model_pos == 7));
      if (en) model_pos <= updn ? (model_pos + 7) % 8 : (model_pos + 1) % 8;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(pos == 3'(model_pos), $sformatf("pos %0d, expected %0d", pos, model_pos));
      check(h_clk == exp_h, $sformatf("h_clk %0d, expected %0d", h_clk, exp_h));
      if (h_clk && !h_prev) rises++;
      h_prev = h_clk;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_rise, second_rise, cyc;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(h_clk == 1'b0 && pos == 0, "reset values");
    // continuous forward: period of h_clk
    en = 1'b1;
    first_rise = -1; second_rise = -1; cyc = 0;
    while (second_rise < 0 && cyc < 40) begin
      logic hp;
      hp = h_clk;
      @(negedge clk);
      cyc++;
      if (h_clk && !hp) begin
        if (first_rise < 0) first_rise = cyc; else second_rise = cyc;
      end
    end
    check(first_rise == 8, $sformatf("first h_clk rise after %0d steps", first_rise));
    check(second_rise - first_rise == 8, "h_clk period is 8 clk cycles going up");
    // stop, turn round, run down
    en = 1'b0;
    @(negedge clk);
    updn = 1'b1;
    repeat (3) @(negedge clk);
    en = 1'b1;
    repeat (40) @(negedge clk);
    // random enables and direction changes (direction only after en low)
    for (int i = 0; i < 2000; i++) begin
      en = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        updn = ~updn;
      end
      repeat ($urandom_range(1, 6)) begin
        en = $urandom_range(0, 1);
        @(negedge clk);
      end
    end
    check(rises > 50, $sformatf("h_clk rose %0d times", rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
