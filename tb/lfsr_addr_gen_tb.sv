// lfsr_addr_gen_tb: full-size test of the 16-bit (13 + 3) address generator.
//
// Forward pass from reset: the first addresses must be FFFF, FFFE, FFFD,
// FFFA and the last 7FFC, 7FF8, 7FF9, 7FFB; all 65 536 addresses must occur
// once; the bus must toggle 13*2^12 + 2^13*3*2^2 = 151 552 (25000h) times
// over the full cycle including the wrap back to FFFF; h_lfsr_clk must rise
// 8192 times, once every 8 steps; at_end must be high on 7FFB only.
// Backward pass: turning updn at 7FFB must replay the recorded forward order
// exactly in reverse, ending with at_end on FFFF. adv = 0 must hold the
// address.
module lfsr_addr_gen_tb;

  localparam int N = 16;
  localparam int L = 3;
  localparam int H = N - L;
  localparam int TOGGLES = H * (1 << (H - 1)) + (1 << H) * L * (1 << (L - 1));

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // driven low at 1 ns so the asynchronous reset sees an edge
  logic updn = 1'b0;
  logic adv = 1'b0;
  logic [N-1:0] addr;
  logic h_lfsr_clk, at_end;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_addr_gen dut (.l_lfsr_clk(clk), .rst_n, .updn, .adv, .addr, .h_lfsr_clk, .at_end);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic [N-1:0] seq [1 << N];
  bit           seen [1 << N];
  int h_rises = 0, last_rise = -1, toggles = 0, step = 0;
  logic h_prev = 1'b0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] a0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(addr == 16'hFFFF, "reset address FFFF");
    repeat (3) @(negedge clk);
    check(addr == 16'hFFFF, "adv = 0 holds the address");

    // ---- forward pass
    adv = 1'b1;
    for (int i = 0; i < (1 << N); i++) begin
      seq[i] = addr;
      check(!seen[addr], $sformatf("address %h repeated", addr));
      seen[addr] = 1'b1;
      check(at_end == (i == (1 << N) - 1), $sformatf("at_end at step %0d", i));
      a0 = addr;
      @(negedge clk);
      toggles += $countones(a0 ^ addr);
      if (h_lfsr_clk && !h_prev) begin
        h_rises++;
        if (last_rise >= 0) check(i - last_rise == 8, "h_lfsr_clk period 8");
        last_rise = i;
      end
      h_prev = h_lfsr_clk;
    end
    check(addr == 16'hFFFF, "forward pass wraps to FFFF");
    check(seq[0] == 16'hFFFF && seq[1] == 16'hFFFE && seq[2] == 16'hFFFD && seq[3] == 16'hFFFA,
          "first four addresses FFFF FFFE FFFD FFFA");
    check(seq[65532] == 16'h7FFC && seq[65533] == 16'h7FF8 && seq[65534] == 16'h7FF9 &&
          seq[65535] == 16'h7FFB, "last four addresses 7FFC 7FF8 7FF9 7FFB");
    check(toggles == TOGGLES, $sformatf("toggles %0d (%h), expected %0d", toggles, toggles, TOGGLES));
    check(TOGGLES == 'h25000, "toggle formula gives 25000h");
    check(h_rises == (1 << H), $sformatf("h_lfsr_clk rose %0d times", h_rises));

    // ---- walk to the end of the order again, then reverse
    for (int i = 0; i < (1 << N) - 1; i++) @(negedge clk);
    check(addr == 16'h7FFB && at_end, "back at 7FFB");
    adv = 1'b0;
    @(negedge clk);
    updn = 1'b1;
    @(negedge clk);
    check(addr == 16'h7FFB && !at_end, "turning round holds the address");
    adv = 1'b1;
    for (int i = (1 << N) - 1; i >= 0; i--) begin
      check(addr == seq[i], $sformatf("backward index %0d: %h, expected %h", i, addr, seq[i]));
      check(at_end == (i == 0), $sformatf("backward at_end at index %0d", i));
      if (i > 0) @(negedge clk);
    end
    adv = 1'b0;
    @(negedge clk);
    check(addr == 16'hFFFF, "backward pass ends on FFFF");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
