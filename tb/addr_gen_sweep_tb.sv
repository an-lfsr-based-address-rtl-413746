// addr_gen_sweep_tb: runs the address generator at every bus width from 10
// to 24 bits, each with the low-part width of the optimal-partition table
// (L = 3 for N = 10..19, L = 4 for N = 20..24), all in parallel on one clock.
// For each width it checks that the address first returns to all ones after
// exactly 2^N steps (so every address occurs once, the step being a
// bijection) and that the address bus toggles exactly
//     Y = H * 2^(H-1) + 2^H * L * 2^(L-1),  H = N - L
// times over that full sequence, and that this is below the N * 2^(N-1)
// toggles of a single N-bit LFSR.
module addr_gen_sweep_tb;

  localparam int NMIN = 10;
  localparam int NMAX = 24;
  localparam int NW   = NMAX - NMIN + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic adv = 1'b0;
  int checks = 0, failures = 0;
  bit done [NW];

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int N = NMIN + g;
    localparam int L = (N >= 20) ? 4 : 3;
    localparam int H = N - L;
    localparam longint Y = longint'(H) * (64'd1 << (H - 1)) + (64'd1 << H) * L * (64'd1 << (L - 1));
    logic [N-1:0] addr, prev;
    logic h_clk, at_end;
    longint toggles = 0, steps = 0;

    lfsr_addr_gen #(.N(N), .L(L)) dut (.l_lfsr_clk(clk), .rst_n, .updn(1'b0), .adv,
                                       .addr, .h_lfsr_clk(h_clk), .at_end);

    initial done[g] = 1'b0;

    always @(negedge clk) begin
      if (adv && !done[g]) begin
        steps++;
        toggles += $countones(prev ^ addr);
        if (addr == '1) begin
          check(steps == (64'd1 << N), $sformatf("N=%0d: period %0d", N, steps));
          check(toggles == Y, $sformatf("N=%0d: toggles %0d, expected %0d", N, toggles, Y));
          check(Y < longint'(N) * (64'd1 << (N - 1)), $sformatf("N=%0d: below a plain LFSR", N));
          $display("N=%0d L=%0d H=%0d: %0d addresses, %0d toggles", N, L, H, steps, toggles);
          done[g] = 1'b1;
        end
      end
      prev = addr;
    end
  end

  initial begin
    repeat ((1 << NMAX) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    adv <= 1'b1;   // seen by the monitors from the next negedge on
    do begin
      @(negedge clk);
      #1;
      all = 1'b1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
