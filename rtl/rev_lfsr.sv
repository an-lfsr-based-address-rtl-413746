// rev_lfsr: reversible complete LFSR (WIDTH stages).
//
// A plain LFSR never leaves the all-zero state and so skips one address.
// This one adds the de Bruijn correction: the feedback bit is also inverted
// when every stage but the last is zero (the OR/NOR chain of the complete
// LFSR), so all 2^WIDTH states are visited. Each stage has a 2:1 multiplexer
// that takes its data from the left or the right neighbour, so the same
// register runs the sequence forwards (updn = 0) or exactly backwards
// (updn = 1), the mirror-image polynomial pair of the complete LFSR.
//
// Forward  : q <= {q[W-2:0], q[W-1] ^ ^(q[W-2:0] & MASK) ^ ~|q[W-2:0]}
// Backward : q <= {q[0] ^ ^(q[W-1:1] & MASK) ^ ~|q[W-1:1], q[W-1:1]}
//
// The structure (modulo-2 feedback, OR/NOR completion, per-stage direction
// selection) follows the source. The tap set (MASK, from mbist_pkg::lfsr_mask), the
// shift direction, the all-ones reset state and the enable input are this
// design's choices; the all-ones seed and the forward order reproduce the
// printed address sequence FFFF, FFFE, FFFD, FFFA, ... of the 16-bit
// generator.
//
// Interface: clk rising edge; rst_n asynchronous, active low, loads SEED;
// en = 1 takes one step in the direction given by updn. Output q is the
// register itself (no combinational path from inputs).
module rev_lfsr #(
  parameter int unsigned     WIDTH = 3,
  parameter logic [WIDTH-1:0] SEED = '1,
  parameter logic [WIDTH-1:0] MASK = WIDTH'(mbist_pkg::lfsr_mask(WIDTH))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             updn,   // 0: forward, 1: backward
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-2:0] tap_mask;
  logic             fb_fwd, fb_bwd;
  logic [WIDTH-1:0] q_fwd, q_bwd;

  assign tap_mask = MASK[WIDTH-2:0];

  always_comb begin
    fb_fwd = q[WIDTH-1] ^ (^(q[WIDTH-2:0] & tap_mask)) ^ ~(|q[WIDTH-2:0]);
    fb_bwd = q[0]       ^ (^(q[WIDTH-1:1] & tap_mask)) ^ ~(|q[WIDTH-1:1]);
    q_fwd  = {q[WIDTH-2:0], fb_fwd};
    q_bwd  = {fb_bwd, q[WIDTH-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= updn ? q_bwd : q_fwd;
  end

  initial begin
    assert (WIDTH >= 2) else $error("rev_lfsr: WIDTH must be at least 2");
    assert (WIDTH > mbist_pkg::LFSR_MAX_W || mbist_pkg::lfsr_mask(WIDTH) != '0)
      else $error("rev_lfsr: no tap set known for WIDTH=%0d", WIDTH);
  end

endmodule
