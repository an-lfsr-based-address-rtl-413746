// lfsr_addr_gen: low-switching memory BIST address generator.
//
// An N-bit LFSR address counter toggles about N/2 address bits per step. This
// generator splits the address into a high part of H = N - L bits and a low
// part of L bits, each a reversible complete LFSR (rev_lfsr). The low LFSR
// runs on L_LFSR_CLK and steps with every address; the high LFSR runs on
// H_LFSR_CLK, divided from L_LFSR_CLK by 2^L (hclk_div), and steps once each
// time the low LFSR has been through all 2^L states. Over a full pass of 2^N
// addresses the address bus then toggles
//     Y = H * 2^(H-1) + 2^H * L * 2^(L-1)
// times, which is smallest for L = 3 at N = 10..19 and L = 4 at N = 20..24;
// for N = 16, L = 3 gives 151 552 toggles against 524 288 for a single
// 16-bit LFSR.
//
// addr = {high LFSR, low LFSR}. After reset addr = all ones (FFFF); with
// updn = 0 the order is FFFF, FFFE, FFFD, FFFA, ... , 7FFC, 7FF8, 7FF9, 7FFB,
// then FFFF again. updn = 1 runs the same order exactly backwards. at_end is
// high on the last address of a pass: LAST_FWD (7FFB) going forward, the
// seed (FFFF) going backward.
//
// Follows the source: the partition (16 = 13 + 3), the two clocks and the
// 1/8 divider, the updn input and the all-ones start address. This design's
// own choices: the adv (advance) input, which lets an address be held for
// several March operations (the source steps on every clock); the at_end
// flag; the tap sets (see mbist_pkg).
//
// Interface: l_lfsr_clk is the system clock; rst_n asynchronous, active low.
// With adv high at a rising l_lfsr_clk edge the address moves one place and
// is valid after that edge (the high part one flip-flop delay later, on the
// h_lfsr_clk edge raised by the same l_lfsr_clk edge). updn may change only
// after an edge at which adv was low.
module lfsr_addr_gen #(
  parameter int unsigned N = 16,   // address bus width
  parameter int unsigned L = 3     // low-part width (Table of optimal partitions)
) (
  input  logic         l_lfsr_clk,
  input  logic         rst_n,
  input  logic         updn,        // 0: forward order, 1: reverse order
  input  logic         adv,
  output logic [N-1:0] addr,
  output logic         h_lfsr_clk,
  output logic         at_end
);

  localparam int unsigned H = N - L;

  localparam logic [H-1:0] SEED_H = '1;
  localparam logic [L-1:0] SEED_L = '1;
  localparam logic [N-1:0] SEED   = {SEED_H, SEED_L};
  // Last address of a forward pass: the predecessor of the seed.
  localparam logic [N-1:0] LAST_FWD =
      {H'(mbist_pkg::lfsr_prev(mbist_pkg::LFSR_MAX_W'(SEED_H), H)),
       L'(mbist_pkg::lfsr_prev(mbist_pkg::LFSR_MAX_W'(SEED_L), L))};

  logic [H-1:0] addr_h;
  logic [L-1:0] addr_l;
  logic [L-1:0] div_pos;

  hclk_div #(.DIV_BITS(L)) u_div (
    .clk   (l_lfsr_clk),
    .rst_n (rst_n),
    .en    (adv),
    .updn  (updn),
    .pos   (div_pos),
    .h_clk (h_lfsr_clk)
  );

  rev_lfsr #(.WIDTH(L), .SEED(SEED_L)) u_low (
    .clk   (l_lfsr_clk),
    .rst_n (rst_n),
    .en    (adv),
    .updn  (updn),
    .q     (addr_l)
  );

  rev_lfsr #(.WIDTH(H), .SEED(SEED_H)) u_high (
    .clk   (h_lfsr_clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .updn  (updn),
    .q     (addr_h)
  );

  assign addr   = {addr_h, addr_l};
  assign at_end = updn ? (addr == SEED) : (addr == LAST_FWD);

  // The divider position and the low LFSR must stay in step: position 0 is
  // the seed of the low LFSR.
  a_div_in_step: assert property (@(posedge l_lfsr_clk) disable iff (!rst_n)
                                  (div_pos == '0) == (addr_l == SEED_L));
  // The high LFSR samples updn on h_lfsr_clk, just after an l_lfsr_clk edge
  // with adv high; updn must not change on such an edge.
  a_updn_stable: assert property (@(posedge l_lfsr_clk) disable iff (!rst_n)
                                  $changed(updn) |-> !$past(adv));

  initial assert (L >= 2 && H >= 2) else $error("lfsr_addr_gen: both parts need 2 bits or more");

endmodule
