// hclk_div: frequency divider that derives H_LFSR_CLK from L_LFSR_CLK.
//
// The high part of the address generator may step only once for every
// 2^DIV_BITS steps of the low part, at the moment the low LFSR wraps through
// its seed state. This block keeps a DIV_BITS-bit position counter that moves
// in lock-step with the low LFSR (up when updn = 0, down when updn = 1) and
// raises h_clk on the L_LFSR_CLK edge at which the counter wraps: 2^DIV_BITS-1
// -> 0 going up, 0 -> 2^DIV_BITS-1 going down. With en held high, h_clk is a
// clock of period 2^DIV_BITS L_LFSR_CLK cycles (divide by 8 for DIV_BITS = 3).
//
// The division ratio follows the source (T_H = 2^L x T_L, "DIV (1/8)"). That
// the counter also counts down, that it steps only with en, and the duty
// cycle (h_clk is high for one L_LFSR_CLK cycle after each wrap) are this
// design's choices: they keep the backward sequence the exact reverse of the
// forward one and let updn change between steps without a spurious h_clk edge.
//
// Interface: clk = L_LFSR_CLK, rising edge; rst_n asynchronous, active low;
// h_clk is a flip-flop output, so it is glitch-free. updn must only change
// after an edge at which en was low.
module hclk_div #(
  parameter int unsigned DIV_BITS = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                updn,
  output logic [DIV_BITS-1:0] pos,
  output logic                h_clk
);

  logic wrap;

  assign wrap = en && (updn ? (pos == '0) : (pos == '1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= '0;
      h_clk <= 1'b0;
    end else begin
      if (en) pos <= updn ? pos - 1'b1 : pos + 1'b1;
      h_clk <= wrap;
    end
  end

endmodule
