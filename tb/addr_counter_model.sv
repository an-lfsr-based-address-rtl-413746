// addr_counter_model: behavioural stand-in for the address generator, used to
// test the March controller on its own. It keeps the generator's protocol
// (seed after reset, one step per adv, updn chooses the direction, at_end on
// the last address of a pass, wrap across the seed) but walks the addresses
// in plain binary order: seed 0, last forward address 2^AW - 1.
module addr_counter_model #(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          updn,
  input  logic          adv,
  output logic [AW-1:0] addr,
  output logic          at_end
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (adv) addr <= updn ? addr - 1'b1 : addr + 1'b1;
  end

  assign at_end = updn ? (addr == '0) : (addr == '1);

endmodule
