// sram: the memory under test, DEPTH = 2^AW words of DW bits (64k x 32).
//
// Single-port synchronous RAM with the ports of the memory block in the BIST
// structure: Address, Data_in, W/R, CLK and Data_out. On a rising clock edge
// with w_r = 1 the word at addr is written; with w_r = 0 it is read and
// appears on data_out after that edge (one cycle read latency). data_out
// holds its value during writes. The contents are not initialised.
//
// The size follows the source (64 k x 32 SRAM, 16-bit address bus); the
// read latency and the write-high W/R polarity are this design's choices.
// In silicon this is an SRAM macro; here it is an array that synthesis maps
// to a memory.
module sram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          w_r,      // 1: write, 0: read
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data_in,
  output logic [DW-1:0] data_out
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (w_r) mem[addr] <= data_in;
    else     data_out  <= mem[addr];
  end

endmodule
