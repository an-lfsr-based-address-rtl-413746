// mbist_pkg: types, constants and helper functions shared by the memory
// BIST blocks.
//
// * lfsr_mask(width) gives the feedback taps of a maximal-length LFSR of the
//   given width (2 to 22 bits) in the convention used by rev_lfsr: the
//   register shifts towards the MSB, the new bit enters bit 0 and the
//   feedback is q[W-1] ^ ^(q[W-2:0] & mask). The masks are the reciprocals of
//   the widely published Fibonacci tap list (for example x^13+x^4+x^3+x+1 ->
//   stages 13,12,10,9); every one was checked to give period 2^W once the
//   all-zero correction of the complete LFSR is added. For W=3 the mask gives
//   the low-address order 7,6,5,2,4,0,1,3, and for W=13 it steps 0FFF to 1FFF.
// * lfsr_next / lfsr_prev step a complete LFSR one state forward or back;
//   they let other blocks work out, at elaboration, the last address of a
//   pass.
// * The March algorithm is a constant table of elements. Each element has an
//   address order and up to MAX_OPS read/write operations. The default,
//   MARCH_ALG, is
//     {up}(W0); up(R0,W1,W1,R1,R1,W0); down(R0,W1); down(R1,W0); {up}(R0)
//   It uses the three example elements of the source (the "any order" W0
//   element, run here in up order, the six-operation up element and the
//   down(R1,W0) element), with down(R0,W1) and a final read added so that the
//   values read always match what was last written.
package mbist_pkg;

  localparam int unsigned LFSR_MAX_W = 32;

  function automatic logic [LFSR_MAX_W-1:0] lfsr_mask(input int unsigned width);
    case (width)
      2:       return 32'h0000_0001;
      3:       return 32'h0000_0001;
      4:       return 32'h0000_0001;
      5:       return 32'h0000_0002;
      6:       return 32'h0000_0001;
      7:       return 32'h0000_0001;
      8:       return 32'h0000_000E;
      9:       return 32'h0000_0008;
      10:      return 32'h0000_0004;
      11:      return 32'h0000_0002;
      12:      return 32'h0000_04A0;
      13:      return 32'h0000_0B00;
      14:      return 32'h0000_1500;
      15:      return 32'h0000_0001;
      16:      return 32'h0000_0805;
      17:      return 32'h0000_0004;
      18:      return 32'h0000_0040;
      19:      return 32'h0003_1000;
      20:      return 32'h0000_0004;
      21:      return 32'h0000_0002;
      22:      return 32'h0000_0001;
      default: return 32'h0000_0000;
    endcase
  endfunction

  // One forward step of a complete LFSR of the given width.
  function automatic logic [LFSR_MAX_W-1:0] lfsr_next(input logic [LFSR_MAX_W-1:0] s,
                                                      input int unsigned width);
    logic [LFSR_MAX_W-1:0] low_mask, mask;
    logic fb;
    low_mask = (LFSR_MAX_W'(1) << (width - 1)) - 1;
    mask     = lfsr_mask(width) & low_mask;
    fb       = s[width-1] ^ (^(s & mask)) ^ ((s & low_mask) == '0);
    return ((s << 1) | LFSR_MAX_W'(fb)) & ((LFSR_MAX_W'(1) << width) - 1);
  endfunction

  // One backward step: the inverse of lfsr_next.
  function automatic logic [LFSR_MAX_W-1:0] lfsr_prev(input logic [LFSR_MAX_W-1:0] s,
                                                      input int unsigned width);
    logic [LFSR_MAX_W-1:0] upper, low_mask, mask;
    logic msb;
    low_mask = (LFSR_MAX_W'(1) << (width - 1)) - 1;
    mask     = lfsr_mask(width) & low_mask;
    upper    = (s >> 1) & low_mask;
    msb      = s[0] ^ (^(upper & mask)) ^ (upper == '0);
    return upper | (LFSR_MAX_W'(msb) << (width - 1));
  endfunction

  // ---------------------------------------------------------------- March
  typedef enum logic [1:0] {
    OP_R0 = 2'b00,
    OP_R1 = 2'b01,
    OP_W0 = 2'b10,
    OP_W1 = 2'b11
  } march_op_e;   // bit 1: write, bit 0: data value

  localparam int unsigned MAX_OPS = 6;

  typedef struct packed {
    logic                    down;   // 1: decreasing address order
    logic [2:0]              n_ops;  // operations used, 1..MAX_OPS
    logic [MAX_OPS-1:0][1:0] ops;    // march_op_e codes, ops[0] first
  } march_elem_t;

  localparam int unsigned MARCH_N = 5;

  localparam march_elem_t MARCH_ALG [MARCH_N] = '{
    '{down: 1'b0, n_ops: 3'd1, ops: {OP_R0, OP_R0, OP_R0, OP_R0, OP_R0, OP_W0}},
    '{down: 1'b0, n_ops: 3'd6, ops: {OP_W0, OP_R1, OP_R1, OP_W1, OP_W1, OP_R0}},
    '{down: 1'b1, n_ops: 3'd2, ops: {OP_R0, OP_R0, OP_R0, OP_R0, OP_W1, OP_R0}},
    '{down: 1'b1, n_ops: 3'd2, ops: {OP_R0, OP_R0, OP_R0, OP_R0, OP_W0, OP_R1}},
    '{down: 1'b0, n_ops: 3'd1, ops: {OP_R0, OP_R0, OP_R0, OP_R0, OP_R0, OP_R0}}
  };

endpackage
