// bist_controller: March-test sequencer (signal generator of the BIST
// controller).
//
// It applies a March algorithm, a list of elements each made of an address
// order (up or down) and up to six read/write operations, to every address
// produced by the LFSR address generator. For each address it issues the
// element's operations one per clock (op_valid, bist_w_r, op_value); on the
// last operation it raises adv so the generator moves to the next address,
// or, if the generator reports at_end, it closes the element.
//
// Between elements the generator is re-aimed. A forward pass ends on the
// last address (LAST_FWD) and a backward pass on the seed. A forward element
// must start on the seed and a backward one on the last address, so:
//   SETDIR : one idle cycle in which updn is set for the next element
//            (adv low, so the direction changes only between steps);
//   MOVE   : only if the generator is on the wrong end, one adv step in the
//            new direction, which wraps it across the seed.
// After the last element the generator is brought back to the seed, so the
// next test starts where a reset would leave it. The idle cycles also give
// the comparator the one clock it needs for the last read, so test_passed
// in DONE already reflects every read.
//
// Handshake: a test starts when bist_test is high in IDLE; bist_cs is high
// while the test owns the memory; test_done and test_passed are held in DONE
// until bist_test is taken low, which returns to IDLE. clear pulses for one
// cycle at the start. adv, bist_cs, bist_w_r and op_* are combinational from
// the state; updn is a register.
//
// From the source: the role of the block, BIST_Test, BIST_W/R, BIST_CS, Test
// passed and the use of March elements with up/down order through updn. This
// design's own: the state machine, the element table (mbist_pkg::MARCH_ALG)
// and the re-aiming steps.
module bist_controller
  import mbist_pkg::*;
#(
  parameter int unsigned N_ELEMS            = MARCH_N,
  parameter march_elem_t ALG [N_ELEMS]      = MARCH_ALG
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bist_test,
  input  logic at_end,       // from the address generator
  input  logic test_fail,    // from the data comparator
  output logic bist_cs,
  output logic bist_w_r,     // 1: write
  output logic op_valid,
  output logic op_value,
  output logic updn,
  output logic adv,
  output logic clear,
  output logic test_done,
  output logic test_passed
);

  localparam int unsigned EW = (N_ELEMS > 1) ? $clog2(N_ELEMS) : 1;

  typedef enum logic [2:0] {
    S_IDLE,
    S_SETDIR,
    S_MOVE,
    S_RUN,
    S_DONE
  } state_e;

  state_e      state;
  logic [EW-1:0] elem;
  logic [2:0]  op_idx;
  logic        tgt_down;     // direction wanted for the next element
  logic        at_seed;      // generator is on the seed (else on LAST_FWD)
  logic        finishing;    // last element done, returning to the seed

  march_elem_t cur;
  logic [1:0]  cur_op;
  logic        last_op;
  logic        need_move;

  assign cur       = ALG[elem];
  assign cur_op    = cur.ops[op_idx];
  assign last_op   = (op_idx == cur.n_ops - 3'd1);
  assign need_move = tgt_down ? at_seed : !at_seed;

  always_comb begin
    bist_cs     = (state == S_SETDIR) || (state == S_MOVE) || (state == S_RUN);
    op_valid    = (state == S_RUN);
    bist_w_r    = op_valid && cur_op[1];
    op_value    = cur_op[0];
    adv         = (state == S_MOVE) || ((state == S_RUN) && last_op && !at_end);
    clear       = (state == S_IDLE) && bist_test;
    test_done   = (state == S_DONE);
    test_passed = (state == S_DONE) && !test_fail;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      elem      <= '0;
      op_idx    <= '0;
      tgt_down  <= 1'b0;
      at_seed   <= 1'b1;
      finishing <= 1'b0;
      updn      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (bist_test) begin
            elem      <= '0;
            op_idx    <= '0;
            tgt_down  <= ALG[0].down;
            finishing <= 1'b0;
            state     <= S_SETDIR;
          end
        end
        S_SETDIR: begin
          updn  <= tgt_down;
          state <= need_move ? S_MOVE : (finishing ? S_DONE : S_RUN);
        end
        S_MOVE: begin
          at_seed <= !at_seed;
          state   <= finishing ? S_DONE : S_RUN;
        end
        S_RUN: begin
          if (!last_op) begin
            op_idx <= op_idx + 3'd1;
          end else begin
            op_idx <= '0;
            if (at_end) begin
              at_seed <= cur.down;            // down passes end on the seed
              state   <= S_SETDIR;
              if (elem == EW'(N_ELEMS - 1)) begin
                finishing <= 1'b1;
                tgt_down  <= 1'b0;
              end else begin
                elem     <= elem + 1'b1;
                tgt_down <= ALG[elem + 1'b1].down;
              end
            end
          end
        end
        S_DONE: begin
          if (!bist_test) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ops_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_RUN) |-> (cur.n_ops != 0 && cur.n_ops <= 3'(MAX_OPS)));

endmodule
