// rpt_state_fsm: next-state function of one RPT entry.
//
// Each entry carries a five-state history of how well its predictions have
// worked.  Given the stored state, whether the last prediction was correct
// and the stimes value the ratio detector just computed, this block gives the
// next state and which fields to rewrite:
//
//   init       correct -> steady                 incorrect -> transient1 (stride)
//   transient1 correct -> steady                 incorrect, new stimes +/-1 -> transient2
//                                                incorrect, new stimes 0    -> no_pred
//                                                (both rewrite stride and stimes)
//   transient2 correct -> steady (stride)        incorrect -> no_pred (stride, stimes)
//   steady     correct -> steady (stride)        incorrect -> init (nothing)
//   no_pred    correct -> transient1             incorrect -> no_pred (stride, stimes)
//
// The transitions and the fields they rewrite follow the scheme's state
// diagram.  On every correct outcome the stride is rewritten here: for a
// constant stride the new stride then equals the stored one, so this only
// matters for a linear stride, which would otherwise be lost; that is this
// design's choice for the arrows the diagram leaves unlabelled.
//
// The state is stored in the RPT, so this block is combinational.
module rpt_state_fsm
  import rpt_pkg::*;
(
  input  state_e  state_i,
  input  logic    correct_i,
  input  stimes_e new_stimes_i,
  output state_e  state_o,
  output logic    upd_stride_o,
  output logic    upd_stimes_o
);

  always_comb begin
    state_o      = state_i;
    upd_stride_o = correct_i;
    upd_stimes_o = 1'b0;
    unique case (state_i)
      S_INIT: begin
        state_o      = correct_i ? S_STEADY : S_TRANSIENT1;
        upd_stride_o = 1'b1;
      end
      S_TRANSIENT1: begin
        if (correct_i) begin
          state_o = S_STEADY;
        end else begin
          state_o      = (new_stimes_i != STIMES_ZERO) ? S_TRANSIENT2 : S_NO_PRED;
          upd_stride_o = 1'b1;
          upd_stimes_o = 1'b1;
        end
      end
      S_TRANSIENT2: begin
        if (correct_i) begin
          state_o = S_STEADY;
        end else begin
          state_o      = S_NO_PRED;
          upd_stride_o = 1'b1;
          upd_stimes_o = 1'b1;
        end
      end
      S_STEADY: begin
        state_o = correct_i ? S_STEADY : S_INIT;
      end
      S_NO_PRED: begin
        if (correct_i) begin
          state_o = S_TRANSIENT1;
        end else begin
          state_o      = S_NO_PRED;
          upd_stride_o = 1'b1;
          upd_stimes_o = 1'b1;
        end
      end
      default: begin
        state_o      = S_INIT;
        upd_stride_o = 1'b1;
      end
    endcase
  end

endmodule
