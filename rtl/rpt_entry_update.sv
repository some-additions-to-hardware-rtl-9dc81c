// rpt_entry_update: forms the new value of the RPT entry of one reference.
//
// This is the first step of the linear-stride datapath.  The new stride is
// the effective address minus the entry's prev_addr.  The ratio detector
// compares it with the stored stride shifted left and right by one place and
// proposes a new stimes.  The last prediction was correct when
//   stimes = 0  : the new stride equals the stored stride,
//   stimes = +1 : |new stride| = |stored stride| * 2,
//   stimes = -1 : |new stride| = |stored stride| / 2,
// that is, when the reference hit one of the addresses prefetched for it.
// The entry state machine then picks the next state and the fields to
// rewrite; prev_addr always becomes the effective address.
//
// On a table miss (hit_i low) a new entry is formed: tag = PC, prev_addr =
// effective address, stride 0, stimes 0, state init.  The new entry's
// fields follow the scheme; reusing the slot of whatever entry was there
// before is this design's choice (see rpt_table).
//
// Interface: hit_i and entry_i come from the table lookup of pc_i;
// ea_i is the referenced data address.  entry_o is the value to write back;
// correct_o and alloc_o report what happened.  Purely combinational.
module rpt_entry_update
  import rpt_pkg::*;
(
  input  logic       hit_i,
  input  rpt_entry_t entry_i,
  input  addr_t      pc_i,
  input  addr_t      ea_i,
  output rpt_entry_t entry_o,
  output logic       correct_o,
  output logic       alloc_o
);

  stride_t new_stride;
  logic    eq_left, eq_right;
  stimes_e new_stimes;
  state_e  next_state;
  logic    upd_stride, upd_stimes;

  assign new_stride = stride_t'(ea_i - entry_i.prev_addr);

  stride_ratio_detector u_ratio (
    .old_stride_i (entry_i.stride),
    .new_stride_i (new_stride),
    .eq_left_o    (eq_left),
    .eq_right_o   (eq_right),
    .stimes_o     (new_stimes)
  );

  always_comb begin
    unique case (entry_i.stimes)
      STIMES_LEFT:  correct_o = hit_i && eq_left;
      STIMES_RIGHT: correct_o = hit_i && eq_right;
      default:      correct_o = hit_i && (new_stride == entry_i.stride);
    endcase
  end

  rpt_state_fsm u_fsm (
    .state_i      (entry_i.state),
    .correct_i    (correct_o),
    .new_stimes_i (new_stimes),
    .state_o      (next_state),
    .upd_stride_o (upd_stride),
    .upd_stimes_o (upd_stimes)
  );

  always_comb begin
    alloc_o = !hit_i;
    if (hit_i) begin
      entry_o           = entry_i;
      entry_o.prev_addr = ea_i;
      entry_o.state     = next_state;
      if (upd_stride) entry_o.stride = new_stride;
      if (upd_stimes) entry_o.stimes = new_stimes;
    end else begin
      entry_o.valid     = 1'b1;
      entry_o.tag       = pc_i;
      entry_o.prev_addr = ea_i;
      entry_o.stride    = '0;
      entry_o.stimes    = STIMES_ZERO;
      entry_o.state     = S_INIT;
    end
  end

endmodule
