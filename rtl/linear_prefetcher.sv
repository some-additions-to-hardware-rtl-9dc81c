// linear_prefetcher: hardware data prefetcher for constant and linear strides.
//
// A reference prediction table (RPT) keeps, per load/store instruction, the
// last data address, the last stride and a state.  Besides the scalar,
// zero-stride and constant-stride patterns of a classic RPT prefetcher, it
// recognises strides that double or halve on every reference (a binary
// search halves its step each time) and then prefetches the two candidate
// addresses prev_addr + s and prev_addr - s, with s the stride shifted one
// place.  The multiplier by 2 or 1/2 is a one-place shift; the ratio check
// is two comparators and a decoder.
//
// Pipeline (one reference per cycle, no stalls):
//   cycle 0  ref_valid_i with ref_pc_i, ref_addr_i.  The table is looked up,
//            the new stride, ratio, correctness and next state are computed
//            (rpt_entry_update) and the updated entry is written back at the
//            end of the cycle.  The updated entry is also registered.
//   cycle 1  The prefetch addresses of that updated entry are computed
//            (prefetch_addr_gen) and presented on pf_valid_o / pf_addr_o,
//            together with the entry's new state in the upd_* outputs.
// A reference in cycle 1 for the same instruction already sees the entry
// written at the end of cycle 0.  Prefetch requests are presented for one
// cycle and are not held: the cache side is expected to take them or drop
// them, as prefetches are only hints.  The split into these two steps
// follows the order of the datapath (comparison and stimes first, then the
// stride, address update and prefetch addresses); the registers between
// them, the table organisation and the handshake are this design's choices.
//
// Ports: clk, rst_n (active-low, synchronous); reference stream from the
// processor; up to two prefetch requests per cycle to the data cache; the
// updated entry's state, stimes, stride, correct and alloc flags for
// observation.
module linear_prefetcher
  import rpt_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  // Reference stream: instruction address and effective (data) address
  input  logic       ref_valid_i,
  input  addr_t      ref_pc_i,
  input  addr_t      ref_addr_i,
  // Prefetch requests to the data cache
  output logic [1:0] pf_valid_o,
  output addr_t      pf_addr_o [2],
  // Entry of the reference of the previous cycle, after its update
  output logic       upd_valid_o,
  output state_e     upd_state_o,
  output stimes_e    upd_stimes_o,
  output stride_t    upd_stride_o,
  output logic       upd_correct_o,
  output logic       upd_alloc_o
);

  logic       lk_hit;
  rpt_entry_t lk_entry, new_entry;
  logic       correct, alloc;

  rpt_table #(.ENTRIES(ENTRIES)) u_rpt (
    .clk        (clk),
    .rst_n      (rst_n),
    .lk_pc_i    (ref_pc_i),
    .lk_hit_o   (lk_hit),
    .lk_entry_o (lk_entry),
    .wr_en_i    (ref_valid_i),
    .wr_pc_i    (ref_pc_i),
    .wr_entry_i (new_entry)
  );

  rpt_entry_update u_update (
    .hit_i     (lk_hit),
    .entry_i   (lk_entry),
    .pc_i      (ref_pc_i),
    .ea_i      (ref_addr_i),
    .entry_o   (new_entry),
    .correct_o (correct),
    .alloc_o   (alloc)
  );

  // Register between the two steps
  logic       b_valid_q, b_correct_q, b_alloc_q;
  rpt_entry_t b_entry_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid_q   <= 1'b0;
      b_correct_q <= 1'b0;
      b_alloc_q   <= 1'b0;
      b_entry_q   <= '0;
    end else begin
      b_valid_q <= ref_valid_i;
      if (ref_valid_i) begin
        b_entry_q   <= new_entry;
        b_correct_q <= correct;
        b_alloc_q   <= alloc;
      end
    end
  end

  prefetch_addr_gen u_pfgen (
    .en_i       (b_valid_q),
    .entry_i    (b_entry_q),
    .pf_valid_o (pf_valid_o),
    .pf_addr_o  (pf_addr_o)
  );

  assign upd_valid_o   = b_valid_q;
  assign upd_state_o   = b_entry_q.state;
  assign upd_stimes_o  = b_entry_q.stimes;
  assign upd_stride_o  = b_entry_q.stride;
  assign upd_correct_o = b_correct_q;
  assign upd_alloc_o   = b_alloc_q;

  // No prefetch is issued for an entry in no_pred, none without a reference.
  property p_no_pred_silent;
    @(posedge clk) disable iff (!rst_n)
      (b_entry_q.state == S_NO_PRED || !b_valid_q) |-> pf_valid_o == 2'b00;
  endproperty
  a_no_pred_silent: assert property (p_no_pred_silent);

  // Two prefetches only for a linear stride.
  a_two_only_linear: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid_o[1] |-> b_entry_q.stimes != STIMES_ZERO);

endmodule
