// prefetch_addr_gen: prefetch addresses of one updated RPT entry.
//
// This is the second step of the linear-stride datapath, applied to the
// entry after its update (prev_addr is already the address just referenced):
//   stimes = 0, state not no_pred     : one prefetch, prev_addr + stride;
//   stimes = +/-1, state not no_pred  : two prefetches, prev_addr + s and
//                                       prev_addr - s, s = |stride| shifted
//                                       one place in the stimes direction;
//   state no_pred                     : no prefetch.
// Two addresses are needed for a linear stride because the sign of the next
// step (as in a binary search) is not known.  A prefetch whose offset is 0
// would fetch the address just referenced and is not issued; this covers a
// new entry (stride 0) and a halved stride of magnitude 1, and is this
// design's own rule.
//
// Interface: entry_i is the updated entry, en_i qualifies it.  pf_valid_o[0]
// with pf_addr_o[0] is the "+" (or the only) prefetch, pf_valid_o[1] with
// pf_addr_o[1] the "-" prefetch.  Purely combinational.
module prefetch_addr_gen
  import rpt_pkg::*;
(
  input  logic       en_i,
  input  rpt_entry_t entry_i,
  output logic [1:0] pf_valid_o,
  output addr_t      pf_addr_o [2]
);

  addr_t shifted;

  stride_shifter u_shift (
    .mag_i (stride_mag(entry_i.stride)),
    .dir_i (entry_i.stimes),
    .mag_o (shifted)
  );

  always_comb begin
    pf_valid_o = '0;
    if (entry_i.stimes == STIMES_ZERO) begin
      pf_addr_o[0] = entry_i.prev_addr + addr_t'(entry_i.stride);
      pf_addr_o[1] = entry_i.prev_addr - shifted;
      if (en_i && entry_i.state != S_NO_PRED && entry_i.stride != '0)
        pf_valid_o = 2'b01;
    end else begin
      pf_addr_o[0] = entry_i.prev_addr + shifted;
      pf_addr_o[1] = entry_i.prev_addr - shifted;
      if (en_i && entry_i.state != S_NO_PRED && shifted != '0)
        pf_valid_o = 2'b11;
    end
  end

endmodule
