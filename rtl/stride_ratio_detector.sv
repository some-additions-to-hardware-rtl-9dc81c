// stride_ratio_detector: detects a stride that doubled or halved.
//
// Two comparators test the magnitude of the new stride against the magnitude
// of the stored (old) stride shifted one place left and one place right.  A
// decoder turns the two equal signals into the new stimes value: only the
// left comparator equal gives 10 (+1, stride doubles), only the right one
// gives 01 (-1, stride halves), anything else gives 00 (0).  Magnitudes are
// compared because the ratio that matters is the absolute one; a linear
// stride such as a binary search's alternates in sign.  Both comparators
// match only when both strides are 0, which the decoder maps to 00 (this
// design's choice).
//
// The two equal signals are also brought out: when the stored stimes is
// +1 or -1 the same comparison tells whether the last prediction was right.
//
// Interface: old_stride_i, new_stride_i (two's complement); eq_left_o,
// eq_right_o, stimes_o.  Purely combinational.
module stride_ratio_detector
  import rpt_pkg::*;
(
  input  stride_t old_stride_i,
  input  stride_t new_stride_i,
  output logic    eq_left_o,   // |new| == |old| << 1
  output logic    eq_right_o,  // |new| == |old| >> 1
  output stimes_e stimes_o
);

  addr_t old_mag, new_mag;

  always_comb begin
    old_mag    = stride_mag(old_stride_i);
    new_mag    = stride_mag(new_stride_i);
    eq_left_o  = (new_mag == (old_mag << 1));
    eq_right_o = (new_mag == (old_mag >> 1));
    // Decoder
    unique case ({eq_left_o, eq_right_o})
      2'b10:   stimes_o = STIMES_LEFT;
      2'b01:   stimes_o = STIMES_RIGHT;
      default: stimes_o = STIMES_ZERO;
    endcase
  end

endmodule
