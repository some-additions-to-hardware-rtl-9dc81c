// stride_shifter: multiplies a stride magnitude by 2 or 1/2.
//
// The linear-stride scheme avoids a multiplier: a stride that doubles or
// halves from one reference to the next is produced by shifting the stored
// stride one place left (stimes = +1) or right (stimes = -1); stimes = 0
// passes the magnitude through.  The datapath calls this part a shift
// register; here it is a combinational one-place shifter whose result is
// used in the same cycle, which is this design's choice.  Bits shifted out
// are lost (the right shift truncates, so a magnitude of 1 becomes 0).
//
// Interface: mag_i is an unsigned stride magnitude, dir_i the stimes code,
// mag_o the shifted magnitude.  Purely combinational.
module stride_shifter
  import rpt_pkg::*;
(
  input  addr_t   mag_i,
  input  stimes_e dir_i,
  output addr_t   mag_o
);

  always_comb begin
    unique case (dir_i)
      STIMES_LEFT:  mag_o = mag_i << 1;
      STIMES_RIGHT: mag_o = mag_i >> 1;
      default:      mag_o = mag_i;
    endcase
  end

endmodule
