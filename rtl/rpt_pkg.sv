// rpt_pkg: types and constants shared by the linear-stride prefetcher.
//
// A reference prediction table (RPT) entry holds, for one load/store
// instruction, the instruction address (tag), the last data address it
// referenced (prev_addr), the difference between its last two addresses
// (stride), the stride multiplier stimes and the entry state.  The five
// states and the meaning of the fields follow the scheme described for the
// design; the 2-bit stimes codes 10 (+1, multiply by 2), 01 (-1, multiply
// by 1/2) and 00 (0, no multiply) are the decoder outputs of the datapath.
// The address width and the 3-bit state encoding values are this design's
// own choices.
package rpt_pkg;

  // Width of data addresses, strides and instruction addresses.
  parameter int unsigned ADDR_W = 32;

  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [ADDR_W-1:0] stride_t;

  // Stride multiplier: direction of the one-place shift applied to the stride.
  typedef enum logic [1:0] {
    STIMES_ZERO  = 2'b00,  // constant, zero or scalar stride
    STIMES_RIGHT = 2'b01,  // -1: stride halves each time
    STIMES_LEFT  = 2'b10   // +1: stride doubles each time
  } stimes_e;

  // Entry state (three bits: one more than a four-state table needs).
  typedef enum logic [2:0] {
    S_INIT       = 3'd0,
    S_TRANSIENT1 = 3'd1,
    S_TRANSIENT2 = 3'd2,
    S_STEADY     = 3'd3,
    S_NO_PRED    = 3'd4
  } state_e;

  typedef struct packed {
    logic    valid;
    addr_t   tag;        // instruction address
    addr_t   prev_addr;  // last referenced data address
    stride_t stride;     // last difference of data addresses
    stimes_e stimes;
    state_e  state;
  } rpt_entry_t;

  // Magnitude of a two's-complement stride.
  function automatic addr_t stride_mag(stride_t s);
    return s[ADDR_W-1] ? addr_t'(-s) : addr_t'(s);
  endfunction

endpackage
