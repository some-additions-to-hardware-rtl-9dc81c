// rpt_table: storage of the reference prediction table (RPT).
//
// Holds ENTRIES entries, each with a valid bit, tag (the full instruction
// address), prev_addr, stride, stimes and state.  The table is direct-mapped:
// entry index = instruction address bits [IDX_W+1:2] (word-aligned
// instructions), and a lookup hits when that entry is valid and its tag equals
// the instruction address.  The table size, the direct mapping and the
// replacement of the indexed entry on a miss are this design's choices; the
// entry fields follow the scheme.
//
// Interface and timing: the lookup port (lk_pc_i -> lk_hit_o, lk_entry_o) is
// combinational.  The write port (wr_en_i, wr_pc_i, wr_entry_i) writes on the
// rising clock edge, so a lookup in the next cycle sees the new value.  An
// active-low synchronous reset clears all valid bits; the other fields are
// not reset.
module rpt_table
  import rpt_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      lk_pc_i,
  output logic       lk_hit_o,
  output rpt_entry_t lk_entry_o,
  input  logic       wr_en_i,
  input  addr_t      wr_pc_i,
  input  rpt_entry_t wr_entry_i
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef logic [IDX_W-1:0] idx_t;

  rpt_entry_t mem [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  idx_t lk_idx, wr_idx;
  assign lk_idx = lk_pc_i[IDX_W+1:2];
  assign wr_idx = wr_pc_i[IDX_W+1:2];

  always_comb begin
    lk_entry_o       = mem[lk_idx];
    lk_entry_o.valid = valid_q[lk_idx];
    lk_hit_o         = valid_q[lk_idx] && (mem[lk_idx].tag == lk_pc_i);
  end

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_idx] <= wr_entry_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       valid_q <= '0;
    else if (wr_en_i) valid_q[wr_idx] <= wr_entry_i.valid;
  end

  initial begin
    assert (ENTRIES >= 2 && (ENTRIES & (ENTRIES - 1)) == 0)
      else $error("rpt_table: ENTRIES must be a power of two, at least 2");
  end

endmodule
