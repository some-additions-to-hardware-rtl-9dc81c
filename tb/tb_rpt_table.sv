// tb_rpt_table: checks the RPT storage.
//
// After reset no lookup hits.  Random entries are written for random
// instruction addresses and looked up again; a shadow copy in the testbench
// (indexed by address bits [IDX+1:2]) gives the expected hit and contents,
// so tag mismatches between aliasing addresses and overwrites are covered.
// A second reset must clear every entry.  Runs with 16 entries.
module tb_rpt_table;
  import rpt_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  addr_t lk_pc = '0, wr_pc = '0;
  logic hit, wr_en = 0;
  rpt_entry_t lk_e, wr_e;
  int checks = 0, failures = 0;

  rpt_table #(.ENTRIES(N)) dut (
    .clk, .rst_n, .lk_pc_i (lk_pc), .lk_hit_o (hit), .lk_entry_o (lk_e),
    .wr_en_i (wr_en), .wr_pc_i (wr_pc), .wr_entry_i (wr_e)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  rpt_entry_t shadow [N];
  bit         sv     [N];

  function automatic addr_t rand_pc();
    // few distinct addresses per entry so both hits and tag misses occur
    return addr_t'({$urandom_range(3, 0), 2'b00} * N + {$urandom_range(N - 1, 0), 2'b00});
  endfunction

  task automatic lookup_all_clear();
    for (int i = 0; i < N; i++) begin
      lk_pc = addr_t'(i * 4); #1;
      chk(!hit, "hit after reset");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup_all_clear();
    foreach (sv[i]) sv[i] = 0;
    repeat (3000) begin
      int idx;
      @(negedge clk);
      // check a random lookup
      lk_pc = rand_pc(); #1;
      idx = (lk_pc >> 2) % N;
      chk(hit == (sv[idx] && shadow[idx].tag == lk_pc), "hit");
      if (hit) chk(lk_e == shadow[idx], "contents");
      // write a random entry
      wr_en = ($urandom_range(1, 0) == 1);
      wr_pc = rand_pc();
      wr_e = {$urandom, $urandom, $urandom, $urandom};
      wr_e.valid = 1; wr_e.tag = wr_pc;
      @(posedge clk); #1;
      if (wr_en) begin
        idx = (wr_pc >> 2) % N;
        shadow[idx] = wr_e; sv[idx] = 1;
        // the write is visible right after the edge
        lk_pc = wr_pc; #1;
        chk(hit && lk_e == wr_e, "read after write");
      end
      wr_en = 0;
    end
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    lookup_all_clear();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
