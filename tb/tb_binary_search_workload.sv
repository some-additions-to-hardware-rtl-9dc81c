// tb_binary_search_workload: binary search reference streams through the
// prefetcher, the workload on which halving strides matter most.
//
// For each array size (100, 128, 1000, 1024, 8000, 8192 elements of 4 bytes)
// and prefetch block size (1, 2 and 4 elements for 100, 1000 and 8000
// elements, 1 otherwise), a number of binary searches for random keys are
// run.  Each search is one program run: the prefetcher is reset and the
// cache model emptied before it.  The load of the middle element is one
// instruction; its addresses go to the prefetcher one per cycle.  Every
// output is compared with the untimed model in rpt_model_pkg.
//
// The cache is a simple model in this testbench: it holds every block that
// was referenced or prefetched during the run, with no capacity limit.  A
// reference hits when its block is already there.  The testbench prints the
// hit rate and the number of prefetches per configuration; it checks that
// the halving stride is recognised (two-address prefetches occur) and that
// prefetches make hits happen in the larger arrays.
module tb_binary_search_workload;
  import rpt_pkg::*;
  import rpt_model_pkg::*;

  localparam int unsigned N = 64;
  localparam int SEARCHES = 200;
  localparam addr_t BASE = 32'h0001_0000;
  localparam addr_t PC_LOAD = 32'h0000_0400;

  logic clk = 0, rst_n = 0;
  logic ref_valid = 0;
  addr_t ref_pc = '0, ref_addr = '0;
  logic [1:0] pf_valid;
  addr_t pf_addr [2];
  logic upd_valid, upd_correct, upd_alloc;
  state_e upd_state;
  stimes_e upd_stimes;
  stride_t upd_stride;

  linear_prefetcher dut (
    .clk, .rst_n,
    .ref_valid_i (ref_valid), .ref_pc_i (ref_pc), .ref_addr_i (ref_addr),
    .pf_valid_o (pf_valid), .pf_addr_o (pf_addr),
    .upd_valid_o (upd_valid), .upd_state_o (upd_state), .upd_stimes_o (upd_stimes),
    .upd_stride_o (upd_stride), .upd_correct_o (upd_correct), .upd_alloc_o (upd_alloc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  rpt_model model;
  bit cache [longint];
  int block;
  int n_ref, n_hit, n_pf, n_pf2;

  function automatic longint blk(addr_t a);
    return longint'(a) / (4 * block);
  endfunction

  task automatic reference(addr_t ea);
    result_t r;
    @(negedge clk);
    ref_valid = 1; ref_pc = PC_LOAD; ref_addr = ea;
    r = model.access(longint'(PC_LOAD), longint'(ea));
    n_ref++;
    if (cache.exists(blk(ea))) n_hit++;
    cache[blk(ea)] = 1;
    @(posedge clk); #1;
    ref_valid = 0;
    check(pf_valid == ((r.npf == 2) ? 2'b11 : (r.npf == 1) ? 2'b01 : 2'b00), "pf_valid");
    check(int'(upd_state) == r.state && longint'(upd_stride) == r.stride, "entry");
    if (pf_valid[0]) begin
      check(longint'(pf_addr[0]) == r.pf0, "pf0");
      cache[blk(pf_addr[0])] = 1; n_pf++;
    end
    if (pf_valid[1]) begin
      check(longint'(pf_addr[1]) == r.pf1, "pf1");
      cache[blk(pf_addr[1])] = 1; n_pf++; n_pf2++;
    end
  endtask

  task automatic run_config(int size, int bs);
    int lo, hi, mid, key;
    block = bs;
    n_ref = 0; n_hit = 0; n_pf = 0; n_pf2 = 0;
    for (int s = 0; s < SEARCHES; s++) begin
      // a new program run: empty cache, prefetcher reset
      cache.delete();
      model = new(N);
      @(negedge clk); rst_n = 0;
      @(negedge clk); rst_n = 1;
      // array holds the even numbers 0, 2, 4, ...; keys may be absent
      key = $urandom_range(2 * size, 0);
      lo = 0; hi = size - 1;
      while (lo <= hi) begin
        mid = (lo + hi) / 2;
        reference(BASE + addr_t'(4 * mid));
        if (2 * mid == key) break;
        else if (2 * mid < key) lo = mid + 1;
        else hi = mid - 1;
      end
    end
    $display("size %5d block %0d: references %6d, hit rate %5.2f%%, prefetches %6d (%0d as pairs)",
             size, bs, n_ref, 100.0 * n_hit / n_ref, n_pf, n_pf2);
    check(n_pf2 > 0, $sformatf("size %0d: halving stride never recognised", size));
    if (size >= 1000) check(n_hit > 0, $sformatf("size %0d: no reference was prefetched", size));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_config(100, 1);  run_config(100, 2);  run_config(100, 4);
    run_config(128, 1);
    run_config(1000, 1); run_config(1000, 2); run_config(1000, 4);
    run_config(1024, 1);
    run_config(8000, 1); run_config(8000, 2); run_config(8000, 4);
    run_config(8192, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
