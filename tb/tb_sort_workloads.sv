// tb_sort_workloads: reference streams of array programs through the
// prefetcher: bubble sort (50 elements), insertion, shell, quick, merge and
// heap sort (100 and 200 elements) and a 50x50 matrix multiplication.
//
// Each program is run in the testbench on random data; every load and store
// of an array element is recorded with an instruction address of its own
// (one per load/store site in the program) and an address of 4-byte
// elements.  Each program is one run: the prefetcher is reset and the cache
// model emptied first.  The references then go to the prefetcher one per
// cycle and every output is compared with the untimed model in
// rpt_model_pkg.  The cache model keeps every referenced or prefetched
// element with no capacity limit; the hit rate and prefetch count of each
// program are printed.  Each program must produce prefetches, and the sorts
// must end sorted (a check of the generator itself).
module tb_sort_workloads;
  import rpt_pkg::*;
  import rpt_model_pkg::*;

  localparam int unsigned N = 64;
  localparam addr_t BASE_A = 32'h0010_0000;
  localparam addr_t BASE_B = 32'h0020_0000;
  localparam addr_t BASE_C = 32'h0030_0000;

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
    repeat (3_000_000) @(posedge clk);
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

  // ---------------- reference recording ----------------
  typedef struct { addr_t pc; addr_t ea; } ref_t;
  ref_t refs [$];
  int a [];
  int b [];

  function automatic void rec(int site, addr_t base, int idx);
    ref_t r;
    r.pc = addr_t'(32'h0000_2000 + 4 * site);
    r.ea = base + addr_t'(4 * idx);
    refs.push_back(r);
  endfunction

  function automatic int ld(int site, int idx);
    rec(site, BASE_A, idx);
    return a[idx];
  endfunction

  function automatic void st(int site, int idx, int v);
    rec(site, BASE_A, idx);
    a[idx] = v;
  endfunction

  function automatic void fill(int n);
    a = new[n];
    foreach (a[i]) a[i] = int'($urandom_range(9999, 0));
  endfunction

  function automatic bit sorted();
    for (int i = 1; i < a.size(); i++) if (a[i - 1] > a[i]) return 0;
    return 1;
  endfunction

  // ---------------- the programs ----------------
  function automatic void bubble(int n);
    fill(n);
    for (int i = 0; i < n - 1; i++)
      for (int j = 0; j < n - 1 - i; j++) begin
        int x, y;
        x = ld(0, j); y = ld(1, j + 1);
        if (x > y) begin st(2, j, y); st(3, j + 1, x); end
      end
  endfunction

  function automatic void insertion(int n);
    fill(n);
    for (int i = 1; i < n; i++) begin
      int key, j;
      key = ld(0, i);
      j = i - 1;
      while (j >= 0 && ld(1, j) > key) begin
        st(2, j + 1, a[j]);
        j--;
      end
      st(3, j + 1, key);
    end
  endfunction

  function automatic void shell(int n);
    fill(n);
    for (int gap = n / 2; gap > 0; gap /= 2)
      for (int i = gap; i < n; i++) begin
        int tmp, j;
        tmp = ld(0, i);
        j = i;
        while (j >= gap && ld(1, j - gap) > tmp) begin
          st(2, j, a[j - gap]);
          j -= gap;
        end
        st(3, j, tmp);
      end
  endfunction

  function automatic void quick(int n);
    int stk [$];
    fill(n);
    stk.push_back(0); stk.push_back(n - 1);
    while (stk.size() > 0) begin
      int lo, hi, pivot, i;
      hi = stk.pop_back(); lo = stk.pop_back();
      if (lo >= hi) continue;
      pivot = ld(0, hi);
      i = lo - 1;
      for (int j = lo; j < hi; j++)
        if (ld(1, j) < pivot) begin
          int t;
          i++;
          t = ld(2, i); st(3, i, a[j]); st(4, j, t);
        end
      begin
        int t;
        t = ld(5, i + 1); st(6, i + 1, a[hi]); st(7, hi, t);
      end
      stk.push_back(lo); stk.push_back(i);
      stk.push_back(i + 2); stk.push_back(hi);
    end
  endfunction

  // bottom-up merge sort through a second buffer b
  function automatic void merge(int n);
    fill(n);
    b = new[n];
    for (int w = 1; w < n; w *= 2)
      for (int lo = 0; lo < n; lo += 2 * w) begin
        int mid, hi, i, j, k;
        mid = (lo + w < n) ? lo + w : n;
        hi = (lo + 2 * w < n) ? lo + 2 * w : n;
        i = lo; j = mid; k = lo;
        while (i < mid && j < hi) begin
          if (ld(0, i) <= ld(1, j)) begin b[k] = a[i]; i++; end
          else begin b[k] = a[j]; j++; end
          rec(2, BASE_B, k); k++;
        end
        while (i < mid) begin b[k] = ld(3, i); rec(4, BASE_B, k); i++; k++; end
        while (j < hi) begin b[k] = ld(5, j); rec(6, BASE_B, k); j++; k++; end
        for (int m = lo; m < hi; m++) begin rec(7, BASE_B, m); st(8, m, b[m]); end
      end
  endfunction

  function automatic void sift(int root, int n);
    int child;
    while (2 * root + 1 < n) begin
      int c, r;
      child = 2 * root + 1;
      c = ld(0, child);
      if (child + 1 < n && ld(1, child + 1) > c) begin child++; c = a[child]; end
      r = ld(2, root);
      if (r >= c) break;
      st(3, root, c); st(4, child, r);
      root = child;
    end
  endfunction

  function automatic void heap(int n);
    fill(n);
    for (int s = n / 2 - 1; s >= 0; s--) sift(s, n);
    for (int e = n - 1; e > 0; e--) begin
      int t;
      t = ld(5, 0); st(6, 0, a[e]); st(7, e, t);
      sift(0, e);
    end
  endfunction

  function automatic void matmul(int n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        for (int k = 0; k < n; k++) begin
          rec(0, BASE_A, i * n + k);
          rec(1, BASE_B, k * n + j);
        end
        rec(2, BASE_C, i * n + j);
      end
  endfunction

  // ---------------- replay through the prefetcher ----------------
  task automatic replay(string name);
    rpt_model model;
    result_t r;
    bit cache [addr_t];
    int n_hit = 0, n_pf = 0, n_pf2 = 0;
    model = new(N);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    foreach (refs[k]) begin
      @(negedge clk);
      ref_valid = 1; ref_pc = refs[k].pc; ref_addr = refs[k].ea;
      r = model.access(longint'(refs[k].pc), longint'(refs[k].ea));
      if (cache.exists(refs[k].ea)) n_hit++;
      cache[refs[k].ea] = 1;
      @(posedge clk); #1;
      ref_valid = 0;
      check(pf_valid == ((r.npf == 2) ? 2'b11 : (r.npf == 1) ? 2'b01 : 2'b00), {name, ": pf_valid"});
      check(int'(upd_state) == r.state && longint'(upd_stride) == r.stride, {name, ": entry"});
      if (pf_valid[0]) begin
        check(longint'(pf_addr[0]) == r.pf0, {name, ": pf0"});
        cache[pf_addr[0]] = 1; n_pf++;
      end
      if (pf_valid[1]) begin
        check(longint'(pf_addr[1]) == r.pf1, {name, ": pf1"});
        cache[pf_addr[1]] = 1; n_pf++; n_pf2++;
      end
    end
    $display("%-22s references %7d, hit rate %6.2f%%, prefetches %7d (%0d as pairs)",
             name, refs.size(), 100.0 * n_hit / refs.size(), n_pf, n_pf2);
    check(n_pf > 0, {name, ": no prefetch"});
    refs.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    bubble(50);     check(sorted(), "bubble");    replay("bubble sort 50");
    insertion(100); check(sorted(), "insertion"); replay("insertion sort 100");
    shell(100);     check(sorted(), "shell");     replay("shell sort 100");
    quick(100);     check(sorted(), "quick");     replay("quick sort 100");
    quick(200);     check(sorted(), "quick");     replay("quick sort 200");
    merge(100);     check(sorted(), "merge");     replay("merge sort 100");
    merge(200);     check(sorted(), "merge");     replay("merge sort 200");
    heap(100);      check(sorted(), "heap");      replay("heap sort 100");
    heap(200);      check(sorted(), "heap");      replay("heap sort 200");
    matmul(50);                                   replay("matrix multiply 50x50");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
