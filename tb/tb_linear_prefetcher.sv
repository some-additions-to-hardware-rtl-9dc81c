// tb_linear_prefetcher: end-to-end test of the linear-stride prefetcher at its
// default size.
//
// Part 1 replays the worked example of the scheme: one instruction (address
// 100) referencing 256, 128, 192, 160, 144, 152, 156, 154, 155; the stride,
// stimes, state and prefetch addresses after every reference are checked
// against values written out by hand.
// Part 2 drives a long random mix of reference streams (constant stride,
// halving and doubling strides, scalar, random, and streams that switch
// pattern), from many instructions, some of them mapping to the same table
// entry, with idle cycles and back-to-back references of one instruction.
// Every output is compared with the untimed model in rpt_model_pkg one cycle
// after its reference.  It counts how often each state transition, table
// allocation and replacement, one- and two-address prefetch and stimes
// value occurs, and counts a failure for any that never happens.
module tb_linear_prefetcher;
  import rpt_pkg::*;
  import rpt_model_pkg::*;

  localparam int unsigned N = 64;  // default table size of the design
  localparam int NREF = 40000;

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
  int cycles = 0;
  always @(posedge clk) cycles++;

  // Watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic int stimes_int(stimes_e s);
    case (s)
      STIMES_LEFT:  return 1;
      STIMES_RIGHT: return -1;
      default:      return 0;
    endcase
  endfunction

  // Mechanism counters
  int trans [5][5];
  int n_alloc = 0, n_replace = 0, n_pf1 = 0, n_pf2 = 0, n_left = 0, n_right = 0;
  int n_b2b = 0, n_idle = 0;

  rpt_model model;
  addr_t last_pc;
  bit    last_was_ref = 0;

  // Present one reference, then check the outputs it produces a cycle later.
  task automatic send(addr_t pc, addr_t ea);
    result_t r;
    int idx, prior;
    bit replace;
    @(negedge clk);
    if (last_was_ref && pc == last_pc) n_b2b++;
    ref_valid = 1; ref_pc = pc; ref_addr = ea;
    idx = int'((longint'(pc) >> 2) % N);
    prior = (model.v[idx] && model.tag[idx] == longint'(pc)) ? model.state[idx] : -1;
    replace = model.v[idx] && model.tag[idx] != longint'(pc);
    r = model.access(longint'(pc), longint'(ea));
    @(posedge clk);
    #1;
    ref_valid = 0;
    last_pc = pc; last_was_ref = 1;
    check(upd_valid == 1, "upd_valid");
    check(upd_alloc == r.alloc, $sformatf("alloc pc=%0d ea=%0d", pc, ea));
    check(upd_correct == r.correct, $sformatf("correct pc=%0d ea=%0d exp %0d", pc, ea, r.correct));
    check(int'(upd_state) == r.state, $sformatf("state pc=%0d ea=%0d got %0d exp %0d", pc, ea, upd_state, r.state));
    check(stimes_int(upd_stimes) == r.stimes, $sformatf("stimes pc=%0d ea=%0d", pc, ea));
    check(longint'(upd_stride) == r.stride, $sformatf("stride pc=%0d ea=%0d got %0d exp %0d", pc, ea, upd_stride, r.stride));
    check(pf_valid == ((r.npf == 2) ? 2'b11 : (r.npf == 1) ? 2'b01 : 2'b00),
          $sformatf("pf_valid pc=%0d ea=%0d got %b exp %0d", pc, ea, pf_valid, r.npf));
    if (r.npf >= 1) check(longint'(pf_addr[0]) == r.pf0, $sformatf("pf0 got %0d exp %0d", pf_addr[0], r.pf0));
    if (r.npf == 2) check(longint'(pf_addr[1]) == r.pf1, $sformatf("pf1 got %0d exp %0d", pf_addr[1], r.pf1));
    if (r.alloc) n_alloc++;
    if (replace) n_replace++;
    if (prior >= 0) trans[prior][r.state]++;
    if (r.npf == 1) n_pf1++;
    if (r.npf == 2) n_pf2++;
    if (r.stimes == 1) n_left++;
    if (r.stimes == -1) n_right++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      ref_valid = 0;
      @(posedge clk); #1;
      check(upd_valid == 0 && pf_valid == 2'b00, "idle cycle produced output");
      n_idle++;
      last_was_ref = 0;
    end
  endtask

  // ---------------- Part 1: the worked example ----------------
  task automatic worked_example();
    int unsigned refs   [9] = '{256, 128, 192, 160, 144, 152, 156, 154, 155};
    int          strd   [9] = '{0, -128, 64, -32, -16, 8, 4, -2, 1};
    int          stm    [9] = '{0, 0, -1, -1, -1, -1, -1, -1, -1};
    state_e      st     [9] = '{S_INIT, S_TRANSIENT1, S_TRANSIENT2, S_STEADY, S_STEADY,
                                S_STEADY, S_STEADY, S_STEADY, S_STEADY};
    int          npf    [9] = '{0, 1, 2, 2, 2, 2, 2, 2, 0};
    int unsigned pa     [9] = '{0, 0, 224, 176, 152, 156, 158, 153, 0};
    int unsigned pb     [9] = '{0, 0, 160, 144, 136, 148, 154, 155, 0};
    for (int k = 0; k < 9; k++) begin
      send(addr_t'(100), addr_t'(refs[k]));
      check(int'(upd_stride) == strd[k], $sformatf("example row %0d stride", k));
      check(stimes_int(upd_stimes) == stm[k], $sformatf("example row %0d stimes", k));
      check(upd_state == st[k], $sformatf("example row %0d state", k));
      check(int'(pf_valid[0]) + int'(pf_valid[1]) == npf[k], $sformatf("example row %0d count", k));
      if (npf[k] == 1) check(pf_addr[0] == pa[k], $sformatf("example row %0d pf", k));
      if (npf[k] == 2)
        check((pf_addr[0] == pa[k] && pf_addr[1] == pb[k]) ||
              (pf_addr[0] == pb[k] && pf_addr[1] == pa[k]), $sformatf("example row %0d pf pair", k));
    end
  endtask

  // ---------------- Part 2: random stream mix ----------------
  localparam int NS = 16;
  addr_t  s_pc   [NS];
  int     s_kind [NS];   // 0 const, 1 halving, 2 doubling, 3 random, 4 scalar, 5 switching
  longint s_addr [NS];
  longint s_step [NS];
  int     s_cnt  [NS];

  function automatic longint sgn();
    return ($urandom_range(1, 0) == 1) ? 1 : -1;
  endfunction

  function automatic void restart(int s);
    s_cnt[s] = 0;
    case (s_kind[s])
      1: begin s_step[s] = longint'(1) << $urandom_range(14, 4); s_addr[s] = 32'h0010_0000 + s_step[s] * 2; end
      2: begin s_step[s] = $urandom_range(3, 1); s_addr[s] = 32'h0040_0000; end
      default: begin s_step[s] = $urandom_range(16, 1) * sgn(); s_addr[s] = $urandom_range(32'h00ff_ffff, 32'h0001_0000); end
    endcase
  endfunction

  function automatic addr_t next_addr(int s);
    s_cnt[s]++;
    case (s_kind[s])
      0: begin
        if ($urandom_range(99, 0) < 2) return addr_t'($urandom);  // occasional irregular reference
        s_addr[s] += s_step[s];
      end
      1: begin
        s_step[s] = s_step[s] / 2;
        if (s_step[s] == 0) restart(s);
        else s_addr[s] += sgn() * s_step[s];
      end
      2: begin
        s_step[s] = s_step[s] * 2;
        if (s_step[s] > (1 << 22)) restart(s);
        else s_addr[s] += sgn() * s_step[s];
      end
      3: s_addr[s] = $urandom;
      4: ;
      5: begin
        if ($urandom_range(29, 0) == 0) begin
          s_kind[s] = 1; restart(s); s_kind[s] = 5;
          s_step[s] = $urandom_range(20, 1) * sgn();
        end
        if ((s_cnt[s] / 12) % 2 == 0) s_addr[s] = $urandom;
        else s_addr[s] += s_step[s];
      end
      default: ;
    endcase
    return addr_t'(s_addr[s]);
  endfunction

  initial begin
    model = new(N);
    for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) trans[a][b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    worked_example();
    idle(2);

    for (int s = 0; s < NS; s++) begin
      s_kind[s] = s % 6;
      // streams 12..15 alias the table entries of streams 0..3
      s_pc[s] = (s < 12) ? addr_t'(32'h0000_1000 + 4 * s)
                         : addr_t'(32'h0000_1000 + 4 * (s - 12) + 4 * N);
      restart(s);
    end
    begin
      int s;
      s = 0;
      for (int k = 0; k < NREF; k++) begin
        if ($urandom_range(9, 0) == 0) idle(1);
        // favour the current stream to get runs of back-to-back references
        if ($urandom_range(3, 0) == 0) s = $urandom_range(NS - 1, 0);
        // aliasing streams take over their entry only now and then
        if (s >= 12 && $urandom_range(3, 0) != 0) s = s - 12;
        send(s_pc[s], next_addr(s));
      end
    end
    idle(2);

    begin
      string nm [5] = '{"init", "transient1", "transient2", "steady", "no_pred"};
      // the transitions of the state diagram
      int fr [11] = '{0, 0, 1, 1, 1, 2, 2, 3, 3, 4, 4};
      int to [11] = '{3, 1, 3, 2, 4, 3, 4, 3, 0, 4, 1};
      for (int t = 0; t < 11; t++) begin
        $display("transition %-10s -> %-10s : %0d", nm[fr[t]], nm[to[t]], trans[fr[t]][to[t]]);
        check(trans[fr[t]][to[t]] > 0, "transition never taken");
      end
      for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) begin
        bit listed = 0;
        for (int t = 0; t < 11; t++) if (fr[t] == a && to[t] == b) listed = 1;
        check(listed || trans[a][b] == 0, $sformatf("transition %0d->%0d not in diagram", a, b));
      end
    end
    $display("allocations %0d, replacements %0d", n_alloc, n_replace);
    $display("one-address prefetches %0d, two-address prefetches %0d", n_pf1, n_pf2);
    $display("entries with stimes +1 %0d, -1 %0d", n_left, n_right);
    $display("back-to-back same instruction %0d, idle cycles %0d, cycles %0d", n_b2b, n_idle, cycles);
    check(n_alloc > 0, "no allocation");
    check(n_replace > 0, "no replacement");
    check(n_pf1 > 0, "no one-address prefetch");
    check(n_pf2 > 0, "no two-address prefetch");
    check(n_left > 0, "no doubling stride");
    check(n_right > 0, "no halving stride");
    check(n_b2b > 0, "no back-to-back reference");
    check(n_idle > 0, "no idle cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
