// tb_prefetch_addr_gen: checks the prefetch address rules.
//
// The updated entries of the worked example are applied and the prefetch
// column is checked (one address 0 for stride -128 with stimes 0; pairs such
// as 224/160 for prev_addr 192, stride 64, stimes -1; none for the last row).
// Then random entries in every state and stimes are checked against
// prev_addr + stride, prev_addr +/- (|stride| * 2 or / 2), and silence in
// no_pred or when disabled.
module tb_prefetch_addr_gen;
  import rpt_pkg::*;

  logic en;
  rpt_entry_t e;
  logic [1:0] v;
  addr_t a [2];
  int checks = 0, failures = 0;

  prefetch_addr_gen dut (.en_i (en), .entry_i (e), .pf_valid_o (v), .pf_addr_o (a));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(bit en_v, state_e s, stimes_e m, longint prev, longint stride);
    e = '0; e.valid = 1; e.tag = 100; e.state = s; e.stimes = m;
    e.prev_addr = addr_t'(prev); e.stride = stride_t'(stride);
    en = en_v;
    #1;
  endtask

  initial begin
    int unsigned prevs [8] = '{192, 160, 144, 152, 156, 154, 155, 128};
    int          strds [8] = '{64, -32, -16, 8, 4, -2, 1, -128};
    int unsigned pa    [8] = '{224, 176, 152, 156, 158, 155, 0, 0};
    int unsigned pb    [8] = '{160, 144, 136, 148, 154, 153, 0, 0};
    for (int k = 0; k < 7; k++) begin
      apply(1, (k == 0) ? S_TRANSIENT2 : S_STEADY, STIMES_RIGHT, prevs[k], strds[k]);
      if (k == 6) chk(v == 2'b00, "example last row: no prefetch");
      else chk(v == 2'b11 && a[0] == pa[k] && a[1] == pb[k], $sformatf("example row %0d", k));
    end
    apply(1, S_TRANSIENT1, STIMES_ZERO, 128, -128);
    chk(v == 2'b01 && a[0] == 0, "example: prefetch address 0");
    apply(1, S_INIT, STIMES_ZERO, 256, 0);
    chk(v == 2'b00, "new entry: no prefetch");
    apply(1, S_NO_PRED, STIMES_ZERO, 1000, 4);
    chk(v == 2'b00, "no_pred, constant: no prefetch");
    apply(1, S_NO_PRED, STIMES_LEFT, 1000, 4);
    chk(v == 2'b00, "no_pred, linear: no prefetch");
    apply(1, S_STEADY, STIMES_LEFT, 1000, -4);
    chk(v == 2'b11 && a[0] == 1008 && a[1] == 992, "doubling stride");
    repeat (5000) begin
      longint p, s, sm, m2;
      bit en_v;
      state_e st;
      stimes_e sm_e;
      p = longint'($urandom);
      s = longint'(int'($urandom) >>> $urandom_range(31, 0));
      en_v = ($urandom_range(7, 0) != 0);
      st = state_e'($urandom_range(4, 0));
      sm_e = ($urandom_range(2, 0) == 0) ? STIMES_ZERO :
             ($urandom_range(1, 0) == 0) ? STIMES_LEFT : STIMES_RIGHT;
      apply(en_v, st, sm_e, p, s);
      sm = (s < 0) ? -s : s;
      if (sm_e == STIMES_ZERO) begin
        if (!en_v || st == S_NO_PRED || s == 0) chk(v == 2'b00, "random: silent");
        else chk(v == 2'b01 && longint'(a[0]) == ((p + s) & 64'hFFFF_FFFF), "random: constant");
      end else begin
        m2 = (sm_e == STIMES_LEFT) ? (sm * 2) & 64'hFFFF_FFFF : sm / 2;
        if (!en_v || st == S_NO_PRED || m2 == 0) chk(v == 2'b00, "random: silent linear");
        else chk(v == 2'b11 && longint'(a[0]) == ((p + m2) & 64'hFFFF_FFFF)
                 && longint'(a[1]) == ((p - m2) & 64'hFFFF_FFFF), "random: linear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
