// tb_rpt_entry_update: checks the entry update step.
//
// The worked example is replayed by feeding each produced entry back as the
// stored entry of the next reference, and the stride, stimes, state and
// correct flag are compared with values written out by hand.  Further
// directed cases cover a table miss (new entry), a steady entry that misses
// its prediction (back to init, stride kept), a doubling stride and an entry
// in no_pred.
module tb_rpt_entry_update;
  import rpt_pkg::*;

  logic hit, correct, alloc;
  rpt_entry_t ein, eout;
  addr_t pc, ea;
  int checks = 0, failures = 0;

  rpt_entry_update dut (
    .hit_i (hit), .entry_i (ein), .pc_i (pc), .ea_i (ea),
    .entry_o (eout), .correct_o (correct), .alloc_o (alloc)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic rpt_entry_t mk(state_e s, stimes_e m, int prev, int stride);
    rpt_entry_t e;
    e = '0; e.valid = 1; e.tag = 100; e.state = s; e.stimes = m;
    e.prev_addr = addr_t'(prev); e.stride = stride_t'(stride);
    return e;
  endfunction

  initial begin
    int unsigned refs [9] = '{256, 128, 192, 160, 144, 152, 156, 154, 155};
    int          strd [9] = '{0, -128, 64, -32, -16, 8, 4, -2, 1};
    stimes_e     stm  [9] = '{STIMES_ZERO, STIMES_ZERO, STIMES_RIGHT, STIMES_RIGHT, STIMES_RIGHT,
                              STIMES_RIGHT, STIMES_RIGHT, STIMES_RIGHT, STIMES_RIGHT};
    state_e      st   [9] = '{S_INIT, S_TRANSIENT1, S_TRANSIENT2, S_STEADY, S_STEADY,
                              S_STEADY, S_STEADY, S_STEADY, S_STEADY};
    bit          cor  [9] = '{0, 0, 0, 1, 1, 1, 1, 1, 1};
    rpt_entry_t  e;
    pc = 100;
    e = '0;
    for (int k = 0; k < 9; k++) begin
      hit = (k != 0); ein = e; ea = refs[k];
      #1;
      chk(alloc == (k == 0), $sformatf("row %0d alloc", k));
      chk(correct == cor[k], $sformatf("row %0d correct", k));
      chk(eout.valid && eout.tag == 100 && eout.prev_addr == refs[k], $sformatf("row %0d tag/prev", k));
      chk(eout.stride == strd[k], $sformatf("row %0d stride %0d", k, eout.stride));
      chk(eout.stimes == stm[k], $sformatf("row %0d stimes", k));
      chk(eout.state == st[k], $sformatf("row %0d state", k));
      e = eout;
    end
    // miss replaces whatever was stored
    hit = 0; pc = 200; ein = mk(S_STEADY, STIMES_LEFT, 5, 7); ea = 4000; #1;
    chk(alloc && eout.tag == 200 && eout.prev_addr == 4000 && eout.stride == 0 &&
        eout.stimes == STIMES_ZERO && eout.state == S_INIT, "miss allocates");
    pc = 100; hit = 1;
    // steady, constant stride 8, wrong guess: init, stride kept
    ein = mk(S_STEADY, STIMES_ZERO, 1000, 8); ea = 1100; #1;
    chk(!correct && eout.state == S_INIT && eout.stride == 8 && eout.prev_addr == 1100, "steady miss");
    // steady, constant stride 8, right guess
    ein = mk(S_STEADY, STIMES_ZERO, 1000, 8); ea = 1008; #1;
    chk(correct && eout.state == S_STEADY && eout.stride == 8, "steady hit");
    // transient1, stride 4 then 8: doubling, goes to transient2 with stimes +1
    ein = mk(S_TRANSIENT1, STIMES_ZERO, 1000, 4); ea = 1008; #1;
    chk(!correct && eout.state == S_TRANSIENT2 && eout.stimes == STIMES_LEFT && eout.stride == 8, "doubling detected");
    // transient2, stride 8, stimes +1: next step -16 is correct
    ein = mk(S_TRANSIENT2, STIMES_LEFT, 1008, 8); ea = 992; #1;
    chk(correct && eout.state == S_STEADY && eout.stride == -16 && eout.stimes == STIMES_LEFT, "doubling confirmed");
    // transient1, irregular: no_pred, stimes 0
    ein = mk(S_TRANSIENT1, STIMES_RIGHT, 1000, 4); ea = 1333; #1;
    chk(!correct && eout.state == S_NO_PRED && eout.stimes == STIMES_ZERO && eout.stride == 333, "irregular");
    // no_pred, constant stride guess right: transient1
    ein = mk(S_NO_PRED, STIMES_ZERO, 1000, 12); ea = 1012; #1;
    chk(correct && eout.state == S_TRANSIENT1, "no_pred recovers");
    // init, wrong: transient1, stride updated, stimes kept
    ein = mk(S_INIT, STIMES_RIGHT, 1000, 12); ea = 900; #1;
    chk(!correct && eout.state == S_TRANSIENT1 && eout.stride == -100 && eout.stimes == STIMES_RIGHT, "init miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
