// tb_rpt_state_fsm: checks the entry state machine against the state diagram.
//
// Every state is tried with correct and incorrect outcomes and each new
// stimes value; the expected next state and field rewrites are written out
// as a table, one line per arrow of the diagram.
module tb_rpt_state_fsm;
  import rpt_pkg::*;

  state_e st, nx;
  logic correct, us, ut;
  stimes_e nst;
  int checks = 0, failures = 0;

  rpt_state_fsm dut (
    .state_i (st), .correct_i (correct), .new_stimes_i (nst),
    .state_o (nx), .upd_stride_o (us), .upd_stimes_o (ut)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(state_e s, bit c, stimes_e n, state_e en, bit eus, bit eut);
    st = s; correct = c; nst = n;
    #1;
    checks++;
    if (nx != en || us != eus || ut != eut) begin
      failures++;
      $display("FAIL %s c=%0d n=%s -> %s us=%0d ut=%0d, exp %s %0d %0d",
               s.name(), c, n.name(), nx.name(), us, ut, en.name(), eus, eut);
    end
  endtask

  initial begin
    stimes_e all [3] = '{STIMES_ZERO, STIMES_LEFT, STIMES_RIGHT};
    foreach (all[k]) begin
      //   state          correct  new stimes  next          stride stimes
      one(S_INIT,         1, all[k], S_STEADY,     1, 0);
      one(S_INIT,         0, all[k], S_TRANSIENT1, 1, 0);
      one(S_TRANSIENT1,   1, all[k], S_STEADY,     1, 0);
      one(S_TRANSIENT1,   0, all[k], (all[k] == STIMES_ZERO) ? S_NO_PRED : S_TRANSIENT2, 1, 1);
      one(S_TRANSIENT2,   1, all[k], S_STEADY,     1, 0);
      one(S_TRANSIENT2,   0, all[k], S_NO_PRED,    1, 1);
      one(S_STEADY,       1, all[k], S_STEADY,     1, 0);
      one(S_STEADY,       0, all[k], S_INIT,       0, 0);
      one(S_NO_PRED,      1, all[k], S_TRANSIENT1, 1, 0);
      one(S_NO_PRED,      0, all[k], S_NO_PRED,    1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
