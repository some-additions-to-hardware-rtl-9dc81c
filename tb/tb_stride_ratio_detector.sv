// tb_stride_ratio_detector: checks the two comparators and the decoder.
//
// Directed cases from the worked example (-128 then 64 gives -1, 64 then -32
// gives -1), doubling cases, equal strides and zero strides, then random
// pairs built to double, halve or neither.  The expected stimes is worked
// out with multiplication instead of shifts: +1 when |new| = 2|old|
// (mod 2^32), -1 when |old| is 2|new| or 2|new|+1, 0 when both or neither.
module tb_stride_ratio_detector;
  import rpt_pkg::*;

  stride_t old_s, new_s;
  logic eq_l, eq_r;
  stimes_e st;
  int checks = 0, failures = 0;

  stride_ratio_detector dut (
    .old_stride_i (old_s), .new_stride_i (new_s),
    .eq_left_o (eq_l), .eq_right_o (eq_r), .stimes_o (st)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint mag(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic one(int o, int n);
    longint om, nm;
    bit l, r;
    stimes_e exp;
    old_s = stride_t'(o); new_s = stride_t'(n);
    #1;
    om = mag(longint'(o)); nm = mag(longint'(n));
    l = (nm == (2 * om) % 64'h1_0000_0000);
    r = (om == 2 * nm) || (om == 2 * nm + 1);
    exp = (l && !r) ? STIMES_LEFT : (r && !l) ? STIMES_RIGHT : STIMES_ZERO;
    checks++;
    if (eq_l != l || eq_r != r || st != exp) begin
      failures++;
      $display("FAIL old=%0d new=%0d got %b%b %0d exp %b%b %0d", o, n, eq_l, eq_r, st, l, r, exp);
    end
  endtask

  initial begin
    one(-128, 64);  one(64, -32);  one(-2, 1);
    one(8, 16);     one(-8, 16);   one(8, -16);
    one(16, 16);    one(0, 0);     one(0, 5);    one(5, 0);
    one(7, 3);      one(3, 7);     one(-2147483648, 0);
    repeat (5000) begin
      int o, n;
      o = int'($urandom) >>> $urandom_range(30, 0);
      case ($urandom_range(2, 0))
        0: n = o * 2;
        1: n = o / 2;
        default: n = int'($urandom) >>> $urandom_range(30, 0);
      endcase
      if ($urandom_range(1, 0) == 1) n = -n;
      one(o, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
