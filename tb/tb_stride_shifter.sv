// tb_stride_shifter: checks the one-place stride shifter.
//
// Random and edge magnitudes are shifted in each direction; the expected
// value is computed by multiplying by 2 or dividing by 2 with 64-bit
// integers and truncating to 32 bits.
module tb_stride_shifter;
  import rpt_pkg::*;

  addr_t mag, out;
  stimes_e dir;
  int checks = 0, failures = 0;

  stride_shifter dut (.mag_i (mag), .dir_i (dir), .mag_o (out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint m, stimes_e d);
    longint exp;
    mag = addr_t'(m); dir = d;
    #1;
    case (d)
      STIMES_LEFT:  exp = (m * 2) % 64'h1_0000_0000;
      STIMES_RIGHT: exp = m / 2;
      default:      exp = m;
    endcase
    checks++;
    if (longint'(out) != exp) begin
      failures++;
      $display("FAIL mag=%0d dir=%0d got %0d exp %0d", m, d, out, exp);
    end
  endtask

  initial begin
    longint edge_v [6] = '{0, 1, 2, 3, 64'h8000_0000, 64'hFFFF_FFFF};
    foreach (edge_v[i]) begin
      one(edge_v[i], STIMES_ZERO); one(edge_v[i], STIMES_LEFT); one(edge_v[i], STIMES_RIGHT);
    end
    // worked example strides: 64 -> 32, 32 -> 16
    one(64, STIMES_RIGHT); one(32, STIMES_RIGHT);
    repeat (3000) begin
      longint m;
      m = longint'($urandom);
      one(m, STIMES_ZERO); one(m, STIMES_LEFT); one(m, STIMES_RIGHT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
