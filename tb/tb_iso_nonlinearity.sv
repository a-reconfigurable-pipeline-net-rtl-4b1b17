// tb_iso_nonlinearity: checks F = 2 lambda v (1 - v) (acc + I) against an
// independent 64-bit reference for random operands, the zeros at v = 0 and
// v = 1, the peak of the shunting term at v = 1/2, and saturation.
module tb_iso_nonlinearity;
  import hop_pkg::*;
  import tb_fix_pkg::*;

  fix_t acc, v, bias, lambda, f;
  int checks = 0, failures = 0;

  iso_nonlinearity u_dut (.acc, .v, .bias, .lambda, .f);

  task automatic check(longint a, longint vv, longint b, longint l, longint exp);
    acc = fix_t'(a); v = fix_t'(vv); bias = fix_t'(b); lambda = fix_t'(l);
    #1;
    checks++;
    if (longint'(f) != exp) begin
      failures++;
      $display("FAIL acc=%0d v=%0d I=%0d lambda=%0d: f=%0d expected %0d", a, vv, b, l, f, exp);
    end
  endtask

  initial begin
    // v = 0 and v = 1: the isomorphic derivative vanishes
    check(ONE, 0, ONE/2, ONE, 0);
    check(3*ONE, ONE, -ONE, 2*ONE, 0);
    // v = 1/2, lambda = 1: shunt = 2 * 1/4 = 1/2; (acc + I) = 1 -> F = 1/2
    check(ONE/2, ONE/2, ONE/2, ONE, ONE/2);
    // v = 1/2, lambda = 2, acc + I = -3/2 -> F = -3/2
    check(-ONE, ONE/2, -ONE/2, 2*ONE, -3*ONE/2);
    // saturation of the net input
    check(WMAX, ONE/2, ONE, ONE, mul(mul(mul(2*ONE, ONE/2), ONE/2), WMAX));
    for (int i = 0; i < 2000; i++) begin
      longint a, vv, b, l;
      a  = rnd(4*65536);
      vv = longint'($urandom_range(65536));
      b  = rnd(65536);
      l  = longint'($urandom_range(4*65536));
      check(a, vv, b, l, iso_f(a, vv, b, l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
