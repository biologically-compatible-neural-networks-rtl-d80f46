// tb_fp_add: self-checking test of fp_add.
//
// Random single-precision operands (exponents kept away from the subnormal
// and overflow ranges) are combined and the result must equal, bit for
// bit, the exact result rounded to nearest-even single precision (the
// operation is done in double precision, which is exact enough for one
// rounding to single). Special cases (zero results, infinities, NaN) are
// checked separately.
module tb_fp_add;
  import fp_pkg::*;
  import tb_util_pkg::*;

  fp32_t a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp32_t rnd_fp();
    return {1'($urandom), 8'(64 + ($urandom % 120)), 23'($urandom)};
  endfunction

  task automatic check(fp32_t exp_y, string what);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%h b=%h y=%h expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp();
      b = (i % 4 == 0) ? {1'($urandom), a[30:23] - 8'($urandom % 4), 23'($urandom)} : rnd_fp();
      sub = 1'($urandom);
      #1;
      ra = fp32_to_real(a);
      rb = fp32_to_real(b);
      check(real_to_fp32(sub ? (ra - rb) : (ra + rb)), "random");
    end
    // x - x = +0, inf + 1 = inf, inf - inf = NaN, 1 + 0 = 1
    a = 32'h4049_0FDB; b = a; sub = 1'b1; #1; check(32'h0000_0000, "x-x");
    a = FP_INF; b = FP_ONE; sub = 1'b0; #1; check(FP_INF, "inf+1");
    a = FP_INF; b = FP_INF; sub = 1'b1; #1; check(FP_QNAN, "inf-inf");
    a = FP_ONE; b = FP_ZERO; sub = 1'b0; #1; check(FP_ONE, "1+0");
    // cancellation: 1.0000001 - 1 = 2^-23
    a = 32'h3F80_0001; b = FP_ONE; sub = 1'b1; #1; check(32'h3400_0000, "cancel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
