// tb_fp_mul: self-checking test of fp_mul.
//
// Random single-precision operands (exponents kept away from the subnormal
// and overflow ranges) are combined and the result must equal, bit for
// bit, the exact result rounded to nearest-even single precision (the
// operation is done in double precision, which is exact enough for one
// rounding to single). Special cases (zero results, infinities, NaN) are
// checked separately.
module tb_fp_mul;
  import fp_pkg::*;
  import tb_util_pkg::*;

  fp32_t a, b, y;
  
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

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
      
      #1;
      ra = fp32_to_real(a);
      rb = fp32_to_real(b);
      check(real_to_fp32(ra * rb), "random");
    end
    a = FP_INF; b = FP_ZERO; #1; check(FP_QNAN, "inf*0");
    a = 32'hC000_0000; b = 32'h4040_0000; #1; check(32'hC0C0_0000, "-2*3");
    a = 32'h7F00_0000; b = 32'h4000_0000; #1; check(FP_INF, "overflow");
    a = FP_ZERO; b = 32'h4040_0000; #1; check(FP_ZERO, "0*3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
