// tb_fp_div: self-checking test of fp_div.
//
// Random divisions must match the correctly rounded single-precision
// quotient bit for bit; each must finish with done exactly 29 clocks after
// start, with busy high in between. Division by zero and 0/0 are checked.
module tb_fp_div;
  import fp_pkg::*;
  import tb_util_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fp32_t xa, fp32_t xb, fp32_t exp_y, string what);
    int lat;
    @(negedge clk);
    a = xa; b = xb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    checks += 2;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h / %h = %h expected %h", what, xa, xb, y, exp_y);
    end
    if (lat != 29) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      fp32_t xa, xb;
      xa = {1'($urandom), 8'(64 + ($urandom % 120)), 23'($urandom)};
      xb = {1'($urandom), 8'(64 + ($urandom % 120)), 23'($urandom)};
      if (i % 5 == 0) xb = {xb[31], xa[30:23], 23'($urandom)};
      run(xa, xb, real_to_fp32(fp32_to_real(xa) / fp32_to_real(xb)), "random");
    end
    run(32'h4040_0000, 32'h4000_0000, 32'h3FC0_0000, "3/2");
    run(FP_ONE, FP_ZERO, FP_INF, "1/0");
    run(FP_ZERO, FP_ZERO, FP_QNAN, "0/0");
    run(FP_ZERO, FP_ONE, FP_ZERO, "0/1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
