// tb_exp_pwlut: self-checking test of the piece-wise LUT exponential.
//
// Checks, independently of the ROM: (1) at grid points of each zone the
// output equals exp() rounded to single precision; (2) for random
// arguments in [-16, 16) the relative error against exp(x) stays within
// the zone's step (e^h - 1, plus rounding); (3) arguments outside the
// range are clamped to exp(-16) / exp(16 - 1/128); (4) the latency is 3
// clocks with one argument accepted every clock.
module tb_exp_pwlut;
  import fp_pkg::*;
  import tb_util_pkg::*;

  logic  clk = 0, rst_n = 0, valid_in = 0, valid_out;
  fp32_t x, y;
  int    checks = 0, failures = 0;

  exp_pwlut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected value pipeline: what entered 3 clocks ago
  real   xq [$];
  real   tolq [$];
  int    lat_cnt;

  task automatic push(real xv, real tol);
    @(negedge clk);
    x = real_to_fp32(xv);
    valid_in = 1'b1;
    xq.push_back(fp32_to_real(x));
    tolq.push_back(tol);
  endtask

  always @(posedge clk) begin
    if (rst_n && valid_out) begin
      real xv, tol, ref_y, got, err;
      xv  = xq.pop_front();
      tol = tolq.pop_front();
      if (xv >= 16.0) xv = 16.0 - 1.0 / 128.0;
      if (xv < -16.0) xv = -16.0;
      ref_y = $exp(xv);
      got = fp32_to_real(y);
      err = (got - ref_y) / ref_y;
      if (err < 0) err = -err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("FAIL exp(%f) = %e expected %e (rel err %e > %e)", xv, got, ref_y, err, tol);
      end
    end
  end

  // latency: valid_out must follow valid_in by exactly 3 clock edges
  logic [3:0] vin_hist;
  always @(posedge clk) begin
    vin_hist <= {vin_hist[2:0], valid_in};
    if (rst_n && vin_hist[2] !== valid_out) begin
      failures++;
      $display("FAIL latency: valid_out %b, valid_in 3 clocks ago %b", valid_out, vin_hist[2]);
    end
  end

  initial begin
    x = '0;
    vin_hist = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // grid points: exact up to single rounding
    for (int k = 0; k < 2048; k += 37) push(real'(k) / 128.0, 1.2e-7);
    for (int k = 0; k < 1024; k += 13) push(-1.0 + real'(k) / 1024.0, 1.2e-7);
    for (int k = 0; k < 960; k += 11)  push(-16.0 + real'(k) / 64.0, 1.2e-7);
    // random arguments in each zone
    for (int i = 0; i < 3000; i++) begin
      real xv;
      xv = (real'($urandom % 1000000) / 1000000.0);
      case (i % 3)
        0: push(16.0 * xv, $exp(1.0 / 128.0) - 1.0 + 2e-7);
        1: push(-xv, $exp(1.0 / 1024.0) - 1.0 + 2e-7);
        default: push(-1.0 - 15.0 * xv, $exp(1.0 / 64.0) - 1.0 + 2e-7);
      endcase
    end
    // clamping
    push(40.0, 1.2e-7);
    push(-30.0, 1.2e-7);
    @(negedge clk);
    valid_in = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", xq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
