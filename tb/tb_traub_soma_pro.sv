// tb_traub_soma_pro: self-checking test of the soma neuroprocessor.
//
// The parameter RAM is filled with a Pinsky-Rinzel soma (gNa 30, gKDR 15,
// gL 0.1 mS/cm2, ENa 60, EK -75, EL -60 mV, Cm 3 uF/cm2, dt 0.1 ms,
// coupling gc/p = 4.2 to the dendrite). The dendrite voltage Vm_right_in is
// held at -60 mV, then raised to -35 mV to make the soma fire, then
// lowered again. After every step the new V, h and p are compared with a
// reference that applies the same program to the processor's previous
// state with single-precision rounding after each operation. Also
// checked: neu_fire pulses exactly at the upward threshold crossings,
// oe_float accompanies every step, and a step completes inside the
// 10,000-clock budget of a 0.1 ms real-time step at 100 MHz.
module tb_traub_soma_pro;
  import fp_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 0, rst_n = 0, init = 0, step = 0;
  logic        busy, Vm_right_en = 0, oe_float, neu_fire;
  fp32_t       Vm_right_in = '0, Vmout;
  logic [10:0] pram_addr;
  fp32_t       pram_rdata;
  fp32_t       pram [2048];
  int          checks = 0, failures = 0;

  traub_soma_pro dut (.*);

  always_ff @(posedge clk) pram_rdata <= pram[pram_addr];
  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fires = 0;
  always @(posedge clk) if (neu_fire) fires++;

  function automatic bit near(real a, real b, real tol);
    real d = a - b;
    return (d < tol) && (d > -tol);
  endfunction

  initial begin
    cmp_cfg_t c;
    real v, h, p, vr, vh, hh, ph, vth;
    int  lat, max_lat = 0, crossings = 0;
    c.ie = 0.0; c.kl = 0.0; c.kr = 4.2; c.vth = -20.0; c.dt = 0.1; c.cm = 3.0; c.v0 = -64.6;
    for (int a = 0; a < 2048; a++) pram[a] = soma_word(a, c);
    vth = c.vth;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    while (busy) @(negedge clk);
    v = fp32_to_real(Vmout);
    h = fp32_to_real(dut.u_eng.R[4]);
    p = fp32_to_real(dut.u_eng.R[5]);
    checks++;
    if (!near(v, c.v0, 1e-4)) begin failures++; $display("FAIL init V %f", v); end
    for (int s = 0; s < 600; s++) begin
      vr = (s >= 100 && s < 400) ? -35.0 : -60.0;
      @(negedge clk); Vm_right_in = real_to_fp32(vr); Vm_right_en = 1;
      @(negedge clk); Vm_right_en = 0; step = 1;
      @(negedge clk); step = 0;
      lat = 1;
      while (!oe_float && lat < 20000) begin @(negedge clk); lat++; end
      if (lat > max_lat) max_lat = lat;
      soma_ref(c, fp(vr), v, h, p);
      @(negedge clk);
      vh = fp32_to_real(Vmout);
      hh = fp32_to_real(dut.u_eng.R[4]);
      ph = fp32_to_real(dut.u_eng.R[5]);
      checks += 3;
      if (!near(vh, v, 1e-3 + 1e-5 * (v < 0 ? -v : v))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d V %f expected %f", s, vh, v);
      end
      if (!near(hh, h, 1e-4)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d h %f expected %f", s, hh, h);
      end
      if (!near(ph, p, 1e-4)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d p %f expected %f", s, ph, p);
      end
      // continue from the processor's own state
      if (fp32_to_real(dut.u_eng.R[2]) < vth && vh >= vth) crossings++;
      v = vh; h = hh; p = ph;
    end
    checks += 3;
    if (fires != crossings) begin failures++; $display("FAIL neu_fire %0d, crossings %0d", fires, crossings); end
    if (fires == 0)         begin failures++; $display("FAIL the soma never fired"); end
    if (max_lat > 10000)    begin failures++; $display("FAIL step takes %0d clocks", max_lat); end
    $display("spikes %0d, longest step %0d clocks", fires, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
