// tb_den_pro: self-checking test of the dendrite neuroprocessor.
//
// The parameter RAM holds a Pinsky-Rinzel dendrite (gCa 10, gKAHP 0.8,
// gKC 15 mS/cm2, ECa 80, EK -75 mV, Cm 3 uF/cm2, dt 0.1 ms, coupling
// gc/(1-p) = 4.2 to the soma, calcium dynamics dCa/dt = -0.13 I_Ca -
// 0.075 Ca). The soma voltage (Vm_left_in) alternates between rest and
// spike-like pulses, and the synaptic terms gtol / gEtol (syn_en) are
// switched on for part of the run. After every step the new V, s, c, q and
// Ca are compared with a reference that applies the same program to the
// processor's previous state with single-precision rounding after every
// operation. Also checked: calcium builds up, oe_float accompanies every
// step and a step fits in the 10,000-clock real-time budget.
module tb_den_pro;
  import fp_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 0, rst_n = 0, init = 0, step = 0;
  logic        busy, Vm_left_en = 0, syn_en = 0, oe_float;
  fp32_t       Vm_left_in = '0, gtol = '0, gEtol = '0, Vmout;
  fp32_t       state_out [4];
  logic [10:0] pram_addr;
  fp32_t       pram_rdata;
  fp32_t       pram [2048];
  int          checks = 0, failures = 0;

  den_pro dut (.*);

  always_ff @(posedge clk) pram_rdata <= pram[pram_addr];
  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b, real tol);
    real d = a - b;
    return (d < tol) && (d > -tol);
  endfunction

  initial begin
    cmp_cfg_t c;
    real v, sg, cg, qg, ca, vl, g, ge, ca_max;
    real hw [5], ref_v [5];
    int  lat, max_lat = 0;
    c.ie = 0.0; c.kl = 4.2; c.kr = 0.0; c.vth = 1000.0; c.dt = 0.1; c.cm = 3.0; c.v0 = -64.5;
    for (int a = 0; a < 2048; a++) pram[a] = den_word(a, c);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    while (busy) @(negedge clk);
    v = fp32_to_real(Vmout);
    sg = fp32_to_real(state_out[0]); cg = fp32_to_real(state_out[1]);
    qg = fp32_to_real(state_out[2]); ca = fp32_to_real(state_out[3]);
    ca_max = ca;
    checks++;
    if (!near(v, c.v0, 1e-4) || !near(ca, 0.2, 1e-6)) begin failures++; $display("FAIL init %f %f", v, ca); end
    g = 0.0; ge = 0.0;
    for (int s = 0; s < 800; s++) begin
      // soma: 2 ms spikes to +20 mV every 10 ms during 10..60 ms
      vl = (s >= 100 && s < 600 && (s % 100) < 20) ? 20.0 : -62.0;
      @(negedge clk); Vm_left_in = real_to_fp32(vl); Vm_left_en = 1;
      if (s == 300) begin gtol = real_to_fp32(0.3); gEtol = real_to_fp32(0.3 * -10.0); syn_en = 1; end
      if (s == 700) begin gtol = FP_ZERO; gEtol = FP_ZERO; syn_en = 1; end
      @(negedge clk); Vm_left_en = 0; syn_en = 0; step = 1;
      if (s == 300) begin g = fp(0.3); ge = fp(0.3 * -10.0); end
      if (s == 700) begin g = 0.0; ge = 0.0; end
      @(negedge clk); step = 0;
      lat = 1;
      while (!oe_float && lat < 20000) begin @(negedge clk); lat++; end
      if (lat > max_lat) max_lat = lat;
      den_ref(c, fp(vl), g, ge, v, sg, cg, qg, ca);
      @(negedge clk);
      ref_v = '{v, sg, cg, qg, ca};
      hw[0] = fp32_to_real(Vmout);
      for (int i = 0; i < 4; i++) hw[i+1] = fp32_to_real(state_out[i]);
      for (int i = 0; i < 5; i++) begin
        real tol;
        tol = (i == 0 || i == 4) ? 1e-3 + 1e-5 * (ref_v[i] < 0 ? -ref_v[i] : ref_v[i]) : 1e-4;
        checks++;
        if (!near(hw[i], ref_v[i], tol)) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d state %0d: %f expected %f", s, i, hw[i], ref_v[i]);
        end
      end
      v = hw[0]; sg = hw[1]; cg = hw[2]; qg = hw[3]; ca = hw[4];
      if (ca > ca_max) ca_max = ca;
    end
    checks += 2;
    if (ca_max < 1.0)    begin failures++; $display("FAIL calcium never rose: %f", ca_max); end
    if (max_lat > 10000) begin failures++; $display("FAIL step takes %0d clocks", max_lat); end
    $display("peak Ca %f, longest step %0d clocks", ca_max, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
