// tb_syn_pro: self-checking test of the synapse neuroprocessor.
//
// Nine synapses (three AMPA, three GABA_A, two NMDA, one marked unused)
// receive random presynaptic spikes for 400 steps of 0.1 ms, Cdur = 1 ms.
// The reference model integrates every synapse separately with the
// classic kinetic scheme (r = g Rinf (1 - E_on) + r E_on while the pulse
// is on, r = r E_off while off), sums per type and forms eqs. (7) and (8)
// with B(V) = 1 / (1 + kMg exp(slope V)). The lumped hardware must agree
// within 0.5 % after every step. The dendrite voltage is changed at step
// 150 and the magnesium concentration at step 250 (mode switch for the
// NMDA block). Also checked: the exponentials spent per step equal the
// number of rising edges of used synapses, every event class occurs, and
// a step finishes well within the 10,000-clock real-time budget.
module tb_syn_pro;
  import fp_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 9;
  localparam int SAW = $clog2(2 * N);
  localparam int STEPS = 400;
  localparam real DT = 0.1;
  localparam int CDUR = 10;

  logic        clk = 0, rst_n = 0, init = 0, step = 0, den_en = 0;
  logic [7:0]  cdur_steps = 8'(CDUR);
  logic [N-1:0] spike_in = '0;
  fp32_t       Vm_den = '0;
  logic        busy, syn_oe;
  fp32_t       gtol_syn, gEtol_syn;
  fp32_t       r_total [3];
  logic [31:0] re_cnt, fe_cnt, both_cnt, nc_cnt, exp_cnt;
  logic [4:0]  pram_addr;
  fp32_t       pram_rdata;
  logic [SAW-1:0] conex_addr, smem_addr;
  fp32_t       conex_rdata, smem_wdata, smem_rdata;
  logic        smem_we;
  int          checks = 0, failures = 0;

  syn_pro #(.N_SYN(N)) dut (.*);

  fp32_t pram [32];
  fp32_t conex [2**SAW];
  fp32_t smem [2**SAW];
  always_ff @(posedge clk) begin
    pram_rdata  <= pram[pram_addr];
    conex_rdata <= conex[conex_addr];
    smem_rdata  <= smem[smem_addr];
    if (smem_we) smem[smem_addr] <= smem_wdata;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receptor kinetics (alpha /ms/mM, beta /ms, Tmax 1 mM), gmax, Erev
  real alpha [3] = '{1.1, 5.0, 0.072};
  real beta  [3] = '{0.19, 0.18, 0.0066};
  real gmax  [3] = '{0.1, 0.05, 0.02};
  real erev  [3] = '{0.0, -80.0, 0.0};
  real e_on [3], a1 [3], e_off [3];
  real kmg = 1.0 / 3.57, slope = -0.062;
  int  styp [N] = '{0, 0, 0, 1, 1, 1, 2, 2, 3};
  real wgt  [N];

  real r [N];
  int  cnt [N];
  bit  on_prev [N];

  function automatic bit close(real a, real b);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= 0.005 * ((b < 0) ? -b : b) + 1e-6;
  endfunction

  initial begin
    real v, gt, ge, rk [3], bv;
    int  rises, exp_expected = 0, max_lat = 0, lat;
    for (int k = 0; k < 3; k++) begin
      real tau, rinf;
      tau  = 1.0 / (alpha[k] + beta[k]);
      rinf = alpha[k] * tau;
      e_on[k]  = $exp(-DT / tau);
      a1[k]    = rinf * (1.0 - e_on[k]);
      e_off[k] = $exp(-beta[k] * DT);
      pram[8*k+0] = real_to_fp32(e_on[k]);
      pram[8*k+1] = real_to_fp32(a1[k]);
      pram[8*k+2] = real_to_fp32(e_off[k]);
      pram[8*k+3] = real_to_fp32($exp(-CDUR * DT / tau));
      pram[8*k+4] = real_to_fp32(rinf * (1.0 - $exp(-CDUR * DT / tau)));
      pram[8*k+5] = real_to_fp32(-beta[k] * DT);
      pram[8*k+6] = real_to_fp32(gmax[k]);
      pram[8*k+7] = real_to_fp32(erev[k]);
    end
    pram[24] = real_to_fp32(kmg);
    pram[25] = real_to_fp32(slope);
    pram[26] = FP_ONE;
    for (int i = 0; i < 2**SAW; i++) begin conex[i] = FP_ZERO; smem[i] = 32'($urandom); end
    for (int i = 0; i < N; i++) begin
      wgt[i] = 0.5 + real'($urandom % 100) / 100.0;
      conex[2*i]   = real_to_fp32(wgt[i]);
      conex[2*i+1] = 32'(styp[i]);
      r[i] = 0.0; cnt[i] = 0; on_prev[i] = 0;
    end
    v = -55.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); Vm_den = real_to_fp32(v); den_en = 1; init = 1;
    @(negedge clk); den_en = 0; init = 0;
    // init also clears the state RAM: put garbage there first, then
    // wait until busy falls and check that every word was cleared
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int i = 0; i < 2 * N; i++) begin
      checks++;
      if (smem[i] != FP_ZERO) begin failures++; $display("FAIL state word %0d not cleared by init", i); end
    end

    for (int s = 0; s < STEPS; s++) begin
      logic [N-1:0] sp;
      bit on_now [N];
      if (s == 150) begin
        v = -20.0;
        @(negedge clk); Vm_den = real_to_fp32(v); den_en = 1;
        @(negedge clk); den_en = 0;
      end
      if (s == 250) begin
        kmg = 2.0 / 3.57;                       // [Mg] 1 mM -> 2 mM
        pram[24] = real_to_fp32(kmg);
      end
      sp = '0;
      for (int i = 0; i < N; i++)
        if (cnt[i] == 0 && ($urandom % 100) < 6) sp[i] = 1'b1;
      if (s == 20) sp = '1;                    // all synapses spike together
      // reference: integrate with the pulse state of the previous step
      for (int i = 0; i < N; i++) begin
        int k;
        k = styp[i];
        if (k == 3) continue;
        if (on_prev[i]) r[i] = wgt[i] * a1[k] + r[i] * e_on[k];
        else            r[i] = r[i] * e_off[k];
      end
      rises = 0;
      for (int i = 0; i < N; i++) begin
        // a spike during a running pulse is ignored
        on_now[i] = (sp[i] && cnt[i] == 0) || cnt[i] > 1;
        cnt[i] = (sp[i] && cnt[i] == 0) ? CDUR : (cnt[i] > 0 ? cnt[i] - 1 : 0);
        if (on_now[i] && !on_prev[i] && styp[i] != 3) rises++;
        on_prev[i] = on_now[i];
      end
      exp_expected += rises;
      // drive the step
      @(negedge clk);
      spike_in = sp; step = 1;
      @(negedge clk);
      spike_in = '0; step = 0;
      lat = 1;
      while (!syn_oe && lat < 20000) begin @(negedge clk); lat++; end
      if (lat > max_lat) max_lat = lat;
      // reference outputs
      for (int k = 0; k < 3; k++) rk[k] = 0.0;
      for (int i = 0; i < N; i++) if (styp[i] != 3) rk[styp[i]] += r[i];
      bv = 1.0 / (1.0 + kmg * exp_q(slope * v));
      gt = gmax[0] * rk[0] + gmax[1] * rk[1] + gmax[2] * rk[2] * bv;
      ge = gmax[0] * rk[0] * erev[0] + gmax[1] * rk[1] * erev[1] + gmax[2] * rk[2] * bv * erev[2];
      checks += 5;
      for (int k = 0; k < 3; k++)
        if (!close(fp32_to_real(r_total[k]), rk[k])) begin
          failures++;
          if (failures < 12) $display("FAIL step %0d r[%0d] %f expected %f", s, k, fp32_to_real(r_total[k]), rk[k]);
        end
      if (!close(fp32_to_real(gtol_syn), gt)) begin
        failures++;
        if (failures < 12) $display("FAIL step %0d gtol %f expected %f", s, fp32_to_real(gtol_syn), gt);
      end
      if (!close(fp32_to_real(gEtol_syn), ge)) begin
        failures++;
        if (failures < 12) $display("FAIL step %0d gEtol %f expected %f", s, fp32_to_real(gEtol_syn), ge);
      end
      repeat (2) @(negedge clk);
    end
    checks += 6;
    if (exp_cnt != 32'(exp_expected)) begin failures++; $display("FAIL exponentials %0d expected %0d", exp_cnt, exp_expected); end
    if (re_cnt == 0)   begin failures++; $display("FAIL no RE event"); end
    if (fe_cnt == 0)   begin failures++; $display("FAIL no FE event"); end
    if (both_cnt == 0) begin failures++; $display("FAIL no BOTH step"); end
    if (nc_cnt == 0)   begin failures++; $display("FAIL no NC step"); end
    if (max_lat > 10000) begin failures++; $display("FAIL step takes %0d clocks", max_lat); end
    $display("RE %0d FE %0d BOTH %0d NC %0d exps %0d, longest step %0d clocks",
             re_cnt, fe_cnt, both_cnt, nc_cnt, exp_cnt, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
