// tb_neuro_sim: end-to-end test of the neuro_sim top level with a shortened time step
// (236 clocks, just above the 234 clocks of a step without synaptic events).
//
// Five neuron structures are configured through the host port (soma,
// dendrite and synapse parameters, connection RAM) as a small network:
//   neuron 0 <- external input 0 (AMPA) and 1 (NMDA)
//   neuron 1 <- neuron 0 (AMPA)
//   neuron 2 <- neuron 1 (AMPA) and external input 2 (GABA_A)
//   neurons 3 and 4 <- external input 0 (AMPA) and 3 (NMDA), identical
// Every soma has a bias current, so the cells fire and their spikes travel
// through the synapse vector to the next cell. The testbench keeps its own
// model of the transmitter pulses of all nine synapses and checks:
//   - the RE / FE / BOTH / NC counters of every synapse processor and the
//     number of event exponentials of every neuron (spike routing);
//   - step pulses STEP_CYCLES apart while no step overruns, and the step
//     and overrun registers against the pulses seen;
//   - a single step issued while stopped, and the control register;
//   - Cdur changed from 1 ms to 2 ms during the run (mode switch);
//   - [Mg] changed from 1 mM to 0 in neuron 4 only: neurons 3 and 4 stay
//     bit-identical before, and must differ after;
//   - parameter read-back through the host port.
// Each mechanism (RE, FE, BOTH, NC events, overrun, Cdur and Mg
// switches, single step, spikes of every neuron) is counted, and one that
// never happened counts as a failure.
module tb_neuro_sim;
  import fp_pkg::*;
  import tb_util_pkg::*;

  localparam int NN = 5, NE = 4, NS = NN + NE;
  localparam int STEP_CYCLES = 236;
  localparam int STEPS = 1500;

  logic          clk = 0, rst_n = 0;
  logic [NE-1:0] ext_spike = '0;
  logic [NN-1:0] neu_fire;
  fp32_t         v_soma [NN], v_den [NN];
  logic          step;
  logic [31:0]   evt_stats [NN][5];
  logic [16:0]   cfg_addr = '0;
  logic          cfg_we = 0;
  fp32_t         cfg_wdata = '0, cfg_rdata;
  int            checks = 0, failures = 0;

  neuro_sim #(.STEP_CYCLES(STEP_CYCLES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- host
  task automatic wr(int unit, int sel, int word, logic [31:0] d);
    @(negedge clk);
    cfg_addr = {3'(unit), 3'(sel), 11'(word)}; cfg_wdata = d; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic rd(int unit, int sel, int word, output logic [31:0] d);
    @(negedge clk);
    cfg_addr = {3'(unit), 3'(sel), 11'(word)};
    @(negedge clk);
    d = cfg_rdata;
  endtask

  // ------------------------------------------------- pulse model, counters
  int  cdur = 10;
  logic [NS-1:0] pending = '0;
  int  cnt [NS];
  bit  on_q [NS];
  int  m_re = 0, m_fe = 0, m_both = 0, m_nc = 0;
  int  used [NN][NS];          // synapse type per neuron, 3 = unused
  int  m_exp [NN];
  int  n_steps = 0, n_fires [NN], last_step = -1, cyc = 0, gap_err = 0, gaps = 0;
  bit  gap_check = 0;

  always @(posedge clk) begin
    logic [NS-1:0] sp, r, f;
    cyc++;
    if (step && rst_n) begin
      sp = pending | {ext_spike, neu_fire};
      pending = '0;
      r = '0; f = '0;
      for (int i = 0; i < NS; i++) begin
        bit on_n;
        on_n = (sp[i] && cnt[i] == 0) || cnt[i] > 1;
        r[i] = on_n && !on_q[i];
        f[i] = !on_n && on_q[i];
        if (sp[i] && cnt[i] == 0) cnt[i] = cdur;
        else if (cnt[i] > 0)      cnt[i] = cnt[i] - 1;
        on_q[i] = on_n;
      end
      if (r != 0 && f != 0) m_both++;
      else if (r != 0)      m_re += $countones(r);
      else if (f != 0)      m_fe += $countones(f);
      else                  m_nc++;
      for (int n = 0; n < NN; n++)
        for (int i = 0; i < NS; i++) if (r[i] && used[n][i] != 3) m_exp[n]++;
      n_steps++;
      if (gap_check && last_step >= 0) begin
        gaps++;
        if (cyc - last_step != STEP_CYCLES) gap_err++;
      end
      last_step = cyc;
    end else begin
      pending = pending | {ext_spike, neu_fire};
    end
    for (int n = 0; n < NN; n++) if (rst_n && neu_fire[n]) n_fires[n]++;
  end

  // --------------------------------------------------------------- test
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wait_steps(int k);
    repeat (k) @(posedge clk iff step);
  endtask

  initial begin
    cmp_cfg_t cs, cd;
    logic [31:0] d;
    int  steps_before, ovr, mech_mg = 0, mech_cdur = 0, mech_single = 0, same_before = 1, diff_after = 0;
    for (int i = 0; i < NS; i++) begin cnt[i] = 0; on_q[i] = 0; end
    for (int n = 0; n < NN; n++) begin
      m_exp[n] = 0; n_fires[n] = 0;
      for (int i = 0; i < NS; i++) used[n][i] = 3;
    end
    // network: synapse i < NN is neuron i, NN + j is external input j
    used[0][NN+0] = 0; used[0][NN+1] = 2;
    used[1][0] = 0;
    used[2][1] = 0; used[2][NN+2] = 1;
    used[3][NN+0] = 0; used[3][NN+3] = 2;
    used[4][NN+0] = 0; used[4][NN+3] = 2;
    cs.ie = 1.5; cs.kl = 0.0; cs.kr = 4.2; cs.vth = -20.0; cs.dt = 0.1; cs.cm = 3.0; cs.v0 = -64.6;
    cd.ie = 0.0; cd.kl = 4.2; cd.kr = 0.0; cd.vth = 1000.0; cd.dt = 0.1; cd.cm = 3.0; cd.v0 = -64.5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++) begin
      for (int a = 0; a < 2048; a++) wr(n, 0, a, soma_word(a, cs));
      for (int a = 0; a < 2048; a++) wr(n, 1, a, den_word(a, cd));
      for (int a = 0; a < 27; a++) wr(n, 2, a, syn_word(a, 0.4, 0.2, 0.3, 1.0, 0.1, 10));
      for (int i = 0; i < NS; i++) begin
        wr(n, 3, 2 * i, real_to_fp32(1.0));
        wr(n, 3, 2 * i + 1, 32'(used[n][i]));
      end
    end
    rd(2, 1, 700, d);  check(d == den_word(700, cd), "read-back dendrite parameter");
    rd(4, 3, 2 * (NN + 3) + 1, d); check(d == 32'd2, "read-back connection RAM");
    rd(7, 0, 0, d);    check(d[15:8] == 8'd10 && d[0] == 1'b0, "control register after reset");

    // init, then one single step while stopped
    wr(7, 0, 0, 32'h0A04);
    repeat (300) @(negedge clk);
    wr(7, 0, 0, 32'h0A02);
    repeat (2 * STEP_CYCLES + 500) @(negedge clk);
    rd(7, 0, 1, d);
    check(d == 1 && n_steps == 1, "single step while stopped");
    if (d == 1) mech_single++;

    // run
    wr(7, 0, 0, 32'h0A01);
    last_step = -1;
    gap_check = 1;
    for (int s = 0; s < STEPS; s++) begin
      @(posedge clk iff step);
      // external inputs for the next step
      if (s % 37 == 5)  begin @(negedge clk); ext_spike[0] = 1; @(negedge clk); ext_spike[0] = 0; end
      if (s % 37 == 15) begin @(negedge clk); ext_spike[1] = 1; @(negedge clk); ext_spike[1] = 0; end
      if (s % 53 == 7)  begin @(negedge clk); ext_spike[2] = 1; @(negedge clk); ext_spike[2] = 0; end
      if (s % 41 == 3)  begin @(negedge clk); ext_spike[3] = 1; @(negedge clk); ext_spike[3] = 0; end
      // neurons 3 and 4 see identical inputs
      if (s < STEPS / 2 && v_den[3] !== v_den[4]) same_before = 0;
      if (s > STEPS / 2 + 20 && v_den[3] !== v_den[4]) diff_after = 1;
      if (s == STEPS / 3) begin
        // Cdur 1 ms -> 2 ms: control register and the E_cdur words
        for (int n = 0; n < NN; n++)
          for (int k = 0; k < 3; k++) begin
            wr(n, 2, 8 * k + 3, syn_word(8 * k + 3, 0.4, 0.2, 0.3, 1.0, 0.1, 20));
            wr(n, 2, 8 * k + 4, syn_word(8 * k + 4, 0.4, 0.2, 0.3, 1.0, 0.1, 20));
          end
        @(posedge clk iff step);
        wr(7, 0, 0, 32'h1401);
        cdur = 20;
        rd(7, 0, 0, d);
        if (d[15:8] == 8'd20) mech_cdur++;
      end
      if (s == STEPS / 2) begin
        // [Mg] 1 mM -> 0 in neuron 4 only
        wr(4, 2, 24, FP_ZERO);
        mech_mg++;
      end
    end
    wr(7, 0, 0, 32'h1400);
    gap_check = 0;
    repeat (STEP_CYCLES + 500) @(negedge clk);

    // ---- results
    rd(7, 0, 1, d); check(d == 32'(n_steps), $sformatf("step register %0d, pulses %0d", d, n_steps));
    rd(7, 0, 2, d); ovr = d;
    for (int n = 0; n < NN; n++) begin
      check(evt_stats[n][0] == 32'(m_re),   $sformatf("neuron %0d RE %0d expected %0d", n, evt_stats[n][0], m_re));
      check(evt_stats[n][1] == 32'(m_fe),   $sformatf("neuron %0d FE %0d expected %0d", n, evt_stats[n][1], m_fe));
      check(evt_stats[n][2] == 32'(m_both), $sformatf("neuron %0d BOTH %0d expected %0d", n, evt_stats[n][2], m_both));
      check(evt_stats[n][3] == 32'(m_nc),   $sformatf("neuron %0d NC %0d expected %0d", n, evt_stats[n][3], m_nc));
      check(evt_stats[n][4] == 32'(m_exp[n]), $sformatf("neuron %0d exponentials %0d expected %0d", n, evt_stats[n][4], m_exp[n]));
      check(n_fires[n] > 0, $sformatf("neuron %0d never fired", n));
    end
    check(same_before == 1, "neurons 3 and 4 differ before the Mg change");
    check(diff_after == 1, "Mg change in neuron 4 had no effect");
    // the short step cannot hold every step: overruns must be counted and
    // steps away from one must be exactly STEP_CYCLES apart (a late step
    // makes its own gap longer and the next one shorter)
    check(ovr > 0, "mechanism overrun never happened");
    check(gap_err <= 2 * ovr, $sformatf("%0d irregular gaps but %0d overruns", gap_err, ovr));
    check(gaps - gap_err > 0, "no step met the short period");
    // mechanisms that never happened
    check(m_re > 0,   "mechanism RE never happened");
    check(m_fe > 0,   "mechanism FE never happened");
    check(m_both > 0, "mechanism BOTH never happened");
    check(m_nc > 0,   "mechanism NC never happened");
    check(mech_cdur > 0,   "mechanism Cdur switch never happened");
    check(mech_mg > 0,     "mechanism Mg switch never happened");
    check(mech_single > 0, "mechanism single step never happened");
    $display("steps %0d overruns %0d, RE %0d FE %0d BOTH %0d NC %0d, spikes %0d %0d %0d %0d %0d, exps %0d %0d %0d %0d %0d",
             n_steps, ovr, m_re, m_fe, m_both, m_nc, n_fires[0], n_fires[1], n_fires[2], n_fires[3], n_fires[4],
             m_exp[0], m_exp[1], m_exp[2], m_exp[3], m_exp[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
