// tb_epilepsy: workload test of neuro_sim - the after-discharge experiment
// with NMDA receptors and the magnesium concentration.
//
// A presynaptic cell is driven into a burst by an injected current that is
// switched on for BURST steps and then off; the postsynaptic cell is
// simulated three times side by side, one neuron structure each:
//   neuron 1: AMPA only
//   neuron 2: AMPA + NMDA, [Mg] = 1.0 mM
//   neuron 3: AMPA + NMDA, [Mg] = 0.1 mM
// The synapse processor gives a source one receptor type per target, so
// the presynaptic cell exists twice (neurons 0 and 4, same parameters and
// the same current, hence bit-identical spikes): neuron 0 drives the AMPA
// input and neuron 4 the NMDA input of the postsynaptic cells. The step
// period is shortened to STEP_CYCLES clocks to keep the run short. The
// cells first settle at rest for SETTLE steps (spikes there are not
// counted), then the current is on for BURST steps. Current, weights and
// durations can be changed with +ie=, +ga=, +gn=, +burst=, +steps=.
// Checks:
//   - neurons 0 and 4 fire at exactly the same steps, and only while the
//     current is on (plus the decay of the last burst);
//   - the postsynaptic cells respond in the order the experiment reports:
//     AMPA+NMDA gives more spikes than AMPA alone, and lowering
//     [Mg] gives more spikes than at 1 mM, including spikes after the
//     presynaptic burst has ended (after-discharge);
//   - the RE/FE/BOTH/NC and exponential counters of every neuron against
//     this testbench's own model of the transmitter pulses.
// The experiment is the document's; the cell parameters, weights, current
// and durations are this testbench's choices.
module tb_epilepsy;
  import fp_pkg::*;
  import tb_util_pkg::*;

  localparam int NN = 5, NE = 4, NS = NN + NE;
  localparam int STEP_CYCLES = 300;
  localparam int SETTLE = 400;         // steps at rest before the burst
  int  BURST = 500;                    // steps with current on (50 ms)
  int  STEPS = 2500;                   // 250 ms in all
  real IE_BURST = 8.0;
  real G_AMPA = 0.3, G_NMDA = 1.0;
  initial begin
    void'($value$plusargs("burst=%d", BURST));
    void'($value$plusargs("steps=%d", STEPS));
    void'($value$plusargs("ie=%f", IE_BURST));
    void'($value$plusargs("ga=%f", G_AMPA));
    void'($value$plusargs("gn=%f", G_NMDA));
  end

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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int unit, int sel, int word, logic [31:0] d);
    @(negedge clk);
    cfg_addr = {3'(unit), 3'(sel), 11'(word)}; cfg_wdata = d; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // transmitter pulse model (same rule as the hardware: a spike while the
  // pulse is on is ignored; spikes are delivered at the next step)
  localparam int CDUR = 10;
  logic [NS-1:0] pending = '0;
  int  cnt [NS];
  bit  on_q [NS];
  int  m_re = 0, m_fe = 0, m_both = 0, m_nc = 0;
  int  used [NN][NS];
  int  m_exp [NN];
  int  n_steps = 0, fires [NN], fires_after [NN], mismatch04 = 0, late_pre = 0;

  always @(posedge clk) begin
    logic [NS-1:0] sp, r, f;
    if (step && rst_n) begin
      sp = pending | {ext_spike, neu_fire};
      pending = '0;
      r = '0; f = '0;
      for (int i = 0; i < NS; i++) begin
        bit on_n;
        on_n = (sp[i] && cnt[i] == 0) || cnt[i] > 1;
        r[i] = on_n && !on_q[i];
        f[i] = !on_n && on_q[i];
        if (sp[i] && cnt[i] == 0) cnt[i] = CDUR;
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
    end else begin
      pending = pending | {ext_spike, neu_fire};
    end
    if (rst_n && neu_fire[0] != neu_fire[4]) mismatch04++;
    for (int n = 0; n < NN; n++) if (rst_n && neu_fire[n] && n_steps > SETTLE) begin
      fires[n]++;
      if (n_steps > SETTLE + BURST + 100) fires_after[n]++;
    end
  end

  initial begin
    cmp_cfg_t cs, cd;
    for (int i = 0; i < NS; i++) begin cnt[i] = 0; on_q[i] = 0; end
    for (int n = 0; n < NN; n++) begin
      m_exp[n] = 0; fires[n] = 0; fires_after[n] = 0;
      for (int i = 0; i < NS; i++) used[n][i] = 3;
    end
    used[1][0] = 0;                      // AMPA from the presynaptic cell
    used[2][0] = 0; used[2][4] = 2;      // AMPA + NMDA
    used[3][0] = 0; used[3][4] = 2;
    cs.ie = 0.0; cs.kl = 0.0; cs.kr = 4.2; cs.vth = -20.0; cs.dt = 0.1; cs.cm = 3.0; cs.v0 = -64.6;
    cd.ie = 0.0; cd.kl = 4.2; cd.kr = 0.0; cd.vth = 1000.0; cd.dt = 0.1; cd.cm = 3.0; cd.v0 = -64.5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++) begin
      real mg;
      mg = (n == 3) ? 0.1 : 1.0;
      for (int a = 0; a < 2048; a++) wr(n, 0, a, soma_word(a, cs));
      for (int a = 0; a < 2048; a++) wr(n, 1, a, den_word(a, cd));
      for (int a = 0; a < 27; a++) wr(n, 2, a, syn_word(a, G_AMPA, 0.0, G_NMDA, mg, 0.1, CDUR));
      for (int i = 0; i < NS; i++) begin
        wr(n, 3, 2 * i, real_to_fp32(1.0));
        wr(n, 3, 2 * i + 1, 32'(used[n][i]));
      end
    end
    wr(7, 0, 0, 32'h0A04);               // init
    repeat (300) @(negedge clk);
    wr(7, 0, 0, 32'h0A01);               // run: settle at rest first
    repeat (SETTLE) @(posedge clk iff step);
    cs.ie = IE_BURST;                    // presynaptic current on
    wr(0, 0, 6, soma_word(6, cs));
    wr(4, 0, 6, soma_word(6, cs));
    repeat (BURST) @(posedge clk iff step);
    cs.ie = 0.0;
    wr(0, 0, 6, soma_word(6, cs));
    wr(4, 0, 6, soma_word(6, cs));
    repeat (STEPS - BURST - SETTLE) @(posedge clk iff step);
    wr(7, 0, 0, 32'h0A00);
    repeat (STEP_CYCLES + 500) @(negedge clk);

    $display("spikes: pre %0d/%0d, AMPA %0d (after %0d), NMDA Mg1 %0d (after %0d), NMDA Mg0.1 %0d (after %0d)",
             fires[0], fires[4], fires[1], fires_after[1], fires[2], fires_after[2], fires[3], fires_after[3]);
    check(fires[0] > 2, "presynaptic cell did not burst");
    check(mismatch04 == 0, "the two copies of the presynaptic cell differ");
    check(fires_after[0] == 0, "presynaptic cell fired after its current was off");
    check(fires[1] > 0, "AMPA-only cell never fired");
    check(fires[2] > fires[1], "AMPA+NMDA gave no more spikes than AMPA alone");
    check(fires[3] > fires[2], "low [Mg] did not increase firing");
    check(fires_after[3] > fires_after[2], "no after-discharge at low [Mg]");
    for (int n = 0; n < NN; n++) begin
      check(evt_stats[n][0] == 32'(m_re),   $sformatf("neuron %0d RE", n));
      check(evt_stats[n][1] == 32'(m_fe),   $sformatf("neuron %0d FE", n));
      check(evt_stats[n][2] == 32'(m_both), $sformatf("neuron %0d BOTH", n));
      check(evt_stats[n][3] == 32'(m_nc),   $sformatf("neuron %0d NC", n));
      check(evt_stats[n][4] == 32'(m_exp[n]), $sformatf("neuron %0d exponentials %0d expected %0d",
                                                       n, evt_stats[n][4], m_exp[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
