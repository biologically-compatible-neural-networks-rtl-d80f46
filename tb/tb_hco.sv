// tb_hco: workload test of neuro_sim - the half-centre oscillator at the
// core of the leech heartbeat timing network (the HN3 left/right pair).
//
// Neurons 0 and 1 inhibit each other through GABA_A synapses; both get the
// same bias current and start from slightly different voltages. Neurons 2
// and 3 are the same two cells without the connections (control). The
// step period is shortened to STEP_CYCLES clocks to keep the run short;
// the cells settle for SETTLE steps (spikes not counted) before the
// counting window. Checks:
//   - both coupled cells fire, and firing passes from one cell to the
//     other several times (escape from inhibition, alternating activity);
//   - the coupled pair fires less than the uncoupled control pair;
//   - the RE/FE/BOTH/NC and exponential counters of every neuron against
//     this testbench's own model of the transmitter pulses.
// The network is the document's; cell parameters, weights, current and
// durations are this testbench's choices (+ie=, +gg=, +steps= change them).
module tb_hco;
  import fp_pkg::*;
  import tb_util_pkg::*;

  localparam int NN = 5, NE = 4, NS = NN + NE;
  localparam int STEP_CYCLES = 300;
  localparam int SETTLE = 400;         // steps at rest before the burst
  int  STEPS = 6000;                   // 600 ms
  real IE = 8.0;
  real G_GABA = 1.0;
  initial begin
    void'($value$plusargs("steps=%d", STEPS));
    void'($value$plusargs("ie=%f", IE));
    void'($value$plusargs("gg=%f", G_GABA));
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
    repeat (8000000) @(posedge clk);
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
  int  n_steps = 0, fires [NN], switches = 0, last = -1;

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
    for (int n = 0; n < NN; n++) if (rst_n && neu_fire[n] && n_steps > SETTLE) fires[n]++;
    if (rst_n && n_steps > SETTLE && (neu_fire[0] || neu_fire[1])) begin
      if (neu_fire[0] && last == 1) switches++;
      if (neu_fire[1] && last == 0) switches++;
      last = neu_fire[0] ? 0 : 1;
    end
  end

  initial begin
    cmp_cfg_t cs, cd;
    for (int i = 0; i < NS; i++) begin cnt[i] = 0; on_q[i] = 0; end
    for (int n = 0; n < NN; n++) begin
      m_exp[n] = 0; fires[n] = 0;
      for (int i = 0; i < NS; i++) used[n][i] = 3;
    end
    used[0][1] = 1; used[1][0] = 1;      // mutual GABA_A
    cs.ie = IE; cs.kl = 0.0; cs.kr = 4.2; cs.vth = -20.0; cs.dt = 0.1; cs.cm = 3.0; cs.v0 = -64.6;
    cd.ie = 0.0; cd.kl = 4.2; cd.kr = 0.0; cd.vth = 1000.0; cd.dt = 0.1; cd.cm = 3.0; cd.v0 = -64.5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++) begin
      cs.v0 = (n % 2 == 0) ? -64.6 : -60.0;
      for (int a = 0; a < 2048; a++) wr(n, 0, a, soma_word(a, cs));
      for (int a = 0; a < 2048; a++) wr(n, 1, a, den_word(a, cd));
      for (int a = 0; a < 27; a++) wr(n, 2, a, syn_word(a, 0.0, G_GABA, 0.0, 1.0, 0.1, CDUR));
      for (int i = 0; i < NS; i++) begin
        wr(n, 3, 2 * i, real_to_fp32(1.0));
        wr(n, 3, 2 * i + 1, 32'(used[n][i]));
      end
    end
    wr(7, 0, 0, 32'h0A04);               // init
    repeat (300) @(negedge clk);
    wr(7, 0, 0, 32'h0A01);               // run
    repeat (STEPS + SETTLE) @(posedge clk iff step);
    wr(7, 0, 0, 32'h0A00);
    repeat (STEP_CYCLES + 500) @(negedge clk);

    $display("spikes: coupled %0d %0d (%0d switches), uncoupled %0d %0d",
             fires[0], fires[1], switches, fires[2], fires[3]);
    check(fires[0] > 0 && fires[1] > 0, "a coupled cell never fired");
    check(switches >= 4, "activity did not alternate between the coupled cells");
    check(fires[0] + fires[1] < fires[2] + fires[3], "inhibition did not reduce firing");
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
