// tb_pr_neuron: self-checking test of one complete neuron structure
// (soma, dendrite and synapse processors with their five RAMs).
//
// All RAMs are loaded through the host port and a sample of words is read
// back. Synapse 0 (AMPA) receives a presynaptic spike every 4 ms from
// 20 ms on, synapse 1 (NMDA) every 8 ms; the soma has a small bias
// current. After every step the soma and dendrite states are compared
// with one-step references that take the processor's previous state and
// the values exchanged in the previous step (dendrite voltage for the
// soma; soma voltage and synaptic gtol/gEtol for the dendrite), and the
// synapse output must equal eq. (7) with the NMDA block evaluated at the
// previous dendrite voltage. Also checked: neu_fire at each threshold
// crossing and at least one spike, event statistics, and step_done within
// the 10,000-clock real-time step.
module tb_pr_neuron;
  import fp_pkg::*;
  import tb_util_pkg::*;

  localparam int N_SYN = 2;

  logic        clk = 0, rst_n = 0, init = 0, step = 0;
  logic [7:0]  cdur_steps = 8'd10;
  logic [N_SYN-1:0] spike_in = '0;
  logic        busy, neu_fire, step_done, cfg_we = 0;
  fp32_t       v_soma, v_den, g_syn, cfg_wdata = '0, cfg_rdata;
  logic [31:0] evt_stats [5];
  logic [2:0]  cfg_sel = '0;
  logic [10:0] cfg_addr = '0;
  int          checks = 0, failures = 0;

  pr_neuron #(.N_SYN(N_SYN)) dut (.*);

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

  task automatic wr(int sel, int addr, fp32_t d);
    @(negedge clk);
    cfg_sel = 3'(sel); cfg_addr = 11'(addr); cfg_wdata = d; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic rd_check(int sel, int addr, fp32_t expv);
    @(negedge clk);
    cfg_sel = 3'(sel); cfg_addr = 11'(addr);
    @(negedge clk);
    checks++;
    if (cfg_rdata !== expv) begin
      failures++;
      $display("FAIL read-back sel %0d addr %0d: %h expected %h", sel, addr, cfg_rdata, expv);
    end
  endtask

  initial begin
    cmp_cfg_t cs, cd;
    real vs, h, p, vd, sg, cg, qg, ca, vs_prev, vd_prev, g_prev, ge_prev, bv, gexp;
    int  lat, max_lat = 0, crossings = 0;
    cs.ie = 1.5; cs.kl = 0.0; cs.kr = 4.2; cs.vth = -20.0; cs.dt = 0.1; cs.cm = 3.0; cs.v0 = -64.6;
    cd.ie = 0.0; cd.kl = 4.2; cd.kr = 0.0; cd.vth = 1000.0; cd.dt = 0.1; cd.cm = 3.0; cd.v0 = -64.5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2048; a++) wr(0, a, soma_word(a, cs));
    for (int a = 0; a < 2048; a++) wr(1, a, den_word(a, cd));
    for (int a = 0; a < 27; a++) wr(2, a, syn_word(a, 0.3, 0.1, 0.2, 1.0, 0.1, 10));
    wr(3, 0, real_to_fp32(1.0)); wr(3, 1, 32'd0);     // synapse 0: AMPA
    wr(3, 2, real_to_fp32(1.0)); wr(3, 3, 32'd2);     // synapse 1: NMDA
    rd_check(0, 9, soma_word(9, cs));
    rd_check(1, 300, den_word(300, cd));
    rd_check(2, 22, syn_word(22, 0.3, 0.1, 0.2, 1.0, 0.1, 10));
    rd_check(3, 3, 32'd2);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    while (busy) @(negedge clk);
    vs = fp32_to_real(v_soma); vd = fp32_to_real(v_den);
    h = fp32_to_real(dut.u_soma.u_eng.R[4]); p = fp32_to_real(dut.u_soma.u_eng.R[5]);
    sg = fp32_to_real(dut.u_den.state_out[0]); cg = fp32_to_real(dut.u_den.state_out[1]);
    qg = fp32_to_real(dut.u_den.state_out[2]); ca = fp32_to_real(dut.u_den.state_out[3]);
    // before the first step nothing has been exchanged yet
    vs_prev = 0.0; vd_prev = 0.0; g_prev = 0.0; ge_prev = 0.0;
    for (int s = 0; s < 1000; s++) begin
      logic [N_SYN-1:0] sp;
      sp = '0;
      if (s >= 200 && s % 40 == 0) sp[0] = 1'b1;
      if (s >= 200 && s % 80 == 0) sp[1] = 1'b1;
      @(negedge clk); step = 1; spike_in = sp;
      @(negedge clk); step = 0; spike_in = '0;
      lat = 1;
      while (!step_done && lat < 20000) begin @(negedge clk); lat++; end
      if (lat > max_lat) max_lat = lat;
      soma_ref(cs, vd_prev, vs, h, p);
      den_ref(cd, vs_prev, g_prev, ge_prev, vd, sg, cg, qg, ca);
      @(negedge clk);
      checks += 3;
      if (!near(fp32_to_real(v_soma), vs, 1e-3 + 1e-5 * (vs < 0 ? -vs : vs))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d soma V %f expected %f", s, fp32_to_real(v_soma), vs);
      end
      if (!near(fp32_to_real(v_den), vd, 1e-3 + 1e-5 * (vd < 0 ? -vd : vd))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d dendrite V %f expected %f", s, fp32_to_real(v_den), vd);
      end
      // synapse output with the block at the previous dendrite voltage
      bv = 1.0 / (1.0 + (1.0 / 3.57) * exp_q(fp(-0.062 * vd_prev)));
      gexp = 0.3 * fp32_to_real(dut.r_total[0]) + 0.1 * fp32_to_real(dut.r_total[1]) +
             0.2 * fp32_to_real(dut.r_total[2]) * bv;
      if (!near(fp32_to_real(g_syn), gexp, 1e-5 + 1e-3 * gexp)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d gtol %f expected %f", s, fp32_to_real(g_syn), gexp);
      end
      // continue from the hardware's own state
      vs = fp32_to_real(v_soma); vd = fp32_to_real(v_den);
      h = fp32_to_real(dut.u_soma.u_eng.R[4]); p = fp32_to_real(dut.u_soma.u_eng.R[5]);
      sg = fp32_to_real(dut.u_den.state_out[0]); cg = fp32_to_real(dut.u_den.state_out[1]);
      qg = fp32_to_real(dut.u_den.state_out[2]); ca = fp32_to_real(dut.u_den.state_out[3]);
      if (fp32_to_real(dut.u_soma.u_eng.R[2]) < cs.vth && vs >= cs.vth) crossings++;
      vs_prev = vs; vd_prev = vd;
      g_prev = fp32_to_real(g_syn); ge_prev = fp32_to_real(dut.gEtol_syn);
    end
    checks += 5;
    if (fires != crossings) begin failures++; $display("FAIL neu_fire %0d, crossings %0d", fires, crossings); end
    if (fires == 0)         begin failures++; $display("FAIL the neuron never fired"); end
    if (evt_stats[0] == 0 || evt_stats[1] == 0) begin failures++; $display("FAIL no synaptic events"); end
    if (evt_stats[4] == 0)  begin failures++; $display("FAIL no event exponentials"); end
    if (max_lat > 10000)    begin failures++; $display("FAIL step takes %0d clocks", max_lat); end
    $display("spikes %0d, RE %0d FE %0d BOTH %0d NC %0d, longest step %0d clocks",
             fires, evt_stats[0], evt_stats[1], evt_stats[2], evt_stats[3], max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
