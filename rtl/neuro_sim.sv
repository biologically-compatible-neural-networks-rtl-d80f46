// neuro_sim: the neuro-simulator fabric: N_NEURON two-compartment
// Pinsky-Rinzel neuron structures running in lock step.
//
// Every neuron's synapse neuroprocessor sees the same spike vector
// {external spikes, neuron spikes}: input j < N_NEURON is the spike of
// neuron j, input N_NEURON + e is external input e (for stimulation or
// for spikes recorded from living tissue). A neuron's spike (neu_fire at
// the end of step n) is held and delivered to every synapse processor at
// step n+1; each synapse processor's connection RAM decides whether and
// how (type and weight) a source drives that neuron, so any network up to
// full connectivity can be formed, including self-connections. External
// spikes are held from their pulse until the next step in the same way.
//
// Host port (stand-in for the processor bus): cfg_addr = {unit[2:0],
// sel[2:0], word[10:0]}. unit 0..N_NEURON-1 addresses a neuron's RAMs
// (sel as in pr_neuron); unit 7 addresses the control registers:
//   word 0 CTRL   (write) bit0 run, bit1 single step, bit2 init,
//                 bits 15:8 Cdur in steps; (read) same, bit3 busy
//   word 1 STEPS  (read) steps issued
//   word 2 OVERRUN(read) steps that were late (real-time misses)
// Reads return cfg_rdata one clock after the address. Time steps come from
// step_timer: one per STEP_CYCLES clocks while running.
// N_NEURON = 5 is the largest number of neuron structures the document
// fits on its device; the external inputs, the spike delivery and the
// register map are this design's choices.
module neuro_sim
  import fp_pkg::*;
#(
  parameter int N_NEURON    = 5,
  parameter int N_EXT       = 4,
  parameter int STEP_CYCLES = 10000,
  localparam int N_SYN      = N_NEURON + N_EXT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_EXT-1:0]    ext_spike,
  output logic [N_NEURON-1:0] neu_fire,
  output fp32_t               v_soma [N_NEURON],
  output fp32_t               v_den  [N_NEURON],
  output logic                step,
  output logic [31:0]         evt_stats [N_NEURON][5],
  // host port
  input  logic [16:0]         cfg_addr,
  input  logic                cfg_we,
  input  fp32_t               cfg_wdata,
  output fp32_t               cfg_rdata
);

  logic [2:0]  unit, sel;
  logic [10:0] word;
  assign {unit, sel, word} = cfg_addr;

  // ---- control registers
  logic        run, init_p, single_p;
  logic [7:0]  cdur_steps;
  logic [31:0] step_count, overrun_count;
  logic        any_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      init_p     <= 1'b0;
      single_p   <= 1'b0;
      cdur_steps <= 8'd10;            // 1 ms at dt = 0.1 ms
    end else begin
      init_p   <= 1'b0;
      single_p <= 1'b0;
      if (cfg_we && unit == 3'd7 && word == 11'd0) begin
        run        <= cfg_wdata[0];
        single_p   <= cfg_wdata[1];
        init_p     <= cfg_wdata[2];
        cdur_steps <= cfg_wdata[15:8];
      end
    end
  end

  step_timer #(.STEP_CYCLES(STEP_CYCLES)) u_timer (
    .clk(clk), .rst_n(rst_n), .run(run), .single(single_p),
    .busy(any_busy || init_p), .step(step),
    .step_count(step_count), .overrun_count(overrun_count)
  );

  // ---- spike delivery: held from a pulse until the next step
  logic [N_SYN-1:0] spk_hold, spk_vec;
  assign spk_vec = spk_hold | {ext_spike, neu_fire};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    spk_hold <= '0;
    else if (step) spk_hold <= '0;
    else           spk_hold <= spk_vec;
  end

  // ---- neuron structures
  logic [N_NEURON-1:0] busy_v;
  fp32_t               rdata_n [N_NEURON];
  fp32_t               g_syn_n [N_NEURON];
  logic [N_NEURON-1:0] done_n;

  for (genvar n = 0; n < N_NEURON; n++) begin : g_neuron
    pr_neuron #(.N_SYN(N_SYN)) u_neuron (
      .clk(clk), .rst_n(rst_n), .init(init_p), .step(step),
      .cdur_steps(cdur_steps), .spike_in(spk_vec),
      .busy(busy_v[n]), .neu_fire(neu_fire[n]),
      .v_soma(v_soma[n]), .v_den(v_den[n]), .g_syn(g_syn_n[n]),
      .step_done(done_n[n]), .evt_stats(evt_stats[n]),
      .cfg_sel(sel), .cfg_addr(word),
      .cfg_we(cfg_we && unit == 3'(n)), .cfg_wdata(cfg_wdata),
      .cfg_rdata(rdata_n[n])
    );
  end

  assign any_busy = |busy_v;

  // ---- read-back
  logic [2:0]  unit_q;
  logic [10:0] word_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_q <= '0;
      word_q <= '0;
    end else begin
      unit_q <= unit;
      word_q <= word;
    end
  end

  always_comb begin
    cfg_rdata = FP_ZERO;
    if (unit_q == 3'd7) begin
      case (word_q)
        11'd0:   cfg_rdata = {16'd0, cdur_steps, 4'd0, any_busy, 2'b00, run};
        11'd1:   cfg_rdata = step_count;
        11'd2:   cfg_rdata = overrun_count;
        default: cfg_rdata = FP_ZERO;
      endcase
    end else begin
      for (int n = 0; n < N_NEURON; n++)
        if (unit_q == 3'(n)) cfg_rdata = rdata_n[n];
    end
  end

endmodule
