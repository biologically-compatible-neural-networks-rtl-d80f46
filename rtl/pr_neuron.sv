// pr_neuron: one two-compartment Pinsky-Rinzel neuron structure.
//
// Three neuroprocessors work side by side on every time step: the soma
// (traub_soma_pro), the dendrite (den_pro) and the synapse (syn_pro)
// neuroprocessor, each with its own dual-port RAM(s) whose port A is
// reachable from the host. They exchange values as in the document's block
// diagram:
//   soma Vmout/oe_float      -> dendrite Vm_left_in/Vm_left_en
//   dendrite Vmout/oe_float  -> soma Vm_right_in/Vm_right_en,
//                               synapse Vm_den/den_en
//   synapse gtol_syn/gEtol_syn/syn_oe -> dendrite gtol/gEtol/syn_en
// A value exchanged in step n is used by its receiver in step n+1.
// neu_fire pulses when the soma voltage crosses its threshold.
//
// Host port: cfg_sel picks the RAM (0 soma parameters, 1 dendrite
// parameters, 2 synapse parameters, 3 connection RAM "conex", 4 synapse
// state RAM), cfg_addr the word; reads return cfg_rdata one clock later.
// init loads the initial state of all three processors; step starts a
// time step; busy is high while any processor works.
// The partition into soma, dendrite and synapse processors with these
// signal names and five RAMs follows the document; the host port is this
// design's stand-in for the bus interface.
module pr_neuron
  import fp_pkg::*;
#(
  parameter int N_SYN = 9,
  localparam int SAW  = $clog2(2 * N_SYN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             step,
  input  logic [7:0]       cdur_steps,
  input  logic [N_SYN-1:0] spike_in,
  output logic             busy,
  output logic             neu_fire,
  output fp32_t            v_soma,
  output fp32_t            v_den,
  output fp32_t            g_syn,
  output logic             step_done,
  output logic [31:0]      evt_stats [5],   // RE, FE, BOTH, NC, event exps
  // host port
  input  logic [2:0]       cfg_sel,
  input  logic [10:0]      cfg_addr,
  input  logic             cfg_we,
  input  fp32_t            cfg_wdata,
  output fp32_t            cfg_rdata
);

  // soma <-> dendrite <-> synapse signals (names of the block diagram)
  fp32_t soma_vm, den_vm, gtol_syn, gEtol_syn;
  logic  soma_oe, den_oe, syn_oe;
  logic  soma_busy, den_busy, syn_busy;
  fp32_t r_total [3];

  logic [10:0]    soma_pa, den_pa;
  fp32_t          soma_pd, den_pd;
  logic [4:0]     syn_pa;
  fp32_t          syn_pd;
  logic [SAW-1:0] cx_a, sm_a;
  fp32_t          cx_d, sm_d, sm_wd;
  logic           sm_we;

  traub_soma_pro u_soma (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .busy(soma_busy),
    .Vm_right_en(den_oe), .Vm_right_in(den_vm),
    .Vmout(soma_vm), .oe_float(soma_oe), .neu_fire(neu_fire),
    .pram_addr(soma_pa), .pram_rdata(soma_pd)
  );

  fp32_t den_state [4];
  den_pro u_den (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .busy(den_busy),
    .Vm_left_en(soma_oe), .Vm_left_in(soma_vm),
    .syn_en(syn_oe), .gtol(gtol_syn), .gEtol(gEtol_syn),
    .Vmout(den_vm), .oe_float(den_oe), .state_out(den_state),
    .pram_addr(den_pa), .pram_rdata(den_pd)
  );

  syn_pro #(.N_SYN(N_SYN)) u_syn (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step),
    .cdur_steps(cdur_steps), .spike_in(spike_in),
    .den_en(den_oe), .Vm_den(den_vm), .busy(syn_busy), .syn_oe(syn_oe),
    .gtol_syn(gtol_syn), .gEtol_syn(gEtol_syn), .r_total(r_total),
    .re_cnt(evt_stats[0]), .fe_cnt(evt_stats[1]), .both_cnt(evt_stats[2]),
    .nc_cnt(evt_stats[3]), .exp_cnt(evt_stats[4]),
    .pram_addr(syn_pa), .pram_rdata(syn_pd),
    .conex_addr(cx_a), .conex_rdata(cx_d),
    .smem_addr(sm_a), .smem_we(sm_we), .smem_wdata(sm_wd), .smem_rdata(sm_d)
  );

  // ---- the five dual-port RAMs; port A is the host's
  fp32_t rd_a [5];

  dpram #(.WIDTH(32), .DEPTH(2048)) u_pram_soma (
    .clk(clk), .a_we(cfg_we && cfg_sel == 3'd0), .a_addr(cfg_addr),
    .a_wdata(cfg_wdata), .a_rdata(rd_a[0]),
    .b_we(1'b0), .b_addr(soma_pa), .b_wdata(FP_ZERO), .b_rdata(soma_pd)
  );

  dpram #(.WIDTH(32), .DEPTH(2048)) u_pram_den (
    .clk(clk), .a_we(cfg_we && cfg_sel == 3'd1), .a_addr(cfg_addr),
    .a_wdata(cfg_wdata), .a_rdata(rd_a[1]),
    .b_we(1'b0), .b_addr(den_pa), .b_wdata(FP_ZERO), .b_rdata(den_pd)
  );

  dpram #(.WIDTH(32), .DEPTH(32)) u_pram_syn (
    .clk(clk), .a_we(cfg_we && cfg_sel == 3'd2), .a_addr(cfg_addr[4:0]),
    .a_wdata(cfg_wdata), .a_rdata(rd_a[2]),
    .b_we(1'b0), .b_addr(syn_pa), .b_wdata(FP_ZERO), .b_rdata(syn_pd)
  );

  dpram #(.WIDTH(32), .DEPTH(2 ** SAW)) u_conex (
    .clk(clk), .a_we(cfg_we && cfg_sel == 3'd3), .a_addr(cfg_addr[SAW-1:0]),
    .a_wdata(cfg_wdata), .a_rdata(rd_a[3]),
    .b_we(1'b0), .b_addr(cx_a), .b_wdata(FP_ZERO), .b_rdata(cx_d)
  );

  dpram #(.WIDTH(32), .DEPTH(2 ** SAW)) u_synmem (
    .clk(clk), .a_we(cfg_we && cfg_sel == 3'd4), .a_addr(cfg_addr[SAW-1:0]),
    .a_wdata(cfg_wdata), .a_rdata(rd_a[3 + 1]),
    .b_we(sm_we), .b_addr(sm_a), .b_wdata(sm_wd), .b_rdata(sm_d)
  );

  logic [2:0] sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= cfg_sel;
  end
  assign cfg_rdata = (sel_q <= 3'd4) ? rd_a[sel_q] : FP_ZERO;

  // A step is finished when all three processors are idle again.
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign busy      = soma_busy || den_busy || syn_busy;
  assign step_done = busy_q && !busy;
  assign v_soma    = soma_vm;
  assign v_den     = den_vm;
  assign g_syn     = gtol_syn;

endmodule
