// traub_soma_pro: soma neuroprocessor of the two-compartment Pinsky-Rinzel
// neuron.
//
// Every time step it advances the soma's sodium inactivation h and
// delayed-rectifier activation p (m is taken at its steady state m_inf),
// forms psi_Gtot = gNa m^2 h + gKDR p + gLeak and
// psi = gNa m^2 h ENa + gKDR p EK + gLeak ELeak, adds the injected current
// and the coupling to the dendrite, and applies the exponential-Euler step
// V' = A/B + (V - A/B) exp(-B dt/Cm). It runs soma_program() on an
// np_engine; all constants, the rate tables and the initial state come
// from its parameter RAM (port B here, see np_prog_pkg for the map).
//
// Interface (names as in the document's block diagram):
//   Vm_right_in/Vm_right_en : dendrite voltage and its strobe; the value
//                             is held and used from the next step on.
//   Vmout/oe_float          : new soma voltage, oe_float pulses for one
//                             clock when a step finishes.
//   neu_fire                : pulses with oe_float when V crosses the
//                             threshold (PRAM word P_VTH) upwards.
//   init/step/busy          : load initial state; start one time step.
// The equations follow the document; the threshold-crossing spike test
// and the held-neighbour timing are this design's choices.
module traub_soma_pro
  import fp_pkg::*;
  import np_prog_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        step,
  output logic        busy,
  input  logic        Vm_right_en,
  input  fp32_t       Vm_right_in,
  output fp32_t       Vmout,
  output logic        oe_float,
  output logic        neu_fire,
  output logic [10:0] pram_addr,
  input  fp32_t       pram_rdata
);

  fp32_t      v_right;
  fp32_t      ext [4];
  fp32_t      regs [8];
  logic [6:0] pc;
  instr_t     instr;
  logic       done, stepping;
  logic       prev_below, now_below;

  assign instr  = soma_program(pc);
  assign ext[0] = FP_ZERO;
  assign ext[1] = v_right;
  assign ext[2] = FP_ZERO;
  assign ext[3] = FP_ZERO;

  np_engine u_eng (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .ext(ext),
    .busy(busy), .done(done), .regs_out(regs), .prog_pc(pc),
    .prog_instr(instr), .pram_addr(pram_addr), .pram_rdata(pram_rdata)
  );

  fp_cmp u_cmp_prev (.a(regs[2]), .b(regs[3]), .lt(prev_below));
  fp_cmp u_cmp_now  (.a(regs[1]), .b(regs[3]), .lt(now_below));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_right  <= FP_ZERO;
      stepping <= 1'b0;
    end else begin
      if (Vm_right_en) v_right <= Vm_right_in;
      if (step && !busy)  stepping <= 1'b1;
      else if (done)      stepping <= 1'b0;
    end
  end

  assign Vmout    = regs[1];
  assign oe_float = done && stepping;
  assign neu_fire = done && stepping && prev_below && !now_below;

endmodule
