// den_pro: dendrite neuroprocessor of the two-compartment Pinsky-Rinzel
// neuron.
//
// Every time step it advances the calcium channel activation s, the
// calcium-dependent potassium activation c, the after-hyperpolarisation
// gate q (indexed by calcium) and the calcium concentration, forms
// psi_Gtot = gCa s^2 + gKAHP q + gKC c chi(Ca) + Syn_psi_Gtot and
// psi = gCa s^2 ECa + (gKAHP q + gKC c chi(Ca)) EK + Syn_psi, with
// chi(Ca) = min(Ca * P_CHI, 1), adds the injected current and the coupling
// to the soma and applies the exponential-Euler membrane step. It runs
// den_program() on an np_engine with its own parameter RAM (port B here).
//
// Interface (names as in the document's block diagram):
//   Vm_left_in/Vm_left_en : soma voltage and its strobe (held).
//   gtol/gEtol, syn_en    : synaptic psi_Gtot and psi from the synapse
//                           neuroprocessor and their strobe (held).
//   Vmout/oe_float        : new dendrite voltage; oe_float pulses for one
//                           clock at the end of each step.
// Values strobed during a step are used from the following step on.
// The equations (5), (6) and (9) follow the document; the calcium update
// and chi(Ca) follow the usual Pinsky-Rinzel form and are this design's.
module den_pro
  import fp_pkg::*;
  import np_prog_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        step,
  output logic        busy,
  input  logic        Vm_left_en,
  input  fp32_t       Vm_left_in,
  input  logic        syn_en,
  input  fp32_t       gtol,
  input  fp32_t       gEtol,
  output fp32_t       Vmout,
  output logic        oe_float,
  output fp32_t       state_out [4],
  output logic [10:0] pram_addr,
  input  fp32_t       pram_rdata
);

  fp32_t      v_left, g_syn, ge_syn;
  fp32_t      ext [4];
  fp32_t      regs [8];
  logic [6:0] pc;
  instr_t     instr;
  logic       done, stepping;

  assign instr  = den_program(pc);
  assign ext[0] = v_left;
  assign ext[1] = FP_ZERO;
  assign ext[2] = g_syn;
  assign ext[3] = ge_syn;

  np_engine u_eng (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .ext(ext),
    .busy(busy), .done(done), .regs_out(regs), .prog_pc(pc),
    .prog_instr(instr), .pram_addr(pram_addr), .pram_rdata(pram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_left   <= FP_ZERO;
      g_syn    <= FP_ZERO;
      ge_syn   <= FP_ZERO;
      stepping <= 1'b0;
    end else begin
      if (Vm_left_en) v_left <= Vm_left_in;
      if (syn_en) begin
        g_syn  <= gtol;
        ge_syn <= gEtol;
      end
      if (step && !busy)  stepping <= 1'b1;
      else if (done)      stepping <= 1'b0;
    end
  end

  assign Vmout    = regs[1];
  assign oe_float = done && stepping;
  always_comb for (int i = 0; i < 4; i++) state_out[i] = regs[4+i];

endmodule
