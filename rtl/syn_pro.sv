// syn_pro: synapse neuroprocessor with hybrid time-event-driven integration.
//
// All incoming synapses of one receptor type (k = 0 AMPA, 1 GABA_A,
// 2 NMDA) are lumped into three numbers: R_on (sum of weighted r of the
// synapses whose transmitter pulse is on), R_off (the same for the
// synapses that are off) and N_on (sum of the weights g_i of the on
// synapses). Every time step, for each type:
//   NC : R_on = N_on * Rinf(1 - e^-dt/tau) + R_on * e^-dt/tau
//        R_off = R_off * e^-beta dt                 (no exponential needed)
// then, for each synapse i whose pulse ended this step (FE),
//        r'_i = g_i * Rinf(1 - e^-Cdur/tau) + r'_i * e^-Cdur/tau
//        R_on -= r'_i, R_off += r'_i, N_on -= g_i, t_off_i = t
// and for each synapse whose pulse started (RE),
//        r'_i = r'_i * exp(-beta * (t - t_off_i))   (one exponential)
//        R_off -= r'_i, R_on += r'_i, N_on += g_i.
// Finally r = R_on + R_off per type, B(V) = 1 / (1 + kMg * exp(slope*V)),
//   gtol_syn  = g_ampa r0 + g_gaba r1 + g_nmda r2 B(V)           (eq. 7)
//   gEtol_syn = g_ampa r0 E_ampa + g_gaba r1 E_gaba + g_nmda r2 B E_nmda
// are driven with a one-clock syn_oe pulse.
//
// Memories (port B of three dual-port RAMs, one-clock read latency):
//   pram  : per type k at 8k: +0 e^-dt/tau, +1 Rinf(1-e^-dt/tau),
//           +2 e^-beta dt, +3 e^-Cdur/tau, +4 Rinf(1-e^-Cdur/tau),
//           +5 -beta*dt, +6 g_max, +7 E_rev; 24 kMg = [Mg]/3.57,
//           25 slope (-0.062 /mV), 26 the constant 1.0
//   conex : synapse i at 2i: weight g_i, 2i+1: type (0-2, 3 = unused)
//   synmem: synapse i at 2i: r'_i, 2i+1: t_off_i (time step number)
// Vm_den/den_en give the dendrite voltage for the NMDA magnesium block;
// the value held when a step starts is the one that step uses.
// init clears R_on, R_off and N_on, and then writes zero to r'_i and
// t_off_i of every synapse (2*N_SYN clocks, busy stays high). spike_in are the presynaptic spike
// pulses, sampled at step. A step takes about 110 clocks plus about 20
// per falling and 30 per rising synapse.
// The lumped update rules, the event classes and the input/output names
// follow the document; the memory layouts, the sequencing and the form of
// B(V) (the common Jahr-Stevens expression) are this design's choices.
module syn_pro
  import fp_pkg::*;
#(
  parameter int N_SYN = 9,
  parameter int SAW   = $clog2(2 * N_SYN)   // conex / synmem address width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             step,
  input  logic [7:0]       cdur_steps,
  input  logic [N_SYN-1:0] spike_in,
  input  logic             den_en,
  input  fp32_t            Vm_den,
  output logic             busy,
  output logic             syn_oe,
  output fp32_t            gtol_syn,
  output fp32_t            gEtol_syn,
  output fp32_t            r_total [3],
  // event statistics
  output logic [31:0]      re_cnt,
  output logic [31:0]      fe_cnt,
  output logic [31:0]      both_cnt,
  output logic [31:0]      nc_cnt,
  output logic [31:0]      exp_cnt,
  // memories
  output logic [4:0]       pram_addr,
  input  fp32_t            pram_rdata,
  output logic [SAW-1:0]   conex_addr,
  input  fp32_t            conex_rdata,
  output logic [SAW-1:0]   smem_addr,
  output logic             smem_we,
  output fp32_t            smem_wdata,
  input  fp32_t            smem_rdata
);

  // ---------------------------------------------------------------- micro-ops
  typedef enum logic [3:0] {
    U_END, U_ALU, U_LDP, U_LDG, U_LDC, U_LDS, U_STS, U_STT, U_CVT, U_TYP
  } ukind_e;

  typedef struct packed {
    ukind_e     kind;
    fop_e       fop;
    logic [4:0] d, a, b;
    logic       dk, ak, bk;   // add the current type k to the register index
    logic [4:0] imm;
  } uop_t;


  // register file indices
  localparam int RON = 16, ROFF = 19, NON = 22, VDEN = 25;

  function automatic uop_t u(ukind_e kd, fop_e f, int d, int a, int b,
                             bit dk, bit ak, bit bk, int imm);
    uop_t x;
    x.kind = kd; x.fop = f;
    x.d = 5'(d); x.a = 5'(a); x.b = 5'(b);
    x.dk = dk; x.ak = ak; x.bk = bk;
    x.imm = 5'(imm);
    return x;
  endfunction

  function automatic uop_t alu(fop_e f, int d, int a, int b, bit dk, bit ak, bit bk);
    return u(U_ALU, f, d, a, b, dk, ak, bk, 0);
  endfunction

  function automatic uop_t ld(ukind_e kd, int d, int imm);
    return u(kd, FOP_ADD, d, 0, 0, 0, 0, 0, imm);
  endfunction

  // NC process for type k
  function automatic uop_t prog_nc(logic [5:0] pc);
    case (pc)
      6'd0: return ld(U_LDP, 0, 0);                       // e^-dt/tau
      6'd1: return ld(U_LDP, 1, 1);                       // Rinf(1-e^-dt/tau)
      6'd2: return ld(U_LDP, 2, 2);                       // e^-beta dt
      6'd3: return alu(FOP_MUL, 3, NON, 1, 0, 1, 0);
      6'd4: return alu(FOP_MUL, 4, RON, 0, 0, 1, 0);
      6'd5: return alu(FOP_ADD, RON, 3, 4, 1, 0, 0);      // eq. (9)
      6'd6: return alu(FOP_MUL, ROFF, ROFF, 2, 1, 1, 0);  // eq. (10)
      default: return u(U_END, FOP_ADD, 0, 0, 0, 0, 0, 0, 0);
    endcase
  endfunction

  // FE process for synapse i (on -> off)
  function automatic uop_t prog_fall(logic [5:0] pc);
    case (pc)
      6'd0: return ld(U_LDC, 6, 1);
      6'd1: return u(U_TYP, FOP_ADD, 0, 6, 0, 0, 0, 0, 0);
      6'd2: return ld(U_LDC, 5, 0);                       // g_i
      6'd3: return ld(U_LDS, 7, 0);                       // r'_i
      6'd4: return ld(U_LDP, 0, 3);                       // e^-Cdur/tau
      6'd5: return ld(U_LDP, 1, 4);                       // Rinf(1-e^-Cdur/tau)
      6'd6: return alu(FOP_MUL, 3, 5, 1, 0, 0, 0);
      6'd7: return alu(FOP_MUL, 4, 7, 0, 0, 0, 0);
      6'd8: return alu(FOP_ADD, 7, 3, 4, 0, 0, 0);        // eq. (12)
      6'd9: return alu(FOP_SUB, RON, RON, 7, 1, 1, 0);
      6'd10: return alu(FOP_ADD, ROFF, ROFF, 7, 1, 1, 0);
      6'd11: return alu(FOP_SUB, NON, NON, 5, 1, 1, 0);
      6'd12: return u(U_STS, FOP_ADD, 0, 7, 0, 0, 0, 0, 0);
      6'd13: return u(U_STT, FOP_ADD, 0, 0, 0, 0, 0, 0, 1);
      default: return u(U_END, FOP_ADD, 0, 0, 0, 0, 0, 0, 0);
    endcase
  endfunction

  // RE process for synapse i (off -> on)
  function automatic uop_t prog_rise(logic [5:0] pc);
    case (pc)
      6'd0: return ld(U_LDC, 6, 1);
      6'd1: return u(U_TYP, FOP_ADD, 0, 6, 0, 0, 0, 0, 0);
      6'd2: return ld(U_LDC, 5, 0);
      6'd3: return ld(U_LDS, 7, 0);
      6'd4: return ld(U_LDS, 8, 1);                       // t_off_i
      6'd5: return u(U_CVT, FOP_ADD, 9, 8, 0, 0, 0, 0, 0); // ISI in steps
      6'd6: return ld(U_LDP, 0, 5);                       // -beta dt
      6'd7: return alu(FOP_MUL, 9, 9, 0, 0, 0, 0);
      6'd8: return alu(FOP_EXP, 9, 9, 0, 0, 0, 0);
      6'd9: return alu(FOP_MUL, 7, 7, 9, 0, 0, 0);        // eq. (13)
      6'd10: return alu(FOP_SUB, ROFF, ROFF, 7, 1, 1, 0);
      6'd11: return alu(FOP_ADD, RON, RON, 7, 1, 1, 0);
      6'd12: return alu(FOP_ADD, NON, NON, 5, 1, 1, 0);
      6'd13: return u(U_STS, FOP_ADD, 0, 7, 0, 0, 0, 0, 0);
      default: return u(U_END, FOP_ADD, 0, 0, 0, 0, 0, 0, 0);
    endcase
  endfunction

  // output stage
  function automatic uop_t prog_out(logic [5:0] pc);
    case (pc)
      6'd0: return alu(FOP_ADD, 10, RON + 0, ROFF + 0, 0, 0, 0);  // r
      6'd1: return alu(FOP_ADD, 11, RON + 1, ROFF + 1, 0, 0, 0);  // u
      6'd2: return alu(FOP_ADD, 12, RON + 2, ROFF + 2, 0, 0, 0);  // z
      6'd3: return ld(U_LDG, 0, 25);
      6'd4: return alu(FOP_MUL, 1, 0, VDEN, 0, 0, 0);
      6'd5: return alu(FOP_EXP, 1, 1, 0, 0, 0, 0);
      6'd6: return ld(U_LDG, 0, 24);
      6'd7: return alu(FOP_MUL, 1, 1, 0, 0, 0, 0);
      6'd8: return ld(U_LDG, 2, 26);
      6'd9: return alu(FOP_ADD, 1, 1, 2, 0, 0, 0);
      6'd10: return alu(FOP_DIV, 13, 2, 1, 0, 0, 0);               // B(V)
      6'd11: return alu(FOP_MUL, 3, 12, 13, 0, 0, 0);              // z B(V)
      6'd12: return ld(U_LDG, 0, 6);
      6'd13: return alu(FOP_MUL, 4, 10, 0, 0, 0, 0);
      6'd14: return ld(U_LDG, 0, 14);
      6'd15: return alu(FOP_MUL, 5, 11, 0, 0, 0, 0);
      6'd16: return ld(U_LDG, 0, 22);
      6'd17: return alu(FOP_MUL, 6, 3, 0, 0, 0, 0);
      6'd18: return alu(FOP_ADD, 14, 4, 5, 0, 0, 0);
      6'd19: return alu(FOP_ADD, 14, 14, 6, 0, 0, 0);              // eq. (7)
      6'd20: return ld(U_LDG, 0, 7);
      6'd21: return alu(FOP_MUL, 4, 4, 0, 0, 0, 0);
      6'd22: return ld(U_LDG, 0, 15);
      6'd23: return alu(FOP_MUL, 5, 5, 0, 0, 0, 0);
      6'd24: return ld(U_LDG, 0, 23);
      6'd25: return alu(FOP_MUL, 6, 6, 0, 0, 0, 0);
      6'd26: return alu(FOP_ADD, 15, 4, 5, 0, 0, 0);
      6'd27: return alu(FOP_ADD, 15, 15, 6, 0, 0, 0);              // eq. (8)
      default: return u(U_END, FOP_ADD, 0, 0, 0, 0, 0, 0, 0);
    endcase
  endfunction


  // ---------------------------------------------------------------- datapath
  typedef enum logic [1:0] {PH_NC, PH_FALL, PH_RISE, PH_OUT} phase_e;
  typedef enum logic [2:0] {S_IDLE, S_DET, S_ISSUE, S_MEM, S_ALU, S_NEXT, S_CLR} sstate_e;
  logic [SAW-1:0] clr_a;           // state RAM word being cleared by init

  sstate_e st;
  phase_e  ph;
  logic [5:0] pcu;
  logic [1:0] k;
  logic [$clog2(N_SYN+1)-1:0] syn_i;
  fp32_t   RF [32];
  logic [31:0] t_now;
  logic [N_SYN-1:0] pend_rise, pend_fall;
  uop_t    cur, ir;
  fp32_t   vden_q;

  logic             evt_valid;
  logic [N_SYN-1:0] rise, fall;
  logic [1:0]       evt_class;

  syn_event_det #(.N_SYN(N_SYN)) u_det (
    .clk(clk), .rst_n(rst_n), .tick(step && st == S_IDLE), .spike_in(spike_in),
    .cdur_steps(cdur_steps), .evt_valid(evt_valid), .rise(rise), .fall(fall),
    .evt_class(evt_class), .re_cnt(re_cnt), .fe_cnt(fe_cnt),
    .both_cnt(both_cnt), .nc_cnt(nc_cnt)
  );

  always_comb begin
    case (ph)
      PH_NC:   cur = prog_nc(pcu);
      PH_FALL: cur = prog_fall(pcu);
      PH_RISE: cur = prog_rise(pcu);
      default: cur = prog_out(pcu);
    endcase
  end

  function automatic logic [4:0] ridx(logic [4:0] r, logic kr, logic [1:0] kk);
    return kr ? r + 5'(kk) : r;
  endfunction

  logic  alu_start, alu_busy, alu_done;
  fp32_t alu_y;

  fp_alu u_alu (
    .clk(clk), .rst_n(rst_n), .start(alu_start), .op(ir.fop),
    .a(RF[ridx(ir.a, ir.ak, k)]), .b(RF[ridx(ir.b, ir.bk, k)]),
    .busy(alu_busy), .done(alu_done), .y(alu_y)
  );

  // memory addresses, presented in S_ISSUE
  always_comb begin
    pram_addr  = (cur.kind == U_LDG) ? cur.imm : 5'(8 * k) + cur.imm;
    conex_addr = SAW'(2 * syn_i) + SAW'(cur.imm);
    smem_addr  = SAW'(2 * syn_i) + SAW'(cur.imm);
    smem_we    = (st == S_ISSUE) && (cur.kind == U_STS || cur.kind == U_STT);
    smem_wdata = (cur.kind == U_STT) ? t_now : RF[cur.a];
    if (st == S_CLR) begin
      smem_addr  = clr_a;
      smem_we    = 1'b1;
      smem_wdata = FP_ZERO;
    end
  end

  function automatic int first_one(logic [N_SYN-1:0] v);
    for (int i = 0; i < N_SYN; i++) if (v[i]) return i;
    return 0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ph        <= PH_NC;
      pcu       <= '0;
      k         <= '0;
      syn_i     <= '0;
      t_now     <= '0;
      pend_rise <= '0;
      pend_fall <= '0;
      ir        <= '0;
      alu_start <= 1'b0;
      syn_oe    <= 1'b0;
      vden_q    <= FP_ZERO;
      clr_a     <= '0;
      exp_cnt   <= '0;
      for (int i = 0; i < 32; i++) RF[i] <= FP_ZERO;
      gtol_syn  <= FP_ZERO;
      gEtol_syn <= FP_ZERO;
      for (int t = 0; t < 3; t++) r_total[t] <= FP_ZERO;
    end else begin
      alu_start <= 1'b0;
      syn_oe    <= 1'b0;
      case (st)
        S_IDLE: begin
          if (init) begin
            for (int i = 0; i < 32; i++) RF[i] <= FP_ZERO;
            t_now <= '0;
            clr_a <= '0;
            st    <= S_CLR;
          end else if (step) begin
            RF[VDEN] <= den_en ? Vm_den : vden_q;
            t_now <= t_now + 32'd1;
            st    <= S_DET;
          end
        end
        S_CLR: begin                      // r'_i = 0, t_off_i = 0
          clr_a <= clr_a + SAW'(1);
          if (clr_a == SAW'(2 * N_SYN - 1)) st <= S_IDLE;
        end
        S_DET: if (evt_valid) begin
          pend_rise <= rise;
          pend_fall <= fall;
          ph  <= PH_NC;
          k   <= 2'd0;
          pcu <= '0;
          st  <= S_ISSUE;
        end
        S_ISSUE: begin
          ir <= cur;
          case (cur.kind)
            U_END: st <= S_NEXT;
            U_ALU: begin
              alu_start <= 1'b1;
              if (cur.fop == FOP_EXP && ph == PH_RISE) exp_cnt <= exp_cnt + 32'd1;
              st <= S_ALU;
            end
            U_LDP, U_LDG, U_LDC, U_LDS: st <= S_MEM;
            U_STS, U_STT: pcu <= pcu + 6'd1;
            U_CVT: begin
              RF[cur.d] <= u32_to_fp32(t_now - RF[cur.a]);
              pcu <= pcu + 6'd1;
            end
            U_TYP: begin
              if (RF[cur.a][1:0] == 2'd3) st <= S_NEXT;   // unused synapse
              else begin
                k   <= RF[cur.a][1:0];
                pcu <= pcu + 6'd1;
              end
            end
            default: st <= S_NEXT;
          endcase
        end
        S_MEM: begin
          case (ir.kind)
            U_LDP, U_LDG: RF[ir.d] <= pram_rdata;
            U_LDC:        RF[ir.d] <= conex_rdata;
            default:      RF[ir.d] <= smem_rdata;
          endcase
          pcu <= pcu + 6'd1;
          st  <= S_ISSUE;
        end
        S_ALU: if (alu_done) begin
          RF[ridx(ir.d, ir.dk, k)] <= alu_y;
          pcu <= pcu + 6'd1;
          st  <= S_ISSUE;
        end
        S_NEXT: begin
          // choose the next phase: NC for k = 0..2, then falls, rises, output
          pcu <= '0;
          st  <= S_ISSUE;
          if (ph == PH_NC && k != 2'd2) begin
            k <= k + 2'd1;
          end else if (ph == PH_OUT) begin
            gtol_syn  <= RF[14];
            gEtol_syn <= RF[15];
            for (int t = 0; t < 3; t++) r_total[t] <= RF[10 + t];
            syn_oe <= 1'b1;
            st     <= S_IDLE;
          end else if (ph == PH_NC || ph == PH_FALL || ph == PH_RISE) begin
            logic [N_SYN-1:0] pf, pr;
            pf = pend_fall;
            pr = pend_rise;
            if (ph == PH_FALL) pf[syn_i] = 1'b0;
            if (ph == PH_RISE) pr[syn_i] = 1'b0;
            pend_fall <= pf;
            pend_rise <= pr;
            if (pf != '0) begin
              ph    <= PH_FALL;
              syn_i <= $bits(syn_i)'(first_one(pf));
            end else if (pr != '0) begin
              ph    <= PH_RISE;
              syn_i <= $bits(syn_i)'(first_one(pr));
            end else begin
              ph <= PH_OUT;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
      // the latest dendrite voltage; a step uses the value held at its start
      if (den_en) vden_q <= Vm_den;
    end
  end

  assign busy = (st != S_IDLE);

endmodule
