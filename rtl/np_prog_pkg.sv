// np_prog_pkg: parameter-RAM map and time-step programs of the soma and
// dendrite neuroprocessors.
//
// Both compartments solve C_m dV/dt = A - B*V with the exponential-Euler
// step V' = A/B + (V - A/B) * exp(-B*dt/C_m), where
//   A = psi + I_e + K_L*V_left + K_R*V_right,  B = psi_Gtot + K_L + K_R,
// and each gating variable x is advanced the same way,
//   x' = x_inf + (x - x_inf) * exp(-dt/tau_x).
// x_inf and -dt/tau_x come from 256-entry tables in the parameter RAM,
// indexed by floor(V + V_OFF) (1 mV per entry) or, for the dendrite's q
// gate, by floor(Ca * Q_SCALE). With K_L = K_R = a/(2 r_a dx^2) the
// coupling terms are those of the cable equation; a compartment with one
// neighbour sets the other K to zero.
//
// Register convention of the sequencer: R1 membrane voltage, R2 voltage of
// the previous step, R3 firing threshold, R4-R7 gating/calcium state,
// R8-R27 temporaries, R28 V_left, R29 V_right, R30 synaptic psi_Gtot,
// R31 synaptic psi (R28-R31 are sampled when a step starts).
// The membrane and ionic-current equations follow the document; the table
// representation of the rate functions, the register layout and the
// calcium update Ca' = Ca*CA_DECAY + CA_GAIN*I_Ca are this design's own.
package np_prog_pkg;
  import fp_pkg::*;

  localparam int TBL_LEN  = 256;
  localparam int PRAM_DEPTH = 2048;

  // parameter RAM words common to both compartments
  localparam int P_G1      = 0;   // soma gNa   | dendrite gCa
  localparam int P_G2      = 1;   // soma gKDR  | dendrite gKAHP
  localparam int P_G3      = 2;   // soma gLeak | dendrite gKC
  localparam int P_E1      = 3;   // soma ENa   | dendrite ECa
  localparam int P_E2      = 4;   // EK
  localparam int P_E3      = 5;   // soma ELeak
  localparam int P_IE      = 6;   // injected current density
  localparam int P_KL      = 7;   // coupling to the left neighbour
  localparam int P_KR      = 8;   // coupling to the right neighbour
  localparam int P_NDTCM   = 9;   // -dt / C_m
  localparam int P_VOFF    = 10;  // table offset added to V (mV)
  localparam int P_VTH     = 11;  // spike threshold (soma)
  localparam int P_QSCALE  = 12;  // dendrite: q-table index per unit Ca
  localparam int P_CHI     = 13;  // dendrite: chi(Ca) = min(Ca*P_CHI, 1)
  localparam int P_ONE     = 14;  // the constant 1.0
  localparam int P_CAGAIN  = 15;  // dendrite: Ca increment per unit I_Ca
  localparam int P_CADECAY = 16;  // dendrite: Ca decay factor per step
  localparam int INIT_BASE = 32;  // R0..R7 initial values at 32..39
  localparam int T_BASE    = 256; // table k starts at T_BASE + k*TBL_LEN

  function automatic int tbl(int k);
    return T_BASE + k * TBL_LEN;
  endfunction

  // Soma: m taken at m_inf; gates h (tables 1, 2) and p (3, 4); R4 = h, R5 = p.
  function automatic instr_t soma_program(logic [6:0] pc);
    case (pc)
      7'd0: return mk(OP_MAX, 2, 1, 1, 0);  // V_prev
      7'd1: return mk(OP_LDP, 3, 0, 0, P_VTH);
      7'd2: return mk(OP_LDP, 8, 0, 0, P_VOFF);
      7'd3: return mk(OP_ADD, 8, 1, 8, 0);  // table index
      7'd4: return mk(OP_LDT, 11, 8, 0, tbl(0));  // m_inf
      7'd5: return mk(OP_LDT, 9, 8, 0, tbl(1));
      7'd6: return mk(OP_LDT, 10, 8, 0, tbl(2));
      7'd7: return mk(OP_EXP, 10, 10, 0, 0);
      7'd8: return mk(OP_SUB, 14, 4, 9, 0);
      7'd9: return mk(OP_MUL, 14, 14, 10, 0);
      7'd10: return mk(OP_ADD, 4, 9, 14, 0);
      7'd11: return mk(OP_LDT, 9, 8, 0, tbl(3));
      7'd12: return mk(OP_LDT, 10, 8, 0, tbl(4));
      7'd13: return mk(OP_EXP, 10, 10, 0, 0);
      7'd14: return mk(OP_SUB, 14, 5, 9, 0);
      7'd15: return mk(OP_MUL, 14, 14, 10, 0);
      7'd16: return mk(OP_ADD, 5, 9, 14, 0);
      7'd17: return mk(OP_MUL, 15, 11, 11, 0);
      7'd18: return mk(OP_MUL, 15, 15, 4, 0);
      7'd19: return mk(OP_LDP, 16, 0, 0, P_G1);
      7'd20: return mk(OP_MUL, 15, 15, 16, 0);  // gNa m^2 h
      7'd21: return mk(OP_LDP, 16, 0, 0, P_G2);
      7'd22: return mk(OP_MUL, 17, 16, 5, 0);  // gKDR p
      7'd23: return mk(OP_LDP, 18, 0, 0, P_G3);  // gLeak
      7'd24: return mk(OP_ADD, 19, 15, 17, 0);
      7'd25: return mk(OP_ADD, 19, 19, 18, 0);  // psi_Gtot, eq. (3)
      7'd26: return mk(OP_LDP, 16, 0, 0, P_E1);
      7'd27: return mk(OP_MUL, 20, 15, 16, 0);
      7'd28: return mk(OP_LDP, 16, 0, 0, P_E2);
      7'd29: return mk(OP_MUL, 21, 17, 16, 0);
      7'd30: return mk(OP_ADD, 20, 20, 21, 0);
      7'd31: return mk(OP_LDP, 16, 0, 0, P_E3);
      7'd32: return mk(OP_MUL, 21, 18, 16, 0);
      7'd33: return mk(OP_ADD, 20, 20, 21, 0);  // psi, eq. (4)
      7'd34: return mk(OP_LDP, 16, 0, 0, P_IE);
      7'd35: return mk(OP_ADD, 20, 20, 16, 0);
      7'd36: return mk(OP_LDP, 16, 0, 0, P_KL);
      7'd37: return mk(OP_MUL, 21, 16, 28, 0);
      7'd38: return mk(OP_ADD, 20, 20, 21, 0);
      7'd39: return mk(OP_ADD, 19, 19, 16, 0);
      7'd40: return mk(OP_LDP, 16, 0, 0, P_KR);
      7'd41: return mk(OP_MUL, 21, 16, 29, 0);
      7'd42: return mk(OP_ADD, 20, 20, 21, 0);  // A
      7'd43: return mk(OP_ADD, 19, 19, 16, 0);  // B
      7'd44: return mk(OP_DIV, 22, 20, 19, 0);  // A/B
      7'd45: return mk(OP_LDP, 16, 0, 0, P_NDTCM);
      7'd46: return mk(OP_MUL, 23, 19, 16, 0);
      7'd47: return mk(OP_EXP, 23, 23, 0, 0);  // exp(-B dt/Cm)
      7'd48: return mk(OP_SUB, 24, 1, 22, 0);
      7'd49: return mk(OP_MUL, 24, 24, 23, 0);
      7'd50: return mk(OP_ADD, 1, 22, 24, 0);  // V(n+1), eq. (9)
      7'd51: return mk(OP_END, 0, 0, 0, 0);
      default: return mk(OP_END, 0, 0, 0, 0);
    endcase
  endfunction

  // Dendrite: gates s (tables 0, 1), c (2, 3) and q (4, 5, indexed by Ca);
  // R4 = s, R5 = c, R6 = q, R7 = Ca.
  function automatic instr_t den_program(logic [6:0] pc);
    case (pc)
      7'd0: return mk(OP_MAX, 2, 1, 1, 0);  // V_prev
      7'd1: return mk(OP_LDP, 3, 0, 0, P_VTH);
      7'd2: return mk(OP_LDP, 8, 0, 0, P_VOFF);
      7'd3: return mk(OP_ADD, 8, 1, 8, 0);  // table index
      7'd4: return mk(OP_LDT, 9, 8, 0, tbl(0));
      7'd5: return mk(OP_LDT, 10, 8, 0, tbl(1));
      7'd6: return mk(OP_EXP, 10, 10, 0, 0);
      7'd7: return mk(OP_SUB, 14, 4, 9, 0);
      7'd8: return mk(OP_MUL, 14, 14, 10, 0);
      7'd9: return mk(OP_ADD, 4, 9, 14, 0);
      7'd10: return mk(OP_LDT, 9, 8, 0, tbl(2));
      7'd11: return mk(OP_LDT, 10, 8, 0, tbl(3));
      7'd12: return mk(OP_EXP, 10, 10, 0, 0);
      7'd13: return mk(OP_SUB, 14, 5, 9, 0);
      7'd14: return mk(OP_MUL, 14, 14, 10, 0);
      7'd15: return mk(OP_ADD, 5, 9, 14, 0);
      7'd16: return mk(OP_LDP, 8, 0, 0, P_QSCALE);
      7'd17: return mk(OP_MUL, 8, 7, 8, 0);  // q-table index
      7'd18: return mk(OP_LDT, 9, 8, 0, tbl(4));
      7'd19: return mk(OP_LDT, 10, 8, 0, tbl(5));
      7'd20: return mk(OP_EXP, 10, 10, 0, 0);
      7'd21: return mk(OP_SUB, 14, 6, 9, 0);
      7'd22: return mk(OP_MUL, 14, 14, 10, 0);
      7'd23: return mk(OP_ADD, 6, 9, 14, 0);
      7'd24: return mk(OP_LDP, 16, 0, 0, P_CHI);
      7'd25: return mk(OP_MUL, 11, 7, 16, 0);
      7'd26: return mk(OP_LDP, 16, 0, 0, P_ONE);
      7'd27: return mk(OP_MIN, 11, 11, 16, 0);  // chi(Ca)
      7'd28: return mk(OP_MUL, 15, 4, 4, 0);
      7'd29: return mk(OP_LDP, 16, 0, 0, P_G1);
      7'd30: return mk(OP_MUL, 15, 15, 16, 0);  // gCa s^2
      7'd31: return mk(OP_LDP, 16, 0, 0, P_G2);
      7'd32: return mk(OP_MUL, 17, 16, 6, 0);  // gKAHP q
      7'd33: return mk(OP_LDP, 16, 0, 0, P_G3);
      7'd34: return mk(OP_MUL, 18, 16, 5, 0);
      7'd35: return mk(OP_MUL, 18, 18, 11, 0);  // gKC c chi
      7'd36: return mk(OP_ADD, 19, 15, 17, 0);
      7'd37: return mk(OP_ADD, 19, 19, 18, 0);
      7'd38: return mk(OP_ADD, 19, 19, 30, 0);  // psi_Gtot, eq. (5)
      7'd39: return mk(OP_LDP, 16, 0, 0, P_E1);
      7'd40: return mk(OP_MUL, 20, 15, 16, 0);
      7'd41: return mk(OP_LDP, 16, 0, 0, P_E2);
      7'd42: return mk(OP_ADD, 21, 17, 18, 0);
      7'd43: return mk(OP_MUL, 21, 21, 16, 0);
      7'd44: return mk(OP_ADD, 20, 20, 21, 0);
      7'd45: return mk(OP_ADD, 20, 20, 31, 0);  // psi, eq. (6)
      7'd46: return mk(OP_LDP, 16, 0, 0, P_E1);
      7'd47: return mk(OP_SUB, 21, 1, 16, 0);
      7'd48: return mk(OP_MUL, 21, 21, 15, 0);  // I_Ca
      7'd49: return mk(OP_LDP, 16, 0, 0, P_CAGAIN);
      7'd50: return mk(OP_MUL, 21, 21, 16, 0);
      7'd51: return mk(OP_LDP, 16, 0, 0, P_CADECAY);
      7'd52: return mk(OP_MUL, 24, 7, 16, 0);
      7'd53: return mk(OP_ADD, 7, 24, 21, 0);  // Ca(n+1)
      7'd54: return mk(OP_LDP, 16, 0, 0, P_IE);
      7'd55: return mk(OP_ADD, 20, 20, 16, 0);
      7'd56: return mk(OP_LDP, 16, 0, 0, P_KL);
      7'd57: return mk(OP_MUL, 21, 16, 28, 0);
      7'd58: return mk(OP_ADD, 20, 20, 21, 0);
      7'd59: return mk(OP_ADD, 19, 19, 16, 0);
      7'd60: return mk(OP_LDP, 16, 0, 0, P_KR);
      7'd61: return mk(OP_MUL, 21, 16, 29, 0);
      7'd62: return mk(OP_ADD, 20, 20, 21, 0);  // A
      7'd63: return mk(OP_ADD, 19, 19, 16, 0);  // B
      7'd64: return mk(OP_DIV, 22, 20, 19, 0);  // A/B
      7'd65: return mk(OP_LDP, 16, 0, 0, P_NDTCM);
      7'd66: return mk(OP_MUL, 23, 19, 16, 0);
      7'd67: return mk(OP_EXP, 23, 23, 0, 0);  // exp(-B dt/Cm)
      7'd68: return mk(OP_SUB, 24, 1, 22, 0);
      7'd69: return mk(OP_MUL, 24, 24, 23, 0);
      7'd70: return mk(OP_ADD, 1, 22, 24, 0);  // V(n+1), eq. (9)
      7'd71: return mk(OP_END, 0, 0, 0, 0);
      default: return mk(OP_END, 0, 0, 0, 0);
    endcase
  endfunction

endpackage
