// tb_util_pkg: helpers shared by the testbenches.
//
// fp32 <-> real conversion, the piece-wise exponential as the hardware
// tables quantise it (for reference models), and the Pinsky-Rinzel rate
// functions (absolute millivolts, rest near -60 mV) used to fill the
// gating tables of the soma and dendrite parameter RAMs:
//   soma:     m_inf, h, p (= n of the original model)
//   dendrite: s, c (voltage dependent), q (calcium dependent)
// Each gate x gives x_inf = a/(a+b) and k = -dt*(a+b) per table entry,
// entry j standing for V = j - 128 mV (or Ca = j / Q_SCALE for q).
//
// It also builds the parameter-RAM images of the three processors
// (soma_word, den_word, syn_word: standard Pinsky-Rinzel conductances,
// reversal potentials and AMPA/GABA_A/NMDA kinetics) and holds reference
// models of one soma, dendrite and synapse step (soma_ref, den_ref,
// gate_ref, membrane_ref) that repeat the hardware's order of operations
// with every result rounded to single precision. The equations are the
// document's; the constants are the usual ones of the model, not taken
// from it, and the table layout is this design's.
package tb_util_pkg;
  import fp_pkg::*;

  function automatic real fp32_to_real(fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    // double exponent = single exponent - 127 + 1023
    d = {f[31], 11'(int'(f[30:23]) + 896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic real fp(real r);      // round to single precision
    return fp32_to_real(real_to_fp32(r));
  endfunction

  // exp() as the 3-zone 4K table computes it (argument floored per zone)
  function automatic real exp_q(real x);
    real h, x0, xf;
    if (x >= 16.0) x = 16.0 - 1.0 / 128.0;
    if (x < -16.0) x = -16.0;
    if (x >= 0.0)       begin h = 1.0 / 128.0;  x0 = 0.0;   end
    else if (x >= -1.0) begin h = 1.0 / 1024.0; x0 = -1.0;  end
    else                begin h = 1.0 / 64.0;   x0 = -16.0; end
    // floor of (x - x0)/h on the 10-fraction-bit grid the hardware uses
    xf = $floor(x * 1024.0) / 1024.0;
    return fp($exp(x0 + $floor((xf - x0) / h + 1e-9) * h));
  endfunction

  function automatic real vtrap(real x, real y);   // x / (exp(x/y) - 1)
    if ((x / y > -1e-6) && (x / y < 1e-6)) return y * (1.0 - x / y / 2.0);
    return x / ($exp(x / y) - 1.0);
  endfunction

  // Pinsky-Rinzel rate functions; v in absolute mV (shifted by +60)
  function automatic real am(real v); v = v + 60.0; return 0.32 * vtrap(13.1 - v, 4.0); endfunction
  function automatic real bm(real v); v = v + 60.0; return 0.28 * vtrap(v - 40.1, 5.0); endfunction
  function automatic real ah(real v); v = v + 60.0; return 0.128 * $exp((17.0 - v) / 18.0); endfunction
  function automatic real bh(real v); v = v + 60.0; return 4.0 / (1.0 + $exp((40.0 - v) / 5.0)); endfunction
  function automatic real an(real v); v = v + 60.0; return 0.016 * vtrap(35.1 - v, 5.0); endfunction
  function automatic real bn(real v); v = v + 60.0; return 0.25 * $exp(0.5 - 0.025 * v); endfunction
  function automatic real as_(real v); v = v + 60.0; return 1.6 / (1.0 + $exp(-0.072 * (v - 65.0))); endfunction
  function automatic real bs(real v); v = v + 60.0; return 0.02 * vtrap(v - 51.1, 5.0); endfunction
  function automatic real ac(real v);
    v = v + 60.0;
    if (v <= 50.0) return $exp((v - 10.0) / 11.0 - (v - 6.5) / 27.0) / 18.975;
    return 2.0 * $exp((6.5 - v) / 27.0);
  endfunction
  function automatic real bc(real v);
    real a;
    a = ac(v);
    v = v + 60.0;
    if (v <= 50.0) return 2.0 * $exp((6.5 - v) / 27.0) - a;
    return 0.0;
  endfunction
  function automatic real aq(real ca); return (0.00002 * ca < 0.01) ? 0.00002 * ca : 0.01; endfunction
  function automatic real bq(real ca); return 0.001; endfunction

  // ------------------------------------------------------------------
  // Parameter RAM images of the soma and dendrite processors (word map of
  // np_prog_pkg) for a Pinsky-Rinzel cell with p = 0.5, gc = 2.1 mS/cm2.
  typedef struct {
    real ie;      // injected current density of the compartment
    real kl;      // coupling to the left neighbour (gc / p or gc / (1-p))
    real kr;      // coupling to the right neighbour
    real vth;     // spike threshold
    real dt;      // time step (ms)
    real cm;      // membrane capacitance
    real v0;      // initial voltage
  } cmp_cfg_t;

  function automatic real tbl_v(int a);          // voltage of table entry
    return real'(a % 256) - 128.0;
  endfunction

  function automatic fp32_t soma_word(int a, cmp_cfg_t c);
    real v;
    v = tbl_v(a);
    case (a)
      0: return real_to_fp32(30.0);  1: return real_to_fp32(15.0);  2: return real_to_fp32(0.1);
      3: return real_to_fp32(60.0);  4: return real_to_fp32(-75.0); 5: return real_to_fp32(-60.0);
      6: return real_to_fp32(c.ie);  7: return real_to_fp32(c.kl);  8: return real_to_fp32(c.kr);
      9: return real_to_fp32(-c.dt / c.cm);
      10: return real_to_fp32(128.0); 11: return real_to_fp32(c.vth); 12: return real_to_fp32(1.0);
      14: return FP_ONE;
      33, 34: return real_to_fp32(c.v0);
      35: return real_to_fp32(c.vth);
      36: return real_to_fp32(ah(c.v0) / (ah(c.v0) + bh(c.v0)));
      37: return real_to_fp32(an(c.v0) / (an(c.v0) + bn(c.v0)));
      default: ;
    endcase
    if (a >= 256 && a < 256 + 5 * 256) begin
      case ((a - 256) / 256)
        0: return real_to_fp32(am(v) / (am(v) + bm(v)));
        1: return real_to_fp32(ah(v) / (ah(v) + bh(v)));
        2: return real_to_fp32(-c.dt * (ah(v) + bh(v)));
        3: return real_to_fp32(an(v) / (an(v) + bn(v)));
        default: return real_to_fp32(-c.dt * (an(v) + bn(v)));
      endcase
    end
    return FP_ZERO;
  endfunction

  function automatic fp32_t den_word(int a, cmp_cfg_t c);
    real v, ca;
    v  = tbl_v(a);
    ca = real'(a % 256);
    case (a)
      0: return real_to_fp32(10.0);  1: return real_to_fp32(0.8);   2: return real_to_fp32(15.0);
      3: return real_to_fp32(80.0);  4: return real_to_fp32(-75.0);
      6: return real_to_fp32(c.ie);  7: return real_to_fp32(c.kl);  8: return real_to_fp32(c.kr);
      9: return real_to_fp32(-c.dt / c.cm);
      10: return real_to_fp32(128.0); 11: return real_to_fp32(c.vth); 12: return real_to_fp32(1.0);
      13: return real_to_fp32(1.0 / 250.0);
      14: return FP_ONE;
      15: return real_to_fp32(-0.13 * c.dt);
      16: return real_to_fp32(1.0 - 0.075 * c.dt);
      33, 34: return real_to_fp32(c.v0);
      35: return real_to_fp32(c.vth);
      36: return real_to_fp32(as_(c.v0) / (as_(c.v0) + bs(c.v0)));
      37: return real_to_fp32(ac(c.v0) / (ac(c.v0) + bc(c.v0)));
      38: return real_to_fp32(aq(0.2) / (aq(0.2) + bq(0.2)));
      39: return real_to_fp32(0.2);
      default: ;
    endcase
    if (a >= 256 && a < 256 + 6 * 256) begin
      case ((a - 256) / 256)
        0: return real_to_fp32(as_(v) / (as_(v) + bs(v)));
        1: return real_to_fp32(-c.dt * (as_(v) + bs(v)));
        2: return real_to_fp32(ac(v) / (ac(v) + bc(v)));
        3: return real_to_fp32(-c.dt * (ac(v) + bc(v)));
        4: return real_to_fp32(aq(ca) / (aq(ca) + bq(ca)));
        default: return real_to_fp32(-c.dt * (aq(ca) + bq(ca)));
      endcase
    end
    return FP_ZERO;
  endfunction

  // ------------------------------------------------------------------
  // One time step of the compartment programs, each operation rounded to
  // single precision in program order (reference for the processors).
  function automatic real fw(fp32_t w); return fp32_to_real(w); endfunction

  function automatic int tidx(real x);
    if (x < 0.0) return 0;
    if (x >= 255.0) return 255;
    return int'($floor(x));
  endfunction

  function automatic real gate_ref(real x, real inf, real k);
    return fp(inf + fp(fp(x - inf) * exp_q(k)));
  endfunction

  // exponential Euler membrane update, A and B as the programs form them
  function automatic real membrane_ref(real a, real b, real v, real ie, real kl,
                                       real kr, real vl, real vr, real ndtcm);
    real ab, e;
    a  = fp(a + ie);
    a  = fp(a + fp(kl * vl));
    b  = fp(b + kl);
    a  = fp(a + fp(kr * vr));
    b  = fp(b + kr);
    ab = fp(a / b);
    e  = exp_q(fp(b * ndtcm));
    return fp(ab + fp(fp(v - ab) * e));
  endfunction

  // soma: state {V, h, p}; vr = dendrite voltage
  function automatic void soma_ref(cmp_cfg_t c, real vr, inout real v, inout real h, inout real p);
    int  i;
    real m, gna, gk, gl, psig, psi;
    i = tidx(fp(v + 128.0));
    m = fw(soma_word(256 + i, c));
    h = gate_ref(h, fw(soma_word(512 + i, c)), fw(soma_word(768 + i, c)));
    p = gate_ref(p, fw(soma_word(1024 + i, c)), fw(soma_word(1280 + i, c)));
    gna  = fp(fp(fp(m * m) * h) * 30.0);
    gk   = fp(15.0 * p);
    gl   = fp(0.1);
    psig = fp(fp(gna + gk) + gl);
    psi  = fp(fp(fp(gna * 60.0) + fp(gk * -75.0)) + fp(gl * -60.0));
    v = membrane_ref(psi, psig, v, fw(soma_word(6, c)), fw(soma_word(7, c)),
                     fw(soma_word(8, c)), 0.0, vr, fw(soma_word(9, c)));
  endfunction

  // dendrite: state {V, s, c, q, Ca}; vl = soma voltage, g/ge = synapse
  function automatic void den_ref(cmp_cfg_t c, real vl, real g, real ge, inout real v,
                                  inout real s, inout real cc, inout real q, inout real ca);
    int  i, j;
    real chi, gca, gahp, gkc, psig, psi, ica, v_old;
    v_old = v;
    i  = tidx(fp(v + 128.0));
    s  = gate_ref(s, fw(den_word(256 + i, c)), fw(den_word(512 + i, c)));
    cc = gate_ref(cc, fw(den_word(768 + i, c)), fw(den_word(1024 + i, c)));
    j  = tidx(ca);
    q  = gate_ref(q, fw(den_word(1280 + j, c)), fw(den_word(1536 + j, c)));
    chi  = fp(ca * fw(den_word(13, c)));
    if (chi > 1.0) chi = 1.0;
    gca  = fp(fp(s * s) * 10.0);
    gahp = fp(fp(0.8) * q);
    gkc  = fp(fp(15.0 * cc) * chi);
    psig = fp(fp(fp(gca + gahp) + gkc) + g);
    psi  = fp(fp(fp(gca * 80.0) + fp(fp(gahp + gkc) * -75.0)) + ge);
    ica  = fp(fp(v_old - 80.0) * gca);
    ca   = fp(fp(ca * fw(den_word(16, c))) + fp(ica * fw(den_word(15, c))));
    v = membrane_ref(psi, psig, v, fw(den_word(6, c)), fw(den_word(7, c)),
                     fw(den_word(8, c)), vl, 0.0, fw(den_word(9, c)));
  endfunction

  // ------------------------------------------------------------------
  // Synapse parameter RAM image: AMPA, GABA_A, NMDA kinetics (alpha /ms/mM,
  // beta /ms, transmitter 1 mM during Cdur), peak conductances gk,
  // reversal potentials 0, -80, 0 mV, magnesium block with [Mg] = mg mM.
  function automatic fp32_t syn_word(int a, real ga, real gg, real gn, real mg,
                                     real dt, int cdur);
    real al, be, tau, rinf, gm, er;
    int  k;
    if (a == 24) return real_to_fp32(mg / 3.57);
    if (a == 25) return real_to_fp32(-0.062);
    if (a == 26) return FP_ONE;
    if (a >= 24) return FP_ZERO;
    k = a / 8;
    case (k)
      0: begin al = 1.1;   be = 0.19;   gm = ga; er = 0.0;   end
      1: begin al = 5.0;   be = 0.18;   gm = gg; er = -80.0; end
      default: begin al = 0.072; be = 0.0066; gm = gn; er = 0.0; end
    endcase
    tau  = 1.0 / (al + be);
    rinf = al * tau;
    case (a % 8)
      0: return real_to_fp32($exp(-dt / tau));
      1: return real_to_fp32(rinf * (1.0 - $exp(-dt / tau)));
      2: return real_to_fp32($exp(-be * dt));
      3: return real_to_fp32($exp(-cdur * dt / tau));
      4: return real_to_fp32(rinf * (1.0 - $exp(-cdur * dt / tau)));
      5: return real_to_fp32(-be * dt);
      6: return real_to_fp32(gm);
      default: return real_to_fp32(er);
    endcase
  endfunction

endpackage
