// fp_mul: IEEE-754 single-precision multiplier (combinational).
//
// y = a * b. The 24x24-bit mantissa product is normalised by at most one
// place and rounded to nearest, ties to even. Subnormal inputs are read as
// zero and subnormal results are flushed to zero; inf*0 and any NaN give
// the quiet NaN. Multiplication is one of the four operations every
// neuroprocessor needs per time step; the circuit is this design's own.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [24:0] rnd;
  logic        g, st;
  int          e;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && !a_nan;
    b_inf  = (eb == 8'hFF) && !b_nan;

    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      g   = p[23];
      st  = |p[22:0];
      rnd = {1'b0, p[47:24]} + {24'd0, g & (st | p[24])};
      e   = e + 1;
    end else begin
      g   = p[22];
      st  = |p[21:0];
      rnd = {1'b0, p[46:23]} + {24'd0, g & (st | p[23])};
    end
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) y = FP_QNAN;
    else if (a_inf || b_inf)   y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero) y = {s, 31'd0};
    else if (e <= 0)           y = {s, 31'd0};
    else if (e >= 255)         y = {s, 8'hFF, 23'd0};
    else                       y = {s, 8'(e), rnd[22:0]};
  end

endmodule
