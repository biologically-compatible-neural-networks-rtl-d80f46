// fp_add: IEEE-754 single-precision adder/subtractor (combinational).
//
// y = a + b, or a - b when sub is 1. The operand of larger magnitude is
// kept, the other is shifted right with a sticky bit, the aligned
// mantissas are added or subtracted, the result is normalised with a
// leading-zero search and rounded to nearest, ties to even. Subnormal
// inputs are read as zero and subnormal results are flushed to zero;
// infinities propagate and any NaN or inf-inf gives the quiet NaN.
// The add/sub operation is part of the FP-ALU of every neuroprocessor;
// its internal structure is this implementation's own.
module fp_add
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [7:0]  d;
  logic [26:0] ml_x, ms_x;   // mantissa, guard, round, sticky
  logic [27:0] sum;
  logic        eff_sub;
  logic [4:0]  lz;
  logic [27:0] norm;
  int          exp_r;
  logic [24:0] rnd;
  logic        swap;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_nan = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 23'd0);

    swap = ({eb, mb} > {ea, ma});
    sl = swap ? sb : sa;
    el = swap ? eb : ea;
    ml = swap ? mb : ma;
    ss = swap ? sa : sb;
    es = swap ? ea : eb;
    ms = swap ? ma : mb;
    eff_sub = sl ^ ss;

    d    = el - es;
    ml_x = {ml, 3'b000};
    if (ms == 24'd0) begin
      ms_x = 27'd0;
    end else if (d >= 8'd27) begin
      ms_x = 27'd1;
    end else begin
      ms_x = {ms, 3'b000} >> d;
      // sticky: any bit shifted out
      if (({ms, 3'b000} & ((27'd1 << d) - 27'd1)) != 27'd0) ms_x[0] = 1'b1;
    end

    sum = eff_sub ? ({1'b0, ml_x} - {1'b0, ms_x}) : ({1'b0, ml_x} + {1'b0, ms_x});

    // leading-zero count over the 28-bit sum
    lz = 5'd0;
    for (int i = 27; i >= 0; i--) begin
      if (sum[i]) begin
        lz = 5'(27 - i);
        break;
      end
    end

    // normalise so that the leading one sits at bit 26
    exp_r = int'(el);
    if (sum[27]) begin
      norm  = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_r = exp_r + 1;
    end else begin
      norm  = sum << (lz - 5'd1);
      exp_r = exp_r - (int'(lz) - 1);
    end

    // round to nearest even: norm[26:3] mantissa, [2] guard, [1:0] sticky
    rnd = {1'b0, norm[26:3]} +
          {24'd0, norm[2] & (|norm[1:0] | norm[3])};
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      exp_r = exp_r + 1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && eff_sub)) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (sum == 28'd0) begin
      y = {sl & ss, 31'd0};
    end else if (exp_r <= 0) begin
      y = {sl, 31'd0};
    end else if (exp_r >= 255) begin
      y = {sl, 8'hFF, 23'd0};
    end else begin
      y = {sl, 8'(exp_r), rnd[22:0]};
    end
  end

endmodule
