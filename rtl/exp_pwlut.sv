// exp_pwlut: piece-wise look-up-table exponential, y = exp(x), FP32 in/out.
//
// The argument range [-16, 16] is split into three zones, each with its own
// step, sharing one 4K-entry ROM:
//   [0, 16)   step 1/128  (7.8e-3)  2048 entries, ROM 0    .. 2047
//   [-1, 0)   step 1/1024 (9.8e-4)  1024 entries, ROM 2048 .. 3071
//   [-16, -1) step 1/64   (1.6e-2)   960 entries, ROM 3072 .. 4031
// The fine zone around [-1, 0] is where the exponential-Euler updates spend
// most of their arguments. Arguments outside [-16, 16) are clamped, so the
// output lies in [exp(-16), exp(16 - 1/128)] = [1.1e-7, 8.8e6]. Each entry
// holds exp() of the lower end of its interval (the argument is floored).
//
// Pipeline: stage 1 turns x into a signed fixed-point number with 10
// fraction bits and forms the ROM index, stage 2 reads the ROM, stage 3
// registers the result: valid_out rises 3 clock edges after valid_in is sampled, one new
// argument may enter every clock.
// The zone boundaries, the 4K depth, the [-16, 16] range and the latency of
// 3 follow the document; the exact steps (powers of two closest to the
// printed resolutions) and the floor indexing are choices of this design.
// The ROM contents are computed at elaboration: entry k of a zone with
// start x0 and step h is the single-precision value of exp(x0 + k*h).
module exp_pwlut
  import fp_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  fp32_t x,
  output logic  valid_out,
  output fp32_t y
);

  localparam int AW = $clog2(DEPTH);

  fp32_t rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      real xv;
      if (k < 2048)      xv = real'(k) / 128.0;
      else if (k < 3072) xv = -1.0 + real'(k - 2048) / 1024.0;
      else if (k < 4032) xv = -16.0 + real'(k - 3072) / 64.0;
      else               xv = -16.0;
      rom[k] = real_to_fp32($exp(xv));
    end
  end

  // ---- stage 1: argument to fixed point (Q5.10, sign separate) and index
  logic [7:0]  e;
  logic [23:0] m;
  logic [15:0] mag;      // |x| * 1024, ceiling for negative x
  logic        neg;
  logic [AW-1:0] idx_c;

  always_comb begin
    logic [47:0] wide;
    int          sh;
    wide  = '0;
    sh    = 0;
    idx_c = '0;
    e     = x[30:23];
    m     = {1'b1, x[22:0]};
    neg  = x[31];
    mag  = 16'd0;
    if (e == 8'd0) begin
      mag = 16'd0;
    end else if (e >= 8'd131) begin          // |x| >= 16
      mag = 16'hFFFF;
    end else begin
      sh   = 140 - int'(e);                  // right shift giving 10 fraction bits
      wide = {m, 24'd0} >> sh;               // integer part in [47:24]
      mag  = wide[39:24];
      if (neg && (wide[23:0] != 24'd0)) mag = mag + 16'd1;
    end
    if (!neg) begin
      if (mag >= 16'd16384) idx_c = AW'(2047);
      else                  idx_c = AW'(mag >> 3);
    end else if (mag == 16'd0) begin
      idx_c = AW'(0);
    end else if (mag <= 16'd1024) begin
      idx_c = AW'(2048 + 1024 - int'(mag));
    end else if (mag >= 16'd16384) begin
      idx_c = AW'(3072);
    end else begin
      idx_c = AW'(3072 + ((16384 - int'(mag)) >> 4));
    end
  end

  logic [AW-1:0] idx_q;
  logic          v1, v2;
  fp32_t         rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q     <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      idx_q     <= idx_c;
      v1        <= valid_in;
      v2        <= v1;
      valid_out <= v2;
    end
  end

  // ROM read and output registers (no reset, as block RAM)
  always_ff @(posedge clk) begin
    rd_q <= rom[idx_q];
    y    <= rd_q;
  end

endmodule
