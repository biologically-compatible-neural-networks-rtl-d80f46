// fp_div: IEEE-754 single-precision divider, one quotient bit per clock.
//
// A start pulse latches a and b; the mantissas are divided by restoring
// division, producing 27 quotient bits in 27 cycles, then the result is
// normalised and rounded to nearest, ties to even, and done pulses for one
// cycle with y valid (held until the next start). Latency from start to
// done is 29 clocks. Division by zero gives a signed infinity, 0/0 and any
// NaN the quiet NaN; subnormals are flushed to zero. Division is needed by
// equation (9) of the membrane update (A/B); this radix-2 divider is this
// design's own choice.
module fp_div
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_ROUND} state_e;
  state_e      state;
  logic [4:0]  cnt;
  logic [24:0] rem;
  logic [23:0] mb;
  logic [26:0] q;
  logic        s_r;
  int          e_r;
  logic        special;
  fp32_t       special_y;

  logic [24:0] diff;
  assign diff = rem - {1'b0, mb};

  // Rounding of the finished quotient.
  logic [24:0] rnd;
  int          e_fin;
  fp32_t       y_fin;
  always_comb begin
    logic g, st;
    e_fin = e_r;
    if (q[26]) begin
      g   = q[2];
      st  = (|q[1:0]) | (rem != 25'd0);
      rnd = {1'b0, q[26:3]} + {24'd0, g & (st | q[3])};
    end else begin
      g   = q[1];
      st  = q[0] | (rem != 25'd0);
      rnd = {1'b0, q[25:2]} + {24'd0, g & (st | q[2])};
      e_fin = e_fin - 1;
    end
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      e_fin = e_fin + 1;
    end
    if (e_fin <= 0)        y_fin = {s_r, 31'd0};
    else if (e_fin >= 255) y_fin = {s_r, 8'hFF, 23'd0};
    else                   y_fin = {s_r, 8'(e_fin), rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      rem       <= '0;
      mb        <= '0;
      q         <= '0;
      s_r       <= 1'b0;
      e_r       <= 0;
      special   <= 1'b0;
      special_y <= FP_ZERO;
      done      <= 1'b0;
      y         <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, sgn;
          a_zero = (a[30:23] == 8'd0);
          b_zero = (b[30:23] == 8'd0);
          a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
          b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
          a_inf  = (a[30:23] == 8'hFF) && !a_nan;
          b_inf  = (b[30:23] == 8'hFF) && !b_nan;
          sgn    = a[31] ^ b[31];
          s_r    <= sgn;
          e_r    <= int'(a[30:23]) - int'(b[30:23]) + 127;
          rem    <= {2'b01, a[22:0]};
          mb     <= {1'b1, b[22:0]};
          q      <= '0;
          cnt    <= 5'd0;
          special <= 1'b1;
          if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) special_y <= FP_QNAN;
          else if (a_inf || b_zero) special_y <= {sgn, 8'hFF, 23'd0};
          else if (a_zero || b_inf) special_y <= {sgn, 31'd0};
          else special <= 1'b0;
          state <= S_ITER;
        end
        S_ITER: begin
          if (!diff[24]) begin
            q   <= {q[25:0], 1'b1};
            rem <= {diff[23:0], 1'b0};
          end else begin
            q   <= {q[25:0], 1'b0};
            rem <= {rem[23:0], 1'b0};
          end
          cnt <= cnt + 5'd1;
          if (cnt == 5'd26) state <= S_ROUND;
        end
        S_ROUND: begin
          y     <= special ? special_y : y_fin;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
