// fp_alu: the floating-point arithmetic unit of a neuroprocessor.
//
// One operation at a time: start with op, a and b; done pulses with y.
//   ADD, SUB, MUL, MIN, MAX : done one clock after start
//   EXP  (y = exp(a))       : done 4 clocks after start (3-stage LUT + capture)
//   DIV  (y = a / b)        : done 30 clocks after start
// busy is high from start until done. The document gives each
// neuroprocessor floating-point units for add/sub, multiply, divide and
// exponential (equation 9 needs all four every time step); min/max are
// added here for the saturating terms of the calcium dynamics. Sharing one
// unit of each kind per neuroprocessor is this design's choice.
module fp_alu
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fop_e  op,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  fp32_t add_y, mul_y, div_y, exp_y;
  logic  div_done, div_busy, exp_vout;
  logic  a_lt_b;

  fp_add u_add (.a(a), .b(b), .sub(op == FOP_SUB), .y(add_y));
  fp_mul u_mul (.a(a), .b(b), .y(mul_y));

  fp_div u_div (
    .clk(clk), .rst_n(rst_n), .start(start && op == FOP_DIV),
    .a(a), .b(b), .busy(div_busy), .done(div_done), .y(div_y)
  );

  exp_pwlut u_exp (
    .clk(clk), .rst_n(rst_n), .valid_in(start && op == FOP_EXP),
    .x(a), .valid_out(exp_vout), .y(exp_y)
  );

  // a < b for ordinary (non-NaN) numbers, +0 and -0 equal
  always_comb begin
    if (a[31] != b[31])
      a_lt_b = a[31] && ((a[30:0] | b[30:0]) != 31'd0);
    else if (a[31])
      a_lt_b = a[30:0] > b[30:0];
    else
      a_lt_b = a[30:0] < b[30:0];
  end

  typedef enum logic [1:0] {A_IDLE, A_WAIT_DIV, A_WAIT_EXP} astate_e;
  astate_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= A_IDLE;
      done <= 1'b0;
      y    <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (st)
        A_IDLE: if (start) begin
          case (op)
            FOP_ADD, FOP_SUB: begin y <= add_y; done <= 1'b1; end
            FOP_MUL:          begin y <= mul_y; done <= 1'b1; end
            FOP_MIN:          begin y <= a_lt_b ? a : b; done <= 1'b1; end
            FOP_MAX:          begin y <= a_lt_b ? b : a; done <= 1'b1; end
            FOP_DIV:          st <= A_WAIT_DIV;
            FOP_EXP:          st <= A_WAIT_EXP;
            default:          begin y <= FP_QNAN; done <= 1'b1; end
          endcase
        end
        A_WAIT_DIV: if (div_done) begin y <= div_y; done <= 1'b1; st <= A_IDLE; end
        A_WAIT_EXP: if (exp_vout) begin y <= exp_y; done <= 1'b1; st <= A_IDLE; end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st != A_IDLE) || div_busy;

endmodule
