// np_engine: FSM-sequenced floating-point datapath of the soma and
// dendrite neuroprocessors.
//
// A 32-word register file, one FP-ALU (add/sub, mul, div, exp, min, max)
// and port B of the compartment's parameter RAM are driven by a small
// program (see np_prog_pkg) that the wrapper module supplies on
// prog_instr for address prog_pc. Instructions run one at a time:
// ALU operations wait for the ALU's done, loads take two clocks.
//
//   init : pulse; copies PRAM[INIT_BASE+r] into R[r] for r = 0..7
//          (initial voltage and gating state), then raises done.
//   step : pulse; samples ext[0..3] into R28-R31, runs the program from
//          address 0 until OP_END, then raises done for one clock.
// A step of the soma program takes about 230 clocks, far inside the
// 10,000 clocks of a 0.1 ms time step at 100 MHz. regs_out shows R0-R7.
// The document describes the neuroprocessors as FP units, state machines,
// control logic and RAMs; the instruction-sequenced form is this design's.
module np_engine
  import fp_pkg::*;
  import np_prog_pkg::*;
#(
  parameter int PAW = 11              // parameter RAM address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           step,
  input  fp32_t          ext [4],
  output logic           busy,
  output logic           done,
  output fp32_t          regs_out [8],
  output logic [6:0]     prog_pc,
  input  instr_t         prog_instr,
  output logic [PAW-1:0] pram_addr,
  input  fp32_t          pram_rdata
);

  typedef enum logic [2:0] {E_IDLE, E_INIT, E_INIT_W, E_FETCH, E_ALU, E_MEM} estate_e;
  estate_e st;

  fp32_t      R [32];
  logic [6:0] pc;
  logic [2:0] icnt;
  instr_t     ir;

  logic  alu_start, alu_busy, alu_done;
  fp32_t alu_y;
  fop_e  alu_op;

  fp_alu u_alu (
    .clk(clk), .rst_n(rst_n), .start(alu_start), .op(alu_op),
    .a(R[ir.ra]), .b(R[ir.rb]), .busy(alu_busy), .done(alu_done), .y(alu_y)
  );

  assign prog_pc = pc;

  // floor(x) clamped to [0, TBL_LEN-1]
  function automatic logic [7:0] tbl_index(fp32_t x);
    logic [23:0] m;
    int          e;
    e = int'(x[30:23]);
    m = {1'b1, x[22:0]};
    if (x[31] || e < 127) return 8'd0;
    if (e >= 127 + 8)     return 8'd255;
    return 8'(m >> (150 - e));
  endfunction

  always_comb begin
    case (ir.op)
      OP_ADD:  alu_op = FOP_ADD;
      OP_SUB:  alu_op = FOP_SUB;
      OP_MUL:  alu_op = FOP_MUL;
      OP_DIV:  alu_op = FOP_DIV;
      OP_EXP:  alu_op = FOP_EXP;
      OP_MIN:  alu_op = FOP_MIN;
      default: alu_op = FOP_MAX;
    endcase
  end

  // Parameter RAM address, presented in E_INIT / E_FETCH.
  always_comb begin
    if (st == E_INIT)
      pram_addr = PAW'(INIT_BASE) + PAW'(icnt);
    else if (prog_instr.op == OP_LDT)
      pram_addr = PAW'(prog_instr.imm) + PAW'(tbl_index(R[prog_instr.ra]));
    else
      pram_addr = PAW'(prog_instr.imm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= E_IDLE;
      pc        <= '0;
      icnt      <= '0;
      ir        <= '0;
      done      <= 1'b0;
      alu_start <= 1'b0;
      for (int i = 0; i < 32; i++) R[i] <= FP_ZERO;
    end else begin
      done      <= 1'b0;
      alu_start <= 1'b0;
      case (st)
        E_IDLE: begin
          if (init) begin
            icnt <= '0;
            st   <= E_INIT;
          end else if (step) begin
            for (int i = 0; i < 4; i++) R[28+i] <= ext[i];
            pc <= '0;
            st <= E_FETCH;
          end
        end
        E_INIT: st <= E_INIT_W;              // address presented
        E_INIT_W: begin
          R[5'(icnt)] <= pram_rdata;
          icnt    <= icnt + 3'd1;
          if (icnt == 3'd7) begin
            done <= 1'b1;
            st   <= E_IDLE;
          end else begin
            st <= E_INIT;
          end
        end
        E_FETCH: begin
          ir <= prog_instr;
          case (prog_instr.op)
            OP_END: begin
              done <= 1'b1;
              st   <= E_IDLE;
            end
            OP_LDP, OP_LDT: st <= E_MEM;
            default: begin
              alu_start <= 1'b1;
              st        <= E_ALU;
            end
          endcase
        end
        E_MEM: begin
          R[ir.rd] <= pram_rdata;
          pc       <= pc + 7'd1;
          st       <= E_FETCH;
        end
        E_ALU: if (alu_done) begin
          R[ir.rd] <= alu_y;
          pc       <= pc + 7'd1;
          st       <= E_FETCH;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  always_comb for (int i = 0; i < 8; i++) regs_out[i] = R[i];
  assign busy = (st != E_IDLE) || alu_busy;

endmodule
