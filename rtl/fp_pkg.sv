// fp_pkg: shared types and constants of the floating-point neuroprocessors.
//
// All arithmetic in the neuron model is IEEE-754 single precision (32-bit),
// as in the neuroprocessors this design follows. This package defines the
// word type, the FP-ALU operation codes, the instruction format of the
// soma/dendrite sequencer and a few constant helpers. Subnormal numbers are
// flushed to zero by every unit (a choice of this implementation).
package fp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  // Operations of the FP-ALU.
  typedef enum logic [2:0] {
    FOP_ADD = 3'd0,
    FOP_SUB = 3'd1,
    FOP_MUL = 3'd2,
    FOP_DIV = 3'd3,
    FOP_EXP = 3'd4,
    FOP_MIN = 3'd5,
    FOP_MAX = 3'd6
  } fop_e;

  // Opcodes of the soma/dendrite micro-sequencer.
  typedef enum logic [3:0] {
    OP_END = 4'd0,   // end of the time-step program
    OP_ADD = 4'd1,   // rd = ra + rb
    OP_SUB = 4'd2,   // rd = ra - rb
    OP_MUL = 4'd3,   // rd = ra * rb
    OP_DIV = 4'd4,   // rd = ra / rb
    OP_EXP = 4'd5,   // rd = exp(ra)
    OP_MIN = 4'd6,   // rd = min(ra, rb)
    OP_MAX = 4'd7,   // rd = max(ra, rb)
    OP_LDP = 4'd8,   // rd = PRAM[imm]
    OP_LDT = 4'd9    // rd = PRAM[imm + clamp(floor(ra), 0, TBL_LEN-1)]
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [4:0]  rd;
    logic [4:0]  ra;
    logic [4:0]  rb;
    logic [11:0] imm;
  } instr_t;  // 31 bits

  // Build an instruction.
  function automatic instr_t mk(opcode_e op, int rd, int ra, int rb, int imm);
    instr_t i;
    i.op  = op;
    i.rd  = 5'(rd);
    i.ra  = 5'(ra);
    i.rb  = 5'(rb);
    i.imm = 12'(imm);
    return i;
  endfunction

  // Round a real number to the nearest single-precision word (flush of
  // subnormals to zero). Used to fill constant tables.
  function automatic fp32_t real_to_fp32(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [23:0] mant;
    logic        g, st;
    logic [24:0] mr;
    d = $realtobits(r);
    s = d[63];
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    if (d[62:0] == 63'd0) return {s, 31'd0};
    mant = m[52:29];
    g    = m[28];
    st   = |m[27:0];
    mr   = {1'b0, mant} + {24'd0, g & (st | mant[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  // Unsigned integer to single precision (exact below 2^24, truncated above).
  function automatic fp32_t u32_to_fp32(logic [31:0] v);
    int lead;
    logic [31:0] sh;
    if (v == 32'd0) return FP_ZERO;
    lead = 0;
    for (int i = 0; i < 32; i++) if (v[i]) lead = i;
    sh = v << (31 - lead);
    return {1'b0, 8'(127 + lead), sh[30:8]};
  endfunction

endpackage
