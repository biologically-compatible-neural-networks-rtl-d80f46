// tb_fp_alu: self-checking test of the neuroprocessor FP-ALU.
//
// Every operation is issued on random operands; the result must match an
// independent real-number computation (bit-exact for add, sub, mul, div,
// min, max; within the LUT step for exp), and done must come after the
// documented number of clocks: 1 for add/sub/mul/min/max, 4 for exp, 30 for
// div.
module tb_fp_alu;
  import fp_pkg::*;
  import tb_util_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  fop_e  op;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fop_e o, fp32_t xa, fp32_t xb);
    int    lat, exp_lat;
    real   ra, rb, r;
    fp32_t exp_y;
    bit    exact;
    ra = fp32_to_real(xa);
    rb = fp32_to_real(xb);
    exact = 1;
    case (o)
      FOP_ADD: begin r = ra + rb; exp_lat = 1; end
      FOP_SUB: begin r = ra - rb; exp_lat = 1; end
      FOP_MUL: begin r = ra * rb; exp_lat = 1; end
      FOP_DIV: begin r = ra / rb; exp_lat = 30; end
      FOP_MIN: begin r = (ra < rb) ? ra : rb; exp_lat = 1; end
      FOP_MAX: begin r = (ra < rb) ? rb : ra; exp_lat = 1; end
      default: begin r = $exp(ra); exp_lat = 4; exact = 0; end
    endcase
    exp_y = real_to_fp32(r);
    @(negedge clk);
    op = o; a = xa; b = xb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (exact ? (y !== exp_y) : ((fp32_to_real(y) - r) / r > 0.016 || (fp32_to_real(y) - r) / r < -0.016)) begin
      failures++;
      if (failures < 10) $display("FAIL op %s: %h, %h -> %h expected %h", o.name(), xa, xb, y, exp_y);
    end
    if (lat != exp_lat) begin
      failures++;
      if (failures < 10) $display("FAIL op %s latency %0d expected %0d", o.name(), lat, exp_lat);
    end
  endtask

  initial begin
    op = FOP_ADD; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 700; i++) begin
      fp32_t xa, xb;
      xa = {1'($urandom), 8'(100 + ($urandom % 50)), 23'($urandom)};
      xb = {1'($urandom), 8'(100 + ($urandom % 50)), 23'($urandom)};
      case (i % 7)
        0: run(FOP_ADD, xa, xb);
        1: run(FOP_SUB, xa, xb);
        2: run(FOP_MUL, xa, xb);
        3: run(FOP_DIV, xa, xb);
        4: run(FOP_MIN, xa, xb);
        5: run(FOP_MAX, xa, xb);
        default: run(FOP_EXP, real_to_fp32(real'($urandom % 3000) / 100.0 - 15.0), xb);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
