// tb_step_timer: self-checking test of the real-time step generator.
//
// With STEP_CYCLES = 50 the steps must be exactly 50 clocks apart while
// the processors are idle; a busy period that spans a due step must delay
// that step until busy falls and count one overrun; single issues one
// step when stopped.
module tb_step_timer;
  logic        clk = 0, rst_n = 0, run = 0, single = 0, busy = 0, step;
  logic [31:0] step_count, overrun_count;
  int          checks = 0, failures = 0;
  int          cyc = 0, last_step = -1;
  bit          phase1 = 1;

  step_timer #(.STEP_CYCLES(50)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (step) begin
    if (last_step >= 0 && phase1) begin
      checks++;
      if (cyc - last_step != 50) begin
        failures++;
        $display("FAIL step gap %0d", cyc - last_step);
      end
    end
    last_step = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    repeat (520) @(negedge clk);
    checks++;
    if (step_count != 10) begin failures++; $display("FAIL %0d steps after 520 clocks", step_count); end
    // busy across the next due step
    phase1 = 0;
    busy = 1;
    repeat (50) @(negedge clk);
    busy = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (overrun_count != 1) begin failures++; $display("FAIL overrun %0d", overrun_count); end
    if (step_count != 11) begin failures++; $display("FAIL steps %0d after late step", step_count); end
    repeat (30) @(negedge clk);
    checks++;
    if (step_count != 12) begin failures++; $display("FAIL schedule after late step: %0d", step_count); end
    run = 0;
    repeat (5) @(negedge clk);
    single = 1; @(negedge clk); single = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (step_count != 13) begin failures++; $display("FAIL single step: %0d", step_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
