// step_timer: real-time time-step generator.
//
// While run is high it issues a one-clock step pulse every STEP_CYCLES
// clocks (10,000 clocks = 0.1 ms at the 100 MHz neuroprocessor clock, the
// real-time step of the simulator); single issues one step at once when
// not running. step_count counts the steps issued. If the
// neuroprocessors are still busy when a step falls due, the step is held
// back until they finish and overrun_count is incremented, so a design
// that cannot keep real time is visible from outside.
// The 0.1 ms step at 100 MHz is the document's; the hold-back behaviour
// is this design's.
module step_timer #(
  parameter int STEP_CYCLES = 10000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        single,
  input  logic        busy,
  output logic        step,
  output logic [31:0] step_count,
  output logic [31:0] overrun_count
);

  localparam int CW = $clog2(STEP_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic          due, late, hold;

  assign due = run && (cnt == CW'(STEP_CYCLES - 1));
  // the processors only show busy one clock after a step pulse
  assign hold = busy || step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      step          <= 1'b0;
      late          <= 1'b0;
      step_count    <= '0;
      overrun_count <= '0;
    end else begin
      step <= 1'b0;
      if (!run) begin
        cnt  <= '0;
        late <= 1'b0;
        if (single && !hold) begin
          step       <= 1'b1;
          step_count <= step_count + 32'd1;
        end
      end else begin
        cnt <= due ? '0 : cnt + CW'(1);
        if ((due || late) && !hold) begin
          step       <= 1'b1;
          step_count <= step_count + 32'd1;
          late       <= 1'b0;
        end else if (due) begin
          late          <= 1'b1;
          overrun_count <= overrun_count + 32'd1;
        end
      end
    end
  end

endmodule
