// syn_event_det: transmitter-pulse tracker and event classifier of the
// hybrid time-event-driven synapse integration.
//
// Each incoming synapse releases transmitter as a pulse of Cdur time steps
// that starts at the step in which its presynaptic spike arrives. A spike
// that arrives while the synapse's pulse is still running is ignored, so
// every pulse lasts exactly Cdur, which the lumped update at the falling
// edge relies on. At every tick (one per time step) the
// module compares each synapse's pulse state with the previous step:
//   rise[i] : off -> on this step,  fall[i] : on -> off this step.
// The step is classified RE (only rises), FE (only falls), BOTH (rises
// and falls) or NC (no change); evt_valid pulses one clock after tick with
// rise, fall and evt_class valid. Running counts are kept: re_cnt and
// fe_cnt add the number of synapses that rose or fell in RE and FE steps,
// both_cnt and nc_cnt count BOTH and NC steps. With the four pulse trains
// of the document's example (dt = 0.1 ms, Cdur = 1 ms, 8 ms) this gives
// RE 5, FE 5, BOTH 1.
// The four event classes and the pulse model follow the document; the
// counter-based pulse timing is this design's.
module syn_event_det #(
  parameter int N_SYN = 9,
  parameter int CW    = 8              // width of the Cdur counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic [N_SYN-1:0] spike_in,
  input  logic [CW-1:0]    cdur_steps,
  output logic             evt_valid,
  output logic [N_SYN-1:0] rise,
  output logic [N_SYN-1:0] fall,
  output logic [1:0]       evt_class,   // 0 NC, 1 RE, 2 FE, 3 BOTH
  output logic [31:0]      re_cnt,
  output logic [31:0]      fe_cnt,
  output logic [31:0]      both_cnt,
  output logic [31:0]      nc_cnt
);

  logic [CW-1:0]    cnt [N_SYN];
  logic [N_SYN-1:0] on_q, on_n;

  always_comb begin
    for (int i = 0; i < N_SYN; i++)
      on_n[i] = (spike_in[i] && cnt[i] == '0) || (cnt[i] > CW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SYN; i++) cnt[i] <= '0;
      on_q      <= '0;
      rise      <= '0;
      fall      <= '0;
      evt_valid <= 1'b0;
      evt_class <= 2'd0;
      re_cnt    <= '0;
      fe_cnt    <= '0;
      both_cnt  <= '0;
      nc_cnt    <= '0;
    end else begin
      evt_valid <= tick;
      if (tick) begin
        logic [N_SYN-1:0] r, f;
        r = on_n & ~on_q;
        f = ~on_n & on_q;
        for (int i = 0; i < N_SYN; i++) begin
          if (spike_in[i] && cnt[i] == '0) cnt[i] <= cdur_steps;
          else if (cnt[i] != '0) cnt[i] <= cnt[i] - CW'(1);
        end
        on_q <= on_n;
        rise <= r;
        fall <= f;
        if (r != '0 && f != '0) begin
          evt_class <= 2'd3;
          both_cnt  <= both_cnt + 32'd1;
        end else if (r != '0) begin
          evt_class <= 2'd1;
          re_cnt    <= re_cnt + 32'($countones(r));
        end else if (f != '0) begin
          evt_class <= 2'd2;
          fe_cnt    <= fe_cnt + 32'($countones(f));
        end else begin
          evt_class <= 2'd0;
          nc_cnt    <= nc_cnt + 32'd1;
        end
      end
    end
  end

endmodule
