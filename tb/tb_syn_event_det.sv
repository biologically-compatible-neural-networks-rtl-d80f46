// tb_syn_event_det: self-checking test of the synapse event classifier.
//
// Replays the example of four synapses receiving spikes at different times
// (dt = 0.1 ms, Cdur = 1 ms, 8 ms = 80 steps): spikes at 1.0 and 4.0 ms on
// synapse 4, 2.5 and 6.0 ms on synapse 2, 3.0 ms on synapse 3, 6.0 ms on
// synapse 1. Expected per step: RE at 1.0, 2.5, 3.0, 6.0 (two synapses),
// FE at 2.0, 3.5, 5.0, 7.0 (two synapses), BOTH at 4.0, NC elsewhere;
// totals RE 5, FE 5, BOTH 1 and 71 NC steps. Each step's class and rise /
// fall vectors are compared with these times.
module tb_syn_event_det;
  logic        clk = 0, rst_n = 0, tick = 0;
  logic [3:0]  spike_in;
  logic [7:0]  cdur_steps;
  logic        evt_valid;
  logic [3:0]  rise, fall;
  logic [1:0]  evt_class;
  logic [31:0] re_cnt, fe_cnt, both_cnt, nc_cnt;
  int          checks = 0, failures = 0;

  syn_event_det #(.N_SYN(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit i is synapse i+1; spike step numbers
  function automatic logic [3:0] spikes_at(int s);
    logic [3:0] v = '0;
    if (s == 10 || s == 40) v[3] = 1'b1;
    if (s == 25 || s == 60) v[1] = 1'b1;
    if (s == 30)            v[2] = 1'b1;
    if (s == 60)            v[0] = 1'b1;
    return v;
  endfunction

  function automatic logic [1:0] class_at(int s, output logic [3:0] r, output logic [3:0] f);
    r = '0; f = '0;
    case (s)
      10: r = 4'b1000;  20: f = 4'b1000;
      25: r = 4'b0010;  35: f = 4'b0010;
      30: r = 4'b0100;
      40: begin f = 4'b0100; r = 4'b1000; end
      50: f = 4'b1000;
      60: r = 4'b0011;  70: f = 4'b0011;
      default: ;
    endcase
    return {f != 0, r != 0} == 2'b11 ? 2'd3 : (r != 0 ? 2'd1 : (f != 0 ? 2'd2 : 2'd0));
  endfunction

  initial begin
    spike_in = '0;
    cdur_steps = 8'd10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 80; s++) begin
      logic [3:0] er, ef;
      logic [1:0] ec;
      @(negedge clk);
      tick = 1; spike_in = spikes_at(s);
      @(negedge clk);
      tick = 0; spike_in = '0;
      ec = class_at(s, er, ef);
      checks++;
      if (!evt_valid || evt_class !== ec || rise !== er || fall !== ef) begin
        failures++;
        $display("FAIL step %0d: class %0d rise %b fall %b, expected %0d %b %b", s, evt_class, rise, fall, ec, er, ef);
      end
      repeat (3) @(negedge clk);
    end
    checks += 4;
    if (re_cnt != 5)   begin failures++; $display("FAIL RE count %0d", re_cnt); end
    if (fe_cnt != 5)   begin failures++; $display("FAIL FE count %0d", fe_cnt); end
    if (both_cnt != 1) begin failures++; $display("FAIL BOTH count %0d", both_cnt); end
    if (nc_cnt != 71)  begin failures++; $display("FAIL NC count %0d", nc_cnt); end
    $display("RE %0d FE %0d BOTH %0d NC steps %0d", re_cnt, fe_cnt, both_cnt, nc_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
