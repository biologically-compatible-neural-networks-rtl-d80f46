// tb_dpram: self-checking test of the dual-port RAM.
//
// Random writes through both ports are mirrored in a reference array;
// reads on both ports must return the reference word one clock after the
// address (read-first on a same-clock write).
module tb_dpram;
  localparam int DEPTH = 64;
  logic        clk = 0;
  logic        a_we, b_we;
  logic [5:0]  a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int          checks = 0, failures = 0;

  dpram #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port A, then port B overwrites half
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = 6'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      a_we = 1'($urandom); b_we = 1'($urandom);
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = model[a_addr];
      eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      checks += 2;
      if (a_rdata !== ea) begin failures++; if (failures < 10) $display("FAIL A %h %h", a_rdata, ea); end
      if (b_rdata !== eb) begin failures++; if (failures < 10) $display("FAIL B %h %h", b_rdata, eb); end
      a_we = 0; b_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
