// dpram: true dual-port RAM holding a neuroprocessor's parameters and state.
//
// Port A belongs to the host (configuration and read-back), port B to the
// neuroprocessor. Both ports are synchronous: a write happens at the clock
// edge where we is high, and rdata shows the word at addr one clock after
// the address is presented (read-first on a write). Each
// neuroprocessor has such a RAM for its maximum conductances, reversal
// potentials, geometry, time step and state-variable configuration, as the
// document describes; the width, depth and read timing are this design's
// choice (a block RAM in an FPGA). Contents are undefined until written.
module dpram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4096,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: host
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: neuroprocessor
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  // One process for both ports; on a same-address collision port B's
  // write lands last and wins.
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
