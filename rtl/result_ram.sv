// result_ram: random-access memory for filtered data streams, FFT
// intermediate stages and FFT results.
//
// DEPTH complex words. Two write ports and two read ports serve the datapath
// (a butterfly reads two words and writes two words per cycle); a third read
// port lets the rest of the receiver fetch results. All reads are registered
// (one cycle latency) and return the old word when the address is written in
// the same cycle. If both write ports hit the same address, port 1 wins.
// The document names the RAM and its role; depth and ports are this design's
// choice.
module result_ram
  import sdr_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we0,
  input  logic [AW-1:0] waddr0,
  input  cplx_t         wdata0,
  input  logic          we1,
  input  logic [AW-1:0] waddr1,
  input  cplx_t         wdata1,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata0,
  output cplx_t         rdata1,
  input  logic [AW-1:0] ext_raddr,
  output cplx_t         ext_rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
    rdata0    <= mem[raddr0];
    rdata1    <= mem[raddr1];
    ext_rdata <= mem[ext_raddr];
  end

endmodule
