// input_buffer: the memory in which the down-converted samples from the
// analog front end are stored.
//
// DEPTH complex samples (16-bit real and imaginary parts). One write port for
// the front end and two read ports for the datapath, so that a radix-2
// butterfly can fetch both of its inputs in one cycle. Reads are registered
// (data one cycle after the address); a read of the address being written in
// the same cycle returns the old word.
// The document names the buffer and its role; its depth and ports are this
// design's choice (two read ports for one butterfly per cycle).
module input_buffer
  import sdr_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata0,
  output cplx_t         rdata1
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule
