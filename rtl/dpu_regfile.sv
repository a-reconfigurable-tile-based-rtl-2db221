// dpu_regfile: the local register file of a DPU.
//
// NREG words of DW bits with four combinational read ports and two write
// ports. Read ports a, b and c feed the arithmetic unit, read port o drives
// the word the DPU shows to its neighbours; a fifth read port feeds the load
// path. Write port 0 stores the arithmetic result, write port 1 stores a word
// taken from a bus, a neighbour or another register (the load path). When both
// write the same register in one cycle, the arithmetic result wins.
// Writes take effect on the rising clock edge; reset clears every register.
// The document asks for local storage in each tile; its size and ports are
// this design's choice, sized for the register map in sdr_pkg.
module dpu_regfile
  import sdr_pkg::*;
#(
  parameter int N = NREG,
  parameter int A = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [A-1:0] ra_a,
  input  logic [A-1:0] ra_b,
  input  logic [A-1:0] ra_c,
  input  logic [A-1:0] ra_o,
  input  logic [A-1:0] ra_l,
  output word_t        rd_a,
  output word_t        rd_b,
  output word_t        rd_c,
  output word_t        rd_o,
  output word_t        rd_l,
  input  logic         we0,
  input  logic [A-1:0] wa0,
  input  word_t        wd0,
  input  logic         we1,
  input  logic [A-1:0] wa1,
  input  word_t        wd1
);

  word_t regs [N];

  assign rd_a = regs[ra_a];
  assign rd_b = regs[ra_b];
  assign rd_c = regs[ra_c];
  assign rd_o = regs[ra_o];
  assign rd_l = regs[ra_l];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      if (we1) regs[wa1] <= wd1;
      if (we0) regs[wa0] <= wd0;
    end

endmodule
