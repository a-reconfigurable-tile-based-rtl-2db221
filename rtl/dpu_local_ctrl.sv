// dpu_local_ctrl: the local controller of a DPU.
//
// The configuration unit broadcasts one control word per DPU every cycle.
// The local controller registers the word addressed to its DPU, so that the
// DPU executes it in the following cycle, in step with the registered reads
// of the global memories. When cfg_valid is low it holds a no-operation word
// (the arithmetic unit and all writes are disabled), which keeps the tile
// idle between operations. It also decodes the register-file read addresses
// from the operand fields, so that the register file sees a plain address.
// The document names a local controller connected to the global controller;
// what it does here is this design's choice.
module dpu_local_ctrl
  import sdr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_valid,
  input  dpu_cfg_t      cfg_in,
  output dpu_cfg_t      cfg_q,
  output logic [RA-1:0] ra_a,
  output logic [RA-1:0] ra_b,
  output logic [RA-1:0] ra_c,
  output logic [RA-1:0] ra_l,
  output logic          busy
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         cfg_q <= DPU_NOP;
    else if (cfg_valid) cfg_q <= cfg_in;
    else                cfg_q <= DPU_NOP;

  assign ra_a = cfg_q.a.ra;
  assign ra_b = cfg_q.b.ra;
  assign ra_c = cfg_q.c.ra;
  assign ra_l = cfg_q.ld.ra;
  assign busy = cfg_q.en | cfg_q.wr_en | cfg_q.ld_en;

endmodule
