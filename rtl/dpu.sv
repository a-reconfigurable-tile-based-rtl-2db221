// dpu: one data-processing unit (tile) of the reconfigurable datapath.
//
// A DPU holds a local controller (control-word register), a register file and
// an arithmetic unit. Three operand multiplexers pick a, b and c for the
// arithmetic unit from the global data bus (4 lanes), the coefficient bus
// (2 lanes), the left and right neighbours, two dedicated vertical links, a
// register, or zero. The result goes into the out register and optionally
// into a register. A fourth multiplexer feeds the load path, which copies a
// bus word, a neighbour word or another register into a register in the same
// cycle (used to load coefficients, to clear state and to save a register
// before it is overwritten).
//
// Neighbours see nb_out: the out register, or, when the control word asks for
// it, a register of the register file (combinational read). That lets a FIR
// tile hand its stored partial sum to the next tile while it computes.
//
// Timing: cfg_in is registered by the local controller; the DPU executes it in
// the next cycle and its results are visible one cycle after that.
// The structure (register file, arithmetic unit, input multiplexer, local
// controller) follows the document; the exact sources and ports are this
// design's choice.
module dpu
  import sdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_valid,
  input  dpu_cfg_t cfg_in,
  input  word_t    bus [4],
  input  word_t    cf  [2],
  input  word_t    left_in,
  input  word_t    right_in,
  input  word_t    va_in,
  input  word_t    vb_in,
  output word_t    nb_out,
  output word_t    out_q,
  output logic     busy
);

  dpu_cfg_t      cfg;
  logic [RA-1:0] ra_a, ra_b, ra_c, ra_l;
  word_t         rd_a, rd_b, rd_c, rd_o, rd_l;
  word_t         op_a, op_b, op_c, op_l, r;
  // the arithmetic unit's held product; it stays inside the unit (only
  // MUL_HOLD/MUL_PIPE read it), so the tile leaves it unread
  word_t         prod_q;

  dpu_local_ctrl u_lc (
    .clk, .rst_n, .cfg_valid, .cfg_in,
    .cfg_q(cfg), .ra_a, .ra_b, .ra_c, .ra_l, .busy
  );

  function automatic word_t pick(input src_e s, input word_t rd,
                                 input word_t bus_i [4], input word_t cf_i [2],
                                 input word_t l, input word_t rr,
                                 input word_t va, input word_t vb);
    unique case (s)
      SRC_BUS0:  return bus_i[0];
      SRC_BUS1:  return bus_i[1];
      SRC_BUS2:  return bus_i[2];
      SRC_BUS3:  return bus_i[3];
      SRC_CF0:   return cf_i[0];
      SRC_CF1:   return cf_i[1];
      SRC_LEFT:  return l;
      SRC_RIGHT: return rr;
      SRC_VA:    return va;
      SRC_VB:    return vb;
      SRC_REG:   return rd;
      default:   return '0;
    endcase
  endfunction

  always_comb begin
    op_a = pick(cfg.a.src,  rd_a, bus, cf, left_in, right_in, va_in, vb_in);
    op_b = pick(cfg.b.src,  rd_b, bus, cf, left_in, right_in, va_in, vb_in);
    op_c = pick(cfg.c.src,  rd_c, bus, cf, left_in, right_in, va_in, vb_in);
    op_l = pick(cfg.ld.src, rd_l, bus, cf, left_in, right_in, va_in, vb_in);
  end

  dpu_regfile u_rf (
    .clk, .rst_n,
    .ra_a, .ra_b, .ra_c, .ra_o(cfg.o_addr), .ra_l,
    .rd_a, .rd_b, .rd_c, .rd_o, .rd_l,
    .we0(cfg.en & cfg.wr_en), .wa0(cfg.wr_addr), .wd0(r),
    .we1(cfg.ld_en),          .wa1(cfg.ld_addr), .wd1(op_l)
  );

  arith_unit u_au (
    .clk, .rst_n, .en(cfg.en), .mul(cfg.mul), .add(cfg.add),
    .a(op_a), .b(op_b), .c(op_c), .r, .prod_q
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      out_q <= '0;
    else if (cfg.en) out_q <= r;

  assign nb_out = cfg.oe_reg ? rd_o : out_q;

endmodule
