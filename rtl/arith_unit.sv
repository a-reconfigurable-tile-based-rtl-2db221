// arith_unit: the arithmetic unit of one DPU, a multiplier followed by an
// adder/subtractor, with multiplexers that bypass either of them.
//
// The multiplier forms a*b of two 16-bit operands and truncates the Q1.15
// product back to 16 bits (arithmetic shift right by 15). The product can be
// kept in a local product register, so that a second FIR cycle can reuse it
// with the multiplier idle (MUL_HOLD), or so that multiplier and adder work as
// two pipeline stages (MUL_PIPE: the adder takes last cycle's product while
// the multiplier forms the next one). The adder/subtractor then computes
// c+p, c-p, p-c, or passes p (adder bypassed). With MUL_BYPASS, p is operand
// a itself and the unit is a plain adder/subtractor.
//
// Timing: the result r is combinational from the operands and the product
// register; the product register updates on the clock edge when en is high
// and the multiplier is used (MUL_LIVE, MUL_PIPE). Additions wrap around.
// Multiplier, adder/subtractor and the bypass multiplexers follow the
// document; the product register, the truncation and the widths are this
// design's choices.
module arith_unit
  import sdr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  mul_e  mul,
  input  add_e  add,
  input  word_t a,
  input  word_t b,
  input  word_t c,
  output word_t r,
  output word_t prod_q
);

  logic signed [2*DW-1:0] full;
  word_t p_new, p;

  always_comb begin
    full  = a * b;
    p_new = word_t'(full >>> FRAC);
    unique case (mul)
      MUL_BYPASS: p = a;
      MUL_LIVE:   p = p_new;
      MUL_HOLD:   p = prod_q;
      MUL_PIPE:   p = prod_q;
    endcase
    unique case (add)
      ADD_BYPASS: r = p;
      ADD_CP:     r = c + p;
      SUB_CP:     r = c - p;
      SUB_PC:     r = p - c;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      prod_q <= '0;
    else if (en && (mul == MUL_LIVE || mul == MUL_PIPE))
      prod_q <= p_new;

endmodule
