// config_unit: translates the state of the central controller into one
// control word per DPU (the algorithm mapping of the datapath).
//
// Purely combinational; the DPUs' local controllers register the words.
// Tiles are numbered T0..T3 = 0..3 (top row) and B0..B4 = 4..8 (bottom row).
//
// FIR filters use the transposed form folded onto a chain of tiles. A filter
// with 2F symmetric taps runs on F tiles; chain tile k holds coefficient h_k
// and two partial sums, lo_k and hi_k. A sample takes two cycles:
//   forward  (step 0): lo_k <= h_k*x + lo_(k-1)   (product kept in the tile)
//   backward (step 1): hi_k <= p_k   + hi_(k+1)   (kept product, no multiply)
// At the fold tile (k = F-1) hi reads the tile's own lo, saved into R_FOLD
// during the forward step before it is overwritten. The filter output is
// hi_0, left in the out register of chain tile 0. A tile shows its old lo
// (forward) or hi (backward) to its neighbours through its register read port.
//   OP_HB: 8 taps, F = 4. Top row T0..T3 filters the real part (bus lane 0),
//          bottom row B0..B3 the imaginary part (lane 1), at the same time;
//          forward is left-to-right. Two state banks (two halfband filters).
//   OP_MF: 18 taps, F = 9, chain T0 T1 T2 T3 B4 B3 B2 B1 B0 over both rows
//          (T3 -> B4 and back through the vertical links). Steps 0,1 filter
//          the real part, steps 2,3 the imaginary part.
// OP_FFT: one radix-2 decimation-in-frequency butterfly per cycle, pipelined.
//   Top row: T0 = ar-br, T1 = ai-bi, T2 = ar+br, T3 = ai+bi (adders only).
//   Bottom row: B0 = dr*wr, B1 = B0 - di*wi, B2 = dr*wi, B3 = B2 + di*wr;
//   B1 and B3 use the product register as a pipeline stage, so the real and
//   imaginary parts of (a-b)W appear two cycles after the sums.
// OP_LOAD: steps 0..3 load halfband coefficients from the coefficient bus,
//   steps 4..12 the matched-filter coefficients, steps 13..16 clear the
//   filter state (two registers per tile per cycle).
// The row assignments, the two-cycle FIR schedule and the butterfly split
// into add-only and multiply tiles follow the document; register use, step
// numbering and the pipelining are this design's choices.
module config_unit
  import sdr_pkg::*;
(
  input  logic       st_valid,
  input  ctl_state_t st,
  output logic       cfg_valid,
  output dpu_cfg_t   cfg [N_DPU]
);

  // Matched-filter chain: position -> tile
  localparam int MF_CHAIN [9] = '{0, 1, 2, 3, 8, 7, 6, 5, 4};

  function automatic opnd_t o(input src_e s);
    return '{src: s, ra: '0};
  endfunction

  function automatic opnd_t oreg(input logic [RA-1:0] r);
    return '{src: SRC_REG, ra: r};
  endfunction

  // One FIR step for the tile at chain position k of a chain of length f.
  function automatic dpu_cfg_t fir_word(
      input int k, input int f, input logic fwd,
      input src_e x, input src_e prev, input src_e next,
      input logic [RA-1:0] rc, input logic [RA-1:0] lo, input logic [RA-1:0] hi);
    dpu_cfg_t w = DPU_NOP;
    w.en     = 1'b1;
    w.a      = o(x);
    w.b      = oreg(rc);
    w.add    = ADD_CP;
    w.wr_en  = 1'b1;
    w.oe_reg = 1'b1;
    if (fwd) begin
      w.mul     = MUL_LIVE;
      w.c       = (k == 0) ? o(SRC_ZERO) : o(prev);
      w.wr_addr = lo;
      w.o_addr  = lo;
      if (k == f - 1) begin
        w.ld_en   = 1'b1;
        w.ld      = oreg(lo);
        w.ld_addr = R_FOLD;
      end
    end else begin
      w.mul     = MUL_HOLD;
      w.c       = (k == f - 1) ? oreg(R_FOLD) : o(next);
      w.wr_addr = hi;
      w.o_addr  = hi;
    end
    return w;
  endfunction

  function automatic dpu_cfg_t arith_word(input src_e a, input src_e b, input src_e c,
                                          input mul_e m, input add_e ad);
    dpu_cfg_t w = DPU_NOP;
    w.en  = 1'b1;
    w.a   = o(a);
    w.b   = o(b);
    w.c   = o(c);
    w.mul = m;
    w.add = ad;
    return w;
  endfunction

  always_comb begin
    logic [RA-1:0] lo, hi, r0, r1;
    int  t, s;
    logic fwd;
    src_e prev, next;

    cfg_valid = st_valid;
    for (int i = 0; i < N_DPU; i++) cfg[i] = DPU_NOP;
    lo = '0; hi = '0; r0 = '0; r1 = '0;
    t = 0; s = 0; fwd = 1'b0; prev = SRC_ZERO; next = SRC_ZERO;

    if (st_valid) begin
      unique case (st.op)
        OP_HB: begin
          lo  = st.bank ? R_HB1_LO : R_HB0_LO;
          hi  = st.bank ? R_HB1_HI : R_HB0_HI;
          fwd = (st.step[0] == 1'b0);
          for (int k = 0; k < 4; k++) begin
            cfg[k]         = fir_word(k, 4, fwd, SRC_BUS0, SRC_LEFT, SRC_RIGHT,
                                      R_HB_COEF, lo, hi);
            cfg[N_TOP + k] = fir_word(k, 4, fwd, SRC_BUS1, SRC_LEFT, SRC_RIGHT,
                                      R_HB_COEF, lo, hi);
          end
        end
        OP_MF: begin
          lo  = st.step[1] ? R_MFI_LO : R_MFR_LO;
          hi  = st.step[1] ? R_MFI_HI : R_MFR_HI;
          fwd = (st.step[0] == 1'b0);
          for (int k = 0; k < 9; k++) begin
            // source of the previous (forward) and next (backward) chain tile
            prev = (k <= 3) ? SRC_LEFT  : (k == 4) ? SRC_VA   : SRC_RIGHT;
            next = (k <= 2) ? SRC_RIGHT : (k == 3) ? SRC_VA   : SRC_LEFT;
            cfg[MF_CHAIN[k]] = fir_word(k, 9, fwd, st.step[1] ? SRC_BUS1 : SRC_BUS0,
                                        prev, next, R_MF_COEF, lo, hi);
          end
        end
        OP_FFT: begin
          cfg[0] = arith_word(SRC_BUS0, SRC_ZERO, SRC_BUS2, MUL_BYPASS, SUB_PC);
          cfg[1] = arith_word(SRC_BUS1, SRC_ZERO, SRC_BUS3, MUL_BYPASS, SUB_PC);
          cfg[2] = arith_word(SRC_BUS0, SRC_ZERO, SRC_BUS2, MUL_BYPASS, ADD_CP);
          cfg[3] = arith_word(SRC_BUS1, SRC_ZERO, SRC_BUS3, MUL_BYPASS, ADD_CP);
          cfg[4] = arith_word(SRC_VA, SRC_CF0, SRC_ZERO, MUL_LIVE, ADD_BYPASS);
          cfg[5] = arith_word(SRC_VA, SRC_CF1, SRC_LEFT, MUL_PIPE, SUB_CP);
          cfg[6] = arith_word(SRC_VB, SRC_CF1, SRC_ZERO, MUL_LIVE, ADD_BYPASS);
          cfg[7] = arith_word(SRC_VB, SRC_CF0, SRC_LEFT, MUL_PIPE, ADD_CP);
        end
        OP_LOAD: begin
          if (st.step < 5'd4) begin
            t = int'(st.step);
            cfg[t].ld_en           = 1'b1;
            cfg[t].ld              = o(SRC_CF0);
            cfg[t].ld_addr         = R_HB_COEF;
            cfg[N_TOP + t].ld_en   = 1'b1;
            cfg[N_TOP + t].ld      = o(SRC_CF0);
            cfg[N_TOP + t].ld_addr = R_HB_COEF;
          end else if (st.step < 5'd13) begin
            t = MF_CHAIN[int'(st.step) - 4];
            cfg[t].ld_en   = 1'b1;
            cfg[t].ld      = o(SRC_CF0);
            cfg[t].ld_addr = R_MF_COEF;
          end else if (st.step < 5'd17) begin
            s = int'(st.step) - 13;
            unique case (s)
              0:       begin r0 = R_HB0_LO; r1 = R_HB0_HI; end
              1:       begin r0 = R_HB1_LO; r1 = R_HB1_HI; end
              2:       begin r0 = R_MFR_LO; r1 = R_MFR_HI; end
              default: begin r0 = R_MFI_LO; r1 = R_MFI_HI; end
            endcase
            for (int i = 0; i < N_DPU; i++) begin
              cfg[i]         = arith_word(SRC_ZERO, SRC_ZERO, SRC_ZERO, MUL_BYPASS, ADD_BYPASS);
              cfg[i].wr_en   = 1'b1;
              cfg[i].wr_addr = r0;
              cfg[i].ld_en   = 1'b1;
              cfg[i].ld      = o(SRC_ZERO);
              cfg[i].ld_addr = r1;
            end
          end
        end
        default: ;
      endcase
    end
  end

endmodule
