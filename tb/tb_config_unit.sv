// tb_config_unit: checks the control words the configuration unit produces
// for each operation against the mapping tables written out here: the FFT
// butterfly tiles, the folded halfband chains in both rows, the matched-filter
// chain across both rows with its vertical hops, coefficient loading and
// state clearing, and the no-operation words when the controller is idle.
module tb_config_unit;
  import sdr_pkg::*;

  logic       st_valid, cfg_valid;
  ctl_state_t st;
  dpu_cfg_t   cfg [N_DPU];
  int checks = 0, failures = 0;

  config_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string s);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  task automatic set(input op_e op, input logic bank, input int step);
    st_valid = 1'b1;
    st = '{op: op, bank: bank, step: 5'(step)};
    #1;
  endtask

  // matched-filter chain order and the link each chain tile reads
  int chain [9] = '{0, 1, 2, 3, 8, 7, 6, 5, 4};
  src_e mf_prev [9] = '{SRC_ZERO, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_VA,
                        SRC_RIGHT, SRC_RIGHT, SRC_RIGHT, SRC_RIGHT};
  src_e mf_next [9] = '{SRC_RIGHT, SRC_RIGHT, SRC_RIGHT, SRC_VA, SRC_LEFT,
                        SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_REG};

  initial begin
    int t;
    st_valid = 1'b0; st = '0;
    #1;
    chk(int'(cfg_valid), 0, "idle valid");
    for (int i = 0; i < N_DPU; i++) chk(int'(cfg[i] == DPU_NOP), 1, "idle nop");

    // FFT butterfly
    set(OP_FFT, 1'b0, 0);
    chk(int'(cfg_valid), 1, "fft valid");
    chk(cfg[0].a.src, SRC_BUS0, "T0 a"); chk(cfg[0].c.src, SRC_BUS2, "T0 c");
    chk(cfg[0].mul, MUL_BYPASS, "T0 mul"); chk(cfg[0].add, SUB_PC, "T0 add");
    chk(cfg[1].a.src, SRC_BUS1, "T1 a"); chk(cfg[1].add, SUB_PC, "T1 add");
    chk(cfg[2].add, ADD_CP, "T2 add"); chk(cfg[3].c.src, SRC_BUS3, "T3 c");
    chk(cfg[4].a.src, SRC_VA, "B0 a"); chk(cfg[4].b.src, SRC_CF0, "B0 b");
    chk(cfg[4].mul, MUL_LIVE, "B0 mul"); chk(cfg[4].add, ADD_BYPASS, "B0 add");
    chk(cfg[5].mul, MUL_PIPE, "B1 mul"); chk(cfg[5].add, SUB_CP, "B1 add");
    chk(cfg[5].c.src, SRC_LEFT, "B1 c"); chk(cfg[5].b.src, SRC_CF1, "B1 b");
    chk(cfg[6].a.src, SRC_VB, "B2 a"); chk(cfg[6].b.src, SRC_CF1, "B2 b");
    chk(cfg[7].a.src, SRC_VB, "B3 a"); chk(cfg[7].add, ADD_CP, "B3 add");
    chk(int'(cfg[8] == DPU_NOP), 1, "B4 idle in FFT");

    // halfband, bank 1, forward and backward
    for (int ph = 0; ph < 2; ph++) begin
      set(OP_HB, 1'b1, ph);
      for (int r = 0; r < 2; r++)
        for (int k = 0; k < 4; k++) begin
          t = r * N_TOP + k;
          chk(cfg[t].en, 1, "hb en");
          chk(cfg[t].a.src, r ? SRC_BUS1 : SRC_BUS0, "hb sample lane");
          chk(cfg[t].b.src, SRC_REG, "hb coef src"); chk(cfg[t].b.ra, R_HB_COEF, "hb coef reg");
          chk(cfg[t].wr_addr, ph ? R_HB1_HI : R_HB1_LO, "hb write reg");
          chk(cfg[t].o_addr, ph ? R_HB1_HI : R_HB1_LO, "hb shown reg");
          chk(cfg[t].oe_reg, 1, "hb shows register");
          chk(cfg[t].mul, ph ? MUL_HOLD : MUL_LIVE, "hb multiplier use");
          if (ph == 0) begin
            chk(cfg[t].c.src, k == 0 ? SRC_ZERO : SRC_LEFT, "hb forward c");
            chk(cfg[t].ld_en, k == 3, "hb fold save");
            if (k == 3) begin
              chk(cfg[t].ld.ra, R_HB1_LO, "fold source"); chk(cfg[t].ld_addr, R_FOLD, "fold dest");
            end
          end else begin
            chk(cfg[t].c.src, k == 3 ? SRC_REG : SRC_RIGHT, "hb backward c");
            if (k == 3) chk(cfg[t].c.ra, R_FOLD, "hb fold read");
          end
        end
      chk(int'(cfg[8] == DPU_NOP), 1, "B4 idle in halfband");
    end

    // matched filter, four steps
    for (int ph = 0; ph < 4; ph++) begin
      set(OP_MF, 1'b0, ph);
      for (int k = 0; k < 9; k++) begin
        t = chain[k];
        chk(cfg[t].en, 1, "mf en");
        chk(cfg[t].a.src, ph >= 2 ? SRC_BUS1 : SRC_BUS0, "mf lane");
        chk(cfg[t].b.ra, R_MF_COEF, "mf coef");
        if (ph % 2 == 0) begin
          chk(cfg[t].c.src, mf_prev[k], $sformatf("mf prev of chain %0d", k));
          chk(cfg[t].wr_addr, ph ? R_MFI_LO : R_MFR_LO, "mf lo");
        end else begin
          chk(cfg[t].c.src, mf_next[k], $sformatf("mf next of chain %0d", k));
          chk(cfg[t].wr_addr, ph == 3 ? R_MFI_HI : R_MFR_HI, "mf hi");
        end
      end
    end

    // coefficient load and state clearing
    for (int s = 0; s < 17; s++) begin
      set(OP_LOAD, 1'b0, s);
      for (int i = 0; i < N_DPU; i++) begin
        if (s < 4) begin
          chk(cfg[i].ld_en, (i == s) || (i == N_TOP + s), "hb coef load tile");
          if (cfg[i].ld_en) begin
            chk(cfg[i].ld.src, SRC_CF0, "hb coef src"); chk(cfg[i].ld_addr, R_HB_COEF, "hb coef dst");
          end
        end else if (s < 13) begin
          chk(cfg[i].ld_en, i == chain[s-4], "mf coef load tile");
          if (cfg[i].ld_en) chk(cfg[i].ld_addr, R_MF_COEF, "mf coef dst");
        end else begin
          chk(cfg[i].ld_en && cfg[i].wr_en && cfg[i].en, 1, "clear writes");
          chk(cfg[i].ld.src, SRC_ZERO, "clear source");
          chk(cfg[i].wr_addr, (s == 13) ? R_HB0_LO : (s == 14) ? R_HB1_LO :
                              (s == 15) ? R_MFR_LO : R_MFI_LO, "clear reg a");
          chk(cfg[i].ld_addr, (s == 13) ? R_HB0_HI : (s == 14) ? R_HB1_HI :
                              (s == 15) ? R_MFR_HI : R_MFI_HI, "clear reg b");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
