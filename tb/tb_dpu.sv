// tb_dpu: drives one DPU through the operations the mappings use: loading
// a coefficient from the coefficient bus, a FIR forward step (coefficient
// register times bus sample plus left neighbour, product kept, old register
// shown to the neighbours, fold register saved), a backward step with the
// multiplier idle, a bypassed-multiplier subtraction of two bus lanes, and a
// multiply from a vertical link. Expected values are computed here.
module tb_dpu;
  import sdr_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, cfg_valid, busy;
  dpu_cfg_t cfg_in;
  word_t    bus [4];
  word_t    cf  [2];
  word_t    left_in, right_in, va_in, vb_in, nb_out, out_q;
  int checks = 0, failures = 0;

  dpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mulq(input word_t x, input word_t y);
    logic signed [31:0] f = 32'(x) * 32'(y);
    return word_t'(f >>> 15);
  endfunction

  task automatic chk(input word_t got, input word_t exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  // present a control word; the DPU executes it in the following cycle,
  // and the task returns once its results are visible
  task automatic issue(input dpu_cfg_t w);
    @(negedge clk);
    cfg_in = w; cfg_valid = 1'b1;
    @(negedge clk);
    cfg_valid = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    dpu_cfg_t w;
    word_t h, x, lft, rgt, p, lo_old, hi;
    cfg_valid = 1'b0; cfg_in = DPU_NOP;
    bus = '{default: '0}; cf = '{default: '0};
    left_in = '0; right_in = '0; va_in = '0; vb_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 20; it++) begin
      h = word_t'($urandom); x = word_t'($urandom);
      lft = word_t'($urandom); rgt = word_t'($urandom);
      // load coefficient into R_HB_COEF from coefficient lane 0
      w = DPU_NOP;
      w.ld_en = 1'b1; w.ld = '{src: SRC_CF0, ra: '0}; w.ld_addr = R_HB_COEF;
      cf[0] = h;
      issue(w);
      // forward step with the old lo shown to the neighbours
      lo_old = dut.u_rf.regs[R_HB0_LO];
      w = DPU_NOP;
      w.en = 1'b1; w.a = '{src: SRC_BUS0, ra: '0}; w.b = '{src: SRC_REG, ra: R_HB_COEF};
      w.c = '{src: SRC_LEFT, ra: '0}; w.mul = MUL_LIVE; w.add = ADD_CP;
      w.wr_en = 1'b1; w.wr_addr = R_HB0_LO;
      w.ld_en = 1'b1; w.ld = '{src: SRC_REG, ra: R_HB0_LO}; w.ld_addr = R_FOLD;
      w.oe_reg = 1'b1; w.o_addr = R_HB0_LO;
      @(negedge clk);
      cfg_in = w; cfg_valid = 1'b1;
      @(posedge clk);                 // word registered, executing now
      #1 bus[0] = x; left_in = lft; cfg_valid = 1'b0;
      #1 chk(nb_out, lo_old, "neighbour sees old lo");
      p = mulq(x, h);
      @(posedge clk); #1;
      chk(out_q, lft + p, "forward result");
      chk(dut.u_rf.regs[R_HB0_LO], lft + p, "lo written");
      chk(dut.u_rf.regs[R_FOLD], lo_old, "fold saved");
      // backward step: kept product plus right neighbour, multiplier idle
      w = DPU_NOP;
      w.en = 1'b1; w.a = '{src: SRC_BUS0, ra: '0}; w.b = '{src: SRC_REG, ra: R_HB_COEF};
      w.c = '{src: SRC_RIGHT, ra: '0}; w.mul = MUL_HOLD; w.add = ADD_CP;
      w.wr_en = 1'b1; w.wr_addr = R_HB0_HI;
      bus[0] = word_t'($urandom); right_in = rgt;
      issue(w);
      #1 chk(out_q, rgt + p, "backward result with kept product");
      chk(dut.u_rf.regs[R_HB0_HI], rgt + p, "hi written");
      // multiplier bypassed: bus lane 0 minus bus lane 2
      bus[0] = word_t'($urandom); bus[2] = word_t'($urandom);
      w = DPU_NOP;
      w.en = 1'b1; w.a = '{src: SRC_BUS0, ra: '0}; w.c = '{src: SRC_BUS2, ra: '0};
      w.mul = MUL_BYPASS; w.add = SUB_PC;
      issue(w);
      #1 chk(out_q, bus[0] - bus[2], "bypassed multiplier, subtract");
      // vertical link B times coefficient lane 1, adder bypassed
      vb_in = word_t'($urandom); cf[1] = word_t'($urandom);
      w = DPU_NOP;
      w.en = 1'b1; w.a = '{src: SRC_VB, ra: '0}; w.b = '{src: SRC_CF1, ra: '0};
      w.mul = MUL_LIVE; w.add = ADD_BYPASS;
      issue(w);
      #1 chk(out_q, mulq(vb_in, cf[1]), "vertical link product");
      chk(nb_out, out_q, "neighbour sees out register");
      // idle cycle keeps the out register
      hi = out_q;
      @(negedge clk); @(negedge clk);
      chk(out_q, hi, "idle holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
