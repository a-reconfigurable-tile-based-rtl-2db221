// tb_tile_array: checks the links between the nine DPUs and a pipelined
// stream of FFT butterflies through the array.
// Links: each DPU first receives a distinct value, then all DPUs copy their
// left, right, vertical-A or vertical-B input; the copies are compared with
// the link map (row neighbours, Bj <- T min(j,3) and T (j+2) mod 4,
// Tj <- B(j+1) and Bj). Butterflies: control words for the FFT mapping are
// applied every cycle while random inputs and twiddles stream in; the sums
// and the rotated differences are compared with a reference computed here.
module tb_tile_array;
  import sdr_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, cfg_valid, busy;
  dpu_cfg_t cfg   [N_DPU];
  word_t    bus   [4];
  word_t    cf    [2];
  word_t    out_q [N_DPU];
  int checks = 0, failures = 0;

  tile_array dut (.*);

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

  function automatic dpu_cfg_t word(input src_e a, input src_e b, input src_e c,
                                    input mul_e m, input add_e ad);
    dpu_cfg_t w = DPU_NOP;
    w.en = 1'b1;
    w.a = '{src: a, ra: '0}; w.b = '{src: b, ra: '0}; w.c = '{src: c, ra: '0};
    w.mul = m; w.add = ad;
    return w;
  endfunction

  // expected source tile of each link, -1 for a row end
  function automatic int link(input int i, input src_e s);
    bit top = (i < N_TOP);
    int j = top ? i : i - N_TOP;
    int n = top ? N_TOP : N_BOT;
    int base = top ? 0 : N_TOP;
    case (s)
      SRC_LEFT:  return (j > 0) ? base + j - 1 : -1;
      SRC_RIGHT: return (j < n - 1) ? base + j + 1 : -1;
      SRC_VA:    return top ? N_TOP + j + 1 : ((j < 4) ? j : 3);
      default:   return top ? N_TOP + j : (j + 2) % 4;
    endcase
  endfunction

  // present one set of words; they execute in the next cycle; return after it
  task automatic step(input dpu_cfg_t w [N_DPU]);
    @(negedge clk);
    cfg = w; cfg_valid = 1'b1;
    @(negedge clk);
    cfg_valid = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    dpu_cfg_t w [N_DPU];
    word_t val [N_DPU];
    src_e  links [4] = '{SRC_LEFT, SRC_RIGHT, SRC_VA, SRC_VB};
    int    src;
    cfg_valid = 1'b0; cfg = '{default: DPU_NOP};
    bus = '{default: '0}; cf = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    foreach (links[l]) begin
      for (int k = 0; k < N_DPU; k++) begin
        w = '{default: DPU_NOP};
        w[k] = word(SRC_BUS0, SRC_ZERO, SRC_ZERO, MUL_BYPASS, ADD_BYPASS);
        val[k] = word_t'($urandom);
        bus[0] = val[k];
        step(w);
        chk(out_q[k], val[k], "initial value");
      end
      for (int k = 0; k < N_DPU; k++)
        w[k] = word(links[l], SRC_ZERO, SRC_ZERO, MUL_BYPASS, ADD_BYPASS);
      step(w);
      for (int k = 0; k < N_DPU; k++) begin
        src = link(k, links[l]);
        chk(out_q[k], (src < 0) ? word_t'(0) : val[src],
            $sformatf("tile %0d link %s", k, links[l].name()));
      end
    end

    // pipelined butterflies
    begin
      localparam int NB = 24;
      word_t ar [NB], ai [NB], br [NB], bi [NB], wr [NB], wi [NB];
      word_t dr, di;
      for (int n = 0; n < NB; n++) begin
        ar[n] = word_t'($urandom); ai[n] = word_t'($urandom);
        br[n] = word_t'($urandom); bi[n] = word_t'($urandom);
        wr[n] = word_t'($urandom); wi[n] = word_t'($urandom);
      end
      w = '{default: DPU_NOP};
      w[0] = word(SRC_BUS0, SRC_ZERO, SRC_BUS2, MUL_BYPASS, SUB_PC);
      w[1] = word(SRC_BUS1, SRC_ZERO, SRC_BUS3, MUL_BYPASS, SUB_PC);
      w[2] = word(SRC_BUS0, SRC_ZERO, SRC_BUS2, MUL_BYPASS, ADD_CP);
      w[3] = word(SRC_BUS1, SRC_ZERO, SRC_BUS3, MUL_BYPASS, ADD_CP);
      w[4] = word(SRC_VA, SRC_CF0, SRC_ZERO, MUL_LIVE, ADD_BYPASS);
      w[5] = word(SRC_VA, SRC_CF1, SRC_LEFT, MUL_PIPE, SUB_CP);
      w[6] = word(SRC_VB, SRC_CF1, SRC_ZERO, MUL_LIVE, ADD_BYPASS);
      w[7] = word(SRC_VB, SRC_CF0, SRC_LEFT, MUL_PIPE, ADD_CP);
      @(negedge clk);
      cfg = w; cfg_valid = 1'b1;
      @(posedge clk);              // words registered; execution starts
      for (int n = 0; n < NB + 2; n++) begin
        #1;
        if (n < NB) begin
          bus[0] = ar[n]; bus[1] = ai[n]; bus[2] = br[n]; bus[3] = bi[n];
        end
        if (n >= 1 && n <= NB) begin
          cf[0] = wr[n-1]; cf[1] = wi[n-1];
        end
        @(posedge clk);
        #1;
        if (n < NB) begin
          chk(out_q[2], ar[n] + br[n], "sum re");
          chk(out_q[3], ai[n] + bi[n], "sum im");
        end
        if (n >= 2) begin
          dr = ar[n-2] - br[n-2];
          di = ai[n-2] - bi[n-2];
          chk(out_q[5], mulq(dr, wr[n-2]) - mulq(di, wi[n-2]), "diff*W re");
          chk(out_q[7], mulq(dr, wi[n-2]) + mulq(di, wr[n-2]), "diff*W im");
        end
      end
      cfg_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
