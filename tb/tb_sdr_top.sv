// tb_sdr_top: end-to-end test of the reconfigurable FIR/FFT engine at its
// default sizes.
//
// The front end fills the input buffer with random complex samples. The test
// then runs the sequence a dual-standard receiver would: coefficient load,
// halfband filter (bank 0), matched filter on the halfband output taken from
// the RAM, a 64-point FFT, the halfband filter again on the continuing stream
// with decimation (its state must have survived the FFT), and the second
// halfband bank. Every result is read back from the RAM and compared with
// fixed-point reference models written here (direct-form FIR, radix-2 DIF
// FFT); the FFT is also compared with a floating-point DFT within a
// tolerance. Cycle counts check the rates: 2 cycles per sample for the
// halfband filter, 4 for the matched filter and one butterfly per cycle.
// Each mechanism (load, both filters, both banks, cascade from RAM,
// decimation, FFT, switch between standards) is counted and must occur, and
// so is each arithmetic-unit configuration the tiles use: multiplier bypassed,
// adder bypassed, and a product held for reuse while the multiplier is idle.
module tb_sdr_top;
  import sdr_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fe_we;
  logic [7:0]  fe_addr;
  cplx_t       fe_data;
  logic        cmd_valid;
  cmd_t        cmd;
  logic        cmd_ready, busy, done;
  op_e         cur_op;
  logic [7:0]  res_raddr;
  cplx_t       res_rdata;

  int checks = 0, failures = 0;
  int n_load = 0, n_hb = 0, n_mf = 0, n_fft = 0, n_bank1 = 0, n_cascade = 0;
  int n_decim = 0, n_switch = 0;
  // per tile: products held from the previous cycle (multiplier idle),
  // multiplier-only words (adder bypassed), adder-only words (multiplier
  // bypassed) and fresh products
  int n_hold[N_DPU], n_mul_only[N_DPU], n_add_only[N_DPU], n_live[N_DPU];
  op_e last_op = OP_IDLE;

  sdr_top dut (.*);

  // watch the control word each tile executes
  for (genvar i = 0; i < N_DPU; i++) begin : g_probe
    initial begin
      n_hold[i] = 0; n_mul_only[i] = 0; n_add_only[i] = 0; n_live[i] = 0;
    end
    always @(posedge clk) begin
      automatic dpu_cfg_t w = dut.u_array.g_dpu[i].u_dpu.cfg;
      if (rst_n && w.en) begin
        if (w.mul == MUL_HOLD) n_hold[i]++;
        if (w.mul == MUL_LIVE || w.mul == MUL_PIPE) n_live[i]++;
        if (w.mul != MUL_BYPASS && w.add == ADD_BYPASS) n_mul_only[i]++;
        if (w.mul == MUL_BYPASS && w.add != ADD_BYPASS) n_add_only[i]++;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference models ----------------
  localparam int HBU [4] = '{-169, -750, 3170, 14133};
  localparam int MFU [9] = '{79, 192, 418, 814, 1418, 2212, 3087, 3855, 4309};

  function automatic word_t mulq(input word_t a, input word_t b);
    logic signed [31:0] f;
    f = 32'(a) * 32'(b);
    return word_t'(f >>> 15);
  endfunction

  function automatic word_t hb_coef(input int k);
    return word_t'(HBU[k < 4 ? k : 7 - k]);
  endfunction
  function automatic word_t mf_coef(input int k);
    return word_t'(MFU[k < 9 ? k : 17 - k]);
  endfunction

  // sample histories of the filters (index 0 = newest)
  word_t hb_hist_re [2][8], hb_hist_im [2][8];
  word_t mf_hist_re [18],   mf_hist_im [18];

  function automatic word_t fir_out(input word_t h [], input int taps, input word_t c_of_k []);
    word_t acc = '0;
    for (int k = 0; k < taps; k++) acc += mulq(c_of_k[k], h[k]);
    return acc;
  endfunction

  cplx_t ibuf_model [256];
  cplx_t ram_model  [256];

  // ---------------- helpers ----------------
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_cmd(input cmd_t c, output int cycles);
    @(negedge clk);
    cmd       = c;
    cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      if (cur_op != OP_IDLE && cur_op != last_op) begin
        if ((cur_op == OP_FFT) != (last_op == OP_FFT) && last_op != OP_IDLE &&
            last_op != OP_LOAD)
          n_switch++;
        last_op = cur_op;
      end
    end while (!done);
  endtask

  task automatic read_ram(input int a, output cplx_t v);
    @(negedge clk);
    res_raddr = 8'(a);
    @(posedge clk);
    #1 v = res_rdata;
  endtask

  // ---------------- FIR checks ----------------
  task automatic run_hb(input bit bank, input int src, input int dst, input int n,
                        input bit decim);
    cmd_t c;
    int cyc, wr;
    word_t cre [8], cim [8];
    word_t yre, yim;
    cplx_t got;
    for (int k = 0; k < 8; k++) cre[k] = hb_coef(k);
    c = '{op: OP_HB, src_ram: 1'b0, bank: bank, decim: decim,
          src_base: 8'(src), dst_base: 8'(dst), count: 8'(n)};
    run_cmd(c, cyc);
    check("halfband cycles", cyc, 2 * n + 5);
    wr = 0;
    for (int i = 0; i < n; i++) begin
      for (int k = 7; k > 0; k--) begin
        hb_hist_re[bank][k] = hb_hist_re[bank][k-1];
        hb_hist_im[bank][k] = hb_hist_im[bank][k-1];
      end
      hb_hist_re[bank][0] = ibuf_model[src + i].re;
      hb_hist_im[bank][0] = ibuf_model[src + i].im;
      yre = fir_out(hb_hist_re[bank], 8, cre);
      yim = fir_out(hb_hist_im[bank], 8, cre);
      if (!decim || i % 2 == 0) begin
        read_ram(dst + wr, got);
        check($sformatf("hb re %0d", i), got.re, yre);
        check($sformatf("hb im %0d", i), got.im, yim);
        ram_model[dst + wr] = '{re: yre, im: yim};
        wr++;
        if (decim) n_decim++;
      end
    end
    n_hb++;
    if (bank) n_bank1++;
  endtask

  task automatic run_mf(input int src, input int dst, input int n);
    cmd_t c;
    int cyc;
    word_t cm [18];
    word_t yre, yim;
    cplx_t got;
    for (int k = 0; k < 18; k++) cm[k] = mf_coef(k);
    c = '{op: OP_MF, src_ram: 1'b1, bank: 1'b0, decim: 1'b0,
          src_base: 8'(src), dst_base: 8'(dst), count: 8'(n)};
    run_cmd(c, cyc);
    check("matched cycles", cyc, 4 * n + 5);
    for (int i = 0; i < n; i++) begin
      for (int k = 17; k > 0; k--) begin
        mf_hist_re[k] = mf_hist_re[k-1];
        mf_hist_im[k] = mf_hist_im[k-1];
      end
      mf_hist_re[0] = ram_model[src + i].re;
      mf_hist_im[0] = ram_model[src + i].im;
      yre = fir_out(mf_hist_re, 18, cm);
      yim = fir_out(mf_hist_im, 18, cm);
      read_ram(dst + i, got);
      check($sformatf("mf re %0d", i), got.re, yre);
      check($sformatf("mf im %0d", i), got.im, yim);
    end
    n_mf++;
    n_cascade++;
  endtask

  // ---------------- FFT check ----------------
  function automatic int bitrev6(input int v);
    int r = 0;
    for (int i = 0; i < 6; i++) if (v & (1 << i)) r |= 1 << (5 - i);
    return r;
  endfunction

  function automatic word_t q15(input real x);
    int v = int'(x * 32768.0);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return word_t'(v);
  endfunction

  task automatic run_fft(input int src, input int dst);
    cmd_t c;
    int cyc, p, q, h, o, k, maxerr;
    cplx_t x [64];
    cplx_t a, b, got;
    word_t dr, di, wr, wi;
    real ang, sre, sim, e;
    for (int i = 0; i < 64; i++) x[i] = ibuf_model[src + i];
    c = '{op: OP_FFT, src_ram: 1'b0, bank: 1'b0, decim: 1'b0,
          src_base: 8'(src), dst_base: 8'(dst), count: 8'd0};
    run_cmd(c, cyc);
    check("fft cycles", cyc, 6 * 32 + 5 * 4 + 5);
    for (int s = 0; s < 6; s++) begin
      h = 32 >> s;
      for (int j = 0; j < 32; j++) begin
        o = j % h;
        p = (j / h) * 2 * h + o;
        q = p + h;
        k = o << s;
        ang = 2.0 * 3.14159265358979 * k / 64.0;
        wr = q15($cos(ang));
        wi = q15(-$sin(ang));
        a = x[p]; b = x[q];
        x[p].re = a.re + b.re;
        x[p].im = a.im + b.im;
        dr = a.re - b.re;
        di = a.im - b.im;
        x[q].re = mulq(dr, wr) - mulq(di, wi);
        x[q].im = mulq(dr, wi) + mulq(di, wr);
      end
    end
    maxerr = 0;
    for (int i = 0; i < 64; i++) begin
      read_ram(dst + bitrev6(i), got);
      check($sformatf("fft re %0d", bitrev6(i)), got.re, x[i].re);
      check($sformatf("fft im %0d", bitrev6(i)), got.im, x[i].im);
      // independent floating-point DFT of bin bitrev6(i)
      sre = 0.0; sim = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = -2.0 * 3.14159265358979 * n * bitrev6(i) / 64.0;
        sre += ibuf_model[src + n].re * $cos(ang) - ibuf_model[src + n].im * $sin(ang);
        sim += ibuf_model[src + n].re * $sin(ang) + ibuf_model[src + n].im * $cos(ang);
      end
      e = (got.re - sre) * (got.re - sre) + (got.im - sim) * (got.im - sim);
      if (e > maxerr) maxerr = int'(e);
    end
    checks++;
    if (maxerr > 64 * 64) begin
      failures++;
      $display("FAIL fft against floating-point DFT: squared error %0d", maxerr);
    end
    n_fft++;
  endtask

  // ---------------- sequence ----------------
  initial begin
    cmd_t c;
    int cyc;
    rst_n = 1'b0; fe_we = 1'b0; fe_addr = '0; fe_data = '0;
    cmd_valid = 1'b0; cmd = '0; res_raddr = '0;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 8; k++) begin hb_hist_re[b][k] = '0; hb_hist_im[b][k] = '0; end
    for (int k = 0; k < 18; k++) begin mf_hist_re[k] = '0; mf_hist_im[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // front end fills the input buffer
    for (int i = 0; i < 256; i++) begin
      ibuf_model[i].re = word_t'($signed(32'($urandom_range(398))) - 199);
      ibuf_model[i].im = word_t'($signed(32'($urandom_range(398))) - 199);
      if (i >= 64) begin
        ibuf_model[i].re = ibuf_model[i].re * 16;
        ibuf_model[i].im = ibuf_model[i].im * 16;
      end
      @(negedge clk);
      fe_we = 1'b1; fe_addr = 8'(i); fe_data = ibuf_model[i];
    end
    @(negedge clk) fe_we = 1'b0;

    c = '{op: OP_LOAD, default: '0};
    run_cmd(c, cyc);
    check("load cycles", cyc, 17 + 5);
    n_load++;

    run_hb(1'b0, 64, 0, 32, 1'b0);       // Bluetooth: halfband, bank 0
    run_mf(0, 32, 32);                   // matched filter on the halfband output
    run_fft(0, 64);                      // HiperLAN/2: 64-point FFT
    run_hb(1'b0, 96, 0, 32, 1'b1);       // back to Bluetooth, decimating
    run_hb(1'b1, 128, 16, 20, 1'b0);     // second halfband bank

    check("load happened", int'(n_load > 0), 1);
    check("halfband happened", int'(n_hb > 0), 1);
    check("matched filter happened", int'(n_mf > 0), 1);
    check("fft happened", int'(n_fft > 0), 1);
    check("bank 1 used", int'(n_bank1 > 0), 1);
    check("cascade from RAM", int'(n_cascade > 0), 1);
    check("decimation", int'(n_decim > 0), 1);
    check("standard switches", int'(n_switch >= 2), 1);
    begin
      int h = 0, m = 0, a = 0, l = 0;
      for (int i = 0; i < N_DPU; i++) begin
        h += n_hold[i]; m += n_mul_only[i]; a += n_add_only[i]; l += n_live[i];
      end
      check("held products reused", int'(h > 0), 1);
      check("adder bypassed", int'(m > 0), 1);
      check("multiplier bypassed", int'(a > 0), 1);
      $display("tile words: held=%0d fresh=%0d mul-only=%0d add-only=%0d", h, l, m, a);
    end
    $display("mechanisms: load=%0d hb=%0d mf=%0d fft=%0d bank1=%0d cascade=%0d decim=%0d switch=%0d",
             n_load, n_hb, n_mf, n_fft, n_bank1, n_cascade, n_decim, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
