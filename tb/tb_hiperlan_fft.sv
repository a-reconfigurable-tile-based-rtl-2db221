// tb_hiperlan_fft: the HiperLAN/2 demodulation workload on the full-size
// engine: four 64-point FFTs of consecutive OFDM symbols in the input
// buffer, back to back. Symbol 0 is a single tone (its energy must land in
// one bin), the others are random. Every bin is compared with the
// fixed-point DIF model and with the exact DFT; the cycles per symbol must
// fit the 4 us symbol period at an 80 MHz clock (320 cycles).
module tb_hiperlan_fft;
  import sdr_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n, fe_we, cmd_valid, cmd_ready, busy, done;
  logic [7:0] fe_addr, res_raddr;
  cplx_t      fe_data, res_rdata;
  cmd_t       cmd;
  op_e        cur_op;
  int checks = 0, failures = 0;

  sdr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string s);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  task automatic run_cmd(input cmd_t c, output int cycles);
    @(negedge clk);
    cmd = c; cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 1'b0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
  endtask

  task automatic read_ram(input int a, output cplx_t v);
    @(negedge clk) res_raddr = 8'(a);
    @(posedge clk) #1 v = res_rdata;
  endtask

  initial begin
    cplx_t x [4][64];
    cplx_t y [64];
    cplx_t got;
    int cyc, peak;
    real e, maxe, mag, best;
    rst_n = 1'b0; fe_we = 1'b0; fe_addr = '0; fe_data = '0;
    cmd_valid = 1'b0; cmd = '0; res_raddr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int s = 0; s < 4; s++)
      for (int n = 0; n < 64; n++) begin
        if (s == 0) begin
          x[s][n].re = word_t'(int'(300.0 * $cos(2.0 * 3.14159265358979 * 5 * n / 64.0)));
          x[s][n].im = word_t'(int'(300.0 * $sin(2.0 * 3.14159265358979 * 5 * n / 64.0)));
        end else begin
          x[s][n].re = word_t'($signed(32'($urandom_range(398))) - 199);
          x[s][n].im = word_t'($signed(32'($urandom_range(398))) - 199);
        end
        @(negedge clk);
        fe_we = 1'b1; fe_addr = 8'(64 * s + n); fe_data = x[s][n];
      end
    @(negedge clk) fe_we = 1'b0;

    for (int s = 0; s < 4; s++) begin
      run_cmd('{op: OP_FFT, src_ram: 1'b0, bank: 1'b0, decim: 1'b0,
                src_base: 8'(64 * s), dst_base: 8'd0, count: 8'd0}, cyc);
      chk(cyc, 217, "cycles per FFT");
      chk(int'(cyc + 1 <= 320), 1, "FFT fits a 4 us symbol at 80 MHz");
      fft64(x[s], y);
      maxe = 0.0; best = 0.0; peak = -1;
      for (int k = 0; k < 64; k++) begin
        read_ram(k, got);
        chk(got.re, y[k].re, $sformatf("symbol %0d bin %0d re", s, k));
        chk(got.im, y[k].im, $sformatf("symbol %0d bin %0d im", s, k));
        e = dft_err(x[s], k, got);
        if (e > maxe) maxe = e;
        mag = real'(got.re) * got.re + real'(got.im) * got.im;
        if (mag > best) begin best = mag; peak = k; end
      end
      chk(int'(maxe < 64.0 * 64.0), 1, "close to the exact DFT");
      if (s == 0) chk(peak, 5, "tone lands in bin 5");
      $display("symbol %0d: %0d cycles, worst squared error against the DFT %0.1f", s, cyc, maxe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
