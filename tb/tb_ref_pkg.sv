// tb_ref_pkg: fixed-point reference models shared by the workload
// testbenches: the Q1.15 truncating multiply, the example FIR coefficients,
// a direct-form FIR on a sample history, and a radix-2 DIF FFT with the same
// rounding as the datapath, plus a floating-point DFT bin for comparison.
package tb_ref_pkg;
  import sdr_pkg::*;

  localparam int HBU [4] = '{-169, -750, 3170, 14133};
  localparam int MFU [9] = '{79, 192, 418, 814, 1418, 2212, 3087, 3855, 4309};

  function automatic word_t mulq(input word_t a, input word_t b);
    logic signed [31:0] f = 32'(a) * 32'(b);
    return word_t'(f >>> 15);
  endfunction

  function automatic word_t q15(input real x);
    int v = int'(x * 32768.0);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return word_t'(v);
  endfunction

  // symmetric coefficient k of the halfband (8 taps) or matched (18 taps) filter
  function automatic word_t coef(input bit matched, input int k);
    if (matched) return word_t'(MFU[k < 9 ? k : 17 - k]);
    return word_t'(HBU[k < 4 ? k : 7 - k]);
  endfunction

  // y[n] for the sample stream x, from n-taps+1 (missing samples are zero)
  function automatic cplx_t fir(input bit matched, input cplx_t x [], input int n);
    int taps = matched ? 18 : 8;
    cplx_t y = '0;
    for (int k = 0; k < taps; k++)
      if (n - k >= 0) begin
        y.re += mulq(coef(matched, k), x[n-k].re);
        y.im += mulq(coef(matched, k), x[n-k].im);
      end
    return y;
  endfunction

  function automatic int bitrev6(input int v);
    int r = 0;
    for (int i = 0; i < 6; i++) if (v & (1 << i)) r |= 1 << (5 - i);
    return r;
  endfunction

  // 64-point DIF FFT with the datapath's arithmetic; result in natural order
  function automatic void fft64(input cplx_t x [64], output cplx_t y [64]);
    cplx_t v [64];
    cplx_t a, b;
    word_t dr, di, wr, wi;
    int h, o, p, q;
    real ang;
    v = x;
    for (int s = 0; s < 6; s++) begin
      h = 32 >> s;
      for (int j = 0; j < 32; j++) begin
        o = j % h;
        p = (j / h) * 2 * h + o;
        q = p + h;
        ang = 2.0 * 3.14159265358979 * (o << s) / 64.0;
        wr = q15($cos(ang));
        wi = q15(-$sin(ang));
        a = v[p]; b = v[q];
        v[p].re = a.re + b.re;
        v[p].im = a.im + b.im;
        dr = a.re - b.re;
        di = a.im - b.im;
        v[q].re = mulq(dr, wr) - mulq(di, wi);
        v[q].im = mulq(dr, wi) + mulq(di, wr);
      end
    end
    for (int i = 0; i < 64; i++) y[bitrev6(i)] = v[i];
  endfunction

  // squared distance between a result bin and the exact DFT bin
  function automatic real dft_err(input cplx_t x [64], input int k, input cplx_t got);
    real sre = 0.0, sim = 0.0, ang;
    for (int n = 0; n < 64; n++) begin
      ang = -2.0 * 3.14159265358979 * n * k / 64.0;
      sre += x[n].re * $cos(ang) - x[n].im * $sin(ang);
      sim += x[n].re * $sin(ang) + x[n].im * $cos(ang);
    end
    return (got.re - sre) * (got.re - sre) + (got.im - sim) * (got.im - sim);
  endfunction

endpackage
