// coef_rom: read-only memory with the FFT twiddle factors and the FIR
// coefficients.
//
// ROM_DEPTH complex words (real part in bits 31:16, imaginary in 15:0), read
// with one cycle of latency (registered output). The table is computed at
// elaboration by a constant function, so the ROM needs no image file.
// Contents, all Q1.15, rounded to nearest, +1.0 clamped to 32767:
//   0..31  twiddles W64^k = cos(2*pi*k/64) - j*sin(2*pi*k/64); the cosine
//          is a 14-term Taylor series, sin(x) = cos(x - pi/2)
//   32..35 halfband coefficients h0..h3 (h7-k = hk): an 8-tap lowpass with
//          cut-off at a quarter of the sample rate, sinc(t/2)/2 with
//          t = n - 3.5 under a Hamming window, scaled to unit DC gain
//   40..48 matched-filter coefficients m0..m8 (m17-k = mk): an 18-tap
//          Gaussian exp(-((n-8.5)/3)^2/2) scaled to unit DC gain
//   others zero.
// The document says only that a ROM holds the FIR coefficients and the
// twiddle factors; the two filter shapes are example values of this design.
module coef_rom
  import sdr_pkg::*;
#(
  parameter int DEPTH = ROM_DEPTH
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output cplx_t                    rd
);

  localparam real PI = 3.14159265358979323846;

  localparam int HB_U [4] = '{-169, -750, 3170, 14133};
  localparam int MF_U [9] = '{79, 192, 418, 814, 1418, 2212, 3087, 3855, 4309};

  typedef logic [2*DW-1:0] rom_t [DEPTH];

  function automatic real cos_series(input real x);
    real term = 1.0, sum = 1.0;
    for (int n = 1; n < 14; n++) begin
      term = -term * x * x / ((2.0 * n - 1.0) * (2.0 * n));
      sum += term;
    end
    return sum;
  endfunction

  function automatic word_t q15(input real v);
    int i = int'(v * 32768.0);
    if (i > 32767)  i = 32767;
    if (i < -32768) i = -32768;
    return word_t'(i);
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    real  ang;
    for (int k = 0; k < DEPTH; k++) r[k] = '0;
    for (int k = 0; k < FFT_N / 2; k++) begin
      ang = 2.0 * PI * k / FFT_N;
      r[ROM_TW_BASE + k] = {q15(cos_series(ang)), q15(-cos_series(ang - PI / 2.0))};
    end
    for (int k = 0; k < 4; k++) r[ROM_HB_BASE + k] = {word_t'(HB_U[k]), word_t'(0)};
    for (int k = 0; k < 9; k++) r[ROM_MF_BASE + k] = {word_t'(MF_U[k]), word_t'(0)};
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk)
    rd <= cplx_t'(ROM[addr]);

endmodule
