// tile_array: the tile-based datapath, nine DPUs in two rows.
//
// DPUs 0..3 form the top row (T0..T3), DPUs 4..8 the bottom row (B0..B4).
// Inside each row every DPU sees its left and right neighbour, so data can
// travel left-to-right and right-to-left; the row ends see zero.
// Dedicated vertical links join the rows:
//   bottom Bj, link A: Tmin(j,3)      (straight down; B4 hangs under T3)
//   bottom Bj, link B: T((j+2) mod 4) (crossed link, feeds the FFT products)
//   top    Tj, link A: B(j+1)         (T3 reads B4 where the FIR chain folds)
//   top    Tj, link B: Bj
// All DPUs share the 4-lane data bus and the 2-lane coefficient bus from the
// global memories. Each DPU gets its own control word; out_q exposes every
// DPU's out register so results can be written to memory.
// Two rows of 4 and 5 DPUs with row links and top-to-bottom connections
// follow the document; which tiles the vertical links join is this design's
// choice, made so that the FIR and FFT mappings fit.
module tile_array
  import sdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_valid,
  input  dpu_cfg_t cfg   [N_DPU],
  input  word_t    bus   [4],
  input  word_t    cf    [2],
  output word_t    out_q [N_DPU],
  output logic     busy
);

  word_t nb   [N_DPU];
  logic  bsy  [N_DPU];
  word_t l_in [N_DPU], r_in [N_DPU], a_in [N_DPU], b_in [N_DPU];

  always_comb begin
    for (int j = 0; j < N_TOP; j++) begin
      l_in[j] = (j > 0)         ? nb[j-1] : '0;
      r_in[j] = (j < N_TOP - 1) ? nb[j+1] : '0;
      a_in[j] = nb[N_TOP + j + 1];
      b_in[j] = nb[N_TOP + j];
    end
    for (int j = 0; j < N_BOT; j++) begin
      l_in[N_TOP+j] = (j > 0)         ? nb[N_TOP+j-1] : '0;
      r_in[N_TOP+j] = (j < N_BOT - 1) ? nb[N_TOP+j+1] : '0;
      a_in[N_TOP+j] = nb[(j < N_TOP) ? j : N_TOP-1];
      b_in[N_TOP+j] = nb[(j + 2) % N_TOP];
    end
  end

  for (genvar i = 0; i < N_DPU; i++) begin : g_dpu
    dpu u_dpu (
      .clk, .rst_n, .cfg_valid, .cfg_in(cfg[i]),
      .bus, .cf,
      .left_in(l_in[i]), .right_in(r_in[i]), .va_in(a_in[i]), .vb_in(b_in[i]),
      .nb_out(nb[i]), .out_q(out_q[i]), .busy(bsy[i])
    );
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < N_DPU; i++) busy |= bsy[i];
  end

endmodule
