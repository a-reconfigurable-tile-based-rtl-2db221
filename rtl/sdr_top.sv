// sdr_top: the reconfigurable FIR/FFT engine for a Bluetooth / HiperLAN/2
// software-defined-radio receiver.
//
// Blocks: input buffer (samples from the front end), central controller
// (state machine), configuration unit (controller state -> one control word
// per tile), the 9-DPU tile array, the coefficient/twiddle ROM and the result
// RAM. The global data bus carries two complex words per cycle, read from the
// input buffer or from the RAM; the coefficient bus carries one complex ROM
// word. Two RAM write ports take the array's results: port 0 the FIR output or
// the butterfly sum, port 1 the butterfly's rotated difference.
//
// Interface: the front end writes samples with fe_we/fe_addr/fe_data. A
// command (cmd_t) is handed over with cmd_valid/cmd_ready; done pulses when
// the command has finished and its results are in the RAM, which is read
// through res_raddr/res_rdata (one cycle latency). Rates: halfband filter
// 2 cycles per complex sample, matched filter 4, FFT one butterfly per cycle
// (6*32 butterflies plus 4 idle cycles between stages).
// The block structure follows the document's system diagram; bus widths,
// memory sizes, the command format and the fixed-point format are this
// design's choices.
module sdr_top
  import sdr_pkg::*;
#(
  parameter int MEM_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fe_we,
  input  logic [$clog2(MEM_DEPTH)-1:0] fe_addr,
  input  cplx_t                        fe_data,
  input  logic                         cmd_valid,
  input  cmd_t                         cmd,
  output logic                         cmd_ready,
  output logic                         busy,
  output logic                         done,
  output op_e                          cur_op,
  input  logic [$clog2(MEM_DEPTH)-1:0] res_raddr,
  output cplx_t                        res_rdata
);

  localparam int AW = $clog2(MEM_DEPTH);

  logic          st_valid, cfg_valid, bus_from_ram, array_busy, ctrl_busy;
  ctl_state_t    st;
  logic [AW-1:0] ib_ra0, ib_ra1, rm_ra0, rm_ra1, waddr0, waddr1;
  logic [5:0]    rom_addr;
  logic          we0, we1, cap_re;
  wsel_e         wsel0;
  cplx_t         ib_rd0, ib_rd1, rm_rd0, rm_rd1, rom_rd, rd0, rd1, wd0, wd1;
  dpu_cfg_t      cfg   [N_DPU];
  word_t         bus   [4];
  word_t         cf    [2];
  word_t         out_q [N_DPU];
  word_t         re_hold;

  input_buffer #(.DEPTH(MEM_DEPTH)) u_ibuf (
    .clk, .we(fe_we), .waddr(fe_addr), .wdata(fe_data),
    .raddr0(ib_ra0), .raddr1(ib_ra1), .rdata0(ib_rd0), .rdata1(ib_rd1)
  );

  central_controller #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready,
    .st_valid, .st,
    .ibuf_raddr0(ib_ra0), .ibuf_raddr1(ib_ra1),
    .ram_raddr0(rm_ra0), .ram_raddr1(rm_ra1),
    .bus_from_ram, .rom_addr,
    .we0, .waddr0, .wsel0, .cap_re, .we1, .waddr1,
    .cur_op, .busy(ctrl_busy), .done
  );

  config_unit u_cu (.st_valid, .st, .cfg_valid, .cfg);

  coef_rom u_rom (.clk, .addr(rom_addr), .rd(rom_rd));

  assign rd0    = bus_from_ram ? rm_rd0 : ib_rd0;
  assign rd1    = bus_from_ram ? rm_rd1 : ib_rd1;
  assign bus[0] = rd0.re;
  assign bus[1] = rd0.im;
  assign bus[2] = rd1.re;
  assign bus[3] = rd1.im;
  assign cf[0]  = rom_rd.re;
  assign cf[1]  = rom_rd.im;

  tile_array u_array (
    .clk, .rst_n, .cfg_valid, .cfg, .bus, .cf, .out_q, .busy(array_busy)
  );

  assign busy = ctrl_busy | array_busy;

  // matched filter: the real output is held until the imaginary one is ready
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      re_hold <= '0;
    else if (cap_re) re_hold <= out_q[0];

  always_comb begin
    unique case (wsel0)
      WSEL_HB:  wd0 = '{re: out_q[0], im: out_q[N_TOP]};
      WSEL_MF:  wd0 = '{re: re_hold,  im: out_q[0]};
      default:  wd0 = '{re: out_q[2], im: out_q[3]};
    endcase
    wd1 = '{re: out_q[N_TOP+1], im: out_q[N_TOP+3]};
  end

  result_ram #(.DEPTH(MEM_DEPTH)) u_ram (
    .clk,
    .we0, .waddr0, .wdata0(wd0),
    .we1, .waddr1, .wdata1(wd1),
    .raddr0(rm_ra0), .raddr1(rm_ra1), .rdata0(rm_rd0), .rdata1(rm_rd1),
    .ext_raddr(res_raddr), .ext_rdata(res_rdata)
  );

  // run-time check, evaluated only while reset is released: the two RAM
  // write ports never hit the same word in one cycle (reported one clock
  // after the collision)
  logic chk_hit_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_hit_q <= 1'b0;
    else begin
      chk_hit_q <= we0 && we1 && waddr0 == waddr1;
      a_write_ports_disjoint: assert (!chk_hit_q);
    end

endmodule
