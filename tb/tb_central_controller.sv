// tb_central_controller: runs each command and records, cycle by cycle, the
// controller's state, memory addresses and write strobes; the record is
// compared with the schedule worked out here: 17 load steps with their ROM
// addresses, 2 (halfband) or 4 (matched filter) steps per sample with the
// sample address and the delayed writes (decimation included), and the FFT's
// 6 stages of 32 butterflies with their read, twiddle and write addresses,
// the 4-cycle gaps between stages and the bit-reversed final writes.
module tb_central_controller;
  import sdr_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cmd_valid, cmd_ready, st_valid, bus_from_ram, we0, we1, cap_re, busy, done;
  cmd_t       cmd;
  ctl_state_t st;
  logic [7:0] ibuf_raddr0, ibuf_raddr1, ram_raddr0, ram_raddr1, waddr0, waddr1;
  logic [5:0] rom_addr;
  wsel_e      wsel0;
  op_e        cur_op;
  int checks = 0, failures = 0;

  central_controller dut (.*);

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

  typedef struct {
    logic       stv;
    ctl_state_t st;
    logic [7:0] ra0, ra1, rr0, rr1, wa0, wa1;
    logic       fr, w0, w1, cap;
    logic [5:0] rom;
    wsel_e      sel;
  } rec_t;
  rec_t rec [400];
  int   ncyc;

  // hand over a command and record every cycle until done
  task automatic run(input cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1'b1;
    chk(int'(cmd_ready), 1, "ready when idle");
    @(posedge clk);
    #1 cmd_valid = 1'b0;
    ncyc = 0;
    while (!done) begin
      rec[ncyc] = '{stv: st_valid, st: st, ra0: ibuf_raddr0, ra1: ibuf_raddr1,
                    rr0: ram_raddr0, rr1: ram_raddr1, wa0: waddr0, wa1: waddr1,
                    fr: bus_from_ram, w0: we0, w1: we1, cap: cap_re, rom: rom_addr,
                    sel: wsel0};
      ncyc++;
      @(posedge clk);
      #1;
    end
  endtask

  function automatic int bitrev6(input int v);
    int r = 0;
    for (int i = 0; i < 6; i++) if (v & (1 << i)) r |= 1 << (5 - i);
    return r;
  endfunction

  initial begin
    cmd_t c;
    int nw, p, q, h, o, u, cyc0;
    cmd_valid = 1'b0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // coefficient load
    c = '{op: OP_LOAD, default: '0};
    run(c);
    chk(ncyc, 17 + 4, "load length");
    for (int s = 0; s < 17; s++) begin
      chk(rec[s].stv, 1, "load state valid");
      chk(rec[s].st.step, s, "load step");
      if (s < 4)       chk(rec[s].rom, ROM_HB_BASE + s, "hb coef rom address");
      else if (s < 13) chk(rec[s].rom, ROM_MF_BASE + s - 4, "mf coef rom address");
    end

    // halfband with decimation: 6 samples from 10, outputs to 50
    c = '{op: OP_HB, src_ram: 1'b0, bank: 1'b1, decim: 1'b1,
          src_base: 8'd10, dst_base: 8'd50, count: 8'd6};
    run(c);
    chk(ncyc, 2 * 6 + 4, "halfband length");
    nw = 0;
    for (int u2 = 0; u2 < ncyc; u2++) begin
      if (u2 < 12) begin
        chk(rec[u2].st.op, OP_HB, "hb op"); chk(rec[u2].st.bank, 1, "hb bank");
        chk(rec[u2].st.step, u2 % 2, "hb step");
        chk(rec[u2].ra0, 10 + u2 / 2, "hb sample address");
      end
      if (u2 >= 2 && u2 < 14 && (u2 - 2) % 2 == 1 && ((u2 - 2) / 2) % 2 == 0) begin
        chk(rec[u2].w0, 1, "hb write strobe");
        chk(rec[u2].wa0, 50 + (u2 - 2) / 4, "hb write address");
        chk(rec[u2].sel, WSEL_HB, "hb write select");
      end else chk(rec[u2].w0, 0, "hb no write");
      if (rec[u2].w0) nw++;
    end
    chk(nw, 3, "hb decimated writes");

    // matched filter from RAM: 5 samples from 100, outputs to 200
    c = '{op: OP_MF, src_ram: 1'b1, bank: 1'b0, decim: 1'b0,
          src_base: 8'd100, dst_base: 8'd200, count: 8'd5};
    run(c);
    chk(ncyc, 4 * 5 + 4, "matched length");
    for (int u2 = 0; u2 < ncyc; u2++) begin
      if (u2 < 20) begin
        chk(rec[u2].st.step, u2 % 4, "mf step");
        chk(rec[u2].rr0, 100 + u2 / 4, "mf sample address");
      end
      if (u2 >= 1 && u2 <= 20) chk(rec[u2].fr, 1, "mf reads RAM");
      chk(rec[u2].cap, u2 >= 2 && (u2 - 2) % 4 == 1 && u2 < 22, "mf real capture");
      chk(rec[u2].w0, u2 >= 2 && (u2 - 2) % 4 == 3 && u2 < 22, "mf write");
      if (rec[u2].w0) chk(rec[u2].wa0, 200 + (u2 - 2) / 4, "mf write address");
    end

    // FFT from the input buffer at 0 to RAM at 0
    c = '{op: OP_FFT, src_ram: 1'b0, bank: 1'b0, decim: 1'b0,
          src_base: 8'd0, dst_base: 8'd0, count: 8'd0};
    run(c);
    chk(ncyc, 6 * 32 + 5 * 4 + 4, "fft length");
    for (int s = 0; s < 6; s++) begin
      h = 32 >> s;
      cyc0 = s * 36;
      for (int j = 0; j < 32; j++) begin
        o = j % h;
        p = (j / h) * 2 * h + o;
        q = p + h;
        u = cyc0 + j;
        if (s == 0) begin
          chk(rec[u].ra0, p, "fft stage 0 read a"); chk(rec[u].ra1, q, "fft stage 0 read b");
        end else begin
          chk(rec[u].rr0, ((s % 2) ? 128 : 192) + p, "fft read a");
          chk(rec[u].rr1, ((s % 2) ? 128 : 192) + q, "fft read b");
          chk(rec[u + 1].fr, 1, "fft data from RAM");
        end
        chk(rec[u + 1].rom, o << s, "twiddle address");
        chk(rec[u + 2].w0, 1, "fft sum write");
        chk(rec[u + 2].sel, WSEL_FFT, "fft sum select");
        chk(rec[u + 4].w1, 1, "fft product write");
        if (s == 5) begin
          chk(rec[u + 2].wa0, bitrev6(p), "fft final sum address");
          chk(rec[u + 4].wa1, bitrev6(q), "fft final product address");
        end else begin
          chk(rec[u + 2].wa0, ((s % 2) ? 192 : 128) + p, "fft sum address");
          chk(rec[u + 4].wa1, ((s % 2) ? 192 : 128) + q, "fft product address");
        end
      end
      if (s < 5)
        for (int g = 32; g < 36; g++) begin
          chk(rec[cyc0 + g + 2].w0, 0, "no write in the stage gap");
          chk(rec[cyc0 + g].stv, 1, "pipeline kept running in the gap");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
