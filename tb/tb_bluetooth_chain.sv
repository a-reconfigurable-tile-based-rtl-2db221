// tb_bluetooth_chain: the Bluetooth channel-filter workload on the full-size
// engine. 256 complex samples at the 20 Msample/s front-end rate go through
// two decimating halfband stages (bank 0 from the input buffer, bank 1 from
// the RAM) down to 5 Msample/s, then through the 18-tap matched filter.
// Every output is compared with a direct-form fixed-point model, and the
// cycle count is compared with 2 cycles per halfband sample and 4 per
// matched-filter sample plus 5 cycles per command; the clock rate that the
// chain needs at 20 Msample/s is printed.
module tb_bluetooth_chain;
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
    cplx_t x [] = new [256];
    cplx_t s1 [] = new [128];
    cplx_t s2 [] = new [64];
    cplx_t y, got;
    int cyc, total;
    rst_n = 1'b0; fe_we = 1'b0; fe_addr = '0; fe_data = '0;
    cmd_valid = 1'b0; cmd = '0; res_raddr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < 256; i++) begin
      x[i].re = word_t'($signed(32'($urandom_range(8000))) - 4000);
      x[i].im = word_t'($signed(32'($urandom_range(8000))) - 4000);
      @(negedge clk);
      fe_we = 1'b1; fe_addr = 8'(i); fe_data = x[i];
    end
    @(negedge clk) fe_we = 1'b0;

    run_cmd('{op: OP_LOAD, default: '0}, cyc);
    total = 0;
    // halfband 1: 256 samples from the input buffer, every second output kept
    run_cmd('{op: OP_HB, src_ram: 1'b0, bank: 1'b0, decim: 1'b1,
              src_base: 8'd0, dst_base: 8'd0, count: 8'd0}, cyc);
    chk(cyc, 2 * 256 + 5, "halfband 1 cycles");
    total += cyc;
    // halfband 2: 128 samples from the RAM, every second output kept
    run_cmd('{op: OP_HB, src_ram: 1'b1, bank: 1'b1, decim: 1'b1,
              src_base: 8'd0, dst_base: 8'd128, count: 8'd128}, cyc);
    chk(cyc, 2 * 128 + 5, "halfband 2 cycles");
    total += cyc;
    // matched filter: 64 samples from the RAM
    run_cmd('{op: OP_MF, src_ram: 1'b1, bank: 1'b0, decim: 1'b0,
              src_base: 8'd128, dst_base: 8'd192, count: 8'd64}, cyc);
    chk(cyc, 4 * 64 + 5, "matched filter cycles");
    total += cyc;

    // reference chain
    for (int i = 0; i < 128; i++) s1[i] = fir(1'b0, x, 2 * i);
    for (int i = 0; i < 64; i++)  s2[i] = fir(1'b0, s1, 2 * i);
    for (int i = 0; i < 64; i++) begin
      y = fir(1'b1, s2, i);
      read_ram(192 + i, got);
      chk(got.re, y.re, $sformatf("chain output %0d re", i));
      chk(got.im, y.im, $sformatf("chain output %0d im", i));
    end
    for (int i = 0; i < 64; i++) begin
      read_ram(128 + i, got);
      chk(got.re, s2[i].re, "after halfband 2 re");
      chk(got.im, s2[i].im, "after halfband 2 im");
    end
    // 256 samples at 20 Msample/s last 12.8 us
    $display("Bluetooth chain: %0d cycles for 12.8 us of input -> %0.1f MHz needed",
             total, real'(total) / 12.8);
    chk(int'(total <= 1024 + 15), 1, "within 2 x 256 + 2 x 128 + 4 x 64 cycles plus command overhead");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
