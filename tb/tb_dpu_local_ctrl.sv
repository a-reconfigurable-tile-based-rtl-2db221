// tb_dpu_local_ctrl: the control word presented with cfg_valid must appear
// registered one cycle later, a no-operation word must replace it when
// cfg_valid is low, and the register read addresses must follow the word.
module tb_dpu_local_ctrl;
  import sdr_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, cfg_valid, busy;
  dpu_cfg_t      cfg_in, cfg_q;
  logic [RA-1:0] ra_a, ra_b, ra_c, ra_l;
  int checks = 0, failures = 0;

  dpu_local_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", s, got, exp);
    end
  endtask

  initial begin
    dpu_cfg_t w, exp_q;
    cfg_valid = 1'b0; cfg_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_q = DPU_NOP;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      w = dpu_cfg_t'({$urandom, $urandom});
      cfg_in = w;
      cfg_valid = $urandom_range(1);
      @(posedge clk);
      exp_q = cfg_valid ? w : DPU_NOP;
      #1;
      chk(64'(cfg_q), 64'(exp_q), "registered word");
      chk(64'(ra_a), 64'(exp_q.a.ra), "ra_a");
      chk(64'(ra_b), 64'(exp_q.b.ra), "ra_b");
      chk(64'(ra_c), 64'(exp_q.c.ra), "ra_c");
      chk(64'(ra_l), 64'(exp_q.ld.ra), "ra_l");
      chk(64'(busy), 64'(exp_q.en | exp_q.wr_en | exp_q.ld_en), "busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
