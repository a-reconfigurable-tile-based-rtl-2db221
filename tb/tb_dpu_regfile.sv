// tb_dpu_regfile: writes random words through both write ports, reads them
// back on all read ports against a model, and checks reset and the rule that
// port 0 (arithmetic result) wins over port 1 on the same register.
module tb_dpu_regfile;
  import sdr_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [RA-1:0] ra_a, ra_b, ra_c, ra_o, ra_l, wa0, wa1;
  word_t         rd_a, rd_b, rd_c, rd_o, rd_l, wd0, wd1;
  logic          we0, we1;
  word_t         model [NREG];
  int checks = 0, failures = 0;

  dpu_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  initial begin
    we0 = 0; we1 = 0; wa0 = '0; wa1 = '0; wd0 = '0; wd1 = '0;
    ra_a = '0; ra_b = '0; ra_c = '0; ra_o = '0; ra_l = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREG; i++) begin
      ra_a = RA'(i); #1 chk(rd_a, '0, "after reset");
      model[i] = '0;
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we0 = $urandom_range(1); we1 = $urandom_range(1);
      wa0 = RA'($urandom); wa1 = RA'($urandom);
      wd0 = word_t'($urandom); wd1 = word_t'($urandom);
      if (i % 10 == 0) wa1 = wa0;
      @(posedge clk);
      if (we1) model[wa1] = wd1;
      if (we0) model[wa0] = wd0;
      #1;
      ra_a = RA'($urandom); ra_b = RA'($urandom); ra_c = RA'($urandom);
      ra_o = RA'($urandom); ra_l = RA'($urandom);
      #1;
      chk(rd_a, model[ra_a], "port a");
      chk(rd_b, model[ra_b], "port b");
      chk(rd_c, model[ra_c], "port c");
      chk(rd_o, model[ra_o], "port o");
      chk(rd_l, model[ra_l], "port l");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
