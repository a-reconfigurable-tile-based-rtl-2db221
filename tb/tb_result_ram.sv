// tb_result_ram: random traffic on both write ports and all three read
// ports against a model: one-cycle read latency, old word returned on a
// same-cycle read, port 1 winning when both write ports hit one address.
module tb_result_ram;
  import sdr_pkg::*;

  logic       clk = 1'b0, we0, we1;
  logic [7:0] waddr0, waddr1, raddr0, raddr1, ext_raddr;
  cplx_t      wdata0, wdata1, rdata0, rdata1, ext_rdata;
  cplx_t      model [256];
  int checks = 0, failures = 0;

  result_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input cplx_t got, input cplx_t exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", s, got, exp);
    end
  endtask

  initial begin
    cplx_t e0, e1, ee;
    we0 = 0; we1 = 0; waddr0 = '0; waddr1 = '0; wdata0 = '0; wdata1 = '0;
    raddr0 = '0; raddr1 = '0; ext_raddr = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we0 = 1'b1; waddr0 = 8'(i); wdata0 = cplx_t'($urandom); model[i] = wdata0;
    end
    @(negedge clk) we0 = 1'b0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      we0 = $urandom_range(1); we1 = $urandom_range(1);
      waddr0 = 8'($urandom); waddr1 = (i % 7 == 0) ? waddr0 : 8'($urandom);
      wdata0 = cplx_t'($urandom); wdata1 = cplx_t'($urandom);
      raddr0 = 8'($urandom); raddr1 = (i % 5 == 0) ? waddr1 : 8'($urandom);
      ext_raddr = 8'($urandom);
      e0 = model[raddr0]; e1 = model[raddr1]; ee = model[ext_raddr];
      @(posedge clk);
      #1;
      chk(rdata0, e0, "read port 0");
      chk(rdata1, e1, "read port 1");
      chk(ext_rdata, ee, "external read port");
      if (we0) model[waddr0] = wdata0;
      if (we1) model[waddr1] = wdata1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
