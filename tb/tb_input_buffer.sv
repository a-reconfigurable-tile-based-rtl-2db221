// tb_input_buffer: writes random samples, reads them back on both read
// ports with one cycle of latency, and checks that a read of the address
// written in the same cycle returns the old sample.
module tb_input_buffer;
  import sdr_pkg::*;

  logic       clk = 1'b0, we;
  logic [7:0] waddr, raddr0, raddr1;
  cplx_t      wdata, rdata0, rdata1;
  cplx_t      model [256];
  int checks = 0, failures = 0;

  input_buffer dut (.*);

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
    cplx_t old;
    we = 1'b0; waddr = '0; wdata = '0; raddr0 = '0; raddr1 = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = cplx_t'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      raddr0 = 8'($urandom); raddr1 = 8'($urandom);
      we = $urandom_range(1); waddr = raddr0; wdata = cplx_t'($urandom);
      old = model[raddr0];
      @(posedge clk);
      #1;
      chk(rdata0, old, "port 0 (old word on collision)");
      chk(rdata1, (we && raddr1 == raddr0) ? old : model[raddr1], "port 1");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
