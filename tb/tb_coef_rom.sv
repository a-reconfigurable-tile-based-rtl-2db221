// tb_coef_rom: reads every ROM word and compares it with values computed
// here: the twiddles W64^k from $cos/$sin rounded to Q1.15 (within one LSB,
// +1.0 clamped to 32767), and the halfband and matched-filter coefficients.
module tb_coef_rom;
  import sdr_pkg::*;

  logic       clk = 1'b0;
  logic [5:0] addr;
  cplx_t      rd;
  int checks = 0, failures = 0;

  localparam int HBU [4] = '{-169, -750, 3170, 14133};
  localparam int MFU [9] = '{79, 192, 418, 814, 1418, 2212, 3087, 3855, 4309};

  coef_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_near(input int got, input real exp, input string s);
    real e = exp > 32767.0 ? 32767.0 : exp;
    checks++;
    if (got - e > 1.0 || e - got > 1.0) begin
      failures++;
      $display("FAIL %s: got %0d expected %f", s, got, e);
    end
  endtask

  task automatic chk(input int got, input int exp, input string s);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  initial begin
    real ang;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk) addr = 6'(a);
      @(posedge clk) #1;
      if (a < 32) begin
        ang = 2.0 * 3.14159265358979 * a / 64.0;
        chk_near(rd.re, 32768.0 * $cos(ang), $sformatf("twiddle %0d re", a));
        chk_near(rd.im, -32768.0 * $sin(ang), $sformatf("twiddle %0d im", a));
      end else if (a >= 32 && a < 36) begin
        chk(rd.re, HBU[a - 32], "halfband coefficient"); chk(rd.im, 0, "halfband im");
      end else if (a >= 40 && a < 49) begin
        chk(rd.re, MFU[a - 40], "matched coefficient"); chk(rd.im, 0, "matched im");
      end else begin
        chk(rd, 0, "unused word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
