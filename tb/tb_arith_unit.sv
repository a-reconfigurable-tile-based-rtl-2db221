// tb_arith_unit: checks every multiplier and adder mode of the arithmetic
// unit against a reference computed here, including the kept product
// (MUL_HOLD reuses it with the multiplier idle, MUL_PIPE delays it a cycle).
module tb_arith_unit;
  import sdr_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en;
  mul_e  mul;
  add_e  add;
  word_t a, b, c, r, prod_q;
  int checks = 0, failures = 0;

  arith_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mulq(input word_t x, input word_t y);
    logic signed [31:0] f = 32'(x) * 32'(y);
    return word_t'(f >>> 15);
  endfunction

  function automatic word_t addm(input add_e m, input word_t cc, input word_t p);
    case (m)
      ADD_BYPASS: return p;
      ADD_CP:     return cc + p;
      SUB_CP:     return cc - p;
      default:    return p - cc;
    endcase
  endfunction

  task automatic chk(input word_t got, input word_t exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, got, exp);
    end
  endtask

  initial begin
    word_t kept, pexp;
    en = 1'b0; mul = MUL_BYPASS; add = ADD_BYPASS; a = '0; b = '0; c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    kept = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = word_t'($urandom); b = word_t'($urandom); c = word_t'($urandom);
      mul = mul_e'($urandom_range(3));
      add = add_e'($urandom_range(3));
      en  = ($urandom_range(3) != 0);
      #1;
      case (mul)
        MUL_BYPASS: pexp = a;
        MUL_LIVE:   pexp = mulq(a, b);
        default:    pexp = kept;
      endcase
      chk(r, addm(add, c, pexp), $sformatf("r step %0d mode %0d/%0d", i, mul, add));
      @(posedge clk);
      if (en && (mul == MUL_LIVE || mul == MUL_PIPE)) kept = mulq(a, b);
      #1 chk(prod_q, kept, "kept product");
    end
    // a FIR-style pair: multiply once, reuse with the multiplier idle
    @(negedge clk);
    en = 1'b1; mul = MUL_LIVE; add = ADD_CP; a = 16'sd1000; b = 16'sd16384; c = 16'sd7;
    #1 chk(r, 16'sd507, "live product plus c");
    @(negedge clk);
    mul = MUL_HOLD; a = 16'sd3; b = 16'sd3; c = -16'sd10;
    #1 chk(r, 16'sd490, "held product plus c");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
