// Self-checking testbench of the three-operand BSD floating-point adder. X and Y are random
// 32-digit BSD products (any digit pattern, so leading digits may cancel), A a random 24-digit
// BSD number, exponents spread so that every alignment case occurs (A above, inside and far
// below the products, either product the larger, zero operands). The result X + Y +- A is
// compared in real arithmetic; the allowed error is one unit of the 24-digit result plus the
// digits of A that fall below the last digit of the product sum, which the adder truncates
// (at most 2^(E_big - 29)). When the two products cancel exactly, A is placed no lower than
// the product sum's last digit, so the result must be A to within rounding.
module tb_bsd_fp_add3;
  import bsd_fp_pkg::*;
  import tb_fp_util::*;
  bsd_prod_t x, y;
  bsd_fp_t   a, r;
  logic      sub_a;
  int checks = 0, failures = 0;

  bsd_fp_add3 dut (.x, .y, .a, .sub_a, .r);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, g, sc;
    int  eb;
    for (int i = 0; i < 20000; i++) begin
      x.pos = $urandom; x.neg = $urandom; y.pos = $urandom; y.neg = $urandom;
      a.pos = 24'($urandom); a.neg = 24'($urandom);
      x.exp = EXP_W'(int'($urandom % 17) - 8);
      y.exp = EXP_W'(int'($urandom % 17) - 8);
      a.exp = EXP_W'(int'($urandom % 81) - 40);
      sub_a = 1'($urandom);
      if (i % 50 == 1) x.exp = EXP_ZERO;
      if (i % 50 == 2) y.exp = EXP_ZERO;
      if (i % 50 == 3) begin x.exp = EXP_ZERO; y.exp = EXP_ZERO; end
      if (i % 50 == 4) a.exp = EXP_ZERO;
      if (i % 50 == 5) begin                      // X + Y = 0, A within the frame
        y = x; y.pos = x.neg; y.neg = x.pos;
        a.exp = EXP_W'(int'(x.exp) - 6 + int'($urandom % 14));
      end
      #1;
      e  = prod2r(x) + prod2r(y) + (sub_a ? -bsd2r(a) : bsd2r(a));
      g  = bsd2r(r);
      eb = (x.exp == EXP_ZERO) ? int'(y.exp) : (y.exp == EXP_ZERO) ? int'(x.exp) :
           (int'(x.exp) > int'(y.exp)) ? int'(x.exp) : int'(y.exp);
      sc = (x.exp == EXP_ZERO && y.exp == EXP_ZERO) ? 0.0 : pow2(eb - 28);
      checks++;
      if (rabs(g - e) > rabs(e) * pow2(-22) + sc) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d got %g exp %g", i, g, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
