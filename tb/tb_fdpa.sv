// Self-checking testbench of the fused dot-product adder: random IEEE single operands are
// converted to BSD / Booth form; both outputs A + (W*B +- W'*B') and A - (W*B +- W'*B') are
// compared with real arithmetic, for both signs of the second product, within 2^-21 of the
// operand scale.
module tb_fdpa;
  import bsd_fp_pkg::*;
  import tb_fp_util::*;
  logic [31:0] fw0, fb0, fw1, fb1, fa;
  booth_fp_t w0, w1;
  bsd_fp_t   b0, b1, a, plus, minus;
  logic      neg_second;
  int checks = 0, failures = 0;

  ieee_to_booth c0 (.f(fw0), .w(w0));
  ieee_to_booth c1 (.f(fw1), .w(w1));
  ieee_to_bsd   c2 (.f(fb0), .b(b0));
  ieee_to_bsd   c3 (.f(fb1), .b(b1));
  ieee_to_bsd   c4 (.f(fa),  .b(a));
  fdpa dut (.w0, .b0, .w1, .b1, .neg_second, .a, .plus, .minus);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d, sc;
    for (int i = 0; i < 5000; i++) begin
      fw0 = r2f(rnd_real(-3, 1)); fw1 = r2f(rnd_real(-3, 1));
      fb0 = r2f(rnd_real(-6, 6)); fb1 = r2f(rnd_real(-6, 6)); fa = r2f(rnd_real(-6, 6));
      neg_second = 1'($urandom);
      #1;
      d  = f2r(fw0) * f2r(fb0) + (neg_second ? -1.0 : 1.0) * f2r(fw1) * f2r(fb1);
      sc = rabs(f2r(fa)) + rabs(f2r(fw0) * f2r(fb0)) + rabs(f2r(fw1) * f2r(fb1));
      checks += 2;
      if (rabs(bsd2r(plus) - (f2r(fa) + d)) > sc * pow2(-21)) begin
        failures++;
        if (failures < 10) $display("FAIL plus got %g exp %g", bsd2r(plus), f2r(fa) + d);
      end
      if (rabs(bsd2r(minus) - (f2r(fa) - d)) > sc * pow2(-21)) begin
        failures++;
        if (failures < 10) $display("FAIL minus got %g exp %g", bsd2r(minus), f2r(fa) - d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
