// Self-checking testbench of the redundant floating-point multiplier. Operands come from
// IEEE single values; the 32-digit product must equal B*W within the weight of the 19
// dropped positions (2^-27 of the product's unit), and zero operands must give zero.
module tb_bsd_fp_mul;
  import bsd_fp_pkg::*;
  import tb_fp_util::*;
  logic [31:0] fb, fw;
  bsd_fp_t   b;
  booth_fp_t w;
  bsd_prod_t p;
  int checks = 0, failures = 0;

  ieee_to_bsd   cb (.f(fb), .b(b));
  ieee_to_booth cw (.f(fw), .w(w));
  bsd_fp_mul    dut (.b, .w, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, g;
    for (int i = 0; i < 3000; i++) begin
      fb = r2f(rnd_real(-20, 20));
      fw = r2f(rnd_real(-3, 1));
      if (i == 0) fb = 32'h3fffffff;
      if (i == 1) fw = 32'hbfffffff;
      if (i == 2) fb = 0;
      if (i == 3) fw = 0;
      #1;
      e = f2r(fb) * f2r(fw);
      g = prod2r(p);
      checks++;
      if (rabs(g - e) > rabs(e) * pow2(-26) || ((fb == 0 || fw == 0) && p.exp != EXP_ZERO)) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h got %g exp %g", fb, fw, g, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
