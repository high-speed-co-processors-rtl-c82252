// Self-checking testbench of the three format converters. IEEE single to BSD and IEEE single
// to Booth form must keep the value exactly (zero maps to the zero exponent); BSD to IEEE is
// driven with random redundant significands (any posibit/negabit pattern, including ones
// that cancel in the leading digits) and must return the exact value whenever it fits in 24
// bits, which it always does for a 24-digit BSD significand.
module tb_fp_convert;
  import bsd_fp_pkg::*;
  import tb_fp_util::*;
  logic [31:0] f, fo;
  bsd_fp_t     b, bi;
  booth_fp_t   w;
  int checks = 0, failures = 0;

  ieee_to_bsd   u_tb (.f(f), .b(b));
  ieee_to_booth u_tw (.f(f), .w(w));
  bsd_to_ieee   u_fi (.b(bi), .f(fo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      f = r2f(rnd_real(-30, 30));
      if (i == 0) f = 0;
      if (i == 1) f = 32'h3f800000;
      bi.pos = 24'($urandom); bi.neg = 24'($urandom);
      bi.exp = EXP_W'(int'($urandom % 41) - 20);
      if (bi.pos == bi.neg) bi.pos = bi.pos + 1'b1;
      #1;
      checks += 3;
      if (bsd2r(b) != f2r(f) || ((f == 0) != (b.exp == EXP_ZERO))) begin
        failures++;
        if (failures < 10) $display("FAIL ieee_to_bsd %h", f);
      end
      if (f != 0 && booth2r(w) != f2r(f)) begin
        failures++;
        if (failures < 10) $display("FAIL ieee_to_booth %h got %g", f, booth2r(w));
      end
      if (f2r(fo) != bsd2r(bi)) begin
        failures++;
        if (failures < 10) $display("FAIL bsd_to_ieee got %g exp %g", f2r(fo), bsd2r(bi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
