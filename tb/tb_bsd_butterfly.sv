// Self-checking testbench of the BSD floating-point butterfly: random complex A, B and
// twiddles on the unit circle, results compared with a real-number reference of A +- B*W.
// Checks the one-cycle latency and counts cases with heavy cancellation.
module tb_bsd_butterfly;
  import bsd_fp_pkg::*;
  import tb_fp_util::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  bsd_cplx_t a, b, x0, x1;
  booth_cplx_t w;
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  bsd_butterfly dut (.clk, .rst_n, .in_valid, .a, .b, .w, .out_valid, .x0, .x1);

  logic [31:0] fa_re, fa_im, fb_re, fb_im, fw_re, fw_im;
  ieee_to_bsd   c0 (.f(fa_re), .b(a.re));
  ieee_to_bsd   c1 (.f(fa_im), .b(a.im));
  ieee_to_bsd   c2 (.f(fb_re), .b(b.re));
  ieee_to_bsd   c3 (.f(fb_im), .b(b.im));
  ieee_to_booth c4 (.f(fw_re), .w(w.re));
  ieee_to_booth c5 (.f(fw_im), .w(w.im));

  task automatic check(string what, real got, real exp, real scale);
    checks++;
    if (rabs(got - exp) > scale * pow2(-21)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %g expected %g", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar, ai, br, bi, wr, wi, th, sc;
    int  t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      th = 6.283185307179586 * real'($urandom % 1024) / 1024.0;
      ar = rnd_real(-4, 4); ai = rnd_real(-4, 4);
      br = rnd_real(-4, 4); bi = rnd_real(-4, 4);
      if (n % 10 == 0) ar = -br;         // provoke cancellation for W = 1
      wr = $cos(th); wi = -$sin(th);
      if (n % 10 == 0) begin wr = 1.0; wi = 0.0; end
      fa_re = r2f(ar); fa_im = r2f(ai); fb_re = r2f(br); fb_im = r2f(bi);
      fw_re = r2f(wr); fw_im = r2f(wi);
      @(negedge clk);
      in_valid = 1;
      t0 = cycles;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || cycles - t0 != 1) begin
        failures++;
        $display("FAIL latency");
      end
      ar = f2r(fa_re); ai = f2r(fa_im); br = f2r(fb_re); bi = f2r(fb_im);
      wr = f2r(fw_re); wi = f2r(fw_im);
      sc = rabs(ar) + rabs(ai) + rabs(br) + rabs(bi);
      check("x0.re", bsd2r(x0.re), ar + (br * wr - bi * wi), sc);
      check("x0.im", bsd2r(x0.im), ai + (br * wi + bi * wr), sc);
      check("x1.re", bsd2r(x1.re), ar - (br * wr - bi * wi), sc);
      check("x1.im", bsd2r(x1.im), ai - (br * wi + bi * wr), sc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
