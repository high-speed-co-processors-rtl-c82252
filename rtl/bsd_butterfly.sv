// Radix-2 decimation-in-time FFT butterfly over BSD floating-point operands.
//
// Outputs X0 = A + B*W and X1 = A - B*W for complex A, B and twiddle W, with
//   (B*W)_re = B_re*W_re - B_im*W_im,  (B*W)_im = B_re*W_im + B_im*W_re.
// Two fused-dot-product-add units compute them: the real one takes W_re, B_re, W_im, B_im and
// A_re, the imaginary one W_im, B_re, W_re, B_im and A_im; each gives the + and - result at
// once, so the butterfly is two FDPAs wide, as in the design. The significands stay in BSD
// form between butterflies; conversion to IEEE format is left to the last FFT stage.
//
// Timing: one register stage at the output (the design's critical path is one FDPA plus a
// register). in_valid is carried to out_valid with the data; synchronous active-low reset
// clears out_valid only (an implementation choice).
module bsd_butterfly
  import bsd_fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  bsd_cplx_t   a,
  input  bsd_cplx_t   b,
  input  booth_cplx_t w,
  output logic        out_valid,
  output bsd_cplx_t   x0,      // A + B*W
  output bsd_cplx_t   x1       // A - B*W
);
  bsd_fp_t re_p, re_m, im_p, im_m;

  fdpa u_fdpa_re (.w0(w.re), .b0(b.re), .w1(w.im), .b1(b.im), .neg_second(1'b1),
                  .a(a.re), .plus(re_p), .minus(re_m));
  fdpa u_fdpa_im (.w0(w.im), .b0(b.re), .w1(w.re), .b1(b.im), .neg_second(1'b0),
                  .a(a.im), .plus(im_p), .minus(im_m));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
    if (in_valid) begin
      x0.re <= re_p;
      x0.im <= im_p;
      x1.re <= re_m;
      x1.im <= im_m;
    end
  end
endmodule
