// Floating-point Fused-Dot-Product-Add over BSD operands.
//
// Computes W*B + s*W'*B' + A and, in parallel, A - (W*B + s*W'*B'), where s = -1 when
// neg_second is set (the real part of a complex product needs W_re*B_re - W_im*B_im). Two
// redundant constant multipliers feed two three-operand adders: one adds A, the other
// subtracts it and has its result negated by swapping negabits and posibits. Negating a BSD
// operand is free, so the second product's sign and both outputs cost no extra latency.
// The structure (two multipliers followed by a three-operand adder, two outputs + and -)
// is the design's; using two complete adders for the two outputs is this implementation's
// reading of "almost no extra area". Purely combinational.
module fdpa
  import bsd_fp_pkg::*;
(
  input  booth_fp_t w0,
  input  bsd_fp_t   b0,
  input  booth_fp_t w1,
  input  bsd_fp_t   b1,
  input  logic      neg_second,
  input  bsd_fp_t   a,
  output bsd_fp_t   plus,    // A + (W*B +- W'*B')
  output bsd_fp_t   minus    // A - (W*B +- W'*B')
);
  bsd_prod_t p0, p1, p1s;
  bsd_fp_t   dmin;

  bsd_fp_mul u_mul0 (.b(b0), .w(w0), .p(p0));
  bsd_fp_mul u_mul1 (.b(b1), .w(w1), .p(p1));

  always_comb begin
    p1s = p1;
    if (neg_second) begin
      p1s.pos = p1.neg;
      p1s.neg = p1.pos;
    end
  end

  bsd_fp_add3 u_add_p (.x(p0), .y(p1s), .a(a), .sub_a(1'b0), .r(plus));
  bsd_fp_add3 u_add_m (.x(p0), .y(p1s), .a(a), .sub_a(1'b1), .r(dmin));

  always_comb begin
    minus     = dmin;
    minus.pos = dmin.neg;
    minus.neg = dmin.pos;
  end
endmodule
