// Forward conversion of an IEEE-754 single-precision number to the BSD floating-point format.
//
// The exponent loses its bias (two's complement e = biased - 127). The 24-bit significand
// (hidden one restored) is placed, according to the sign bit f_s, either in the negabits
// (R_i = f_i, r_i = 0 when f_s = 1) or in the posibits (R_i = 0, r_i = f_i when f_s = 0):
// a carry-free conversion, as in the design's conversion figure. A zero exponent field (zero
// or subnormal) gives zero with exponent EXP_ZERO; infinities and NaNs are not treated
// specially (implementation choices). Purely combinational.
module ieee_to_bsd
  import bsd_fp_pkg::*;
(
  input  logic [31:0] f,
  output bsd_fp_t     b
);
  logic [SIG_DIGITS-1:0] sig;
  assign sig = {1'b1, f[22:0]};

  always_comb begin
    if (f[30:23] == 8'd0) begin
      b.exp = EXP_ZERO;
      b.pos = '0;
      b.neg = '0;
    end else begin
      b.exp = EXP_W'(signed'({2'b00, f[30:23]}) - 10'sd127);
      b.neg = sig & {SIG_DIGITS{f[31]}};
      b.pos = sig & {SIG_DIGITS{~f[31]}};
    end
  end
endmodule
