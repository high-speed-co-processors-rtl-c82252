// Conversion of an IEEE-754 single-precision twiddle factor to the Booth-coded format used as
// the constant operand of the BSD multipliers. The bias is removed from the exponent and the
// 24-bit significand (hidden one restored) is recoded into 13 radix-4 Booth digits by
// booth_recoder, the sign being applied to every non-zero digit. Twiddle factors are
// constants, so this conversion runs once, when the twiddle table is filled. A zero exponent
// field gives an all-zero significand. Purely combinational.
module ieee_to_booth
  import bsd_fp_pkg::*;
(
  input  logic [31:0] f,
  output booth_fp_t   w
);
  logic [BOOTH_POS-1:0] wn, wp;
  logic                 zero;

  assign zero = (f[30:23] == 8'd0);

  booth_recoder #(.NBITS(SIG_DIGITS)) u_rec (
    .sign(f[31]), .mag({1'b1, f[22:0]}), .w_neg(wn), .w_pos(wp)
  );

  always_comb begin
    w.exp = zero ? EXP_ZERO : EXP_W'(signed'({2'b00, f[30:23]}) - 10'sd127);
    w.neg = zero ? '0 : wn;
    w.pos = zero ? '0 : wp;
  end
endmodule
