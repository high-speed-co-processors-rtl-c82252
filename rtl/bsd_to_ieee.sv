// Reverse conversion of a BSD floating-point number to IEEE-754 single precision.
//
// The significand is collapsed by the carry-propagating subtraction F = r - R (posibits
// minus negabits); the sign of F is the result's sign. A -1 propagating into the most
// significant digit can leave the magnitude with its leading one below the hidden-bit
// position, so the magnitude is renormalised with the leading-zero detector and the exponent
// adjusted; the bits are exact, no rounding is needed for a 24-digit input. The bias is
// added back. Exponents outside the single-precision range are not handled. This is the
// conversion done once, at the very end of an FFT. Purely combinational.
module bsd_to_ieee
  import bsd_fp_pkg::*;
(
  input  bsd_fp_t     b,
  output logic [31:0] f
);
  logic signed [SIG_DIGITS+1:0] v;
  logic [SIG_DIGITS+1:0]        mag;
  logic                         found;
  logic [4:0]                   nz;
  logic [31:0]                  norm;

  assign v   = signed'((SIG_DIGITS+2)'(b.pos)) - signed'((SIG_DIGITS+2)'(b.neg));
  assign mag = v[SIG_DIGITS+1] ? -v : v;

  lzd #(.W(32)) u_lzd (.x({mag[SIG_DIGITS-1:0], 8'h00}), .found(found), .zeros(nz));

  always_comb begin
    logic signed [EXP_W+1:0] e;
    norm = {mag[SIG_DIGITS-1:0], 8'h00} << nz;
    e    = (EXP_W+2)'(b.exp) - (EXP_W+2)'(nz) + 127;
    if (!found || b.exp == EXP_ZERO) f = 32'd0;
    else f = {v[SIG_DIGITS+1], e[7:0], norm[30:8]};
  end
endmodule
