// Shared types and constants of the binary signed-digit (BSD) floating-point butterfly.
//
// A BSD significand digit takes the values -1, 0, +1 and is held as two bits: a posibit
// (positive weight) and a negabit (negative weight); the digit value is pos - neg. A whole
// significand is therefore two bit vectors, pos and neg, with value pos - neg, and its sign is
// embedded: there is no separate sign bit. Exponents are two's complement after the IEEE bias
// has been removed.
//
// Formats (value of each):
//   bsd_fp_t   24-digit significand, (pos - neg) * 2^(exp-23)    operands A, B and results
//   booth_fp_t twiddle significand in modified Booth form, 26 binary positions, each position
//              a sign/magnitude pair (neg = sign, pos = magnitude) as in the partial-product
//              table of the multiplier; value = sum(digit_p * 2^p) * 2^(exp-23)
//   bsd_prod_t 32-digit redundant product kept by the multiplier,
//              (pos - neg) * 2^(exp-27)
//
// The 24/32-digit sizes and the radix-4 Booth form of the twiddle follow the design; the
// 10-bit exponent width and the zero flag are this implementation's choices.
package bsd_fp_pkg;

  localparam int SIG_DIGITS  = 24;               // single precision significand
  localparam int BOOTH_POS   = 26;               // 13 radix-4 Booth digits
  localparam int PROD_DIGITS = 32;               // product digits passed to the adder
  localparam int EXP_W       = 10;               // two's complement exponent width
  localparam logic signed [EXP_W-1:0] EXP_ZERO = -(2 ** (EXP_W - 1)); // exponent of zero

  typedef struct packed {
    logic signed [EXP_W-1:0]  exp;
    logic [SIG_DIGITS-1:0]    neg;
    logic [SIG_DIGITS-1:0]    pos;
  } bsd_fp_t;

  typedef struct packed {
    logic signed [EXP_W-1:0]  exp;
    logic [BOOTH_POS-1:0]     neg;   // digit sign
    logic [BOOTH_POS-1:0]     pos;   // digit magnitude
  } booth_fp_t;

  typedef struct packed {
    logic signed [EXP_W-1:0]  exp;
    logic [PROD_DIGITS-1:0]   neg;
    logic [PROD_DIGITS-1:0]   pos;
  } bsd_prod_t;

  // Complex operand of the butterfly.
  typedef struct packed {
    bsd_fp_t re;
    bsd_fp_t im;
  } bsd_cplx_t;

  typedef struct packed {
    booth_fp_t re;
    booth_fp_t im;
  } booth_cplx_t;

endpackage
