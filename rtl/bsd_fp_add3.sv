// Three-operand redundant floating-point adder: R = X + Y + A (or X + Y - A).
//
// X and Y are 32-digit BSD products from the multipliers, A is a 24-digit BSD operand.
//   1. Exponent comparison of X and Y: E_big = max(E_X, E_Y); the significand with the
//      smaller exponent is shifted right by |E_X - E_Y| (two guard digits are kept below
//      the 32 product digits) and a first BSD adder forms SUM = X + Y (35 digits).
//   2. Alignment of A without a left shifter: A is placed 30 digits further left by wiring
//      and then shifted right by dA = E_big - E_A + 30 into a 60-digit frame, so that A may
//      be up to 30 positions more significant than SUM. A second BSD adder forms SUM + A.
//      Subtraction of A only swaps A's negabits and posibits (BSD has its sign embedded, so
//      there is no sign logic).
//   3. Termination: the redundant sum is collapsed to two's complement, its leading one is
//      found with the divide-and-conquer leading-zero detector, the magnitude is shifted
//      left, rounded to nearest-even on the guard, round and lower bits, and written back as
//      a 24-digit BSD significand (magnitude in the posibits for a positive result, in the
//      negabits for a negative one).
// Steps 1 and 2 follow the design. Two choices are this implementation's: if A is more than
// 30 positions above SUM, SUM is shifted right instead (the design only covers the 30-digit
// window), and the termination goes through a carry-propagating subtraction; the design
// normalises and rounds in BSD form with methods it cites but does not give. Exponent
// overflow and underflow are not handled; zero operands carry the exponent EXP_ZERO. Digits
// of A below the last digit of SUM are truncated without a sticky bit (an error below
// 2^(E_big - 29)); it is only visible when the two products cancel exactly.
//
// Purely combinational. Result value = (pos - neg) * 2^(exp - 23).
module bsd_fp_add3
  import bsd_fp_pkg::*;
(
  input  bsd_prod_t x,
  input  bsd_prod_t y,
  input  bsd_fp_t   a,
  input  logic      sub_a,
  output bsd_fp_t   r
);
  localparam int F1  = PROD_DIGITS + 2;   // 34-digit frame of the first addition
  localparam int F2  = 60;                // frame of the second addition
  localparam int PRE = 30;                // wired left extension of A
  localparam int AOF = F2 - SIG_DIGITS - PRE; // = 6: offset of A relative to SUM's LSB

  // ---------------- step 1: align X, Y and add ----------------
  logic signed [EXP_W+1:0] ex, ey, ebig, dxy;
  logic [F1-1:0] xa_pos, xa_neg, ya_pos, ya_neg;
  logic [F1:0]   s1_pos, s1_neg;
  logic          xy_zero;

  always_comb begin
    logic [F1-1:0] xf_pos, xf_neg, yf_pos, yf_neg;
    ex  = (EXP_W+2)'(x.exp);
    ey  = (EXP_W+2)'(y.exp);
    dxy = ex - ey;
    xf_pos = {x.pos, 2'b00};
    xf_neg = {x.neg, 2'b00};
    yf_pos = {y.pos, 2'b00};
    yf_neg = {y.neg, 2'b00};
    xa_pos = xf_pos; xa_neg = xf_neg;
    ya_pos = yf_pos; ya_neg = yf_neg;
    if (dxy >= 0) begin
      ebig = ex;
      ya_pos = (dxy >= F1) ? '0 : yf_pos >> dxy;
      ya_neg = (dxy >= F1) ? '0 : yf_neg >> dxy;
    end else begin
      ebig = ey;
      xa_pos = (-dxy >= F1) ? '0 : xf_pos >> (-dxy);
      xa_neg = (-dxy >= F1) ? '0 : xf_neg >> (-dxy);
    end
    xy_zero = (x.exp == EXP_ZERO) && (y.exp == EXP_ZERO);
  end

  bsd_adder #(.N(F1)) u_add1 (.x_pos(xa_pos), .x_neg(xa_neg), .y_pos(ya_pos), .y_neg(ya_neg),
                              .s_pos(s1_pos), .s_neg(s1_neg));

  // ---------------- step 2: align A against SUM and add ----------------
  logic signed [EXP_W+2:0] eref, da, ds, ea;
  logic [F2-1:0] sa_pos, sa_neg, aa_pos, aa_neg;
  logic [F2:0]   s2_pos, s2_neg;

  always_comb begin
    logic [F2-1:0] af_pos, af_neg, sf_pos, sf_neg;
    ea = (EXP_W+3)'(a.exp);
    // reference exponent of the frame: its LSB weighs 2^(eref - 29)
    if (xy_zero)                     eref = ea;
    else if (ea - ebig > PRE + AOF - 6) eref = ea - PRE;
    else                             eref = (EXP_W+3)'(ebig);
    ds = eref - (EXP_W+3)'(ebig);                  // right shift of SUM (normally 0)
    da = eref - ea + PRE;                          // right shift of A
    sf_pos = F2'(s1_pos);
    sf_neg = F2'(s1_neg);
    sa_pos = (ds >= F2) ? '0 : sf_pos >> ds;
    sa_neg = (ds >= F2) ? '0 : sf_neg >> ds;
    af_pos = {(sub_a ? a.neg : a.pos), {(F2-SIG_DIGITS){1'b0}}};
    af_neg = {(sub_a ? a.pos : a.neg), {(F2-SIG_DIGITS){1'b0}}};
    aa_pos = (da >= F2) ? '0 : af_pos >> da;
    aa_neg = (da >= F2) ? '0 : af_neg >> da;
  end

  bsd_adder #(.N(F2)) u_add2 (.x_pos(sa_pos), .x_neg(sa_neg), .y_pos(aa_pos), .y_neg(aa_neg),
                              .s_pos(s2_pos), .s_neg(s2_neg));

  // ---------------- step 3: normalise and round ----------------
  localparam int VW = F2 + 2;             // 62-bit two's complement value
  logic signed [VW-1:0] v;
  logic [VW-1:0]        mag;
  logic                 sgn, found;
  logic [5:0]           nz;
  logic [63:0]          norm;

  assign v   = signed'(VW'(s2_pos)) - signed'(VW'(s2_neg));
  assign sgn = v[VW-1];
  assign mag = sgn ? VW'(-v) : VW'(v);

  lzd #(.W(64)) u_lzd (.x({mag, 2'b00}), .found(found), .zeros(nz));

  always_comb begin
    logic [SIG_DIGITS:0] sig;
    logic g, rb, st, up;
    logic signed [EXP_W+2:0] e;
    norm = {mag, 2'b00} << nz;
    g   = norm[63-SIG_DIGITS];
    rb  = norm[62-SIG_DIGITS];
    st  = |norm[61-SIG_DIGITS:0];
    up  = g & (rb | st | norm[64-SIG_DIGITS]);
    sig = {1'b0, norm[63 -: SIG_DIGITS]} + (SIG_DIGITS+1)'(up);
    // leading one at bit (VW-1-nz) of mag; LSB of mag weighs 2^(eref-29)
    e   = eref - 29 + (EXP_W+3)'(VW - 1) - (EXP_W+3)'(nz);
    if (sig[SIG_DIGITS]) begin
      sig = sig >> 1;
      e   = e + 1;
    end
    if (!found) begin
      r.exp = EXP_ZERO;
      r.pos = '0;
      r.neg = '0;
    end else begin
      r.exp = EXP_W'(e);
      r.pos = sgn ? '0 : sig[SIG_DIGITS-1:0];
      r.neg = sgn ? sig[SIG_DIGITS-1:0] : '0;
    end
  end
endmodule
