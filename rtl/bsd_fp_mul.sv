// Redundant floating-point constant multiplier: BSD operand B times a Booth-coded twiddle W.
//
// Significands: 13 partial products, one per radix-4 Booth digit of W (12 groups plus the
// final transfer that stands for the hidden bit), each of 25 BSD digits and placed two
// positions apart. They are summed by a tree of twelve carry-limited BSD adders in four
// levels (13 -> 7 -> 4 -> 2 -> 1). The exact product has 51 digits (positions 50..0); the
// product is never converted to non-redundant form. Only positions 50..19 (32 digits) are
// passed on: positions 45..0 are fractions, 22 and 21 are the guard and round positions,
// and 20 and 19 cover the carries that the later addition can bring into them. Positions
// 18..0 are dropped, as in the design.
//
// Exponent: e_B + e_W. A zero operand (all digits zero) gives a zero product whose exponent
// is forced to EXP_ZERO so that it never wins the exponent comparison of the adder (an
// implementation choice; the design does not discuss zero operands).
//
// Interface: combinational, product value = (pos - neg) * 2^(exp - 27).
// Internal adders work on a 52-digit frame; the two most significant digits of the frame
// are always zero for normalised inputs (|B|, |W| < 2), which the testbench checks through
// the value of the result.
module bsd_fp_mul
  import bsd_fp_pkg::*;
(
  input  bsd_fp_t   b,
  input  booth_fp_t w,
  output bsd_prod_t p
);
  localparam int FW  = 52;                 // frame width in digits
  localparam int NPP = BOOTH_POS / 2;      // 13 partial products
  localparam int LSB = 19;                 // lowest product position kept

  logic [FW-1:0] pp_pos [NPP];
  logic [FW-1:0] pp_neg [NPP];

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [SIG_DIGITS:0] pos_i, neg_i;
    bsd_ppg #(.N(SIG_DIGITS)) u_ppg (
      .b_pos (b.pos), .b_neg (b.neg),
      .w1_neg(w.neg[2*i+1]), .w1_pos(w.pos[2*i+1]),
      .w0_neg(w.neg[2*i]),   .w0_pos(w.pos[2*i]),
      .pp_pos(pos_i), .pp_neg(neg_i)
    );
    // negabit/posibit pairs (1,1) are zero digits; they are kept as generated
    assign pp_pos[i] = FW'(pos_i) << (2 * i);
    assign pp_neg[i] = FW'(neg_i) << (2 * i);
  end

  // Reduction tree: level sources and sinks, 12 adders.
  logic [FW-1:0] l1_pos [6], l1_neg [6];
  logic [FW-1:0] l2_pos [3], l2_neg [3];
  logic [FW-1:0] l3_pos [2], l3_neg [2];
  logic [FW-1:0] l4_pos,     l4_neg;

  for (genvar k = 0; k < 6; k++) begin : g_l1
    logic [FW:0] sp, sn;
    bsd_adder #(.N(FW)) u_add (.x_pos(pp_pos[2*k]), .x_neg(pp_neg[2*k]),
                               .y_pos(pp_pos[2*k+1]), .y_neg(pp_neg[2*k+1]),
                               .s_pos(sp), .s_neg(sn));
    assign l1_pos[k] = sp[FW-1:0];
    assign l1_neg[k] = sn[FW-1:0];
  end
  for (genvar k = 0; k < 3; k++) begin : g_l2
    logic [FW:0] sp, sn;
    bsd_adder #(.N(FW)) u_add (.x_pos(l1_pos[2*k]), .x_neg(l1_neg[2*k]),
                               .y_pos(l1_pos[2*k+1]), .y_neg(l1_neg[2*k+1]),
                               .s_pos(sp), .s_neg(sn));
    assign l2_pos[k] = sp[FW-1:0];
    assign l2_neg[k] = sn[FW-1:0];
  end
  begin : g_l3
    logic [FW:0] sp0, sn0, sp1, sn1;
    bsd_adder #(.N(FW)) u_add0 (.x_pos(l2_pos[0]), .x_neg(l2_neg[0]),
                                .y_pos(l2_pos[1]), .y_neg(l2_neg[1]),
                                .s_pos(sp0), .s_neg(sn0));
    bsd_adder #(.N(FW)) u_add1 (.x_pos(l2_pos[2]), .x_neg(l2_neg[2]),
                                .y_pos(pp_pos[NPP-1]), .y_neg(pp_neg[NPP-1]),
                                .s_pos(sp1), .s_neg(sn1));
    assign l3_pos[0] = sp0[FW-1:0];
    assign l3_neg[0] = sn0[FW-1:0];
    assign l3_pos[1] = sp1[FW-1:0];
    assign l3_neg[1] = sn1[FW-1:0];
  end
  begin : g_l4
    logic [FW:0] sp, sn;
    bsd_adder #(.N(FW)) u_add (.x_pos(l3_pos[0]), .x_neg(l3_neg[0]),
                               .y_pos(l3_pos[1]), .y_neg(l3_neg[1]),
                               .s_pos(sp), .s_neg(sn));
    assign l4_pos = sp[FW-1:0];
    assign l4_neg = sn[FW-1:0];
  end

  logic b_zero, w_zero;
  assign b_zero = ~|(b.pos ^ b.neg);
  assign w_zero = ~|w.pos;

  always_comb begin
    p.pos = l4_pos[LSB +: PROD_DIGITS];
    p.neg = l4_neg[LSB +: PROD_DIGITS];
    if (b_zero || w_zero) begin
      p.pos = '0;
      p.neg = '0;
      p.exp = EXP_ZERO;
    end else begin
      p.exp = b.exp + w.exp;
    end
  end
endmodule
