// Fixed-point BSD multiplier: a W-digit BSD operand B times a W-bit sign-magnitude twiddle W.
//
// The twiddle is modified-Booth recoded (booth_recoder) into W/2+1 radix-4 digits in [-2, 2];
// bsd_ppg turns each digit into a partial product of W+1 BSD digits, placed two positions
// apart, and a binary tree of carry-limited BSD adders sums them. The product stays in
// redundant form and is exact: value (p_pos - p_neg) = (b_pos - b_neg) * (+-tw_mag).
//
// Interface: combinational. The product frame has FW = 2W+4 digits; |product| < 2^(2W), so the
// top digits only ever hold the transfers of the adders, and the extra transfer digit each
// adder produces above the frame is always zero and left unused. W must be even.
// The tree levels share one array indexed by level; a linting tool may report it as circular
// logic, but level l only reads level l-1, so there is no real loop.
// The Booth recoding and partial-product generation are those of the floating-point
// multiplier; the fixed-point wrapper and the generic tree are this design's own.
module fxp_bsd_mul #(
  parameter int W = 16
) (
  input  logic [W-1:0]    b_pos,
  input  logic [W-1:0]    b_neg,
  input  logic            tw_sign,
  input  logic [W-1:0]    tw_mag,
  output logic [2*W+3:0]  p_pos,
  output logic [2*W+3:0]  p_neg
);
  localparam int FW  = 2 * W + 4;
  localparam int NPP = W / 2 + 1;
  localparam int LV  = $clog2(NPP);

  function automatic int cnt(int l);
    int c = NPP;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  logic [W+1:0] wn, wp;
  booth_recoder #(.NBITS(W)) u_rec (.sign(tw_sign), .mag(tw_mag), .w_neg(wn), .w_pos(wp));

  logic [FW-1:0] tp [LV+1][NPP];
  logic [FW-1:0] tn [LV+1][NPP];

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [W:0] pos_i, neg_i;
    bsd_ppg #(.N(W)) u_ppg (.b_pos, .b_neg,
                            .w1_neg(wn[2*i+1]), .w1_pos(wp[2*i+1]),
                            .w0_neg(wn[2*i]),   .w0_pos(wp[2*i]),
                            .pp_pos(pos_i), .pp_neg(neg_i));
    assign tp[0][i] = FW'(pos_i) << (2 * i);
    assign tn[0][i] = FW'(neg_i) << (2 * i);
  end

  for (genvar l = 1; l <= LV; l++) begin : g_lv
    for (genvar k = 0; k < NPP; k++) begin : g_node
      if (k < cnt(l) && 2 * k + 1 < cnt(l - 1)) begin : g_add
        logic [FW:0] sp, sn;
        bsd_adder #(.N(FW)) u_add (.x_pos(tp[l-1][2*k]), .x_neg(tn[l-1][2*k]),
                                   .y_pos(tp[l-1][2*k+1]), .y_neg(tn[l-1][2*k+1]),
                                   .s_pos(sp), .s_neg(sn));
        assign tp[l][k] = sp[FW-1:0];
        assign tn[l][k] = sn[FW-1:0];
      end else if (k < cnt(l)) begin : g_pass
        assign tp[l][k] = tp[l-1][2*k];
        assign tn[l][k] = tn[l-1][2*k];
      end else begin : g_none
        assign tp[l][k] = '0;
        assign tn[l][k] = '0;
      end
    end
  end

  assign p_pos = tp[LV][0];
  assign p_neg = tn[LV][0];
endmodule
