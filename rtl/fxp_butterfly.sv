// Fixed-point radix-2 FFT butterfly on binary signed digits: X0 = A + B*W, X1 = A - B*W.
//
// A and B are W-bit two's-complement integers, the twiddle parts are W-bit two's complement
// with 2^(W-2) standing for 1.0. The inputs are converted to BSD for free (the magnitude goes
// into the posibits or the negabits by sign), the four products B*W are formed by fxp_bsd_mul,
// the two products of each part are added in one carry-limited BSD adder (the minus of the real
// part is a posibit/negabit swap), and A, aligned by 2^(W-2), is added and subtracted in two
// more BSD adders. So, as in the floating-point butterfly, both outputs of each dot-product-add
// come from one pass without carry propagation. The redundant results are registered and then
// converted back to two's complement by one subtraction each.
//
// Interface and timing: in_valid/out_valid, one clock of latency, one butterfly per clock.
// The outputs are exact: X = A*2^(W-2) + B*W, 2W+4 bits wide, so no rounding or scaling is
// done. The top transfer digit of each BSD adder lies above the frame, is always zero for
// these operand ranges, and is left unused. The structure follows the design's fixed-point
// butterfly built on its FDPA; the widths, the exact (unrounded) outputs and the output
// conversion are this design's own choices.
module fxp_butterfly #(
  parameter int W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   a_re, a_im, b_re, b_im, w_re, w_im,
  output logic                  out_valid,
  output logic signed [2*W+3:0] x0_re, x0_im, x1_re, x1_im
);
  localparam int FW = 2 * W + 4;

  function automatic logic [W-1:0] mag(logic signed [W-1:0] v);
    return v[W-1] ? W'(-v) : W'(v);
  endfunction

  // free conversion to BSD
  logic [W-1:0] br_p, br_n, bi_p, bi_n;
  assign br_p = b_re[W-1] ? '0 : mag(b_re);
  assign br_n = b_re[W-1] ? mag(b_re) : '0;
  assign bi_p = b_im[W-1] ? '0 : mag(b_im);
  assign bi_n = b_im[W-1] ? mag(b_im) : '0;

  logic [FW-1:0] ar_p, ar_n, ai_p, ai_n;
  assign ar_p = a_re[W-1] ? '0 : FW'(mag(a_re)) << (W - 2);
  assign ar_n = a_re[W-1] ? FW'(mag(a_re)) << (W - 2) : '0;
  assign ai_p = a_im[W-1] ? '0 : FW'(mag(a_im)) << (W - 2);
  assign ai_n = a_im[W-1] ? FW'(mag(a_im)) << (W - 2) : '0;

  // products: rr = B_re*W_re, ii = B_im*W_im, ri = B_re*W_im, ir = B_im*W_re
  logic [FW-1:0] rr_p, rr_n, ii_p, ii_n, ri_p, ri_n, ir_p, ir_n;
  fxp_bsd_mul #(.W(W)) u_rr (.b_pos(br_p), .b_neg(br_n), .tw_sign(w_re[W-1]), .tw_mag(mag(w_re)),
                             .p_pos(rr_p), .p_neg(rr_n));
  fxp_bsd_mul #(.W(W)) u_ii (.b_pos(bi_p), .b_neg(bi_n), .tw_sign(w_im[W-1]), .tw_mag(mag(w_im)),
                             .p_pos(ii_p), .p_neg(ii_n));
  fxp_bsd_mul #(.W(W)) u_ri (.b_pos(br_p), .b_neg(br_n), .tw_sign(w_im[W-1]), .tw_mag(mag(w_im)),
                             .p_pos(ri_p), .p_neg(ri_n));
  fxp_bsd_mul #(.W(W)) u_ir (.b_pos(bi_p), .b_neg(bi_n), .tw_sign(w_re[W-1]), .tw_mag(mag(w_re)),
                             .p_pos(ir_p), .p_neg(ir_n));

  // dot products: re = rr - ii (swap of ii), im = ri + ir
  logic [FW:0] dr_p, dr_n, di_p, di_n;
  bsd_adder #(.N(FW)) u_dre (.x_pos(rr_p), .x_neg(rr_n), .y_pos(ii_n), .y_neg(ii_p),
                             .s_pos(dr_p), .s_neg(dr_n));
  bsd_adder #(.N(FW)) u_dim (.x_pos(ri_p), .x_neg(ri_n), .y_pos(ir_p), .y_neg(ir_n),
                             .s_pos(di_p), .s_neg(di_n));

  // A + dot and A - dot
  logic [FW:0] s0r_p, s0r_n, s1r_p, s1r_n, s0i_p, s0i_n, s1i_p, s1i_n;
  bsd_adder #(.N(FW)) u_0r (.x_pos(ar_p), .x_neg(ar_n), .y_pos(dr_p[FW-1:0]), .y_neg(dr_n[FW-1:0]),
                            .s_pos(s0r_p), .s_neg(s0r_n));
  bsd_adder #(.N(FW)) u_1r (.x_pos(ar_p), .x_neg(ar_n), .y_pos(dr_n[FW-1:0]), .y_neg(dr_p[FW-1:0]),
                            .s_pos(s1r_p), .s_neg(s1r_n));
  bsd_adder #(.N(FW)) u_0i (.x_pos(ai_p), .x_neg(ai_n), .y_pos(di_p[FW-1:0]), .y_neg(di_n[FW-1:0]),
                            .s_pos(s0i_p), .s_neg(s0i_n));
  bsd_adder #(.N(FW)) u_1i (.x_pos(ai_p), .x_neg(ai_n), .y_pos(di_n[FW-1:0]), .y_neg(di_p[FW-1:0]),
                            .s_pos(s1i_p), .s_neg(s1i_n));

  // redundant results registered; the top transfer digit of each sum carries no value
  logic [FW-1:0] r0r_p, r0r_n, r1r_p, r1r_n, r0i_p, r0i_n, r1i_p, r1i_n;
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    r0r_p <= s0r_p[FW-1:0]; r0r_n <= s0r_n[FW-1:0];
    r1r_p <= s1r_p[FW-1:0]; r1r_n <= s1r_n[FW-1:0];
    r0i_p <= s0i_p[FW-1:0]; r0i_n <= s0i_n[FW-1:0];
    r1i_p <= s1i_p[FW-1:0]; r1i_n <= s1i_n[FW-1:0];
  end

  // conversion back to two's complement
  assign x0_re = $signed(r0r_p - r0r_n);
  assign x1_re = $signed(r1r_p - r1r_n);
  assign x0_im = $signed(r0i_p - r0i_n);
  assign x1_im = $signed(r1i_p - r1i_n);
endmodule
