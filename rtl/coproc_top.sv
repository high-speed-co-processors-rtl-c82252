// Top level of the redundant-number co-processor: the binary butterflies and the decimal units
// side by side, each with its own ports.
//
// Binary floating-point part: an FFT butterfly X0 = A + B*W, X1 = A - B*W over IEEE-754 single
// inputs. A and B are converted to BSD floating-point (posibit/negabit significands), the
// twiddle W to its modified-Booth recoded form, the butterfly works on the redundant form and
// its results are converted back to IEEE single at the output, as the last stage of an FFT
// would do. One clock of latency (register inside the butterfly), one butterfly per clock.
// Beside it, the 16-bit fixed-point butterfly built from the same BSD multiplier and adder
// parts, with exact 36-bit outputs, also one clock of latency.
//
// Decimal part: the carry-free decimal signed-digit adder (digits in [-9, 7], five bits each)
// registered to one clock of latency, the sequential decimal multiplier (n+7 cycles), the
// digit-recurrence divider (20 cycles) and the digit-recurrence square root (19 cycles),
// each with its own start/ready/done handshake; all four may run at the same time.
//
// The structure (conversion at input and output only, two FDPAs per butterfly) follows the
// design; registering the decimal adder and the valid signalling are this design's choices.
module coproc_top
  import bsd_fp_pkg::*;
#(
  parameter int DEC_DIGITS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // FFT butterfly, IEEE single operands
  input  logic        bf_in_valid,
  input  logic [31:0] a_re, a_im, b_re, b_im, w_re, w_im,
  output logic        bf_out_valid,
  output logic [31:0] x0_re, x0_im, x1_re, x1_im,
  // fixed-point butterfly, 16-bit two's complement, twiddle 1.0 = 2^14
  input  logic                        fx_in_valid,
  input  logic signed [15:0]          fx_a_re, fx_a_im, fx_b_re, fx_b_im, fx_w_re, fx_w_im,
  output logic                        fx_out_valid,
  output logic signed [35:0]          fx_x0_re, fx_x0_im, fx_x1_re, fx_x1_im,
  // decimal signed-digit adder
  input  logic                      da_in_valid,
  input  logic [DEC_DIGITS-1:0][4:0] da_x, da_y,
  output logic                      da_out_valid,
  output logic [DEC_DIGITS-1:0][4:0] da_s,
  output logic                      da_t_out, da_T_out,
  // sequential decimal multiplier, BCD operands
  input  logic                         dm_start,
  input  logic [DEC_DIGITS-1:0][3:0]   dm_x, dm_y,
  output logic                         dm_ready,
  output logic                         dm_done,
  output logic [2*DEC_DIGITS-1:0][3:0] dm_p,
  // decimal divider, BCD operands in [0.1, 1)
  input  logic                         dd_start,
  input  logic [DEC_DIGITS-1:0][3:0]   dd_x, dd_d,
  output logic                         dd_ready,
  output logic                         dd_done,
  output logic [DEC_DIGITS+1:0][3:0]   dd_q,
  // decimal square root, BCD radicand in [0.01, 1)
  input  logic                         ds_start,
  input  logic [DEC_DIGITS-1:0][3:0]   ds_x,
  output logic                         ds_ready,
  output logic                         ds_done,
  output logic                         ds_q_int,
  output logic [DEC_DIGITS-1:0][3:0]   ds_q
);
  bsd_cplx_t   a, b, x0, x1;
  booth_cplx_t w;

  ieee_to_bsd   u_cv_ar (.f(a_re), .b(a.re));
  ieee_to_bsd   u_cv_ai (.f(a_im), .b(a.im));
  ieee_to_bsd   u_cv_br (.f(b_re), .b(b.re));
  ieee_to_bsd   u_cv_bi (.f(b_im), .b(b.im));
  ieee_to_booth u_cv_wr (.f(w_re), .w(w.re));
  ieee_to_booth u_cv_wi (.f(w_im), .w(w.im));

  bsd_butterfly u_bf (.clk, .rst_n, .in_valid(bf_in_valid), .a, .b, .w,
                      .out_valid(bf_out_valid), .x0, .x1);

  bsd_to_ieee u_cv_x0r (.b(x0.re), .f(x0_re));
  bsd_to_ieee u_cv_x0i (.b(x0.im), .f(x0_im));
  bsd_to_ieee u_cv_x1r (.b(x1.re), .f(x1_re));
  bsd_to_ieee u_cv_x1i (.b(x1.im), .f(x1_im));

  logic [DEC_DIGITS-1:0][4:0] da_sum;
  logic                       da_t, da_T;

  dec_sd_adder #(.N(DEC_DIGITS)) u_dadd (.x(da_x), .y(da_y), .s(da_sum), .t_out(da_t),
                                         .T_out(da_T));

  always_ff @(posedge clk) begin
    if (!rst_n) da_out_valid <= 1'b0;
    else        da_out_valid <= da_in_valid;
    if (da_in_valid) begin
      da_s     <= da_sum;
      da_t_out <= da_t;
      da_T_out <= da_T;
    end
  end

  dec_seq_multiplier #(.N(DEC_DIGITS)) u_dmul (.clk, .rst_n, .start(dm_start), .x(dm_x),
                                               .y(dm_y), .ready(dm_ready), .done(dm_done),
                                               .p(dm_p));

  fxp_butterfly #(.W(16)) u_fxbf (.clk, .rst_n, .in_valid(fx_in_valid),
                                  .a_re(fx_a_re), .a_im(fx_a_im), .b_re(fx_b_re), .b_im(fx_b_im),
                                  .w_re(fx_w_re), .w_im(fx_w_im), .out_valid(fx_out_valid),
                                  .x0_re(fx_x0_re), .x0_im(fx_x0_im), .x1_re(fx_x1_re),
                                  .x1_im(fx_x1_im));

  dec_divider #(.N(DEC_DIGITS)) u_ddiv (.clk, .rst_n, .start(dd_start), .x(dd_x), .d(dd_d),
                                        .ready(dd_ready), .done(dd_done), .q(dd_q));

  dec_sqrt #(.N(DEC_DIGITS)) u_dsqrt (.clk, .rst_n, .start(ds_start), .x(ds_x),
                                      .ready(ds_ready), .done(ds_done), .q_int(ds_q_int),
                                      .q(ds_q));
endmodule
