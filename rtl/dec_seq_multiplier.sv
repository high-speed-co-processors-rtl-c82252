// Sequential decimal multiplier: n-digit BCD X times n-digit BCD Y gives a 2n-digit BCD
// product, one multiplier digit per cycle, with no carry propagation in the iterations.
//
// Partial-product generation: the easy multiples X, 2X, 4X, 5X (4-2-2-1 code) are formed
// once per operation; each cycle the multiplier digit y_i (least significant first) selects
// U_i in {0, X, 4X, 5X} and V_i in {0, 2X, 4X} with y_i = U_i + V_i (selection table of the
// design, Eqn 6.3), registered as the partial-product pipeline stage.
// Accumulation: U and V are accumulated in two separate recurrences P[i+1] = P[i]/10 + U_i
// (resp. V_i). Each accumulator is kept as a carry-save pair (S, H) of value S + 2H; the
// doubling of H is postponed to the next iteration, where 2H is formed by the recode-and-
// shift doubler while S and 2H are shifted one digit right and added to the new multiple in
// a 4-2-2-1 carry-save adder. The frame holds 2n+1 digits with the multiple entering at
// digit n; digit 0 stays zero so the product is frame/10.
// Merge (five cycles): double both H words; CSA(S_U, 2H_U, S_V); CSA(s, 2h, 2H_V); convert
// the pair to BCD (with the last doubling); one BCD carry-propagate addition.
// Timing: start is taken when ready; the product is loaded on the (n+7)-th clock edge
// counting the edge that takes start, and done is high for the cycle that follows. A new
// operation may start every n+1 cycles and overlaps the merge of the previous one.
// From the design: easy multiples, selection rule, split U/V accumulation, postponed
// doubling, two CSAs plus a BCD adder at the end, n+7 latency and n+1 initiation interval.
// This design's own choices: the exact merge schedule, handshake (start/ready/done) and
// reset.
module dec_seq_multiplier
  import dec_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][3:0]   x,        // multiplicand, BCD
  input  logic [N-1:0][3:0]   y,        // multiplier, BCD
  output logic                ready,
  output logic                done,
  output logic [2*N-1:0][3:0] p         // product, BCD
);
  localparam int F = 2 * N + 1;           // accumulator frame, digits
  localparam int CW = $clog2(N + 1);

  // ---- stage 0: easy multiples (once per operation) ----
  logic [N:0][3:0] m1c, m2c, m4c, m5c, m1, m2, m4, m5;
  logic [N-1:0][3:0] yr;
  logic [CW-1:0]     cnt;                 // next multiplier digit to select
  logic              busy;

  dec_easy_multiples #(.N(N)) u_em (.x, .m1(m1c), .m2(m2c), .m4(m4c), .m5(m5c));

  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (start && ready) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(N - 1)) busy <= 1'b0;
    end
    if (start && ready) begin
      m1 <= m1c; m2 <= m2c; m4 <= m4c; m5 <= m5c;
      yr <= y;
    end
  end

  // ---- stage 1: partial-product selection ----
  logic [3:0]      yi;
  logic [N:0][3:0] u_sel, v_sel, u_q, v_q;
  logic            pp_valid, pp_first, pp_last;

  assign yi = yr[cnt];
  always_comb begin
    u_sel = '0;
    v_sel = '0;
    if (!yi[3] && !yi[2] && yi[0]) u_sel = m1;
    if ((yi[2] || yi[3]) && !yi[0]) u_sel = m4;
    if ((yi[2] || yi[3]) && yi[0])  u_sel = m5;
    if (yi[1]) v_sel = m2;
    if (yi[3]) v_sel = m4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pp_valid <= 1'b0;
    else        pp_valid <= busy;
    if (busy) begin
      u_q      <= u_sel;
      v_q      <= v_sel;
      pp_first <= (cnt == '0);
      pp_last  <= (cnt == CW'(N - 1));
    end
  end

  // ---- stage 2: two carry-save accumulators ----
  logic [F-1:0][3:0] su, hu, sv, hv;
  logic [F:0][3:0]   hu2, hv2;
  logic [F-1:0][3:0] su_n, hu_n, sv_n, hv_n, u_f, v_f, su_sh, hu_sh, sv_sh, hv_sh;
  logic              acc_done;

  dec_x2_4221 #(.W(F)) u_x2u (.d(hu), .q(hu2));
  dec_x2_4221 #(.W(F)) u_x2v (.d(hv), .q(hv2));

  always_comb begin
    u_f = '0;
    v_f = '0;
    u_f[F-1:N] = u_q;
    v_f[F-1:N] = v_q;
    su_sh = pp_first ? '0 : {4'b0000, su[F-1:1]};
    sv_sh = pp_first ? '0 : {4'b0000, sv[F-1:1]};
    hu_sh = pp_first ? '0 : hu2[F:1];   // (2H)/10; digit 0 of 2H is always zero here
    hv_sh = pp_first ? '0 : hv2[F:1];
  end

  dec_csa_4221 #(.W(F)) u_csa_u (.a(su_sh), .b(hu_sh), .c(u_f), .s(su_n), .h(hu_n));
  dec_csa_4221 #(.W(F)) u_csa_v (.a(sv_sh), .b(hv_sh), .c(v_f), .s(sv_n), .h(hv_n));

  always_ff @(posedge clk) begin
    if (!rst_n) acc_done <= 1'b0;
    else        acc_done <= pp_valid && pp_last;
    if (pp_valid) begin
      su <= su_n; hu <= hu_n;
      sv <= sv_n; hv <= hv_n;
    end
  end

  // ---- stage 3..7: merge and conversion to BCD ----
  logic [4:0]        mv;                  // valid of the five merge steps
  logic [F-1:0][3:0] a_su, a_sv, a_hu2, a_hv2, b_s, b_h, b_hv2, c_s, c_h;
  logic [F-1:0][3:0] s2, h2;
  logic [F:0][3:0]   b_h2, c_h2;
  logic [F-1:0][3:0] d_a, d_b;            // BCD operands of the final addition
  logic [F-1:0][3:0] bcd_sum;

  dec_csa_4221 #(.W(F)) u_csa_m1 (.a(a_su), .b(a_hu2), .c(a_sv), .s(s2), .h(h2));
  dec_x2_4221  #(.W(F)) u_x2_m1  (.d(b_h), .q(b_h2));
  logic [F-1:0][3:0] s3, h3;
  dec_csa_4221 #(.W(F)) u_csa_m2 (.a(b_s), .b(b_h2[F-1:0]), .c(b_hv2), .s(s3), .h(h3));
  dec_x2_4221  #(.W(F)) u_x2_m2  (.d(c_h), .q(c_h2));

  always_comb begin
    logic [4:0] t;
    logic       cy;
    cy = 1'b0;
    for (int j = 0; j < F; j++) begin
      t = 5'(d_a[j]) + 5'(d_b[j]) + 5'(cy);
      cy = (t > 5'd9);
      bcd_sum[j] = cy ? 4'(t - 5'd10) : t[3:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) mv <= '0;
    else        mv <= {mv[3:0], acc_done};
    // step 1: double both H words
    if (acc_done) begin
      a_su <= su; a_sv <= sv;
      a_hu2 <= hu2[F-1:0]; a_hv2 <= hv2[F-1:0];
    end
    // step 2: first decimal CSA
    if (mv[0]) begin
      b_s <= s2; b_h <= h2; b_hv2 <= a_hv2;
    end
    // step 3: second decimal CSA (with the doubling of the first carry word)
    if (mv[1]) begin
      c_s <= s3; c_h <= h3;
    end
    // step 4: conversion to BCD, doubling of the last carry word
    if (mv[2]) begin
      for (int j = 0; j < F; j++) begin
        d_a[j] <= val_4221(c_s[j]);
        d_b[j] <= val_4221(c_h2[j]);
      end
    end
    // step 5: BCD carry-propagate addition
    if (mv[3]) p <= bcd_sum[F-1:1];
  end
  assign done = mv[4];
endmodule
