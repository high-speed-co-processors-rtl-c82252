// Partial-product generator of the BSD multiplier (one partial product).
//
// Two adjacent Booth positions of the multiplier, each a (sign W-, magnitude W+) pair,
// select 0, +-B or +-2B from the N-digit BSD multiplicand B:
//   W+_{i+1} = 1 : PP = 2B AND W+_{i+1}, every bit then XORed with W-_{i+1}
//   otherwise    : PP =  B AND W+_i,     every bit then XORed with W-_i
// 2B is B shifted left by one digit. Because B is a BSD number, inverting all of its bits
// negates it (pos - neg becomes neg - pos), so no adder is needed. The result has N+1
// digits. This follows the design's partial-product table and gate-level figure.
// Purely combinational.
module bsd_ppg #(
  parameter int N = 24
) (
  input  logic [N-1:0] b_pos,
  input  logic [N-1:0] b_neg,
  input  logic         w1_neg,    // W-_{i+1}
  input  logic         w1_pos,    // W+_{i+1}
  input  logic         w0_neg,    // W-_i
  input  logic         w0_pos,    // W+_i
  output logic [N:0]   pp_pos,
  output logic [N:0]   pp_neg
);
  logic [N:0] b1_pos, b1_neg, b2_pos, b2_neg;

  always_comb begin
    b1_pos = {1'b0, b_pos} & {(N+1){w0_pos}};
    b1_neg = {1'b0, b_neg} & {(N+1){w0_pos}};
    b2_pos = {b_pos, 1'b0} & {(N+1){w1_pos}};
    b2_neg = {b_neg, 1'b0} & {(N+1){w1_pos}};
    b1_pos ^= {(N+1){w0_neg}};
    b1_neg ^= {(N+1){w0_neg}};
    b2_pos ^= {(N+1){w1_neg}};
    b2_neg ^= {(N+1){w1_neg}};
    if (w1_pos) begin
      pp_pos = b2_pos;
      pp_neg = b2_neg;
    end else begin
      pp_pos = b1_pos;
      pp_neg = b1_neg;
    end
  end
endmodule
