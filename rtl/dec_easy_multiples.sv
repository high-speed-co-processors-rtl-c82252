// Easy multiples X, 2X, 4X and 5X of a BCD multiplicand, all in 4-2-2-1 code, each obtained
// in constant time:
//   X  : digit-wise BCD to 4-2-2-1 recoding;
//   2X : BCD to 5-2-1-1 recoding and a one-bit left shift of the word;
//   4X : computed directly from X, here as two doubling steps flattened into one
//        combinational block (digit j depends on digits j, j-1 and j-2 only);
//   5X : three-bit left shift of the BCD word, read as 5-4-2-1 digits, recoded to 4-2-2-1.
// Interface: n BCD digits in, four (n+1)-digit multiples out. Combinational.
// The four multiples and how each is formed follow the design; the per-value codes are this
// design's choice.
module dec_easy_multiples
  import dec_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0][3:0] x,      // BCD
  output logic [N:0][3:0]   m1, m2, m4, m5
);
  logic [N-1:0][3:0] x4221, x5211;
  logic [N:0][3:0]   x1e;
  logic [N+1:0][3:0] m4w;
  logic [N:0][3:0]   sh3;

  for (genvar j = 0; j < N; j++) begin : g_rec
    assign x4221[j] = bcd_to_4221(x[j]);
    assign x5211[j] = val_to_5211(x[j]);
  end
  assign m1 = {4'b0000, x4221};

  // 2X: shift of the 5-2-1-1 word
  assign m2[0] = {x5211[0][2:0], 1'b0};
  for (genvar j = 1; j < N; j++) begin : g_m2
    assign m2[j] = {x5211[j][2:0], x5211[j-1][3]};
  end
  assign m2[N] = {3'b000, x5211[N-1][3]};

  // 4X = 2 * (2X)
  assign x1e = m2;
  dec_x2_4221 #(.W(N + 1)) u_x4 (.d(x1e), .q(m4w));
  assign m4 = m4w[N:0];    // 4X < 4 * 10^N: the extra digit is always zero

  // 5X: digit j = 5 * x_j[0] + floor(x_{j-1} / 2), a 5-4-2-1 digit
  assign sh3[0] = {x[0][0], 3'b000};
  for (genvar j = 1; j < N; j++) begin : g_sh
    assign sh3[j] = {x[j][0], x[j-1][3:1]};
  end
  assign sh3[N] = {1'b0, x[N-1][3:1]};
  for (genvar j = 0; j <= N; j++) begin : g_m5
    assign m5[j] = bcd_to_4221(val_5421(sh3[j]));
  end
endmodule
