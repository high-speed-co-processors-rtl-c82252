// Doubling of a decimal number held in 4-2-2-1 code, without carry propagation.
// Each digit is recoded to 5-2-1-1 and the whole word is shifted left by one bit: the 5-bit
// of a digit (worth 10 once doubled) moves into the 1-bit of the next digit, the 2,1,1 bits
// become 4,2,2 of the same digit. Digit j of the result therefore depends only on digits j
// and j-1. Combinational; the result has one more digit than the input.
// The recode-and-shift scheme is the multiplier's; the choice of 5-2-1-1 code per value is
// this design's own.
module dec_x2_4221
  import dec_pkg::*;
#(
  parameter int W = 17
) (
  input  logic [W-1:0][3:0] d,   // 4-2-2-1 digits
  output logic [W:0][3:0]   q    // 2*d, 4-2-2-1 digits
);
  logic [W-1:0][3:0] r;
  for (genvar j = 0; j < W; j++) begin : g_rec
    assign r[j] = val_to_5211(val_4221(d[j]));
  end
  assign q[0] = {r[0][2:0], 1'b0};
  for (genvar j = 1; j < W; j++) begin : g_shift
    assign q[j] = {r[j][2:0], r[j-1][3]};
  end
  assign q[W] = {3'b000, r[W-1][3]};
endmodule
