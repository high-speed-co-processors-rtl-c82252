// Decimal 3:2 carry-save adder over 4-2-2-1 digits. Since all three operands use the same
// bit weights, a row of binary full adders per bit position gives, digit by digit,
// a + b + c = s + 2*h with s and h again valid 4-2-2-1 digits (each bit sum is 0..3).
// The doubling of h is left to the caller (dec_x2_4221). Combinational.
module dec_csa_4221 #(
  parameter int W = 33
) (
  input  logic [W-1:0][3:0] a, b, c,
  output logic [W-1:0][3:0] s, h
);
  for (genvar j = 0; j < W; j++) begin : g_d
    for (genvar k = 0; k < 4; k++) begin : g_b
      full_adder u_fa (.a(a[j][k]), .b(b[j][k]), .ci(c[j][k]), .s(s[j][k]), .co(h[j][k]));
    end
  end
endmodule
