// Carry-limited binary signed-digit adder.
//
// Adds two N-digit BSD numbers X and Y (digit value = posibit - negabit) and returns an
// (N+1)-digit BSD sum with no word-wide carry propagation. The adder is built from two-digit
// slices of four full adders; negabits enter and leave the full adders inverted, so a full
// adder fed two negabits and one posibit (or one negabit and two posibits) produces a
// correctly weighted negabit/posibit pair.
//
//   even digit i : FA1(~Y_i, y_i, ~X_i) -> sum posibit a, carry -> S_{i+1} = ~carry
//                  FA2(a, x_i, c_i)     -> s_i, posibit carry g into the odd digit
//                  S_i = C_i (negabit transfer from the slice below, stored as it is)
//   odd digit i+1: FA1(x_{i+1}, ~X_{i+1}, y_{i+1}) -> c_{i+2} (posibit), sum b
//                  FA2(b, ~Y_{i+1}, g)              -> s_{i+1}, C_{i+2} = ~carry (negabit)
//
// The longest path passes three full adders, as stated for the design's two-digit slice.
// The slice's inputs, outputs and inversion bubbles are those of the design's figure; the
// reading of which full-adder output is the carry and which the sum is this
// implementation's, checked by the testbench against the arithmetic value.
//
// Purely combinational. N must be even.
module bsd_adder #(
  parameter int N = 24
) (
  input  logic [N-1:0] x_pos,
  input  logic [N-1:0] x_neg,
  input  logic [N-1:0] y_pos,
  input  logic [N-1:0] y_neg,
  output logic [N:0]   s_pos,
  output logic [N:0]   s_neg
);
  localparam int SLICES = N / 2;

  // c[k], cn[k]: posibit / negabit transfers arriving at digit 2k
  logic [SLICES:0] c, cn;
  assign c[0]  = 1'b0;
  assign cn[0] = 1'b0;

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    localparam int E = 2 * k;      // even digit
    localparam int O = 2 * k + 1;  // odd digit
    logic a, fa1e_co, g;
    logic b, fa2o_co;

    full_adder u_fa1e (.a(~y_neg[E]), .b(y_pos[E]), .ci(~x_neg[E]), .s(a), .co(fa1e_co));
    full_adder u_fa2e (.a(a), .b(x_pos[E]), .ci(c[k]), .s(s_pos[E]), .co(g));
    full_adder u_fa1o (.a(x_pos[O]), .b(~x_neg[O]), .ci(y_pos[O]), .s(b), .co(c[k+1]));
    full_adder u_fa2o (.a(b), .b(~y_neg[O]), .ci(g), .s(s_pos[O]), .co(fa2o_co));

    assign s_neg[E]  = cn[k];
    assign s_neg[O]  = ~fa1e_co;
    assign cn[k+1]   = ~fa2o_co;
  end

  assign s_pos[N] = c[SLICES];
  assign s_neg[N] = cn[SLICES];

  initial begin
    assert (N % 2 == 0) else $error("bsd_adder: N must be even");
  end
endmodule
