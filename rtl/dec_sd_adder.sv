// Carry-free decimal signed-digit adder (Algorithm 5.1, Tables 5.1/5.2, Eqn 5.1).
// Each decimal digit holds five bits {X3, x2, x1, x0, X0} with weights {-8, 4, 2, 1, -1}
// (upper-case = negabit, lower-case = posibit), so a digit lies in [-9, 7].
// Per digit: F1 (five inputs, truth table 5.1) turns X3, Y3, x2, y2, x1 into two transfer
// bits to the next digit (t0 = +10, T0 = -10) and the high part Z3 Z2 z1 (-8, -4, +2) of the
// interim sum; F2 turns y1, y0, Y0, x0, X0 into the low part w2 W1 W0 (+4, -2, -1). The
// final digit is a 3-bit carry-look-ahead sum of {w2, z1, t0_in} and the inverted negabits
// {~Z2, ~W1, ~W0} with a constant 1 at the LSB (the zero-valued negabit), S3 = Z3 | ~Cout and
// S0 = T0_in. No carry travels further than one digit: the adder is purely combinational
// with constant delay. Digit 0 receives no transfer; the transfers out of the top digit are
// outputs (value of the sum = S + 10^N (t_out - T_out)).
// From the document: digit encoding, F1 table, F2 values, CLA equations, OR gate for S3.
// This design's choices: F2 written from the value it must produce (its representation is
// unique), parameterised digit count N.
module dec_sd_adder #(
  parameter int N = 16
) (
  input  logic [N-1:0][4:0] x,      // digit i = {X3, x2, x1, x0, X0}
  input  logic [N-1:0][4:0] y,
  output logic [N-1:0][4:0] s,
  output logic              t_out,  // +10^N transfer
  output logic              T_out   // -10^N transfer
);
  logic [N:0] t0, T0;
  assign t0[0] = 1'b0;
  assign T0[0] = 1'b0;
  assign t_out = t0[N];
  assign T_out = T0[N];

  // F1: {T0_next, t0_next, Z3, Z2, z1} indexed by {X3, Y3, x2, y2, x1} (Table 5.1)
  function automatic logic [4:0] f1(logic [4:0] in);
    case (in)
      5'b00000: return 5'b00000;  5'b00001: return 5'b00001;
      5'b00010: return 5'b01101;  5'b00011: return 5'b01010;
      5'b00100: return 5'b01101;  5'b00101: return 5'b01010;
      5'b00110: return 5'b01011;  5'b00111: return 5'b01000;
      5'b01000: return 5'b10001;  5'b01001: return 5'b00101;
      5'b01010: return 5'b00010;  5'b01011: return 5'b00011;
      5'b01100: return 5'b00010;  5'b01101: return 5'b00011;
      5'b01110: return 5'b00000;  5'b01111: return 5'b00001;
      5'b10000: return 5'b10001;  5'b10001: return 5'b00101;
      5'b10010: return 5'b00010;  5'b10011: return 5'b00011;
      5'b10100: return 5'b00010;  5'b10101: return 5'b00011;
      5'b10110: return 5'b00000;  5'b10111: return 5'b00001;
      5'b11000: return 5'b10101;  5'b11001: return 5'b10010;
      5'b11010: return 5'b10011;  5'b11011: return 5'b10000;
      5'b11100: return 5'b10011;  5'b11101: return 5'b10000;
      5'b11110: return 5'b10001;  default:  return 5'b00101;
    endcase
  endfunction

  // F2: value 2*y1 + y0 - Y0 + x0 - X0 in [-3, 4] as {w2, W1, W0} = 4*w2 - 2*W1 - W0
  function automatic logic [2:0] f2(logic y1, logic y0, logic Y0, logic x0, logic X0);
    int v;
    v = 2 * int'(y1) + int'(y0) - int'(Y0) + int'(x0) - int'(X0);
    case (v)
      -3:      return 3'b011;
      -2:      return 3'b010;
      -1:      return 3'b001;
      1:       return 3'b111;
      2:       return 3'b110;
      3:       return 3'b101;
      4:       return 3'b100;
      default: return 3'b000;
    endcase
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic Z3, Z2, z1, w2, W1, W0;
    logic [2:0] a, b;
    logic c0, c1, cout;
    assign {T0[i+1], t0[i+1], Z3, Z2, z1} = f1({x[i][4], y[i][4], x[i][3], y[i][3], x[i][2]});
    assign {w2, W1, W0} = f2(y[i][2], y[i][1], y[i][0], x[i][1], x[i][0]);
    assign a = {w2, z1, t0[i]};
    assign b = {~Z2, ~W1, ~W0};
    // 3-bit CLA with the constant 1 at the least significant position
    assign c0   = a[0] | b[0];
    assign c1   = (a[1] & b[1]) | ((a[1] | b[1]) & c0);
    assign cout = (a[2] & b[2]) | ((a[2] | b[2]) & c1);
    assign s[i][1] = ~(a[0] ^ b[0]);
    assign s[i][2] = a[1] ^ b[1] ^ c0;
    assign s[i][3] = a[2] ^ b[2] ^ c1;
    assign s[i][4] = Z3 | ~cout;
    assign s[i][0] = T0[i];
  end
endmodule
