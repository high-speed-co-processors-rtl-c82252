// Binary to modified Booth recoder for the twiddle-factor significand.
//
// The 24-bit unsigned significand y is cut into 2-bit groups v_j = 2*y[2j+1] + y[2j]. Each
// group is split into a radix-4 transfer t_{j+1} and an interim digit w_j with
//   w_j = v_j, t_{j+1} = 0  if v_j <= 1;   w_j = v_j - 4, t_{j+1} = 1  if v_j >= 2,
// and the Booth digit z_j = w_j + t_j lies in [-2, 2] without any further carry. The 12
// groups give 13 Booth digits (the last one is the final transfer), i.e. 26 binary positions.
// Each radix-4 digit is written into its two binary positions so that at most one of them is
// non-zero: +-1 in the lower position, +-2 in the upper one. A position is a (sign, magnitude)
// pair: (0,0) = 0, (0,1) = +1, (1,1) = -1. A negative twiddle (sign = 1) sets the sign bit of
// every non-zero position. The recoding rules are the design's; the sign handling is this
// implementation's. Purely combinational.
module booth_recoder #(
  parameter int NBITS = 24
) (
  input  logic                 sign,
  input  logic [NBITS-1:0]     mag,
  output logic [NBITS+1:0]     w_neg,   // sign of each binary position
  output logic [NBITS+1:0]     w_pos    // magnitude of each binary position
);
  localparam int G = NBITS / 2;

  always_comb begin
    logic [G:0] t;
    logic signed [2:0] w, z;
    logic [1:0] v;
    t = '0;
    w_neg = '0;
    w_pos = '0;
    for (int j = 0; j <= G; j++) begin
      if (j < G) begin
        v = {mag[2*j+1], mag[2*j]};
        if (v <= 2'd1) begin
          w = signed'({1'b0, v});
          t[j+1] = 1'b0;
        end else begin
          w = signed'({1'b0, v}) - 3'sd4;
          t[j+1] = 1'b1;
        end
      end else begin
        w = 3'sd0;
      end
      z = w + signed'({2'b00, t[j]});
      unique case (z)
        3'sd1:  begin w_pos[2*j]   = 1'b1; w_neg[2*j]   = sign;  end
        -3'sd1: begin w_pos[2*j]   = 1'b1; w_neg[2*j]   = ~sign; end
        3'sd2:  begin w_pos[2*j+1] = 1'b1; w_neg[2*j+1] = sign;  end
        -3'sd2: begin w_pos[2*j+1] = 1'b1; w_neg[2*j+1] = ~sign; end
        default: ;
      endcase
    end
  end

  initial begin
    assert (NBITS % 2 == 0) else $error("booth_recoder: NBITS must be even");
  end
endmodule
