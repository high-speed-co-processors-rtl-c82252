// Leading-zero detector built by divide and conquer from 2-bit detectors.
//
// A 2-bit detector reports D = "a one was found" and P = its position counted from the MSB
// (pattern 1x -> P=0, 01 -> P=1, 00 -> D=0). A W-bit detector joins the detectors of its two
// halves: D = D_hi | D_lo, and P = {0, P_hi} if the upper half holds the one, else
// {1, P_lo}. At the top P is the number of leading zeros. W must be a power of two (>= 2).
// This follows the design's 2-bit table and its 4-bit example. Purely combinational.
// The module instantiates itself for the two halves. A linting tool may report d_hi, d_lo,
// p_hi and p_lo as undriven when it looks at the recursion; they are driven by the outputs
// of the two half-width detectors, and the testbench checks the counts at every width used.
module lzd #(
  parameter int W = 64
) (
  input  logic [W-1:0]         x,
  output logic                 found,
  output logic [$clog2(W)-1:0] zeros
);
  if (W == 2) begin : g_leaf
    assign found = x[1] | x[0];
    assign zeros = ~x[1];
  end else begin : g_node
    localparam int H = W / 2;
    logic                 d_hi, d_lo;
    logic [$clog2(H)-1:0] p_hi, p_lo;
    lzd #(.W(H)) u_hi (.x(x[W-1:H]), .found(d_hi), .zeros(p_hi));
    lzd #(.W(H)) u_lo (.x(x[H-1:0]), .found(d_lo), .zeros(p_lo));
    assign found = d_hi | d_lo;
    assign zeros = d_hi ? {1'b0, p_hi} : {1'b1, p_lo};
  end
endmodule
