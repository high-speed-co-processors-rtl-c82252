// Self-checking testbench of the BSD partial-product generator: for each legal Booth digit
// pair (0, +-1, +-2) and random BSD multiplicands the partial product must equal digit * B.
module tb_bsd_ppg;
  localparam int N = 24;
  logic [N-1:0] bp, bn;
  logic w1n, w1p, w0n, w0p;
  logic [N:0] pp, pn;
  int checks = 0, failures = 0;

  bsd_ppg #(.N(N)) dut (.b_pos(bp), .b_neg(bn), .w1_neg(w1n), .w1_pos(w1p), .w0_neg(w0n),
                        .w0_pos(w0p), .pp_pos(pp), .pp_neg(pn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint bv, gv;
    int d;
    for (int i = 0; i < 5000; i++) begin
      bp = N'($urandom); bn = N'($urandom);
      d  = i % 5 - 2;                       // -2 .. 2
      {w1n, w1p, w0n, w0p} = 4'b0000;
      case (d)
        1:  {w0n, w0p} = 2'b01;
        -1: {w0n, w0p} = 2'b11;
        2:  {w1n, w1p} = 2'b01;
        -2: {w1n, w1p} = 2'b11;
        default: ;
      endcase
      #1;
      bv = longint'(bp) - longint'(bn);
      gv = longint'(pp) - longint'(pn);
      checks++;
      if (gv != d * bv) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d B=%0d got %0d", d, bv, gv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
