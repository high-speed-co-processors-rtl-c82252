// Self-checking testbench of the modified Booth recoder: every recoded value must equal the
// signed input, every position must be a legal (sign, magnitude) pair, and no two adjacent
// positions of one radix-4 digit may both be non-zero.
module tb_booth_recoder;
  localparam int NB = 24;
  logic          sign;
  logic [NB-1:0] mag;
  logic [NB+1:0] wn, wp;
  int checks = 0, failures = 0;

  booth_recoder #(.NBITS(NB)) dut (.sign, .mag, .w_neg(wn), .w_pos(wp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    bit ok;
    for (int i = 0; i < 20000; i++) begin
      mag  = NB'($urandom);
      sign = 1'($urandom);
      if (i == 0) mag = '1;
      if (i == 1) mag = '0;
      if (i == 2) mag = 24'haaaaaa;
      #1;
      v = 0;
      ok = 1;
      for (int p = NB + 1; p >= 0; p--) begin
        v = v * 2 + (wp[p] ? (wn[p] ? -1 : 1) : 0);
        if (!wp[p] && wn[p]) ok = 0;
      end
      for (int j = 0; j <= NB / 2; j++) if (wp[2*j] && wp[2*j+1]) ok = 0;
      e = sign ? -longint'(mag) : longint'(mag);
      checks++;
      if (v != e || !ok) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%h sign=%b got %0d", mag, sign, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
