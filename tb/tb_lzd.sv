// Self-checking testbench of the leading-zero detector: random words with a random number of
// leading zeros, and the all-zero word; the count is compared with a behavioural scan.
module tb_lzd;
  logic [63:0] x;
  logic        found;
  logic [5:0]  zeros;
  int checks = 0, failures = 0;

  lzd #(.W(64)) dut (.x, .found, .zeros);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom, $urandom} >> (i % 65);
      if (i == 7) x = 0;
      #1;
      e = 64;
      for (int b = 63; b >= 0; b--) if (x[b]) begin e = 63 - b; break; end
      checks++;
      if ((e == 64) ? found : (!found || int'(zeros) != e)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h zeros=%0d exp %0d", x, zeros, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
