// Self-checking testbench of the decimal signed-digit adder: random digit vectors (all five
// bits random, so every digit in [-9, 7] including redundant encodings) and the extreme
// cases all -9 / all 7; the value of sum and transfers must equal the integer sum.
module tb_dec_sd_adder;
  localparam int N = 16;
  logic [N-1:0][4:0] x, y, s;
  logic t_out, T_out;
  int checks = 0, failures = 0;

  dec_sd_adder #(.N(N)) dut (.x, .y, .s, .t_out, .T_out);

  function automatic longint val(logic [N-1:0][4:0] d);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--)
      v = v * 10 - 8 * d[i][4] + 4 * d[i][3] + 2 * d[i][2] + d[i][1] - d[i][0];
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p10, e, g;
    p10 = 1;
    for (int i = 0; i < N; i++) p10 = p10 * 10;
    for (int i = 0; i < 20000; i++) begin
      for (int j = 0; j < N; j++) begin x[j] = 5'($urandom); y[j] = 5'($urandom); end
      if (i == 0) for (int j = 0; j < N; j++) begin x[j] = 5'b10001; y[j] = 5'b10001; end
      if (i == 1) for (int j = 0; j < N; j++) begin x[j] = 5'b01110; y[j] = 5'b01110; end
      #1;
      e = val(x) + val(y);
      g = val(s) + p10 * (longint'(t_out) - longint'(T_out));
      checks++;
      if (e != g) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", g, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
