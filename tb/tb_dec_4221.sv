// Self-checking testbench of the 4-2-2-1 building blocks of the decimal multiplier: the easy
// multiples X, 2X, 4X, 5X of random BCD words (each digit must be a valid 4-2-2-1 digit and
// the word must equal m*X), the word doubler (random 4-2-2-1 input, any of the redundant
// codes) and the decimal carry-save adder (a + b + c = s + 2h digit by digit).
module tb_dec_4221;
  import dec_pkg::*;
  localparam int N = 16;
  logic [N-1:0][3:0] x;
  logic [N:0][3:0]   m1, m2, m4, m5;
  logic [N:0][3:0]   dd, ca, cb, cc, cs, ch;
  logic [N+1:0][3:0] dq;
  int checks = 0, failures = 0;

  dec_easy_multiples #(.N(N)) u_em (.x, .m1, .m2, .m4, .m5);
  dec_x2_4221  #(.W(N + 1)) u_x2 (.d(dd), .q(dq));
  dec_csa_4221 #(.W(N + 1)) u_cs (.a(ca), .b(cb), .c(cc), .s(cs), .h(ch));

  // value of a 4-2-2-1 word as a digit array (digit 0 first), carried into 0..9 digits
  function automatic bit eq_word(logic [N+1:0][3:0] w, int len, logic [N-1:0][3:0] bx, int m);
    int a[N+3];
    int c;
    for (int k = 0; k < N + 3; k++) a[k] = 0;
    for (int k = 0; k < N; k++) a[k] = m * int'(bx[k]);
    for (int k = 0; k < len; k++) a[k] -= int'(val_4221(w[k]));
    c = 0;
    for (int k = 0; k < N + 3; k++) begin
      a[k] += c;
      c = a[k] / 10;
      if (a[k] - 10 * c != 0) return 0;
    end
    return c == 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N+1:0][3:0] t;
    logic [N-1:0][3:0] v;
    for (int i = 0; i < 5000; i++) begin
      for (int j = 0; j < N; j++) x[j] = 4'($urandom % 10);
      if (i == 0) x = {N{4'd9}};
      for (int j = 0; j <= N; j++) begin
        dd[j] = 4'($urandom); ca[j] = 4'($urandom); cb[j] = 4'($urandom); cc[j] = 4'($urandom);
      end
      #1;
      checks += 4;
      if (!eq_word({4'b0, m1}, N + 1, x, 1)) begin failures++; $display("FAIL X"); end
      if (!eq_word({4'b0, m2}, N + 1, x, 2)) begin failures++; $display("FAIL 2X"); end
      if (!eq_word({4'b0, m4}, N + 1, x, 4)) begin failures++; $display("FAIL 4X"); end
      if (!eq_word({4'b0, m5}, N + 1, x, 5)) begin failures++; $display("FAIL 5X"); end
      // doubler: compare digit by digit the value 2*dd with dq (both as digit sums)
      checks++;
      begin
        longint unsigned hi_in, hi_out;
        int s_in, s_out;
        bit ok = 1;
        int c = 0;
        for (int k = 0; k <= N + 1; k++) begin
          s_in  = (k <= N) ? 2 * int'(val_4221(dd[k])) : 0;
          s_out = int'(val_4221(dq[k]));
          c = c + s_in - s_out;
          if (c % 10 != 0) ok = 0;
          c = c / 10;
        end
        if (!ok || c != 0) begin failures++; if (failures < 10) $display("FAIL x2"); end
      end
      // CSA: per digit a + b + c = s + 2h (4-2-2-1 values)
      checks++;
      begin
        bit ok = 1;
        for (int k = 0; k <= N; k++)
          if (int'(val_4221(ca[k])) + int'(val_4221(cb[k])) + int'(val_4221(cc[k])) !=
              int'(val_4221(cs[k])) + 2 * int'(val_4221(ch[k]))) ok = 0;
        if (!ok) begin failures++; if (failures < 10) $display("FAIL csa"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
