// Self-checking testbench of the carry-limited BSD adder: random and corner digit patterns
// (all +1, all -1, zero digits encoded as 1/1), sum value compared with integer arithmetic.
module tb_bsd_adder;
  localparam int N = 24;
  logic [N-1:0] xp, xn, yp, yn;
  logic [N:0]   sp, sn;
  int checks = 0, failures = 0;

  bsd_adder #(.N(N)) dut (.x_pos(xp), .x_neg(xn), .y_pos(yp), .y_neg(yn), .s_pos(sp), .s_neg(sn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ev, gv;
    for (int i = 0; i < 20000; i++) begin
      xp = N'($urandom); xn = N'($urandom); yp = N'($urandom); yn = N'($urandom);
      case (i)
        0: begin xp = '1; xn = '0; yp = '1; yn = '0; end
        1: begin xp = '0; xn = '1; yp = '0; yn = '1; end
        2: begin xp = '1; xn = '1; yp = '1; yn = '1; end
        3: begin xp = '1; xn = '0; yp = '0; yn = '1; end
        default: ;
      endcase
      #1;
      ev = longint'(xp) - longint'(xn) + longint'(yp) - longint'(yn);
      gv = longint'(sp) - longint'(sn);
      checks++;
      if (ev != gv) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h/%h y=%h/%h got %0d exp %0d", xp, xn, yp, yn, gv, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
