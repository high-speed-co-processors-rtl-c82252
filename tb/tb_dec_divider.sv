// Self-checking testbench of the decimal divider. Operands: random 16-digit X and D in
// [0.1, 1), plus corner cases (X = D, smallest X over largest D, largest X over smallest D,
// exact quotients such as 0.5 / 0.25). The reference is floor(X * 10^16 / D) on 140-bit
// integers; the 20-edge latency is checked too.
module tb_dec_divider;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  logic [N-1:0][3:0] x, d;
  logic [N+1:0][3:0] q;
  int checks = 0, failures = 0;

  dec_divider #(.N(N)) dut (.clk, .rst_n, .start, .x, .d, .ready, .done, .q);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [139:0] big_t;

  function automatic big_t to_big(logic [N+1:0][3:0] v, int len);
    big_t r = 0;
    for (int j = len - 1; j >= 0; j--) r = r * 10 + big_t'(v[j]);
    return r;
  endfunction

  initial begin
    big_t e, p16;
    logic [N+1:0][3:0] xe, de;
    int   cyc;
    p16 = 1;
    for (int j = 0; j < N; j++) p16 = p16 * 10;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < N; j++) begin x[j] = 4'($urandom % 10); d[j] = 4'($urandom % 10); end
      if (x[N-1] == 0) x[N-1] = 4'd1 + 4'($urandom % 9);
      if (d[N-1] == 0) d[N-1] = 4'd1 + 4'($urandom % 9);
      case (t)
        0: d = x;
        1: begin x = '0; x[N-1] = 4'd1; d = {N{4'd9}}; end
        2: begin x = {N{4'd9}}; d = '0; d[N-1] = 4'd1; end
        3: begin x = '0; x[N-1] = 4'd5; d = '0; d[N-1] = 4'd2; d[N-2] = 4'd5; end
        4: begin x = '0; x[N-1] = 4'd1; d = '0; d[N-1] = 4'd3; end
        default: ;
      endcase
      xe = '0; xe[N-1:0] = x;
      de = '0; de[N-1:0] = d;
      e = (to_big(xe, N) * p16) / to_big(de, N);
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1;
      @(posedge clk);
      cyc = 0;
      #1 start = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks += 2;
      if (to_big(q, N + 2) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h d=%h got %h exp %0d", x, d, q, e);
      end
      if (cyc + 1 != 20) begin             // edges after the start edge, plus that edge
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cyc + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
