// Self-checking testbench of the decimal square root. Radicands: the worked example
// 0.3521986 (root 0.5934632...), the ends of the range (0.01, 0.3 on both sides of the
// initial-digit threshold, 0.9999999999999999) and random 16-digit values in [0.01, 1).
// The reference root is the integer square root of X * 10^32, rounded to nearest, computed
// bit by bit on 140-bit integers. Also checks the 19-edge latency.
module tb_dec_sqrt;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0, ready, done, q_int;
  logic [N-1:0][3:0] x, q;
  int checks = 0, failures = 0;

  dec_sqrt #(.N(N)) dut (.clk, .rst_n, .start, .x, .ready, .done, .q_int, .q);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [139:0] big_t;

  function automatic big_t isqrt(big_t v);
    big_t r, b;
    r = 0;
    b = big_t'(1) << 138;
    while (b > v) b >>= 2;
    while (b != 0) begin
      if (v >= r + b) begin
        v = v - (r + b);
        r = (r >> 1) + b;
      end else begin
        r = r >> 1;
      end
      b >>= 2;
    end
    return r;
  endfunction

  function automatic big_t to_big(logic [N-1:0][3:0] d);
    big_t v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * 10 + big_t'(d[j]);
    return v;
  endfunction

  initial begin
    big_t xv, r, e;
    big_t p16;
    int   cyc;
    p16 = 1;
    for (int j = 0; j < N; j++) p16 = p16 * 10;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < N; j++) x[j] = 4'($urandom % 10);
      if (x[N-1] == 0 && x[N-2] == 0) x[N-2] = 4'd1 + 4'($urandom % 9);
      case (t)
        0: begin x = '0; {x[N-1], x[N-2], x[N-3], x[N-4], x[N-5], x[N-6], x[N-7]} =
                 {4'd3, 4'd5, 4'd2, 4'd1, 4'd9, 4'd8, 4'd6}; end
        1: begin x = '0; x[N-2] = 4'd1; end
        2: begin x = '0; x[N-1] = 4'd3; end
        3: begin x = {N{4'd9}}; x[N-1] = 4'd2; end
        4: x = {N{4'd9}};
        default: ;
      endcase
      xv = to_big(x) * p16;                 // X * 10^32
      r  = isqrt(xv);
      e  = ((2 * r + 1) * (2 * r + 1) <= 4 * xv) ? r + 1 : r;
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1;
      @(posedge clk);
      cyc = 0;
      #1 start = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks += 2;
      if ((q_int ? p16 + to_big(q) : to_big(q)) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h got %0d.%h exp %0d", x, q_int, q, e);
      end
      if (t == 0) $display("sqrt(0.3521986) = %0d.%h", q_int, q);
      if (cyc + 1 != 19) begin            // edges after the start edge, plus that edge
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
