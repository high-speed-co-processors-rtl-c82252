// Self-checking testbench of the sequential decimal multiplier. Random BCD operands (plus
// all-nines and zero corner cases) are started back to back as soon as ready allows; each
// product is compared with a schoolbook digit-array multiplication, the latency (n+7 clock
// edges, from the edge that takes start to the edge that loads the product) and the initiation interval (n+1 cycles) are checked.
module tb_dec_seq_multiplier;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  logic [N-1:0][3:0]   x, y;
  logic [2*N-1:0][3:0] p;
  int checks = 0, failures = 0;

  dec_seq_multiplier #(.N(N)) dut (.clk, .rst_n, .start, .x, .y, .ready, .done, .p);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*N-1:0][3:0] expq[$];
  int                  tstart[$];
  int                  cyc = 0;
  int                  last_start = -100;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [2*N-1:0][3:0] ref_mul(logic [N-1:0][3:0] a, logic [N-1:0][3:0] b);
    int acc[2*N];
    logic [2*N-1:0][3:0] r;
    int c;
    for (int k = 0; k < 2 * N; k++) acc[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) acc[i+j] += int'(a[i]) * int'(b[j]);
    c = 0;
    for (int k = 0; k < 2 * N; k++) begin
      acc[k] += c;
      r[k] = 4'(acc[k] % 10);
      c = acc[k] / 10;
    end
    return r;
  endfunction

  // checker
  always @(posedge clk) if (rst_n && done) begin
    logic [2*N-1:0][3:0] e;
    int ts;
    e  = expq.pop_front();
    ts = tstart.pop_front();
    checks += 2;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL product got %h exp %h", p, e);
    end
    if (cyc - ts != N + 7) begin
      failures++;
      $display("FAIL latency %0d", cyc - ts);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      for (int j = 0; j < N; j++) begin x[j] = 4'($urandom % 10); y[j] = 4'($urandom % 10); end
      if (t == 0) begin x = {N{4'd9}}; y = {N{4'd9}}; end
      if (t == 1) y = '0;
      if (t == 2) x = '0;
      start = 1;
      expq.push_back(ref_mul(x, y));
      tstart.push_back(cyc);
      if (last_start >= 0) begin
        checks++;
        if (cyc - last_start != N + 1) begin
          failures++;
          $display("FAIL initiation interval %0d", cyc - last_start);
        end
      end
      last_start = cyc;
      @(negedge clk);
      start = 0;
    end
    repeat (3 * N) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d products missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
