// End-to-end testbench of the co-processor top at its default size (16 decimal digits).
// Butterfly: random IEEE single operands, one butterfly per clock, results compared one
// cycle later with A +- B*W computed in real arithmetic (tolerance 2^-21 of the operand
// scale). Every tenth case uses W = 1 and A = -B so that X0 cancels to zero and every
// seventh W = 1, A = -B*(1+2^-k), which forces deep cancellation and renormalisation.
// Decimal adder: random signed-digit operands, value checked one clock later.
// Decimal multiplier: random BCD operands started back to back, product checked against
// schoolbook multiplication.
// Fixed-point butterfly: random 16-bit operands, every fifth with twiddle 1.0, compared
// exactly with A*2^14 +- B*W one clock later.
// Decimal divider and square root: random normalised operands, quotient checked against
// floor(X*10^16/D), root against the rounded integer square root of X*10^32.
// Mechanisms counted (each must occur): butterflies, deep cancellation, exact zero result,
// positive and negative decimal transfer out of the top digit, decimal products, a new
// multiplication started while the previous one is still merging, quotients, a quotient
// corrected for a negative final remainder, roots, roots started with q0 = 1, and fixed-point
// butterflies.
module tb_coproc_top;
  import tb_fp_util::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic        bf_in_valid = 0, bf_out_valid;
  logic [31:0] a_re, a_im, b_re, b_im, w_re, w_im, x0_re, x0_im, x1_re, x1_im;
  logic        da_in_valid = 0, da_out_valid, da_t_out, da_T_out;
  logic [N-1:0][4:0] da_x, da_y, da_s;
  logic        dm_start = 0, dm_ready, dm_done;
  logic [N-1:0][3:0]   dm_x, dm_y;
  logic [2*N-1:0][3:0] dm_p;
  int checks = 0, failures = 0;
  logic        dd_start = 0, dd_ready, dd_done, ds_start = 0, ds_ready, ds_done, ds_q_int;
  logic [N-1:0][3:0]   dd_x, dd_d, ds_x, ds_q;
  logic [N+1:0][3:0]   dd_q;
  int n_bf = 0, n_cancel = 0, n_zero = 0, n_tpos = 0, n_tneg = 0, n_prod = 0, n_overlap = 0;
  logic        fx_in_valid = 0, fx_out_valid;
  logic signed [15:0] fx_a_re, fx_a_im, fx_b_re, fx_b_im, fx_w_re, fx_w_im;
  logic signed [35:0] fx_x0_re, fx_x0_im, fx_x1_re, fx_x1_im;
  int n_fx = 0;
  int n_quot = 0, n_corr = 0, n_root = 0, n_q0 = 0;

  coproc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ---------------- butterfly ----------------
  real er0, ei0, er1, ei1, sc;
  initial begin
    real ar, ai, br, bi, wr, wi, pr, pi;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ar = rnd_real(-4, 4); ai = rnd_real(-4, 4);
      br = rnd_real(-4, 4); bi = rnd_real(-4, 4);
      wr = rnd_real(-3, 0); wi = rnd_real(-3, 0);
      if (n % 10 == 0) begin wr = 1.0; wi = 0.0; ar = -f2r(r2f(br)); end
      if (n % 10 == 7) begin
        wr = 1.0; wi = 0.0;
        ar = -f2r(r2f(br)) * (1.0 + pow2(-2 - int'($urandom % 18)));
      end
      a_re = r2f(ar); a_im = r2f(ai); b_re = r2f(br); b_im = r2f(bi);
      w_re = r2f(wr); w_im = r2f(wi);
      ar = f2r(a_re); ai = f2r(a_im); br = f2r(b_re); bi = f2r(b_im);
      wr = f2r(w_re); wi = f2r(w_im);
      pr = br * wr - bi * wi;
      pi = br * wi + bi * wr;
      er0 = ar + pr; ei0 = ai + pi; er1 = ar - pr; ei1 = ai - pi;
      sc = rabs(ar) + rabs(ai) + (rabs(br) + rabs(bi)) * (rabs(wr) + rabs(wi));
      if (rabs(er0) < sc * pow2(-8) && er0 != 0.0) n_cancel++;
      bf_in_valid = 1;
      @(posedge clk);
      #1;
      chk("bf valid", bf_out_valid);
      chk($sformatf("x0.re %g vs %g", f2r(x0_re), er0), rabs(f2r(x0_re) - er0) <= sc * pow2(-21));
      chk("x0.im", rabs(f2r(x0_im) - ei0) <= sc * pow2(-21));
      chk("x1.re", rabs(f2r(x1_re) - er1) <= sc * pow2(-21));
      chk("x1.im", rabs(f2r(x1_im) - ei1) <= sc * pow2(-21));
      if (er0 == 0.0 && x0_re[30:0] == 0) n_zero++;
      n_bf++;
    end
    @(negedge clk);
    bf_in_valid = 0;
  end

  // ---------------- decimal adder ----------------
  function automatic longint dval(logic [N-1:0][4:0] d);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--)
      v = v * 10 - 8 * d[i][4] + 4 * d[i][3] + 2 * d[i][2] + d[i][1] - d[i][0];
    return v;
  endfunction

  initial begin
    longint e, p10;
    p10 = 1;
    for (int i = 0; i < N; i++) p10 *= 10;
    wait (rst_n);
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin da_x[j] = 5'($urandom); da_y[j] = 5'($urandom); end
      e = dval(da_x) + dval(da_y);
      da_in_valid = 1;
      @(posedge clk);
      #1;
      chk("da valid", da_out_valid);
      chk("da sum", dval(da_s) + p10 * (longint'(da_t_out) - longint'(da_T_out)) == e);
      if (da_t_out) n_tpos++;
      if (da_T_out) n_tneg++;
    end
    @(negedge clk);
    da_in_valid = 0;
  end

  // ---------------- decimal multiplier ----------------
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

  logic [2*N-1:0][3:0] expq[$];
  int in_flight = 0;
  always @(posedge clk) if (rst_n && dm_done) begin
    chk("dm product", expq.size() > 0 && dm_p == expq[0]);
    if (expq.size() > 0) void'(expq.pop_front());
    n_prod++;
  end

  initial begin
    wait (rst_n);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      while (!dm_ready) @(negedge clk);
      for (int j = 0; j < N; j++) begin dm_x[j] = 4'($urandom % 10); dm_y[j] = 4'($urandom % 10); end
      if (expq.size() > 0) n_overlap++;       // previous product not out yet
      expq.push_back(ref_mul(dm_x, dm_y));
      dm_start = 1;
      @(negedge clk);
      dm_start = 0;
    end
  end

  // ---------------- decimal divider and square root ----------------
  typedef logic [139:0] big_t;

  function automatic big_t to_big(logic [N+1:0][3:0] v, int len);
    big_t r = 0;
    for (int j = len - 1; j >= 0; j--) r = r * 10 + big_t'(v[j]);
    return r;
  endfunction

  function automatic big_t isqrt(big_t v);
    big_t r, b;
    r = 0;
    b = big_t'(1) << 138;
    while (b > v) b >>= 2;
    while (b != 0) begin
      if (v >= r + b) begin v = v - (r + b); r = (r >> 1) + b; end
      else r = r >> 1;
      b >>= 2;
    end
    return r;
  endfunction

  // ---------------- fixed-point butterfly ----------------
  initial begin
    longint e0r, e0i, e1r, e1i;
    wait (rst_n);
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      fx_a_re = 16'($urandom); fx_a_im = 16'($urandom); fx_b_re = 16'($urandom);
      fx_b_im = 16'($urandom); fx_w_re = 16'($urandom); fx_w_im = 16'($urandom);
      if (t % 5 == 0) fx_w_re = 16'sd16384;
      fx_in_valid = 1;
      e0r = longint'(fx_a_re) * 16384 + longint'(fx_b_re) * fx_w_re - longint'(fx_b_im) * fx_w_im;
      e1r = longint'(fx_a_re) * 16384 - longint'(fx_b_re) * fx_w_re + longint'(fx_b_im) * fx_w_im;
      e0i = longint'(fx_a_im) * 16384 + longint'(fx_b_re) * fx_w_im + longint'(fx_b_im) * fx_w_re;
      e1i = longint'(fx_a_im) * 16384 - longint'(fx_b_re) * fx_w_im - longint'(fx_b_im) * fx_w_re;
      @(posedge clk);
      #1;
      chk("fixed-point butterfly", fx_out_valid && longint'(fx_x0_re) == e0r &&
          longint'(fx_x1_re) == e1r && longint'(fx_x0_im) == e0i && longint'(fx_x1_im) == e1i);
      n_fx++;
    end
    @(negedge clk);
    fx_in_valid = 0;
  end

  initial begin
    big_t e, p16;
    logic [N+1:0][3:0] xe, de;
    p16 = 1;
    for (int j = 0; j < N; j++) p16 = p16 * 10;
    wait (rst_n);
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < N; j++) begin dd_x[j] = 4'($urandom % 10); dd_d[j] = 4'($urandom % 10); end
      if (dd_x[N-1] == 0) dd_x[N-1] = 4'd1;
      if (dd_d[N-1] == 0) dd_d[N-1] = 4'd1;
      xe = '0; xe[N-1:0] = dd_x;
      de = '0; de[N-1:0] = dd_d;
      e = (to_big(xe, N) * p16) / to_big(de, N);
      @(negedge clk);
      while (!dd_ready) @(negedge clk);
      dd_start = 1;
      @(negedge clk);
      dd_start = 0;
      while (!dd_done) begin
        @(posedge clk);
        #1;
      end
      chk("dd quotient", to_big(dd_q, N + 2) == e);
      if (dut.u_ddiv.q != dut.u_ddiv.qq) n_corr++;
      n_quot++;
    end
  end

  initial begin
    big_t e, r, xv, p16;
    logic [N+1:0][3:0] xe, qe;
    p16 = 1;
    for (int j = 0; j < N; j++) p16 = p16 * 10;
    wait (rst_n);
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < N; j++) ds_x[j] = 4'($urandom % 10);
      if (ds_x[N-1] == 0 && ds_x[N-2] == 0) ds_x[N-2] = 4'd5;
      xe = '0; xe[N-1:0] = ds_x;
      xv = to_big(xe, N) * p16;
      r  = isqrt(xv);
      e  = ((2 * r + 1) * (2 * r + 1) <= 4 * xv) ? r + 1 : r;
      if (ds_x[N-1] >= 4'd3) n_q0++;
      @(negedge clk);
      while (!ds_ready) @(negedge clk);
      ds_start = 1;
      @(negedge clk);
      ds_start = 0;
      while (!ds_done) begin
        @(posedge clk);
        #1;
      end
      qe = '0; qe[N-1:0] = ds_q;
      chk("ds root", (ds_q_int ? p16 : 0) + to_big(qe, N) == e);
      n_root++;
    end
  end

  initial begin
    wait (rst_n);
    repeat (600) @(posedge clk);
    chk("all products out", expq.size() == 0);
    chk("mechanism: butterflies", n_bf > 0);
    chk("mechanism: deep cancellation", n_cancel > 0);
    chk("mechanism: exact zero", n_zero > 0);
    chk("mechanism: positive decimal transfer", n_tpos > 0);
    chk("mechanism: negative decimal transfer", n_tneg > 0);
    chk("mechanism: decimal products", n_prod > 0);
    chk("mechanism: overlapped multiplications", n_overlap > 0);
    chk("mechanism: fixed-point butterflies", n_fx > 0);
    chk("mechanism: quotients", n_quot > 0);
    chk("mechanism: quotient correction", n_corr > 0);
    chk("mechanism: square roots", n_root > 0);
    chk("mechanism: root with q0 = 1", n_q0 > 0);
    $display("mechanisms: butterflies=%0d cancellation=%0d zero=%0d t_pos=%0d t_neg=%0d products=%0d overlap=%0d",
             n_bf, n_cancel, n_zero, n_tpos, n_tneg, n_prod, n_overlap);
    $display("mechanisms: fixed_point_butterflies=%0d", n_fx);
    $display("mechanisms: quotients=%0d corrected=%0d roots=%0d q0_one=%0d", n_quot, n_corr,
             n_root, n_q0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
