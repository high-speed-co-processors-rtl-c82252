// Radix-10 digit-recurrence square root: 16-digit BCD radicand X in [0.01, 1) to the
// 16-digit BCD root Q = sqrt(X), rounded to nearest.
//
// Algorithm (root digits q in [-5, 5]):
//   init : q0 = 1 if X >= 0.3 (most significant digit >= 3) else 0; w[0] = X - q0.
//   step : M_k = (2k-1) Q[i] + 10^-i K_k, K_k = (k^2 + (k-1)^2)/20 + 25/810 - 1/18,
//          k = -4..5, the midpoint between the lower bound of digit k and the upper bound
//          of digit k-1 of the selection intervals;
//          q_{i+1} = largest k with (10w)' >= M_k' (-5 if none);
//          w[i+1] = 10 w[i] - (2 q_{i+1} Q[i] + q_{i+1}^2 10^-(i+1));
//          Q[i+1] = Q[i] + q_{i+1} 10^-(i+1), kept in BCD by on-the-fly conversion (Q and
//          QM = Q - 10^-(i+1) registers, so negative digits never need a borrow chain).
//   end  : if the last partial remainder is negative the root is QM, else Q (17 fractional
//          digits, truncated root); then rounded to 16 digits.
// The partial remainder is a vector of signed decimal digits in [-6, 6] (frame 10^1 ..
// 10^-18, two's-complement digits), updated each cycle by a carry-free decimal adder: a
// digit sum s in [-12, 12] gives a transfer t = +1 (s >= 6), -1 (s <= -6) or 0 and an interim
// s - 10t in [-5, 5]; adding the incoming transfer stays in [-6, 6]. The multiple
// 2q*Q + q^2*10^-(i+1) is formed digit by digit (digit products of Q by 2q) and brought into
// [-6, 6] by three carry-free recoding passes before it is subtracted.
// Root-digit selection works on truncated values in units of 10^-4: (10w)' from the top six
// digits of 10w, M_k' from Q truncated to four digits and K_k rounded; the total truncation
// error stays below 0.0011, well inside the admissible 0.0105.
// Timing: start taken when ready; 19 clock edges from the edge that takes start to the edge
// that loads the root (1 initialisation + 17 iterations + 1 termination); done then pulses.
// From the document: the recurrence, digit set, comparison multiples, selection rule,
// initialisation, on-the-fly conversion, [-6, 6] remainder digits and the 1+17+1 cycles.
// The -1/18 term is this design's: it centres M_k in the overlap of the selection
// intervals; without it the first digit is misselected for small radicands with q0 = 0.
// This design's own choices also include: the redundant adders' internal recoding, forming 2qQ by digit
// products instead of selecting easy multiples, the selection arithmetic and its truncation
// points, and round-half-up rounding (a tie cannot occur for a 16-digit radicand).
module dec_sqrt #(
  parameter int N = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0][3:0] x,      // BCD digits of X, x[N-1] weighs 10^-1
  output logic              ready,
  output logic              done,
  output logic              q_int,  // integer digit of the root (only when it rounds to 1)
  output logic [N-1:0][3:0] q       // BCD fractional digits, q[N-1] weighs 10^-1
);
  localparam int FR = N + 2;          // fractional digits of the frame
  localparam int D  = FR + 2;         // frame digits: 10^1 .. 10^-FR
  localparam int P0 = FR;             // index of the 10^0 digit
  localparam int IT = N + 1;          // iterations
  localparam int IW = $clog2(IT + 1);

  typedef logic signed [3:0] sd_t;    // remainder digit in [-6, 6]
  typedef logic signed [7:0] wd_t;    // wide intermediate digit

  sd_t [D-1:0]         w;
  logic [D-2:0][3:0]   qq, qm;        // BCD root and root - ulp, digits 10^0 .. 10^-FR
  logic [IW-1:0]       it;
  logic                busy, fin;

  assign ready = !busy && !fin;

  // ---------- carry-free recoding of wide digits into [-6, 6] (three passes) ----------
  function automatic sd_t [D:0] recode(wd_t [D:0] d);
    wd_t [D:0] a;
    wd_t       t, tin, u;
    a = d;
    for (int pass = 0; pass < 3; pass++) begin
      tin = '0;
      for (int p = 0; p <= D; p++) begin
        t    = wd_t'((int'(a[p]) + 105) / 10 - 10);     // floor((a + 5) / 10)
        u    = a[p] - 8'sd10 * t;
        a[p] = u + tin;
        tin  = t;
      end
    end
    for (int p = 0; p <= D; p++) recode[p] = sd_t'(a[p]);
  endfunction

  // ---------- carry-free addition of two [-6, 6] digit vectors ----------
  function automatic sd_t [D:0] sd_add(sd_t [D:0] a, sd_t [D:0] b);
    wd_t s, t, tin;
    tin = '0;
    for (int p = 0; p <= D; p++) begin
      s = wd_t'(a[p]) + wd_t'(b[p]);
      t = (s >= 8'sd6) ? 8'sd1 : (s <= -8'sd6) ? -8'sd1 : 8'sd0;
      sd_add[p] = sd_t'(s - 8'sd10 * t + tin);
      tin = t;
    end
  endfunction

  // ---------- root digit selection ----------
  function automatic int kterm(int k, int i);
    int v;
    v = 500 * (k * k + (k - 1) * (k - 1)) - 247;       // K_k - 1/18 in units of 10^-4
    for (int j = 0; j < 5; j++) if (j < i) v = v / 10;
    return (i >= 5) ? 0 : v;
  endfunction

  logic signed [4:0]  qd;             // selected digit q_{i+1}
  logic signed [31:0] t10, q4;

  always_comb begin
    logic signed [31:0] mk;
    // (10w)' in units of 10^-4: digits 10^0 .. 10^-5 of w
    t10 = '0;
    for (int p = P0; p >= P0 - 5; p--) t10 = t10 * 10 + 32'(w[p]);
    q4 = '0;
    for (int p = P0; p >= P0 - 4; p--) q4 = q4 * 10 + 32'(qq[p]);
    qd = -5'sd5;
    for (int k = -4; k <= 5; k++) begin
      mk = (2 * k - 1) * q4 + kterm(k, int'(it));
      if (t10 >= mk) qd = 5'(k);
    end
  end

  // ---------- partial remainder update ----------
  sd_t [D:0] w_next_full;
  always_comb begin
    wd_t [D:0] m;
    sd_t [D:0] tenw, mneg;
    int         pq;
    // -(2q Q + q^2 10^-(i+1)) as wide digits, position p weighs 10^(p - P0)
    m = '0;
    for (int p = 0; p < D - 1; p++) m[p] = -wd_t'(2 * int'(qd) * int'(qq[p]));
    pq = P0 - 1 - int'(it);
    for (int p = 0; p < D; p++) if (p == pq) m[p] = m[p] - wd_t'(int'(qd) * int'(qd));
    mneg = recode(m);
    tenw = '0;
    for (int p = 1; p <= D; p++) tenw[p] = w[p-1];
    w_next_full = sd_add(tenw, mneg);
  end

  // ---------- on-the-fly conversion ----------
  logic [D-2:0][3:0] qq_n, qm_n;
  always_comb begin
    int pq;
    pq = P0 - 1 - int'(it);
    qq_n = (qd >= 0) ? qq : qm;
    qm_n = (qd > 0) ? qq : qm;
    for (int p = 0; p < D - 1; p++) if (p == pq) begin
      qq_n[p] = (qd >= 0) ? 4'(qd) : 4'(10 + int'(qd));
      qm_n[p] = (qd > 0) ? 4'(int'(qd) - 1) : 4'(9 + int'(qd));
    end
  end

  // ---------- initialisation ----------
  sd_t [D:0] w0;
  logic      q0;
  assign q0 = (x[N-1] >= 4'd3);
  always_comb begin
    wd_t [D:0] m;
    m = '0;
    for (int j = 0; j < N; j++) m[P0 - N + j] = wd_t'({4'b0000, x[j]});
    m[P0] = q0 ? -8'sd1 : 8'sd0;
    w0 = recode(m);
  end

  // ---------- termination: select, round ----------
  logic              wneg;
  logic [N-1:0][3:0] r_frac;
  logic              r_int;
  always_comb begin
    logic [D-2:0][3:0] qs;
    logic              c, found;
    wneg  = 1'b0;
    found = 1'b0;
    for (int p = D - 1; p >= 0; p--)
      if (!found && w[p] != 0) begin
        found = 1'b1;
        wneg  = w[p] < 0;
      end
    qs = wneg ? qm : qq;
    // round to nearest on digit 10^-(N+1)
    c = (qs[P0 - N - 1] >= 4'd5);
    for (int j = 0; j < N; j++) begin
      logic [4:0] s;
      s = 5'(qs[P0 - N + j]) + 5'(c);
      c = (s > 5'd9);
      r_frac[j] = c ? 4'(s - 5'd10) : s[3:0];
    end
    r_int = c | (qs[P0] != 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      fin  <= 1'b0;
      done <= 1'b0;
      it   <= '0;
    end else begin
      done <= 1'b0;
      if (start && ready) begin
        busy <= 1'b1;
        it   <= '0;
      end else if (busy) begin
        it <= it + 1'b1;
        if (it == IW'(IT - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end else if (fin) begin
        fin  <= 1'b0;
        done <= 1'b1;
      end
    end
    if (start && ready) begin
      w          <= w0[D-1:0];
      qq         <= '0;
      qm         <= '0;
      qq[P0]     <= 4'(q0);
    end else if (busy) begin
      w  <= w_next_full[D-1:0];
      qq <= qq_n;
      qm <= qm_n;
    end
    if (fin) begin
      q     <= r_frac;
      q_int <= r_int;
    end
  end
endmodule
