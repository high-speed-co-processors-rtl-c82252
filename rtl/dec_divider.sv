// Radix-10 digit-recurrence divider: 16-digit BCD dividend X and divisor D, both in
// [0.1, 1), give the quotient X/D as 2 integer and 16 fractional BCD digits, truncated.
//
// Algorithm (quotient digits q in [-5, 5], convergence |w| <= 5/9 D):
//   init : w[0] = X / 100 (so |w[0]| < 0.01 <= 5/9 D for every normalised D).
//   step : q_{i+1} = largest k in [-4, 5] with (10w)' >= (k - 1/2) D', else -5;
//          w[i+1] = 10 w[i] - q_{i+1} D;
//          the quotient is accumulated in BCD by on-the-fly conversion (Q and Q - ulp).
//   end  : after 18 steps, if the final remainder is negative the quotient is Q - ulp
//          (correction), giving floor(X/D * 10^16).
// The partial remainder is a vector of signed decimal digits (two's-complement digits in
// [-6, 6], frame 10^1 .. 10^-19); each step subtracts the digit products q*D_j, brought to
// [-6, 6] by carry-free recoding, with a carry-free decimal adder (digit sum s, transfer
// t = +-1 when |s| >= 6, interim s - 10t, plus incoming transfer).
// Quotient-digit selection compares, in units of 10^-4, twice the shifted remainder
// truncated after its fourth fractional digit with (2k - 1) times D truncated to four
// digits; the total error is below 6e-4, inside the admissible 1/90.
// Timing: start taken when ready; the quotient is loaded on the 20th clock edge counting the
// edge that takes start (1 initialisation + 18 iterations + 1 termination); done then pulses.
// From the document: the recurrence w[i+1] = 10w[i] - q D, the digit set [-5, 5], the
// comparison multiples M_k = (k - 0.5) D, k in [-4, 5], a redundant decimal partial
// remainder, and correction / conversion at termination.
// Not as in the document: the document splits the remainder's top into a binary
// two's-complement carry-save part feeding a 14-bit binary selection, keeps the decimal part
// in [-6, 5] with a [-4, 5] divisor, and cites the initialisation and termination of an
// earlier design without giving them. Here the remainder is decimal throughout, the selection
// works on decimal truncations, the prescaling by 1/100 and truncated result are this
// design's own.
module dec_divider #(
  parameter int N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][3:0]   x,      // dividend, BCD, x[N-1] weighs 10^-1
  input  logic [N-1:0][3:0]   d,      // divisor, BCD, d[N-1] >= 1
  output logic                ready,
  output logic                done,
  output logic [N+1:0][3:0]   q       // quotient, q[N+1] weighs 10^1, q[0] weighs 10^-N
);
  localparam int FR = N + 3;          // fractional digits of the frame
  localparam int W  = FR + 2;         // frame digits: 10^1 .. 10^-FR
  localparam int P0 = FR;             // index of the 10^0 digit
  localparam int IT = N + 2;          // iterations (quotient digits)
  localparam int IW = $clog2(IT + 1);

  typedef logic signed [3:0] sd_t;
  typedef logic signed [7:0] wd_t;

  sd_t [W-1:0]        w;
  logic [N-1:0][3:0]  dr;
  logic [IT-1:0][3:0] qq, qm;         // quotient digits q1..q18, qq[IT-1] = q1
  logic [IW-1:0]      it;
  logic               busy, fin;

  assign ready = !busy && !fin;

  function automatic sd_t [W:0] recode(wd_t [W:0] a_in);
    wd_t [W:0] a;
    wd_t       t, tin, u;
    a = a_in;
    for (int pass = 0; pass < 3; pass++) begin
      tin = '0;
      for (int p = 0; p <= W; p++) begin
        t    = wd_t'((int'(a[p]) + 105) / 10 - 10);     // floor((a + 5) / 10)
        u    = a[p] - 8'sd10 * t;
        a[p] = u + tin;
        tin  = t;
      end
    end
    for (int p = 0; p <= W; p++) recode[p] = sd_t'(a[p]);
  endfunction

  function automatic sd_t [W:0] sd_add(sd_t [W:0] a, sd_t [W:0] b);
    wd_t s, t, tin;
    tin = '0;
    for (int p = 0; p <= W; p++) begin
      s = wd_t'(a[p]) + wd_t'(b[p]);
      t = (s >= 8'sd6) ? 8'sd1 : (s <= -8'sd6) ? -8'sd1 : 8'sd0;
      sd_add[p] = sd_t'(s - 8'sd10 * t + tin);
      tin = t;
    end
  endfunction

  // ---------- quotient digit selection ----------
  logic signed [4:0]  qd;
  always_comb begin
    logic signed [31:0] t10, d4;
    t10 = '0;
    for (int p = P0; p >= P0 - 5; p--) t10 = t10 * 10 + 32'(w[p]);   // 10w in 10^-4
    d4 = '0;
    for (int j = N - 1; j >= N - 4; j--) d4 = d4 * 10 + 32'(dr[j]);  // D in 10^-4
    qd = -5'sd5;
    for (int k = -4; k <= 5; k++)
      if (2 * t10 >= (2 * k - 1) * d4) qd = 5'(k);
  end

  // ---------- partial remainder update ----------
  sd_t [W:0] w_next_full;
  always_comb begin
    wd_t [W:0] m;
    sd_t [W:0] tenw;
    m = '0;
    for (int j = 0; j < N; j++) m[P0 - N + j] = -wd_t'(int'(qd) * int'(dr[j]));
    tenw = '0;
    for (int p = 1; p <= W; p++) tenw[p] = w[p-1];
    w_next_full = sd_add(tenw, recode(m));
  end

  // ---------- on-the-fly conversion ----------
  logic [IT-1:0][3:0] qq_n, qm_n;
  always_comb begin
    int pq;
    pq = IT - 1 - int'(it);
    qq_n = (qd >= 0) ? qq : qm;
    qm_n = (qd > 0) ? qq : qm;
    for (int p = 0; p < IT; p++) if (p == pq) begin
      qq_n[p] = (qd >= 0) ? 4'(qd) : 4'(10 + int'(qd));
      qm_n[p] = (qd > 0) ? 4'(int'(qd) - 1) : 4'(9 + int'(qd));
    end
  end

  // ---------- initialisation: w[0] = X / 100 ----------
  sd_t [W:0] w0;
  always_comb begin
    wd_t [W:0] m;
    m = '0;
    for (int j = 0; j < N; j++) m[P0 - N - 2 + j] = wd_t'({4'b0000, x[j]});
    w0 = recode(m);
  end

  // ---------- termination: correction by the remainder's sign ----------
  logic wneg;
  always_comb begin
    logic found;
    wneg  = 1'b0;
    found = 1'b0;
    for (int p = W - 1; p >= 0; p--)
      if (!found && w[p] != 0) begin
        found = 1'b1;
        wneg  = w[p] < 0;
      end
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
      w  <= w0[W-1:0];
      dr <= d;
      qq <= '0;
      qm <= '0;
    end else if (busy) begin
      w  <= w_next_full[W-1:0];
      qq <= qq_n;
      qm <= qm_n;
    end
    if (fin) q <= wneg ? qm : qq;
  end
endmodule
