// Testbench of the fixed-point BSD butterfly at W = 16.
// Random two's-complement A, B and twiddles (including the extreme values -2^15 and +-2^14,
// the twiddle 1.0) are applied one per clock; each result is compared exactly, one clock
// later, with A*2^14 +- B*W computed in 64-bit integers. Ends with the TB_RESULT line.
module tb_fxp_butterfly;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic signed [2*W+3:0] x0_re, x0_im, x1_re, x1_im;
  int checks = 0, failures = 0;

  fxp_butterfly #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  function automatic logic signed [W-1:0] pick();
    case ($urandom % 8)
      0: return -16'sd32768;
      1: return 16'sd16384;
      2: return -16'sd16384;
      3: return 16'sd32767;
      default: return W'($urandom);
    endcase
  endfunction

  longint e0r, e0i, e1r, e1i;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      a_re = pick(); a_im = pick(); b_re = pick(); b_im = pick(); w_re = pick(); w_im = pick();
      in_valid = 1;
      e0r = longint'(a_re) * 16384 + longint'(b_re) * w_re - longint'(b_im) * w_im;
      e1r = longint'(a_re) * 16384 - longint'(b_re) * w_re + longint'(b_im) * w_im;
      e0i = longint'(a_im) * 16384 + longint'(b_re) * w_im + longint'(b_im) * w_re;
      e1i = longint'(a_im) * 16384 - longint'(b_re) * w_im - longint'(b_im) * w_re;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || longint'(x0_re) != e0r || longint'(x1_re) != e1r ||
          longint'(x0_im) != e0i || longint'(x1_im) != e1i) begin
        failures++;
        if (failures < 5) $display("FAIL a=%0d,%0d b=%0d,%0d w=%0d,%0d got %0d %0d %0d %0d",
                                   a_re, a_im, b_re, b_im, w_re, w_im, x0_re, x0_im, x1_re, x1_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
