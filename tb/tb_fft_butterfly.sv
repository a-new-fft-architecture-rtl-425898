// tb_fft_butterfly: random pairs and twiddles, including full-scale values
// that saturate, against (a +/- w*b)/2 computed here in floating point.
// The design rounds twice, so a result may differ by 1 LSB. Also checks the
// one-clock latency of out_valid.
module tb_fft_butterfly;
  import fft_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cplx_t    i_r = '0, i_s = '0;
  twiddle_t w = '0;
  logic     out_valid;
  cplx_t    o_r, o_s;
  int checks = 0, failures = 0;

  fft_butterfly dut (.*);

  always #5 clk = ~clk;

  function automatic real sat(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  task automatic check(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 1.01 || exp - got > 1.01) begin
      failures++;
      if (failures < 10) $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      real ar, ai, br, bi, wr, wi, pr, pi;
      int  iar, iai, ibr, ibi, iwr, iwi, gr, gi, hr, hi;
      automatic int lim = (i < 200) ? 32767 : 20000;
      automatic real ang = 2.0 * 3.14159265358979323846 * $urandom_range(0, 4095) / 4096.0;
      @(negedge clk);
      i_r.re = DW'(int'($urandom_range(0, 2 * lim)) - lim);
      i_r.im = DW'(int'($urandom_range(0, 2 * lim)) - lim);
      i_s.re = DW'(int'($urandom_range(0, 2 * lim)) - lim);
      i_s.im = DW'(int'($urandom_range(0, 2 * lim)) - lim);
      w.re   = TWW'($rtoi(32767.0 * $cos(ang)));
      w.im   = TWW'($rtoi(32767.0 * $sin(ang)));
      in_valid = 1'b1;
      iar = i_r.re; iai = i_r.im; ibr = i_s.re; ibi = i_s.im; iwr = w.re; iwi = w.im;
      ar = iar; ai = iai; br = ibr; bi = ibi;
      wr = iwr / 32768.0; wi = iwi / 32768.0;
      pr = br * wr - bi * wi;
      pi = br * wi + bi * wr;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      gr = o_r.re; gi = o_r.im; hr = o_s.re; hi = o_s.im;
      check(gr, sat((ar + pr) / 2.0), "O_R.re");
      check(gi, sat((ai + pi) / 2.0), "O_R.im");
      check(hr, sat((ar - pr) / 2.0), "O_S.re");
      check(hi, sat((ai - pi) / 2.0), "O_S.im");
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
