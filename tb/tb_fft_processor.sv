// tb_fft_processor: one processor computing 128-point FFTs on its own two
// banks (modelled here as arrays with one clock of read latency). The input
// is stored in bit-reversed order (sample t at element bitrev(t): bank d[0],
// word d[6:1]); the result must be X[k]/128 with bin k in bank 0 word k for
// k < 64 and bank 1 word 127-k otherwise, within 3 LSBs of a floating-point
// FFT. Also checks that the lower port never leaves B(i,1) and that one
// transform takes 7*(64+2) clocks.
module tb_fft_processor;
  import fft_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0]         log2n = 4'd7;
  logic [3:0]         proc_id = 4'd5;
  logic [BANK_AW-1:0] b0_raddr, b0_waddr, b1_raddr, b1_waddr;
  cplx_t              b0_rdata, b0_wdata, b1_rdata, b1_wdata;
  logic               b0_we, b1_we, busy, done;
  ic_sel_t            ic_sel;

  fft_processor dut (.*);

  always #5 clk = ~clk;

  cplx_t bank [2][BANK_DEPTH];
  always @(posedge clk) begin
    b0_rdata <= bank[0][b0_raddr];
    b1_rdata <= bank[1][b1_raddr];
    if (b0_we) bank[0][b0_waddr] <= b0_wdata;
    if (b1_we) bank[1][b1_waddr] <= b1_wdata;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (busy && ic_sel != 0) failures++;

  real xr [128], xi [128];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      int t0;
      real maxe;
      for (int t = 0; t < 128; t++) begin
        automatic int r = 0;
        automatic int vr = int'($urandom_range(0, 30000)) - 15000;
        automatic int vi = int'($urandom_range(0, 30000)) - 15000;
        if (run == 1) begin vr = (t == 3) ? 20000 : 0; vi = 0; end   // impulse
        for (int b = 0; b < 7; b++) if (t[b]) r |= 1 << (6 - b);
        xr[t] = vr; xi[t] = vi;
        bank[r & 1][r >> 1] = '{re: DW'(vr), im: DW'(vi)};
      end
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 7 * (BANK_DEPTH + PIPE_LAT) + 1) begin
        failures++;
        $display("run %0d took %0d clocks", run, cyc - t0);
      end
      maxe = 0.0;
      for (int k = 0; k < 128; k++) begin
        real er, ei;
        int  gr, gi;
        cplx_t g;
        er = 0.0;
        ei = 0.0;
        for (int t = 0; t < 128; t++) begin
          er += xr[t] * $cos(2.0 * 3.14159265358979323846 * k * t / 128.0) +
                xi[t] * $sin(2.0 * 3.14159265358979323846 * k * t / 128.0);
          ei += xi[t] * $cos(2.0 * 3.14159265358979323846 * k * t / 128.0) -
                xr[t] * $sin(2.0 * 3.14159265358979323846 * k * t / 128.0);
        end
        er /= 128.0; ei /= 128.0;
        g  = (k < 64) ? bank[0][k] : bank[1][127 - k];
        gr = g.re; gi = g.im;
        checks++;
        if (gr - er > 3.0 || er - gr > 3.0 || gi - ei > 3.0 || ei - gi > 3.0) begin
          failures++;
          if (failures < 10) $display("run %0d bin %0d: got (%0d,%0d) expected (%f,%f)",
                                      run, k, gr, gi, er, ei);
        end
      end
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
