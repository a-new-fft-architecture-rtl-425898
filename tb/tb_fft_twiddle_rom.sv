// tb_fft_twiddle_rom: every ROM entry against exp(-j*pi*t/1024) computed
// here in floating point (within 1 LSB of Q1.15), with one clock of latency.
module tb_fft_twiddle_rom;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic [TW_AW-1:0]  addr = '0;
  twiddle_t          tw;
  int checks = 0, failures = 0;

  fft_twiddle_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < TW_ENTRIES; t++) begin
      real er, ei, gr, gi;
      int  tr, ti;
      @(negedge clk);
      addr = TW_AW'(t);
      @(negedge clk);
      er = 32767.0 * $cos(-3.14159265358979323846 * t / TW_ENTRIES);
      ei = 32767.0 * $sin(-3.14159265358979323846 * t / TW_ENTRIES);
      tr = tw.re; ti = tw.im;
      gr = tr; gi = ti;
      checks++;
      if (gr - er > 1.0 || er - gr > 1.0 || gi - ei > 1.0 || ei - gi > 1.0) begin
        failures++;
        if (failures < 5) $display("t=%0d got (%f,%f) expected (%f,%f)", t, gr, gi, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
