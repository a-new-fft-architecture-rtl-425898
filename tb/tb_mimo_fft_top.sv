// tb_mimo_fft_top: end-to-end test of the variable-length MIMO FFT at its
// default size (16 processors, 2048-point maximum).
//
// A sequence of frames is streamed in: one 2048-point symbol, four 512-point
// symbols, a 1024+512+256+128 mix, a 256+256+128+128 mix, a lone 128-point
// symbol on stream 2, two 1024-point symbols and a final 2048-point symbol.
// Every output bin is compared with a floating-point FFT computed here,
// divided by N (the design halves in each stage), within TOL LSBs.
// The test also checks the compute time of every frame (n stages of 64 pairs
// plus a 2-clock drain = 66*n clocks for the longest symbol of the frame) and
// counts the mechanisms of the design, failing if one never happened:
// butterfly input exchange, output exchange, each of the four inter-processor
// routes, every group size 1..16, frames of several concurrent symbols, and
// loading / unloading overlapping a computation (ping-pong memories).
module tb_mimo_fft_top;
  import fft_pkg::*;

  localparam int TOL = 6;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  sym_cfg_t    cfg [NSYM];
  logic        in_valid = 1'b0;
  logic        in_ready;
  cplx_t       in_data = '0;
  logic        out_valid;
  cplx_t       out_data;
  logic [1:0]  out_sym;
  logic [10:0] out_idx;
  logic        out_last;
  logic        compute_busy;

  mimo_fft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  // ---- reference FFT (iterative radix-2, floating point) ---------------------
  typedef struct { int sym; int idx; real re; real im; bit last; } exp_t;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  exp_t exp_q [$];

  task automatic ref_fft(input real xr [], input real xi [], input int n,
                         output real yr [], output real yi []);
    int nn = 1 << n;
    yr = new[nn]; yi = new[nn];
    for (int t = 0; t < nn; t++) begin
      int r = 0;
      for (int b = 0; b < n; b++) if (t[b]) r |= 1 << (n - 1 - b);
      yr[r] = xr[t]; yi[r] = xi[t];
    end
    for (int len = 2; len <= nn; len *= 2) begin
      for (int s0 = 0; s0 < nn; s0 += len) begin
        for (int k = 0; k < len / 2; k++) begin
          real ang = -2.0 * 3.14159265358979323846 * k / len;
          real wr = $cos(ang), wi = $sin(ang);
          real br = yr[s0+k+len/2] * wr - yi[s0+k+len/2] * wi;
          real bi = yr[s0+k+len/2] * wi + yi[s0+k+len/2] * wr;
          real ar = yr[s0+k], ai = yi[s0+k];
          yr[s0+k] = ar + br;        yi[s0+k] = ai + bi;
          yr[s0+k+len/2] = ar - br;  yi[s0+k+len/2] = ai - bi;
        end
      end
    end
  endtask

  // ---- stimulus ---------------------------------------------------------------
  int n_frames_multi = 0;
  int frame_n0 [$];             // log2 length of the longest symbol per frame

  task automatic send(input cplx_t v);
    in_data  = v;
    in_valid = 1'b1;
    #1;                                       // let in_ready settle
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic frame(input int l0, input int l1, input int l2, input int l3);
    int ls [4] = '{l0, l1, l2, l3};
    int nsym = 0;
    for (int s = 0; s < NSYM; s++) begin
      cfg[s].en    = (ls[s] != 0);
      cfg[s].log2n = 4'(ls[s]);
    end
    for (int s = 0; s < NSYM; s++) if (ls[s] != 0) begin
      int nn = 1 << ls[s];
      real xr [], xi [], yr [], yi [];
      int  amp = (ls[s] >= 10) ? 6000 : 9000;
      int  tone = $urandom_range(0, nn - 1);
      if (nsym == 0) frame_n0.push_back(ls[s]);
      nsym++;
      xr = new[nn]; xi = new[nn];
      for (int t = 0; t < nn; t++) begin
        cplx_t v;
        real ang = 2.0 * 3.14159265358979323846 * tone * t / nn;
        int re = int'($urandom_range(0, 2 * amp)) - amp + $rtoi(4000.0 * $cos(ang));
        int im = int'($urandom_range(0, 2 * amp)) - amp + $rtoi(4000.0 * $sin(ang));
        v.re = DW'(re); v.im = DW'(im);
        xr[t] = re; xi[t] = im;
        send(v);
      end
      ref_fft(xr, xi, ls[s], yr, yi);
      for (int k = 0; k < nn; k++)
        exp_q.push_back('{sym: s, idx: k, re: yr[k] / nn, im: yi[k] / nn, last: (k == nn - 1)});
    end
    if (nsym > 1) n_frames_multi++;
  endtask

  // ---- output checking ------------------------------------------------------------
  real max_err = 0.0;
  always @(negedge clk) if (rst_n && out_valid) begin
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output sym=%0d idx=%0d", out_sym, out_idx);
    end else begin
      exp_t e;
      real  er, ei;
      int   gr, gi;
      gr = int'(out_data.re);
      gi = int'(out_data.im);
      e  = exp_q.pop_front();
      er = rabs(real'(gr) - e.re);
      ei = rabs(real'(gi) - e.im);
      checks++;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      if (out_sym != 2'(e.sym) || out_idx != 11'(e.idx) || out_last != e.last || er > TOL || ei > TOL) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH sym=%0d/%0d idx=%0d/%0d got (%0d,%0d) exp (%f,%f)",
                   out_sym, e.sym, out_idx, e.idx, gr, gi, e.re, e.im);
      end
    end
  end

  // ---- mechanism counters and timing ---------------------------------------
  int n_swapin = 0, n_swapout = 0, n_route [5] = '{default: 0};
  int n_group [12] = '{default: 0};
  int n_load_overlap = 0, n_unload_overlap = 0;
  int busy_run = 0, frame_no = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPROC; i++) begin
      if (dut.p1_we[i]) n_route[dut.p_sel[i]]++;
      if (dut.p_start[i] && (i % (1 << (dut.p_log2n[i] - 7)) == 0)) n_group[dut.p_log2n[i]]++;
    end
    if (dut.g_proc[0].u_proc.u_agen.issue && dut.g_proc[0].u_proc.u_agen.swapin)  n_swapin++;
    if (dut.g_proc[0].u_proc.u_agen.issue && dut.g_proc[0].u_proc.u_agen.swapout) n_swapout++;
    if (compute_busy && in_valid && in_ready) n_load_overlap++;
    if (compute_busy && out_valid) n_unload_overlap++;
    if (dut.p_busy[0]) busy_run++;
    else if (busy_run != 0) begin
      int n0;
      n0 = frame_n0[frame_no];
      checks++;
      if (busy_run != n0 * (BANK_DEPTH + PIPE_LAT)) begin
        failures++;
        $display("frame %0d: compute took %0d clocks, expected %0d", frame_no, busy_run,
                 n0 * (BANK_DEPTH + PIPE_LAT));
      end
      frame_no++;
      busy_run = 0;
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-34s %0d", what, count);
  endtask

  initial begin
    for (int s = 0; s < NSYM; s++) cfg[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    frame(11, 0, 0, 0);
    frame(9, 9, 9, 9);
    frame(10, 9, 8, 7);
    frame(8, 8, 7, 7);
    frame(0, 0, 7, 0);
    frame(10, 10, 0, 0);
    frame(11, 0, 0, 0);
    wait (exp_q.size() == 0);
    repeat (10) @(negedge clk);
    $display("max error %f LSB, %0d cycles", max_err, cycles);
    need("butterfly input exchange", n_swapin);
    need("butterfly output exchange", n_swapout);
    need("route x = i^1 (stage 7)", n_route[1]);
    need("route x = i^3 (stage 8)", n_route[2]);
    need("route x = i^7 (stage 9)", n_route[3]);
    need("route x = i^15 (stage 10)", n_route[4]);
    for (int n = 7; n <= 11; n++) need($sformatf("group of %0d processors", 1 << (n - 7)), n_group[n]);
    need("frames with concurrent symbols", n_frames_multi);
    need("loading during computation", n_load_overlap);
    need("unloading during computation", n_unload_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d outputs outstanding", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
