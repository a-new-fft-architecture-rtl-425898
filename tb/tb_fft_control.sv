// tb_fft_control: the frame scheduler with a behavioural two-set memory and
// stand-in processors that stay busy for a random time but leave the data
// unchanged. Since nothing is transformed, bin m of a symbol must come out as
// the sample stored at element 2m (m < N/2) or 2(N-1-m)+1 (m >= N/2), i.e.
// sample bitrev(element); this checks the bit-reversed loading, the bank and
// processor mapping of every group, the natural-order unloading and the
// stream / bin / last tags. It also checks which processors are started with
// which size for each frame, and that a frame's results are only read once
// its computation is over.
module tb_fft_control;
  import fft_pkg::*;
  localparam int N = NPROC;

  logic               clk = 1'b0, rst_n = 1'b0;
  sym_cfg_t           cfg [NSYM];
  logic               in_valid = 1'b0, in_ready;
  cplx_t              in_data = '0;
  logic               out_valid, out_last;
  cplx_t              out_data;
  logic [1:0]         out_sym;
  logic [10:0]        out_idx;
  logic               io_sel, io_we, io_wbank, io_rbank;
  logic [3:0]         io_wproc, io_rproc;
  logic [BANK_AW-1:0] io_waddr, io_raddr;
  cplx_t              io_wdata, io_rdata;
  logic               proc_start [N], proc_busy [N];
  logic [3:0]         proc_log2n [N];
  logic               compute_busy;

  fft_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // behavioural memory: two sets, I/O side only (compute leaves data as is)
  cplx_t mem [2][N][2][BANK_DEPTH];
  always @(posedge clk) begin
    if (io_we) mem[io_sel][io_wproc][io_wbank][io_waddr] <= io_wdata;
    io_rdata <= mem[io_sel][io_rproc][io_rbank][io_raddr];
  end

  // stand-in processors
  int busy_left [N];
  int starts = 0;
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      if (proc_start[p]) busy_left[p] <= 20 + int'(proc_log2n[p]) * 10;
      else if (busy_left[p] > 0) busy_left[p] <= busy_left[p] - 1;
    end
  end
  always_comb for (int p = 0; p < N; p++) proc_busy[p] = busy_left[p] > 0;

  int checks = 0, failures = 0;
  typedef struct { int sym; int idx; int re; int im; bit last; } exp_t;
  exp_t exp_q [$];
  int   start_q [$];         // expected start pattern per frame: (log2n) per proc, 0 = none

  function automatic int bitrev(int t, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (t[b]) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  task automatic frame(input int l0, input int l1, input int l2, input int l3);
    int ls [4];
    int base;
    ls = '{l0, l1, l2, l3};
    base = 0;
    for (int s = 0; s < NSYM; s++) begin
      cfg[s].en = ls[s] != 0; cfg[s].log2n = 4'(ls[s]);
    end
    for (int p = 0; p < N; p++) start_q.push_back(0);
    for (int s = 0; s < NSYM; s++) if (ls[s] != 0) begin
      int nn, k;
      int xr [], xi [];
      nn = 1 << ls[s];
      k  = nn / 128;
      for (int p = base; p < base + k; p++) start_q[start_q.size() - N + p] = ls[s];
      base += k;
      xr = new[nn]; xi = new[nn];
      for (int t = 0; t < nn; t++) begin
        xr[t] = int'($urandom_range(0, 65535)) - 32768;
        xi[t] = int'($urandom_range(0, 65535)) - 32768;
        in_data = '{re: DW'(xr[t]), im: DW'(xi[t])};
        in_valid = 1'b1;
        #1;                                   // let in_ready settle
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 1'b0;
      end
      for (int m = 0; m < nn; m++) begin
        int d, t;
        d = (m < nn / 2) ? 2 * m : 2 * (nn - 1 - m) + 1;
        t = bitrev(d, ls[s]);
        exp_q.push_back('{sym: s, idx: m, re: xr[t], im: xi[t], last: m == nn - 1});
      end
    end
  endtask

  // start pattern check
  always @(negedge clk) if (rst_n) begin
    logic any;
    any = 1'b0;
    for (int p = 0; p < N; p++) any |= proc_start[p];
    if (any) begin
      starts++;
      for (int p = 0; p < N; p++) begin
        int e;
        e = start_q.pop_front();
        checks++;
        if ((e != 0) != proc_start[p] || (e != 0 && int'(proc_log2n[p]) != e)) begin
          failures++;
          $display("frame start: proc %0d started=%0d size %0d, expected size %0d",
                   p, proc_start[p], proc_log2n[p], e);
        end
      end
    end
  end

  // output check
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    int gr, gi;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
    end else begin
      e = exp_q.pop_front();
      gr = out_data.re; gi = out_data.im;
      if (gr != e.re || gi != e.im || out_sym != 2'(e.sym) || out_idx != 11'(e.idx) ||
          out_last != e.last) begin
        failures++;
        if (failures < 10) $display("out sym %0d bin %0d: got (%0d,%0d) expected sym %0d bin %0d (%0d,%0d)",
                                    out_sym, out_idx, gr, gi, e.sym, e.idx, e.re, e.im);
      end
    end
  end

  initial begin
    for (int p = 0; p < N; p++) busy_left[p] = 0;
    for (int s = 0; s < NSYM; s++) cfg[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    frame(8, 0, 0, 0);
    frame(11, 0, 0, 0);
    frame(9, 8, 8, 7);
    frame(0, 10, 0, 7);
    frame(7, 7, 7, 7);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (starts != 5 || start_q.size() != 0) begin
      failures++;
      $display("%0d frames started", starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d outputs missing", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
