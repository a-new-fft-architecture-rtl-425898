// tb_fft_addr_gen: runs 16 address generators (one per processor) for every
// FFT size 128..2048 and follows where each element of the transform sits in
// the banks. For each issued pair it checks, from the element indices alone:
//   * the two elements differ exactly in bit j (j = stage), the lower one on
//     the port chosen by swapin;
//   * the lower bank is B(x,1) with x inside the processor's group;
//   * the twiddle address is (index mod 2^j) * 2^(10-j);
// then applies the write-back with swapout. At the end it checks the sorted
// layout (bins 0..N/2-1 ascending in bank 0, N/2..N-1 descending in bank 1),
// that every bank word was used once per stage, and the run time of
// n*(64+2) clocks.
module tb_fft_addr_gen;
  import fft_pkg::*;
  localparam int N = NPROC;

  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0]         log2n = 4'd7;
  logic               issue [N], swapin [N], swapout [N], busy [N], done [N];
  logic [BANK_AW-1:0] raddr0 [N], raddr1 [N];
  logic [TW_AW-1:0]   tw_addr [N];
  ic_sel_t            ic_sel [N];
  logic [3:0]         stage [N];

  for (genvar i = 0; i < N; i++) begin : g_ag
    fft_addr_gen u_ag (
      .clk, .rst_n, .start, .log2n, .proc_id(4'(i)),
      .issue(issue[i]), .raddr0(raddr0[i]), .raddr1(raddr1[i]),
      .swapin(swapin[i]), .swapout(swapout[i]), .tw_addr(tw_addr[i]),
      .ic_sel(ic_sel[i]), .stage(stage[i]), .busy(busy[i]), .done(done[i])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int elem [N][2][BANK_DEPTH];    // element index held by each bank word
  int visits [N][2][BANK_DEPTH];
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("%0d: %s", cyc, msg);
  endtask

  // follow the dataflow on every clock edge
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) if (issue[p]) begin
      automatic int gsz = 1 << (log2n - 7);
      automatic int x   = p ^ ((1 << ic_sel[p]) - 1);
      automatic int j   = stage[p];
      automatic int e0, e1, xs, xr;
      checks++;
      if (x / gsz != p / gsz || x >= N) begin
        fail($sformatf("proc %0d reaches bank %0d outside its group", p, x));
        continue;
      end
      e0 = elem[p][0][raddr0[p]];
      e1 = elem[x][1][raddr1[p]];
      visits[p][0][raddr0[p]]++;
      visits[x][1][raddr1[p]]++;
      xs = swapin[p] ? e1 : e0;
      xr = swapin[p] ? e0 : e1;
      if (xr - xs != (1 << j) || xs[j])
        fail($sformatf("stage %0d proc %0d: pair (%0d,%0d) is not a butterfly pair", j, p, xs, xr));
      if (int'(tw_addr[p]) != ((xs % (1 << j)) << (10 - j)))
        fail($sformatf("stage %0d proc %0d: twiddle %0d for element %0d", j, p, tw_addr[p], xs));
      elem[p][0][raddr0[p]] = swapout[p] ? xr : xs;
      elem[x][1][raddr1[p]] = swapout[p] ? xs : xr;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = MIN_LOG2N; n <= MAX_LOG2N; n++) begin
      int gsz, t0, t1;
      gsz = 1 << (n - 7);
      // initial placement: element d of group g in processor g*gsz + d/128,
      // bank d[0], word d[6:1]
      for (int p = 0; p < N; p++)
        for (int b = 0; b < 2; b++)
          for (int a = 0; a < BANK_DEPTH; a++) begin
            elem[p][b][a]   = ((p % gsz) << 7) | (a << 1) | b;
            visits[p][b][a] = 0;
          end
      @(negedge clk);
      log2n = 4'(n);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done[0]) @(negedge clk);
      t1 = cyc;
      checks++;
      if (t1 - t0 != n * (BANK_DEPTH + PIPE_LAT) + 1)
        fail($sformatf("n=%0d took %0d clocks", n, t1 - t0));
      for (int p = 0; p < N; p++) begin
        checks++;
        if (!done[p]) fail($sformatf("proc %0d not done with proc 0", p));
      end
      // sorted result and one visit per word per stage
      for (int p = 0; p < N; p++)
        for (int a = 0; a < BANK_DEPTH; a++) begin
          automatic int r = ((p % gsz) << 6) | a;
          checks++;
          if (elem[p][0][a] != r || elem[p][1][a] != (1 << n) - 1 - r)
            fail($sformatf("n=%0d proc %0d word %0d holds (%0d,%0d)", n, p, a,
                           elem[p][0][a], elem[p][1][a]));
          if (visits[p][0][a] != n || visits[p][1][a] != n)
            fail($sformatf("n=%0d proc %0d word %0d visited %0d/%0d times", n, p, a,
                           visits[p][0][a], visits[p][1][a]));
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
