// tb_fft_memory: fills the I/O set through the I/O port, swaps the roles and
// reads it back through the compute ports; writes both sets at once (compute
// side and I/O side) and reads each back after the matching swap. Checks
// contents, the one-clock read latency and that the sets stay separate.
module tb_fft_memory;
  import fft_pkg::*;
  localparam int N = NPROC;

  logic               clk = 1'b0, io_sel = 1'b0;
  logic [BANK_AW-1:0] c0_raddr [N], c0_waddr [N], c1_raddr [N], c1_waddr [N];
  cplx_t              c0_rdata [N], c0_wdata [N], c1_rdata [N], c1_wdata [N];
  logic               c0_we [N], c1_we [N];
  logic               io_we = 1'b0, io_wbank = 1'b0, io_rbank = 1'b0;
  logic [3:0]         io_wproc = '0, io_rproc = '0;
  logic [BANK_AW-1:0] io_waddr = '0, io_raddr = '0;
  cplx_t              io_wdata = '0, io_rdata;

  fft_memory #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t model [2][N][2][BANK_DEPTH];
  bit    known [2][N][2][BANK_DEPTH];  // word written since start

  task automatic io_fill(input int set);
    for (int p = 0; p < N; p++) for (int b = 0; b < 2; b++) for (int a = 0; a < BANK_DEPTH; a++) begin
      io_we = 1'b1; io_wproc = 4'(p); io_wbank = 1'(b); io_waddr = 6'(a);
      io_wdata = $urandom; model[set][p][b][a] = io_wdata; known[set][p][b][a] = 1'b1;
      @(negedge clk);
    end
    io_we = 1'b0;
  endtask

  task automatic io_check(input int set);
    for (int p = 0; p < N; p++) for (int b = 0; b < 2; b++) for (int a = 0; a < BANK_DEPTH; a++) begin
      io_rproc = 4'(p); io_rbank = 1'(b); io_raddr = 6'(a);
      @(negedge clk);
      if (!known[set][p][b][a]) continue;
      checks++;
      if (io_rdata != model[set][p][b][a]) begin
        failures++;
        if (failures < 5) $display("io read set %0d proc %0d bank %0d word %0d", set, p, b, a);
      end
    end
  endtask

  task automatic c_check(input int set);
    for (int a = 0; a < BANK_DEPTH; a++) begin
      for (int p = 0; p < N; p++) begin c0_raddr[p] = 6'(a); c1_raddr[p] = 6'(BANK_DEPTH - 1 - a); end
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        if (known[set][p][0][a]) begin
          checks++;
          if (c0_rdata[p] != model[set][p][0][a]) begin
            failures++;
            if (failures < 5) $display("compute read set %0d proc %0d bank 0 word %0d", set, p, a);
          end
        end
        if (known[set][p][1][BANK_DEPTH-1-a]) begin
          checks++;
          if (c1_rdata[p] != model[set][p][1][BANK_DEPTH-1-a]) begin
            failures++;
            if (failures < 5) $display("compute read set %0d proc %0d bank 1 word %0d", set, p, BANK_DEPTH-1-a);
          end
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin c0_we[p] = 1'b0; c1_we[p] = 1'b0; end
    foreach (known[s, p, b, a]) known[s][p][b][a] = 1'b0;
    @(negedge clk);
    io_sel = 1'b0;
    io_fill(0);                 // load set 0
    io_sel = 1'b1;              // set 0 becomes the compute set
    @(negedge clk);
    c_check(0);
    // compute side rewrites set 0 while the I/O side fills set 1
    for (int a = 0; a < BANK_DEPTH; a++) begin
      for (int p = 0; p < N; p++) begin
        c0_we[p] = 1'b1; c1_we[p] = 1'b1; c0_waddr[p] = 6'(a); c1_waddr[p] = 6'(a);
        c0_wdata[p] = $urandom; c1_wdata[p] = $urandom;
        model[0][p][0][a] = c0_wdata[p]; model[0][p][1][a] = c1_wdata[p];
        known[0][p][0][a] = 1'b1;        known[0][p][1][a] = 1'b1;
      end
      io_we = 1'b1; io_wproc = 4'(a % N); io_wbank = 1'((a / N) % 2); io_waddr = 6'(a);
      io_wdata = $urandom; model[1][a % N][(a / N) % 2][a] = io_wdata; known[1][a % N][(a / N) % 2][a] = 1'b1;
      @(negedge clk);
    end
    io_we = 1'b0;
    for (int p = 0; p < N; p++) begin c0_we[p] = 1'b0; c1_we[p] = 1'b0; end
    io_check(1);
    io_sel = 1'b0;              // swap: results of set 0 readable on the I/O side
    @(negedge clk);
    io_check(0);
    c_check(1);
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
