// tb_fft_interconnect: random group layouts (aligned groups of 1..16
// processors, each group at a random stage) with random port values. Checks
// that processor i reads bank i xor (2^sel-1) and that bank b is driven by
// processor b xor (2^sel-1), sel being the group's select.
module tb_fft_interconnect;
  import fft_pkg::*;
  localparam int N = NPROC;

  ic_sel_t            sel [N];
  logic [BANK_AW-1:0] p_raddr [N], p_waddr [N], b_raddr [N], b_waddr [N];
  logic               p_we [N], b_we [N];
  cplx_t              p_rdata [N], p_wdata [N], b_rdata [N], b_wdata [N];
  int checks = 0, failures = 0;

  fft_interconnect #(.N(N)) dut (.*);

  initial begin
    for (int it = 0; it < 500; it++) begin
      // layout: group size 2^g for the whole array, select <= g
      automatic int g = $urandom_range(0, 4);
      for (int base = 0; base < N; base += (1 << g)) begin
        automatic ic_sel_t s = ic_sel_t'($urandom_range(0, g));
        for (int i = 0; i < (1 << g); i++) sel[base + i] = s;
      end
      for (int i = 0; i < N; i++) begin
        p_raddr[i] = 6'($urandom); p_waddr[i] = 6'($urandom);
        p_we[i] = 1'($urandom);    p_wdata[i] = $urandom;
        b_rdata[i] = $urandom;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        automatic int x = i ^ ((1 << sel[i]) - 1);
        checks++;
        if (x / (1 << g) != i / (1 << g)) failures++;        // never leaves the group
        if (p_rdata[i] != b_rdata[x] || b_raddr[i] != p_raddr[x] || b_we[i] != p_we[x] ||
            b_waddr[i] != p_waddr[x] || b_wdata[i] != p_wdata[x]) begin
          failures++;
          if (failures < 5) $display("proc/bank %0d sel %0d: wrong route", i, sel[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
