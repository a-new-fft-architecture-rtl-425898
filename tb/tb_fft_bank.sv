// tb_fft_bank: checks the dual-port bank: writes only when enabled, reads
// registered with one clock of latency, both ports usable in one clock.
module tb_fft_bank;
  localparam int DEPTH = 64, W = 32;

  logic                     clk = 1'b0;
  logic                     we = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]             wdata = '0, rdata;
  logic [W-1:0]             model [DEPTH];
  int checks = 0, failures = 0;

  fft_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // random mix of reads, enabled and disabled writes
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] expect_q;
      @(negedge clk);
      raddr = 6'($urandom_range(0, DEPTH - 1));
      expect_q = model[raddr];
      we    = $urandom_range(0, 1) == 1;
      waddr = 6'($urandom_range(0, DEPTH - 1));
      while (we && waddr == raddr) waddr = 6'($urandom_range(0, DEPTH - 1));
      wdata = $urandom;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 5) $display("read %0d: got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
