// fft_memory: the two 32-bank memories of the organisation (Sec. 2, Fig. 1).
//
// Each memory set has banks B(i,0) and B(i,1) for every processor i, 64 words
// each (2*N banks per set, 32 for N = 16). One set is the compute memory, used
// in place by the processors through the interconnect; the other is the I/O
// memory, which takes in the samples of the next frame and hands out the
// results of the previous one. io_sel names the I/O set; toggling it swaps the
// two roles, so a finished transform becomes readable and a loaded frame
// becomes computable without moving data. The document states that a second
// 32-bank memory is used for input and output; the role swap is this design's
// way of sharing the work between the two.
//
// Compute side: one read and one write port per bank, indexed by processor.
// I/O side: one write port (loader) and one read port (unloader) in total,
// each addressed by processor, bank bit and word address.
// Timing: reads return one clock after the address (c_*_rdata, io_rdata).
// io_sel must only change while neither side has an access in flight.
module fft_memory
  import fft_pkg::*;
#(
  parameter int N = NPROC
) (
  input  logic               clk,
  input  logic               io_sel,
  // compute side, bank 0 of each processor
  input  logic [BANK_AW-1:0] c0_raddr [N],
  output cplx_t              c0_rdata [N],
  input  logic               c0_we    [N],
  input  logic [BANK_AW-1:0] c0_waddr [N],
  input  cplx_t              c0_wdata [N],
  // compute side, bank 1 of each processor
  input  logic [BANK_AW-1:0] c1_raddr [N],
  output cplx_t              c1_rdata [N],
  input  logic               c1_we    [N],
  input  logic [BANK_AW-1:0] c1_waddr [N],
  input  cplx_t              c1_wdata [N],
  // I/O side
  input  logic               io_we,
  input  logic [3:0]         io_wproc,
  input  logic               io_wbank,
  input  logic [BANK_AW-1:0] io_waddr,
  input  cplx_t              io_wdata,
  input  logic [3:0]         io_rproc,
  input  logic               io_rbank,
  input  logic [BANK_AW-1:0] io_raddr,
  output cplx_t              io_rdata
);

  cplx_t      rdata [2][N][2];
  logic [3:0] rproc_q;
  logic       rbank_q;
  logic       io_sel_q;

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar p = 0; p < N; p++) begin : g_proc
      for (genvar b = 0; b < 2; b++) begin : g_bank
        logic               is_io;
        logic               we;
        logic [BANK_AW-1:0] waddr, raddr;
        cplx_t              wdata;

        always_comb begin
          is_io = (io_sel == 1'(s));
          if (is_io) begin
            we    = io_we && io_wproc == 4'(p) && io_wbank == 1'(b);
            waddr = io_waddr;
            wdata = io_wdata;
            raddr = io_raddr;
          end else if (b == 0) begin
            we    = c0_we[p];
            waddr = c0_waddr[p];
            wdata = c0_wdata[p];
            raddr = c0_raddr[p];
          end else begin
            we    = c1_we[p];
            waddr = c1_waddr[p];
            wdata = c1_wdata[p];
            raddr = c1_raddr[p];
          end
        end

        fft_bank u_bank (
          .clk, .we, .waddr, .wdata, .raddr, .rdata(rdata[s][p][b])
        );
      end
    end
  end

  always_ff @(posedge clk) begin
    rproc_q  <= io_rproc;
    rbank_q  <= io_rbank;
    io_sel_q <= io_sel;
  end

  always_comb begin
    for (int p = 0; p < N; p++) begin
      c0_rdata[p] = rdata[!io_sel_q][p][0];
      c1_rdata[p] = rdata[!io_sel_q][p][1];
    end
    io_rdata = rdata[io_sel_q][rproc_q][rbank_q];
  end

endmodule
