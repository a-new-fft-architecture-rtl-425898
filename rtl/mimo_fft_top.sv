// mimo_fft_top: variable-length FFT for 4x4 MIMO-OFDMA.
//
// Up to four symbols per frame (one per spatial stream), each of 128 to 2048
// complex points, are transformed at the same time by 16 radix-2 butterfly
// processors (Fig. 1 of the organisation):
//   * each processor P(i) computes a 128-point FFT in place in its two banks
//     B(i,0), B(i,1) (stages 0..6);
//   * a group of k = 2,4,8,16 processors computes a 128*k-point FFT; for the
//     extra stages 7..10 the interconnect gives each processor's lower port
//     the bank B(i xor 2^s-1, 1) of another member of the group;
//   * a second set of 32 banks takes in the next frame and hands out the
//     previous results while the processors work; the two sets swap roles at
//     frame boundaries (fft_memory, fft_control).
// Input: samples of the frame's symbols in time order, stream by stream, with
// a valid/ready handshake; cfg gives each stream's enable and log2 length
// (7..11), longest first, lengths adding up to at most 2048.
// Output: the spectrum X[k] / N of each symbol in natural bin order (every
// butterfly stage halves its results), tagged with stream and bin index.
// Timing: one clock domain. A 2^n-point frame needs n*(64+2) clocks of
// computation (726 for 2048 points), plus one clock per sample to load and
// one per bin to read out, the two overlapping with the next computation.
// The processors' done pulses are left open (lint notes it): the frame
// control follows their busy levels instead.
module mimo_fft_top
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sym_cfg_t    cfg [NSYM],
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [1:0]  out_sym,
  output logic [10:0] out_idx,
  output logic        out_last,
  output logic        compute_busy
);

  localparam int N = NPROC;

  // processor side
  logic               p_start [N];
  logic [3:0]         p_log2n [N];
  logic               p_busy  [N];
  ic_sel_t            p_sel   [N];
  logic [BANK_AW-1:0] p0_raddr [N], p0_waddr [N], p1_raddr [N], p1_waddr [N];
  logic               p0_we    [N], p1_we    [N];
  cplx_t              p0_rdata [N], p0_wdata [N], p1_rdata [N], p1_wdata [N];

  // bank-1 side of the interconnect
  logic [BANK_AW-1:0] m1_raddr [N], m1_waddr [N];
  logic               m1_we    [N];
  cplx_t              m1_rdata [N], m1_wdata [N];

  // memory I/O side
  logic               io_sel, io_we, io_wbank, io_rbank;
  logic [3:0]         io_wproc, io_rproc;
  logic [BANK_AW-1:0] io_waddr, io_raddr;
  cplx_t              io_wdata, io_rdata;

  for (genvar i = 0; i < N; i++) begin : g_proc
    fft_processor u_proc (
      .clk, .rst_n,
      .start    (p_start[i]),
      .log2n    (p_log2n[i]),
      .proc_id  (4'(i)),
      .b0_raddr (p0_raddr[i]), .b0_rdata (p0_rdata[i]),
      .b0_we    (p0_we[i]),    .b0_waddr (p0_waddr[i]), .b0_wdata (p0_wdata[i]),
      .b1_raddr (p1_raddr[i]), .b1_rdata (p1_rdata[i]),
      .b1_we    (p1_we[i]),    .b1_waddr (p1_waddr[i]), .b1_wdata (p1_wdata[i]),
      .ic_sel   (p_sel[i]),
      .busy     (p_busy[i]),
      .done     ()
    );
  end

  fft_interconnect #(.N(N)) u_ic (
    .sel     (p_sel),
    .p_raddr (p1_raddr), .p_rdata (p1_rdata),
    .p_we    (p1_we),    .p_waddr (p1_waddr), .p_wdata (p1_wdata),
    .b_raddr (m1_raddr), .b_rdata (m1_rdata),
    .b_we    (m1_we),    .b_waddr (m1_waddr), .b_wdata (m1_wdata)
  );

  fft_memory #(.N(N)) u_mem (
    .clk, .io_sel,
    .c0_raddr (p0_raddr), .c0_rdata (p0_rdata),
    .c0_we    (p0_we),    .c0_waddr (p0_waddr), .c0_wdata (p0_wdata),
    .c1_raddr (m1_raddr), .c1_rdata (m1_rdata),
    .c1_we    (m1_we),    .c1_waddr (m1_waddr), .c1_wdata (m1_wdata),
    .io_we, .io_wproc, .io_wbank, .io_waddr, .io_wdata,
    .io_rproc, .io_rbank, .io_raddr, .io_rdata
  );

  fft_control #(.N(N)) u_ctrl (
    .clk, .rst_n, .cfg,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_data, .out_sym, .out_idx, .out_last,
    .io_sel, .io_we, .io_wproc, .io_wbank, .io_waddr, .io_wdata,
    .io_rproc, .io_rbank, .io_raddr, .io_rdata,
    .proc_start (p_start), .proc_log2n (p_log2n), .proc_busy (p_busy),
    .compute_busy
  );

endmodule
