// fft_processor: one radix-2 butterfly processor P(i).
//
// Contains the butterfly unit, the twiddle ROM, the address generator and the
// four permutation multiplexers of the document's processor (Sec. 3, Fig. 3):
//   * input muxes (swapin): I_R takes bank B(i,0) and I_S the selected B(x,1)
//     bank, or the other way round when swapin is set, so that I_R always
//     receives the element of lower index;
//   * read-address muxes (swapin), inside the address generator;
//   * output muxes (swapout): O_R goes to B(i,0) and O_S to B(x,1), or the
//     other way round when swapout is set.
// Each result is written back to the address it was read from, which keeps
// the computation in place and leaves the transform sorted at the end: bins
// 0..N/2-1 in bank 0 in increasing order and N/2..N-1 in bank 1 in decreasing
// order. The upper port always reaches the processor's own bank B(i,0); the
// lower port reaches B(x,1) through the interconnect, chosen by ic_sel.
// The banks themselves are outside, so that the interconnect can route the
// lower port to another processor's bank.
//
// Timing: pairs are issued one per clock. Bank and twiddle reads take one
// clock, the butterfly one more, so a pair read at clock t is written at clock
// t+2 (PIPE_LAT). done pulses when the last write of the last stage is over.
// The address generator's stage output is left open here (lint notes it):
// the processor needs only the controls derived from it.
module fft_processor
  import fft_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [3:0]         log2n,
  input  logic [3:0]         proc_id,
  // own bank B(i,0)
  output logic [BANK_AW-1:0] b0_raddr,
  input  cplx_t              b0_rdata,
  output logic               b0_we,
  output logic [BANK_AW-1:0] b0_waddr,
  output cplx_t              b0_wdata,
  // lower port, routed by the interconnect to a bank B(x,1)
  output logic [BANK_AW-1:0] b1_raddr,
  input  cplx_t              b1_rdata,
  output logic               b1_we,
  output logic [BANK_AW-1:0] b1_waddr,
  output cplx_t              b1_wdata,
  output ic_sel_t            ic_sel,
  output logic               busy,
  output logic               done
);

  logic               issue, swapin, swapout;
  logic [TW_AW-1:0]   tw_addr;
  twiddle_t           tw;

  fft_addr_gen u_agen (
    .clk, .rst_n, .start, .log2n, .proc_id,
    .issue, .raddr0(b0_raddr), .raddr1(b1_raddr),
    .swapin, .swapout, .tw_addr, .ic_sel, .stage(), .busy, .done
  );

  fft_twiddle_rom u_rom (.clk, .addr(tw_addr), .tw);

  // ---- pipeline of the control bits and write addresses ----------------------
  logic               v1, si1, so1, so2;
  logic [BANK_AW-1:0] a0_1, a1_1, a0_2, a1_2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; si1 <= 1'b0; so1 <= 1'b0; so2 <= 1'b0;
      a0_1 <= '0; a1_1 <= '0; a0_2 <= '0; a1_2 <= '0;
    end else begin
      v1   <= issue;   si1  <= swapin;  so1 <= swapout; so2 <= so1;
      a0_1 <= b0_raddr; a1_1 <= b1_raddr;
      a0_2 <= a0_1;     a1_2 <= a1_1;
    end
  end

  // ---- input permutation ------------------------------------------------------
  cplx_t i_r, i_s, o_r, o_s;
  logic  v2;

  always_comb begin
    i_r = si1 ? b1_rdata : b0_rdata;
    i_s = si1 ? b0_rdata : b1_rdata;
  end

  fft_butterfly u_bfly (
    .clk, .rst_n, .in_valid(v1), .i_r, .i_s, .w(tw),
    .out_valid(v2), .o_r, .o_s
  );

  // ---- output permutation and write-back --------------------------------------
  always_comb begin
    b0_we    = v2;
    b1_we    = v2;
    b0_waddr = a0_2;
    b1_waddr = a1_2;
    b0_wdata = so2 ? o_s : o_r;
    b1_wdata = so2 ? o_r : o_s;
  end

endmodule
