// fft_butterfly: radix-2 decimation-in-time butterfly with 1/2 scaling.
//
// Given the pair (I_R, I_S) and the twiddle W it forms
//   O_R = (I_R + W*I_S) / 2      O_S = (I_R - W*I_S) / 2
// which is the DIT butterfly the document's processors perform. The division
// by two in every stage (so a 2^n-point transform is scaled by 1/2^n), the
// rounding of the twiddle product and of the halving (add half an LSB, then
// shift right, i.e. round half up), and saturation of the
// result to DW bits are this design's choices; the document gives no word
// length or scaling.
//
// Timing: fully pipelined, one pair per clock; o_r/o_s/out_valid appear one
// clock after in_valid/i_r/i_s/w.
module fft_butterfly
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    i_r,
  input  cplx_t    i_s,
  input  twiddle_t w,
  output logic     out_valid,
  output cplx_t    o_r,
  output cplx_t    o_s
);

  localparam int PW = DW + TWW + 1;   // full complex product width
  localparam int SW = DW + 2;         // sum width after the twiddle shift

  logic signed [PW-1:0] p_re, p_im;
  logic signed [SW-1:0] t_re, t_im;   // W*I_S, back in sample scale
  logic signed [SW-1:0] sr_re, sr_im, ss_re, ss_im;

  function automatic logic signed [DW-1:0] sat(logic signed [SW-1:0] v);
    localparam logic signed [SW-1:0] MAXV = SW'((1 << (DW - 1)) - 1);
    localparam logic signed [SW-1:0] MINV = -SW'(1 << (DW - 1));
    if (v > MAXV) return MAXV[DW-1:0];
    if (v < MINV) return MINV[DW-1:0];
    return v[DW-1:0];
  endfunction

  always_comb begin
    p_re  = PW'(i_s.re * w.re) - PW'(i_s.im * w.im);
    p_im  = PW'(i_s.re * w.im) + PW'(i_s.im * w.re);
    t_re  = SW'((p_re + PW'(1 << (TWW - 2))) >>> (TWW - 1));
    t_im  = SW'((p_im + PW'(1 << (TWW - 2))) >>> (TWW - 1));
    sr_re = (SW'(i_r.re) + t_re + SW'(1)) >>> 1;
    sr_im = (SW'(i_r.im) + t_im + SW'(1)) >>> 1;
    ss_re = (SW'(i_r.re) - t_re + SW'(1)) >>> 1;
    ss_im = (SW'(i_r.im) - t_im + SW'(1)) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      o_r       <= '0;
      o_s       <= '0;
    end else begin
      out_valid <= in_valid;
      o_r       <= '{re: sat(sr_re), im: sat(sr_im)};
      o_s       <= '{re: sat(ss_re), im: sat(ss_im)};
    end
  end

endmodule
