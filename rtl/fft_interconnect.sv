// fft_interconnect: the processor-to-bank network of the document (Sec. 4).
//
// Every processor P(i) keeps its upper butterfly port on its own bank B(i,0)
// (wired directly in the top). Its lower port reaches one of five banks:
//   sel = 0            : B(i,1)                (stages 0..6, local 128-point work)
//   sel = s, s = 1..4  : B(i xor (2^s - 1), 1)  (stage 6+s of a 128*2^s-point
//                                             or larger FFT)
// i.e. x = i xor 0001, 0011, 0111, 1111. Towards the processor this is a
// 5-to-1 multiplexer on the read data; towards the banks it acts as a 1-to-5
// demultiplexer of the lower port's address, write enable and data, built here
// as a multiplexer in front of each bank. Because the partner map is an
// involution and all processors of one FFT group share their stage, bank b is
// driven by processor b xor (2^sel_b - 1), where sel_b is the select of
// processor b itself. Groups are aligned to their size, so no path leaves a
// group. The document's partner formula is written for the processor that
// owns the pair counter; the processor that owns the B(i,0) half of the same
// pair differs from it by the correction term, which is why the masks here
// have no index-dependent bits (see fft_addr_gen).
//
// Purely combinational; the read-data path is used one clock after the
// address path, while the select is unchanged (it only changes between stages,
// when no access is in flight).
module fft_interconnect
  import fft_pkg::*;
#(
  parameter int N = NPROC
) (
  input  ic_sel_t            sel       [N],
  // processor side (lower ports)
  input  logic [BANK_AW-1:0] p_raddr   [N],
  output cplx_t              p_rdata   [N],
  input  logic               p_we      [N],
  input  logic [BANK_AW-1:0] p_waddr   [N],
  input  cplx_t              p_wdata   [N],
  // bank side (B(b,1) banks)
  output logic [BANK_AW-1:0] b_raddr   [N],
  input  cplx_t              b_rdata   [N],
  output logic               b_we      [N],
  output logic [BANK_AW-1:0] b_waddr   [N],
  output cplx_t              b_wdata   [N]
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  function automatic logic [IW-1:0] partner(logic [IW-1:0] i, ic_sel_t s);
    logic [IW-1:0] m;
    m = IW'((1 << s) - 1);
    return i ^ m;
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [IW-1:0] x;
      x          = partner(IW'(i), sel[i]);
      p_rdata[i] = b_rdata[x];
      b_raddr[i] = p_raddr[x];
      b_we[i]    = p_we[x];
      b_waddr[i] = p_waddr[x];
      b_wdata[i] = p_wdata[x];
    end
  end

endmodule
