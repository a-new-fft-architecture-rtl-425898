// fft_bank: one memory bank B(i,b) of the FFT organisation.
//
// A dual-port RAM of DEPTH words: one synchronous write port and one
// synchronous read port that can be used in the same cycle, as the processor
// reads a butterfly pair while writing back the results of an earlier pair.
// The document names dual-port banks of 64 words (128 points per processor in
// two banks); the read-during-write behaviour (old data returned when both
// ports hit the same address) is this design's choice and is never relied on.
//
// Timing: rdata holds mem[raddr] one clock after raddr is presented.
module fft_bank #(
  parameter int DEPTH = fft_pkg::BANK_DEPTH,
  parameter int W     = 2 * fft_pkg::DW
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
