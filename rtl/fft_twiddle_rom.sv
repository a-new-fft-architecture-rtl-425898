// fft_twiddle_rom: the processor's twiddle ROM.
//
// Holds the ENTRIES twiddle factors W^t = exp(-j*2*pi*t / (2*ENTRIES)),
// t = 0..ENTRIES-1, i.e. the upper half circle for a 2*ENTRIES-point FFT
// (1024 twiddles for 2048 points, as in the document). Each component is a
// signed Q1.(TWW-1) number, rounded to nearest and limited to +/-(2^(TWW-1)-1).
// The table is computed at elaboration from cos/sin, so no data file is needed.
// Only the low TWW bits of the rounded integer in quantise() are kept; the
// value always fits, so the unused upper bits that lint reports carry nothing.
//
// Timing: one registered read, tw holds entry addr one clock after addr.
module fft_twiddle_rom #(
  parameter int ENTRIES = fft_pkg::TW_ENTRIES
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] addr,
  output fft_pkg::twiddle_t          tw
);

  import fft_pkg::*;

  typedef logic [2*TWW-1:0] table_t [ENTRIES];

  function automatic logic signed [TWW-1:0] quantise(real v);
    real    s;
    integer q;
    s = v * real'((1 << (TWW - 1)) - 1);
    q = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(0.5 - s);
    return TWW'(q);
  endfunction

  function automatic table_t make_table();
    table_t t;
    real    ang;
    for (int i = 0; i < ENTRIES; i++) begin
      ang     = -3.14159265358979323846 * real'(i) / real'(ENTRIES);
      t[i] = {quantise($cos(ang)), quantise($sin(ang))};
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) tw <= ROM[addr];

endmodule
