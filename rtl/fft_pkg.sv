// fft_pkg: constants and types shared by the variable-length MIMO FFT.
//
// The organisation has 16 radix-2 processors, each owning two memory banks of
// 64 complex words (128 points), so one processor holds a 128-point FFT and a
// group of k = 2,4,8,16 processors holds a 128*k-point FFT, up to 2048 points.
// Up to four symbols (one per MIMO stream) are processed per frame.
//
// The processor count, bank size, FFT sizes, twiddle count and symbol count
// follow the document. The sample width (16-bit real and imaginary parts), the
// twiddle width and the 2-cycle processor pipeline are this design's choices.
package fft_pkg;

  localparam int NPROC       = 16;    // butterfly processors
  localparam int BANK_DEPTH  = 64;    // words per bank (two banks = 128 points)
  localparam int BANK_AW     = 6;     // bank address width
  localparam int MIN_LOG2N   = 7;     // 128-point FFT: one processor
  localparam int MAX_LOG2N   = 11;    // 2048-point FFT: sixteen processors
  localparam int NSYM        = 4;     // symbols per frame (4x4 MIMO)
  localparam int TW_ENTRIES  = 1024;  // twiddles W_2048^t, t = 0..1023
  localparam int TW_AW       = 10;    // twiddle address width
  localparam int CNT_W       = 10;    // pair counter width (1024 pairs)

  localparam int DW          = 16;    // bits per real / imaginary part
  localparam int TWW         = 16;    // bits per twiddle component (Q1.15)
  localparam int PIPE_LAT    = 2;     // read-to-write latency of a processor

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TWW-1:0] re;
    logic signed [TWW-1:0] im;
  } twiddle_t;

  // One symbol of a frame: enabled flag and log2 of its length (7..11).
  typedef struct packed {
    logic       en;
    logic [3:0] log2n;
  } sym_cfg_t;

  // Interconnect select: 0 = own bank B(i,1); 1..4 = B(i xor (2^s - 1), 1).
  typedef logic [2:0] ic_sel_t;

endpackage
