// fft_addr_gen: address generator of one radix-2 processor.
//
// For an FFT of 2^LOG2N points (7..11) spread over a group of 2^(LOG2N-7)
// processors, the generator walks the stages j = 0..LOG2N-1. In each stage it
// issues the 64 butterfly pairs this processor owns, one per clock, then waits
// PIPE_LAT clocks so that the last results are written before the next stage
// reads them.
//
// Per the document (Sec. 3, Fig. 4) a 10-bit pair word c is formed, whose six
// LSBs are the processor's up counter. Then
//   * bank-0 base address  a0 = c with bit j-1 cleared (11-bit rotate register
//     preset to 1111111110_0, rotated once per stage, its 10 MSBs ANDed with c);
//   * bank-1 base address  a1 = a0 xor (j ones) (10-bit shift register, serial
//     input '1', shifted once per stage);
//   * swapin  = c[j-1]: exchange the butterfly inputs and the two read
//     addresses; swapout = c[j]: exchange the butterfly outputs;
//   * twiddle: V = c[j-1:0] placed as the MSBs of a 10-bit word; if its MSB is
//     1 the other j-1 bits are inverted (mask from a 10-bit shift-right
//     register with serial input '1'). The result indexes the 1024-entry table
//     of W_2048^t directly.
//   * 4-bit down counter of the remaining stages, preset to LOG2N-1.
// The four MSBs of c come from the processor's index inside its group. In the
// stages j >= 7 that cross processors (j' = j-6), a processor whose index bit
// j'-1 is set takes the pairs of index  i xor (2^(j'-1)-1)  (the document's
// correction term), so that its upper butterfly port always stays on its own
// bank B(i,0); its lower port then reaches B(x,1) with x = i xor (2^j'-1),
// which is reported as ic_sel = j' for the interconnect.
// Twiddle bit count (j rather than the j+1 the text states), the placement
// of the correction term and the PIPE_LAT gap between stages are this design's
// reading, verified against the dataflow of Fig. 2 and a full 2048-point run.
// The four upper bits of a1 are formed but not used (lint reports them): they
// name the partner processor, which the interconnect derives from ic_sel.
//
// Timing: start is a one-clock pulse while idle. The first pair is issued the
// next clock; outputs are combinational from the registers and valid while
// issue is high. done pulses once, PIPE_LAT+1 clocks after the last issue.
module fft_addr_gen
  import fft_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [3:0]         log2n,     // 7..11, sampled at start
  input  logic [3:0]         proc_id,   // absolute processor index
  output logic               issue,     // a pair is issued this clock
  output logic [BANK_AW-1:0] raddr0,    // read/write address of B(i,0)
  output logic [BANK_AW-1:0] raddr1,    // read/write address of the B(x,1) bank
  output logic               swapin,
  output logic               swapout,
  output logic [TW_AW-1:0]   tw_addr,
  output ic_sel_t            ic_sel,
  output logic [3:0]         stage,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_GAP} state_t;

  state_t             state;
  logic [BANK_AW-1:0] cnt;        // up counter (six LSBs of c)
  logic [1:0]         gap_cnt;
  logic [3:0]         n_r;        // log2 of FFT size
  logic [3:0]         down;       // remaining stages after this one
  logic [3:0]         j;          // current stage
  logic [10:0]        rol_q;      // bank-0 mask register
  logic [9:0]         shl_q;      // bank-1 xor register
  logic [9:0]         shr_q;      // twiddle inversion mask register

  logic [3:0]         plocal, q;
  logic [3:0]         jp;
  logic [CNT_W-1:0]   c, a0, a1, v;   // only the six LSBs of a0/a1 address a bank
  logic [10:0]        c_ext;

  // ---- combinational address formation ------------------------------------
  always_comb begin
    plocal = proc_id & 4'((1 << (n_r - 4'd7)) - 1);
    jp     = (j >= 4'd7) ? j - 4'd6 : 4'd0;
    q      = plocal;
    if (jp != 0 && plocal[2'(jp - 4'd1)])
      q = plocal ^ 4'((1 << (jp - 4'd1)) - 1);
    c      = {q, cnt};
    c_ext  = {1'b0, c};
    a0     = c & rol_q[10:1];
    a1     = a0 ^ shl_q;
    v      = c << (4'd10 - j);
    swapin = v[9];
    swapout = c_ext[j];
    tw_addr = v[9] ? (v ^ {1'b0, shr_q[8:0]}) : v;
    raddr0 = swapin ? a1[BANK_AW-1:0] : a0[BANK_AW-1:0];
    raddr1 = swapin ? a0[BANK_AW-1:0] : a1[BANK_AW-1:0];
    ic_sel = ic_sel_t'(jp);
    issue  = (state == S_RUN);
    busy   = (state != S_IDLE);
    stage  = j;
  end

  // ---- control counters ---------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      gap_cnt <= '0;
      n_r     <= 4'd7;
      down    <= '0;
      j       <= '0;
      rol_q   <= 11'b111_1111_1110;
      shl_q   <= '0;
      shr_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          n_r   <= log2n;
          down  <= log2n - 4'd1;
          j     <= '0;
          cnt   <= '0;
          rol_q <= 11'b111_1111_1110;
          shl_q <= '0;
          shr_q <= '0;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (&cnt) begin           // terminal count
            state   <= S_GAP;
            gap_cnt <= '0;
          end
        end
        S_GAP: begin
          gap_cnt <= gap_cnt + 1'b1;
          if (gap_cnt == 2'(PIPE_LAT - 1)) begin
            if (down == 0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              down  <= down - 4'd1;
              j     <= j + 4'd1;
              rol_q <= {rol_q[9:0], rol_q[10]};
              shl_q <= {shl_q[8:0], 1'b1};
              shr_q <= {1'b1, shr_q[9:1]};
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A start request while busy would be lost; sizes outside 128..2048 are
  // not supported.
  always_ff @(posedge clk) begin
    if (rst_n && start) begin
      assert (state == S_IDLE) else $error("fft_addr_gen: start while busy");
      assert (log2n >= 4'(MIN_LOG2N) && log2n <= 4'(MAX_LOG2N))
        else $error("fft_addr_gen: unsupported FFT size");
    end
  end

endmodule
