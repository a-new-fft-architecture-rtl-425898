// fft_control: frame scheduling, input loading and output unloading.
//
// A frame is a set of up to NSYM = 4 symbols, one per MIMO stream, each of
// 2^log2n points (128..2048), whose lengths add up to at most 2048 so that
// they can be transformed side by side. Symbol s is given the processor group
// starting at base_s = sum of the group sizes (length/128) of the enabled
// symbols before it. Groups must be aligned to their size, which holds when
// the enabled symbols are listed longest first; longer sequences of symbols
// are processed frame after frame (pipelined), as the document describes.
//
// The unit runs the two memory sets (fft_memory) as a ping-pong pair:
//   * I/O set: first the results of the previous frame are read out, one per
//     clock, in natural bin order (bank 0 ascending for bins 0..N/2-1, bank 1
//     descending for bins N/2..N-1); then the next frame is written, one
//     sample per clock, each sample t of a symbol stored at its bit-reversed
//     element index d = bitrev(t) in bank d[0], word d[6:1] of processor
//     base + d[10:7] (the decimation-in-time input order of the document).
//   * compute set: all groups of the frame are started together; the frame is
//     finished when every processor is idle again.
// When the I/O set is full and the compute set is idle the roles swap and the
// new frame starts. A finished frame is also swapped out when no new frame has
// begun, so the last results of a stream are always delivered.
// The document only names this control block; everything in it is this
// design's choice.
//
// Interface: in_valid/in_ready handshake, samples of the frame's symbols back
// to back in stream order; cfg is sampled with the first sample of a frame.
// out_valid marks one result, with its stream (out_sym), bin (out_idx) and
// out_last on the symbol's final bin; there is no output back-pressure.
// Timing: io_wdata is in_data and out_data is io_rdata, passed straight
// through (the memory's read register gives the one clock of output latency);
// out_sym/out_idx/out_last are registered to line up with it. No sample is
// taken in the clock the sets swap.
module fft_control
  import fft_pkg::*;
#(
  parameter int N = NPROC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sym_cfg_t           cfg      [NSYM],
  input  logic               in_valid,
  output logic               in_ready,
  input  cplx_t              in_data,
  output logic               out_valid,
  output cplx_t              out_data,
  output logic [1:0]         out_sym,
  output logic [10:0]        out_idx,
  output logic               out_last,
  // memory I/O side and role select
  output logic               io_sel,
  output logic               io_we,
  output logic [3:0]         io_wproc,
  output logic               io_wbank,
  output logic [BANK_AW-1:0] io_waddr,
  output cplx_t              io_wdata,
  output logic [3:0]         io_rproc,
  output logic               io_rbank,
  output logic [BANK_AW-1:0] io_raddr,
  input  cplx_t              io_rdata,
  // processors
  output logic               proc_start [N],
  output logic [3:0]         proc_log2n [N],
  input  logic               proc_busy  [N],
  output logic               compute_busy
);

  typedef enum logic [1:0] {IO_LOAD, IO_FULL, IO_UNLOAD} io_state_t;
  typedef sym_cfg_t frame_cfg_t [NSYM];

  io_state_t  io_state;
  frame_cfg_t set_cfg [2];     // frame held by each memory set
  logic       loading;         // first sample of the frame accepted
  logic [2:0] sym;             // current symbol (load or unload)
  logic [10:0] pos;            // current sample / bin within the symbol
  logic       running;         // compute set busy
  logic       comp_result;     // compute set holds an unread result
  logic       any_start;

  // ---- helpers -----------------------------------------------------------------
  function automatic logic [2:0] next_sym(frame_cfg_t f, int from);
    for (int s = 0; s < NSYM; s++)
      if (s >= from && f[s].en) return 3'(s);
    return 3'(NSYM);
  endfunction

  function automatic logic [4:0] base_of(frame_cfg_t f, logic [2:0] s);
    logic [4:0] b;
    b = '0;
    for (int k = 0; k < NSYM; k++)
      if (k < int'(s) && f[k].en) b += 5'(1 << (f[k].log2n - 4'd7));
    return b;
  endfunction

  function automatic logic [10:0] bitrev(logic [10:0] t, logic [3:0] n);
    logic [10:0] r;
    for (int k = 0; k < 11; k++) r[k] = t[10-k];
    return r >> (4'd11 - n);
  endfunction

  // ---- current frame of the I/O side ---------------------------------------
  frame_cfg_t  io_cfg;
  logic [3:0]  cur_n;
  logic [10:0] cur_len;
  logic [4:0]  cur_base;
  logic [10:0] d, a;
  logic        load_fire, last_pos;
  logic [2:0]  nxt;
  logic        do_swap, swap_start;

  always_comb begin
    io_cfg   = (io_state == IO_LOAD && !loading) ? cfg : set_cfg[io_sel];
    cur_n    = io_cfg[2'(sym)].log2n;
    cur_len  = 11'((1 << cur_n) - 1);
    cur_base = base_of(io_cfg, sym);
    last_pos = (pos == cur_len);
    nxt      = next_sym(io_cfg, int'(sym) + 1);


    // loader: bit-reversed element index
    d        = bitrev(pos, cur_n);
    io_wproc = 4'(cur_base + 5'(d >> 7));
    io_wbank = d[0];
    io_waddr = d[6:1];
    io_wdata = in_data;

    // unloader: natural bin order
    if (pos <= (cur_len >> 1)) begin
      a        = pos;
      io_rbank = 1'b0;
    end else begin
      a        = cur_len - pos;
      io_rbank = 1'b1;
    end
    io_rproc = 4'(cur_base + 5'(a >> 6));
    io_raddr = a[5:0];

    // role swap: a full I/O set goes to compute, or a finished result comes
    // out when no new frame has begun
    do_swap    = !running && !any_start &&
                 ((io_state == IO_FULL) ||
                  (io_state == IO_LOAD && !loading && comp_result));
    swap_start = do_swap && (io_state == IO_FULL);

    // no sample is taken in the clock of a swap
    in_ready  = (io_state == IO_LOAD) && (sym < 3'(NSYM)) && io_cfg[2'(sym)].en && !do_swap;
    load_fire = in_ready && in_valid;
    io_we     = load_fire;
    compute_busy = running;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      io_state    <= IO_LOAD;
      io_sel      <= 1'b0;
      loading     <= 1'b0;
      sym         <= '0;
      pos         <= '0;
      running     <= 1'b0;
      comp_result <= 1'b0;
      any_start   <= 1'b0;
      out_valid   <= 1'b0;
      out_sym     <= '0;
      out_idx     <= '0;
      out_last    <= 1'b0;
      for (int p = 0; p < N; p++) begin
        proc_start[p] <= 1'b0;
        proc_log2n[p] <= 4'd7;
      end
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < NSYM; k++) set_cfg[s][k] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      any_start <= 1'b0;
      for (int p = 0; p < N; p++) proc_start[p] <= 1'b0;

      // compute side completion
      if (running && !any_start) begin
        logic idle;
        idle = 1'b1;
        for (int p = 0; p < N; p++) if (proc_busy[p]) idle = 1'b0;
        if (idle) begin
          running     <= 1'b0;
          comp_result <= 1'b1;
        end
      end

      unique case (io_state)
        IO_LOAD: begin
          if (!loading && !in_ready)
            sym <= next_sym(cfg, 0);       // skip leading disabled streams
          if (load_fire) begin
            if (!loading) begin
              set_cfg[io_sel] <= cfg;
              loading         <= 1'b1;
            end
            if (last_pos) begin
              pos <= '0;
              sym <= nxt;
              if (nxt == 3'(NSYM)) begin
                io_state <= IO_FULL;
                loading  <= 1'b0;
              end
            end else begin
              pos <= pos + 11'd1;
            end
          end
        end
        IO_UNLOAD: begin
          out_valid <= 1'b1;
          out_sym   <= sym[1:0];
          out_idx   <= pos;
          out_last  <= last_pos;
          if (last_pos) begin
            pos <= '0;
            sym <= nxt;
            if (nxt == 3'(NSYM)) begin
              io_state <= IO_LOAD;
              sym      <= '0;
            end
          end else begin
            pos <= pos + 11'd1;
          end
        end
        default: ;
      endcase

      if (do_swap) begin
        io_sel      <= !io_sel;
        comp_result <= 1'b0;
        pos         <= '0;
        if (comp_result) begin
          io_state <= IO_UNLOAD;
          sym      <= next_sym(set_cfg[!io_sel], 0);
        end else begin
          io_state <= IO_LOAD;
          sym      <= '0;
        end
        if (swap_start) begin
          running   <= 1'b1;
          any_start <= 1'b1;
          for (int s = 0; s < NSYM; s++) begin
            if (set_cfg[io_sel][s].en) begin
              for (int p = 0; p < N; p++) begin
                logic [4:0] b;
                b = base_of(set_cfg[io_sel], 3'(s));
                if (5'(p) >= b && 5'(p) < b + 5'(1 << (set_cfg[io_sel][s].log2n - 4'd7))) begin
                  proc_start[p] <= 1'b1;
                  proc_log2n[p] <= set_cfg[io_sel][s].log2n;
                end
              end
            end
          end
        end
      end
    end
  end

  // read data of the unloader arrives one clock after its address
  assign out_data = io_rdata;

  // frame rules: longest symbol first, at most N*128 points in a frame
  always_ff @(posedge clk) begin
    if (rst_n && load_fire && !loading) begin
      automatic int total = 0;
      automatic int prev  = MAX_LOG2N;
      for (int s = 0; s < NSYM; s++) if (cfg[s].en) begin
        assert (int'(cfg[s].log2n) >= MIN_LOG2N && int'(cfg[s].log2n) <= prev)
          else $error("fft_control: symbols must be 128..2048 points, longest first");
        prev  = int'(cfg[s].log2n);
        total += 1 << (cfg[s].log2n - 4'd7);
      end
      assert (total <= N) else $error("fft_control: frame longer than %0d points", N * 128);
    end
  end

endmodule
