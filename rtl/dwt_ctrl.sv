// dwt_ctrl - level sequencer of the multi-level DWT system.
//
// Decides what feeds the processor (input select S1) and at which frame size.
//   IDLE   ready for an external frame. A single-level frame may start while
//          earlier frames are still in the pipeline; a multi-level frame
//          waits until the pipeline is empty.
//   EXT    N*N external pixels enter, one per clock.
//   WAITLL wait until the processor has produced the last LL coefficient of
//          the current level (the LL band is then complete in MEM).
//   MEMRD  stream the stored LL band, (N/2^l)^2 words, from MEM into the
//          processor at half the previous side; then back to WAITLL.
// After the last level the sequencer returns to IDLE and pulses frame_done
// with the last coefficient. LL coefficients of all but the last level are
// written to MEM at address row * side/2 + col.
// The states and the handshake are this design's own; the document only
// names the feedback path through MEM and the select S1.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int AW = $clog2((MAXN / 2) * (MAXN / 2))
) (
  input  logic          clk,
  input  logic          rst_n,
  // external frame start
  input  logic          in_sof,
  input  log2n_t        num_levels,   // decomposition levels, 1..LOG2_MAXN (0 counts as 1)
  output logic          in_ready,
  // processor control
  output log2n_t        log2n,        // side of the frame now entering
  output log2n_t        level,        // level of the coefficients now leaving (0 = first)
  output logic          sel_mem,      // S1: 1 = processor input from MEM
  output logic          core_sof,     // frame start into the processor
  // processor output (scaled coefficients)
  input  logic          out_valid,
  input  logic          out_last,
  input  band_t         out_band,
  input  coord_t        out_row,
  input  coord_t        out_col,
  output logic          keep,         // coefficient is a final result
  output logic          frame_done,
  // MEM
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [AW-1:0] mem_raddr
);
  typedef enum logic [1:0] {IDLE, EXT, WAITLL, MEMRD} state_t;

  state_t state;
  log2n_t levels;      // levels of the frame in progress
  slot_t  cnt;         // sample counter in EXT and MEMRD
  slot_t  last_slot;
  logic [3:0] inflight;   // frames inside the processor
  logic   accept, rd_first, fed;
  log2n_t req_levels;

  always_comb begin
    // 0 means 1; with MAXN = 8 the port cannot exceed the largest count (3).
    req_levels = (num_levels == '0) ? log2n_t'(1) : num_levels;
    last_slot  = slot_t'((1 << (2 * log2n)) - 1);
    in_ready   = (state == IDLE) && (req_levels == log2n_t'(1) || inflight == '0);
    accept     = in_sof && in_ready;
    rd_first   = (state == MEMRD) && cnt == '0;
    keep       = out_valid && !(out_band == BAND_LL && level != levels - 1'b1);
    frame_done = out_valid && out_last && level == levels - 1'b1;
    mem_we     = out_valid && out_band == BAND_LL && level != levels - 1'b1;
    mem_waddr  = AW'((slot_t'(out_row) << (log2n - 1'b1)) | slot_t'(out_col));
    mem_raddr  = AW'(cnt);
    core_sof   = accept || fed;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      levels   <= log2n_t'(1);
      log2n    <= log2n_t'(LOG2_MAXN);
      level    <= '0;
      cnt      <= '0;
      sel_mem  <= 1'b0;
      fed      <= 1'b0;
      inflight <= '0;
    end else begin
      sel_mem  <= (state == MEMRD);        // MEM data arrive one clock after the address
      fed      <= rd_first;
      inflight <= inflight + (core_sof ? 4'd1 : 4'd0) - ((out_valid && out_last) ? 4'd1 : 4'd0);
      unique case (state)
        IDLE: if (accept) begin
          levels <= req_levels;
          level  <= '0;
          log2n  <= log2n_t'(LOG2_MAXN);
          cnt    <= slot_t'(1);
          state  <= EXT;
        end
        EXT: begin
          cnt <= cnt + 1'b1;
          if (cnt == last_slot) state <= (levels == log2n_t'(1)) ? IDLE : WAITLL;
        end
        WAITLL: if (out_valid && out_last) begin
          if (level == levels - 1'b1) begin
            state <= IDLE;
            log2n <= log2n_t'(LOG2_MAXN);
          end else begin
            level <= level + 1'b1;
            log2n <= log2n - 1'b1;
            cnt   <= '0;
            state <= MEMRD;
          end
        end
        MEMRD: begin
          cnt <= cnt + 1'b1;
          if (cnt == last_slot) state <= WAITLL;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) inflight != 4'hf)
    else $error("dwt_ctrl: frame counter overflow");
endmodule
