// tb_dwt_ctrl - checks the level sequencer on its own.
// A small behavioural stand-in for the processor answers every frame start
// with the processor's output sequence (same order and tags, first result
// 4N+11 clocks later). The test checks: in_ready and the back-to-back
// acceptance of single-level frames; that a multi-level frame waits for an
// empty pipeline; the MEM read addresses 0..(side^2-1) and the input select
// during each fed-back level; the frame side per level; the MEM write
// addresses of the LL results; which results are kept; frame_done.
module tb_dwt_ctrl;
  import dwt_pkg::*;
  localparam int AW = $clog2((MAXN / 2) * (MAXN / 2));

  logic clk = 0, rst_n = 0;
  logic in_sof, in_ready, sel_mem, core_sof, keep, frame_done, mem_we;
  log2n_t num_levels, log2n, level;
  logic out_valid, out_last;
  band_t out_band;
  coord_t out_row, out_col;
  logic [AW-1:0] mem_waddr, mem_raddr;

  int checks = 0, failures = 0;
  int cyc = 0;

  dwt_ctrl #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- processor stand-in ------------------------------------------------
  typedef struct { int t; band_t b; int i; int j; logic last; int n; } ev_t;
  ev_t evq [$];
  always @(posedge clk) if (rst_n && core_sof) begin
    int n, t;
    ev_t e;
    n = 1 << log2n;
    t = cyc + 4 * n + 11;
    if (evq.size() && evq[$].t >= t) t = evq[$].t + 1;
    for (int i = 0; i < n/2; i++) begin
      for (int j = 0; j < n/2; j++) begin
        e = '{t, BAND_HH, i, j, 1'b0, n}; evq.push_back(e); t++;
        e = '{t, BAND_HL, i, j, 1'b0, n}; evq.push_back(e); t++;
      end
      for (int j = 0; j < n/2; j++) begin
        e = '{t, BAND_LH, i, j, 1'b0, n}; evq.push_back(e); t++;
        e = '{t, BAND_LL, i, j, (i == n/2-1 && j == n/2-1), n}; evq.push_back(e); t++;
      end
    end
  end
  always @(negedge clk) begin
    out_valid = 0; out_last = 0; out_band = BAND_LL; out_row = '0; out_col = '0;
    if (evq.size() && evq[0].t == cyc) begin
      out_valid = 1; out_last = evq[0].last; out_band = evq[0].b;
      out_row = coord_t'(evq[0].i); out_col = coord_t'(evq[0].j);
      void'(evq.pop_front());
    end
  end

  // --- monitors --------------------------------------------------------------
  int exp_raddr = -1, feed_n = 0, n_done = 0, n_we = 0, n_feeds = 0;
  logic prev_rd = 0;
  always @(negedge clk) if (rst_n) begin
    #2;
    // MEM reads: consecutive addresses while reading, select follows by one clock
    if (dut.state == 2'd3) begin
      if (exp_raddr < 0) begin exp_raddr = 0; n_feeds++; end
      checks++;
      if (int'(mem_raddr) != exp_raddr) begin
        failures++; $display("raddr %0d expected %0d", mem_raddr, exp_raddr);
      end
      exp_raddr++;
    end else exp_raddr = -1;
    checks++;
    if (sel_mem != prev_rd) begin failures++; $display("sel_mem not aligned @%0d", cyc); end
    prev_rd = (dut.state == 2'd3);
    if (mem_we) begin
      n_we++;
      checks++;
      if (out_band != BAND_LL || int'(mem_waddr) != int'(out_row) * ((1 << log2n) / 2) + int'(out_col)) begin
        failures++; $display("bad MEM write addr %0d", mem_waddr);
      end
    end
    if (out_valid) begin
      checks++;
      if (keep != !(out_band == BAND_LL && int'(level) != int'(dut.levels) - 1)) begin
        failures++; $display("keep wrong");
      end
    end
    if (frame_done) n_done++;
  end

  // --- driver --------------------------------------------------------------
  task automatic send(int levels, output int waited);
    waited = 0;
    num_levels = log2n_t'(levels);
    #1;
    while (!in_ready) begin waited++; @(negedge clk); #1; end
    for (int p = 0; p < MAXN * MAXN; p++) begin
      in_sof = (p == 0);
      @(negedge clk);
      #1;
      if (p == 0) begin
        checks++;
        if (in_ready && levels > 1) begin failures++; $display("ready during EXT"); end
      end
    end
    in_sof = 0;
  endtask

  initial begin
    int w;
    in_sof = 0; num_levels = log2n_t'(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    send(1, w);
    send(1, w);                    // back to back
    checks++; if (w != 0) begin failures++; $display("single-level frame waited %0d", w); end
    send(3, w);                    // must wait for the pipeline to drain
    checks++; if (w == 0) begin failures++; $display("multi-level frame did not wait"); end
    // during a 3-level frame: sizes 8, 4, 2 in turn
    send(2, w);
    repeat (300) @(negedge clk);
    checks++;
    if (n_done != 4) begin failures++; $display("frame_done %0d times", n_done); end
    checks++;
    if (n_feeds != 3) begin failures++; $display("MEM feeds %0d", n_feeds); end
    // LL writes: frame 3 writes 16 + 4, frame 4 writes 16
    checks++;
    if (n_we != 36) begin failures++; $display("MEM writes %0d", n_we); end
    $display("frames %0d, MEM feeds %0d, MEM writes %0d", n_done, n_feeds, n_we);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
