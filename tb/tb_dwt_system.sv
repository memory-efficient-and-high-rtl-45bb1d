// tb_dwt_system - end-to-end test of the multi-level DWT system at its
// default size (8x8 frames).
// Sends single-level frames back to back, then frames of 2 and 3 levels, some
// of them requested while the pipeline is still busy. Every coefficient is
// compared bit for bit with the integer reference (level by level, the LL
// band of one level being the next level's image), every (level, band, row,
// column) must appear once, and the result must follow the real-valued 9/7
// transform within the error of the shortened coefficients. Counts how often
// each mechanism happened: back-to-back frames, LL feedback through MEM at
// each frame side, a multi-level request held off by in_ready; a mechanism
// that never happened is a failure. Checks the 43 / 106 clock latency of a
// single-level 8x8 frame.
module tb_dwt_system;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int  N   = MAXN;
  localparam real TOL = 0.08;

  logic clk = 0, rst_n = 0;
  log2n_t num_levels;
  logic pix_sof;
  logic signed [IN_W-1:0] pix_data;
  logic in_ready, coef_valid, frame_done, dout1_valid, dout2_valid, dout3_valid, dout4_valid;
  log2n_t coef_level;
  band_t coef_band;
  coord_t coef_row, coef_col;
  word_t coef_data, dout1_data, dout2_data, dout3_data, dout4_data;

  typedef struct {
    int     levels;
    longint v [int];     // key: ((level*4 + band)*N + row)*N + col
    real    fr [int];
    real    fmax [int];  // per level
    int     count;
  } frame_t;
  frame_t fq [$];
  int seen [int];

  int checks = 0, failures = 0;
  int cyc = 0, first_sof = -1, first_coef = -1, last_coef = -1;
  int frames_done = 0, n_b2b = 0, n_held = 0, n_mem_feed = 0;
  int n_feed_size [int];
  int last_pix_cyc = -100;
  int t_d1 = -1, t_d2 = -1, t_d3 = -1, t_d4 = -1;
  int frame_sof [$];          // sof clock of each frame, in order
  int frame_lv [$];
  int n_timed3 = 0;
  real max_rel = 0.0;

  dwt_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int key(int lvl, band_t b, int i, int j);
    return ((lvl * 4 + int'(b)) * N + i) * N + j;
  endfunction

  // First clocks of the intermediate streams (first frame).
  always @(negedge clk) if (rst_n && first_sof >= 0) begin
    if (dout1_valid && t_d1 < 0) t_d1 = cyc - first_sof;
    if (dout2_valid && t_d2 < 0) t_d2 = cyc - first_sof;
    if (dout3_valid && t_d3 < 0) t_d3 = cyc - first_sof;
    if (dout4_valid && t_d4 < 0) t_d4 = cyc - first_sof;
  end

  // Count frames fed back from MEM, by their side.
  always @(negedge clk) if (rst_n && dut.u_ctrl.core_sof && dut.sel_mem) begin
    n_mem_feed++;
    n_feed_size[1 << dut.log2n]++;
  end

  always @(negedge clk) if (rst_n && coef_valid) begin
    int k, lvl;
    real fv, rel;
    if (first_coef < 0) first_coef = cyc - first_sof;
    checks++;
    if (fq.size() == 0) begin
      failures++;
      $display("unexpected coefficient");
    end else begin
      lvl = int'(coef_level);
      k = key(lvl, coef_band, int'(coef_row), int'(coef_col));
      if (!fq[0].v.exists(k)) begin
        failures++;
        if (failures < 10) $display("coefficient not expected: level %0d band %0d (%0d,%0d)",
                                    lvl, coef_band, coef_row, coef_col);
      end else begin
        seen[k] = seen.exists(k) ? seen[k] + 1 : 1;
        if (coef_data !== to_word(fq[0].v[k])) begin
          failures++;
          if (failures < 10) $display("level %0d band %0d (%0d,%0d) got=%0d exp=%0d", lvl,
                                      coef_band, coef_row, coef_col, coef_data, fq[0].v[k]);
        end
        fv  = real'(coef_data) / real'(1 << FRAC);
        rel = (fv - fq[0].fr[k]) / fq[0].fmax[lvl];
        if (rel < 0) rel = -rel;
        if (rel > max_rel) max_rel = rel;
        checks++;
        if (rel > TOL) begin
          failures++;
          if (failures < 10) $display("float: level %0d band %0d got=%f exp=%f", lvl, coef_band,
                                      fv, fq[0].fr[k]);
        end
      end
      if (frame_done) begin
        int t0, lv, expt, sd;
        if (last_coef < 0) last_coef = cyc - first_sof;
        // Whole-frame time: each level takes side^2 + 4*side + 10 clocks from
        // its first input to its last coefficient, plus 2 clocks to restart
        // from MEM. (Pure computation, N^2 (1 + 1/4 + ...), is 84 clocks for
        // three levels of 8x8; the rest is pipeline latency per level.)
        t0 = frame_sof.pop_front();
        lv = frame_lv.pop_front();
        expt = 0; sd = N;
        for (int l = 0; l < lv; l++) begin
          expt += sd * sd + 4 * sd + 10 + (l > 0 ? 2 : 0);
          sd /= 2;
        end
        checks++;
        if (cyc - t0 != expt) begin
          failures++; $display("frame of %0d levels took %0d clocks, expected %0d", lv, cyc - t0, expt);
        end
        if (lv == 3 && n_timed3 == 0) begin
          $display("a 3-level 8x8 frame took %0d clocks", cyc - t0);
          n_timed3++;
        end
        checks++;
        if (seen.num() != fq[0].count) begin
          failures++;
          $display("frame %0d: %0d of %0d coefficients", frames_done, seen.num(), fq[0].count);
        end
        foreach (seen[s]) if (seen[s] != 1) begin
          failures++;
          $display("coefficient %0d seen %0d times", s, seen[s]);
          break;
        end
        seen.delete();
        void'(fq.pop_front());
        frames_done++;
      end
    end
  end

  task automatic send_frame(int levels);
    longint img[], res[], un[], nxt[], pix[];
    real    fimg[], fres[], fnxt[];
    frame_t fr;
    int     n = N;
    bit     waited = 0;
    img = new[N * N]; fimg = new[N * N];
    for (int p = 0; p < N * N; p++) begin
      img[p]  = longint'($urandom_range(0, 255)) - 128;
      fimg[p] = real'(img[p]);
    end
    pix = img;
    // reference, level by level
    fr.levels = levels; fr.count = 0;
    for (int p = 0; p < N * N; p++) img[p] = img[p] * (longint'(1) << FRAC);
    for (int l = 0; l < levels; l++) begin
      dwt2d_level(img, n, res, un);
      dwt2d_level_real(fimg, n, fres);
      fr.fmax[l] = 1.0;
      foreach (fres[q]) if (fres[q] > fr.fmax[l] || -fres[q] > fr.fmax[l])
        fr.fmax[l] = (fres[q] > 0) ? fres[q] : -fres[q];
      for (int b = 0; b < 4; b++) begin
        if (b == int'(BAND_LL) && l != levels - 1) continue;
        for (int i = 0; i < n/2; i++)
          for (int j = 0; j < n/2; j++) begin
            fr.v[key(l, band_t'(b), i, j)]  = res[bidx(n, band_t'(b), i, j)];
            fr.fr[key(l, band_t'(b), i, j)] = fres[bidx(n, band_t'(b), i, j)];
            fr.count++;
          end
      end
      ll_band(res, n, nxt);
      ll_band_real(fres, n, fnxt);
      img = nxt; fimg = fnxt;
      n = n / 2;
    end
    fq.push_back(fr);
    // drive it once the system is ready (called at a falling edge)
    num_levels = log2n_t'(levels);
    #1;
    while (!in_ready) begin
      waited = 1;
      @(negedge clk);
      #1;
    end
    if (waited && levels > 1) n_held++;
    if (cyc == last_pix_cyc + 1) n_b2b++;
    for (int p = 0; p < N * N; p++) begin
      pix_sof  = (p == 0);
      pix_data = IN_W'(pix[p]);
      if (p == 0 && first_sof < 0) first_sof = cyc;
      if (p == 0) begin frame_sof.push_back(cyc); frame_lv.push_back(levels); end
      @(negedge clk);
    end
    pix_sof = 0;
    last_pix_cyc = cyc - 1;
  endtask

  initial begin
    pix_sof = 0; pix_data = '0; num_levels = log2n_t'(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    send_frame(1);
    send_frame(1);
    send_frame(1);
    send_frame(2);
    send_frame(3);
    send_frame(1);
    send_frame(3);
    repeat (400) @(negedge clk);
    checks++;
    if (frames_done != 7 || fq.size() != 0) begin
      failures++; $display("frames done %0d, pending %0d", frames_done, fq.size());
    end
    checks++;
    if (first_coef != 43 || last_coef != 106) begin
      failures++; $display("latency: first %0d last %0d (expected 43, 106)", first_coef, last_coef);
    end
    checks++;
    if (t_d1 != 3 || t_d2 != 7 || t_d3 != 24 || t_d4 != 42) begin
      failures++; $display("Data-out 1..4 start at %0d %0d %0d %0d", t_d1, t_d2, t_d3, t_d4);
    end
    checks += 4;
    if (n_b2b == 0)                failures++;
    if (n_held == 0)               failures++;
    if (!n_feed_size.exists(4))    failures++;
    if (!n_feed_size.exists(2))    failures++;
    $display("first frame: first coefficient at clock %0d, last at clock %0d", first_coef, last_coef);
    $display("back-to-back frames %0d, multi-level frames held off %0d, MEM feedbacks %0d (side 4: %0d, side 2: %0d)",
             n_b2b, n_held, n_mem_feed, n_feed_size.exists(4) ? n_feed_size[4] : 0,
             n_feed_size.exists(2) ? n_feed_size[2] : 0);
    $display("largest deviation from the real-valued 9/7 DWT: %f of the level maximum", max_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
