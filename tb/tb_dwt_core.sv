// tb_dwt_core - end-to-end check of one 2-D DWT level (HF -> VF -> SN).
// Random frames are streamed back to back at sides 8, 4 and 2. Every scaled
// coefficient is compared bit for bit with the integer reference, each
// (band, row, column) must appear exactly once per frame, and the result must
// agree with the floating-point 9/7 transform within the error of the
// shortened coefficients. Clock numbers for the first 8x8 frame, counted from
// x(0,0): H1 at 3, H2 at 7, HH1 at 24, HH2 at 42 (the design's data-flow
// tables), first scaled coefficient at 43 and the last one at 106.
module tb_dwt_core;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam real TOL = 0.05;   // relative to the largest coefficient of the frame

  logic clk = 0, rst_n = 0;
  log2n_t log2n;
  logic in_sof;
  word_t in_data;
  logic o1_valid, o2_valid, o3_valid, o4_valid;
  word_t o1_data, o2_data, o3_data, o4_data;
  logic out_valid, out_sof, out_last;
  band_t out_band;
  coord_t out_row, out_col;
  word_t out_data;

  typedef struct { int n; longint v[]; real fr[]; real fmax; } frame_t;
  frame_t fq [$];
  int seen [];
  int checks = 0, failures = 0;
  int cyc = 0, sof_cyc = -1, t1 = -1, t2 = -1, t3 = -1, t4 = -1, tout = -1, tlast = -1;
  int frames_done = 0, outs = 0;
  real max_rel = 0.0;

  dwt_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && sof_cyc >= 0) begin
    if (o1_valid && t1 < 0) t1 = cyc - sof_cyc;
    if (o2_valid && t2 < 0) t2 = cyc - sof_cyc;
    if (o3_valid && t3 < 0) t3 = cyc - sof_cyc;
    if (o4_valid && t4 < 0) t4 = cyc - sof_cyc;
    if (out_valid) begin
      int idx, n;
      real fv, rel;
      if (tout < 0) tout = cyc - sof_cyc;
      checks++;
      if (fq.size() == 0) begin
        failures++;
      end else begin
        n   = fq[0].n;
        idx = bidx(n, out_band, int'(out_row), int'(out_col));
        if (out_sof) begin
          seen = new[n * n];
          foreach (seen[k]) seen[k] = 0;
        end
        seen[idx]++;
        if (out_data !== to_word(fq[0].v[idx])) begin
          failures++;
          if (failures < 10) $display("n=%0d band %0d (%0d,%0d) got=%0d exp=%0d", n, out_band,
                                      out_row, out_col, out_data, fq[0].v[idx]);
        end
        fv  = real'(out_data) / real'(1 << FRAC);
        rel = (fv - fq[0].fr[idx]) / fq[0].fmax;
        if (rel < 0) rel = -rel;
        if (rel > max_rel) max_rel = rel;
        checks++;
        if (rel > TOL) begin
          failures++;
          if (failures < 10) $display("float: band %0d (%0d,%0d) got=%f exp=%f", out_band,
                                      out_row, out_col, fv, fq[0].fr[idx]);
        end
        if (out_last) begin
          if (tlast < 0) tlast = cyc - sof_cyc;
          checks++;
          foreach (seen[k]) if (seen[k] != 1) begin
            failures++;
            $display("coefficient %0d seen %0d times", k, seen[k]);
            break;
          end
          void'(fq.pop_front());
          frames_done++;
        end
      end
    end
  end

  task automatic run_frames(int l2, int nframes);
    int n = 1 << l2;
    longint img[], un[];
    real    fimg[];
    frame_t fr;
    log2n = log2n_t'(l2);
    img = new[n * n]; fimg = new[n * n];
    for (int f = 0; f < nframes; f++) begin
      for (int p = 0; p < n * n; p++) begin
        img[p]  = longint'($urandom_range(0, 255)) - 128;
        fimg[p] = real'(img[p]);
        img[p]  = img[p] * (longint'(1) << FRAC);
      end
      fr.n = n;
      dwt2d_level(img, n, fr.v, un);
      dwt2d_level_real(fimg, n, fr.fr);
      fr.fmax = 1.0;
      foreach (fr.fr[k]) if (fr.fr[k] > fr.fmax || -fr.fr[k] > fr.fmax)
        fr.fmax = (fr.fr[k] > 0) ? fr.fr[k] : -fr.fr[k];
      fq.push_back(fr);
      for (int p = 0; p < n * n; p++) begin
        @(negedge clk);
        in_sof  = (p == 0);
        in_data = word_t'(img[p]);
        if (p == 0 && sof_cyc < 0) sof_cyc = cyc;
      end
    end
    @(negedge clk);
    in_sof = 0;
    repeat (4 * n + 20) @(negedge clk);
  endtask

  initial begin
    in_sof = 0; in_data = '0; log2n = log2n_t'(3);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_frames(3, 3);
    run_frames(2, 2);
    run_frames(1, 2);
    checks++;
    if (frames_done != 7) begin failures++; $display("frames done %0d", frames_done); end
    checks++;
    if (t1 != 3 || t2 != 7 || t3 != 24 || t4 != 42 || tout != 43 || tlast != 106) begin
      failures++;
      $display("timing wrong");
    end
    $display("clocks: H1 %0d, H2 %0d, HH1 %0d, HH2 %0d, first coef %0d, last coef %0d",
             t1, t2, t3, t4, tout, tlast);
    $display("largest deviation from the real-valued 9/7 DWT: %f of the frame maximum", max_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
