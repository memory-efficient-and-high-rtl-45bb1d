// tb_vf - checks the vertical filter against the reference column lifting.
// The input is a random interleaved H/L stream (what the horizontal filter
// produces), frames back to back at sides 8, 4 and 2. O3 and O4 results are
// compared in order, O4 also with its subband/row/column tag. Latency: the
// first O3 result 2N+1 and the first O4 result 4N+3 clocks after the first
// input, i.e. clocks 24 and 42 of an 8x8 frame once the HF's 7 are added.
module tb_vf;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  log2n_t log2n;
  logic in_sof, o3_valid, o4_valid, o4_sof, o4_last;
  word_t in_data, o3_data, o4_data;
  band_t o4_band;
  coord_t o4_row, o4_col;

  typedef struct { longint v; band_t b; int i; int j; logic last; } exp_t;
  exp_t exp3 [$], exp4 [$];
  int checks = 0, failures = 0;
  int cyc = 0, sof_cyc = -1, first3 = -1, first4 = -1, lat_n = 0, frames = 0;

  vf dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (o3_valid) begin
      if (first3 < 0 && sof_cyc >= 0) first3 = cyc - sof_cyc;
      checks++;
      if (exp3.size() == 0 || o3_data !== to_word(exp3[0].v)) begin
        failures++;
        if (failures < 10) $display("O3 @%0d got=%0d exp=%0d", cyc, o3_data, exp3.size() ? exp3[0].v : 0);
      end
      if (exp3.size()) void'(exp3.pop_front());
    end
    if (o4_valid) begin
      if (first4 < 0 && sof_cyc >= 0) first4 = cyc - sof_cyc;
      checks++;
      if (exp4.size() == 0 || o4_data !== to_word(exp4[0].v) || o4_band != exp4[0].b ||
          int'(o4_row) != exp4[0].i || int'(o4_col) != exp4[0].j || o4_last != exp4[0].last) begin
        failures++;
        if (failures < 10) $display("O4 @%0d got=%0d b=%0d (%0d,%0d) exp=%0d b=%0d (%0d,%0d)", cyc,
          o4_data, o4_band, o4_row, o4_col, exp4.size() ? exp4[0].v : 0,
          exp4.size() ? exp4[0].b : BAND_LL, exp4.size() ? exp4[0].i : 0, exp4.size() ? exp4[0].j : 0);
      end
      if (exp4.size()) void'(exp4.pop_front());
    end
  end

  task automatic run_frames(int l2, int nframes);
    int n = 1 << l2;
    longint s[], col[], h1[], l1[], h2[], l2v[];
    longint hh1[], hl1[], hh2[], hl2[], lh1[], ll1[], lh2[], ll2[];
    exp_t e;
    log2n = log2n_t'(l2);
    s = new[n * n]; col = new[n];
    hh1 = new[n*n/4]; hl1 = new[n*n/4]; hh2 = new[n*n/4]; hl2 = new[n*n/4];
    lh1 = new[n*n/4]; ll1 = new[n*n/4]; lh2 = new[n*n/4]; ll2 = new[n*n/4];
    for (int f = 0; f < nframes; f++) begin
      for (int p = 0; p < n * n; p++) s[p] = longint'($urandom_range(0, 2000000)) - 1000000;
      for (int j = 0; j < n/2; j++) begin
        for (int r = 0; r < n; r++) col[r] = s[r*n + 2*j];
        lift1d(col, h1, l1, h2, l2v);
        for (int i = 0; i < n/2; i++) begin
          hh1[i*(n/2)+j] = h1[i]; hl1[i*(n/2)+j] = l1[i];
          hh2[i*(n/2)+j] = h2[i]; hl2[i*(n/2)+j] = l2v[i];
        end
        for (int r = 0; r < n; r++) col[r] = s[r*n + 2*j + 1];
        lift1d(col, h1, l1, h2, l2v);
        for (int i = 0; i < n/2; i++) begin
          lh1[i*(n/2)+j] = h1[i]; ll1[i*(n/2)+j] = l1[i];
          lh2[i*(n/2)+j] = h2[i]; ll2[i*(n/2)+j] = l2v[i];
        end
      end
      for (int i = 0; i < n/2; i++) begin
        for (int j = 0; j < n/2; j++) begin
          e = '{hh1[i*(n/2)+j], BAND_HH, i, j, 1'b0}; exp3.push_back(e);
          e = '{hl1[i*(n/2)+j], BAND_HL, i, j, 1'b0}; exp3.push_back(e);
          e = '{hh2[i*(n/2)+j], BAND_HH, i, j, 1'b0}; exp4.push_back(e);
          e = '{hl2[i*(n/2)+j], BAND_HL, i, j, 1'b0}; exp4.push_back(e);
        end
        for (int j = 0; j < n/2; j++) begin
          e = '{lh1[i*(n/2)+j], BAND_LH, i, j, 1'b0}; exp3.push_back(e);
          e = '{ll1[i*(n/2)+j], BAND_LL, i, j, 1'b0}; exp3.push_back(e);
          e = '{lh2[i*(n/2)+j], BAND_LH, i, j, 1'b0}; exp4.push_back(e);
          e = '{ll2[i*(n/2)+j], BAND_LL, i, j, (i == n/2-1 && j == n/2-1)}; exp4.push_back(e);
        end
      end
      frames++;
      for (int p = 0; p < n * n; p++) begin
        @(negedge clk);
        in_sof  = (p == 0);
        in_data = word_t'(s[p]);
        if (p == 0 && sof_cyc < 0) begin sof_cyc = cyc; lat_n = n; end
      end
    end
    @(negedge clk);
    in_sof = 0;
    repeat (4 * n + 12) @(negedge clk);
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
    if (exp3.size() != 0 || exp4.size() != 0) begin
      failures++; $display("missing outputs %0d %0d", exp3.size(), exp4.size());
    end
    checks++;
    if (first3 != 2 * lat_n + 1 || first4 != 4 * lat_n + 3) begin
      failures++; $display("latency O3=%0d O4=%0d", first3, first4);
    end
    $display("first O3 after %0d clocks, first O4 after %0d clocks, %0d frames", first3, first4, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
