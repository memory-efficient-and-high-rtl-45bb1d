// tb_hf - checks the horizontal filter against the reference row lifting.
// Frames of random pixels are streamed back to back at sides 8, 4 and 2.
// Every O1 (H1/L1) and O2 (H2/L2) result is compared in order with the
// reference, and the first H1 and H2 must appear at clocks 3 and 7 counted
// from x(0,0) as clock 0, as in the data-flow table of the design.
module tb_hf;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  log2n_t log2n;
  logic in_sof, o1_valid, o1_sof, o2_valid, o2_sof;
  word_t in_data, o1_data, o2_data;

  int checks = 0, failures = 0;
  longint exp1 [$], exp2 [$];
  int cyc = 0, sof_cyc = -1, first1 = -1, first2 = -1;
  int n_back_to_back = 0;

  hf dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: compare outputs in order.
  always @(negedge clk) if (rst_n) begin
    if (o1_valid) begin
      if (first1 < 0 && sof_cyc >= 0) first1 = cyc - sof_cyc;
      checks++;
      if (exp1.size() == 0 || o1_data !== to_word(exp1[0])) begin
        failures++;
        if (failures < 10) $display("O1 @%0d got=%0d exp=%0d", cyc, o1_data, exp1.size() ? exp1[0] : 0);
      end
      if (exp1.size()) void'(exp1.pop_front());
    end
    if (o2_valid) begin
      if (first2 < 0 && sof_cyc >= 0) first2 = cyc - sof_cyc;
      checks++;
      if (exp2.size() == 0 || o2_data !== to_word(exp2[0])) begin
        failures++;
        if (failures < 10) $display("O2 @%0d got=%0d exp=%0d", cyc, o2_data, exp2.size() ? exp2[0] : 0);
      end
      if (exp2.size()) void'(exp2.pop_front());
    end
  end

  task automatic run_frames(int l2, int nframes);
    int n = 1 << l2;
    longint img[], row[], h1[], l1[], h2[], l2v[];
    log2n = log2n_t'(l2);
    img = new[n * n];
    row = new[n];
    for (int f = 0; f < nframes; f++) begin
      for (int p = 0; p < n * n; p++)
        img[p] = (longint'($urandom_range(0, 255)) - 128) * (longint'(1) << FRAC);
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) row[c] = img[r*n + c];
        lift1d(row, h1, l1, h2, l2v);
        for (int j = 0; j < n/2; j++) begin
          exp1.push_back(h1[j]); exp1.push_back(l1[j]);
          exp2.push_back(h2[j]); exp2.push_back(l2v[j]);
        end
      end
      if (f > 0) n_back_to_back++;
      for (int p = 0; p < n * n; p++) begin
        @(negedge clk);
        in_sof  = (p == 0);
        in_data = word_t'(img[p]);
        if (p == 0 && sof_cyc < 0) sof_cyc = cyc;
      end
    end
    @(negedge clk);
    in_sof = 0;
    repeat (2 * n + 12) @(negedge clk);
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
    if (exp1.size() != 0 || exp2.size() != 0) begin
      failures++; $display("missing outputs %0d %0d", exp1.size(), exp2.size());
    end
    checks++;
    if (first1 != 3 || first2 != 7) begin
      failures++; $display("latency O1=%0d O2=%0d (expected 3, 7)", first1, first2);
    end
    checks++;
    if (n_back_to_back == 0) failures++;
    $display("first H1 at clock %0d, first H2 at clock %0d, back-to-back frames %0d",
             first1, first2, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
