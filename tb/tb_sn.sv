// tb_sn - checks the scaling normalisation: each subband is multiplied by its
// own factor (LL: T, HL/LH: U, HH: R), one clock of latency, tags passed on.
module tb_sn;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof, in_last, out_valid, out_sof, out_last;
  band_t in_band, out_band;
  coord_t in_row, in_col, out_row, out_col;
  word_t in_data, out_data;
  int checks = 0, failures = 0;

  sn dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e, prev_v;
    band_t  prev_b;
    coord_t prev_r, prev_c;
    logic   prev_valid;
    real    ratio;
    in_valid = 0; in_sof = 0; in_last = 0; in_band = BAND_LL;
    in_row = '0; in_col = '0; in_data = '0;
    prev_valid = 0; prev_v = 0; prev_b = BAND_LL; prev_r = '0; prev_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the result of the previous cycle's input
      if (prev_valid) begin
        case (prev_b)
          BAND_LL: e = ref_mult(prev_v, COEF_T);
          BAND_HH: e = ref_mult(prev_v, COEF_R);
          default: e = ref_mult(prev_v, COEF_U);
        endcase
        checks++;
        if (out_data !== to_word(e) || out_band != prev_b || out_row != prev_r ||
            out_col != prev_c || !out_valid) begin
          failures++;
          if (failures < 10) $display("band %0d x=%0d got=%0d exp=%0d", prev_b, prev_v, out_data, e);
        end
        // factor check against the real scale factors
        if (prev_v > 1000000) begin
          ratio = real'(out_data) / real'(prev_v);
          checks++;
          case (prev_b)
            BAND_LL: if (ratio < 0.00142 || ratio > 0.00144) failures++;
            BAND_HH: if (ratio < 0.00415 || ratio > 0.00418) failures++;
            default: if (ratio < 0.00243 || ratio > 0.00245) failures++;
          endcase
        end
      end
      v = longint'($urandom_range(0, 200000000)) - 100000000;
      in_valid = 1; in_data = word_t'(v);
      in_band  = band_t'($urandom_range(0, 3));
      in_row   = coord_t'($urandom); in_col = coord_t'($urandom);
      prev_valid = 1; prev_v = v; prev_b = in_band; prev_r = in_row; prev_c = in_col;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
