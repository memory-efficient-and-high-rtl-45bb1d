// tb_sd_mult - checks the shift-add constant multiplier.
// Random signed words are multiplied by all four lifting coefficients. The
// redundant result sum + carry must equal the reference product (digit by
// digit, floor division for negative powers) and must lie within four LSBs
// of the exact real product with the approximated coefficient.
module tb_sd_mult;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  word_t      x, s, c;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  coef_t cs [4];

  sd_mult #(.NSEL(4), .SEL_W(2), .COEFS({COEF_D, COEF_C, COEF_B, COEF_A})) dut (
    .x(x), .sel(sel), .sum(s), .carry(c)
  );

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv, expv;
    word_t  got;
    real    exact;
    cs = '{COEF_A, COEF_B, COEF_C, COEF_D};
    for (int n = 0; n < 4000; n++) begin
      xv  = longint'($signed($urandom_range(0, 2000000))) - 1000000;
      if (n < 8) xv = (n % 2 == 0) ? longint'(n) : -longint'(n * 1000);
      sel = 2'(n % 4);
      x   = word_t'(xv);
      #1;
      got  = s + c;
      expv = ref_mult(xv, cs[n % 4]);
      checks++;
      if (got !== to_word(expv)) begin
        failures++;
        if (failures < 10) $display("mismatch sel=%0d x=%0d got=%0d exp=%0d", sel, xv, got, expv);
      end
      exact = real'(xv) * coef_value(cs[n % 4]);
      checks++;
      if ((real'(got) - exact) >= 4.0 || (exact - real'(got)) >= 4.0) begin
        failures++;
        if (failures < 10) $display("range sel=%0d x=%0d got=%0d exact=%f", sel, xv, got, exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
