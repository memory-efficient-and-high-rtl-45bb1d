// tb_lift_pe - checks a processing element, out = coef*data2 + data1 + data3.
// Both instances (A/B and C/D coefficient pairs) are driven with random
// operands and both coefficient selects; the result is compared with the
// reference arithmetic.
module tb_lift_pe;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  word_t d1, d2, d3, out_ab, out_cd;
  logic  sel;
  int checks = 0, failures = 0;

  lift_pe #(.COEF0(COEF_A), .COEF1(COEF_B)) dut_ab (
    .data1(d1), .data2(d2), .data3(d3), .sel(sel), .out(out_ab));
  lift_pe #(.COEF0(COEF_C), .COEF1(COEF_D)) dut_cd (
    .data1(d1), .data2(d2), .data3(d3), .sel(sel), .out(out_cd));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd();
    return longint'($urandom_range(0, 20000000)) - 10000000;
  endfunction

  initial begin
    longint a, b, c, e_ab, e_cd;
    for (int n = 0; n < 3000; n++) begin
      a = rnd(); b = rnd(); c = rnd();
      sel = n[0];
      d1 = word_t'(a); d2 = word_t'(b); d3 = word_t'(c);
      #1;
      e_ab = a + c + ref_mult(b, sel ? COEF_B : COEF_A);
      e_cd = a + c + ref_mult(b, sel ? COEF_D : COEF_C);
      checks += 2;
      if (out_ab !== to_word(e_ab)) begin
        failures++;
        if (failures < 10) $display("PE(A/B) sel=%0d got=%0d exp=%0d", sel, out_ab, e_ab);
      end
      if (out_cd !== to_word(e_cd)) begin
        failures++;
        if (failures < 10) $display("PE(C/D) sel=%0d got=%0d exp=%0d", sel, out_cd, e_cd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
