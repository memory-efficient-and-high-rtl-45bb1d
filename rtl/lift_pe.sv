// lift_pe - lifting processing element, PE(A/B) or PE(C/D).
//
// Computes one modified lifting step  out = coef * data2 + data1 + data3,
// where coef is COEF0 (sel = 0) or COEF1 (sel = 1): A/B for the predict/update
// pair of the first lifting stage, C/D for the second. The pre-adder adds the
// two neighbours data1 + data3 while the shift-add multiplier works on data2;
// a three-input final adder joins the pre-sum with the multiplier's redundant
// sum and carry. This keeps the path to two additions deep, as the design
// intends. Combinational; the register after each PE sits in the filter.
module lift_pe
  import dwt_pkg::*;
#(
  parameter coef_t COEF0 = COEF_A,
  parameter coef_t COEF1 = COEF_B
) (
  input  word_t data1,
  input  word_t data2,
  input  word_t data3,
  input  logic  sel,     // S0: 0 -> COEF0, 1 -> COEF1
  output word_t out
);
  word_t pre, msum, mcarry;

  sd_mult #(.NSEL(2), .SEL_W(1), .COEFS({COEF1, COEF0})) u_mult (
    .x(data2), .sel(sel), .sum(msum), .carry(mcarry)
  );

  always_comb begin
    pre = data1 + data3;
    out = pre + msum + mcarry;
  end
endmodule
