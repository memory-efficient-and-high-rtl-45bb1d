// sd_mult - multiplierless constant multiplier (the "replaced multiplier").
//
// Multiplies the signed word x by one of NSEL constant coefficients, chosen by
// sel. Each coefficient is at most four signed powers of two; each power is a
// hardwired shift of x (arithmetic right shift for negative exponents, which
// truncates toward minus infinity), negated where its digit is negative. The
// four shifted terms are reduced by a 4:2 carry-save compressor and the result
// is left in redundant form (sum, carry): the adder that follows in the PE
// absorbs the final carry-propagate addition.
//   sum + carry == sum_k (+/-) floor(x * 2^exp_k)   (modulo 2^DW)
// The structure (coefficient select in front of four hardwired shifters and a
// CSA(4,2)) follows the design; the digit sets are parameters. Combinational.
module sd_mult
  import dwt_pkg::*;
#(
  parameter int                NSEL  = 2,
  parameter int                SEL_W = 1,
  parameter coef_t [NSEL-1:0]  COEFS = {COEF_B, COEF_A}
) (
  input  word_t              x,
  input  logic [SEL_W-1:0]   sel,
  output word_t              sum,
  output word_t              carry
);
  word_t term [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      term[k] = '0;
      for (int s = 0; s < NSEL; s++) begin
        if (sel == SEL_W'(s) && COEFS[s][k].en) begin
          term[k] = COEFS[s][k].neg ? -shift_pow2(x, COEFS[s][k].exp)
                                    :  shift_pow2(x, COEFS[s][k].exp);
        end
      end
    end
  end

  csa42 #(.W(DW)) u_csa (
    .a(term[0]), .b(term[1]), .c(term[2]), .d(term[3]),
    .sum(sum), .carry(carry)
  );
endmodule
