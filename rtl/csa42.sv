// csa42 - 4:2 carry-save compressor built from two rows of full adders.
//
// Reduces four W-bit operands to a sum vector and a carry vector with
// sum + carry == a + b + c + d (modulo 2^W). No carry ripples through the
// compressor, so its delay does not grow with W. Purely combinational.
module csa42 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1, c1, c1s;

  always_comb begin
    // First row of full adders: a + b + c -> s1 + 2*c1.
    s1  = a ^ b ^ c;
    c1  = (a & b) | (a & c) | (b & c);
    c1s = {c1[W-2:0], 1'b0};
    // Second row: s1 + 2*c1 + d -> sum + carry.
    sum   = s1 ^ c1s ^ d;
    carry = ((s1 & c1s) | (s1 & d) | (c1s & d)) << 1;
  end
endmodule
