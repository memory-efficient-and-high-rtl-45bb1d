// sn - scaling normalisation (SN) of the four subbands.
//
// The modified lifting leaves every subband multiplied by a constant gain;
// SN removes it with one shift-add multiplication whose coefficient is chosen
// by the subband (select S8):
//   LL: T = (alpha beta gamma delta zeta)^2      ~ 0.0014310
//   HL, LH: U = alpha^2 beta^2 gamma^2 delta     ~ 0.0024414
//   HH: R = (alpha beta gamma / zeta)^2          ~ 0.0041653
// which yields the standard 9/7 transform with low bands scaled by zeta and
// high bands by 1/zeta per dimension. The pairing of T with LL and R with HH
// is derived from the lifting equations (see README). One register stage:
// out_* follow in_* by one clock; the tags pass through unchanged.
module sn
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_sof,
  input  logic   in_last,
  input  band_t  in_band,
  input  coord_t in_row,
  input  coord_t in_col,
  input  word_t  in_data,
  output logic   out_valid,
  output logic   out_sof,
  output logic   out_last,
  output band_t  out_band,
  output coord_t out_row,
  output coord_t out_col,
  output word_t  out_data
);
  logic [1:0] sel;
  word_t      msum, mcarry;

  always_comb begin
    unique case (in_band)
      BAND_LL:          sel = 2'd0;
      BAND_HL, BAND_LH: sel = 2'd1;
      default:          sel = 2'd2;
    endcase
  end

  sd_mult #(.NSEL(3), .SEL_W(2), .COEFS({COEF_R, COEF_U, COEF_T})) u_mult (
    .x(in_data), .sel(sel), .sum(msum), .carry(mcarry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sof <= 1'b0; out_last <= 1'b0;
      out_band  <= BAND_LL; out_row <= '0; out_col <= '0;
    end else begin
      out_valid <= in_valid; out_sof <= in_valid && in_sof;
      out_last  <= in_valid && in_last;
      out_band  <= in_band; out_row <= in_row; out_col <= in_col;
    end
  end

  always_ff @(posedge clk) out_data <= msum + mcarry;
endmodule
