// dwt_pkg - shared types and constants of the line-based 9/7 lifting 2-D DWT.
//
// The datapath works on signed fixed-point words of DW bits with FRAC
// fractional bits. Every constant multiplication of the design is a sum of at
// most four signed powers of two ("signed digits"), which the hardware realises
// as four hardwired shifts feeding a 4:2 carry-save adder.
//
// The lifting is the modified (normalised-coefficient) form: the lifting
// coefficients alpha..delta are divided out so that each step is
//   out = coef * centre + left + right,
// with coef one of A = 1/alpha, B = 1/(alpha*beta), C = 1/(beta*gamma),
// D = 1/(gamma*delta). The subband scale factors are T, U and R.
// Magnitudes follow the coefficient table of the design; the signs follow
// from the definitions (alpha and beta are negative). A and B use the signed
// digits printed for them; C, D, T, U and R use four-digit approximations of
// the printed values chosen by this design (see README for the error).
package dwt_pkg;

  // Word format of the datapath.
  localparam int DW   = 40;  // datapath word width (own choice, covers worst-case growth)
  localparam int FRAC = 8;   // fractional bits (own choice)
  localparam int IN_W = 8;   // width of a signed input pixel (own choice)

  // Largest frame side handled by the processor; the implemented chip is 8x8.
  localparam int MAXN      = 8;
  localparam int LOG2_MAXN = $clog2(MAXN);

  localparam int LW        = $clog2(LOG2_MAXN + 1);  // width of a log2(size) value
  localparam int SW        = 2 * LOG2_MAXN;          // width of a slot counter

  typedef logic signed [DW-1:0]   word_t;
  typedef logic [LW-1:0]          log2n_t;  // log2 of the current frame side
  typedef logic [SW-1:0]          slot_t;   // sample slot within a frame
  typedef logic [LOG2_MAXN-1:0]   coord_t;  // row or column inside a subband

  // One signed digit: en ? (neg ? -1 : +1) * 2^exp : 0.
  typedef struct packed {
    logic              en;
    logic              neg;
    logic signed [5:0] exp;
  } sd_digit_t;

  // A constant coefficient: four signed digits (four hardwired shifters).
  typedef sd_digit_t [3:0] coef_t;

  localparam sd_digit_t NODIG = '{en: 1'b0, neg: 1'b0, exp: 6'sd0};

  function automatic sd_digit_t dig(input logic neg, input int e);
    sd_digit_t d;
    d.en  = 1'b1;
    d.neg = neg;
    d.exp = 6'(e);
    return d;
  endfunction

  // A = 1/alpha  = -0.63046362  ~ -(2^-1 + 2^-3 + 2^-8 + 2^-9)      = -0.630859
  localparam coef_t COEF_A = {dig(1'b1, -1), dig(1'b1, -3), dig(1'b1, -8), dig(1'b1, -9)};
  // B = 1/(alpha beta) = 11.90000408 ~ 2^3 + 2^2 - 2^-3 + 2^-5      = 11.90625
  localparam coef_t COEF_B = {dig(1'b0, 3), dig(1'b0, 2), dig(1'b1, -3), dig(1'b0, -5)};
  // C = 1/(beta gamma) = -21.37814969 ~ -(2^4 + 2^2 + 2^0 + 2^-1)   = -21.5
  localparam coef_t COEF_C = {dig(1'b1, 4), dig(1'b1, 2), dig(1'b1, 0), dig(1'b1, -1)};
  // D = 1/(gamma delta) = 2.553775411 ~ 2^1 + 2^-1 + 2^-4 - 2^-7    = 2.5546875
  localparam coef_t COEF_D = {dig(1'b0, 1), dig(1'b0, -1), dig(1'b0, -4), dig(1'b1, -7)};
  // T = (alpha beta gamma delta zeta)^2 = 0.001430992 (LL band)
  //   ~ 2^-10 + 2^-11 - 2^-15 - 2^-18                               = 0.00143051
  localparam coef_t COEF_T = {dig(1'b0, -10), dig(1'b0, -11), dig(1'b1, -15), dig(1'b1, -18)};
  // U = alpha^2 beta^2 gamma^2 delta = 0.0024414 (HL and LH bands)
  //   = 2^-9 + 2^-11                                                 = 0.00244141
  localparam coef_t COEF_U = {dig(1'b0, -9), dig(1'b0, -11), NODIG, NODIG};
  // R = (alpha beta gamma / zeta)^2 = 0.004165267 (HH band)
  //   ~ 2^-8 + 2^-12 + 2^-16 - 2^-21                                 = 0.00416565
  localparam coef_t COEF_R = {dig(1'b0, -8), dig(1'b0, -12), dig(1'b0, -16), dig(1'b1, -21)};

  // Subbands; the first letter is the horizontal band, the second the vertical.
  typedef enum logic [1:0] {
    BAND_LL = 2'd0,
    BAND_HL = 2'd1,
    BAND_LH = 2'd2,
    BAND_HH = 2'd3
  } band_t;

  // Value of x * 2^e with arithmetic shifting (floor for e < 0).
  function automatic word_t shift_pow2(input word_t x, input logic signed [5:0] e);
    if (e >= 0) return x <<< e;
    else        return x >>> (-e);
  endfunction

endpackage
