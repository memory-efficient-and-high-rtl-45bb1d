// dwt_core - the 2-D DWT processor: HF -> VF -> SN.
//
// One level of the 2-D 9/7 lifting DWT of an N x N frame (N = 2^log2n, up to
// MAXN). Pixels enter in raster order, one per clock, with in_sof on the
// first; frames may follow back to back and all four PEs then work in every
// clock. Outputs are the scaled subband coefficients, one per clock, in the
// order HH, HL (alternating along the H columns), then LH, LL, for each pair
// of rows, tagged with subband, row and column inside the subband.
// The intermediate streams Data-out 1..4 are brought out as well.
//
// Latency from x(0,0): H1(0,0) at clock 3, H2(0,0) at 7, HH1(0,0) at 2N+8,
// HH2(0,0) at 4N+10, first scaled coefficient at 4N+11 (43 for 8x8). The last
// coefficient of a frame leaves at N*N+4N+10.
module dwt_core
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  log2n_t log2n,
  input  logic   in_sof,
  input  word_t  in_data,
  // intermediate streams
  output logic   o1_valid,
  output word_t  o1_data,
  output logic   o2_valid,
  output word_t  o2_data,
  output logic   o3_valid,
  output word_t  o3_data,
  output logic   o4_valid,
  output word_t  o4_data,
  // scaled subband coefficients
  output logic   out_valid,
  output logic   out_sof,
  output logic   out_last,
  output band_t  out_band,
  output coord_t out_row,
  output coord_t out_col,
  output word_t  out_data
);
  logic   o1_sof, o2_sof, o4_sof, o4_last;
  band_t  o4_band;
  coord_t o4_row, o4_col;

  hf u_hf (
    .clk, .rst_n, .log2n, .in_sof, .in_data,
    .o1_valid, .o1_sof, .o1_data, .o2_valid, .o2_sof, .o2_data
  );

  vf u_vf (
    .clk, .rst_n, .log2n, .in_sof(o2_sof), .in_data(o2_data),
    .o3_valid, .o3_data, .o4_valid, .o4_sof, .o4_last,
    .o4_band, .o4_row, .o4_col, .o4_data
  );

  sn u_sn (
    .clk, .rst_n, .in_valid(o4_valid), .in_sof(o4_sof), .in_last(o4_last),
    .in_band(o4_band), .in_row(o4_row), .in_col(o4_col), .in_data(o4_data),
    .out_valid, .out_sof, .out_last, .out_band, .out_row, .out_col, .out_data
  );

  // o1_sof is only used inside the HF timing; keep it visible for debug.
  logic unused_sof;
  assign unused_sof = o1_sof;
endmodule
