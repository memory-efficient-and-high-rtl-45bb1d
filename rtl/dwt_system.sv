// dwt_system - multi-level 2-D 9/7 lifting DWT system (top level).
//
// An N x N frame of signed pixels (N = MAXN) enters in raster order, one pixel
// per clock. The 2-D DWT processor (HF -> VF -> SN) produces the HL, LH and HH
// subbands of level 0 directly; the LL band is written to MEM and, through
// the input select S1, fed back into the same processor as an (N/2) x (N/2)
// frame for the next level, and so on for num_levels levels. Only the LL band
// of the last level is output; all other LL bands stay internal.
//
// Interface: pixels are IN_W-bit two's complement values and are placed in
// the datapath word with FRAC fractional bits. When in_ready is high the
// source may assert pix_sof with the first pixel and must then deliver the
// other N*N-1 pixels in the following clocks without gaps. Coefficients leave
// on coef_* with their level (0 = first), subband and position, DW bits with
// FRAC fractional bits. frame_done marks the last coefficient of a frame.
// The intermediate streams Data-out 1..4 of the filters are also brought out
// (Data-out 4 before scaling).
//
// Timing: for one level of an 8x8 frame the first coefficient leaves 43
// clocks after the first pixel and the last 106 clocks after it.
// Single-level frames can follow each other without a gap (every PE busy in
// every clock); a multi-level frame runs its levels one after another.
module dwt_system
  import dwt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  log2n_t                 num_levels,
  input  logic                   pix_sof,
  input  logic signed [IN_W-1:0] pix_data,
  output logic                   in_ready,
  output logic                   coef_valid,
  output log2n_t                 coef_level,
  output band_t                  coef_band,
  output coord_t                 coef_row,
  output coord_t                 coef_col,
  output word_t                  coef_data,
  output logic                   frame_done,
  output logic                   dout1_valid,
  output word_t                  dout1_data,
  output logic                   dout2_valid,
  output word_t                  dout2_data,
  output logic                   dout3_valid,
  output word_t                  dout3_data,
  output logic                   dout4_valid,
  output word_t                  dout4_data
);
  localparam int AW = $clog2((MAXN / 2) * (MAXN / 2));

  log2n_t        log2n, level;
  logic          sel_mem, core_sof, keep, mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  word_t         mem_rdata, core_in, pix_word;

  logic          out_valid, out_sof, out_last;
  band_t         out_band;
  coord_t        out_row, out_col;
  word_t         out_data;

  // Input select S1: external pixel or LL coefficient from MEM.
  always_comb begin
    pix_word = word_t'(pix_data) <<< FRAC;
    core_in  = sel_mem ? mem_rdata : pix_word;
  end

  dwt_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .in_sof(pix_sof), .num_levels, .in_ready,
    .log2n, .level, .sel_mem, .core_sof,
    .out_valid, .out_last, .out_band, .out_row, .out_col,
    .keep, .frame_done, .mem_we, .mem_waddr, .mem_raddr
  );

  dwt_core u_core (
    .clk, .rst_n, .log2n, .in_sof(core_sof), .in_data(core_in),
    .o1_valid(dout1_valid), .o1_data(dout1_data),
    .o2_valid(dout2_valid), .o2_data(dout2_data),
    .o3_valid(dout3_valid), .o3_data(dout3_data),
    .o4_valid(dout4_valid), .o4_data(dout4_data),
    .out_valid, .out_sof, .out_last, .out_band, .out_row, .out_col, .out_data
  );

  ll_mem #(.DEPTH((MAXN / 2) * (MAXN / 2)), .AW(AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(out_data),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  always_comb begin
    coef_valid = keep;
    coef_level = level;
    coef_band  = out_band;
    coef_row   = out_row;
    coef_col   = out_col;
    coef_data  = out_data;
  end

  // The frame-start flag of the coefficient stream is not needed here.
  logic unused;
  assign unused = out_sof;
endmodule
