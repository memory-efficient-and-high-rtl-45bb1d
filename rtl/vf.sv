// vf - vertical filter (VF): column-wise modified 9/7 lifting.
//
// Input is the O2 stream of the horizontal filter: per row, H2(r,0), L2(r,0),
// H2(r,1), L2(r,1), ... one sample per clock. Column lifting needs three rows
// at once, so the input runs through a tapped line buffer of 3N+1 samples
// (three long-delay units of N samples plus one register). Per pair of rows
// the two PEs each produce 2N results, one per clock:
//   O3 (Data-out 3), PE(A/B): HH1(i,0) HL1(i,0) .. HH1(i,N/2-1) HL1(i,N/2-1)
//                             LH1(i,0) LL1(i,0) .. LH1(i,N/2-1) LL1(i,N/2-1)
//   O4 (Data-out 4), PE(C/D): HH2, HL2, ..., LH2, LL2 in the same order.
// using, for a column of H2 values (the L2 columns work alike):
//   HH1(i) = A*H2(2i+1) + H2(2i) + H2(2i+2)   HL1(i) = B*H2(2i) + HH1(i) + HH1(i-1)
//   HH2(i) = C*HH1(i) + HL1(i) + HL1(i+1)     HL2(i) = D*HL1(i) + HH2(i) + HH2(i-1)
// O3 is delayed by two long delays plus one register (2N+1) and O4 by two long
// delays (2N) to provide the previous and next row-pair results; the select
// logic (S3, S4, S5) picks the taps. O4 results carry their subband and their
// (row, column) inside the subband.
//
// Timing, counted from the clock at which H2(0,0) arrives with in_sof = 1:
// HH1(0,0) leaves O3 2N+1 clocks later and HH2(0,0) leaves O4 4N+3 clocks
// later. For 8x8 and the HF in front this is clock 24 and clock 42 after
// x(0,0), as in the design's data-flow table. Frames may follow back to back.
//
// Own choices: symmetric extension at the top and bottom row pairs
// (H2(N) = H2(N-2), HH1(-1) = HH1(0), HL1(N/2) = HL1(N/2-1), HH2(-1) = HH2(0));
// the line buffers are sized for MAXN and read at taps set by log2n.
module vf
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  log2n_t log2n,
  input  logic   in_sof,
  input  word_t  in_data,
  output logic   o3_valid,
  output word_t  o3_data,
  output logic   o4_valid,
  output logic   o4_sof,
  output logic   o4_last,   // last result of a frame (LL2 of the last row pair)
  output band_t  o4_band,
  output coord_t o4_row,
  output coord_t o4_col,
  output word_t  o4_data
);
  localparam int VD  = 3 * MAXN + 1;  // input line buffer
  localparam int O3D = 2 * MAXN + 1;  // O3 feedback
  localparam int O4D = 2 * MAXN;      // O4 feedback
  localparam int SD  = 4 * MAXN + 2;  // frame-start delay

  logic [VD-1:0][DW-1:0]  vdly;
  logic [O3D-1:0][DW-1:0] o3dly;
  logic [O4D-1:0][DW-1:0] o4dly;
  logic [SD-1:0]          sofdly;

  delay_line #(.W(DW), .DEPTH(VD))  u_vdly  (.clk(clk), .din(in_data), .tap(vdly));
  delay_line #(.W(DW), .DEPTH(O3D)) u_o3dly (.clk(clk), .din(o3_data), .tap(o3dly));
  delay_line #(.W(DW), .DEPTH(O4D)) u_o4dly (.clk(clk), .din(o4_data), .tap(o4dly));

  int n;
  always_comb n = 1 << log2n;

  // Frame-start delay. A start flag is dropped once it has passed the last tap
  // used at the current frame side, so a flag left over from a frame of
  // another side can never start a timer. Reset, so no false start appears.
  logic [SD-1:0] sofmask;
  always_comb sofmask = SD'((64'd1 << (4 * n + 1)) - 64'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sofdly <= '0;
    else        sofdly <= {sofdly[SD-2:0], in_sof} & sofmask;
  end

  // Sample delayed by k clocks (k = 0: the input itself).
  function automatic word_t vt(input int k);
    return (k == 0) ? in_data : word_t'(vdly[k-1]);
  endfunction
  function automatic word_t o3t(input int k);
    return (k == 0) ? o3_data : word_t'(o3dly[k-1]);
  endfunction
  function automatic word_t o4t(input int k);
    return (k == 0) ? o4_data : word_t'(o4dly[k-1]);
  endfunction

  // --- slot timers: s3 = 0 when HH1(0,0) is computed (2N after in_sof),
  //     s4 = 0 when HH2(0,0) is computed (4N+2 after in_sof).
  slot_t s3, s4, last_slot;
  logic  act3, act4, start3, start4;

  always_comb begin
    last_slot = slot_t'((1 << (2 * log2n)) - 1);
    start3    = sofdly[2 * n - 2];
    start4    = sofdly[4 * n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3 <= '0; s4 <= '0; act3 <= 1'b0; act4 <= 1'b0;
    end else begin
      if (start3) begin
        s3 <= '0; act3 <= 1'b1;
      end else if (act3) begin
        s3 <= s3 + 1'b1;
        if (s3 == last_slot) act3 <= 1'b0;
      end
      if (start4) begin
        s4 <= '0; act4 <= 1'b1;
      end else if (act4) begin
        s4 <= s4 + 1'b1;
        if (s4 == last_slot) act4 <= 1'b0;
      end
    end
  end

  // Slot decode: row pair i = s / 2N, k = s mod 2N; k < N: H columns.
  typedef struct packed {
    logic   upd;      // 0: predict (H1/H2 step), 1: update (L1/L2 step)
    logic   hcol;     // column group of the horizontal high band
    logic   first;    // first row pair
    logic   last;     // last row pair
    coord_t i;
    coord_t j;
  } slot_info_t;

  function automatic slot_info_t decode(input slot_t s, input log2n_t l2);
    slot_info_t d;
    slot_t k, i;
    k       = s & slot_t'((2 << l2) - 1);
    i       = s >> (l2 + 1);
    d.upd   = s[0];
    d.hcol  = k < slot_t'(1 << l2);
    d.j     = coord_t'((k & slot_t'((1 << l2) - 1)) >> 1);
    d.i     = coord_t'(i);
    d.first = i == '0;
    d.last  = i == slot_t'((1 << (l2 - 1)) - 1);
    return d;
  endfunction

  slot_info_t d3, d4;
  word_t a3, b3, c3, a4, b4, c4, pe3_out, pe4_out;

  always_comb begin
    d3 = decode(s3, log2n);
    d4 = decode(s4, log2n);
    // PE(A/B), S3/S5 select. L2 samples trail their H2 partners by one clock
    // but are used N clocks later, hence the taps N-1, 2N-1, 3N-1, 3N.
    if (!d3.upd) begin
      if (d3.hcol) begin     // HH1 = A*H2(2i+1) + H2(2i) + H2(2i+2)
        b3 = vt(n);
        a3 = vt(2 * n);
        c3 = d3.last ? vt(2 * n) : vt(0);
      end else begin         // LH1 = A*L2(2i+1) + L2(2i) + L2(2i+2)
        b3 = vt(2 * n - 1);
        a3 = vt(3 * n - 1);
        c3 = d3.last ? vt(3 * n - 1) : vt(n - 1);
      end
    end else begin           // HL1/LL1 = B*x(2i) + y1(i) + y1(i-1)
      b3 = d3.hcol ? vt(2 * n + 1) : vt(3 * n);
      a3 = o3_data;
      c3 = d3.first ? o3_data : o3t(2 * n);
    end
    // PE(C/D), S4 select.
    if (!d4.upd) begin       // HH2/LH2 = C*y1(i) + z1(i) + z1(i+1)
      b4 = o3t(2 * n + 1);
      a4 = o3t(2 * n);
      c4 = d4.last ? o3t(2 * n) : o3_data;
    end else begin           // HL2/LL2 = D*z1(i) + y2(i) + y2(i-1)
      b4 = o3t(2 * n + 1);
      a4 = o4_data;
      c4 = d4.first ? o4_data : o4t(2 * n);
    end
  end

  lift_pe #(.COEF0(COEF_A), .COEF1(COEF_B)) u_pe_ab (
    .data1(a3), .data2(b3), .data3(c3), .sel(d3.upd), .out(pe3_out)
  );
  lift_pe #(.COEF0(COEF_C), .COEF1(COEF_D)) u_pe_cd (
    .data1(a4), .data2(b4), .data3(c4), .sel(d4.upd), .out(pe4_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o3_valid <= 1'b0; o4_valid <= 1'b0; o4_sof <= 1'b0; o4_last <= 1'b0;
      o4_band  <= BAND_LL; o4_row <= '0; o4_col <= '0;
    end else begin
      o3_valid <= act3;
      o4_valid <= act4;
      o4_sof   <= act4 && s4 == '0;
      o4_last  <= act4 && s4 == last_slot;
      o4_band  <= d4.hcol ? (d4.upd ? BAND_HL : BAND_HH)
                          : (d4.upd ? BAND_LL : BAND_LH);
      o4_row   <= d4.i;
      o4_col   <= d4.j;
    end
  end

  always_ff @(posedge clk) begin
    o3_data <= pe3_out;
    o4_data <= pe4_out;
  end
endmodule
