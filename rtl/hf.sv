// hf - horizontal filter (HF): row-wise modified 9/7 lifting.
//
// Takes one sample per clock, rows back to back in raster order, and produces
// two output streams with one result per clock:
//   O1 (Data-out 1), from PE(A/B):  H1(i,0), L1(i,0), H1(i,1), L1(i,1), ...
//   O2 (Data-out 2), from PE(C/D):  H2(i,0), L2(i,0), H2(i,1), L2(i,1), ...
// with
//   H1(j) = A*x(2j+1) + x(2j)  + x(2j+2)     L1(j) = B*x(2j) + H1(j) + H1(j-1)
//   H2(j) = C*H1(j)   + L1(j)  + L1(j+1)     L2(j) = D*L1(j) + H2(j) + H2(j-1)
// Each PE alternates between its two coefficients (select S0) every clock, so
// both are busy in every cycle. Operands come from three input delays, three
// delays on O1 and two on O2; the select logic (S1/S2) picks the taps.
//
// Timing, counted from the cycle that carries x(0,0) with in_sof = 1:
// H1(0,0) leaves O1 at clock 3 and H2(0,0) leaves O2 at clock 7; row i starts
// N*i clocks later, as in the design's data-flow table. A frame is exactly N*N
// consecutive samples; the next frame may follow at once.
//
// Own choices: row ends use symmetric extension (x(N) = x(N-2), H1(-1) = H1(0),
// L1(N/2) = L1(N/2-1), H2(-1) = H2(0)); the frame side N = 2^log2n is set at
// run time (2..MAXN) and must stay constant while a frame is in the filter.
module hf
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  log2n_t log2n,
  input  logic   in_sof,    // first sample of a frame
  input  word_t  in_data,
  output logic   o1_valid,
  output logic   o1_sof,
  output word_t  o1_data,
  output logic   o2_valid,
  output logic   o2_sof,
  output word_t  o2_data
);
  // --- delay units --------------------------------------------------------
  logic [2:0][DW-1:0] xt;    // x delayed 1..3
  logic [2:0][DW-1:0] o1t;   // O1 delayed 1..3 (O1 register is tap 0)
  logic [1:0][DW-1:0] o2t;   // O2 delayed 1..2

  delay_line #(.W(DW), .DEPTH(3)) u_xdly  (.clk(clk), .din(in_data), .tap(xt));
  delay_line #(.W(DW), .DEPTH(3)) u_o1dly (.clk(clk), .din(o1_data), .tap(o1t));
  delay_line #(.W(DW), .DEPTH(2)) u_o2dly (.clk(clk), .din(o2_data), .tap(o2t));

  // --- slot timers ----------------------------------------------------------
  // s1 = 0 in the cycle PE(A/B) computes H1(0,0) (clock 2),
  // s2 = 0 in the cycle PE(C/D) computes H2(0,0) (clock 6).
  logic [4:0] sof_q;
  slot_t      s1, s2;
  logic       act1, act2;
  slot_t      last_slot;

  assign last_slot = slot_t'((1 << (2 * log2n)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sof_q <= '0;
      s1    <= '0;
      s2    <= '0;
      act1  <= 1'b0;
      act2  <= 1'b0;
    end else begin
      sof_q <= {sof_q[3:0], in_sof};
      if (sof_q[0]) begin
        s1 <= '0; act1 <= 1'b1;
      end else if (act1) begin
        s1 <= s1 + 1'b1;
        if (s1 == last_slot) act1 <= 1'b0;
      end
      if (sof_q[4]) begin
        s2 <= '0; act2 <= 1'b1;
      end else if (act2) begin
        s2 <= s2 + 1'b1;
        if (s2 == last_slot) act2 <= 1'b0;
      end
    end
  end

  // --- operand selection (S0, S1, S2) -------------------------------------
  logic   ph1, ph2;              // 0: predict (H), 1: update (L)
  logic   first1, last1, first2, last2;
  word_t  a1, b1, c1, a2, b2, c2;
  word_t  pe1_out, pe2_out;
  slot_t  colmask, lastpair;

  always_comb begin
    colmask  = slot_t'((1 << log2n) - 1);
    lastpair = slot_t'((1 << (log2n - 1)) - 1);
    ph1    = s1[0];
    ph2    = s2[0];
    first1 = ((s1 & colmask) >> 1) == '0;
    last1  = ((s1 & colmask) >> 1) == lastpair;
    first2 = ((s2 & colmask) >> 1) == '0;
    last2  = ((s2 & colmask) >> 1) == lastpair;
    if (!ph1) begin          // H1(j) = A*x(2j+1) + x(2j) + x(2j+2)
      b1 = xt[0];
      a1 = xt[1];
      c1 = last1 ? xt[1] : in_data;
    end else begin           // L1(j) = B*x(2j) + H1(j) + H1(j-1)
      b1 = xt[2];
      a1 = o1_data;
      c1 = first1 ? o1_data : o1t[1];
    end
    if (!ph2) begin          // H2(j) = C*H1(j) + L1(j) + L1(j+1)
      b2 = o1t[2];
      a2 = o1t[1];
      c2 = last2 ? o1t[1] : o1_data;
    end else begin           // L2(j) = D*L1(j) + H2(j) + H2(j-1)
      b2 = o1t[2];
      a2 = o2_data;
      c2 = first2 ? o2_data : o2t[1];
    end
  end

  lift_pe #(.COEF0(COEF_A), .COEF1(COEF_B)) u_pe_ab (
    .data1(a1), .data2(b1), .data3(c1), .sel(ph1), .out(pe1_out)
  );
  lift_pe #(.COEF0(COEF_C), .COEF1(COEF_D)) u_pe_cd (
    .data1(a2), .data2(b2), .data3(c2), .sel(ph2), .out(pe2_out)
  );

  // --- output registers (the L after each PE) ------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_valid <= 1'b0; o1_sof <= 1'b0;
      o2_valid <= 1'b0; o2_sof <= 1'b0;
    end else begin
      o1_valid <= act1; o1_sof <= act1 && s1 == '0;
      o2_valid <= act2; o2_sof <= act2 && s2 == '0;
    end
  end

  always_ff @(posedge clk) begin
    o1_data <= pe1_out;
    o2_data <= pe2_out;
  end

  // A new frame may not start before the previous one has entered completely.
  property p_frame_spacing;
    @(posedge clk) disable iff (!rst_n) sof_q[0] |-> (!act1 || s1 == last_slot);
  endproperty
  a_frame_spacing: assert property (p_frame_spacing)
    else $error("hf: frame started before the previous frame was complete");
endmodule
