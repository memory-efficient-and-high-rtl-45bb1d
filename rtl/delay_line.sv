// delay_line - tapped shift register: the delay units of the filters.
//
// tap[k] is the input delayed by k+1 clock cycles, k = 0..DEPTH-1. A run of
// single registers forms the short delays ("L" units); a run of N registers is
// one long delay ("LD" unit), i.e. one line of the interleaved H/L stream. The
// filters read the taps they need, so one delay_line stands for a chain of
// L or LD units. Samples move every clock (the pipeline never stalls); there is
// no reset, as every tap is written before it is read.
module delay_line #(
  parameter int W     = 40,
  parameter int DEPTH = 3
) (
  input  logic                    clk,
  input  logic [W-1:0]            din,
  output logic [DEPTH-1:0][W-1:0] tap
);
  always_ff @(posedge clk) begin
    tap[0] <= din;
    for (int k = 1; k < DEPTH; k++) tap[k] <= tap[k-1];
  end
endmodule
