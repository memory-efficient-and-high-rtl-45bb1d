// ll_mem - LL band memory (MEM) of the multi-level system.
//
// Holds the scaled LL band of one decomposition level, at most (MAXN/2)^2
// words, so that the next level can read it back in raster order. One write
// port and one read port; the read is synchronous (rdata is valid one clock
// after raddr). Written as an array so that synthesis maps it to a RAM.
module ll_mem
  import dwt_pkg::*;
#(
  parameter int DEPTH = (MAXN / 2) * (MAXN / 2),
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] raddr,
  output word_t         rdata
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
