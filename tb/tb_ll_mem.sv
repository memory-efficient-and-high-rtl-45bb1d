// tb_ll_mem - writes random words to every address in random order of
// operations and checks the synchronous read (data one clock after address).
module tb_ll_mem;
  import dwt_pkg::*;
  localparam int DEPTH = 16, AW = 4;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  word_t wdata, rdata;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  ll_mem #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] last_ra;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = word_t'({$urandom, $urandom});
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    last_ra = '0; raddr = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (rdata !== model[last_ra]) begin
          failures++;
          if (failures < 10) $display("addr %0d got %h exp %h", last_ra, rdata, model[last_ra]);
        end
      end
      // next: random write to an address other than the one being read
      raddr = AW'($urandom); last_ra = raddr;
      we = $urandom_range(0, 1);
      waddr = AW'(raddr + 1 + $urandom_range(0, DEPTH - 2));
      wdata = word_t'({$urandom, $urandom});
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
