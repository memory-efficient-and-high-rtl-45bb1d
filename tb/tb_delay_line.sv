// tb_delay_line - checks that tap k carries the input of k+1 clocks earlier.
module tb_delay_line;
  localparam int W = 16, DEPTH = 9;
  logic clk = 0;
  logic [W-1:0] din;
  logic [DEPTH-1:0][W-1:0] tap;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .din(din), .tap(tap));

  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (hist.size() >= DEPTH) begin
        for (int k = 0; k < DEPTH; k++) begin
          checks++;
          if (tap[k] !== hist[hist.size() - 1 - k]) begin
            failures++;
            if (failures < 10) $display("tap %0d got %h exp %h", k, tap[k], hist[hist.size()-1-k]);
          end
        end
      end
      din = W'($urandom);
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
