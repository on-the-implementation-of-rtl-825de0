// output_summer_tb: sums groups of K random weights, including the extreme
// values, and compares with an integer sum; also checks clear and hold.
module output_summer_tb;
  localparam int unsigned WW = 16, K = 4;
  localparam int unsigned SW = WW + $clog2(K);
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [WW-1:0] din = '0;
  logic signed [SW-1:0] y;
  int checks = 0, failures = 0;

  output_summer #(.WW(WW), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    int v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 500; g++) begin
      @(negedge clk);
      clr = 1; en = 0;
      @(negedge clk);
      clr = 0;
      checks++;
      if (y !== '0) failures++;
      s = 0;
      for (int kk = 0; kk < K; kk++) begin
        case (g)
          0: v = 32767;
          1: v = -32768;
          default: v = int'($urandom_range(65535)) - 32768;
        endcase
        din = WW'(v); en = 1;
        s += v;
        @(negedge clk);
      end
      en = 0;
      din = 16'sh7fff;
      @(negedge clk);
      checks++;
      if (y !== SW'(s)) begin
        failures++;
        if (failures < 10) $display("group %0d: y=%0d expected %0d", g, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
