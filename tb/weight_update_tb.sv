// weight_update_tb: compares the adjusted weight with a reference computed in
// real arithmetic, w + floor((d - y) / 2^LR_SHIFT) clipped to the word range,
// for random and for extreme operands, and checks the saturation flag.
module weight_update_tb;
  localparam int unsigned WW = 16, K = 4, LR_SHIFT = 3;
  localparam int unsigned SW = WW + $clog2(K);
  logic signed [SW-1:0] y;
  logic signed [WW-1:0] target, w, w_new;
  logic sat;
  int checks = 0, failures = 0, nsat = 0;
  logic clk = 0;

  weight_update #(.WW(WW), .K(K), .LR_SHIFT(LR_SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int yv, int tv, int wv);
    real r;
    int e;
    bit es;
    y = SW'(yv); target = WW'(tv); w = WW'(wv);
    #1;
    r = $floor(real'(tv - yv) / real'(1 << LR_SHIFT));
    e = wv + int'(r);
    es = 0;
    if (e > 32767) begin e = 32767; es = 1; end
    if (e < -32768) begin e = -32768; es = 1; end
    nsat += es;
    checks++;
    if (w_new !== WW'(e) || sat !== es) begin
      failures++;
      if (failures < 10) $display("y=%0d d=%0d w=%0d -> %0d sat=%0b, expected %0d sat=%0b", yv, tv, wv, w_new, sat, e, es);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++)
      one(int'($urandom_range(262143)) - 131072, int'($urandom_range(65535)) - 32768,
          int'($urandom_range(65535)) - 32768);
    for (int i = 0; i < 2000; i++)
      one(int'($urandom_range(8191)) - 2048, int'($urandom_range(1)) * 4096,
          int'($urandom_range(4095)) - 1024);
    one(-131072, 32767, 32767);
    one(131071, -32768, -32768);
    one(0, 0, 0);
    one(1, 0, 0);
    one(-1, 0, 0);
    one(8, 0, 5);
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
