// weight_mem_tb: writes the whole table with random words, then reads it in a
// random order and checks each word one cycle after its address, and that a
// write cycle leaves the read register unchanged.
module weight_mem_tb;
  localparam int unsigned WW = 16, AW = 10;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic signed [WW-1:0] wdata = '0, rdata;
  logic signed [WW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  weight_mem #(.WW(WW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [WW-1:0] held;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; addr = AW'(a); wdata = WW'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      addr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("addr=%0d rdata=%0d expected %0d", addr, rdata, model[addr]);
      end
    end
    // A write does not disturb the last read word.
    held = rdata;
    we = 1; addr = 5; wdata = 16'sh1234; model[5] = wdata;
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== held) failures++;
    @(negedge clk);
    checks++;
    if (rdata !== 16'sh1234) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
