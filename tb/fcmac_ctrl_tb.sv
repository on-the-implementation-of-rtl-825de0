// fcmac_ctrl_tb: checks the schedule of the FCMAC sequencer.
//
// The tb plays the weight RAM: it drives a fresh random word on mem_rdata
// every cycle. It checks the clear sweep (2^AW write cycles, busy high,
// addresses 0 .. 2^AW-1), the layer order of the K reads, that exactly the
// K words present in the cycles after the reads are summed, the out_valid
// latency of K+2 edges after acceptance, the K training writes with the
// buffered weights in layer order, the time before the next acceptance for
// recall (K+3) and training (2K+3), and the one-cycle read-back.
module fcmac_ctrl_tb;
  import fcmac_pkg::*;
  localparam int unsigned WW = 16, K = 4, AW = 4, KW = $clog2(K);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_train = 0, in_ready, x_latch, rb_req = 0;
  logic mem_we, sel_clear, sel_rb, sum_clr, sum_en, out_valid, rb_valid, busy;
  logic [AW-1:0] clr_addr;
  logic [KW-1:0] k;
  logic signed [WW-1:0] mem_rdata = '0, w_old;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int cyc = 0;

  fcmac_ctrl #(.WW(WW), .K(K), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // One sample; returns nothing, checks everything.
  task automatic sample(bit train);
    int n, nread, nwrite;
    logic signed [WW-1:0] got [K];
    int reads_k [K];
    // offer the sample
    @(negedge clk);
    chk(in_ready, "ready in idle");
    in_valid = 1; in_train = train;
    #1 chk(x_latch && sum_clr, "latch and clear sum on accept");
    @(negedge clk);
    n = 1;
    in_valid = 0;
    nread = 0;
    // READ: K issues, K sums
    for (int c = 0; c <= K; c++) begin
      chk(state == ST_READ && !in_ready, "in READ, not ready");
      if (c < K) chk(k == KW'(c), $sformatf("read layer %0d", c));
      chk(sum_en == (c != 0), "sum enable");
      chk(!mem_we, "no write while reading");
      mem_rdata = WW'($urandom);
      if (c > 0) got[c-1] = mem_rdata;
      @(negedge clk);
      n++;
    end
    // DONE
    chk(out_valid && n == K + 2, $sformatf("out_valid sampled %0d edges after accept", n));
    @(negedge clk);
    n++;
    if (train) begin
      nwrite = 0;
      for (int c = 0; c < K; c++) begin
        chk(state == ST_UPDATE && mem_we && !sel_clear, "update write");
        chk(k == KW'(c), "update layer order");
        chk(w_old == got[c], $sformatf("buffered weight %0d", c));
        @(negedge clk);
        n++;
      end
    end
    chk(in_ready, "ready again");
    chk(n == (train ? 2*K + 3 : K + 3), $sformatf("next accept at edge %0d", n));
  endtask

  initial begin
    int nclr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nclr = 0;
    while (busy) begin
      chk(mem_we && sel_clear && clr_addr == AW'(nclr) && !in_ready, "clear sweep");
      nclr++;
      @(negedge clk);
    end
    chk(nclr == 2**AW, "clear length");
    for (int i = 0; i < 20; i++) sample(i[0]);
    // read-back
    @(negedge clk);
    rb_req = 1;
    #1 chk(sel_rb && !mem_we, "read-back selects address");
    @(negedge clk);
    rb_req = 0;
    chk(rb_valid, "read-back valid one cycle later");
    @(negedge clk);
    chk(!rb_valid, "read-back pulse");
    // a sample has priority over read-back
    rb_req = 1; in_valid = 1;
    #1 chk(!sel_rb && x_latch, "sample before read-back");
    @(negedge clk);
    rb_req = 0; in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
