// fcmac_table2_tb: the two-spiral benchmark at the network sizes of the
// recall-performance comparison: the fuzzy CMAC with 11x13, 17x20 and 28x27
// clusters, and the same hardware with evenly spaced boundaries (a
// conventional CMAC) at 12x12, 20x20 and 30x30 cells. Each configuration
// runs in its own spiral_harness, which checks every network output against
// a model; this tb collects the counts and prints the classification rates
// of training set A and test set B for each size.
module fcmac_table2_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic done [N];
  int chk [N], fail [N], oka [N], okb [N];

  spiral_harness #(.NC_I(11), .NC_J(13), .UNIFORM(0)) h0 (clk, done[0], chk[0], fail[0], oka[0], okb[0]);
  spiral_harness #(.NC_I(17), .NC_J(20), .UNIFORM(0)) h1 (clk, done[1], chk[1], fail[1], oka[1], okb[1]);
  spiral_harness #(.NC_I(28), .NC_J(27), .UNIFORM(0)) h2 (clk, done[2], chk[2], fail[2], oka[2], okb[2]);
  spiral_harness #(.NC_I(12), .NC_J(12), .UNIFORM(1)) h3 (clk, done[3], chk[3], fail[3], oka[3], okb[3]);
  spiral_harness #(.NC_I(20), .NC_J(20), .UNIFORM(1)) h4 (clk, done[4], chk[4], fail[4], oka[4], okb[4]);
  spiral_harness #(.NC_I(30), .NC_J(30), .UNIFORM(1)) h5 (clk, done[5], chk[5], fail[5], oka[5], okb[5]);

  string names [N] = '{"FCMAC 11x13", "FCMAC 17x20", "FCMAC 28x27",
                       "CMAC 12x12", "CMAC 20x20", "CMAC 30x30"};
  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < N; i++) begin
      $display("%-12s  set A %3d/194 (%5.2f%%)  set B %3d/770 (%5.2f%%)  output mismatches %0d of %0d",
               names[i], oka[i], 100.0 * oka[i] / 194, okb[i], 100.0 * okb[i] / 770, fail[i], chk[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
