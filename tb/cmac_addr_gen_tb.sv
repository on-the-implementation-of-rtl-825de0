// cmac_addr_gen_tb: exhaustive check of the winning-neuron addresses.
//
// For every cluster pair and layer the address must be the row q_i + k and
// column q_j + k of a table whose rows are 2^AW_J words apart, computed here
// by arithmetic instead of by concatenation. It also checks that the largest
// index stays within R' = R + K - 1.
module cmac_addr_gen_tb;
  localparam int unsigned NC_I = 28, NC_J = 27, K = 4;
  localparam int unsigned QW_I = $clog2(NC_I), QW_J = $clog2(NC_J);
  localparam int unsigned AW_I = $clog2(NC_I + K - 1), AW_J = $clog2(NC_J + K - 1);
  localparam int unsigned KW = $clog2(K);

  logic [QW_I-1:0] q_i;
  logic [QW_J-1:0] q_j;
  logic [KW-1:0] k;
  logic [AW_I+AW_J-1:0] addr;
  int checks = 0, failures = 0;
  logic clk = 0;

  cmac_addr_gen #(.NC_I(NC_I), .NC_J(NC_J), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned row, col, expect_addr;
    for (int i = 0; i < NC_I; i++)
      for (int j = 0; j < NC_J; j++)
        for (int kk = 0; kk < K; kk++) begin
          q_i = QW_I'(i); q_j = QW_J'(j); k = KW'(kk);
          #1;
          row = i + kk + 0;
          col = j + kk;
          expect_addr = row * (1 << AW_J) + col;
          checks++;
          if (addr !== (AW_I+AW_J)'(expect_addr) || row > NC_I + K - 2 || col > NC_J + K - 2) begin
            failures++;
            if (failures < 10) $display("q=(%0d,%0d) k=%0d addr=%0h expected %0h", i, j, kk, addr, expect_addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
