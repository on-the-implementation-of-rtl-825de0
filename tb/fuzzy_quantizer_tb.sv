// fuzzy_quantizer_tb: checks the cluster indexing of one input dimension.
//
// First with the reset boundaries (evenly spaced, so the index must equal
// floor(x * NC / 2^XW) up to the rounding of the boundaries, which the
// reference computes on its own), then with a random ascending set of
// boundaries loaded through the write port, probing each boundary and its
// neighbours as well as random inputs. The reference index is found by a
// linear search over the tb's own copy of the boundaries.
module fuzzy_quantizer_tb;
  localparam int unsigned XW = 16;
  localparam int unsigned NC = 28;
  localparam int unsigned NB = NC - 1;
  localparam int unsigned BAW = $clog2(NB);
  localparam int unsigned QW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic bnd_we = 0;
  logic [BAW-1:0] bnd_addr = '0;
  logic [XW-1:0] bnd_data = '0, x = '0;
  logic [QW-1:0] q;
  int checks = 0, failures = 0;
  int unsigned ref_bnd [NB];

  fuzzy_quantizer #(.XW(XW), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_q(int unsigned xv);
    int unsigned c = 0;
    for (int b = 0; b < NB; b++) if (xv >= ref_bnd[b]) c++;
    return c;
  endfunction

  task automatic probe(int unsigned xv);
    x = XW'(xv);
    #1;
    checks++;
    if (q !== QW'(ref_q(xv))) begin
      failures++;
      if (failures < 10) $display("x=%0d q=%0d expected %0d", xv, q, ref_q(xv));
    end
  endtask

  initial begin
    int unsigned v, span;
    for (int b = 0; b < NB; b++) ref_bnd[b] = ((b + 1) * 65536) / NC;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Reset boundaries: even spacing, and uniform quantization agrees.
    for (int i = 0; i < 400; i++) begin
      v = $urandom_range(65535);
      probe(v);
      checks++;
      if (q !== QW'((v * NC) >> 16) && q !== QW'(((v * NC) >> 16) + 1)) failures++;
    end
    probe(0);
    probe(65535);
    // Load uneven boundaries: dense in the middle, sparse at the ends.
    v = 0;
    for (int b = 0; b < NB; b++) begin
      span = (b < 6 || b > NB - 7) ? $urandom_range(3500, 2000) : $urandom_range(1000, 300);
      v += span;
      ref_bnd[b] = v;
    end
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      bnd_we = 1; bnd_addr = BAW'(b); bnd_data = XW'(ref_bnd[b]);
    end
    @(negedge clk);
    bnd_we = 0;
    for (int b = 0; b < NB; b++) begin
      probe(ref_bnd[b]);
      probe(ref_bnd[b] - 1);
      probe(ref_bnd[b] + 1);
    end
    for (int i = 0; i < 400; i++) probe($urandom_range(65535));
    probe(0);
    probe(65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
