// fcmac_tb: end-to-end test of the Fuzzy CMAC on the two-spiral problem,
// with every parameter at its default (28 x 27 clusters, K = 4).
//
// The two intertwined spirals are generated here: 97 points per spiral for
// the training set A (194 points) and 385 per spiral for the test set B
// (770 points), inputs scaled from [-6.5, 6.5] to the 16-bit input range.
// In place of the separate clustering phase the tb forms the clusters of
// each input as equal-count intervals of the training inputs, so clusters are
// narrow where the spiral points are dense, and loads their boundaries.
//
// The tb keeps its own model of the network (boundaries, weight table,
// winner addresses, sum, shifted-error update with saturation) and compares
// every out_y and out_class with it. It trains on set A for a number of
// epochs, recalls sets A and B and reports the classification rates, then
// forces weight saturation by training two neighbouring inputs toward
// opposite extremes, and finally reads the whole weight table back and
// compares it with the model. It counts each mechanism (clear sweep,
// boundary load, training, recall, stall of the handshake, saturation,
// read-back) and fails if one never happened; it also checks the latency
// of K+2 edges from acceptance to out_valid.
module fcmac_tb;
  import fcmac_pkg::*;
  localparam int unsigned XW = XW_DEF, WW = WW_DEF, NC_I = NC_I_DEF, NC_J = NC_J_DEF;
  localparam int unsigned K = K_DEF, LR_SHIFT = LR_SHIFT_DEF, FRAC = FRAC_DEF;
  localparam int unsigned AW_I = $clog2(NC_I + K - 1), AW_J = $clog2(NC_J + K - 1);
  localparam int unsigned AW = AW_I + AW_J;
  localparam int unsigned SW = WW + $clog2(K);
  localparam int unsigned CAW = $clog2(((NC_I > NC_J) ? NC_I : NC_J) - 1);
  localparam int unsigned NA = 194, NBS = 770;
  localparam int EPOCHS = 40;

  logic clk = 0, rst_n = 0;
  logic clu_we = 0, clu_dim = 0;
  logic [CAW-1:0] clu_addr = '0;
  logic [XW-1:0] clu_data = '0;
  logic in_valid = 0, in_ready, in_train = 0;
  logic [XW-1:0] in_xi = '0, in_xj = '0;
  logic signed [WW-1:0] in_target = '0;
  logic out_valid, out_class;
  logic signed [SW-1:0] out_y;
  logic rb_req = 0, rb_valid;
  logic [AW-1:0] rb_addr = '0;
  logic signed [WW-1:0] rb_data;
  logic busy, sat;

  fcmac dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_train = 0, n_recall = 0, n_stall = 0, n_sat = 0, n_rb = 0;
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy && rst_n) n_clear++;
    if (in_valid && !in_ready && rst_n && !busy) n_stall++;
    if (sat) n_sat++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ data sets
  int unsigned ax [NA], ay [NA], bx [NBS], by [NBS];
  bit acl [NA], bcl [NBS];

  function automatic int unsigned to_u(real v);
    return int'((v + 6.5) / 13.0 * 65535.0);
  endfunction

  task automatic make_spirals();
    real ang, r;
    for (int i = 0; i < 97; i++) begin
      ang = i * 3.14159265358979 / 16.0;
      r = 6.5 * (104 - i) / 104.0;
      ax[2*i] = to_u(r * $sin(ang));      ay[2*i] = to_u(r * $cos(ang));      acl[2*i] = 1;
      ax[2*i+1] = to_u(-r * $sin(ang));   ay[2*i+1] = to_u(-r * $cos(ang));   acl[2*i+1] = 0;
    end
    for (int i = 0; i < 385; i++) begin
      ang = i * 3.14159265358979 / 64.0;
      r = 6.5 * (416 - i) / 416.0;
      bx[2*i] = to_u(r * $sin(ang));      by[2*i] = to_u(r * $cos(ang));      bcl[2*i] = 1;
      bx[2*i+1] = to_u(-r * $sin(ang));   by[2*i+1] = to_u(-r * $cos(ang));   bcl[2*i+1] = 0;
    end
  endtask

  // ---------------------------------------------------------- tb model
  int unsigned mb_i [NC_I-1], mb_j [NC_J-1];
  int mw [2**AW];

  function automatic int count_ge(int unsigned v, bit dim);
    int c = 0;
    if (!dim) begin for (int b = 0; b < NC_I-1; b++) if (v >= mb_i[b]) c++; end
    else      begin for (int b = 0; b < NC_J-1; b++) if (v >= mb_j[b]) c++; end
    return c;
  endfunction

  function automatic int model_step(int unsigned xi, int unsigned xj, bit train, int target);
    int qi, qj, y, e, a;
    qi = count_ge(xi, 0);
    qj = count_ge(xj, 1);
    y = 0;
    for (int k = 0; k < K; k++) y += mw[(qi + k) * (1 << AW_J) + (qj + k)];
    if (train)
      for (int k = 0; k < K; k++) begin
        a = (qi + k) * (1 << AW_J) + (qj + k);
        e = mw[a] + int'($floor(real'(target - y) / real'(1 << LR_SHIFT)));
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        mw[a] = e;
      end
    return y;
  endfunction

  // Equal-count boundaries: sort the training inputs of one dimension and put
  // boundary b halfway between the neighbours around position (b+1)*NA/NC.
  task automatic make_clusters(bit dim, int nc);
    int unsigned v [NA];
    int unsigned t;
    int p;
    for (int i = 0; i < NA; i++) v[i] = dim ? ay[i] : ax[i];
    for (int i = 0; i < NA; i++)
      for (int j = i + 1; j < NA; j++)
        if (v[j] < v[i]) begin t = v[i]; v[i] = v[j]; v[j] = t; end
    for (int b = 0; b < nc - 1; b++) begin
      p = ((b + 1) * NA) / nc;
      t = (v[p-1] + v[p] + 1) / 2;
      if (!dim) mb_i[b] = t; else mb_j[b] = t;
    end
  endtask

  task automatic load_clusters();
    for (int b = 0; b < NC_I - 1; b++) begin
      @(negedge clk);
      clu_we = 1; clu_dim = 0; clu_addr = CAW'(b); clu_data = XW'(mb_i[b]);
      n_load++;
    end
    for (int b = 0; b < NC_J - 1; b++) begin
      @(negedge clk);
      clu_we = 1; clu_dim = 1; clu_addr = CAW'(b); clu_data = XW'(mb_j[b]);
      n_load++;
    end
    @(negedge clk);
    clu_we = 0;
  endtask

  // One sample through the handshake; compares with the model; returns class.
  task automatic run(int unsigned xi, int unsigned xj, bit train, int target, output bit cls);
    int y_ref, t_acc;
    @(negedge clk);
    in_valid = 1; in_xi = XW'(xi); in_xj = XW'(xj); in_train = train; in_target = WW'(target);
    do @(posedge clk); while (!in_ready);
    t_acc = cyc;
    @(negedge clk);
    in_valid = 0;
    y_ref = model_step(xi, xj, train, target);
    while (!out_valid) @(negedge clk);
    checks++;
    if (out_y !== SW'(y_ref) || out_class !== (y_ref >= (1 << (FRAC - 1)))) begin
      failures++;
      if (failures < 10) $display("x=(%0d,%0d) y=%0d expected %0d", xi, xj, out_y, y_ref);
    end
    checks++;
    if (cyc - t_acc != K + 2) begin
      failures++;
      if (failures < 10) $display("latency %0d edges, expected %0d", cyc - t_acc, K + 2);
    end
    cls = out_class;
    if (train) n_train++; else n_recall++;
  endtask

  initial begin
    bit c;
    int ok_a, ok_b;
    make_spirals();
    make_clusters(0, NC_I);
    make_clusters(1, NC_J);
    for (int a = 0; a < 2**AW; a++) mw[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_clusters();
    // Training on set A.
    for (int ep = 0; ep < EPOCHS; ep++)
      for (int i = 0; i < NA; i++) run(ax[i], ay[i], 1, acl[i] ? (1 << FRAC) : 0, c);
    // Recall of sets A and B.
    ok_a = 0; ok_b = 0;
    for (int i = 0; i < NA; i++) begin run(ax[i], ay[i], 0, 0, c); ok_a += (c == acl[i]); end
    for (int i = 0; i < NBS; i++) begin run(bx[i], by[i], 0, 0, c); ok_b += (c == bcl[i]); end
    $display("recall after %0d epochs: set A %0d/%0d, set B %0d/%0d correct", EPOCHS, ok_a, NA, ok_b, NBS);
    // Drive two inputs one cluster apart toward opposite extremes.
    for (int r = 0; r < 40; r++) begin
      run(0, 0, 1, 32767, c);
      run(mb_i[0], mb_j[0], 1, -32768, c);
    end
    // Read the whole table back once the last update has finished.
    while (!in_ready) @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      rb_req = 1; rb_addr = AW'(a);
      @(negedge clk);
      rb_req = 0;
      checks++;
      if (!rb_valid || rb_data !== WW'(mw[a])) begin
        failures++;
        if (failures < 10) $display("read-back %0d: %0d expected %0d", a, rb_data, mw[a]);
      end
      n_rb++;
    end
    $display("mechanisms: clear=%0d load=%0d train=%0d recall=%0d stall=%0d saturate=%0d readback=%0d",
             n_clear, n_load, n_train, n_recall, n_stall, n_sat, n_rb);
    checks++; if (n_clear != 2**AW) failures++;
    checks++; if (n_load == 0) failures++;
    checks++; if (n_train == 0) failures++;
    checks++; if (n_recall == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_rb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
