// spiral_harness: trains and tests one fcmac configuration on the two-spiral
// problem and reports its classification rates.
//
// It generates training set A (97 points per spiral, 194 in all) and test set
// B (385 per spiral, 770 in all), inputs scaled from [-6.5, 6.5] to 16 bits.
// With UNIFORM = 0 it loads clusters formed as equal-count intervals of the
// training inputs of each dimension (narrow where the spiral points crowd
// together); with UNIFORM = 1 it keeps the evenly spaced boundaries the
// quantizers hold after reset, which makes the network a conventional CMAC.
// It trains EPOCHS passes over set A, recalls A and B, and compares every
// output with its own model of the network. Results appear on its ports when
// done rises.
module spiral_harness #(
  parameter int unsigned NC_I    = 28,
  parameter int unsigned NC_J    = 27,
  parameter bit          UNIFORM = 1'b0,
  parameter int          EPOCHS  = 40
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   ok_a,
  output int   ok_b
);
  import fcmac_pkg::*;
  localparam int unsigned XW = XW_DEF, WW = WW_DEF;
  localparam int unsigned K = K_DEF, LR_SHIFT = LR_SHIFT_DEF, FRAC = FRAC_DEF;
  localparam int unsigned AW_I = $clog2(NC_I + K - 1), AW_J = $clog2(NC_J + K - 1);
  localparam int unsigned AW = AW_I + AW_J;
  localparam int unsigned SW = WW + $clog2(K);
  localparam int unsigned CAW = $clog2(((NC_I > NC_J) ? NC_I : NC_J) - 1);
  localparam int unsigned NA = 194, NBS = 770;

  logic rst_n = 0;
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

  fcmac #(.NC_I(NC_I), .NC_J(NC_J)) dut (.*);

  int unsigned ax [NA], ay [NA], bx [NBS], by [NBS];
  bit acl [NA], bcl [NBS];
  int unsigned mb_i [NC_I-1], mb_j [NC_J-1];
  int mw [2**AW];

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

  task automatic make_clusters(bit dim, int nc);
    int unsigned v [NA];
    int unsigned t;
    int p;
    for (int i = 0; i < NA; i++) v[i] = dim ? ay[i] : ax[i];
    for (int i = 0; i < NA; i++)
      for (int j = i + 1; j < NA; j++)
        if (v[j] < v[i]) begin t = v[i]; v[i] = v[j]; v[j] = t; end
    for (int b = 0; b < nc - 1; b++) begin
      if (UNIFORM) t = ((b + 1) * 65536) / nc;
      else begin
        p = ((b + 1) * NA) / nc;
        t = (v[p-1] + v[p] + 1) / 2;
      end
      if (!dim) mb_i[b] = t; else mb_j[b] = t;
    end
  endtask

  task automatic load_clusters();
    for (int b = 0; b < NC_I - 1; b++) begin
      @(negedge clk);
      clu_we = 1; clu_dim = 0; clu_addr = CAW'(b); clu_data = XW'(mb_i[b]);
    end
    for (int b = 0; b < NC_J - 1; b++) begin
      @(negedge clk);
      clu_we = 1; clu_dim = 1; clu_addr = CAW'(b); clu_data = XW'(mb_j[b]);
    end
    @(negedge clk);
    clu_we = 0;
  endtask

  task automatic run(int unsigned xi, int unsigned xj, bit train, int target, output bit cls);
    int y_ref;
    @(negedge clk);
    in_valid = 1; in_xi = XW'(xi); in_xj = XW'(xj); in_train = train; in_target = WW'(target);
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    y_ref = model_step(xi, xj, train, target);
    while (!out_valid) @(negedge clk);
    checks++;
    if (out_y !== SW'(y_ref) || out_class !== (y_ref >= (1 << (FRAC - 1)))) failures++;
    cls = out_class;
  endtask

  initial begin
    bit c;
    done = 0; checks = 0; failures = 0; ok_a = 0; ok_b = 0;
    make_spirals();
    make_clusters(0, NC_I);
    make_clusters(1, NC_J);
    for (int a = 0; a < 2**AW; a++) mw[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (!UNIFORM) load_clusters();
    for (int ep = 0; ep < EPOCHS; ep++)
      for (int i = 0; i < NA; i++) run(ax[i], ay[i], 1, acl[i] ? (1 << FRAC) : 0, c);
    for (int i = 0; i < NA; i++) begin run(ax[i], ay[i], 0, 0, c); ok_a += int'(c == acl[i]); end
    for (int i = 0; i < NBS; i++) begin run(bx[i], by[i], 0, 0, c); ok_b += int'(c == bcl[i]); end
    done = 1;
  end
endmodule
