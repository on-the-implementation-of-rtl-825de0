// fcmac: Fuzzy CMAC, learning and recall phase, for two inputs.
//
// A CMAC is a look-up table with generalization: each input selects K weights
// (one winning neuron per layer) whose sum is the output, and training moves
// just those weights toward the desired output, so nearby inputs, which share
// weights, learn together. The fuzzy CMAC quantizes each input through clusters
// formed from the training data instead of through equal intervals, so the
// table spends its cells where the inputs are dense and needs far fewer of
// them for the same accuracy.
//
// Data path: the sample is latched; two fuzzy_quantizer blocks turn x_i and x_j
// into cluster indices (q_i, q_j); cmac_addr_gen gives the address of the
// winner of layer k, (q_i + k, q_j + k); fcmac_ctrl reads the K winners from
// weight_mem one per cycle into output_summer and, for training, writes them
// back through weight_update. The cluster boundaries come from the separate
// clustering phase and are loaded through clu_*; the trained weights can be
// read back through rb_*.
//
// Interface and timing: a sample is taken when in_valid and in_ready are both
// high. out_valid is a one-cycle pulse K+2 rising edges after that edge, with
// out_y (sum of the K weights, FRAC fraction bits) and out_class
// (out_y >= 1/2). A recall takes K+3 cycles per sample, a training step 2K+3.
// After reset the weight table is cleared for 2^(AW_I+AW_J) cycles (busy
// high, in_ready low). Cluster boundaries may be written at any time but
// should be written while no sample is in flight.
//
// Following the source design: the 2-input FCMAC with a 28 x 27 cluster grid,
// the LUT addressing with R' = R + K - 1 cells per axis, the 16-bit integer
// words and the multiplier-free arithmetic. This design's own choices: K = 4
// layers, the learning shift, the fixed-point scaling, the serial single-port
// schedule and the ports.
//
// The two assertions at the end use rst_n as their disable condition; lint
// tools report that as a synchronous use of the asynchronous reset, but it
// does not reach the logic.
module fcmac
  import fcmac_pkg::*;
#(
  parameter int unsigned XW       = fcmac_pkg::XW_DEF,
  parameter int unsigned WW       = fcmac_pkg::WW_DEF,
  parameter int unsigned NC_I     = fcmac_pkg::NC_I_DEF,
  parameter int unsigned NC_J     = fcmac_pkg::NC_J_DEF,
  parameter int unsigned K        = fcmac_pkg::K_DEF,
  parameter int unsigned LR_SHIFT = fcmac_pkg::LR_SHIFT_DEF,
  parameter int unsigned FRAC     = fcmac_pkg::FRAC_DEF,
  localparam int unsigned AW_I = $clog2(NC_I + K - 1),
  localparam int unsigned AW_J = $clog2(NC_J + K - 1),
  localparam int unsigned AW   = AW_I + AW_J,
  localparam int unsigned NCM  = (NC_I > NC_J) ? NC_I : NC_J,
  localparam int unsigned CAW  = (NCM > 2) ? $clog2(NCM - 1) : 1,
  localparam int unsigned SW   = WW + ((K > 1) ? $clog2(K) : 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // cluster boundary load
  input  logic                 clu_we,
  input  logic                 clu_dim,
  input  logic [CAW-1:0]       clu_addr,
  input  logic [XW-1:0]        clu_data,
  // sample in
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [XW-1:0]        in_xi,
  input  logic [XW-1:0]        in_xj,
  input  logic                 in_train,
  input  logic signed [WW-1:0] in_target,
  // result out
  output logic                 out_valid,
  output logic signed [SW-1:0] out_y,
  output logic                 out_class,
  // weight read-back
  input  logic                 rb_req,
  input  logic [AW-1:0]        rb_addr,
  output logic                 rb_valid,
  output logic signed [WW-1:0] rb_data,
  // status
  output logic                 busy,
  output logic                 sat
);

  localparam int unsigned QW_I = $clog2(NC_I);
  localparam int unsigned QW_J = $clog2(NC_J);
  localparam int unsigned BAW_I = (NC_I > 2) ? $clog2(NC_I - 1) : 1;
  localparam int unsigned BAW_J = (NC_J > 2) ? $clog2(NC_J - 1) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam logic signed [SW-1:0] HALF = SW'(64'sd1 <<< (FRAC - 1));

  // ------------------------------------------------------------ sample latch
  logic [XW-1:0]        xi_r, xj_r;
  logic signed [WW-1:0] target_r;
  logic                 x_latch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi_r     <= '0;
      xj_r     <= '0;
      target_r <= '0;
    end else if (x_latch) begin
      xi_r     <= in_xi;
      xj_r     <= in_xj;
      target_r <= in_target;
    end
  end

  // -------------------------------------------------------- fuzzy quantizers
  logic [QW_I-1:0] q_i;
  logic [QW_J-1:0] q_j;

  fuzzy_quantizer #(.XW(XW), .NC(NC_I)) u_quant_i (
    .clk      (clk),
    .rst_n    (rst_n),
    .bnd_we   (clu_we && !clu_dim),
    .bnd_addr (BAW_I'(clu_addr)),
    .bnd_data (clu_data),
    .x        (xi_r),
    .q        (q_i)
  );

  fuzzy_quantizer #(.XW(XW), .NC(NC_J)) u_quant_j (
    .clk      (clk),
    .rst_n    (rst_n),
    .bnd_we   (clu_we && clu_dim),
    .bnd_addr (BAW_J'(clu_addr)),
    .bnd_data (clu_data),
    .x        (xj_r),
    .q        (q_j)
  );

  // -------------------------------------------------------------- controller
  logic                 mem_we, sel_clear, sel_rb, sum_clr, sum_en;
  logic [AW-1:0]        clr_addr;
  logic [KW-1:0]        k;
  logic signed [WW-1:0] mem_rdata, w_old, w_new;
  ctrl_state_e          state;

  fcmac_ctrl #(.WW(WW), .K(K), .AW(AW)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_train  (in_train),
    .in_ready  (in_ready),
    .x_latch   (x_latch),
    .rb_req    (rb_req),
    .mem_we    (mem_we),
    .sel_clear (sel_clear),
    .sel_rb    (sel_rb),
    .clr_addr  (clr_addr),
    .k         (k),
    .mem_rdata (mem_rdata),
    .sum_clr   (sum_clr),
    .sum_en    (sum_en),
    .w_old     (w_old),
    .out_valid (out_valid),
    .rb_valid  (rb_valid),
    .busy      (busy),
    .state     (state)
  );

  // ------------------------------------------------------ addressing and RAM
  logic [AW-1:0]        layer_addr, mem_addr;
  logic signed [WW-1:0] mem_wdata;

  cmac_addr_gen #(.NC_I(NC_I), .NC_J(NC_J), .K(K)) u_addr (
    .q_i  (q_i),
    .q_j  (q_j),
    .k    (k),
    .addr (layer_addr)
  );

  always_comb begin
    if (sel_clear)   mem_addr = clr_addr;
    else if (sel_rb) mem_addr = rb_addr;
    else             mem_addr = layer_addr;
    mem_wdata = sel_clear ? '0 : w_new;
  end

  weight_mem #(.WW(WW), .AW(AW)) u_mem (
    .clk   (clk),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  assign rb_data = mem_rdata;

  // ------------------------------------------------- summer and weight update
  output_summer #(.WW(WW), .K(K)) u_sum (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (sum_clr),
    .en    (sum_en),
    .din   (mem_rdata),
    .y     (out_y)
  );

  logic upd_sat;

  weight_update #(.WW(WW), .K(K), .LR_SHIFT(LR_SHIFT)) u_upd (
    .y      (out_y),
    .target (target_r),
    .w      (w_old),
    .w_new  (w_new),
    .sat    (upd_sat)
  );

  assign sat       = upd_sat && mem_we && !sel_clear;
  assign out_class = (out_y >= HALF);

  // --------------------------------------------------------------- checks
  // No read-back request is served while a sample is being processed.
  assert property (@(posedge clk) disable iff (!rst_n) rb_valid |-> $past(state == ST_IDLE));
  // The network output is only announced in the DONE state.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> state == ST_DONE);

endmodule
