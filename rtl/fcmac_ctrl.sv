// fcmac_ctrl: sequencer of the Fuzzy CMAC learning and recall phase.
//
// After reset it writes zero to every weight (CLEAR, 2^AW cycles, busy high).
// It then waits in IDLE. A sample accepted there (in_valid && in_ready) starts
// a recall: the K winning weights are read one per cycle from the single-port
// weight table, each one added to the output summer and kept in a K-entry
// buffer (READ, K+1 cycles, the RAM having one cycle of read latency). In DONE
// out_valid is high for one cycle with the finished sum. For a training sample
// the K buffered weights are then written back adjusted (UPDATE, K cycles),
// the weights adjusting unit working from the buffered value, the sum and the
// desired output, so no weight is read twice.
//
// Timing, counted in rising edges from the edge that accepts a sample:
// out_valid is high in the cycle after edge K+1 (sampled at edge K+2); the
// next sample can be accepted at edge K+3 after a recall and at edge 2K+3
// after a training step. While idle and not offered a sample, a read-back
// request (rb_req) reads the table at the caller's address; rb_valid and the
// data follow one cycle later.
//
// Following the source design: recall by summing the addressed weights and,
// in training, adjusting just those weights. This design's own choices: the
// serial schedule over one RAM port, the clear sweep, the read-back port and
// the handshake.
module fcmac_ctrl
  import fcmac_pkg::*;
#(
  parameter int unsigned WW = fcmac_pkg::WW_DEF,
  parameter int unsigned K  = fcmac_pkg::K_DEF,
  parameter int unsigned AW = 10,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sample handshake
  input  logic                 in_valid,
  input  logic                 in_train,
  output logic                 in_ready,
  output logic                 x_latch,     // capture the sample this cycle
  // weight read-back
  input  logic                 rb_req,
  // weight table control
  output logic                 mem_we,
  output logic                 sel_clear,   // address = clr_addr, data = 0
  output logic                 sel_rb,      // address = read-back address
  output logic [AW-1:0]        clr_addr,
  output logic [KW-1:0]        k,           // layer being addressed
  input  logic signed [WW-1:0] mem_rdata,
  // output summer control
  output logic                 sum_clr,
  output logic                 sum_en,
  // weights adjusting unit
  output logic signed [WW-1:0] w_old,
  // status
  output logic                 out_valid,
  output logic                 rb_valid,
  output logic                 busy,
  output ctrl_state_e          state
);

  localparam int unsigned CW = KW + 1;   // counter reaching K

  logic [CW-1:0]        cnt;
  logic [AW-1:0]        clr_cnt;
  logic                 train_r;
  logic signed [WW-1:0] wbuf [K];
  logic                 rb_go;

  // ---------------------------------------------------------------- outputs
  always_comb begin
    in_ready  = (state == ST_IDLE);
    x_latch   = in_ready && in_valid;
    rb_go     = in_ready && !in_valid && rb_req;
    mem_we    = (state == ST_CLEAR) || (state == ST_UPDATE);
    sel_clear = (state == ST_CLEAR);
    sel_rb    = rb_go;
    clr_addr  = clr_cnt;
    k         = cnt[KW-1:0];
    sum_clr   = x_latch;
    sum_en    = (state == ST_READ) && (cnt != '0);
    w_old     = wbuf[cnt[KW-1:0]];
    out_valid = (state == ST_DONE);
    busy      = (state == ST_CLEAR);
  end

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_CLEAR;
      cnt      <= '0;
      clr_cnt  <= '0;
      train_r  <= 1'b0;
      rb_valid <= 1'b0;
    end else begin
      rb_valid <= rb_go;
      unique case (state)
        ST_CLEAR: begin
          clr_cnt <= clr_cnt + 1'b1;
          if (clr_cnt == '1) state <= ST_IDLE;
        end
        ST_IDLE: begin
          if (x_latch) begin
            train_r <= in_train;
            cnt     <= '0;
            state   <= ST_READ;
          end
        end
        ST_READ: begin
          if (cnt == CW'(K)) begin
            cnt   <= '0;
            state <= ST_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_DONE: begin
          state <= train_r ? ST_UPDATE : ST_IDLE;
        end
        ST_UPDATE: begin
          if (cnt == CW'(K - 1)) begin
            cnt   <= '0;
            state <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The weight read in READ step cnt belongs to layer cnt-1.
  always_ff @(posedge clk) begin
    if (state == ST_READ && cnt != '0)
      wbuf[KW'(cnt - 1'b1)] <= mem_rdata;
  end

endmodule
