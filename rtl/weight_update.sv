// weight_update: weights adjusting unit.
//
// Supervised CMAC learning moves each of the K addressed weights by the same
// share of the output error: w' = w + (d - y) * beta / K. Here beta / K is
// 2^-LR_SHIFT, so the scaling is an arithmetic right shift and the unit needs
// no multiplier. The new weight saturates at the limits of the WW-bit word.
//
// Interface: combinational. y is the summed output (SW bits), target the
// desired output (WW bits), w the old weight; w_new the adjusted weight and
// sat flags that it was clipped.
//
// Following the source design: supervised adjustment of the addressed weights
// and the power-of-two shift in place of a multiplier. This design's own
// choices: the learning rule's exact form, the shift amount and saturation.
module weight_update #(
  parameter int unsigned WW       = fcmac_pkg::WW_DEF,
  parameter int unsigned K        = fcmac_pkg::K_DEF,
  parameter int unsigned LR_SHIFT = fcmac_pkg::LR_SHIFT_DEF,
  localparam int unsigned SW = WW + ((K > 1) ? $clog2(K) : 1)
) (
  input  logic signed [SW-1:0] y,
  input  logic signed [WW-1:0] target,
  input  logic signed [WW-1:0] w,
  output logic signed [WW-1:0] w_new,
  output logic                 sat
);

  localparam int unsigned EW = SW + 2;   // width of error and new weight

  localparam logic signed [EW-1:0] WMAX = EW'((64'sd1 <<< (WW - 1)) - 1);
  localparam logic signed [EW-1:0] WMIN = -EW'(64'sd1 <<< (WW - 1));

  logic signed [EW-1:0] err, delta, sum;

  always_comb begin
    err   = EW'(target) - EW'(y);
    delta = err >>> LR_SHIFT;
    sum   = EW'(w) + delta;
    if (sum > WMAX) begin
      w_new = WMAX[WW-1:0];
      sat   = 1'b1;
    end else if (sum < WMIN) begin
      w_new = WMIN[WW-1:0];
      sat   = 1'b1;
    end else begin
      w_new = sum[WW-1:0];
      sat   = 1'b0;
    end
  end

endmodule
