// output_summer: sums the K addressed weights into the CMAC output.
//
// An accumulator: clr sets it to zero, en adds din. With K weights of WW bits
// the sum needs WW + clog2(K) bits, so it cannot overflow.
//
// Interface: both controls act on the rising clock edge; clr wins over en.
// The sum is registered and appears on y the cycle after the last add.
//
// Following the source design: the output is the plain sum of the addressed
// weights. This design's own choices: serial accumulation and the widths.
module output_summer #(
  parameter int unsigned WW = fcmac_pkg::WW_DEF,
  parameter int unsigned K  = fcmac_pkg::K_DEF,
  localparam int unsigned SW = WW + ((K > 1) ? $clog2(K) : 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [WW-1:0] din,
  output logic signed [SW-1:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   y <= '0;
    else if (clr) y <= '0;
    else if (en)  y <= y + SW'(din);
  end

endmodule
