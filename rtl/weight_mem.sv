// weight_mem: the CMAC weight table.
//
// One layer of memory locations holding the signed weights. It is a single-port
// synchronous RAM: on a rising edge it either writes wdata at addr (we = 1) or
// reads addr, the word appearing on rdata after that edge. DEPTH defaults to
// the power of two that covers the {row, column} address of the fuzzy CMAC
// table; locations whose row or column lies beyond R' are never addressed.
//
// Following the source design: a single weight table shared by all layers.
// This design's own choices: single port, synchronous read, no reset (the
// controller clears the table after reset).
module weight_mem #(
  parameter int unsigned WW = fcmac_pkg::WW_DEF,
  parameter int unsigned AW = 10
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic signed [WW-1:0] wdata,
  output logic signed [WW-1:0] rdata
);

  logic signed [WW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
