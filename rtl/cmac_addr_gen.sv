// cmac_addr_gen: memory addressing unit of the look-up-table CMAC.
//
// The weight table has R' = R + K - 1 locations on each axis, R being the
// number of clusters of that axis and K the number of layers. For cluster
// indices (q_i, q_j) the winning neuron of layer k (k = 0 .. K-1) sits at
// (q_i + k, q_j + k): the K winners of one input lie on a short diagonal, and
// neighbouring inputs share some of them, which gives the CMAC its local
// generalization. The extra K-1 locations per axis keep the largest index from
// overflowing the table, so no scaling is needed here.
//
// Interface: combinational. The address is {row, column}, the row in the upper
// AW_I bits, so the table is addressed by concatenation instead of a multiply.
//
// Following the source design: the (q + k) indexing and R' = R + K - 1. This
// design's own choices: zero-based indices and the concatenated address.
module cmac_addr_gen #(
  parameter int unsigned NC_I = fcmac_pkg::NC_I_DEF,
  parameter int unsigned NC_J = fcmac_pkg::NC_J_DEF,
  parameter int unsigned K    = fcmac_pkg::K_DEF,
  localparam int unsigned QW_I = $clog2(NC_I),
  localparam int unsigned QW_J = $clog2(NC_J),
  localparam int unsigned AW_I = $clog2(NC_I + K - 1),
  localparam int unsigned AW_J = $clog2(NC_J + K - 1),
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic [QW_I-1:0]      q_i,
  input  logic [QW_J-1:0]      q_j,
  input  logic [KW-1:0]        k,
  output logic [AW_I+AW_J-1:0] addr
);

  logic [AW_I-1:0] a_i;
  logic [AW_J-1:0] a_j;

  always_comb begin
    a_i  = AW_I'(q_i) + AW_I'(k);
    a_j  = AW_J'(q_j) + AW_J'(k);
    addr = {a_i, a_j};
  end

endmodule
