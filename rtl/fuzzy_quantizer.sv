// fuzzy_quantizer: cluster indexing for one input dimension.
//
// The Fuzzy CMAC replaces the uniform quantization of a plain CMAC by indexing
// through the clusters (fuzzy sets) that the clustering phase formed for each
// input dimension: narrow clusters where the training inputs are dense, wide
// ones where they are sparse. This block holds that clustering as NC-1 ascending
// boundaries; boundary b is the lowest input value that belongs to cluster b+1.
// The index of an input is the number of boundaries at or below it, found with
// NC-1 comparators working in parallel and a count, so no multiplier or divider
// is needed.
//
// Interface: bnd_we/bnd_addr/bnd_data write one boundary (one cycle, stored on
// the rising clock edge). x -> q is combinational. Reset loads evenly spaced
// boundaries, so an unloaded quantizer behaves like a uniform one.
//
// Following the source design: the cluster-indexing function and the
// multiplier-free arithmetic. This design's own choices: storing a cluster as
// the boundary to its neighbour (the kernels of neighbouring fuzzy sets do not
// overlap, so each input falls in exactly one), the reset contents and the
// write port.
module fuzzy_quantizer #(
  parameter int unsigned XW = fcmac_pkg::XW_DEF,   // input width
  parameter int unsigned NC = fcmac_pkg::NC_I_DEF, // number of clusters
  localparam int unsigned NB = NC - 1,              // number of boundaries
  localparam int unsigned BAW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned QW = $clog2(NC)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bnd_we,
  input  logic [BAW-1:0] bnd_addr,
  input  logic [XW-1:0]  bnd_data,
  input  logic [XW-1:0]  x,
  output logic [QW-1:0]  q
);

  logic [XW-1:0] bnd [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++)
        bnd[b] <= XW'(((longint'(b) + 1) << XW) / NC);
    end else if (bnd_we && (32'(bnd_addr) < NB)) begin
      bnd[bnd_addr] <= bnd_data;
    end
  end

  logic [NB-1:0] ge;

  always_comb begin
    for (int b = 0; b < NB; b++)
      ge[b] = (x >= bnd[b]);
  end

  always_comb begin
    q = '0;
    for (int b = 0; b < NB; b++)
      q = q + QW'(ge[b]);
  end

endmodule
