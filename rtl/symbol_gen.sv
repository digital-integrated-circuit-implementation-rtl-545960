// symbol_gen -- nearest-centroid symbol generator ("tree classifier").
//
// The 3-dimensional vector from the dimensional reduction stage is compared
// with NC programmable centroids using the L1 (Manhattan) distance, and the
// index of the closest centroid is the output symbol. As published the
// search is a combinational binary tree, replacing the software kd-tree
// search: here all NC distances are formed in parallel and a tree of
// log2(NC) levels of compare-and-select nodes keeps the smaller distance
// and its index at each node. On a tie the lower index wins. The number of
// centroids (16) and the tie rule are this design's choices.
//
// Purely combinational: symbol and min_dist follow y and the centroids in the
// same cycle. NC must be a power of two.
module symbol_gen
  import sirpa_pkg::*;
#(
  parameter int unsigned NC = N_CENT,
  parameter int unsigned ND = N_DIMS,
  localparam int unsigned SW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned DW = DATA_W + 1 + $clog2(ND + 1)   // L1 distance width
) (
  input  q_t               y    [ND],
  input  q_t               cent [NC][ND],
  output logic [SW-1:0]    symbol,
  output logic [DW-1:0]    min_dist
);

  localparam int unsigned LV = $clog2(NC);

  // node arrays: level 0 holds the NC leaves, level LV the root
  logic [DW-1:0] nd_dist [LV+1][NC];
  logic [SW-1:0] nd_idx  [LV+1][NC];

  // leaves: L1 distance to each centroid; then the compare-and-select tree,
  // level l+1 node k choosing between level l nodes 2k and 2k+1
  always_comb begin
    nd_dist = '{default: '0};
    nd_idx  = '{default: '0};
    for (int k = 0; k < int'(NC); k++) begin
      logic [DW-1:0] s;
      s = '0;
      for (int j = 0; j < int'(ND); j++) begin
        logic signed [DATA_W:0] df;
        logic        [DATA_W:0] ad;
        df = (DATA_W+1)'(y[j]) - (DATA_W+1)'(cent[k][j]);
        ad = (df < 0) ? unsigned'(-df) : unsigned'(df);
        s  = s + DW'(ad);
      end
      nd_dist[0][k] = s;
      nd_idx[0][k]  = SW'(k);
    end
    for (int l = 0; l < int'(LV); l++) begin
      for (int k = 0; k < int'(NC >> (l + 1)); k++) begin
        if (nd_dist[l][2*k+1] < nd_dist[l][2*k]) begin
          nd_dist[l+1][k] = nd_dist[l][2*k+1];
          nd_idx[l+1][k]  = nd_idx[l][2*k+1];
        end else begin
          nd_dist[l+1][k] = nd_dist[l][2*k];
          nd_idx[l+1][k]  = nd_idx[l][2*k];
        end
      end
    end
  end

  assign symbol = nd_idx[LV][0];
  assign min_dist   = nd_dist[LV][0];

endmodule
