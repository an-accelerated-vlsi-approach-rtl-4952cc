// Minimum distance finder (the comparator).
//
// Takes the CLUSTERS distances of one data point and returns the index of the
// nearest centre and that smallest distance. The index is 1-based, 001 for
// the first cluster up to 110 for the sixth, the codes that select the
// accumulator and counter outputs of the demultiplexers. On a tie the lower
// cluster number wins (this design's choice).
//
// Purely combinational: the index is available in the same cycle as the
// registered distances, and the accumulators consume it at the next edge.
// The search is a linear chain of CLUSTERS-1 compare-and-select stages.
module kmeans_min_finder #(
  parameter int CLUSTERS = kmeans_pkg::CLUSTERS,
  parameter int DIST_W   = kmeans_pkg::DIST_W,
  parameter int IDX_W    = $clog2(CLUSTERS + 1)
) (
  input  logic [CLUSTERS-1:0][DIST_W-1:0] distance,
  output logic [IDX_W-1:0]                idx,
  output logic [DIST_W-1:0]               min_dist
);

  always_comb begin
    idx      = IDX_W'(1);
    min_dist = distance[0];
    for (int c = 1; c < CLUSTERS; c++) begin
      if (distance[c] < min_dist) begin
        min_dist = distance[c];
        idx      = IDX_W'(c + 1);
      end
    end
  end

endmodule
