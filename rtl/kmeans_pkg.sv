// Shared sizes of the k-means clustering engine.
//
// Data points are fixed-point numbers in Q6.10 two's complement: 6 integer
// bits (sign included) and 10 fractional bits, 16 bits in all. That word
// covers the range and the 0.001 precision of the expression data set the
// engine was sized for. A point has 7 features (7 time samples), the engine
// forms 6 clusters, and each feature buffer holds up to 256 points.
//
// The accumulator and distance widths are derived here so that no sum can
// overflow: an accumulator adds at most DEPTH words (8 extra bits), a
// Manhattan distance adds FEATURES magnitudes of at most 2^16-1 (3 extra
// bits). Those derived widths are this design's own choice.
package kmeans_pkg;

  localparam int FEATURES = 7;    // features per data point
  localparam int CLUSTERS = 6;    // number of clusters k
  localparam int DATA_W   = 16;   // word length QI + QF
  localparam int FRAC_W   = 10;   // fractional bits QF
  localparam int DEPTH    = 256;  // words per feature buffer

  localparam int IDX_W    = $clog2(CLUSTERS + 1);          // 1-based cluster index
  localparam int CNT_W    = $clog2(DEPTH + 1);             // points per cluster
  localparam int ACC_W    = DATA_W + $clog2(DEPTH);        // per-feature sum
  localparam int DIST_W   = DATA_W + $clog2(FEATURES);     // Manhattan distance
  localparam int ITER_W   = 8;                             // iteration counter

endpackage
