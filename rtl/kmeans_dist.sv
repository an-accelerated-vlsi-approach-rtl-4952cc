// Distance unit: Manhattan (city-block) distance between a data point and one
// cluster centre.
//
// distance = sum over the FEATURES features of |point[f] - center[f]|, the
// Minkowski distance with r = 1. Using r = 1 avoids the squaring (and the
// multipliers) that a Euclidean distance would need. All FEATURES differences
// are formed in parallel and summed combinationally; the result is
// registered, so the distance appears one cycle after the point (latency 1,
// one new distance per cycle). The engine has one such unit per cluster, so
// the distances to all centres are found in the same cycle.
//
// Interface: point and center are FEATURES signed fixed-point words of the
// same format (the binary point does not matter for a sum of differences);
// distance is an unsigned integer of DIST_W bits, wide enough that it cannot
// overflow. `en` is a clock enable for the output register.
module kmeans_dist #(
  parameter int FEATURES = kmeans_pkg::FEATURES,
  parameter int DATA_W   = kmeans_pkg::DATA_W,
  parameter int DIST_W   = kmeans_pkg::DIST_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             en,
  input  logic [FEATURES-1:0][DATA_W-1:0]  point,
  input  logic [FEATURES-1:0][DATA_W-1:0]  center,
  output logic [DIST_W-1:0]                distance
);

  logic [DIST_W-1:0] sum;

  always_comb begin
    logic signed [DATA_W:0] diff;
    logic        [DATA_W:0] mag;
    sum = '0;
    for (int f = 0; f < FEATURES; f++) begin
      diff = $signed({point[f][DATA_W-1], point[f]}) - $signed({center[f][DATA_W-1], center[f]});
      mag  = diff[DATA_W] ? (DATA_W+1)'(-diff) : (DATA_W+1)'(diff);
      sum  = sum + DIST_W'(mag);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  distance <= '0;
    else if (en) distance <= sum;
  end

endmodule
