// Divider: new centre of one cluster, and the register that holds it.
//
// At the end of a pass the accumulated sums acc[f] of a cluster are divided by
// its point count cnt, all FEATURES quotients at once and in a single cycle
// (combinational dividers), giving the mean of the cluster's points in the
// same Q6.10 format as the data. The engine has one divider per cluster, so
// all new centres are found in the same cycle rather than one cluster after
// another. The quotient is truncated toward zero (this design's choice).
//
// nwcntr_reg is the centre register: it drives the distance unit of its
// cluster and is loaded
//   - with init_center when `load` is high (start of a run), or
//   - with the quotients in a cycle where both div_en and flag are high.
// div_en enables the divider for the duration of a run; flag marks the cycle
// in which the pass is complete and acc/cnt hold their final values. A
// cluster that received no point (cnt = 0) keeps its old centre.
// `moved` is high in an update cycle when the new centre differs from the
// old one; the controller uses it to detect convergence.
module kmeans_divider #(
  parameter int FEATURES = kmeans_pkg::FEATURES,
  parameter int DATA_W   = kmeans_pkg::DATA_W,
  parameter int ACC_W    = kmeans_pkg::ACC_W,
  parameter int CNT_W    = kmeans_pkg::CNT_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             load,
  input  logic [FEATURES-1:0][DATA_W-1:0]  init_center,
  input  logic                             div_en,
  input  logic                             flag,
  input  logic [FEATURES-1:0][ACC_W-1:0]   acc,
  input  logic [CNT_W-1:0]                 cnt,
  output logic [FEATURES-1:0][DATA_W-1:0]  nwcntr_reg,
  output logic                             moved
);

  logic [FEATURES-1:0][DATA_W-1:0] quot;
  logic                            update;

  always_comb begin
    logic signed [ACC_W-1:0] q;
    logic signed [ACC_W-1:0] d;
    for (int f = 0; f < FEATURES; f++) begin
      d       = $signed(ACC_W'(cnt));
      if (cnt == '0) q = '0;
      else           q = $signed(acc[f]) / d;
      // the mean of Q6.10 words always fits in DATA_W bits: drop the rest
      quot[f] = q[DATA_W-1:0];
    end
  end

  assign update = div_en && flag && (cnt != '0);
  assign moved  = update && (quot != nwcntr_reg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      nwcntr_reg <= '0;
    else if (load)   nwcntr_reg <= init_center;
    else if (update) nwcntr_reg <= quot;
  end

endmodule
