// K-means clustering engine, parallel and pipelined.
//
// Clusters up to DEPTH data points of FEATURES fixed-point features (Q6.10)
// into CLUSTERS clusters with the Manhattan distance. Structure:
//
//   FEATURES feature buffers (one per feature column, read one cycle after
//   they are written and replayed every pass)
//     -> CLUSTERS distance units (distance to every centre in one cycle,
//        registered)
//     -> minimum distance finder (index 001..110 of the nearest centre)
//     -> demultiplexed accumulator bank (sums of each cluster's points) and
//        demultiplexed counter bank (points per cluster)
//     -> CLUSTERS dividers (all new centres in one cycle), whose centre
//        registers feed back into the distance units
//   and one controller FSM that sequences passes until the centres stop
//   moving or max_iter passes are done.
//
// Pipeline of one point: read (cycle 0), buffer output and distances computed
// (cycle 1), distances registered, nearest index found, point accumulated and
// counted (cycle 2). The point reaches the accumulator through a register that
// keeps it aligned with its distances. One pass over N points takes N + 2
// cycles including the divide cycle, and the next pass starts in the divide
// cycle.
//
// Use: pulse clear_data, write the points with wr_en/wr_point (one point, all
// features, per cycle), and pulse start with n_points, max_iter and
// init_centers valid. Writing may go on after start: the first pass follows
// the writes one cycle behind and waits (stall) when it catches up. done rises
// when the run ends; centers holds the final centres, converged tells whether
// the last pass left every centre unchanged, iterations counts the passes, and
// acc/counts hold the sums and sizes of the last pass. assign_valid with
// assign_idx/assign_dist give the cluster chosen for each point as it passes
// and its distance to that centre.
module kmeans_top #(
  parameter int FEATURES = kmeans_pkg::FEATURES,
  parameter int CLUSTERS = kmeans_pkg::CLUSTERS,
  parameter int DATA_W   = kmeans_pkg::DATA_W,
  parameter int DEPTH    = kmeans_pkg::DEPTH,
  parameter int ITER_W   = kmeans_pkg::ITER_W,
  localparam int IDX_W   = $clog2(CLUSTERS + 1),
  localparam int CNT_W   = $clog2(DEPTH + 1),
  localparam int ACC_W   = DATA_W + $clog2(DEPTH),
  localparam int DIST_W  = DATA_W + $clog2(FEATURES)
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  // data set loading
  input  logic                                          clear_data,
  input  logic                                          wr_en,
  input  logic [FEATURES-1:0][DATA_W-1:0]               wr_point,
  output logic                                          full,
  // run control
  input  logic                                          start,
  input  logic [CNT_W-1:0]                              n_points,
  input  logic [ITER_W-1:0]                             max_iter,
  input  logic [CLUSTERS-1:0][FEATURES-1:0][DATA_W-1:0] init_centers,
  output logic                                          busy,
  output logic                                          done,
  output logic                                          converged,
  output logic [ITER_W-1:0]                             iterations,
  output logic                                          stall,
  // results
  output logic [CLUSTERS-1:0][FEATURES-1:0][DATA_W-1:0] centers,
  output logic [CLUSTERS-1:0][FEATURES-1:0][ACC_W-1:0]  acc,
  output logic [CLUSTERS-1:0][CNT_W-1:0]                counts,
  output logic                                          assign_valid,
  output logic [IDX_W-1:0]                              assign_idx,
  output logic [DIST_W-1:0]                             assign_dist,
  output logic                                          div_flag
);

  logic                              rd_en, rewind, v_rd, v_dist;
  logic                              load_centers, acc_clear, div_en;
  logic                              moved_any;
  logic [FEATURES-1:0]               f_empty, f_full;
  logic [FEATURES-1:0][DATA_W-1:0]   point_q, point_d;
  logic [CLUSTERS-1:0][DIST_W-1:0]   distance;
  logic [CLUSTERS-1:0]               moved;
  logic [IDX_W-1:0]                  idx;

  // ---------------- feature buffers ----------------
  for (genvar f = 0; f < FEATURES; f++) begin : g_fifo
    kmeans_fifo #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_fifo (
      .clk, .rst_n,
      .clear   (clear_data),
      .wr_en,
      .wr_data (wr_point[f]),
      .rd_en,
      .rewind,
      .rd_data (point_q[f]),
      .empty   (f_empty[f]),
      .full    (f_full[f]),
      .level   ()
    );
  end

  assign full = |f_full;

  // ---------------- controller ----------------
  kmeans_ctrl #(.CNT_W(CNT_W), .ITER_W(ITER_W)) u_ctrl (
    .clk, .rst_n,
    .start,
    .n_points,
    .max_iter,
    .fifo_empty   (|f_empty),
    .moved_any,
    .load_centers,
    .rd_en,
    .rewind,
    .v_rd,
    .v_dist,
    .acc_clear,
    .div_en,
    .div_flag,
    .stall,
    .busy,
    .done,
    .converged,
    .iterations
  );

  // ---------------- distance units ----------------
  for (genvar c = 0; c < CLUSTERS; c++) begin : g_dist
    kmeans_dist #(.FEATURES(FEATURES), .DATA_W(DATA_W), .DIST_W(DIST_W)) u_dist (
      .clk, .rst_n,
      .en     (v_rd),
      .point  (point_q),
      .center (centers[c]),
      .distance   (distance[c])
    );
  end

  // the point travels alongside its distances to the demultiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    point_d <= '0;
    else if (v_rd) point_d <= point_q;
  end

  // ---------------- minimum distance finder ----------------
  kmeans_min_finder #(.CLUSTERS(CLUSTERS), .DIST_W(DIST_W)) u_min (
    .distance (distance),
    .idx,
    .min_dist (assign_dist)
  );

  assign assign_valid = v_dist;
  assign assign_idx   = idx;

  // ---------------- accumulators and counters ----------------
  kmeans_accumulator #(
    .CLUSTERS(CLUSTERS), .FEATURES(FEATURES), .DATA_W(DATA_W), .ACC_W(ACC_W)
  ) u_acc (
    .clk, .rst_n,
    .clear (acc_clear),
    .en    (v_dist),
    .idx,
    .point (point_d),
    .acc
  );

  kmeans_counter #(.CLUSTERS(CLUSTERS), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .clear    (acc_clear),
    .count_en (v_dist),
    .idx,
    .cnt      (counts)
  );

  // ---------------- dividers / centre registers ----------------
  for (genvar c = 0; c < CLUSTERS; c++) begin : g_div
    kmeans_divider #(
      .FEATURES(FEATURES), .DATA_W(DATA_W), .ACC_W(ACC_W), .CNT_W(CNT_W)
    ) u_div (
      .clk, .rst_n,
      .load        (load_centers),
      .init_center (init_centers[c]),
      .div_en,
      .flag        (div_flag),
      .acc         (acc[c]),
      .cnt         (counts[c]),
      .nwcntr_reg  (centers[c]),
      .moved       (moved[c])
    );
  end

  assign moved_any = |moved;

endmodule
