// Counter bank: demultiplexer plus one point counter per cluster.
//
// count_en is routed by the cluster index `idx` (1-based, 001..110) to one of
// CLUSTERS counters, which increments; the count is visible one cycle later.
// After a pass, cnt[c] is the number of points assigned to cluster c, the
// divisor for its new centre. `clear` zeroes all counters at the start of a
// pass (a counter enabled in the same cycle restarts at 1). Counters are
// CNT_W bits, enough for a full buffer of DEPTH points.
module kmeans_counter #(
  parameter int CLUSTERS = kmeans_pkg::CLUSTERS,
  parameter int CNT_W    = kmeans_pkg::CNT_W,
  parameter int IDX_W    = $clog2(CLUSTERS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             clear,
  input  logic                             count_en,
  input  logic [IDX_W-1:0]                 idx,
  output logic [CLUSTERS-1:0][CNT_W-1:0]   cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int c = 0; c < CLUSTERS; c++) begin
        if (count_en && idx == IDX_W'(c + 1))
          cnt[c] <= (clear ? CNT_W'(0) : cnt[c]) + 1'b1;
        else if (clear)
          cnt[c] <= '0;
      end
    end
  end

endmodule
