// Accumulator bank: demultiplexer plus one accumulator register per cluster.
//
// When `en` is high, the cluster index `idx` (1-based, 001..110) selects one
// of the CLUSTERS accumulator registers, and that register adds the data
// point to its running sums, one sum per feature; the other registers hold.
// After a full pass over the data, acc[c] holds the sum of the points that
// were nearest to centre c, ready for the divider. An accumulator takes one
// point per cycle; the new sum is visible one cycle after `en`.
//
// `clear` zeroes all sums at the start of a pass; if `en` is high in the same
// cycle the selected register restarts at the incoming point. Sums are
// ACC_W = DATA_W + log2(DEPTH) bits, sign-extended from the Q6.10 inputs, so
// a full buffer of points cannot overflow (width is this design's choice).
module kmeans_accumulator #(
  parameter int CLUSTERS = kmeans_pkg::CLUSTERS,
  parameter int FEATURES = kmeans_pkg::FEATURES,
  parameter int DATA_W   = kmeans_pkg::DATA_W,
  parameter int ACC_W    = kmeans_pkg::ACC_W,
  parameter int IDX_W    = $clog2(CLUSTERS + 1)
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          clear,
  input  logic                                          en,
  input  logic [IDX_W-1:0]                              idx,
  input  logic [FEATURES-1:0][DATA_W-1:0]               point,
  output logic [CLUSTERS-1:0][FEATURES-1:0][ACC_W-1:0]  acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      for (int c = 0; c < CLUSTERS; c++) begin
        for (int f = 0; f < FEATURES; f++) begin
          if (en && idx == IDX_W'(c + 1))
            acc[c][f] <= (clear ? ACC_W'(0) : acc[c][f])
                         + ACC_W'($signed(point[f]));
          else if (clear)
            acc[c][f] <= '0;
        end
      end
    end
  end

endmodule
