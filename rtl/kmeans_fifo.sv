// Feature buffer: one column of the data matrix (one feature of every point).
//
// A 256 x 16 dual-port memory with a write pointer and a read pointer. A word
// written in cycle t can be read in cycle t+1 and appears on rd_data in cycle
// t+2 (registered read), so the clustering pipeline can start on the first
// points while later ones are still being written, instead of waiting for the
// whole data set as a block-RAM load would.
//
// Reading does not destroy the data: k-means passes over the same points in
// every iteration, so `rewind` returns the read pointer to the first word and
// the buffer replays its contents. `clear` empties it for a new data set.
// The memory is linear (no wrap-around); it holds one data set of up to DEPTH
// points. The replay mechanism, the clear input and the full/empty flags are
// this design's own choices; the depth and width are the document's.
//
// Interface: wr_en/wr_data write when not full; rd_en reads when not empty,
// rd_data is valid the cycle after rd_en. If rd_en and rewind are high in the
// same cycle the read takes the current word and the pointer then returns to 0.
module kmeans_fifo #(
  parameter int DEPTH = kmeans_pkg::DEPTH,
  parameter int WIDTH = kmeans_pkg::DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  input  logic                       rewind,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int PW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;

  assign empty = (rd_ptr == wr_ptr);
  assign full  = (wr_ptr == PW'(DEPTH));
  assign level = wr_ptr;

  always_ff @(posedge clk) begin
    if (wr_en && !full && !clear)
      mem[wr_ptr[$clog2(DEPTH)-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      rd_data <= '0;
    end else if (clear) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else begin
      if (wr_en && !full)
        wr_ptr <= wr_ptr + 1'b1;
      if (rd_en && !empty)
        rd_data <= mem[rd_ptr[$clog2(DEPTH)-1:0]];
      if (rewind)
        rd_ptr <= '0;
      else if (rd_en && !empty)
        rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !clear))
    else $error("kmeans_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !clear))
    else $error("kmeans_fifo: read while empty");

endmodule
