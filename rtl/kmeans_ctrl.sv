// Controller: the single FSM of the k-means engine.
//
// It runs the loop "assign every point to its nearest centre, accumulate,
// divide" until the centres stop moving or an iteration limit is reached.
//
// States: IDLE (waiting for start), RUN (passes over the data), DONE.
// On `start` it loads the initial centres (load_centers), rewinds the feature
// buffers, clears the accumulators and latches n_points and max_iter.
//
// In RUN it issues one buffer read per cycle (rd_en) while points of the pass
// remain and the buffers are not empty. During the first pass the buffers may
// still be filling: a read waits for data (`stall`), so reading starts one
// cycle after the first write. Two valid bits follow each point down the
// pipeline: v_rd (point on the buffer outputs, distances being computed) and
// v_dist (distances registered, comparator index valid, accumulate now).
// With the last point read, the buffers are rewound for the next pass.
// When all points are read and both valid bits are clear, the cycle is the
// divide cycle (div_flag): the dividers load the new centres. If no centre
// moved, or max_iter passes are done, the FSM goes to DONE; otherwise the
// first read of the next pass is issued in that same cycle, so passes follow
// each other back to back and one pass over N points takes N + 2 cycles
// (189 cycles for 187 points).
module kmeans_ctrl #(
  parameter int CNT_W  = kmeans_pkg::CNT_W,
  parameter int ITER_W = kmeans_pkg::ITER_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  n_points,
  input  logic [ITER_W-1:0] max_iter,
  input  logic              fifo_empty,
  input  logic              moved_any,
  output logic              load_centers,
  output logic              rd_en,
  output logic              rewind,
  output logic              v_rd,
  output logic              v_dist,
  output logic              acc_clear,
  output logic              div_en,
  output logic              div_flag,
  output logic              stall,
  output logic              busy,
  output logic              done,
  output logic              converged,
  output logic [ITER_W-1:0] iterations
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;

  state_t            state;
  logic [CNT_W-1:0]  n_reg, reads, reads_base;
  logic [ITER_W-1:0] max_reg;
  logic              reads_left, finish, next_pass;

  assign busy       = (state == RUN);
  assign done       = (state == DONE);
  assign div_en     = busy;
  assign reads_left = (reads < n_reg);
  assign div_flag   = busy && !reads_left && !v_rd && !v_dist;
  assign finish     = div_flag && (!moved_any || (iterations + 1'b1 >= max_reg));
  assign next_pass  = div_flag && !finish;

  assign load_centers = start && !busy;
  assign rd_en        = busy && !fifo_empty && (reads_left || next_pass);
  assign reads_base   = next_pass ? '0 : reads;
  assign rewind       = load_centers || (rd_en && (reads_base + 1'b1 == n_reg));
  assign acc_clear    = load_centers || next_pass;
  assign stall        = busy && (reads_left || next_pass) && fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      n_reg      <= '0;
      max_reg    <= '0;
      reads      <= '0;
      iterations <= '0;
      converged  <= 1'b0;
      v_rd       <= 1'b0;
      v_dist     <= 1'b0;
    end else begin
      v_rd   <= rd_en;
      v_dist <= v_rd;
      if (load_centers) begin
        state      <= RUN;
        n_reg      <= n_points;
        max_reg    <= max_iter;
        reads      <= '0;
        iterations <= '0;
        converged  <= 1'b0;
      end else if (busy) begin
        if (div_flag) begin
          iterations <= iterations + 1'b1;
          reads      <= rd_en ? CNT_W'(1) : '0;
          if (finish) begin
            state     <= DONE;
            converged <= !moved_any;
          end
        end else if (rd_en) begin
          reads <= reads + 1'b1;
        end
      end
    end
  end

  a_read_in_run: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> busy)
    else $error("kmeans_ctrl: read outside RUN");
  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !fifo_empty)
    else $error("kmeans_ctrl: read from empty buffer");

endmodule
