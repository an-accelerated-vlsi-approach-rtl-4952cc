// End-to-end testbench of kmeans_top at its default sizes (7 features,
// 6 clusters, 256-word buffers, Q6.10 data) on a 187 x 7 data set, the size
// of the filtered yeast expression matrix the engine was sized for.
//
// The data are synthetic: six groups of points scattered around six random
// Q6.10 centres within the data range -6.4..4.2. A k-means model in the
// testbench (Manhattan distance, lowest index on ties, truncating division,
// empty clusters keep their centre) gives the expected final centres,
// iteration count, convergence flag, cluster sizes and per-point assignment.
//
// Runs:
//   A  points written one every other cycle, start right after the first
//      write: the first pass reads one cycle behind the writes and stalls;
//      up to 18 passes; must converge. Later passes must take 187 + 2 = 189
//      cycles.
//   B  same data, rerun with max_iter = 2: stopped by the iteration limit.
//   C  same data, one initial centre far from every point: that cluster
//      stays empty and keeps its centre.
//   D  a new data set (clear_data) written in one burst before start.
// Each mechanism (overlap of reads with writes, stall, accumulation into
// every cluster, divide cycle, convergence stop, limit stop, empty cluster,
// back-to-back passes) is counted and must occur.
module tb_kmeans_top;
  import kmeans_pkg::*;

  localparam int N = 187;

  logic clk = 0, rst_n = 0;
  logic clear_data = 0, wr_en = 0, full;
  logic [FEATURES-1:0][DATA_W-1:0] wr_point = '0;
  logic start = 0;
  logic [CNT_W-1:0] n_points = '0;
  logic [ITER_W-1:0] max_iter = '0;
  logic [CLUSTERS-1:0][FEATURES-1:0][DATA_W-1:0] init_centers = '0, centers;
  logic busy, done, converged, stall, assign_valid, div_flag;
  logic [ITER_W-1:0] iterations;
  logic [CLUSTERS-1:0][FEATURES-1:0][ACC_W-1:0] acc;
  logic [CLUSTERS-1:0][CNT_W-1:0] counts;
  logic [IDX_W-1:0] assign_idx;
  logic [DIST_W-1:0] assign_dist;

  kmeans_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ data
  int data [N][FEATURES];
  int ref_c [CLUSTERS][FEATURES];
  int ref_cnt [CLUSTERS];
  int ref_assign [N];
  int ref_mind [N];
  int ref_iters;
  bit ref_conv;

  function automatic int q610(input real x);
    return int'($rtoi(x * 1024.0));
  endfunction

  task automatic make_data(input int seed_shift);
    int g [CLUSTERS][FEATURES];
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++)
        g[c][f] = $urandom_range(0, 10600) - 6400;        // -6.4 .. 4.2 in 1/1000
    for (int i = 0; i < N; i++) begin
      int c;
      c = (i + seed_shift) % CLUSTERS;
      for (int f = 0; f < FEATURES; f++) begin
        int v;
        v = g[c][f] + $urandom_range(0, 4000) - 2000;
        if (v > 4216) v = 4216;
        if (v < -6403) v = -6403;
        data[i][f] = q610(real'(v) / 1000.0);
      end
    end
  endtask

  // ------------------------------------------------------------ model
  task automatic run_model(input int init [CLUSTERS][FEATURES], input int maxit);
    int c_cur [CLUSTERS][FEATURES];
    c_cur = init;
    ref_iters = 0;
    ref_conv = 0;
    for (int it = 1; it <= maxit || (maxit == 0 && it == 1); it++) begin
      longint sum [CLUSTERS][FEATURES];
      int cnt [CLUSTERS];
      bit changed;
      foreach (sum[c, f]) sum[c][f] = 0;
      foreach (cnt[c]) cnt[c] = 0;
      for (int i = 0; i < N; i++) begin
        int best, bi;
        best = 32'h7fffffff; bi = 0;
        for (int c = 0; c < CLUSTERS; c++) begin
          int d;
          d = 0;
          for (int f = 0; f < FEATURES; f++)
            d += (data[i][f] > c_cur[c][f]) ? data[i][f] - c_cur[c][f] : c_cur[c][f] - data[i][f];
          if (d < best) begin best = d; bi = c; end
        end
        ref_assign[i] = bi;
        ref_mind[i] = best;
        cnt[bi]++;
        for (int f = 0; f < FEATURES; f++) sum[bi][f] += data[i][f];
      end
      changed = 0;
      for (int c = 0; c < CLUSTERS; c++) begin
        if (cnt[c] != 0)
          for (int f = 0; f < FEATURES; f++) begin
            longint m;
            int nv;
            m  = ((sum[c][f] < 0) ? -sum[c][f] : sum[c][f]) / cnt[c];
            nv = int'((sum[c][f] < 0) ? -m : m);
            if (nv != c_cur[c][f]) changed = 1;
            c_cur[c][f] = nv;
          end
      end
      ref_cnt = cnt;
      ref_iters = it;
      if (!changed) begin ref_conv = 1; break; end
      if (it >= maxit) break;
    end
    ref_c = c_cur;
  endtask

  // ------------------------------------------------------------ monitors
  int cyc = 0;
  int n_overlap = 0, n_stall = 0, n_div = 0, n_b2b = 0;
  int n_acc [CLUSTERS];
  int first_read_cyc = -1, last_div_cyc = -1;
  int pass_len [$];
  int seen_assign [$];
  int seen_dist [$];
  int n_written = 0;
  always @(posedge clk) begin
    cyc++;
    if (clear_data) n_written = 0;
    else if (wr_en) n_written++;
    if (dut.rd_en && n_written < N) n_overlap++;           // reading while still loading
    if (stall) n_stall++;
    if (assign_valid) begin
      n_acc[assign_idx - 1]++;
      seen_assign.push_back(int'(assign_idx) - 1);
      seen_dist.push_back(int'(assign_dist));
    end
    if (div_flag) begin
      n_div++;
      if (dut.rd_en) n_b2b++;                              // next pass starts in divide cycle
      if (last_div_cyc >= 0) pass_len.push_back(cyc - last_div_cyc);
      last_div_cyc = cyc;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  task automatic write_points(input int gap);
    for (int i = 0; i < N; i++) begin
      for (int f = 0; f < FEATURES; f++) wr_point[f] = DATA_W'(data[i][f]);
      wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic start_run(input int init [CLUSTERS][FEATURES], input int maxit);
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++) init_centers[c][f] = DATA_W'(init[c][f]);
    n_points = CNT_W'(N);
    max_iter = ITER_W'(maxit);
    start = 1;
    @(negedge clk);
    start = 0;
    last_div_cyc = -1;
    pass_len.delete();
    seen_assign.delete();
    seen_dist.delete();
  endtask

  task automatic check_result(input string run);
    int mism;
    check(iterations == ITER_W'(ref_iters),
          $sformatf("%s: iterations %0d expected %0d", run, iterations, ref_iters));
    check(converged == ref_conv, $sformatf("%s: converged %0d expected %0d", run, converged, ref_conv));
    mism = 0;
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++)
        if ($signed(centers[c][f]) != 16'(ref_c[c][f])) mism++;
    check(mism == 0, $sformatf("%s: %0d centre words differ from the model", run, mism));
    for (int c = 0; c < CLUSTERS; c++)
      check(int'(counts[c]) == ref_cnt[c],
            $sformatf("%s: cluster %0d size %0d expected %0d", run, c+1, counts[c], ref_cnt[c]));
    // assignment of the last pass
    mism = 0;
    if (seen_assign.size() < N) mism = N;
    else for (int i = 0; i < N; i++)
      if (seen_assign[seen_assign.size() - N + i] != ref_assign[i] ||
          seen_dist[seen_dist.size() - N + i] != ref_mind[i]) mism++;
    check(mism == 0, $sformatf("%s: %0d point assignments differ in the last pass", run, mism));
    // every complete pass after the first: N + 2 cycles
    foreach (pass_len[k])
      check(pass_len[k] == N + 2, $sformatf("%s: pass %0d took %0d cycles", run, k+2, pass_len[k]));
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    int init [CLUSTERS][FEATURES];
    int t0;
    int n_limit = 0, n_conv = 0, n_empty = 0;
    foreach (n_acc[c]) n_acc[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- run A: streaming load, convergence
    make_data(0);
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++) init[c][f] = data[c * 6 + (c % 2)][f];
    run_model(init, 18);
    clear_data = 1; @(negedge clk); clear_data = 0;
    for (int f = 0; f < FEATURES; f++) wr_point[f] = DATA_W'(data[0][f]);
    wr_en = 1; @(negedge clk); wr_en = 0;        // first point
    start_run(init, 18);
    fork
      begin
        for (int i = 1; i < N; i++) begin
          for (int f = 0; f < FEATURES; f++) wr_point[f] = DATA_W'(data[i][f]);
          wr_en = 1; @(negedge clk); wr_en = 0; @(negedge clk);
        end
      end
    join_none
    wait (done); @(negedge clk);
    check_result("A");
    check(pass_len.size() == ref_iters - 1, "A: all passes seen");
    if (converged) n_conv++;
    $display("run A: %0d passes, converged=%0d, sizes %0d %0d %0d %0d %0d %0d",
             iterations, converged, counts[0], counts[1], counts[2], counts[3], counts[4], counts[5]);

    // ---- run B: iteration limit
    run_model(init, 2);
    start_run(init, 2);
    t0 = cyc;
    wait (done); @(negedge clk);
    check_result("B");
    check(!converged && iterations == 2, "B: stopped by max_iter");
    check(cyc - t0 == 2 * (N + 2) + 1, $sformatf("B: 2 passes took %0d cycles", cyc - t0));
    if (!converged && iterations == 2) n_limit++;

    // ---- run C: one initial centre far away, its cluster stays empty
    init[CLUSTERS-1] = '{default: 30000};               // about +29.3, outside the data
    run_model(init, 18);
    start_run(init, 18);
    wait (done); @(negedge clk);
    check_result("C");
    check(counts[CLUSTERS-1] == 0, "C: far cluster empty");
    for (int f = 0; f < FEATURES; f++)
      check($signed(centers[CLUSTERS-1][f]) == 16'sd30000, "C: empty cluster kept its centre");
    if (counts[CLUSTERS-1] == 0) n_empty++;

    // ---- run D: new data set written in a burst, then run
    make_data(3);
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++) init[c][f] = data[c * 12 + (c % 3)][f];
    run_model(init, 18);
    clear_data = 1; @(negedge clk); clear_data = 0;
    write_points(0);
    check(!full, "187 points do not fill a 256-word buffer");
    start_run(init, 18);
    t0 = cyc;
    wait (done); @(negedge clk);
    check_result("D");
    check(cyc - t0 == ref_iters * (N + 2) + 1,
          $sformatf("D: %0d passes took %0d cycles", ref_iters, cyc - t0));
    if (converged) n_conv++;
    $display("run D: %0d passes in %0d cycles", iterations, cyc - t0);

    // ---- mechanisms
    check(n_overlap > 0, $sformatf("reads overlapping writes: %0d", n_overlap));
    check(n_stall > 0, $sformatf("stall cycles: %0d", n_stall));
    for (int c = 0; c < CLUSTERS; c++)
      check(n_acc[c] > 0, $sformatf("cluster %0d accumulated %0d points", c+1, n_acc[c]));
    check(n_div > 0, $sformatf("divide cycles: %0d", n_div));
    check(n_b2b > 0, $sformatf("back-to-back passes: %0d", n_b2b));
    check(n_conv > 0, $sformatf("runs ended by convergence: %0d", n_conv));
    check(n_limit > 0, $sformatf("runs ended by the iteration limit: %0d", n_limit));
    check(n_empty > 0, $sformatf("runs with an empty cluster: %0d", n_empty));
    $display("mechanisms: overlap=%0d stall=%0d div=%0d b2b=%0d conv=%0d limit=%0d empty=%0d",
             n_overlap, n_stall, n_div, n_b2b, n_conv, n_limit, n_empty);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
