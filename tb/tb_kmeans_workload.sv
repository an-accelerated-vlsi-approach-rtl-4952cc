// Workload testbench: one full-size run of kmeans_top (default sizes) on a
// 187 x 7 data set that needs the full 18 passes, the iteration count of the
// reference yeast expression workload. Checks that passes start every
// 187 + 2 = 189 cycles, so that done rises 18 x 189 + 1 = 3403 cycles after
// the first read (the divide cycle of the last pass is the only one not
// overlapped with a following read), and that the
// final centres, cluster sizes and assignments match a software k-means model
// (Manhattan distance, lowest index on ties, truncating division, empty
// clusters keep their centre).
//
// The real expression data are not available here, so the testbench draws
// synthetic Q6.10 data in the same value range (-6.4 .. 4.2), with loosely
// separated groups, and keeps drawing data sets and initial centres until the
// model needs exactly 18 passes without converging earlier; the search is
// bounded and counts as a failure if it finds none.
module tb_kmeans_workload;
  import kmeans_pkg::*;

  localparam int N = 187;
  localparam int ITER = 18;

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

  int data [N][FEATURES];
  int ref_c [CLUSTERS][FEATURES];
  int ref_cnt [CLUSTERS];
  int ref_assign [N];
  int ref_mind [N];
  int ref_iters;
  bit ref_conv;

  task automatic make_data(input int spread);
    int g [CLUSTERS][FEATURES];
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++)
        g[c][f] = $urandom_range(0, 10600) - 6400;
    for (int i = 0; i < N; i++) begin
      int c;
      c = $urandom_range(0, CLUSTERS - 1);
      for (int f = 0; f < FEATURES; f++) begin
        int v;
        v = g[c][f] + $urandom_range(0, 2 * spread) - spread;
        if (v > 4216) v = 4216;
        if (v < -6403) v = -6403;
        data[i][f] = (v * 1024) / 1000;               // Q6.10
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


  // sampled on the falling edge, away from the register updates
  int cyc = 0, first_read = -1, done_cyc = -1, n_assign = 0, n_div = 0;
  int seen_assign [$];
  int seen_dist [$];
  always @(negedge clk) begin
    cyc++;
    if (dut.rd_en && first_read < 0) first_read = cyc;
    if (done && done_cyc < 0) done_cyc = cyc;
    if (div_flag) n_div++;
    if (assign_valid) begin
      n_assign++;
      seen_assign.push_back(int'(assign_idx) - 1);
      seen_dist.push_back(int'(assign_dist));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int init [CLUSTERS][FEATURES];
    int attempts, mism;
    bit found;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    found = 0;
    for (attempts = 1; attempts <= 3000 && !found; attempts++) begin
      make_data(1000 + 200 * (attempts % 20));
      for (int c = 0; c < CLUSTERS; c++) begin
        int k;
        k = $urandom_range(0, N - 1);
        for (int f = 0; f < FEATURES; f++) init[c][f] = data[k][f];
      end
      run_model(init, ITER);
      found = (ref_iters == ITER) && !ref_conv;
    end
    check(found, "found a data set needing the full iteration count");
    $display("data set found after %0d draws", attempts - 1);

    clear_data = 1; @(negedge clk); clear_data = 0;
    for (int i = 0; i < N; i++) begin
      for (int f = 0; f < FEATURES; f++) wr_point[f] = DATA_W'(data[i][f]);
      wr_en = 1; @(negedge clk);
    end
    wr_en = 0;
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++) init_centers[c][f] = DATA_W'(init[c][f]);
    n_points = CNT_W'(N);
    max_iter = ITER_W'(ITER);
    start = 1; @(negedge clk); start = 0;
    wait (done_cyc >= 0);

    check(iterations == ITER_W'(ITER), $sformatf("iterations %0d", iterations));
    check(!converged, "stopped by the iteration limit");
    check(n_div == ITER, $sformatf("divide cycles %0d", n_div));
    check(n_assign == ITER * N, $sformatf("points assigned %0d", n_assign));
    // passes every N+2 cycles; the last divide cycle adds one
    check(done_cyc - first_read == ITER * (N + 2) + 1,
          $sformatf("run took %0d cycles, expected %0d", done_cyc - first_read, ITER * (N + 2) + 1));
    mism = 0;
    for (int c = 0; c < CLUSTERS; c++)
      for (int f = 0; f < FEATURES; f++)
        if ($signed(centers[c][f]) != 16'(ref_c[c][f])) mism++;
    check(mism == 0, $sformatf("%0d centre words differ from the model", mism));
    for (int c = 0; c < CLUSTERS; c++)
      check(int'(counts[c]) == ref_cnt[c], $sformatf("cluster %0d size %0d expected %0d", c+1, counts[c], ref_cnt[c]));
    mism = 0;
    for (int i = 0; i < N; i++)
      if (seen_assign[(ITER - 1) * N + i] != ref_assign[i] ||
          seen_dist[(ITER - 1) * N + i] != ref_mind[i]) mism++;
    check(mism == 0, $sformatf("%0d assignments differ in the last pass", mism));
    $display("workload: %0d passes of %0d points in %0d cycles (%0d per pass)",
             iterations, N, done_cyc - first_read, (done_cyc - first_read - 1) / ITER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
