// Testbench for kmeans_min_finder: random distances (including ties and
// extreme values); the expected index (1-based, lowest on ties) and minimum
// come from a scan in the testbench.
module tb_kmeans_min_finder;
  localparam int CLUSTERS = 6;
  localparam int DIST_W   = 19;

  logic [CLUSTERS-1:0][DIST_W-1:0] distance;
  logic [2:0] idx;
  logic [DIST_W-1:0] min_dist;
  int checks = 0, failures = 0;

  kmeans_min_finder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int best, besti;
      for (int c = 0; c < CLUSTERS; c++)
        distance[c] = (t % 3 == 0) ? DIST_W'($urandom_range(0, 4))   // many ties
                                   : DIST_W'($urandom);
      if (t == 7) distance = '1;
      best = 1 << DIST_W; besti = 0;
      for (int c = 0; c < CLUSTERS; c++)
        if (int'(distance[c]) < best) begin best = int'(distance[c]); besti = c; end
      #1;
      checks++;
      if (int'(idx) != besti + 1 || int'(min_dist) != best) begin
        failures++;
        $display("FAIL t=%0d idx=%0d min=%0d expected %0d/%0d", t, idx, min_dist, besti+1, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
