// Testbench for kmeans_accumulator: a random stream of points and cluster
// indices (with idle cycles and clears, including clear together with an
// accumulate); the expected sums are kept in integer arrays in the
// testbench. Each sum must be visible one cycle after its point.
module tb_kmeans_accumulator;
  localparam int CLUSTERS = 6;
  localparam int FEATURES = 7;
  localparam int DATA_W   = 16;
  localparam int ACC_W    = 24;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [2:0] idx = '0;
  logic [FEATURES-1:0][DATA_W-1:0] point = '0;
  logic [CLUSTERS-1:0][FEATURES-1:0][ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  int model [CLUSTERS][FEATURES];
  int hits  [CLUSTERS];

  kmeans_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[c, f]) model[c][f] = 0;
    foreach (hits[c]) hits[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear = (t % 700 == 699);
      en    = ($urandom_range(0, 3) != 0);
      idx   = 3'($urandom_range(0, 7));        // 0 and 7 select nothing
      for (int f = 0; f < FEATURES; f++) point[f] = DATA_W'($urandom);
      if (clear) foreach (model[c, f]) model[c][f] = 0;
      if (en && idx >= 1 && idx <= CLUSTERS) begin
        hits[idx-1]++;
        for (int f = 0; f < FEATURES; f++)
          model[idx-1][f] += int'($signed(point[f]));
      end
      @(posedge clk); #1;
      for (int c = 0; c < CLUSTERS; c++)
        for (int f = 0; f < FEATURES; f++) begin
          checks++;
          if (acc[c][f] != ACC_W'(model[c][f])) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0d c=%0d f=%0d acc=%0d expected %0d", t, c, f,
                       $signed(acc[c][f]), model[c][f]);
          end
        end
    end
    foreach (hits[c]) begin
      checks++;
      if (hits[c] == 0) begin failures++; $display("FAIL: cluster %0d never selected", c+1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
