// Testbench for kmeans_counter: random count_en and cluster indices with
// clears; expected counts are kept in the testbench and checked one cycle
// after each enable.
module tb_kmeans_counter;
  localparam int CLUSTERS = 6;
  localparam int CNT_W    = 9;

  logic clk = 0, rst_n = 0, clear = 0, count_en = 0;
  logic [2:0] idx = '0;
  logic [CLUSTERS-1:0][CNT_W-1:0] cnt;
  int checks = 0, failures = 0;
  int model [CLUSTERS];

  kmeans_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[c]) model[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear    = (t % 900 == 899);
      count_en = ($urandom_range(0, 3) != 0);
      idx      = 3'($urandom_range(0, 7));
      if (clear) foreach (model[c]) model[c] = 0;
      if (count_en && idx >= 1 && idx <= CLUSTERS) model[idx-1]++;
      @(posedge clk); #1;
      for (int c = 0; c < CLUSTERS; c++) begin
        checks++;
        if (int'(cnt[c]) != model[c]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d c=%0d cnt=%0d expected %0d", t, c, cnt[c], model[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
