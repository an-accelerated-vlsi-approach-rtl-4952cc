// Testbench for kmeans_dist: random points and centres, Manhattan distance
// computed with integer arithmetic in the testbench, one-cycle latency and
// the clock enable.
module tb_kmeans_dist;
  localparam int FEATURES = 7;
  localparam int DATA_W   = 16;
  localparam int DIST_W   = 19;

  logic clk = 0, rst_n = 0, en = 0;
  logic [FEATURES-1:0][DATA_W-1:0] point = '0, center = '0;
  logic [DIST_W-1:0] distance;
  int checks = 0, failures = 0;

  kmeans_dist dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_dist(input logic [FEATURES-1:0][DATA_W-1:0] p,
                                  input logic [FEATURES-1:0][DATA_W-1:0] c);
    int s = 0;
    for (int f = 0; f < FEATURES; f++) begin
      int a, b;
      a = int'($signed(p[f]));
      b = int'($signed(c[f]));
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int f = 0; f < FEATURES; f++) begin
        // alternate extreme values and ordinary ones
        point[f]  = (t % 50 == 0) ? 16'h8000 : DATA_W'($urandom);
        center[f] = (t % 50 == 0) ? 16'h7fff : DATA_W'($urandom);
      end
      en = 1;
      expected = ref_dist(point, center);
      @(posedge clk); #1;
      checks++;
      if (int'(distance) != expected) begin
        failures++;
        $display("FAIL t=%0d dist=%0d expected %0d", t, distance, expected);
      end
    end
    // clock enable low: output holds
    @(negedge clk);
    held = int'(distance);
    en = 0;
    point = ~point;
    @(posedge clk); #1;
    checks++;
    if (int'(distance) != held) begin failures++; $display("FAIL: en=0 did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
