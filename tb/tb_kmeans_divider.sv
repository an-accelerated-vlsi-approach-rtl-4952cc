// Testbench for kmeans_divider: loads an initial centre, then applies random
// sums and counts. The expected quotient is formed from magnitudes
// (|sum| / count, sign restored), i.e. truncation toward zero. Also checks
// that the register holds unless div_en and flag are both high, that an empty
// cluster keeps its centre, and the `moved` flag.
module tb_kmeans_divider;
  localparam int FEATURES = 7;
  localparam int DATA_W   = 16;
  localparam int ACC_W    = 24;
  localparam int CNT_W    = 9;

  logic clk = 0, rst_n = 0, load = 0, div_en = 0, flag = 0;
  logic [FEATURES-1:0][DATA_W-1:0] init_center = '0, nwcntr_reg;
  logic [FEATURES-1:0][ACC_W-1:0]  acc = '0;
  logic [CNT_W-1:0] cnt = '0;
  logic moved;
  int checks = 0, failures = 0;
  logic [FEATURES-1:0][DATA_W-1:0] expect_c;

  kmeans_divider dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < FEATURES; f++) init_center[f] = DATA_W'($urandom);
    load = 1; @(negedge clk); load = 0;
    check(nwcntr_reg == init_center, "load initial centre");
    expect_c = init_center;

    for (int t = 0; t < 2000; t++) begin
      int n;
      bit upd;
      n = (t % 10 == 0) ? 0 : $urandom_range(1, 256);
      cnt = CNT_W'(n);
      for (int f = 0; f < FEATURES; f++) begin
        // a sum of n Q6.10 words: n times a random word plus a remainder
        int w, r;
        w = int'($signed(DATA_W'($urandom)));
        r = (n > 0) ? $urandom_range(0, n - 1) : 0;
        acc[f] = ACC_W'(w * n + ((w >= 0) ? r : -r));
      end
      div_en = ($urandom_range(0, 4) != 0);
      flag   = ($urandom_range(0, 2) != 0);
      upd = div_en && flag && n > 0;
      #1;
      if (upd) begin
        logic [FEATURES-1:0][DATA_W-1:0] q;
        for (int f = 0; f < FEATURES; f++) begin
          int a, mag;
          a = int'($signed(acc[f]));
          mag = ((a < 0) ? -a : a) / n;
          q[f] = DATA_W'((a < 0) ? -mag : mag);
        end
        check(moved == (q != expect_c), $sformatf("moved flag t=%0d", t));
        expect_c = q;
      end else begin
        check(moved == 1'b0, $sformatf("no move without update t=%0d", t));
      end
      @(negedge clk);
      check(nwcntr_reg == expect_c, $sformatf("centre register t=%0d", t));
    end
    // repeated identical update: no move
    cnt = 9'd1;
    for (int f = 0; f < FEATURES; f++) acc[f] = ACC_W'($signed(expect_c[f]));
    div_en = 1; flag = 1; #1;
    check(!moved, "same centre: not moved");
    @(negedge clk);
    div_en = 0; flag = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
