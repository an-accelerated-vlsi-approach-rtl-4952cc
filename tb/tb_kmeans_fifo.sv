// Testbench for kmeans_fifo: write-then-read one cycle later, order of the
// words, registered read latency, empty/full flags, rewind (replay of the
// same words) and clear. Expected values come from a queue model.
module tb_kmeans_fifo;
  localparam int DEPTH = 256;
  localparam int WIDTH = 16;

  logic clk = 0, rst_n = 0;
  logic clear = 0, wr_en = 0, rd_en = 0, rewind = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] words [DEPTH];

  kmeans_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) words[i] = WIDTH'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && level == 0, "empty after reset");

    // streaming: write word i in cycle i, read it in cycle i+1
    for (int i = 0; i <= 40; i++) begin
      wr_en   = (i < 40);
      wr_data = words[i % DEPTH];
      rd_en   = (i > 0);
      @(posedge clk); #1;
      if (i > 0) check(rd_data == words[i-1], $sformatf("stream word %0d", i-1));
      @(negedge clk);
    end
    wr_en = 0; rd_en = 0;
    check(empty, "empty after reading everything written");

    // rewind replays the same words
    rewind = 1; @(negedge clk); rewind = 0;
    check(!empty && level == 40, "rewind makes data readable again");
    for (int i = 0; i < 40; i++) begin
      rd_en = 1; rewind = (i == 39);
      @(posedge clk); #1;
      check(rd_data == words[i], $sformatf("replay word %0d", i));
      @(negedge clk);
    end
    rd_en = 0; rewind = 0;
    check(!empty, "read with rewind on the last word restarts at word 0");
    rd_en = 1; @(posedge clk); #1; rd_en = 0;
    check(rd_data == words[0], "word 0 after rewind-with-read");
    @(negedge clk);

    // fill to full
    clear = 1; @(negedge clk); clear = 0;
    check(empty && level == 0, "clear empties");
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_data = words[i]; @(negedge clk);
    end
    wr_en = 0;
    check(full && level == DEPTH, "full after DEPTH writes");
    for (int i = 0; i < DEPTH; i++) begin
      rd_en = 1; @(posedge clk); #1;
      check(rd_data == words[i], $sformatf("full-depth word %0d", i));
      @(negedge clk);
    end
    rd_en = 0;
    check(empty && full, "all read: empty, still holding DEPTH words");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
