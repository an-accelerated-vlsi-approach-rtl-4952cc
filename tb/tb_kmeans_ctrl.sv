// Testbench for kmeans_ctrl: a model of the feature buffers (a write count
// and a read pointer) and a scripted `moved` input. Checks the number of
// reads per pass, N + 2 cycles per pass when data is present, back-to-back
// passes, stalls while the buffers fill, the rewind, and the two ways a run
// ends (no centre moved, or max_iter passes).
module tb_kmeans_ctrl;
  localparam int CNT_W = 9, ITER_W = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [CNT_W-1:0] n_points = '0;
  logic [ITER_W-1:0] max_iter = '0;
  logic fifo_empty, moved_any = 0;
  logic load_centers, rd_en, rewind, v_rd, v_dist, acc_clear;
  logic div_en, div_flag, stall, busy, done, converged;
  logic [ITER_W-1:0] iterations;
  int checks = 0, failures = 0;

  // buffer model
  int written = 0, rdptr = 0;
  assign fifo_empty = (rdptr >= written);

  kmeans_ctrl dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, reads = 0, accs = 0, divs = 0, stalls = 0;
  int div_cycles [$];
  int first_read = -1;
  always @(posedge clk) begin
    cyc++;
    if (rd_en) begin
      if (first_read < 0) first_read = cyc;
      reads++;
    end
    if (rewind) rdptr <= 0; else if (rd_en) rdptr <= rdptr + 1;
    if (v_dist) accs++;
    if (div_flag) begin divs++; div_cycles.push_back(cyc); end
    if (stall) stalls++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reset_counts();
    reads = 0; accs = 0; divs = 0; stalls = 0; first_read = -1;
    div_cycles.delete();
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

    // run 1: 10 points already written, centres keep moving, limit 4 passes
    written = 10;
    @(negedge clk);
    reset_counts();
    n_points = 10; max_iter = 4; moved_any = 1;
    start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    check(iterations == 4 && !converged, "run 1 stopped by the iteration limit");
    check(reads == 40 && accs == 40 && divs == 4, $sformatf("run 1 reads %0d accs %0d divs %0d", reads, accs, divs));
    check(stalls == 0, "run 1 no stall");
    for (int i = 0; i < 4; i++)
      check(div_cycles[i] - first_read == (i + 1) * 12,
            $sformatf("run 1 pass %0d ends after N+2 cycles (%0d)", i, div_cycles[i] - first_read));

    // run 2: buffers filling one point every 3 cycles, converges on pass 3
    written = 0;
    @(negedge clk);
    reset_counts();
    n_points = 8; max_iter = 18; moved_any = 1;
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 8; i++) begin
      repeat (3) @(negedge clk);
      written++;
    end
    wait (divs == 2); @(negedge clk);
    moved_any = 0;
    wait (done); @(negedge clk);
    check(iterations == 3 && converged, "run 2 stopped on convergence");
    check(reads == 24 && accs == 24, $sformatf("run 2 reads %0d accs %0d", reads, accs));
    check(stalls > 0, "run 2 stalled while the buffers filled");
    check(div_cycles[2] - div_cycles[1] == 10, "run 2 later passes take N+2 cycles");
    check(!busy && !rd_en, "idle after done");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
