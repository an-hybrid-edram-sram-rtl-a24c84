// Full-size test of the hybrid L1 cache with every parameter at its default
// (16 KB, 4 ways, 64-byte lines, 50,000-cycle retention, delayed writeback).
// 3,000 random loads and stores with two idle stretches of 60,000 cycles, so
// that sentry cells expire and the interval counter writes dirty dynamic
// blocks back; all loads are checked against a reference memory. See
// cache_lane.
module tb_hybrid_l1_cache_full;
  logic clk = 0, rst_n = 0;
  bit   done;
  int   checks, failures;

  always #5 clk = ~clk;
  initial #23 rst_n = 1;

  cache_lane #(.FULL(1), .N_OPS(3000), .IDLE_EVERY(1000), .IDLE_CYCLES(60000), .SEED(5)) lane (
    .clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures));

  initial begin
    int n;
    n = 0;
    while (!done && n < 400000) begin @(posedge clk); n++; end
    if (!done) begin
      $display("watchdog: lane did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
