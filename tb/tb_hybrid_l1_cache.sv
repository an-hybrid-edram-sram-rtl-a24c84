// End-to-end test of the hybrid L1 cache with short retention times in six
// configurations side by side. At 2 KB: 4 ways with the delayed writeback
// policy and a 1-cycle dynamic access, 4 ways with the early policy and a
// 2-cycle dynamic access, and 2 ways (2-bit macrocells) with each policy. At
// 32 KB: 4 ways and 2 ways with the delayed policy. See cache_lane for what
// each lane checks.
module tb_hybrid_l1_cache;
  import hdc_pkg::*;
  logic clk = 0, rst_n = 0;
  localparam int N = 6;
  bit   done [N];
  int   checks [N], failures [N];

  always #5 clk = ~clk;
  initial #23 rst_n = 1;

  cache_lane #(.POLICY(WB_DELAYED), .DYN(1), .SEED(11)) lane_delayed (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  cache_lane #(.POLICY(WB_EARLY), .DYN(2), .SEED(23)) lane_early (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  cache_lane #(.WAYS(2), .POLICY(WB_DELAYED), .DYN(1), .SEED(37)) lane_2way_delayed (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  cache_lane #(.WAYS(2), .POLICY(WB_EARLY), .DYN(1), .SEED(41)) lane_2way_early (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(checks[3]), .failures(failures[3]));
  cache_lane #(.WAYS(4), .CACHE_BYTES(32768), .SEED(53)) lane_32k_4way (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(checks[4]), .failures(failures[4]));
  cache_lane #(.WAYS(2), .CACHE_BYTES(32768), .SEED(59)) lane_32k_2way (
    .clk(clk), .rst_n(rst_n), .done(done[5]), .checks(checks[5]), .failures(failures[5]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    int n, c, f;
    n = 0;
    while (!all_done() && n < 400000) begin @(posedge clk); n++; end
    c = 0; f = 0;
    foreach (checks[i]) begin c += checks[i]; f += failures[i]; end
    if (!all_done()) begin
      $display("watchdog: lanes did not finish");
      f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
