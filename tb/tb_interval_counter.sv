// Self-checking test of the interval counter: with 2 sets x 3 dynamic ways and
// a retention of 60 cycles the counter must owe one check every 10 cycles,
// name the blocks in circular order (set 0 ways 1..3, set 1 ways 1..3, then
// set 0 again), keep counting owed checks while none is acknowledged, and do
// nothing while disabled.
module tb_interval_counter;
  localparam int SETS = 2, WAYS = 4, RET = 60, INTERVAL = 10;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, en, chk_ack, chk_pending;
  logic [0:0] chk_set;
  logic [1:0] chk_way;

  interval_counter #(.SETS(SETS), .WAYS(WAYS), .RETENTION_CYCLES(RET)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int cyc, first;
    en = 1; chk_ack = 0;
    #12 rst_n = 1;
    // first owed check appears INTERVAL cycles after reset
    cyc = 0;
    while (!chk_pending && cyc < 100) begin @(posedge clk); #1; cyc++; end
    chk("first check after INTERVAL", cyc == INTERVAL);
    // serve 8 checks immediately, verify order and spacing
    for (int k = 0; k < 8; k++) begin
      int exp_set, exp_way;
      exp_set = (k / 3) % SETS;
      exp_way = 1 + k % 3;
      chk("circular order", chk_set == 1'(exp_set) && chk_way == 2'(exp_way));
      chk_ack = 1; @(posedge clk); #1; chk_ack = 0;
      chk("pending cleared by ack", !chk_pending);
      cyc = 1;
      while (!chk_pending && cyc < 100) begin @(posedge clk); #1; cyc++; end
      chk("spacing INTERVAL", cyc == INTERVAL);
    end
    // no acknowledgement for 3 intervals: three more checks owed
    repeat (3 * INTERVAL) @(posedge clk);
    #1;
    first = 0;
    while (chk_pending && first < 10) begin
      chk_ack = 1; @(posedge clk); #1; chk_ack = 0; first++;
    end
    chk("backlog of owed checks", first == 4);
    // disabled: nothing becomes owed
    en = 0;
    repeat (5 * INTERVAL) @(posedge clk);
    #1;
    chk("disabled counter idle", !chk_pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
