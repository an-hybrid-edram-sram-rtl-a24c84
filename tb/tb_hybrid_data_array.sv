// Self-checking test of the macrocell data array: per-row static storage,
// bridge moves into the dynamic ways of the addressed row only, destructive
// dynamic reads, sentry bits per row, and rows left untouched by operations on
// other rows. A reference copy of the array contents is kept in the testbench.
module tb_hybrid_data_array;
  localparam int WAYS = 4, SETS = 4, LB = 32;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic [1:0]      idx;
  logic            wl_s, s_we, d_we;
  logic [LB-1:0]   s_wdata, s_rdata, d_wdata, d_rdata;
  logic [WAYS-1:1] wl_d, s2d, sentry_alive;

  hybrid_data_array #(.WAYS(WAYS), .SETS(SETS), .LINE_BITS(LB),
                      .RETENTION_CYCLES(1000), .SENTRY_RETENTION_CYCLES(900)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LB-1:0] ref_s [SETS];
  logic [LB-1:0] ref_d [SETS][WAYS];
  bit            ref_ok[SETS][WAYS];

  task automatic idle();
    wl_s = 0; s_we = 0; d_we = 0; wl_d = 0; s2d = 0; s_wdata = 0; d_wdata = 0; idx = 0;
  endtask
  task automatic step(); @(posedge clk); #1; endtask
  task automatic check(string what, logic [LB-1:0] got, logic [LB-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    idle();
    #12 rst_n = 1;
    step();
    foreach (ref_ok[r, w]) ref_ok[r][w] = 0;
    // fill the static way of every row
    for (int r = 0; r < SETS; r++) begin
      ref_s[r] = $urandom;
      idle(); idx = 2'(r); wl_s = 1; s_we = 1; s_wdata = ref_s[r]; step();
    end
    // random mix of moves, static writes and dynamic reads
    for (int n = 0; n < 300; n++) begin
      int r, w, op;
      r  = $urandom_range(SETS - 1);
      w  = $urandom_range(WAYS - 1, 1);
      op = $urandom_range(2);
      idle(); idx = 2'(r);
      #1;
      check("static line", s_rdata, ref_s[r]);
      checks++;
      for (int k = 1; k < WAYS; k++)
        if (sentry_alive[k] !== ref_ok[r][k]) begin
          failures++; $display("FAIL sentry row %0d way %0d", r, k);
        end
      case (op)
        0: begin
          wl_d[w] = 1; d_we = 1; d_wdata = '1; s2d[w] = 1;
          ref_d[r][w] = ref_s[r]; ref_ok[r][w] = 1;
        end
        1: begin
          wl_s = 1; s_we = 1; s_wdata = $urandom; ref_s[r] = s_wdata;
        end
        default: begin
          wl_d[w] = 1; #1;
          check("dynamic read", d_rdata, ref_ok[r][w] ? ref_d[r][w] : '0);
          ref_ok[r][w] = 0;
        end
      endcase
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
