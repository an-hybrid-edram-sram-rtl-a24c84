// Self-checking test of the macrocell row model: static read/write, copy of
// the static line into a dynamic way by precharge + bridge, destructive
// dynamic read, the bridge's inability to charge a capacitor, write through
// BLd, leakage after the retention time and the sentry cell's shorter life.
module tb_macrocell_row;
  localparam int WAYS = 4, W = 16, RET = 20, SRET = 15;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic [31:0]     now;
  logic            wl_s, s_we, d_we;
  logic [W-1:0]    s_wdata, s_rdata, d_wdata, d_rdata;
  logic [WAYS-1:1] wl_d, s2d, sentry_alive;

  macrocell_row #(.WAYS(WAYS), .WIDTH(W), .RETENTION_CYCLES(RET),
                  .SENTRY_RETENTION_CYCLES(SRET)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= 0; else now <= now + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    wl_s = 0; s_we = 0; d_we = 0; wl_d = 0; s2d = 0; s_wdata = 0; d_wdata = 0;
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // copy the static line into way w: precharge and bridge in one cycle
  task automatic move(int w);
    idle(); wl_d[w] = 1; d_we = 1; d_wdata = '1; s2d[w] = 1; step(); idle();
  endtask

  task automatic dread(int w, output logic [W-1:0] v);
    idle(); wl_d[w] = 1; #1 v = d_rdata; step(); idle();
  endtask

  task automatic swrite(logic [W-1:0] v);
    idle(); wl_s = 1; s_we = 1; s_wdata = v; step(); idle();
  endtask

  logic [W-1:0] v;

  initial begin
    idle();
    #12 rst_n = 1;
    step();
    // static cell
    swrite(16'hA5C3);
    check("static read", s_rdata, 16'hA5C3);
    check("static read not destructive", s_rdata, 16'hA5C3);
    // static write needs the wordline
    idle(); s_we = 1; s_wdata = 16'h1111; step(); idle();
    check("static write without WL_s ignored", s_rdata, 16'hA5C3);
    // bridge copy into way 2 (write 0 and write 1 bits at once)
    move(2);
    checks++; if (sentry_alive !== 3'b010) begin failures++; $display("FAIL sentry after move %b", sentry_alive); end
    check("static unchanged by bridge", s_rdata, 16'hA5C3);
    dread(2, v);
    check("dynamic read after S2D", v, 16'hA5C3);
    checks++; if (sentry_alive[2] !== 0) begin failures++; $display("FAIL sentry survived read"); end
    dread(2, v);
    check("second dynamic read is destroyed", v, 16'h0000);
    // precharge then bridge in separate cycles
    swrite(16'h0F0F);
    idle(); wl_d[1] = 1; d_we = 1; d_wdata = '1; step(); idle();
    idle(); s2d[1] = 1; step(); idle();
    dread(1, v);
    check("precharge then bridge", v, 16'h0F0F);
    // bridge cannot charge: a discharged way stays discharged
    idle(); wl_d[3] = 1; d_we = 1; d_wdata = 16'h0000; step(); idle();
    swrite(16'hFFFF);
    idle(); s2d[3] = 1; step(); idle();
    dread(3, v);
    check("bridge cannot raise charge", v, 16'h0000);
    // write through BLd
    idle(); wl_d[3] = 1; d_we = 1; d_wdata = 16'h3C3C; step(); idle();
    dread(3, v);
    check("write through BLd", v, 16'h3C3C);
    // retention: sentry dies after SRET cycles, data after RET cycles
    swrite(16'hBEEF);
    move(1);
    move(3);
    repeat (SRET - 2) step();
    checks++; if (sentry_alive[1] !== 1) begin failures++; $display("FAIL sentry died early"); end
    repeat (3) step();
    checks++; if (sentry_alive[1] !== 0) begin failures++; $display("FAIL sentry outlived its retention"); end
    dread(1, v);
    check("data still held after sentry died", v, 16'hBEEF);
    repeat (RET) step();
    dread(3, v);
    check("data lost after retention", v, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
