// Directed test of the cache controller, wired to the real tag array, lookup,
// macrocell data array and interval counter and to a behavioural L2, in a
// 2-set, 4-way configuration with the delayed writeback policy. It walks one
// set through every sequence the controller has and checks each step exactly:
// cold miss without a bridge move, one-cycle static hit, miss that moves the
// static block down, two-cycle dynamic hit with the three-cycle swap and the
// data that travelled through the bridge, LRU eviction of a dirty dynamic
// block with its replacement writeback, refetch of the written-back data, and
// a sporadic writeback by the interval counter followed by a miss that
// returns the saved data.
module tb_cache_controller;
  import hdc_pkg::*;
  import tb_mem_pkg::*;

  localparam int WAYS = 4, SETS = 2, LB = 512, AW = 32, IDX_W = 1, TAG_W = 25, WAY_W = 2;
  localparam int RET = 20000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    req_valid, req_ready, req_we, resp_valid;
  logic [AW-1:0]           req_addr;
  logic [63:0]             req_wdata, resp_rdata;
  logic [7:0]              req_wstrb;
  logic                    fill_req_valid, fill_req_ready, fill_resp_valid, wb_valid, wb_ready;
  logic [AW-1:0]           fill_req_addr, wb_addr;
  logic [LB-1:0]           fill_resp_data, wb_data;
  wb_kind_e                wb_kind;
  hdc_events_t             ev;
  int                      n_fills;
  int                      n_wb [3];

  logic [IDX_W-1:0]           ta_idx, da_idx, ic_set;
  logic [WAYS-1:0]            ta_valid, ta_dirty, ta_wr_valid, ta_wr_dirty;
  logic [WAYS-1:0][TAG_W-1:0] ta_tag, ta_wr_tag;
  logic [WAYS-1:0][WAY_W-1:0] ta_ptr, ta_age, ta_wr_ptr, ta_wr_age;
  logic                       ta_we;
  logic [TAG_W-1:0]           lk_tag;
  logic                       lk_static_hit, lk_dynamic_hit, lk_sentry_expired, lk_victim_dirty;
  logic [WAY_W-1:0]           lk_hit_entry, lk_hit_way, lk_mru_entry, lk_victim_entry, lk_victim_way;
  logic                       da_wl_s, da_s_we, da_d_we;
  logic [LB-1:0]              da_s_wdata, da_s_rdata, da_d_wdata, da_d_rdata;
  logic [WAYS-1:1]            da_wl_d, da_s2d, da_sentry;
  logic                       ic_pending, ic_ack;
  logic [WAY_W-1:0]           ic_way;

  cache_controller #(.WAYS(WAYS), .SETS(SETS), .POLICY(WB_DELAYED)) dut (.*);

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n, .rd_idx(ta_idx), .rd_valid(ta_valid), .rd_dirty(ta_dirty), .rd_tag(ta_tag),
    .rd_ptr(ta_ptr), .rd_age(ta_age), .we(ta_we), .wr_idx(ta_idx), .wr_valid(ta_wr_valid),
    .wr_dirty(ta_wr_dirty), .wr_tag(ta_wr_tag), .wr_ptr(ta_wr_ptr), .wr_age(ta_wr_age));

  way_lookup #(.WAYS(WAYS), .TAG_W(TAG_W)) u_lookup (
    .req_tag(lk_tag), .valid(ta_valid), .dirty(ta_dirty), .tag(ta_tag), .ptr(ta_ptr), .age(ta_age),
    .sentry_alive(da_sentry), .static_hit(lk_static_hit), .dynamic_hit(lk_dynamic_hit),
    .hit_entry(lk_hit_entry), .hit_way(lk_hit_way), .sentry_expired(lk_sentry_expired),
    .mru_entry(lk_mru_entry), .victim_entry(lk_victim_entry), .victim_way(lk_victim_way),
    .victim_dirty(lk_victim_dirty));

  hybrid_data_array #(.WAYS(WAYS), .SETS(SETS), .LINE_BITS(LB), .RETENTION_CYCLES(RET + 500),
                      .SENTRY_RETENTION_CYCLES(RET - 2000)) u_data (
    .clk, .rst_n, .idx(da_idx), .wl_s(da_wl_s), .s_we(da_s_we), .s_wdata(da_s_wdata),
    .s_rdata(da_s_rdata), .wl_d(da_wl_d), .d_we(da_d_we), .d_wdata(da_d_wdata),
    .d_rdata(da_d_rdata), .s2d(da_s2d), .sentry_alive(da_sentry));

  interval_counter #(.SETS(SETS), .WAYS(WAYS), .RETENTION_CYCLES(RET)) u_ic (
    .clk, .rst_n, .en(1'b1), .chk_ack(ic_ack), .chk_pending(ic_pending), .chk_set(ic_set),
    .chk_way(ic_way));

  l2_model #(.LATENCY(10)) l2 (.*);

  // event counters
  int c [9];
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (ev.static_hit)     c[0]++;
    if (ev.dynamic_hit)    c[1]++;
    if (ev.miss)           c[2]++;
    if (ev.s2d_move)       c[3]++;
    if (ev.wb_replacement) c[4]++;
    if (ev.wb_swap)        c[5]++;
    if (ev.wb_sporadic)    c[6]++;
    if (ev.sweep_check)    c[7]++;
    if (ev.sentry_expired) c[8]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // one request; returns data, latency and the cycles until ready again
  task automatic op(input bit we, input logic [31:0] a, input logic [63:0] d,
                    output logic [63:0] rd, output int lat, output int busy);
    int acc;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_wstrb = we ? 8'hFF : 8'h00;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    acc = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - acc;
    rd  = resp_rdata;
    while (!req_ready) @(negedge clk);
    busy = cyc - acc;
  endtask

  function automatic logic [31:0] L(int t);  // line t of set 0
    return 32'(t) << 7;
  endfunction

  int snap [9];
  function automatic int delta(int k); return c[k] - snap[k]; endfunction

  initial begin
    logic [63:0] rd;
    int lat, busy;
    cyc = 0;
    foreach (c[k]) c[k] = 0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wstrb = 0;
    #23 rst_n = 1;

    // 1: cold miss, nothing to move
    snap = c; op(0, L(1) + 8, 0, rd, lat, busy);
    expect_eq("cold miss data", rd, init_word(L(1) + 8));
    expect_eq("cold miss counted", delta(2), 1);
    expect_eq("cold miss: no bridge move", delta(3), 0);
    expect_eq("one L2 fill", n_fills, 1);
    // 2: store hits the static way in one cycle
    snap = c; op(1, L(1) + 8, 64'h1111_2222_3333_4444, rd, lat, busy);
    expect_eq("static hit counted", delta(0), 1);
    expect_eq("static hit latency", lat, 1);
    expect_eq("static hit: ready next cycle", busy, 1);
    // 3: miss on another line moves the static (dirty) block down through the bridge
    snap = c; op(0, L(2), 0, rd, lat, busy);
    expect_eq("second miss", delta(2), 1);
    expect_eq("bridge move on miss", delta(3), 1);
    expect_eq("no writeback under delayed policy", delta(4) + delta(5), 0);
    // 4: dynamic hit on the moved dirty block
    snap = c; op(0, L(1) + 8, 0, rd, lat, busy);
    expect_eq("dynamic hit counted", delta(1), 1);
    expect_eq("dynamic hit data came through the bridge", rd, 64'h1111_2222_3333_4444);
    expect_eq("dynamic hit latency (tag cycle + access)", lat, 2);
    // tag cycle, then the three swap steps: read to buffer, S2D, buffer to static
    expect_eq("controller busy for tag check + three swap steps", busy, 4);
    expect_eq("swap moves the static block down", delta(3), 1);
    // 5: the block swapped down is still there
    snap = c; op(0, L(2), 0, rd, lat, busy);
    expect_eq("dynamic hit after swap", delta(1), 1);
    expect_eq("swapped-down data", rd, init_word(L(2)));
    // 6: fill the set; the fourth new line evicts the dirty LRU block L(1)
    op(0, L(3), 0, rd, lat, busy);
    op(0, L(4), 0, rd, lat, busy);
    snap = c; op(0, L(5), 0, rd, lat, busy);
    expect_eq("replacement writeback of dirty LRU", delta(4), 1);
    expect_eq("L2 holds the written-back word", l2.mem[L(1)][64 +: 64], 64'h1111_2222_3333_4444);
    // 7: refetch
    snap = c; op(0, L(1) + 8, 0, rd, lat, busy);
    expect_eq("refetch miss", delta(2), 1);
    expect_eq("refetched data", rd, 64'h1111_2222_3333_4444);
    // 8: dirty block left in a dynamic way is saved by the interval counter
    op(1, L(1) + 16, 64'hAAAA_BBBB_CCCC_DDDD, rd, lat, busy);
    op(0, L(6), 0, rd, lat, busy);       // L(1) moves down, dirty
    snap = c;
    repeat (RET + 200) @(negedge clk);
    expect_eq("interval counter visited all 6 dynamic blocks", delta(7) >= 6, 1);
    expect_eq("one sporadic writeback", delta(6), 1);
    expect_eq("L2 holds the sporadically written word", l2.mem[L(1)][128 +: 64], 64'hAAAA_BBBB_CCCC_DDDD);
    snap = c; op(0, L(1) + 16, 0, rd, lat, busy);
    expect_eq("block invalidated after sporadic writeback", delta(2), 1);
    expect_eq("data recovered from L2", rd, 64'hAAAA_BBBB_CCCC_DDDD);
    expect_eq("L2 writeback kinds", n_wb[0] * 100 + n_wb[1] * 10 + n_wb[2], 101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
