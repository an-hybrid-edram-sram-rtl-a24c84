// One self-checking test lane for the hybrid L1 cache: the cache, a
// behavioural L2 and a processor-side driver with a reference memory.
//
// The driver issues N_OPS random loads and stores (byte strobes) with a mix of
// re-use of recent lines and conflicting lines of the same sets, so that
// static hits, dynamic hits, misses and evictions all occur. Every IDLE_EVERY
// operations it stays idle for IDLE_CYCLES cycles, long enough for sentry
// cells and capacitors to lose their charge and for the interval counter to
// visit every dynamic block. Each load is compared with the reference memory;
// static and dynamic hit latencies are checked against 1 and
// 1 + DYN_ACCESS_CYCLES cycles. Every mechanism the cache has is counted, and
// a mechanism that the configured policy should show but never showed counts
// as a failure. FULL = 1 instantiates the cache with all its defaults.
module cache_lane
  import hdc_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter bit          FULL              = 0,
  parameter wb_policy_e  POLICY            = WB_DELAYED,
  parameter int unsigned WAYS              = 4,
  parameter int unsigned DYN               = 1,
  parameter int unsigned CACHE_BYTES       = 2048,
  parameter int unsigned RET               = 1000,
  parameter int unsigned CELL_RET          = 1100,
  parameter int unsigned SENTRY_RET        = 800,
  parameter int unsigned N_OPS             = 4000,
  parameter int unsigned IDLE_EVERY        = 400,
  parameter int unsigned IDLE_CYCLES       = 1500,
  parameter int unsigned SEED              = 1
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);
  localparam int LBYTES = 64;
  localparam int EFF_CACHE = FULL ? 16384 : CACHE_BYTES;
  localparam int EFF_DYN   = FULL ? 1 : DYN;
  localparam wb_policy_e EFF_POL = FULL ? WB_DELAYED : POLICY;
  localparam int EFF_WAYS  = FULL ? 4 : WAYS;
  localparam int SETS   = EFF_CACHE / (LBYTES * EFF_WAYS);
  localparam int OFF_W  = 6;
  localparam int IDX_W  = $clog2(SETS);
  localparam int NTAGS  = EFF_WAYS + 3;

  logic          req_valid, req_ready, req_we, resp_valid;
  logic [31:0]   req_addr;
  logic [63:0]   req_wdata, resp_rdata;
  logic [7:0]    req_wstrb;
  logic          fill_req_valid, fill_req_ready, fill_resp_valid, wb_valid, wb_ready;
  logic [31:0]   fill_req_addr, wb_addr;
  logic [511:0]  fill_resp_data, wb_data;
  wb_kind_e      wb_kind;
  hdc_events_t   ev;
  int            n_fills;
  int            n_wb [3];

  if (FULL) begin : g_full
    hybrid_l1_cache dut (.*);
  end else begin : g_small
    hybrid_l1_cache #(
      .WAYS                    (WAYS),
      .CACHE_BYTES             (CACHE_BYTES),
      .DYN_ACCESS_CYCLES       (DYN),
      .RETENTION_CYCLES        (RET),
      .SENTRY_RETENTION_CYCLES (SENTRY_RET),
      .CELL_RETENTION_CYCLES   (CELL_RET),
      .POLICY                  (POLICY)
    ) dut (.*);
  end

  l2_model #(.LATENCY(10)) l2 (.*);

  // ---- mechanism counters ----------------------------------------------------
  int c_static, c_dyn, c_miss, c_s2d, c_repl, c_swap, c_spor, c_sweep, c_expired;
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (ev.static_hit)     c_static  <= c_static + 1;
    if (ev.dynamic_hit)    c_dyn     <= c_dyn + 1;
    if (ev.miss)           c_miss    <= c_miss + 1;
    if (ev.s2d_move)       c_s2d     <= c_s2d + 1;
    if (ev.wb_replacement) c_repl    <= c_repl + 1;
    if (ev.wb_swap)        c_swap    <= c_swap + 1;
    if (ev.wb_sporadic)    c_spor    <= c_spor + 1;
    if (ev.sweep_check)    c_sweep   <= c_sweep + 1;
    if (ev.sentry_expired) c_expired <= c_expired + 1;
  end

  // ---- reference memory ------------------------------------------------------
  logic [63:0] gold [logic [31:0]];
  function automatic logic [63:0] gold_word(input logic [31:0] a);
    return gold.exists(a) ? gold[a] : init_word(a);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL [lane ways=%0d pol=%0d dyn=%0d] %s", EFF_WAYS, EFF_POL, EFF_DYN, msg);
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) fail({"mechanism never happened: ", what});
  endtask

  task automatic never(string what, int count);
    checks++;
    if (count != 0) fail({"mechanism must not happen under this policy: ", what});
  endtask

  logic [31:0] recent [4];

  initial begin
    int unsigned rs;
    rs = $urandom(SEED);
    cyc = 0; c_static = 0; c_dyn = 0; c_miss = 0; c_s2d = 0; c_repl = 0; c_swap = 0;
    c_spor = 0; c_sweep = 0; c_expired = 0;
    done = 0; checks = 0; failures = 0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wstrb = 0;
    foreach (recent[i]) recent[i] = 0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int n = 0; n < int'(N_OPS); n++) begin
      logic [31:0] line, a;
      bit          st, is_s, is_d;
      int          acc, lat;
      if (n % 8 < 5) line = recent[$urandom_range(3)];
      else begin
        line = (32'($urandom_range(NTAGS - 1)) << (OFF_W + IDX_W)) |
               (32'($urandom_range(SETS - 1)) << OFF_W);
        recent[$urandom_range(3)] = line;
      end
      a  = line | (32'($urandom_range(7)) << 3);
      st = ($urandom_range(9) < 4);
      req_valid = 1; req_we = st; req_addr = a;
      req_wdata = {$urandom, $urandom}; req_wstrb = st ? 8'($urandom) | 8'h01 : 8'h00;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      is_s = ev.static_hit; is_d = ev.dynamic_hit;
      acc  = cyc;
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!resp_valid && lat < 200) begin @(negedge clk); lat++; end
      lat = cyc - acc;
      checks++;
      if (!resp_valid) fail($sformatf("no response for op %0d", n));
      if (is_s) begin
        checks++;
        if (lat != 1) fail($sformatf("static hit latency %0d, expected 1", lat));
      end
      if (is_d) begin
        checks++;
        if (lat != 1 + EFF_DYN) fail($sformatf("dynamic hit latency %0d, expected %0d", lat, 1 + EFF_DYN));
      end
      if (!is_s && !is_d) begin
        checks++;
        if (lat < 12) fail($sformatf("miss answered in %0d cycles, faster than L2", lat));
      end
      if (st) begin
        logic [63:0] g;
        g = gold_word(a);
        for (int b = 0; b < 8; b++) if (req_wstrb[b]) g[b*8 +: 8] = req_wdata[b*8 +: 8];
        gold[a] = g;
      end else begin
        checks++;
        if (resp_rdata !== gold_word(a))
          fail($sformatf("load %h returned %h expected %h (op %0d)", a, resp_rdata, gold_word(a), n));
      end
      if (n % int'(IDLE_EVERY) == int'(IDLE_EVERY) - 1) repeat (IDLE_CYCLES) @(negedge clk);
      else repeat ($urandom_range(2)) @(negedge clk);
    end
    need("static hit", c_static);
    need("dynamic hit (swap)", c_dyn);
    need("miss", c_miss);
    need("static-to-dynamic bridge move", c_s2d);
    need("replacement writeback", c_repl);
    need("sentry expired", c_expired);
    if (EFF_POL == WB_DELAYED) begin
      need("interval check", c_sweep);
      need("sporadic writeback", c_spor);
      never("swap writeback", c_swap);
    end else begin
      need("swap writeback", c_swap);
      never("sporadic writeback", c_spor);
      never("interval check", c_sweep);
    end
    checks++;
    if (n_wb[0] != c_repl || n_wb[1] != c_swap || n_wb[2] != c_spor)
      fail("writebacks seen by L2 differ from the cache's writeback events");
    $display("lane ways=%0d pol=%0d dyn=%0d: static=%0d dynamic=%0d miss=%0d s2d=%0d wb_repl=%0d wb_swap=%0d wb_sporadic=%0d checks_by_counter=%0d sentry_expired=%0d fills=%0d",
             EFF_WAYS, EFF_POL, EFF_DYN, c_static, c_dyn, c_miss, c_s2d, c_repl, c_swap, c_spor, c_sweep, c_expired, n_fills);
    done = 1;
  end
endmodule
