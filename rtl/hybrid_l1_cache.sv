// Hybrid eDRAM/SRAM first-level data cache (top level).
//
// An n-way set-associative data cache whose data array is made of n-bit
// macrocells: each macrocell stores one bit of way-0 in a static 6T cell and
// the same bit of ways 1..n-1 in dynamic 1T1C cells, with a bridge transistor
// that copies the static bit into a capacitor. Only the static way leaks, so
// a 4-way cache leaks about a quarter of an all-static one. The cache has no
// refresh logic: the controller keeps the MRU block of each set in the static
// way, touches dynamic cells only after a tag hit, and relies on a writeback
// policy (delayed by default, early as the alternative) so that no dirty data
// is lost when a capacitor discharges.
//
// Blocks: tag_array (static tags with data-way pointers and LRU ages),
// way_lookup (parallel tag compare, static/dynamic hit, victim choice),
// hybrid_data_array (row decoder + macrocell rows), interval_counter (global
// counter of the delayed policy) and cache_controller (sequencing).
//
// Default configuration: 16 KB, 4 ways, 64-byte lines (64 sets), 64-bit
// words, 32-bit addresses, 1-cycle static and 1-cycle dynamic data access,
// retention time 50,000 cycles, delayed writeback. Latencies seen by the
// processor: static hit 1 cycle, dynamic hit 1 + DYN_ACCESS_CYCLES cycles
// (the extra cycle is the tag check), miss: L2 latency plus the writeback and
// move steps. The cache is busy for two more cycles after a dynamic hit
// returns its data (the rest of the swap).
// RETENTION_CYCLES is the retention time the interval counter is built for
// (the guaranteed minimum of the cells); CELL_RETENTION_CYCLES is how long the
// modelled capacitors actually hold their charge. Dirty data is safe when the
// cells hold at least one full sweep of the counter plus the longest time the
// controller can keep an owed check waiting (a miss with a writeback, about
// 20 cycles plus the L2 latency).
// Interfaces: see cache_controller. All outputs are plain signals; `ev` carries
// one-cycle pulses of each mechanism for statistics.
module hybrid_l1_cache
  import hdc_pkg::*;
#(
  parameter int unsigned WAYS                    = 4,
  parameter int unsigned CACHE_BYTES             = 16384,
  parameter int unsigned LINE_BYTES              = 64,
  parameter int unsigned WORD_BYTES              = 8,
  parameter int unsigned ADDR_W                  = 32,
  parameter int unsigned DYN_ACCESS_CYCLES       = 1,
  parameter int unsigned RETENTION_CYCLES        = 50000,
  parameter int unsigned SENTRY_RETENTION_CYCLES = 45000,
  parameter int unsigned CELL_RETENTION_CYCLES   = RETENTION_CYCLES,
  parameter wb_policy_e  POLICY                  = WB_DELAYED,
  parameter int unsigned SETS                    = CACHE_BYTES / (LINE_BYTES * WAYS),
  parameter int unsigned LINE_BITS               = LINE_BYTES * 8,
  parameter int unsigned WORD_BITS               = WORD_BYTES * 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // processor side
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [ADDR_W-1:0]      req_addr,
  input  logic [WORD_BITS-1:0]   req_wdata,
  input  logic [WORD_BYTES-1:0]  req_wstrb,
  output logic                   resp_valid,
  output logic [WORD_BITS-1:0]   resp_rdata,
  // L2 line fill
  output logic                   fill_req_valid,
  input  logic                   fill_req_ready,
  output logic [ADDR_W-1:0]      fill_req_addr,
  input  logic                   fill_resp_valid,
  input  logic [LINE_BITS-1:0]   fill_resp_data,
  // L2 writeback
  output logic                   wb_valid,
  input  logic                   wb_ready,
  output logic [ADDR_W-1:0]      wb_addr,
  output logic [LINE_BITS-1:0]   wb_data,
  output wb_kind_e               wb_kind,
  // mechanism pulses
  output hdc_events_t            ev
);

  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);

  logic [IDX_W-1:0]           ta_idx;
  logic [WAYS-1:0]            ta_valid, ta_dirty;
  logic [WAYS-1:0][TAG_W-1:0] ta_tag;
  logic [WAYS-1:0][WAY_W-1:0] ta_ptr, ta_age;
  logic                       ta_we;
  logic [WAYS-1:0]            ta_wr_valid, ta_wr_dirty;
  logic [WAYS-1:0][TAG_W-1:0] ta_wr_tag;
  logic [WAYS-1:0][WAY_W-1:0] ta_wr_ptr, ta_wr_age;

  logic [TAG_W-1:0]           lk_tag;
  logic                       lk_static_hit, lk_dynamic_hit, lk_sentry_expired;
  logic [WAY_W-1:0]           lk_hit_entry, lk_hit_way, lk_mru_entry;
  logic [WAY_W-1:0]           lk_victim_entry, lk_victim_way;
  logic                       lk_victim_dirty;

  logic [IDX_W-1:0]           da_idx;
  logic                       da_wl_s, da_s_we, da_d_we;
  logic [LINE_BITS-1:0]       da_s_wdata, da_s_rdata, da_d_wdata, da_d_rdata;
  logic [WAYS-1:1]            da_wl_d, da_s2d, da_sentry;

  logic                       ic_pending, ic_ack;
  logic [IDX_W-1:0]           ic_set;
  logic [WAY_W-1:0]           ic_way;

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_idx   (ta_idx),
    .rd_valid (ta_valid),
    .rd_dirty (ta_dirty),
    .rd_tag   (ta_tag),
    .rd_ptr   (ta_ptr),
    .rd_age   (ta_age),
    .we       (ta_we),
    .wr_idx   (ta_idx),
    .wr_valid (ta_wr_valid),
    .wr_dirty (ta_wr_dirty),
    .wr_tag   (ta_wr_tag),
    .wr_ptr   (ta_wr_ptr),
    .wr_age   (ta_wr_age)
  );

  way_lookup #(.WAYS(WAYS), .TAG_W(TAG_W)) u_lookup (
    .req_tag        (lk_tag),
    .valid          (ta_valid),
    .dirty          (ta_dirty),
    .tag            (ta_tag),
    .ptr            (ta_ptr),
    .age            (ta_age),
    .sentry_alive   (da_sentry),
    .static_hit     (lk_static_hit),
    .dynamic_hit    (lk_dynamic_hit),
    .hit_entry      (lk_hit_entry),
    .hit_way        (lk_hit_way),
    .sentry_expired (lk_sentry_expired),
    .mru_entry      (lk_mru_entry),
    .victim_entry   (lk_victim_entry),
    .victim_way     (lk_victim_way),
    .victim_dirty   (lk_victim_dirty)
  );

  hybrid_data_array #(
    .WAYS                   (WAYS),
    .SETS                   (SETS),
    .LINE_BITS              (LINE_BITS),
    .RETENTION_CYCLES       (CELL_RETENTION_CYCLES),
    .SENTRY_RETENTION_CYCLES(SENTRY_RETENTION_CYCLES)
  ) u_data (
    .clk          (clk),
    .rst_n        (rst_n),
    .idx          (da_idx),
    .wl_s         (da_wl_s),
    .s_we         (da_s_we),
    .s_wdata      (da_s_wdata),
    .s_rdata      (da_s_rdata),
    .wl_d         (da_wl_d),
    .d_we         (da_d_we),
    .d_wdata      (da_d_wdata),
    .d_rdata      (da_d_rdata),
    .s2d          (da_s2d),
    .sentry_alive (da_sentry)
  );

  interval_counter #(.SETS(SETS), .WAYS(WAYS), .RETENTION_CYCLES(RETENTION_CYCLES)) u_interval (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (POLICY == WB_DELAYED),
    .chk_ack     (ic_ack),
    .chk_pending (ic_pending),
    .chk_set     (ic_set),
    .chk_way     (ic_way)
  );

  cache_controller #(
    .WAYS              (WAYS),
    .SETS              (SETS),
    .LINE_BYTES        (LINE_BYTES),
    .WORD_BYTES        (WORD_BYTES),
    .ADDR_W            (ADDR_W),
    .DYN_ACCESS_CYCLES (DYN_ACCESS_CYCLES),
    .POLICY            (POLICY)
  ) u_ctrl (
    .clk               (clk),
    .rst_n             (rst_n),
    .req_valid         (req_valid),
    .req_ready         (req_ready),
    .req_we            (req_we),
    .req_addr          (req_addr),
    .req_wdata         (req_wdata),
    .req_wstrb         (req_wstrb),
    .resp_valid        (resp_valid),
    .resp_rdata        (resp_rdata),
    .fill_req_valid    (fill_req_valid),
    .fill_req_ready    (fill_req_ready),
    .fill_req_addr     (fill_req_addr),
    .fill_resp_valid   (fill_resp_valid),
    .fill_resp_data    (fill_resp_data),
    .wb_valid          (wb_valid),
    .wb_ready          (wb_ready),
    .wb_addr           (wb_addr),
    .wb_data           (wb_data),
    .wb_kind           (wb_kind),
    .ta_idx            (ta_idx),
    .ta_valid          (ta_valid),
    .ta_dirty          (ta_dirty),
    .ta_tag            (ta_tag),
    .ta_ptr            (ta_ptr),
    .ta_age            (ta_age),
    .ta_we             (ta_we),
    .ta_wr_valid       (ta_wr_valid),
    .ta_wr_dirty       (ta_wr_dirty),
    .ta_wr_tag         (ta_wr_tag),
    .ta_wr_ptr         (ta_wr_ptr),
    .ta_wr_age         (ta_wr_age),
    .lk_tag            (lk_tag),
    .lk_static_hit     (lk_static_hit),
    .lk_dynamic_hit    (lk_dynamic_hit),
    .lk_hit_entry      (lk_hit_entry),
    .lk_hit_way        (lk_hit_way),
    .lk_sentry_expired (lk_sentry_expired),
    .lk_mru_entry      (lk_mru_entry),
    .lk_victim_entry   (lk_victim_entry),
    .lk_victim_way     (lk_victim_way),
    .lk_victim_dirty   (lk_victim_dirty),
    .da_idx            (da_idx),
    .da_wl_s           (da_wl_s),
    .da_s_we           (da_s_we),
    .da_s_wdata        (da_s_wdata),
    .da_s_rdata        (da_s_rdata),
    .da_wl_d           (da_wl_d),
    .da_d_we           (da_d_we),
    .da_d_wdata        (da_d_wdata),
    .da_d_rdata        (da_d_rdata),
    .da_s2d            (da_s2d),
    .ic_pending        (ic_pending),
    .ic_set            (ic_set),
    .ic_way            (ic_way),
    .ic_ack            (ic_ack),
    .ev                (ev)
  );

endmodule
