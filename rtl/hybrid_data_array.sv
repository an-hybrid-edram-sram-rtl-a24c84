// Data array of the hybrid cache: SETS rows of n-bit macrocells.
//
// Each row holds one line per way: way-0 in the static cells, ways 1..WAYS-1 in
// the dynamic cells of the same macrocells. A row decoder selects the row
// addressed by `idx` and passes the static wordline, the dynamic wordlines and
// the bridge enables to it; bit lines (write data, read data) are shared by all
// rows and the read data of the selected row is multiplexed out. The array
// also keeps the free-running cycle count that serves as time base for the
// charge leakage of the macrocell model.
//
// Timing: reads are combinational from idx; writes, dynamic reads (which
// destroy the charge) and bridge transfers happen at the rising edge. One
// operation class per cycle is expected from the controller.
// Organisation (one static and n-1 dynamic ways per macrocell row, shared
// decoder) follows the design; port layout and the time base are this
// implementation's own.
module hybrid_data_array #(
  parameter int unsigned WAYS                    = 4,
  parameter int unsigned SETS                    = 64,
  parameter int unsigned LINE_BITS               = 512,
  parameter int unsigned RETENTION_CYCLES        = 50000,
  parameter int unsigned SENTRY_RETENTION_CYCLES = 45000,
  parameter int unsigned IDX_W                   = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IDX_W-1:0]     idx,
  input  logic                 wl_s,
  input  logic                 s_we,
  input  logic [LINE_BITS-1:0] s_wdata,
  output logic [LINE_BITS-1:0] s_rdata,
  input  logic [WAYS-1:1]      wl_d,
  input  logic                 d_we,
  input  logic [LINE_BITS-1:0] d_wdata,
  output logic [LINE_BITS-1:0] d_rdata,
  input  logic [WAYS-1:1]      s2d,
  output logic [WAYS-1:1]      sentry_alive
);

  logic [31:0]          now;
  logic [SETS-1:0]      row_wl_s;
  logic [WAYS-1:1]      row_wl_d   [SETS];
  logic [WAYS-1:1]      row_s2d    [SETS];
  logic [LINE_BITS-1:0] row_s_rdata[SETS];
  logic [LINE_BITS-1:0] row_d_rdata[SETS];
  logic [WAYS-1:1]      row_sentry [SETS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 32'd1;

  row_decoder #(.SETS(SETS), .WAYS(WAYS), .IDX_W(IDX_W)) u_dec (
    .idx     (idx),
    .wl_s_in (wl_s),
    .wl_d_in (wl_d),
    .s2d_in  (s2d),
    .wl_s    (row_wl_s),
    .wl_d    (row_wl_d),
    .s2d     (row_s2d)
  );

  for (genvar r = 0; r < SETS; r++) begin : g_row
    macrocell_row #(
      .WAYS                   (WAYS),
      .WIDTH                  (LINE_BITS),
      .RETENTION_CYCLES       (RETENTION_CYCLES),
      .SENTRY_RETENTION_CYCLES(SENTRY_RETENTION_CYCLES)
    ) u_row (
      .clk          (clk),
      .rst_n        (rst_n),
      .now          (now),
      .wl_s         (row_wl_s[r]),
      .s_we         (s_we),
      .s_wdata      (s_wdata),
      .s_rdata      (row_s_rdata[r]),
      .wl_d         (row_wl_d[r]),
      .d_we         (d_we),
      .d_wdata      (d_wdata),
      .d_rdata      (row_d_rdata[r]),
      .s2d          (row_s2d[r]),
      .sentry_alive (row_sentry[r])
    );
  end

  // read mux of the shared bit lines
  assign s_rdata      = row_s_rdata[idx];
  assign d_rdata      = row_d_rdata[idx];
  assign sentry_alive = row_sentry[idx];

endmodule
