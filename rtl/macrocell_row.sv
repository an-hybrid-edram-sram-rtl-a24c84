// Behavioural model of one row of n-bit hybrid macrocells (not synthesizable
// silicon: the real part is a custom analog cell; this is a cycle-level model
// of what it stores and when it forgets).
//
// Every column of the row is one macrocell: a static 6T bit (way-0) read and
// written through its bit-line pair, and WAYS-1 dynamic 1T1C bits (ways 1..n-1),
// each behind a pass transistor on its own wordline WL_d and the shared bit
// line BLd. A unidirectional bridge transistor, gated by S2D, connects the
// static node to a capacitor, so a static line can be copied into a dynamic way
// without using any bit line. The whole row shares the wordlines, so the model
// handles WIDTH columns at once, i.e. one cache line per way.
//
// What the model reproduces:
//  * static reads are non-destructive (s_rdata is the stored line, read at any time);
//  * a dynamic read (wl_d[w] high, d_we low) senses the capacitors onto BLd
//    and destroys them: from the next cycle the way reads as discharged (0);
//  * a dynamic write (wl_d[w] and d_we) charges the capacitors to d_wdata;
//    writing all ones is the precharge to Vdd that must precede a bridge
//    transfer so the static cell cannot flip;
//  * the bridge (s2d[w]) can only discharge a capacitor: a capacitor keeps its
//    charge where the static bit is 1 and is pulled to 0 where it is 0. Issued
//    in the same cycle as the precharge, precharge comes first, so the net
//    effect is a copy of the static line into way w;
//  * charge leaks: RETENTION_CYCLES cycles after it was last written, a dynamic
//    way reads as all zeros;
//  * each dynamic way has a sentry cell, a smaller 1T1C valid bit charged
//    together with the way, which loses its charge after SENTRY_RETENTION_CYCLES
//    (chosen shorter than the data retention) or when the way is read. Sensing
//    the sentry is assumed not to disturb it.
//
// Interface: static port wl_s/s_we/s_wdata/s_rdata, dynamic port
// wl_d/d_we/d_wdata/d_rdata, bridge controls s2d, all active high and acting at
// the rising clock edge; reads are combinational. `now` is a free-running
// cycle count shared by all rows, used as the time base of the leakage.
// The single-bit-per-way organisation, the bridge and the precharge follow the
// cell design; cycle-based retention, reads of lost charge as 0 and the sentry
// timing are this model's own choices. Reset only clears the charge state
// (all ways discharged, static cells 0) so that simulation starts defined.
module macrocell_row #(
  parameter int unsigned WAYS                    = 4,
  parameter int unsigned WIDTH                   = 512,
  parameter int unsigned RETENTION_CYCLES        = 50000,
  parameter int unsigned SENTRY_RETENTION_CYCLES = 45000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         now,
  // static cell (way-0), bit lines BLs and /BLs
  input  logic                wl_s,
  input  logic                s_we,
  input  logic [WIDTH-1:0]    s_wdata,
  output logic [WIDTH-1:0]    s_rdata,
  // dynamic cells (ways 1..WAYS-1), bit line BLd
  input  logic [WAYS-1:1]     wl_d,
  input  logic                d_we,
  input  logic [WIDTH-1:0]    d_wdata,
  output logic [WIDTH-1:0]    d_rdata,
  // bridge
  input  logic [WAYS-1:1]     s2d,
  // sentry valid cells of the dynamic ways
  output logic [WAYS-1:1]     sentry_alive
);

  logic [WIDTH-1:0] sram;
  logic [WIDTH-1:0] cap     [WAYS-1:1];
  logic             charged [WAYS-1:1];
  logic [31:0]      stamp   [WAYS-1:1];
  logic [WAYS-1:1]  data_ok;

  always_comb begin
    for (int w = 1; w < WAYS; w++) begin
      data_ok[w]      = charged[w] && ((now - stamp[w]) <= RETENTION_CYCLES);
      sentry_alive[w] = charged[w] && ((now - stamp[w]) <= SENTRY_RETENTION_CYCLES);
    end
  end

  assign s_rdata = sram;

  always_comb begin
    d_rdata = '0;
    for (int w = 1; w < WAYS; w++)
      if (wl_d[w] && data_ok[w]) d_rdata = d_rdata | cap[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram <= '0;
      for (int w = 1; w < WAYS; w++) begin
        cap[w]     <= '0;
        charged[w] <= 1'b0;
        stamp[w]   <= '0;
      end
    end else begin
      if (wl_s && s_we) sram <= s_wdata;
      for (int w = 1; w < WAYS; w++) begin
        if (wl_d[w] && d_we) begin
          // write through BLd (all ones = precharge), then the bridge may discharge
          cap[w]     <= s2d[w] ? (d_wdata & sram) : d_wdata;
          charged[w] <= 1'b1;
          stamp[w]   <= now;
        end else if (s2d[w]) begin
          // bridge alone: can only pull capacitors down where the static bit is 0
          cap[w] <= (data_ok[w] ? cap[w] : '0) & sram;
        end else if (wl_d[w]) begin
          // destructive sense
          charged[w] <= 1'b0;
        end
      end
    end
  end

endmodule
