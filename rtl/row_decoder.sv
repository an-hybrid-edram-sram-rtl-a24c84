// Row decoder of the macrocell data array.
//
// Decodes the set index into a one-hot row select and gates the three row
// control lines of the macrocell with it: the static wordline WL_s, the dynamic
// wordlines WL_d (one per dynamic way) and the bridge enables S2D (one per
// dynamic way). Only the addressed row sees its lines asserted; all other rows
// stay idle. The lines are shared by static and dynamic cells of a row, which
// is what lets one decoder serve both technologies. Purely combinational.
// The decoder-plus-gating structure follows the cell's block diagram; the
// enable input and the port layout are this implementation's own.
module row_decoder #(
  parameter int unsigned SETS  = 64,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic [IDX_W-1:0]   idx,
  input  logic               wl_s_in,
  input  logic [WAYS-1:1]    wl_d_in,
  input  logic [WAYS-1:1]    s2d_in,
  output logic [SETS-1:0]    wl_s,
  output logic [WAYS-1:1]    wl_d [SETS],
  output logic [WAYS-1:1]    s2d  [SETS]
);

  logic [SETS-1:0] row_sel;

  always_comb
    for (int r = 0; r < SETS; r++) row_sel[r] = (idx == IDX_W'(r));

  always_comb
    for (int r = 0; r < SETS; r++) begin
      wl_s[r] = row_sel[r] & wl_s_in;
      wl_d[r] = row_sel[r] ? wl_d_in : '0;
      s2d[r]  = row_sel[r] ? s2d_in  : '0;
    end

endmodule
