// Global interval counter of the delayed writeback policy.
//
// Dynamic cells are never refreshed. Instead, one binary counter shared by all
// dynamic blocks is decremented every cycle; each time it reaches zero it is
// reloaded and the next dynamic block, in circular order, is due to be checked
// (and written back to L2 if dirty). Reloading with INTERVAL = retention time /
// number of dynamic blocks makes every dynamic block visited at least once per
// retention time.
//
// Circular order: set 0 way 1, set 0 way 2, ..., set 0 way WAYS-1, set 1 way 1,
// and so on. The counter keeps running while the controller is busy; ticks that
// the controller has not served yet are counted (up to 15) in `backlog`, so a
// busy controller delays a check by its busy time but never shifts the whole
// schedule. `chk_pending` stays high while checks are owed; `chk_ack` (one
// cycle) tells the counter the block at chk_set/chk_way has been checked and
// advances the pointer. `en` low (early policy) stops the counter.
// Counter, reload value and circular order follow the design; the backlog
// and the handshake are this implementation's choices.
module interval_counter #(
  parameter int unsigned SETS             = 64,
  parameter int unsigned WAYS             = 4,
  parameter int unsigned RETENTION_CYCLES = 50000,
  parameter int unsigned IDX_W            = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W            = $clog2(WAYS),
  parameter int unsigned DYN_BLOCKS       = SETS * (WAYS - 1),
  parameter int unsigned INTERVAL         = (RETENTION_CYCLES / DYN_BLOCKS > 0) ?
                                            RETENTION_CYCLES / DYN_BLOCKS : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             chk_ack,
  output logic             chk_pending,
  output logic [IDX_W-1:0] chk_set,
  output logic [WAY_W-1:0] chk_way
);

  localparam int unsigned CNT_W = $clog2(INTERVAL + 1);

  logic [CNT_W-1:0] count;
  logic [3:0]       backlog;
  logic             tick;     // counter reached zero: one more check is owed

  assign tick        = en && (count == '0);
  assign chk_pending = (backlog != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= CNT_W'(INTERVAL - 1);
      backlog <= '0;
      chk_set <= '0;
      chk_way <= WAY_W'(1);
    end else begin
      if (en) count <= tick ? CNT_W'(INTERVAL - 1) : count - 1'b1;
      case ({tick && backlog != 4'hF, chk_ack && chk_pending})
        2'b10:   backlog <= backlog + 4'd1;
        2'b01:   backlog <= backlog - 4'd1;
        default: backlog <= backlog;
      endcase
      if (chk_ack && chk_pending) begin
        if (chk_way == WAY_W'(WAYS - 1)) begin
          chk_way <= WAY_W'(1);
          chk_set <= (chk_set == IDX_W'(SETS - 1)) ? '0 : chk_set + 1'b1;
        end else begin
          chk_way <= chk_way + 1'b1;
        end
      end
    end
  end

endmodule
