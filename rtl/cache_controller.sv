// Cache controller of the hybrid static/dynamic L1 data cache.
//
// The controller keeps the most recently used block of every set in the static
// way (way-0) and never refreshes the dynamic ways. It sequences:
//
//  Static hit   - tags of all ways and the static line are read in the request
//                 cycle; on a hit in way-0 the word is returned one cycle later
//                 and a store updates the static line in the same cycle. No
//                 dynamic cell is touched.
//  Dynamic hit  - the request cycle only checks tags; the dynamic way is then
//                 read (DYN_ACCESS_CYCLES cycles, destructive) into the
//                 intermediate buffer and the word is returned from the buffer
//                 (latency 1 + DYN_ACCESS_CYCLES). The swap then takes two more
//                 cycles: precharge + S2D move of the static line into the way
//                 just read, and a write of the buffer (with store data merged)
//                 into the static way. The tag pointers of the two entries are
//                 exchanged; tags themselves never move.
//  Miss         - the victim is a non-MRU entry. If it is dirty its dynamic way
//                 is read and written back (replacement writeback). The static
//                 line is moved into the victim's dynamic way through the bridge,
//                 the line is fetched from L2 into the static way and the word is
//                 returned.
//  Writebacks   - WB_DELAYED (default): dirty blocks may live in dynamic ways;
//                 whenever the interval counter owes a check, the controller
//                 (when idle, before taking a new request) looks at that dynamic
//                 block and, if dirty, reads it and writes it back (sporadic
//                 writeback); the read destroys it, so the entry is invalidated.
//                 WB_EARLY: before a static line is moved into a dynamic way it
//                 is written back if dirty, so dynamic ways only hold clean
//                 data; this counts as a replacement writeback when a miss makes
//                 room and as a swap writeback when a dynamic hit causes the
//                 swap. The interval counter is then unused.
//
// Dynamic cells are only ever written by the precharge + bridge move, so the
// dynamic write data `da_d_wdata` is the constant precharge level (all ones).
// A victim or sporadic-writeback read of a dynamic way takes one cycle.
//
// Interfaces: CPU request (valid/ready, one word, byte strobes) with a
// one-cycle response pulse for loads and stores; L2 line fill (request
// valid/ready, response valid) and L2 writeback (valid/ready with its kind);
// direct control of the tag array, the macrocell data array and the interval
// counter; one-cycle event pulses per mechanism.
// The hit/swap/miss sequences, the three-step swap through a buffer and both
// writeback policies follow the design. The handshakes, the order of the miss
// steps (writeback, move, fill done one after the other), responding to stores,
// and serving owed interval checks before new requests are this
// implementation's choices.
module cache_controller
  import hdc_pkg::*;
#(
  parameter int unsigned WAYS              = 4,
  parameter int unsigned SETS              = 64,
  parameter int unsigned LINE_BYTES        = 64,
  parameter int unsigned WORD_BYTES        = 8,
  parameter int unsigned ADDR_W            = 32,
  parameter int unsigned DYN_ACCESS_CYCLES = 1,
  parameter wb_policy_e  POLICY            = WB_DELAYED,
  parameter int unsigned LINE_BITS         = LINE_BYTES * 8,
  parameter int unsigned WORD_BITS         = WORD_BYTES * 8,
  parameter int unsigned OFF_W             = $clog2(LINE_BYTES),
  parameter int unsigned IDX_W             = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned TAG_W             = ADDR_W - OFF_W - $clog2(SETS),
  parameter int unsigned WAY_W             = $clog2(WAYS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor side
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic                          req_we,
  input  logic [ADDR_W-1:0]             req_addr,
  input  logic [WORD_BITS-1:0]          req_wdata,
  input  logic [WORD_BYTES-1:0]         req_wstrb,
  output logic                          resp_valid,
  output logic [WORD_BITS-1:0]          resp_rdata,
  // L2 fill
  output logic                          fill_req_valid,
  input  logic                          fill_req_ready,
  output logic [ADDR_W-1:0]             fill_req_addr,
  input  logic                          fill_resp_valid,
  input  logic [LINE_BITS-1:0]          fill_resp_data,
  // L2 writeback
  output logic                          wb_valid,
  input  logic                          wb_ready,
  output logic [ADDR_W-1:0]             wb_addr,
  output logic [LINE_BITS-1:0]          wb_data,
  output wb_kind_e                      wb_kind,
  // tag array
  output logic [IDX_W-1:0]              ta_idx,
  input  logic [WAYS-1:0]               ta_valid,
  input  logic [WAYS-1:0]               ta_dirty,
  input  logic [WAYS-1:0][TAG_W-1:0]    ta_tag,
  input  logic [WAYS-1:0][WAY_W-1:0]    ta_ptr,
  input  logic [WAYS-1:0][WAY_W-1:0]    ta_age,
  output logic                          ta_we,
  output logic [WAYS-1:0]               ta_wr_valid,
  output logic [WAYS-1:0]               ta_wr_dirty,
  output logic [WAYS-1:0][TAG_W-1:0]    ta_wr_tag,
  output logic [WAYS-1:0][WAY_W-1:0]    ta_wr_ptr,
  output logic [WAYS-1:0][WAY_W-1:0]    ta_wr_age,
  // way lookup
  output logic [TAG_W-1:0]              lk_tag,
  input  logic                          lk_static_hit,
  input  logic                          lk_dynamic_hit,
  input  logic [WAY_W-1:0]              lk_hit_entry,
  input  logic [WAY_W-1:0]              lk_hit_way,
  input  logic                          lk_sentry_expired,
  input  logic [WAY_W-1:0]              lk_mru_entry,
  input  logic [WAY_W-1:0]              lk_victim_entry,
  input  logic [WAY_W-1:0]              lk_victim_way,
  input  logic                          lk_victim_dirty,
  // macrocell data array
  output logic [IDX_W-1:0]              da_idx,
  output logic                          da_wl_s,
  output logic                          da_s_we,
  output logic [LINE_BITS-1:0]          da_s_wdata,
  input  logic [LINE_BITS-1:0]          da_s_rdata,
  output logic [WAYS-1:1]               da_wl_d,
  output logic                          da_d_we,
  output logic [LINE_BITS-1:0]          da_d_wdata,
  input  logic [LINE_BITS-1:0]          da_d_rdata,
  output logic [WAYS-1:1]               da_s2d,
  // interval counter
  input  logic                          ic_pending,
  input  logic [IDX_W-1:0]              ic_set,
  input  logic [WAY_W-1:0]              ic_way,
  output logic                          ic_ack,
  // mechanism pulses
  output hdc_events_t                   ev
);

  localparam int unsigned WOFF_W = $clog2(LINE_BYTES / WORD_BYTES);
  localparam int unsigned BOFF_W = $clog2(WORD_BYTES);
  localparam int unsigned DCNT_W = $clog2(DYN_ACCESS_CYCLES + 1);

  typedef enum logic [3:0] {
    S_IDLE,       // accept a request or serve an owed interval check
    S_DYN_READ,   // dynamic hit: destructive read into the intermediate buffer
    S_S2D,        // dynamic hit: precharge + bridge move static -> dynamic way
    S_BUF2S,      // dynamic hit: buffer -> static way, exchange tag pointers
    S_MISS_RD,    // miss: read the dirty victim for its replacement writeback
    S_MISS_MOVE,  // miss: bridge move of the static line into the victim's way
    S_FILL_REQ,   // miss: ask L2 for the line
    S_FILL_WAIT,  // miss: line arrives, goes to the static way
    S_WB_SEND     // offer the writeback buffer to L2
  } state_e;

  state_e                  state, after;
  logic                    r_we;
  logic [TAG_W-1:0]        r_tag;
  logic [IDX_W-1:0]        r_idx;
  logic [WOFF_W-1:0]       r_woff;
  logic [WORD_BITS-1:0]    r_wdata;
  logic [WORD_BYTES-1:0]   r_wstrb;
  logic [WAY_W-1:0]        r_entry;   // hit entry or victim entry
  logic [WAY_W-1:0]        r_way;     // its dynamic data way
  logic [WAY_W-1:0]        r_mru;     // entry whose block is in the static way
  logic [DCNT_W-1:0]       dcnt;
  logic [LINE_BITS-1:0]    buffer;    // intermediate swap buffer
  logic [LINE_BITS-1:0]    wb_buf;
  logic [ADDR_W-1:0]       wb_addr_q;
  wb_kind_e                wb_kind_q;

  logic [TAG_W-1:0]        in_tag;
  logic [IDX_W-1:0]        in_idx;
  logic [WOFF_W-1:0]       in_woff;
  logic                    sweep_now;
  logic [WAY_W-1:0]        sweep_entry;

  // ---- helpers ---------------------------------------------------------------
  function automatic logic [LINE_BITS-1:0] merge(input logic [LINE_BITS-1:0] line,
                                                 input logic [WOFF_W-1:0] woff,
                                                 input logic [WORD_BITS-1:0] wdata,
                                                 input logic [WORD_BYTES-1:0] wstrb);
    logic [LINE_BITS-1:0] l;
    l = line;
    for (int b = 0; b < WORD_BYTES; b++)
      if (wstrb[b]) l[int'(woff) * WORD_BITS + b * 8 +: 8] = wdata[b * 8 +: 8];
    return l;
  endfunction

  function automatic logic [WORD_BITS-1:0] word_of(input logic [LINE_BITS-1:0] line,
                                                   input logic [WOFF_W-1:0] woff);
    return line[int'(woff) * WORD_BITS +: WORD_BITS];
  endfunction

  function automatic logic [ADDR_W-1:0] line_addr(input logic [TAG_W-1:0] t,
                                                  input logic [IDX_W-1:0] i);
    logic [ADDR_W-1:0] a;
    a = ADDR_W'(t) << (OFF_W + $clog2(SETS));
    if (SETS > 1) a = a | (ADDR_W'(i) << OFF_W);
    return a;
  endfunction

  // ---- address fields --------------------------------------------------------
  assign in_tag  = req_addr[ADDR_W-1 -: TAG_W];
  assign in_idx  = (SETS > 1) ? IDX_W'(req_addr >> OFF_W) : '0;
  assign in_woff = WOFF_W'(req_addr >> BOFF_W);

  assign sweep_now = (POLICY == WB_DELAYED) && ic_pending && (state == S_IDLE);

  always_comb begin
    sweep_entry = '0;
    for (int e = 0; e < WAYS; e++)
      if (ta_ptr[e] == ic_way) sweep_entry = WAY_W'(e);
  end

  // set being worked on
  always_comb begin
    if (state == S_IDLE) begin
      ta_idx = sweep_now ? ic_set : in_idx;
      lk_tag = in_tag;
    end else begin
      ta_idx = r_idx;
      lk_tag = r_tag;
    end
  end
  assign da_idx = ta_idx;

  assign req_ready      = (state == S_IDLE) && !sweep_now;
  assign fill_req_valid = (state == S_FILL_REQ);
  assign fill_req_addr  = line_addr(r_tag, r_idx);
  assign wb_valid       = (state == S_WB_SEND);
  assign wb_addr        = wb_addr_q;
  assign wb_data        = wb_buf;
  assign wb_kind        = wb_kind_q;

  // ---- combinational control of the arrays -----------------------------------
  logic early_swap_wb;
  assign early_swap_wb = (POLICY == WB_EARLY) && ta_valid[r_mru] && ta_dirty[r_mru];

  always_comb begin
    da_wl_s     = 1'b0;
    da_s_we     = 1'b0;
    da_s_wdata  = da_s_rdata;
    da_wl_d     = '0;
    da_d_we     = 1'b0;
    da_d_wdata  = '1;            // precharge level for the bridge move
    da_s2d      = '0;
    ta_we       = 1'b0;
    ta_wr_valid = ta_valid;
    ta_wr_dirty = ta_dirty;
    ta_wr_tag   = ta_tag;
    ta_wr_ptr   = ta_ptr;
    ta_wr_age   = ta_age;
    ic_ack      = 1'b0;
    ev          = '0;

    unique case (state)
      S_IDLE: begin
        if (sweep_now) begin
          ic_ack         = 1'b1;
          ev.sweep_check = 1'b1;
          if (ta_valid[sweep_entry] && ta_dirty[sweep_entry]) begin
            da_wl_d[ic_way]          = 1'b1;      // destructive read for the writeback
            ta_we                    = 1'b1;
            ta_wr_valid[sweep_entry] = 1'b0;
            ta_wr_dirty[sweep_entry] = 1'b0;
            ev.wb_sporadic           = 1'b1;
          end
        end else if (req_valid) begin
          if (lk_static_hit) begin
            ev.static_hit = 1'b1;
            da_wl_s       = req_we;
            da_s_we       = req_we;
            da_s_wdata    = merge(da_s_rdata, in_woff, req_wdata, req_wstrb);
            ta_we         = 1'b1;
            if (req_we) ta_wr_dirty[lk_hit_entry] = 1'b1;
            for (int e = 0; e < WAYS; e++)
              if (ta_age[e] < ta_age[lk_hit_entry]) ta_wr_age[e] = ta_age[e] + 1'b1;
            ta_wr_age[lk_hit_entry] = '0;
          end else if (lk_dynamic_hit) begin
            ev.dynamic_hit = 1'b1;
          end else begin
            ev.miss           = 1'b1;
            ev.sentry_expired = lk_sentry_expired;
          end
        end
      end

      S_DYN_READ:
        if (dcnt == '0) da_wl_d[r_way] = 1'b1;

      S_S2D: begin
        if (early_swap_wb) begin
          ta_we              = 1'b1;
          ta_wr_dirty[r_mru] = 1'b0;
          ev.wb_swap         = 1'b1;
        end else begin
          da_wl_d[r_way] = 1'b1;
          da_d_we        = 1'b1;
          da_s2d[r_way]  = 1'b1;
          ev.s2d_move    = 1'b1;
        end
      end

      S_BUF2S: begin
        da_wl_s              = 1'b1;
        da_s_we              = 1'b1;
        da_s_wdata           = buffer;
        ta_we                = 1'b1;
        ta_wr_ptr[r_entry]   = '0;
        ta_wr_ptr[r_mru]     = r_way;
        if (r_we) ta_wr_dirty[r_entry] = 1'b1;
        for (int e = 0; e < WAYS; e++)
          if (ta_age[e] < ta_age[r_entry]) ta_wr_age[e] = ta_age[e] + 1'b1;
        ta_wr_age[r_entry] = '0;
      end

      S_MISS_RD: begin
        da_wl_d[r_way]       = 1'b1;
        ta_we                = 1'b1;
        ta_wr_valid[r_entry] = 1'b0;
        ta_wr_dirty[r_entry] = 1'b0;
        ev.wb_replacement    = 1'b1;
      end

      S_MISS_MOVE: begin
        if (early_swap_wb) begin
          ta_we              = 1'b1;
          ta_wr_dirty[r_mru] = 1'b0;
          ev.wb_replacement  = 1'b1;
        end else if (ta_valid[r_mru]) begin
          da_wl_d[r_way] = 1'b1;
          da_d_we        = 1'b1;
          da_s2d[r_way]  = 1'b1;
          ev.s2d_move    = 1'b1;
        end
      end

      S_FILL_WAIT:
        if (fill_resp_valid) begin
          da_wl_s              = 1'b1;
          da_s_we              = 1'b1;
          da_s_wdata           = r_we ? merge(fill_resp_data, r_woff, r_wdata, r_wstrb)
                                      : fill_resp_data;
          ta_we                = 1'b1;
          ta_wr_valid[r_entry] = 1'b1;
          ta_wr_dirty[r_entry] = r_we;
          ta_wr_tag[r_entry]   = r_tag;
          ta_wr_ptr[r_entry]   = '0;
          ta_wr_ptr[r_mru]     = r_way;
          for (int e = 0; e < WAYS; e++)
            if (ta_age[e] < ta_age[r_entry]) ta_wr_age[e] = ta_age[e] + 1'b1;
          ta_wr_age[r_entry] = '0;
        end

      default: ;
    endcase
  end

  // ---- sequencing ------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      after      <= S_IDLE;
      r_we       <= 1'b0;
      r_tag      <= '0;
      r_idx      <= '0;
      r_woff     <= '0;
      r_wdata    <= '0;
      r_wstrb    <= '0;
      r_entry    <= '0;
      r_way      <= '0;
      r_mru      <= '0;
      dcnt       <= '0;
      buffer     <= '0;
      wb_buf     <= '0;
      wb_addr_q  <= '0;
      wb_kind_q  <= WBK_REPLACEMENT;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (sweep_now) begin
            if (ta_valid[sweep_entry] && ta_dirty[sweep_entry]) begin
              wb_buf    <= da_d_rdata;
              wb_addr_q <= line_addr(ta_tag[sweep_entry], ic_set);
              wb_kind_q <= WBK_SPORADIC;
              after     <= S_IDLE;
              state     <= S_WB_SEND;
            end
          end else if (req_valid) begin
            r_we    <= req_we;
            r_tag   <= in_tag;
            r_idx   <= in_idx;
            r_woff  <= in_woff;
            r_wdata <= req_wdata;
            r_wstrb <= req_wstrb;
            r_mru   <= lk_mru_entry;
            if (lk_static_hit) begin
              resp_valid <= 1'b1;
              resp_rdata <= word_of(da_s_rdata, in_woff);
            end else if (lk_dynamic_hit) begin
              r_entry <= lk_hit_entry;
              r_way   <= lk_hit_way;
              dcnt    <= DCNT_W'(DYN_ACCESS_CYCLES - 1);
              state   <= S_DYN_READ;
            end else begin
              r_entry <= lk_victim_entry;
              r_way   <= lk_victim_way;
              state   <= lk_victim_dirty ? S_MISS_RD : S_MISS_MOVE;
            end
          end
        end

        S_DYN_READ: begin
          if (dcnt != '0) begin
            dcnt <= dcnt - 1'b1;
          end else begin
            buffer     <= r_we ? merge(da_d_rdata, r_woff, r_wdata, r_wstrb) : da_d_rdata;
            resp_valid <= 1'b1;
            resp_rdata <= r_we ? r_wdata : word_of(da_d_rdata, r_woff);
            state      <= S_S2D;
          end
        end

        S_S2D: begin
          if (early_swap_wb) begin
            wb_buf    <= da_s_rdata;
            wb_addr_q <= line_addr(ta_tag[r_mru], r_idx);
            wb_kind_q <= WBK_SWAP;
            after     <= S_S2D;
            state     <= S_WB_SEND;
          end else begin
            state <= S_BUF2S;
          end
        end

        S_BUF2S: state <= S_IDLE;

        S_MISS_RD: begin
          wb_buf    <= da_d_rdata;
          wb_addr_q <= line_addr(ta_tag[r_entry], r_idx);
          wb_kind_q <= WBK_REPLACEMENT;
          after     <= S_MISS_MOVE;
          state     <= S_WB_SEND;
        end

        S_MISS_MOVE: begin
          if (early_swap_wb) begin
            wb_buf    <= da_s_rdata;
            wb_addr_q <= line_addr(ta_tag[r_mru], r_idx);
            wb_kind_q <= WBK_REPLACEMENT;
            after     <= S_MISS_MOVE;
            state     <= S_WB_SEND;
          end else begin
            state <= S_FILL_REQ;
          end
        end

        S_FILL_REQ:
          if (fill_req_ready) state <= S_FILL_WAIT;

        S_FILL_WAIT:
          if (fill_resp_valid) begin
            resp_valid <= 1'b1;
            resp_rdata <= r_we ? r_wdata
                               : word_of(fill_resp_data, r_woff);
            state      <= S_IDLE;
          end

        S_WB_SEND:
          if (wb_ready) state <= after;

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
