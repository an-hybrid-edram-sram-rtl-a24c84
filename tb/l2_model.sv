// Behavioural model of the second-level cache seen by the L1: a line-wide
// memory with a fixed fill latency (10 cycles by default, the L2 hit latency
// of the evaluated machine). One fill is served at a time: fill_req is
// accepted when idle and fill_resp_valid pulses LATENCY cycles later with the
// line. Writebacks are accepted at once and stored; they are counted by kind.
// Lines never written hold tb_mem_pkg::init_word contents.
module l2_model
  import hdc_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned LATENCY    = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      fill_req_valid,
  output logic                      fill_req_ready,
  input  logic [ADDR_W-1:0]         fill_req_addr,
  output logic                      fill_resp_valid,
  output logic [LINE_BYTES*8-1:0]   fill_resp_data,
  input  logic                      wb_valid,
  output logic                      wb_ready,
  input  logic [ADDR_W-1:0]         wb_addr,
  input  logic [LINE_BYTES*8-1:0]   wb_data,
  input  wb_kind_e                  wb_kind,
  output int                        n_fills,
  output int                        n_wb [3]
);
  localparam int WORDS = LINE_BYTES / 8;

  logic [LINE_BYTES*8-1:0] mem [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0]       pend_addr;
  int                      wait_cnt;
  logic                    busy;

  function automatic logic [LINE_BYTES*8-1:0] read_line(input logic [ADDR_W-1:0] a);
    logic [LINE_BYTES*8-1:0] l;
    if (mem.exists(a)) return mem[a];
    for (int w = 0; w < WORDS; w++) l[w*64 +: 64] = init_word(32'(a) + 32'(w * 8));
    return l;
  endfunction

  assign fill_req_ready = !busy;
  assign wb_ready       = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy            <= 1'b0;
      wait_cnt        <= 0;
      pend_addr       <= '0;
      fill_resp_valid <= 1'b0;
      fill_resp_data  <= '0;
      n_fills         <= 0;
      n_wb            <= '{0, 0, 0};
    end else begin
      fill_resp_valid <= 1'b0;
      if (!busy && fill_req_valid) begin
        busy      <= 1'b1;
        pend_addr <= fill_req_addr;
        wait_cnt  <= LATENCY - 1;
        n_fills   <= n_fills + 1;
      end else if (busy) begin
        if (wait_cnt == 0) begin
          busy            <= 1'b0;
          fill_resp_valid <= 1'b1;
          fill_resp_data  <= read_line(pend_addr);
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
      if (wb_valid) n_wb[int'(wb_kind)] <= n_wb[int'(wb_kind)] + 1;
    end
  end

  // writebacks go straight into the line store
  always @(posedge clk)
    if (rst_n && wb_valid) mem[wb_addr] = wb_data;
endmodule
