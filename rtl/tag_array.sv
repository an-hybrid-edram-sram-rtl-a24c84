// Tag array of the hybrid cache, built from ordinary static cells.
//
// Because the tag array is static, reading it is never destructive and tags
// never move: when data blocks are swapped between the static way and a
// dynamic way, only the small pointer field of each tag changes. Each set has
// WAYS entries; each entry holds
//   valid, dirty     - block state (a dynamic block is only usable while its
//                      sentry cell in the data array is still charged, see way_lookup),
//   tag              - address tag,
//   ptr              - data way (0 = static way) that holds this entry's block
//                      (the log2(WAYS) extra bits per tag that link tags to data),
//   age              - LRU rank, 0 = most recently used.
// The ptr fields of a set always form a permutation of 0..WAYS-1, and the
// entry with ptr 0 is the MRU one.
//
// Interface: one combinational read port (rd_idx -> rd_*) and one write port
// that replaces a whole set at the rising edge (we, wr_idx, wr_*). Reset clears
// all valid/dirty bits and sets entry i to ptr = i and age = i.
// Static 6T tags and the pointer bits follow the design; the LRU age encoding
// and the whole-set write port are this implementation's choices.
module tag_array #(
  parameter int unsigned SETS  = 64,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20,
  parameter int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [IDX_W-1:0]                  rd_idx,
  output logic [WAYS-1:0]                   rd_valid,
  output logic [WAYS-1:0]                   rd_dirty,
  output logic [WAYS-1:0][TAG_W-1:0]        rd_tag,
  output logic [WAYS-1:0][WAY_W-1:0]        rd_ptr,
  output logic [WAYS-1:0][WAY_W-1:0]        rd_age,
  input  logic                              we,
  input  logic [IDX_W-1:0]                  wr_idx,
  input  logic [WAYS-1:0]                   wr_valid,
  input  logic [WAYS-1:0]                   wr_dirty,
  input  logic [WAYS-1:0][TAG_W-1:0]        wr_tag,
  input  logic [WAYS-1:0][WAY_W-1:0]        wr_ptr,
  input  logic [WAYS-1:0][WAY_W-1:0]        wr_age
);

  logic [WAYS-1:0]            valid_q [SETS];
  logic [WAYS-1:0]            dirty_q [SETS];
  logic [WAYS-1:0][TAG_W-1:0] tag_q   [SETS];
  logic [WAYS-1:0][WAY_W-1:0] ptr_q   [SETS];
  logic [WAYS-1:0][WAY_W-1:0] age_q   [SETS];

  assign rd_valid = valid_q[rd_idx];
  assign rd_dirty = dirty_q[rd_idx];
  assign rd_tag   = tag_q[rd_idx];
  assign rd_ptr   = ptr_q[rd_idx];
  assign rd_age   = age_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        tag_q[s]   <= '0;
        for (int e = 0; e < WAYS; e++) begin
          ptr_q[s][e] <= WAY_W'(e);
          age_q[s][e] <= WAY_W'(e);
        end
      end
    end else if (we) begin
      valid_q[wr_idx] <= wr_valid;
      dirty_q[wr_idx] <= wr_dirty;
      tag_q[wr_idx]   <= wr_tag;
      ptr_q[wr_idx]   <= wr_ptr;
      age_q[wr_idx]   <= wr_age;
    end
  end

  // The data-way pointers of a set must stay a permutation of 0..WAYS-1.
  function automatic logic is_permutation(input logic [WAYS-1:0][WAY_W-1:0] p);
    logic [WAYS-1:0] seen;
    seen = '0;
    for (int e = 0; e < WAYS; e++) seen[p[e]] = 1'b1;
    return &seen;
  endfunction

  a_ptr_permutation: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> is_permutation(wr_ptr))
    else $error("tag_array: data-way pointers of set %0d are not a permutation", wr_idx);

endmodule
