// Parallel tag comparison and hit classification of the hybrid cache.
//
// All WAYS tags of the addressed set are compared with the request tag at the
// same time as the static way's data is read. The matching entry's ptr field
// says where its data lives: ptr 0 is a static hit (data already on the static
// bit lines, one cycle), any other value is a dynamic hit, whose data way is
// only accessed now that the tag is known to match, because reading dynamic
// cells destroys them.
//
// An entry counts as present when it is valid and its block can still be
// trusted: always for the static way; for a dynamic way when the way's sentry
// cell is still charged, or when the entry is dirty (dirty dynamic blocks are
// kept intact by the interval-counter writeback, which reaches every dynamic
// block within the retention time). A valid, clean entry whose sentry has
// discharged is reported through `sentry_expired` and treated as a miss.
//
// On a miss the victim is chosen among the entries that are not MRU (ptr != 0):
// the matching entry whose block was lost if there is one (so a tag is never
// held twice), then any absent one, otherwise the one with the largest LRU age.
// Purely combinational. Parallel comparison and static/dynamic split follow the
// design; the victim rule and the dirty override of the sentry are this
// implementation's choices.
module way_lookup #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20,
  parameter int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic [TAG_W-1:0]               req_tag,
  input  logic [WAYS-1:0]                valid,
  input  logic [WAYS-1:0]                dirty,
  input  logic [WAYS-1:0][TAG_W-1:0]     tag,
  input  logic [WAYS-1:0][WAY_W-1:0]     ptr,
  input  logic [WAYS-1:0][WAY_W-1:0]     age,
  input  logic [WAYS-1:1]                sentry_alive,
  output logic                           static_hit,
  output logic                           dynamic_hit,
  output logic [WAY_W-1:0]               hit_entry,
  output logic [WAY_W-1:0]               hit_way,
  output logic                           sentry_expired,
  output logic [WAY_W-1:0]               mru_entry,
  output logic [WAY_W-1:0]               victim_entry,
  output logic [WAY_W-1:0]               victim_way,
  output logic                           victim_dirty
);

  logic [WAYS-1:0] match;
  logic            hit;
  logic [WAYS-1:0] present;
  logic            found_absent;

  always_comb begin
    for (int e = 0; e < WAYS; e++) begin
      present[e] = valid[e] &&
                   ((ptr[e] == '0) || dirty[e] || sentry_alive[(ptr[e] == '0) ? 1 : int'(ptr[e])]);
      match[e]   = (tag[e] == req_tag);
    end

    hit            = 1'b0;
    hit_entry      = '0;
    sentry_expired = 1'b0;
    for (int e = 0; e < WAYS; e++) begin
      if (match[e] && present[e]) begin
        hit       = 1'b1;
        hit_entry = WAY_W'(e);
      end
      if (match[e] && valid[e] && !present[e]) sentry_expired = 1'b1;
    end
    hit_way     = ptr[hit_entry];
    static_hit  = hit && (hit_way == '0);
    dynamic_hit = hit && (hit_way != '0);

    mru_entry = '0;
    for (int e = 0; e < WAYS; e++)
      if (ptr[e] == '0) mru_entry = WAY_W'(e);

    // victim: a matching entry whose block was lost, else the first absent
    // non-MRU entry, else the oldest non-MRU entry
    victim_entry = '0;
    found_absent = 1'b0;
    for (int e = WAYS - 1; e >= 0; e--)
      if (ptr[e] != '0 && !present[e]) begin
        victim_entry = WAY_W'(e);
        found_absent = 1'b1;
      end
    for (int e = WAYS - 1; e >= 0; e--)
      if (ptr[e] != '0 && match[e] && valid[e] && !present[e]) victim_entry = WAY_W'(e);
    if (!found_absent)
      for (int e = 0; e < WAYS; e++)
        if (ptr[e] != '0 && (age[e] > age[victim_entry] || ptr[victim_entry] == '0))
          victim_entry = WAY_W'(e);
    victim_way     = ptr[victim_entry];
    victim_dirty   = valid[victim_entry] && dirty[victim_entry];
  end

endmodule
