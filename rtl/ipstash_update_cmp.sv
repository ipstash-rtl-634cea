// ipstash_update_cmp: placement and matching logic for route updates.
//
// Looks at all ways of the (skewed) sets an expanded prefix maps to and
// decides what an insertion does, and which ways a deletion or modification
// touches. Two entries have the same key when they sit in the same access
// class, have the same expanded length and equal tags on the bits that length
// covers. For an insertion of unexpanded length len, in priority order:
//   - a same-key entry of the same length exists: rewrite it (ST_UPDATED);
//   - pruning on and a same-key entry of a longer length exists: the new
//     entry would never be selected, so it is dropped (ST_PRUNED);
//   - pruning on and a same-key entry of a shorter length exists: the new,
//     longer-origin entry overwrites it (ST_REPLACED);
//   - a free (invalid) way exists: write there (ST_INSERTED);
//   - otherwise the prefix conflicts (ST_FULL).
// The pruning rule (long origin replaces short origin, port ignored) is the
// document's internal on-line pruning; updating an identical entry in place
// and filling the lowest free way are this design's choices.
// match_vec marks the same-key, same-length ways a deletion invalidates or a
// modification rewrites.
//
// Combinational.
module ipstash_update_cmp
  import ipstash_pkg::*;
#(
  parameter int unsigned NWAYS = 32
) (
  input  entry_t                    entries [NWAYS],
  input  logic [TAG_W-1:0]          key,       // acc_tag() of the expanded prefix
  input  logic [PLEN_W-1:0]         len,       // unexpanded length, 8..32
  input  logic                      prune_en,
  output status_e                   ins_status,
  output logic                      ins_write,  // insertion writes ins_way
  output logic [$clog2(NWAYS)-1:0]  ins_way,
  output logic [NWAYS-1:0]          match_vec
);

  localparam int unsigned WW = $clog2(NWAYS);

  logic [NWAYS-1:0] shorter_vec, free_vec;
  logic             longer_any;
  logic [TAG_W-1:0] mask;
  acc_e             acc;

  always_comb begin
    mask       = len_mask(len);
    acc        = acc_of_len(len);
    longer_any = 1'b0;
    for (int w = 0; w < NWAYS; w++) begin
      logic [PLEN_W-1:0] l;
      logic              same_key;
      l = dec_len(entries[w].len);
      same_key = entries[w].valid && (acc_of_len(l) == acc) &&
                 (expanded_len(l) == expanded_len(len)) &&
                 (((entries[w].tag ^ key) & mask) == '0);
      match_vec[w]   = same_key && (l == len);
      shorter_vec[w] = same_key && (l < len);
      free_vec[w]    = !entries[w].valid;
      if (same_key && l > len) longer_any = 1'b1;
    end
  end

  function automatic logic [WW-1:0] first_one(input logic [NWAYS-1:0] v);
    for (int w = NWAYS - 1; w >= 0; w--)
      if (v[w]) first_one = WW'(w);
    if (v == '0) first_one = '0;
  endfunction

  always_comb begin
    ins_write  = 1'b0;
    ins_way    = '0;
    if (acc == ACC_NONE) begin
      ins_status = ST_BADLEN;
    end else if (match_vec != '0) begin
      ins_status = ST_UPDATED;
      ins_write  = 1'b1;
      ins_way    = first_one(match_vec);
    end else if (prune_en && longer_any) begin
      ins_status = ST_PRUNED;
    end else if (prune_en && shorter_vec != '0) begin
      ins_status = ST_REPLACED;
      ins_write  = 1'b1;
      ins_way    = first_one(shorter_vec);
    end else if (free_vec != '0) begin
      ins_status = ST_INSERTED;
      ins_write  = 1'b1;
      ins_way    = first_one(free_vec);
    end else begin
      ins_status = ST_FULL;
    end
  end

endmodule
