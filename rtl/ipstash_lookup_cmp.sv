// ipstash_lookup_cmp: hit logic of a search access over all ways of a set.
//
// An entry hits when it is valid, it belongs to the access class (its stored
// unexpanded length falls into that class; Class 0 entries belong to Class 1
// accesses) and its tag equals the address tag on the bits the entry's length
// covers (for Class 0 entries that includes address bits beyond bit 24).
// Because Class 0 is folded onto Class 1 and entries expanded from different
// lengths may share a set, several ways can hit; the length arbiter then
// picks the entry with the longest unexpanded length. Ties (identical length
// and tag) go to the lowest way number. Tag and length match follow the
// document; the tie rule and the way order are this design's choice.
//
// Combinational: entries/addr tag/acc in, hit, length, port and way out.
module ipstash_lookup_cmp
  import ipstash_pkg::*;
#(
  parameter int unsigned NWAYS = 32
) (
  input  entry_t                     entries [NWAYS],
  input  logic [TAG_W-1:0]           tag,    // acc_tag() of the searched address
  input  acc_e                       acc,
  output logic                       hit,
  output logic [PLEN_W-1:0]          hit_len,
  output logic [PORT_W-1:0]          hit_port,
  output logic [$clog2(NWAYS)-1:0]   hit_way,
  output logic [NWAYS-1:0]           hit_vec
);

  always_comb begin
    hit      = 1'b0;
    hit_len  = '0;
    hit_port = '0;
    hit_way  = '0;
    for (int w = 0; w < NWAYS; w++) begin
      logic [PLEN_W-1:0] l;
      l = dec_len(entries[w].len);
      hit_vec[w] = entries[w].valid && (acc_of_len(l) == acc) &&
                   (((entries[w].tag ^ tag) & len_mask(l)) == '0);
      if (hit_vec[w] && (!hit || l > hit_len)) begin
        hit      = 1'b1;
        hit_len  = l;
        hit_port = entries[w].port;
        hit_way  = $clog2(NWAYS)'(w);
      end
    end
  end

endmodule
