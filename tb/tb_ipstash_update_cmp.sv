// tb_ipstash_update_cmp: directed cases of the insertion decision (free way,
// update in place, internal pruning in both directions, pruning switched off,
// conflict, unsupported length, Class 0 entries that are not the same key,
// entries of another class with the same tag image), then random sets built
// from a small pool of prefixes checked against a model of the rules.
module tb_ipstash_update_cmp;
  import ipstash_pkg::*;

  localparam int NWAYS = 32;

  entry_t            ent [NWAYS];
  logic [TAG_W-1:0]  key;
  logic [PLEN_W-1:0] len;
  logic              prune;
  status_e           st;
  logic              wr;
  logic [4:0]        way;
  logic [NWAYS-1:0]  mv;

  ipstash_update_cmp #(.NWAYS(NWAYS)) dut (
    .entries(ent), .key(key), .len(len), .prune_en(prune), .ins_status(st),
    .ins_write(wr), .ins_way(way), .match_vec(mv)
  );

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stored image of an expanded prefix e of unexpanded length l
  function automatic logic [19:0] image(bit [31:0] e, int l);
    if (l > 20) return {e[31:20], e[7:0]};
    if (l > 16) return {e[31:24], 12'd0};
    return {e[31:28], 16'd0};
  endfunction

  function automatic entry_t mk(bit v, bit [31:0] e, int l, int p);
    entry_t x;
    x.valid = v; x.tag = image(e, l); x.len = 5'(l - 1); x.port = 6'(p);
    return x;
  endfunction

  task automatic expect_st(input status_e es, input bit ew, input int eway, input string what);
    #1;
    checks++;
    if (st != es || wr != ew || (ew && int'(way) != eway)) begin
      failures++;
      $display("FAIL %s: status %0d write %0d way %0d", what, st, wr, way);
    end
  endtask

  task automatic clear_set();
    for (int w = 0; w < NWAYS; w++) ent[w] = '0;
  endtask

  function automatic int elen(int l);
    return (l > 24) ? l : (l > 20) ? 24 : (l > 16) ? 20 : 16;
  endfunction

  initial begin
    bit [31:0] e;
    e = 32'hC0A80100;
    prune = 1'b1;
    // empty set
    clear_set(); key = image(e, 24); len = 24;
    expect_st(ST_INSERTED, 1, 0, "empty set");
    // first free way
    ent[0] = mk(1, 32'h11111100, 24, 1); ent[1] = mk(1, 32'h22222200, 24, 2);
    expect_st(ST_INSERTED, 1, 2, "first free way");
    // same key, same length: update in place
    ent[5] = mk(1, e, 24, 3);
    expect_st(ST_UPDATED, 1, 5, "same prefix and length");
    checks++; if (mv != 32'h20) failures++;
    // same key, shorter origin: replaced
    ent[5] = mk(1, e, 22, 3);
    expect_st(ST_REPLACED, 1, 5, "shorter origin replaced");
    checks++; if (mv != 0) failures++;
    // same key, longer origin already there: pruned
    len = 22; key = image(e, 22);
    ent[5] = mk(1, e, 24, 3);
    expect_st(ST_PRUNED, 0, 0, "longer origin present");
    // pruning off: store it anyway
    prune = 1'b0;
    expect_st(ST_INSERTED, 1, 2, "pruning off");
    prune = 1'b1;
    // another class with the same tag image is not the same key
    clear_set();
    ent[0] = mk(1, 32'hC0000000, 18, 4);
    key = image(32'hC0000000, 16); len = 16;
    expect_st(ST_INSERTED, 1, 1, "other class");
    // Class 0: same first 24 bits, different lengths are different keys
    clear_set();
    ent[0] = mk(1, 32'hC0A80180, 26, 4);
    key = image(32'hC0A80180, 28); len = 28;
    expect_st(ST_INSERTED, 1, 1, "Class 0 different length");
    key = image(32'hC0A80180, 26); len = 26;
    expect_st(ST_UPDATED, 1, 0, "Class 0 same prefix");
    // full set
    for (int w = 0; w < NWAYS; w++) ent[w] = mk(1, 32'h01000000 * (w + 1), 24, w);
    key = image(e, 24); len = 24;
    expect_st(ST_FULL, 0, 0, "full set");
    // unsupported length
    len = 6;
    expect_st(ST_BADLEN, 0, 0, "length 6");

    // random sets from a pool of related prefixes
    for (int n = 0; n < 3000; n++) begin
      bit [31:0] base, ne;
      int        nl, exp_upd, exp_short, exp_free;
      bit        exp_long;
      status_e   es;
      int        eway;
      bit        ew;
      base = 32'hAB000000 | ($urandom() & 32'h0000FF00);
      for (int w = 0; w < NWAYS; w++) begin
        int l;
        l = 21 + $urandom_range(3);
        ent[w] = mk($urandom_range(3) != 0, (base & 32'hFFFFF000) | ($urandom() & 32'h00000F00) , l, w);
      end
      nl = 21 + $urandom_range(3);
      ne = (base & 32'hFFFFF000) | ($urandom() & 32'h00000F00);
      key = image(ne, nl); len = PLEN_W'(nl);
      prune = $urandom_range(1);
      exp_upd = -1; exp_short = -1; exp_free = -1; exp_long = 0;
      for (int w = 0; w < NWAYS; w++) begin
        int  l;
        bit  same;
        l = int'(ent[w].len) + 1;
        same = ent[w].valid && ent[w].tag == image(ne, nl);
        if (same && l == nl && exp_upd < 0) exp_upd = w;
        if (same && l < nl && exp_short < 0) exp_short = w;
        if (same && l > nl) exp_long = 1;
        if (!ent[w].valid && exp_free < 0) exp_free = w;
      end
      if (exp_upd >= 0)                  begin es = ST_UPDATED;  ew = 1; eway = exp_upd; end
      else if (prune && exp_long)        begin es = ST_PRUNED;   ew = 0; eway = 0; end
      else if (prune && exp_short >= 0)  begin es = ST_REPLACED; ew = 1; eway = exp_short; end
      else if (exp_free >= 0)            begin es = ST_INSERTED; ew = 1; eway = exp_free; end
      else                               begin es = ST_FULL;     ew = 0; eway = 0; end
      expect_st(es, ew, eway, $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
