// ipstash_victim: small victim TCAM beside the IPStash devices, holding the
// few expanded prefixes that find no free way in any set-associative device.
//
// It sits on the same request, arbitration and result buses as the devices
// and takes part in every command with the devices' timing, so a table that
// almost fits still loads completely and is searched as one array.
//
// Storage. ENTRIES fully associative entries, each an expanded prefix (left
// aligned, bits below its class length zero), its unexpanded length and its
// output port, all in flip-flops; valid bits clear at reset.
//
// Search. A ternary compare of the address against every entry (each entry
// masked to its expanded length) runs once per search, and the longest
// unexpanded length is kept separately for each access class (C1 = Classes 1
// and 0, C2, C3). The victim then answers in the arbitration slot of that
// class, exactly as a device whose probe for that class hit: it drives its
// length on the arbitration bus in cycle 3, 4 or 5 for C1, C2 or C3, unless
// the search was already decided in an earlier slot, and the winner drives
// the result bus one cycle later. So a victim hit competes with device hits
// of the same class by length and loses to any hit of a longer class.
//
// Updates. The same key rules as a device: an entry with the same expanded
// prefix and class length is the prefix's holder (update, or with pruning
// replace / prune); otherwise the lowest free entry is offered. The victim
// uses static priority VICT_ID (default 15), below every device, so it only
// takes a new prefix when no device can. DELETE and MODIFY act on holders.
//
// Timing (cycle 0 = the request is accepted): cycle 1 compare, cycle 2 class
// selection and update decision, cycles 3..5 arbitration slots (updates use
// cycle 3, where the write happens at its end), result one cycle after the
// deciding slot. Commands arrive at most every third cycle, which the
// devices' req_ready guarantees.
//
// The victim TCAM searched in parallel with the set-associative array is the
// document's remedy for tables that almost fit; its size, its storage of
// expanded prefixes, the longest-length selection instead of a sorted TCAM
// and the way it joins the bus protocol are this design's choices.
module ipstash_victim
  import ipstash_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned VICT_ID = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_prune_en,
  input  logic             req_valid,    // command accepted by the array
  input  req_t             req,
  output logic [ARB_W-1:0] arb_out,
  input  logic [ARB_W-1:0] arb_in,
  output logic             rsp_valid,
  output rsp_t             rsp,
  output logic [$clog2(ENTRIES+1)-1:0] used  // number of valid entries
);

  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic [ADDR_W-1:0] pfx;   // expanded prefix, low bits zero
    logic [PLEN_W-1:0] len;   // unexpanded length 8..32
    logic [PORT_W-1:0] port;
  } ventry_t;

  logic [ENTRIES-1:0] valid;
  ventry_t            ent [ENTRIES];

  function automatic logic [ADDR_W-1:0] amask(input logic [PLEN_W-1:0] l);
    return ~(32'hFFFF_FFFF >> l);
  endfunction

  // ------------------------------------------------------------ stage 1
  logic               q1_v;
  cmd_e               q1_cmd;
  logic [ADDR_W-1:0]  q1_addr;
  logic [PLEN_W-1:0]  q1_len, q1_new_len;
  logic [PORT_W-1:0]  q1_port;

  logic [ENTRIES-1:0] c_srch, c_key;
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      c_srch[e] = valid[e] &&
                  ((q1_addr ^ ent[e].pfx) & amask(expanded_len(ent[e].len))) == '0;
      c_key[e]  = valid[e] && expanded_len(ent[e].len) == expanded_len(q1_len) &&
                  ent[e].pfx == (q1_addr & amask(expanded_len(q1_len)));
    end
  end

  // ------------------------------------------------------------ stage 2
  logic               q2_v;
  cmd_e               q2_cmd;
  logic [PLEN_W-1:0]  q2_len, q2_new_len;
  logic [PORT_W-1:0]  q2_port;
  logic [ADDR_W-1:0]  q2_addr;
  logic [ENTRIES-1:0] q2_srch, q2_key;

  // per-class longest match
  logic              c_hit  [3];
  logic [PLEN_W-1:0] c_hlen [3];
  logic [PORT_W-1:0] c_hport[3];
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      c_hit[c]   = 1'b0;
      c_hlen[c]  = '0;
      c_hport[c] = '0;
    end
    for (int e = 0; e < ENTRIES; e++)
      for (int c = 0; c < 3; c++)
        if (q2_srch[e] && acc_of_len(ent[e].len) == acc_e'(c) && ent[e].len > c_hlen[c]) begin
          c_hit[c]   = 1'b1;
          c_hlen[c]  = ent[e].len;
          c_hport[c] = ent[e].port;
        end
  end

  // update decision
  status_e        c_status;
  logic           c_hold, c_avail;
  logic [EW-1:0]  c_slot;      // entry to write
  logic           c_found;     // some entry with the same key and length
  logic [ENTRIES-1:0] c_same;  // same key and same length
  logic           modify_ok;

  assign modify_ok = acc_of_len(q2_new_len) == acc_of_len(q2_len) &&
                     expanded_len(q2_new_len) == expanded_len(q2_len);

  always_comb begin
    logic          free_found, key_found;
    logic [EW-1:0] free_slot, key_slot;
    logic [PLEN_W-1:0] key_len;
    free_found = 1'b0; free_slot = '0;
    key_found  = 1'b0; key_slot  = '0; key_len = '0;
    c_found    = 1'b0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      c_same[e] = q2_key[e] && ent[e].len == q2_len;
      if (!valid[e]) begin free_found = 1'b1; free_slot = EW'(e); end
      if (q2_key[e] && (cfg_prune_en || ent[e].len == q2_len)) begin
        key_found = 1'b1; key_slot = EW'(e); key_len = ent[e].len;
      end
      if (c_same[e]) c_found = 1'b1;
    end
    c_status = ST_FULL;
    c_slot   = free_slot;
    if (key_found) begin
      c_slot = key_slot;
      if (key_len == q2_len)     c_status = ST_UPDATED;
      else if (key_len > q2_len) c_status = ST_PRUNED;
      else                       c_status = ST_REPLACED;
    end else if (free_found) begin
      c_status = ST_INSERTED;
    end
    c_hold  = 1'b0;
    c_avail = 1'b0;
    if (q2_v && acc_of_len(q2_len) != ACC_NONE) begin
      unique case (q2_cmd)
        CMD_INSERT: begin
          c_hold  = c_status inside {ST_UPDATED, ST_REPLACED, ST_PRUNED};
          c_avail = c_status == ST_INSERTED;
        end
        CMD_DELETE: c_hold = c_found;
        CMD_MODIFY: c_hold = c_found && modify_ok;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ stage 3
  logic               s3_v, s3_search, s3_done;
  logic [1:0]         s3_slot;   // arbitration slot 0..2 (class C1..C3)
  cmd_e               s3_cmd;
  logic [PLEN_W-1:0]  s3_len, s3_new_len;
  logic [PORT_W-1:0]  s3_port;
  logic [ADDR_W-1:0]  s3_addr;
  logic               s3_hit  [3];
  logic [PLEN_W-1:0]  s3_hlen [3];
  logic [PORT_W-1:0]  s3_hport[3];
  status_e            s3_status;
  logic               s3_hold, s3_avail;
  logic [EW-1:0]      s3_wslot;
  logic [ENTRIES-1:0] s3_same;

  logic              live, a_any, a_win, a_upd;
  logic              cur_hit;
  logic [PLEN_W-1:0] cur_len;
  logic [PORT_W-1:0] cur_port;

  assign live     = s3_v && s3_search && !s3_done;
  assign a_upd    = s3_v && !s3_search && s3_slot == 2'd0;
  assign cur_hit  = live && s3_hit[s3_slot];
  assign cur_len  = s3_hlen[s3_slot];
  assign cur_port = s3_hport[s3_slot];

  ipstash_dev_arb #(.DEV_ID(VICT_ID)) u_arb (
    .upd_mode (!s3_search),
    .hit      (cur_hit),
    .hit_len  (cur_len),
    .hold     (a_upd && s3_hold),
    .avail    (a_upd && s3_avail),
    .arb_in   (arb_in),
    .arb_out  (arb_out),
    .any      (a_any),
    .win      (a_win)
  );

  // control and storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1_v      <= 1'b0;
      q2_v      <= 1'b0;
      s3_v      <= 1'b0;
      s3_slot   <= '0;
      s3_done   <= 1'b0;
      valid     <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      q1_v <= req_valid && req.cmd != CMD_NOP;
      q2_v <= q1_v;

      // stage 3 holds one command for its three slots
      if (q2_v) begin
        s3_v    <= 1'b1;
        s3_slot <= '0;
        s3_done <= 1'b0;
      end else if (s3_v) begin
        if (s3_slot == 2'd2 || !s3_search) s3_v <= 1'b0;
        if (s3_slot != 2'd2) s3_slot <= s3_slot + 2'd1;
        if (live && a_any) s3_done <= 1'b1;
      end

      rsp_valid <= 1'b0;
      rsp       <= '0;
      if (live && a_win) begin
        rsp_valid <= 1'b1;
        rsp       <= '{status: ST_HIT, len: cur_len, port: cur_port};
      end
      if (a_upd && a_win) begin
        rsp_valid <= 1'b1;
        unique case (s3_cmd)
          CMD_INSERT: rsp <= '{status: s3_status, len: s3_len, port: s3_port};
          CMD_DELETE: rsp <= '{status: ST_DELETED, len: s3_len, port: '0};
          default:    rsp <= '{status: ST_MODIFIED, len: s3_new_len, port: s3_port};
        endcase
      end

      // writes at the end of the update slot
      if (a_upd && s3_cmd == CMD_INSERT && a_win &&
          s3_status inside {ST_INSERTED, ST_REPLACED})
        valid[s3_wslot] <= 1'b1;
      if (a_upd && s3_cmd == CMD_DELETE && s3_hold)
        valid <= valid & ~s3_same;
    end
  end

  // entry payloads and pipeline registers: no reset, qualified by the valids
  always_ff @(posedge clk) begin
    if (req_valid) begin
      q1_cmd     <= req.cmd;
      q1_addr    <= req.addr;
      q1_len     <= req.len;
      q1_new_len <= req.new_len;
      q1_port    <= req.port;
    end
    if (q1_v) begin
      q2_cmd     <= q1_cmd;
      q2_addr    <= q1_addr;
      q2_len     <= q1_len;
      q2_new_len <= q1_new_len;
      q2_port    <= q1_port;
      q2_srch    <= c_srch;
      q2_key     <= c_key;
    end
    if (q2_v) begin
      s3_search  <= q2_cmd == CMD_SEARCH;
      s3_cmd     <= q2_cmd;
      s3_addr    <= q2_addr;
      s3_len     <= q2_len;
      s3_new_len <= q2_new_len;
      s3_port    <= q2_port;
      s3_status  <= c_status;
      s3_hold    <= c_hold;
      s3_avail   <= c_avail;
      s3_wslot   <= c_slot;
      s3_same    <= c_same;
      for (int c = 0; c < 3; c++) begin
        s3_hit[c]   <= c_hit[c];
        s3_hlen[c]  <= c_hlen[c];
        s3_hport[c] <= c_hport[c];
      end
    end
    if (a_upd && a_win && s3_cmd == CMD_INSERT &&
        s3_status inside {ST_INSERTED, ST_REPLACED, ST_UPDATED})
      ent[s3_wslot] <= '{pfx: s3_addr & amask(expanded_len(s3_len)), len: s3_len, port: s3_port};
    if (a_upd && s3_cmd == CMD_MODIFY && s3_hold)
      for (int e = 0; e < ENTRIES; e++)
        if (s3_same[e]) begin
          ent[e].len  <= s3_new_len;
          ent[e].port <= s3_port;
        end
  end

  always_comb begin
    used = '0;
    for (int e = 0; e < ENTRIES; e++) used = used + $bits(used)'(valid[e]);
  end

endmodule
