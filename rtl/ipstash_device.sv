// ipstash_device: one IPStash device, a set-associative memory that holds a
// whole routing table and answers longest-prefix-match searches.
//
// Organisation. NWAYS = BANKS x WAYS_PER_BANK ways (default 8 x 4 = 32) over
// 4096 sets, 128K entries. Each bank of ways has its own skewed set index
// (ipstash_skew_index), so one access reads one row from each bank.
//
// Search. Prefixes are stored expanded to 24, 20 or 16 bits (Classes 1, 2,
// 3; Class 0 = 25..32 bits folded onto Class 1). A search tries the classes
// longest first, one array access each: the three accesses are issued on three
// consecutive cycles (lockstep), and the first class that hits in any device
// ends the search. An access still waiting in stage 1 when the search is
// already decided is cancelled and does not read the array. The hit is the
// way with the longest unexpanded length (ipstash_lookup_cmp).
//
// Updates. The external agent expands prefixes to their class length; each
// expanded prefix is one command. INSERT places it (with optional internal
// pruning, cfg_prune_en), DELETE invalidates the entries with the same
// expanded prefix and unexpanded length, MODIFY rewrites them to a new
// unexpanded length and port (deletion when pruning is on).
//
// Pipeline and timing (cycle 0 = the cycle req_valid && req_ready):
//   cycle 1: S1 - class index, skewed bank indices, array read
//   cycle 2: S2 - tag/length compare and length arbitration, or placement
//   cycle 3: S3 - arbitration bus (arb_out/arb_in); writes happen at its end
//   cycle 4: rsp_valid/rsp (result bus), one cycle after the arbitration
// A Class 2 hit arbitrates in cycle 4 and a Class 3 hit or a miss in cycle 5,
// so the array latency is 3, 4 or 5 cycles, as the document gives; the result
// bus adds one cycle. A new command is accepted every third cycle (a search
// may use three array accesses). req_ready is low for 4096 cycles after reset
// while the device clears every set.
//
// Interface. rsp/rsp_valid and arb_out are this device's drives onto wired-OR
// buses (zero when not driving); arb_in is the OR of every device's arb_out.
// A single device loops arb_out back to arb_in. array_read pulses for every
// set read (an activity count for power).
//
// The class bounds, index/tag slicing, skewing, pruning, length arbitration
// and the 3-cycle pipeline are the document's. The command encoding, port
// widths of the request, clearing after reset and the cycle-level schedule
// above are this design's choices.
module ipstash_device
  import ipstash_pkg::*;
#(
  parameter int unsigned BANKS         = 8,
  parameter int unsigned WAYS_PER_BANK = 4,
  parameter int unsigned DEV_ID        = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_skew_en,   // skewed associativity on
  input  logic             cfg_prune_en,  // internal on-line pruning on
  input  logic             req_valid,
  input  req_t             req,
  output logic             req_ready,
  output logic [ARB_W-1:0] arb_out,
  input  logic [ARB_W-1:0] arb_in,
  output logic             rsp_valid,
  output rsp_t             rsp,
  output logic             array_read
);

  localparam int unsigned SETS  = 1 << INDEX_W;
  localparam int unsigned NWAYS = BANKS * WAYS_PER_BANK;
  localparam int unsigned WW    = $clog2(NWAYS);

  // ---------------------------------------------------------------- control
  logic               clearing;
  logic [INDEX_W-1:0] clr_row;
  logic [1:0]         busy_cnt;
  logic               seq;            // toggles per accepted command
  logic               accept;

  assign req_ready = !clearing && busy_cnt == 2'd0;
  assign accept    = req_valid && req_ready && req.cmd != CMD_NOP;

  // ---------------------------------------------------------------- stage 1
  logic               s1_v, s1_first, s1_last, s1_seq;
  cmd_e               s1_cmd;
  acc_e               s1_acc;
  logic [ADDR_W-1:0]  s1_addr;
  logic [PLEN_W-1:0]  s1_len, s1_new_len;
  logic [PORT_W-1:0]  s1_port;

  // ---------------------------------------------------------------- stage 2
  logic               s2_v, s2_first, s2_last, s2_seq;
  cmd_e               s2_cmd;
  acc_e               s2_acc;
  logic [ADDR_W-1:0]  s2_addr;
  logic [PLEN_W-1:0]  s2_len, s2_new_len;
  logic [PORT_W-1:0]  s2_port;
  logic [INDEX_W-1:0] s2_bank_idx [BANKS];

  // ---------------------------------------------------------------- stage 3
  logic               s3_v, s3_first, s3_last, s3_seq;
  cmd_e               s3_cmd;
  acc_e               s3_acc;
  logic [PLEN_W-1:0]  s3_len, s3_new_len;
  logic [PORT_W-1:0]  s3_port;
  logic [TAG_W-1:0]   s3_key;
  logic [INDEX_W-1:0] s3_bank_idx [BANKS];
  logic               s3_hit;
  logic [PLEN_W-1:0]  s3_hit_len;
  logic [PORT_W-1:0]  s3_hit_port;
  status_e            s3_ins_status;
  logic               s3_ins_write;
  logic [WW-1:0]      s3_ins_way;
  logic [NWAYS-1:0]   s3_match_vec;

  // search resolution bookkeeping
  logic done_q, done_seq_q;

  // ------------------------------------------------------ S1: index + read
  logic [INDEX_W-1:0] s1_idx;
  logic [7:0]         s1_skew_bits;
  logic [INDEX_W-1:0] s1_bank_idx [BANKS];
  logic               s3_search_live, resolved_now, s1_cancel, s1_read;
  logic               arb_any, arb_win;

  assign s1_idx       = acc_index(s1_addr, s1_acc);
  assign s1_skew_bits = acc_skew_bits(s1_addr, s1_acc);

  ipstash_skew_index #(.BANKS(BANKS)) u_skew (
    .idx       (s1_idx),
    .skew_bits (s1_skew_bits),
    .acc       (s1_acc),
    .skew_en   (cfg_skew_en),
    .bank_idx  (s1_bank_idx)
  );

  // A search access that is not its first is cancelled once its search is
  // decided (by an earlier class, in any device).
  assign s3_search_live = s3_v && s3_cmd == CMD_SEARCH &&
                          (s3_first || !(done_q && done_seq_q == s3_seq));
  assign resolved_now   = s3_search_live && arb_any;
  assign s1_cancel      = s1_cmd == CMD_SEARCH && !s1_first &&
                          ((done_q && done_seq_q == s1_seq) ||
                           (resolved_now && s3_seq == s1_seq));
  assign s1_read        = s1_v && !s1_cancel;
  assign array_read     = s1_read;

  // ------------------------------------------------------------ the array
  logic              bank_we    [BANKS];
  logic [WAYS_PER_BANK-1:0] bank_wmask [BANKS];
  logic [INDEX_W-1:0] bank_addr [BANKS];
  entry_t            bank_wdata [BANKS][WAYS_PER_BANK];
  entry_t            bank_rdata [BANKS][WAYS_PER_BANK];
  entry_t            ways       [NWAYS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    ipstash_bank #(.SETS(SETS), .WAYS(WAYS_PER_BANK)) u_bank (
      .clk   (clk),
      .re    (s1_read),
      .we    (bank_we[b]),
      .addr  (bank_addr[b]),
      .wmask (bank_wmask[b]),
      .wdata (bank_wdata[b]),
      .rdata (bank_rdata[b])
    );
    for (genvar w = 0; w < WAYS_PER_BANK; w++) begin : g_way
      assign ways[b*WAYS_PER_BANK + w] = bank_rdata[b][w];
    end
  end

  // ------------------------------------------------------------ S2: compare
  logic               c_hit;
  logic [PLEN_W-1:0]  c_hit_len;
  logic [PORT_W-1:0]  c_hit_port;
  status_e            c_ins_status;
  logic               c_ins_write;
  logic [WW-1:0]      c_ins_way;
  logic [NWAYS-1:0]   c_match_vec;
  logic [TAG_W-1:0]   s2_tag, s2_key;

  assign s2_tag = acc_tag(s2_addr, s2_acc);
  assign s2_key = s2_tag & len_mask(s2_len);

  ipstash_lookup_cmp #(.NWAYS(NWAYS)) u_lookup (
    .entries  (ways),
    .tag      (s2_tag),
    .acc      (s2_acc),
    .hit      (c_hit),
    .hit_len  (c_hit_len),
    .hit_port (c_hit_port),
    .hit_way  (),
    .hit_vec  ()
  );

  ipstash_update_cmp #(.NWAYS(NWAYS)) u_update (
    .entries    (ways),
    .key        (s2_key),
    .len        (s2_len),
    .prune_en   (cfg_prune_en),
    .ins_status (c_ins_status),
    .ins_write  (c_ins_write),
    .ins_way    (c_ins_way),
    .match_vec  (c_match_vec)
  );

  // --------------------------------------------------- S3: arbitration bus
  logic upd_mode, modify_ok, a_hold, a_avail;

  assign upd_mode  = s3_cmd != CMD_SEARCH;
  assign modify_ok = acc_of_len(s3_new_len) == s3_acc &&
                     expanded_len(s3_new_len) == expanded_len(s3_len);

  always_comb begin
    a_hold  = 1'b0;
    a_avail = 1'b0;
    if (s3_v && upd_mode) begin
      unique case (s3_cmd)
        CMD_INSERT: begin
          a_hold  = s3_ins_status inside {ST_UPDATED, ST_REPLACED, ST_PRUNED};
          a_avail = s3_ins_status == ST_INSERTED;
        end
        CMD_DELETE: a_hold = s3_match_vec != '0;
        CMD_MODIFY: a_hold = s3_match_vec != '0 && modify_ok;
        default: ;
      endcase
    end
  end

  ipstash_dev_arb #(.DEV_ID(DEV_ID)) u_arb (
    .upd_mode (upd_mode),
    .hit      (s3_search_live && s3_hit),
    .hit_len  (s3_hit_len),
    .hold     (a_hold),
    .avail    (a_avail),
    .arb_in   (arb_in),
    .arb_out  (arb_out),
    .any      (arb_any),
    .win      (arb_win)
  );

  // --------------------------------------------------------- array writes
  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      bank_we[b]    = 1'b0;
      bank_wmask[b] = '0;
      bank_addr[b]  = s1_bank_idx[b];
      for (int w = 0; w < WAYS_PER_BANK; w++) bank_wdata[b][w] = '0;
      if (clearing) begin
        bank_we[b]    = 1'b1;
        bank_wmask[b] = '1;
        bank_addr[b]  = clr_row;
      end else if (s3_v && upd_mode) begin
        bank_addr[b] = s3_bank_idx[b];
        for (int w = 0; w < WAYS_PER_BANK; w++) begin
          logic [WW-1:0] gw;
          gw = WW'(b * WAYS_PER_BANK + w);
          unique case (s3_cmd)
            CMD_INSERT: if (arb_win && s3_ins_write && s3_ins_way == gw) begin
              bank_wmask[b][w] = 1'b1;
              bank_wdata[b][w] = '{valid: 1'b1, tag: s3_key, len: enc_len(s3_len),
                                   port: s3_port};
            end
            CMD_DELETE: if (a_hold && s3_match_vec[gw]) begin
              bank_wmask[b][w] = 1'b1;
              bank_wdata[b][w] = '0;
            end
            CMD_MODIFY: if (a_hold && s3_match_vec[gw]) begin
              bank_wmask[b][w] = 1'b1;
              bank_wdata[b][w] = '{valid: 1'b1, tag: s3_key & len_mask(s3_new_len),
                                   len: enc_len(s3_new_len), port: s3_port};
            end
            default: ;
          endcase
        end
        bank_we[b] = bank_wmask[b] != '0;
      end
    end
  end

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing   <= 1'b1;
      clr_row    <= '0;
      busy_cnt   <= '0;
      seq        <= 1'b0;
      s1_v       <= 1'b0;
      s1_first   <= 1'b0;
      s1_last    <= 1'b0;
      s1_seq     <= 1'b0;
      s1_cmd     <= CMD_NOP;
      s1_acc     <= ACC_C1;
      s1_addr    <= '0;
      s1_len     <= '0;
      s1_new_len <= '0;
      s1_port    <= '0;
      s2_v       <= 1'b0;
      s3_v       <= 1'b0;
      done_q     <= 1'b0;
      done_seq_q <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp        <= '0;
    end else begin
      // clear sweep after reset
      if (clearing) begin
        clr_row <= clr_row + 1'b1;
        if (clr_row == INDEX_W'(SETS - 1)) clearing <= 1'b0;
      end

      // issue
      if (busy_cnt != 2'd0) busy_cnt <= busy_cnt - 2'd1;
      if (accept) begin
        busy_cnt   <= 2'd2;
        seq        <= !seq;
        s1_v       <= 1'b1;
        s1_first   <= 1'b1;
        s1_seq     <= !seq;
        s1_cmd     <= req.cmd;
        s1_acc     <= (req.cmd == CMD_SEARCH) ? ACC_C1 : acc_of_len(req.len);
        s1_last    <= req.cmd != CMD_SEARCH;
        s1_addr    <= req.addr;
        s1_len     <= req.len;
        s1_new_len <= req.new_len;
        s1_port    <= req.port;
        if (done_seq_q == !seq) done_q <= 1'b0;
      end else if (s1_v && !s1_last) begin
        s1_first <= 1'b0;
        s1_acc   <= (s1_acc == ACC_C1) ? ACC_C2 : ACC_C3;
        s1_last  <= s1_acc == ACC_C2;
      end else begin
        s1_v <= 1'b0;
      end

      s2_v <= s1_read;
      s3_v <= s2_v;

      // S3: result bus, one cycle after arbitration
      rsp_valid <= 1'b0;
      rsp       <= '0;
      if (s3_search_live) begin
        if (arb_any) begin
          done_q     <= 1'b1;
          done_seq_q <= s3_seq;
          if (arb_win) begin
            rsp_valid <= 1'b1;
            rsp       <= '{status: ST_HIT, len: s3_hit_len, port: s3_hit_port};
          end
        end else if (s3_last) begin
          rsp_valid <= 1'b1;
          rsp       <= '{status: ST_MISS, len: '0, port: '0};
        end
      end else if (s3_v && upd_mode) begin
        if (arb_any) begin
          if (arb_win) begin
            rsp_valid <= 1'b1;
            unique case (s3_cmd)
              CMD_INSERT: rsp <= '{status: s3_ins_status, len: s3_len, port: s3_port};
              CMD_DELETE: rsp <= '{status: ST_DELETED, len: s3_len, port: '0};
              default:    rsp <= '{status: ST_MODIFIED, len: s3_new_len, port: s3_port};
            endcase
          end
        end else begin
          rsp_valid <= 1'b1;
          if (s3_acc == ACC_NONE || (s3_cmd == CMD_MODIFY && !modify_ok))
            rsp <= '{status: ST_BADLEN, len: s3_len, port: '0};
          else if (s3_cmd == CMD_INSERT)
            rsp <= '{status: s3_ins_status, len: s3_len, port: '0};
          else
            rsp <= '{status: ST_NOTFOUND, len: s3_len, port: '0};
        end
      end
    end
  end

  // pipeline payload: no reset, qualified by s2_v / s3_v
  always_ff @(posedge clk) begin
    // S1 -> S2
    s2_first   <= s1_first;
    s2_last    <= s1_last;
    s2_seq     <= s1_seq;
    s2_cmd     <= s1_cmd;
    s2_acc     <= s1_acc;
    s2_addr    <= s1_addr;
    s2_len     <= s1_len;
    s2_new_len <= s1_new_len;
    s2_port    <= s1_port;
    for (int b = 0; b < BANKS; b++) s2_bank_idx[b] <= s1_bank_idx[b];

    // S2 -> S3
    s3_first      <= s2_first;
    s3_last       <= s2_last;
    s3_seq        <= s2_seq;
    s3_cmd        <= s2_cmd;
    s3_acc        <= s2_acc;
    s3_len        <= s2_len;
    s3_new_len    <= s2_new_len;
    s3_port       <= s2_port;
    s3_key        <= s2_key;
    for (int b = 0; b < BANKS; b++) s3_bank_idx[b] <= s2_bank_idx[b];
    s3_hit        <= c_hit;
    s3_hit_len    <= c_hit_len;
    s3_hit_port   <= c_hit_port;
    s3_ins_status <= c_ins_status;
    s3_ins_write  <= c_ins_write;
    s3_ins_way    <= c_ins_way;
    s3_match_vec  <= c_match_vec;
  end

endmodule
