// tb_ipstash_system: end-to-end test of the IPStash array at its default size
// (two devices of 32 ways x 4096 sets on shared buses).
//
// Phase A, standard (unskewed) indexing, pruning off:
//  - /24 routes with the same set index fill that set of device 0 and then
//    overflow into device 1 (static load priority); the next 64 go to the
//    victim TCAM (lowest priority) and the 129th is ST_FULL;
//  - a /22 route whose expansion falls into the full set lands in device 1, and
//    a /24 route on top of a /22 entry of device 0 lands in device 1, so both
//    devices hit in the same class and the longest length wins either way;
//  - a Class 1 hit ends the search early: the pending Class 3 access of the
//    same search is cancelled (two array reads per device instead of three).
// Phase B (after a new reset), skewed indexing and internal pruning on:
//  - 40 /24 routes sharing one set index all fit in device 0 (skewing spreads
//    them over different sets of different banks);
//  - a random table with nested prefixes is loaded, searched, partly deleted
//    (DELETE, or MODIFY to the longest same-class cover) and searched again.
// Every result is compared with a linear-scan longest-prefix-match model,
// every latency with 4/5/6 cycles (Class 1/0, 2, 3 match; 6 for a miss).
// Each mechanism is counted and a failure is counted for any that never occurs.
module tb_ipstash_system;
  import ipstash_pkg::*;
  import ipstash_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             skew_en = 1'b0, prune_en = 1'b0;
  logic             req_valid = 1'b0;
  req_t             req = '0;
  logic             req_ready;
  logic             rsp_valid;
  rsp_t             rsp;
  logic [ARB_W-1:0] arb_bus;
  logic [1:0]       array_read;
  logic [6:0]       victim_used;

  always #5 clk = ~clk;

  ipstash_system dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_skew_en  (skew_en),
    .cfg_prune_en (prune_en),
    .req_valid    (req_valid),
    .req          (req),
    .req_ready    (req_ready),
    .rsp_valid    (rsp_valid),
    .rsp          (rsp),
    .arb_bus      (arb_bus),
    .array_read   (array_read),
    .victim_used  (victim_used)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_hit[4];           // by class: 0 = Class 0, 1..3
  int n_miss, n_full, n_dev1_load, n_both_hit, n_cancel, n_pruned, n_replaced;
  int n_deleted, n_modified, n_skew_spread, n_victim_load, n_victim_hit;

  // monitors
  rsp_t rsp_q[$];
  int   rsp_t_q[$];
  int   reads_acc;        // array reads since the last command was issued
  bit   arb_multi;        // two or more wires seen on the bus
  logic [ARB_W-1:0] arb_seen;
  always @(negedge clk) begin
    if (rsp_valid) begin
      rsp_q.push_back(rsp);
      rsp_t_q.push_back(cyc);
    end
    reads_acc += int'(array_read[0]) + int'(array_read[1]);
    if ($countones(arb_bus) >= 2) arb_multi = 1;
    if (dut.v_rv && dut.v_rsp.status == ST_HIT) n_victim_hit++;
    arb_seen |= arb_bus;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic send(input req_t r, output rsp_t rs, output int lat);
    int t0;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req       = r;
    t0        = cyc;
    reads_acc = 0;
    arb_multi = 0;
    arb_seen  = '0;
    @(negedge clk);
    req_valid = 1'b0;
    while (rsp_q.size() == 0) @(negedge clk);
    rs  = rsp_q.pop_front();
    lat = rsp_t_q.pop_front() - t0;
    // let the cancelled access (if any) pass before the next command
    @(negedge clk);
  endtask

  function automatic req_t mk(cmd_e c, bit [31:0] a, int len, int port, int nlen);
    req_t r;
    r.cmd     = c;
    r.addr    = a;
    r.len     = PLEN_W'(len);
    r.new_len = PLEN_W'(nlen);
    r.port    = PORT_W'(port);
    return r;
  endfunction

  route_t routes[$];
  int     keylen [bit [37:0]];

  function automatic bit [37:0] key_of(bit [31:0] e, int len);
    return {e, 6'(class_len(len))};
  endfunction

  function automatic bit route_exists(bit [31:0] p, int l);
    foreach (routes[i]) if (routes[i].pfx == p && routes[i].len == l) return 1;
    return 0;
  endfunction

  task automatic do_reset(input bit skew, input bit prune);
    rst_n    = 1'b0;
    skew_en  = skew;
    prune_en = prune;
    routes.delete();
    keylen.delete();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
  endtask

  // insert one expanded prefix; returns status, records device 1 loads
  task automatic insert_one(input bit [31:0] e, input int len, input int port,
                            output status_e st);
    rsp_t rs;
    int   lat;
    send(mk(CMD_INSERT, e, len, port, 0), rs, lat);
    st = rs.status;
    check(lat == 4, $sformatf("insert latency %0d", lat));
    if (st == ST_FULL) n_full++;
    if (st == ST_PRUNED) n_pruned++;
    if (st == ST_REPLACED) n_replaced++;
    if (st inside {ST_INSERTED, ST_REPLACED, ST_UPDATED} && arb_seen[1] && !arb_seen[0] &&
        arb_seen[31:16] == '0) n_dev1_load++;
    if (st == ST_INSERTED && arb_seen == 32'h0000_8000) n_victim_load++;
  endtask

  // insert a whole route with prediction of the status (pruning-aware model)
  task automatic insert_route(input route_t r, input bit predict);
    for (int i = 0; i < n_expand(r.len); i++) begin
      bit [31:0] e;
      bit [37:0] k;
      status_e   exp_st, st;
      e = expand(r, i);
      k = key_of(e, r.len);
      if (!prune_en || !keylen.exists(k)) begin exp_st = ST_INSERTED; keylen[k] = r.len; end
      else if (keylen[k] == r.len) exp_st = ST_UPDATED;
      else if (keylen[k] > r.len)  exp_st = ST_PRUNED;
      else                       begin exp_st = ST_REPLACED; keylen[k] = r.len; end
      insert_one(e, r.len, r.port, st);
      if (predict) check(st == exp_st, $sformatf("insert %h/%0d: status %0d, expected %0d",
                                                 e, r.len, st, exp_st));
    end
    routes.push_back(r);
  endtask

  task automatic search_check(input bit [31:0] a);
    rsp_t rs;
    int   lat, elen, eport, ecls;
    bit   f;
    f = lpm(routes, a, elen, eport);
    send(mk(CMD_SEARCH, a, 0, 0, 0), rs, lat);
    if (arb_multi) n_both_hit++;
    if (f) begin
      ecls = (elen > 24) ? 0 : (elen > 20) ? 1 : (elen > 16) ? 2 : 3;
      check(rs.status == ST_HIT && int'(rs.len) == elen && int'(rs.port) == eport &&
            lat == 4 + class_of(elen),
            $sformatf("search %h: st %0d len %0d port %0d lat %0d, expected /%0d port %0d",
                      a, rs.status, rs.len, rs.port, lat, elen, eport));
      n_hit[ecls]++;
      // a Class 1/0 hit cancels the third access in both devices
      if (class_of(elen) == 0) begin
        check(reads_acc == 4, $sformatf("Class 1 hit read the array %0d times", reads_acc));
        if (reads_acc == 4) n_cancel++;
      end else
        check(reads_acc == 6, $sformatf("search read the array %0d times", reads_acc));
    end else begin
      check(rs.status == ST_MISS && lat == 6,
            $sformatf("search %h: st %0d lat %0d, expected miss", a, rs.status, lat));
      n_miss++;
    end
  endtask

  function automatic bit [31:0] near_route();
    route_t r;
    r = routes[$urandom_range(routes.size() - 1)];
    return r.pfx | ($urandom() & ~pmask(r.len));
  endfunction

  task automatic remove_route(input int idx);
    route_t r, p;
    bit     has_p;
    rsp_t   rs;
    int     lat;
    r = routes[idx];
    routes.delete(idx);
    has_p = 0;
    foreach (routes[i])
      if (class_len(routes[i].len) == class_len(r.len) && routes[i].len < r.len &&
          ((routes[i].pfx ^ r.pfx) & pmask(routes[i].len)) == 0 &&
          (!has_p || routes[i].len > p.len)) begin
        has_p = 1;
        p = routes[i];
      end
    for (int i = 0; i < n_expand(r.len); i++) begin
      bit [31:0] e;
      bit [37:0] k;
      status_e   exp_st;
      e = expand(r, i);
      k = key_of(e, r.len);
      if (!keylen.exists(k) || keylen[k] != r.len) exp_st = ST_NOTFOUND;
      else if (has_p) begin exp_st = ST_MODIFIED; keylen[k] = p.len; end
      else begin exp_st = ST_DELETED; keylen.delete(k); end
      if (has_p) send(mk(CMD_MODIFY, e, r.len, p.port, p.len), rs, lat);
      else       send(mk(CMD_DELETE, e, r.len, 0, 0), rs, lat);
      check(rs.status == exp_st && lat == 4,
            $sformatf("remove %h/%0d: status %0d, expected %0d", e, r.len, rs.status, exp_st));
      if (rs.status == ST_MODIFIED) n_modified++;
      if (rs.status == ST_DELETED)  n_deleted++;
    end
  endtask

  task automatic mech(input string name, input int n);
    $display("mechanism %-28s %0d", name, n);
    check(n > 0, $sformatf("mechanism %s never happened", name));
  endtask

  initial begin
    status_e st;
    // ================================================= phase A: standard
    do_reset(1'b0, 1'b0);
    // a /22 route whose expansion 0x51_2C_7F00 lies in set 0xC7F (Class 1 index)
    begin
      route_t q;
      q.pfx = 32'h512C7C00; q.len = 22; q.port = 5;
      insert_route(q, 1'b1);
    end
    // fill set 0xC7F: 31 more /24 routes in device 0, then 30 in device 1
    for (int i = 1; i <= 61; i++) begin
      route_t r;
      r.pfx  = {12'(i * 37 + 1), 12'hC7F, 8'h00};
      r.len  = 24;
      r.port = i % 64;
      insert_route(r, 1'b1);
    end
    check(n_dev1_load == 30, $sformatf("%0d loads went to device 1", n_dev1_load));
    // a /24 on top of device 0's /22 entry: stored by device 1
    begin
      route_t r;
      r.pfx = 32'h512C7F00; r.len = 24; r.port = 9;
      insert_route(r, 1'b1);
    end
    // a /21 route with an expansion in the set: that one goes to device 1
    begin
      route_t r;
      r.pfx = {12'(1 * 37 + 1), 12'hC78, 8'h00}; r.len = 21; r.port = 17;
      insert_route(r, 1'b1);
    end
    check(n_dev1_load == 32, $sformatf("%0d loads went to device 1", n_dev1_load));
    // the set is now full in both devices: the next 64 go to the victim TCAM
    for (int i = 62; i < 62 + 64; i++) begin
      route_t r;
      r.pfx  = {12'(i * 37 + 1), 12'hC7F, 8'h00};
      r.len  = 24;
      r.port = i % 64;
      insert_route(r, 1'b1);
    end
    check(n_victim_load == 64 && victim_used == 7'd64,
          $sformatf("%0d loads went to the victim, %0d used", n_victim_load, victim_used));
    search_check({12'(70 * 37 + 1), 12'hC7F, 8'h31});  // victim hit
    // and the 129th entry of the set is a conflict
    insert_one({12'(126 * 37 + 1), 12'hC7F, 8'h00}, 24, 1, st);
    check(st == ST_FULL, $sformatf("129th entry of a set: status %0d", st));
    // a /16 and a /18 to give Class 3 and Class 2 matches
    begin
      route_t r;
      r.pfx = 32'h512C0000; r.len = 16; r.port = 33;
      insert_route(r, 1'b1);
      r.pfx = 32'h0C400000; r.len = 18; r.port = 34;
      insert_route(r, 1'b1);
    end
    search_check(32'h512C7F42);   // both devices hit in Class 1: /24 (dev 1) beats /22
    search_check({12'(38), 12'hC7F, 8'h99}); // /24 (dev 0) beats /21 (dev 1)
    search_check(32'h512C7D01);   // /22 only
    search_check(32'h512C1234);   // /16 only (Class 3)
    search_check(32'h0C401234);   // /18 (Class 2)
    search_check(32'hFFFFFFFF);   // miss
    for (int n = 0; n < 100; n++) search_check(near_route());

    // ================================================= phase B: skewed, pruned
    do_reset(1'b1, 1'b1);
    for (int i = 0; i < 40; i++) begin
      route_t r;
      r.pfx  = {4'h7, 8'(i * 13 + 1), 12'h3A5, 8'h00};
      r.len  = 24;
      r.port = i;
      insert_route(r, 1'b1);
    end
    check(n_dev1_load == 32, "skewed set index: no overflow into device 1");
    if (n_dev1_load == 32) n_skew_spread++;
    // a longer route first, then its shorter parent: one expansion is pruned
    begin
      route_t r;
      r.pfx = 32'h0A0B0C00; r.len = 24; r.port = 7;
      insert_route(r, 1'b1);
      r.pfx = 32'h0A0B0C00; r.len = 22; r.port = 8;
      insert_route(r, 1'b1);
    end
    for (int n = 0; n < 280; n++) begin
      route_t r;
      int     pick;
      pick = $urandom_range(99);
      if (pick < 3)       r.len = 8 + $urandom_range(3);
      else if (pick < 15) r.len = 12 + $urandom_range(4);
      else if (pick < 35) r.len = 17 + $urandom_range(3);
      else if (pick < 85) r.len = 21 + $urandom_range(3);
      else                r.len = 25 + $urandom_range(7);
      if (n > 10 && $urandom_range(99) < 40) begin
        route_t par;
        par = routes[$urandom_range(routes.size() - 1)];
        if (par.len < 32) begin
          int maxl;
          maxl = (class_len(par.len) > 24) ? 32 : class_len(par.len);
          if (maxl == par.len) maxl = par.len + 1;
          r.len = par.len + 1 + $urandom_range(maxl - par.len - 1);
          r.pfx = (par.pfx | ($urandom() & ~pmask(par.len))) & pmask(r.len);
        end else r.pfx = $urandom() & pmask(r.len);
      end else r.pfx = $urandom() & pmask(r.len);
      r.port = $urandom_range(63);
      if (!route_exists(r.pfx, r.len)) insert_route(r, 1'b1);
    end
    $display("phase B: %0d routes, %0d expanded keys", routes.size(), keylen.num());
    for (int n = 0; n < 400; n++) search_check(near_route());
    for (int n = 0; n < 100; n++) search_check($urandom());
    for (int n = 0; n < 50; n++) remove_route($urandom_range(routes.size() - 1));
    for (int n = 0; n < 300; n++) search_check(near_route());

    mech("Class 0 hit", n_hit[0]);
    mech("Class 1 hit", n_hit[1]);
    mech("Class 2 hit", n_hit[2]);
    mech("Class 3 hit", n_hit[3]);
    mech("miss", n_miss);
    mech("cancelled access", n_cancel);
    mech("load into device 1", n_dev1_load);
    mech("conflict (full)", n_full);
    mech("load into victim TCAM", n_victim_load);
    mech("victim TCAM hit", n_victim_hit);
    mech("same-class hits in 2 devices", n_both_hit);
    mech("skewed placement", n_skew_spread);
    mech("pruned insertion", n_pruned);
    mech("replacing insertion", n_replaced);
    mech("delete", n_deleted);
    mech("modify", n_modified);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
