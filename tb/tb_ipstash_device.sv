// tb_ipstash_device: self-checking test of one IPStash device at full size
// (32 ways as 8 banks of 4, 4096 sets), arbitration bus looped back.
//
// Phases:
//  1. conflict: 33 /32 routes that share their first 24 bits fall into the
//     same skewed set of every bank; 32 fit and the 33rd reports ST_FULL.
//  2. load: a random routing table with nested prefixes is expanded by the
//     testbench and inserted with internal pruning on; every insertion status
//     (inserted / replaced / pruned) is predicted from a key model.
//  3. search: addresses near stored routes and random addresses are looked
//     up one at a time; result and latency (4/5/6 cycles to the result bus
//     for a Class 1/0, 2, 3 match; 6 for a miss) are compared with a
//     linear-scan longest-prefix-match model.
//  4. throughput: back-to-back searches are accepted every third cycle.
//  5. deletion with pruning: routes are removed by rewriting their expanded
//     entries to their longest same-class cover (MODIFY) or invalidating them
//     (DELETE); searches are checked again.
//  6. an unsupported /6 prefix is rejected with ST_BADLEN.
module tb_ipstash_device;
  import ipstash_pkg::*;
  import ipstash_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             req_valid = 1'b0;
  req_t             req = '0;
  logic             req_ready;
  logic [ARB_W-1:0] arb;
  logic             rsp_valid;
  rsp_t             rsp;
  logic             array_read;

  always #5 clk = ~clk;

  ipstash_device dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_skew_en  (1'b1),
    .cfg_prune_en (1'b1),
    .req_valid    (req_valid),
    .req          (req),
    .req_ready    (req_ready),
    .arb_out      (arb),
    .arb_in       (arb),
    .rsp_valid    (rsp_valid),
    .rsp          (rsp),
    .array_read   (array_read)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response monitor
  rsp_t rsp_q[$];
  int   rsp_t_q[$];
  always @(negedge clk) if (rsp_valid) begin
    rsp_q.push_back(rsp);
    rsp_t_q.push_back(cyc);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // issue one command and wait for its response
  task automatic send(input req_t r, output rsp_t rs, output int lat);
    int t0;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req       = r;
    t0        = cyc;
    @(negedge clk);
    req_valid = 1'b0;
    while (rsp_q.size() == 0) @(negedge clk);
    rs  = rsp_q.pop_front();
    lat = rsp_t_q.pop_front() - t0;
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

  int     n_pruned, n_replaced, n_modified, n_deleted;
  route_t routes[$];
  int     keylen [bit [37:0]];   // stored unexpanded length per expanded key

  function automatic bit [37:0] key_of(bit [31:0] e, int len);
    return {e, 6'(class_len(len))};
  endfunction

  function automatic bit route_exists(bit [31:0] p, int l);
    foreach (routes[i]) if (routes[i].pfx == p && routes[i].len == l) return 1;
    return 0;
  endfunction

  task automatic insert_route(input route_t r);
    rsp_t rs;
    int   lat;
    for (int i = 0; i < n_expand(r.len); i++) begin
      bit [31:0] e;
      bit [37:0] k;
      status_e   exp_st;
      e = expand(r, i);
      k = key_of(e, r.len);
      if (!keylen.exists(k))     begin exp_st = ST_INSERTED; keylen[k] = r.len; end
      else if (keylen[k] == r.len) exp_st = ST_UPDATED;
      else if (keylen[k] > r.len)  exp_st = ST_PRUNED;
      else                       begin exp_st = ST_REPLACED; keylen[k] = r.len; end
      send(mk(CMD_INSERT, e, r.len, r.port, 0), rs, lat);
      if (rs.status == ST_PRUNED)   n_pruned++;
      if (rs.status == ST_REPLACED) n_replaced++;
      check(rs.status == exp_st && lat == 4,
            $sformatf("insert %h/%0d: status %0d lat %0d, expected %0d", e, r.len,
                      rs.status, lat, exp_st));
    end
    routes.push_back(r);
  endtask

  function automatic int exp_lat(bit found, int len);
    if (!found) return 6;
    return 4 + class_of(len);
  endfunction

  task automatic search_check(input bit [31:0] a);
    rsp_t rs;
    int   lat, elen, eport;
    bit   f;
    f = lpm(routes, a, elen, eport);
    send(mk(CMD_SEARCH, a, 0, 0, 0), rs, lat);
    if (f)
      check(rs.status == ST_HIT && int'(rs.len) == elen && int'(rs.port) == eport &&
            lat == exp_lat(f, elen),
            $sformatf("search %h: st %0d len %0d port %0d lat %0d, expected /%0d port %0d",
                      a, rs.status, rs.len, rs.port, lat, elen, eport));
    else
      check(rs.status == ST_MISS && lat == 6,
            $sformatf("search %h: st %0d lat %0d, expected miss", a, rs.status, lat));
  endtask

  function automatic bit [31:0] near_route();
    route_t r;
    r = routes[$urandom_range(routes.size() - 1)];
    return r.pfx | ($urandom() & ~pmask(r.len));
  endfunction

  // remove a route: MODIFY its entries to the longest same-class cover, or DELETE
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
      if (keylen[k] != r.len) exp_st = ST_NOTFOUND;
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

  initial begin
    rsp_t rs;
    int   lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // clearing takes one cycle per set
    @(negedge clk);
    check(!req_ready, "device busy clearing after reset");
    while (!req_ready) @(negedge clk);

    // ---- 1. conflict
    for (int i = 0; i < 33; i++) begin
      route_t r;
      r.pfx  = {24'h0A0102, 8'(i)};
      r.len  = 32;
      r.port = i;
      send(mk(CMD_INSERT, r.pfx, 32, i, 0), rs, lat);
      check(rs.status == ((i < 32) ? ST_INSERTED : ST_FULL),
            $sformatf("conflict fill %0d: status %0d", i, rs.status));
      if (i < 32) begin
        routes.push_back(r);
        keylen[key_of(r.pfx, 32)] = 32;
      end
    end
    search_check(32'h0A010220);   // the one that did not fit: miss
    search_check(32'h0A01021F);   // the last one that fit: hit

    // ---- 2. load a random table with nested prefixes
    // a longer route first, then its shorter parent: one expansion is pruned
    begin
      route_t r;
      r.pfx = 32'h0A0B0C00; r.len = 24; r.port = 7;
      insert_route(r);
      r.pfx = 32'h0A0B0C00; r.len = 22; r.port = 8;
      insert_route(r);
    end
    for (int n = 0; n < 220; n++) begin
      route_t r;
      int     pick;
      pick = $urandom_range(99);
      if (pick < 3)       r.len = 8 + $urandom_range(3);
      else if (pick < 15) r.len = 12 + $urandom_range(4);
      else if (pick < 35) r.len = 17 + $urandom_range(3);
      else if (pick < 85) r.len = 21 + $urandom_range(3);
      else                r.len = 25 + $urandom_range(7);
      if (n > 10 && $urandom_range(99) < 40) begin
        // nest under an existing route (same class when possible)
        route_t par;
        par = routes[$urandom_range(routes.size() - 1)];
        if (par.len < 32 && par.len >= 8) begin
          int maxl;
          maxl = (class_len(par.len) > 24) ? 32 : class_len(par.len);
          if (maxl == par.len) maxl = (par.len < 32) ? par.len + 1 : par.len;
          r.len = par.len + 1 + $urandom_range(maxl - par.len - 1);
          r.pfx = (par.pfx | ($urandom() & ~pmask(par.len))) & pmask(r.len);
        end else r.pfx = $urandom() & pmask(r.len);
      end else r.pfx = $urandom() & pmask(r.len);
      r.port = $urandom_range(63);
      if (!route_exists(r.pfx, r.len)) insert_route(r);
    end
    $display("loaded %0d routes, %0d expanded keys", routes.size(), keylen.num());

    // ---- 3. searches
    for (int n = 0; n < 400; n++) search_check(near_route());
    for (int n = 0; n < 100; n++) search_check($urandom());

    // ---- 4. back-to-back searches: one accepted every third cycle
    begin
      int        acc_t[20];
      bit [31:0] a[20];
      for (int i = 0; i < 20; i++) begin
        a[i] = near_route();
        @(negedge clk);
        while (!req_ready) @(negedge clk);
        req_valid = 1'b1;
        req       = mk(CMD_SEARCH, a[i], 0, 0, 0);
        acc_t[i]  = cyc;
      end
      @(negedge clk);
      req_valid = 1'b0;
      while (rsp_q.size() < 20) @(negedge clk);
      for (int i = 0; i < 20; i++) begin
        int elen, eport, t;
        bit f;
        f  = lpm(routes, a[i], elen, eport);
        rs = rsp_q.pop_front();
        t  = rsp_t_q.pop_front();
        if (i > 0) check(acc_t[i] - acc_t[i-1] == 3, "initiation interval of 3 cycles");
        check(rs.status == (f ? ST_HIT : ST_MISS) && (!f || int'(rs.port) == eport) &&
              t - acc_t[i] == exp_lat(f, elen),
              $sformatf("pipelined search %0d", i));
      end
    end

    // ---- 5. deletions (modify to cover, or invalidate)
    for (int n = 0; n < 40; n++) remove_route($urandom_range(routes.size() - 1));
    for (int n = 0; n < 300; n++) search_check(near_route());
    for (int n = 0; n < 50; n++) search_check($urandom());

    // ---- 6. unsupported length
    send(mk(CMD_INSERT, 32'h0C000000, 6, 1, 0), rs, lat);
    check(rs.status == ST_BADLEN, "prefix shorter than 8 bits rejected");
    check(n_pruned > 0 && n_replaced > 0 && n_modified > 0 && n_deleted > 0,
          $sformatf("pruned %0d replaced %0d modified %0d deleted %0d", n_pruned, n_replaced,
                    n_modified, n_deleted));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
