// tb_ipstash_victim: self-checking test of the victim TCAM on its own (its
// arbitration output looped back as the whole bus, no devices).
//
// Commands are issued at the full rate of one every 3 cycles. A reference
// model (a list of expanded entries with the same key rules) predicts every
// response and the exact cycle it appears in. A search hit in access class C1,
// C2 or C3 must answer 4, 5 or 6 cycles after the request, and an update 4
// cycles after it. With no devices on the bus, a search that finds nothing
// and an insertion into a full victim get no response at all; the test checks
// that too. Routes are drawn from a few /8 blocks so that keys collide, with
// pruning on and then off, and ENTRIES is reduced to 8 so the victim fills.
module tb_ipstash_victim;
  import ipstash_pkg::*;

  localparam int ENT = 8;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             prune_en = 1'b1;
  logic             req_valid = 1'b0;
  req_t             req = '0;
  logic [ARB_W-1:0] arb;
  logic             rsp_valid;
  rsp_t             rsp;
  logic [3:0]       used;

  always #5 clk = ~clk;

  ipstash_victim #(.ENTRIES(ENT), .VICT_ID(15)) dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_prune_en (prune_en),
    .req_valid    (req_valid),
    .req          (req),
    .arb_out      (arb),
    .arb_in       (arb),
    .rsp_valid    (rsp_valid),
    .rsp          (rsp),
    .used         (used)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // expected responses by the cycle they must appear in
  rsp_t exp_rsp [int];

  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_rsp.exists(cyc)) begin
        check(rsp_valid && rsp == exp_rsp[cyc],
              $sformatf("response: valid %0d status %0d len %0d port %0d, expected status %0d len %0d port %0d",
                        rsp_valid, rsp.status, rsp.len, rsp.port, exp_rsp[cyc].status,
                        exp_rsp[cyc].len, exp_rsp[cyc].port));
        exp_rsp.delete(cyc);
      end else begin
        check(!rsp_valid, $sformatf("unexpected response status %0d", rsp.status));
      end
    end
  end

  // ------------------------------------------------------------ model
  typedef struct {
    bit [31:0] pfx;
    int        len;
    int        port;
  } ment_t;
  ment_t m[$];

  int n_cls_hit[3] = '{0, 0, 0};
  int n_none = 0, n_full = 0, n_ins = 0, n_upd = 0, n_pruned = 0, n_repl = 0, n_del = 0, n_mod = 0;

  function automatic bit [31:0] pmask(int l);
    return (l == 0) ? 32'h0 : ~(32'hFFFFFFFF >> l);
  endfunction

  function automatic int elen_of(int l);
    return (l > 24) ? l : (l > 20) ? 24 : (l > 16) ? 20 : 16;
  endfunction

  function automatic int cls_of(int l);
    return (l > 20) ? 0 : (l > 16) ? 1 : 2;
  endfunction

  task automatic issue(input req_t r, input bit has_rsp, input rsp_t er, input int lat);
    @(negedge clk);
    if (has_rsp) exp_rsp[cyc + lat] = er;
    req_valid = 1'b1;
    req       = r;
    @(negedge clk);
    req_valid = 1'b0;
    req       = '0;
    @(negedge clk);
  endtask

  task automatic do_search(input bit [31:0] a);
    req_t r;
    rsp_t er;
    bit   found;
    int   lat;
    found = 0; er = '0; lat = 0;
    for (int c = 0; c < 3 && !found; c++) begin
      int bl, bp;
      bl = 0; bp = 0;
      foreach (m[i])
        if (cls_of(m[i].len) == c && ((a ^ m[i].pfx) & pmask(elen_of(m[i].len))) == 0 &&
            m[i].len > bl) begin
          bl = m[i].len; bp = m[i].port;
        end
      if (bl > 0) begin
        found = 1;
        er = '{status: ST_HIT, len: PLEN_W'(bl), port: PORT_W'(bp)};
        lat = 4 + c;
        n_cls_hit[c]++;
      end
    end
    if (!found) n_none++;
    r = '{cmd: CMD_SEARCH, addr: a, len: '0, new_len: '0, port: '0};
    issue(r, found, er, lat);
  endtask

  task automatic do_insert(input bit [31:0] e, input int l, input int port);
    req_t r;
    rsp_t er;
    int   k;
    bit   has;
    k = -1;
    foreach (m[i])
      if (elen_of(m[i].len) == elen_of(l) && m[i].pfx == (e & pmask(elen_of(l))) &&
          (prune_en || m[i].len == l)) k = i;
    has = 1;
    if (k >= 0) begin
      if (m[k].len == l) begin
        er = '{status: ST_UPDATED, len: PLEN_W'(l), port: PORT_W'(port)};
        m[k].port = port; n_upd++;
      end else if (m[k].len > l) begin
        er = '{status: ST_PRUNED, len: PLEN_W'(l), port: PORT_W'(port)};
        n_pruned++;
      end else begin
        er = '{status: ST_REPLACED, len: PLEN_W'(l), port: PORT_W'(port)};
        m[k].len = l; m[k].port = port; n_repl++;
      end
    end else if (m.size() < ENT) begin
      er = '{status: ST_INSERTED, len: PLEN_W'(l), port: PORT_W'(port)};
      m.push_back('{pfx: e & pmask(elen_of(l)), len: l, port: port});
      n_ins++;
    end else begin
      has = 0; er = '0; n_full++;
    end
    r = '{cmd: CMD_INSERT, addr: e, len: PLEN_W'(l), new_len: '0, port: PORT_W'(port)};
    issue(r, has, er, 4);
  endtask

  task automatic do_delete(input bit [31:0] e, input int l);
    req_t r;
    rsp_t er;
    bit   has;
    has = 0;
    for (int i = m.size() - 1; i >= 0; i--)
      if (m[i].len == l && m[i].pfx == (e & pmask(elen_of(l)))) begin
        m.delete(i); has = 1;
      end
    if (has) n_del++;
    er = '{status: ST_DELETED, len: PLEN_W'(l), port: '0};
    r  = '{cmd: CMD_DELETE, addr: e, len: PLEN_W'(l), new_len: '0, port: '0};
    issue(r, has, er, 4);
  endtask

  task automatic do_modify(input bit [31:0] e, input int l, input int nl, input int port);
    req_t r;
    rsp_t er;
    bit   has;
    has = 0;
    if (elen_of(nl) == elen_of(l) && cls_of(nl) == cls_of(l))
      foreach (m[i])
        if (m[i].len == l && m[i].pfx == (e & pmask(elen_of(l)))) begin
          m[i].len = nl; m[i].port = port; has = 1;
        end
    if (has) n_mod++;
    er = '{status: ST_MODIFIED, len: PLEN_W'(nl), port: PORT_W'(port)};
    r  = '{cmd: CMD_MODIFY, addr: e, len: PLEN_W'(l), new_len: PLEN_W'(nl), port: PORT_W'(port)};
    issue(r, has, er, 4);
  endtask

  bit [31:0] base[4];

  function automatic bit [31:0] near_addr();
    return base[$urandom_range(3)] | ($urandom() & 32'h0003_0380);
  endfunction

  task automatic random_phase(input int n);
    for (int i = 0; i < n; i++) begin
      int        op, l, port;
      bit [31:0] e;
      op   = $urandom_range(99);
      l    = 8 + $urandom_range(24);
      port = $urandom_range(63);
      e    = near_addr() & pmask(elen_of(l));
      if (op < 40) do_search(near_addr());
      else if (op < 75) do_insert(e, l, port);
      else if (op < 85 && m.size() > 0) begin
        int k;
        k = $urandom_range(m.size() - 1);
        do_delete(m[k].pfx, m[k].len);
      end else if (op < 95 && m.size() > 0) begin
        int k, nl;
        k  = $urandom_range(m.size() - 1);
        nl = (m[k].len > 24) ? m[k].len : elen_of(m[k].len) - 3 + $urandom_range(3);
        do_modify(m[k].pfx, m[k].len, nl, port);
      end else do_delete(e, l);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) base[i] = {8'($urandom_range(255)), 24'h0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // directed: one entry per class, searched in class order
    do_insert(32'h0A0B0C00, 24, 1);
    do_insert(32'h0A0B0000, 19, 2);   // stored as 0A0B0000/20
    do_insert(32'h0A000000, 8, 3);    // one /16 expansion: 0A00/16
    do_insert(32'h0A0B0C80, 25, 4);   // Class 0 beside the /24
    do_search(32'h0A0B0C81);          // Class 0 beats Class 1 in slot C1
    do_search(32'h0A0B0C01);          // Class 1
    do_search(32'h0A0B0D01);          // Class 2, slot C2
    do_search(32'h0A00FF01);          // Class 3, slot C3
    do_search(32'h0B000000);          // nothing
    do_insert(32'h0A0B0C00, 22, 5);   // pruned by the /24
    do_insert(32'h0A0B0C00, 24, 6);   // updated
    do_delete(32'h0A0B0C80, 25);
    do_search(32'h0A0B0C81);
    do_modify(32'h0A0B0C00, 24, 23, 7);
    do_search(32'h0A0B0C81);
    for (int i = 0; i < 8; i++) do_insert({8'h0C, 8'(i), 16'h0}, 24, i);  // fill up

    random_phase(3000);
    repeat (6) @(negedge clk);  // let the last decision use the old mode
    prune_en = 1'b0;
    random_phase(3000);
    repeat (10) @(negedge clk);

    check(exp_rsp.num() == 0, "responses never seen");
    $display("victim: hits C1/C2/C3 %0d/%0d/%0d, none %0d, inserted %0d, updated %0d, pruned %0d, replaced %0d, full %0d, deleted %0d, modified %0d",
             n_cls_hit[0], n_cls_hit[1], n_cls_hit[2], n_none, n_ins, n_upd, n_pruned, n_repl,
             n_full, n_del, n_mod);
    check(n_cls_hit[0] > 0 && n_cls_hit[1] > 0 && n_cls_hit[2] > 0, "a class never hit");
    check(n_pruned > 0 && n_repl > 0 && n_full > 0 && n_del > 0 && n_mod > 0 && n_upd > 0,
          "an update case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
