// tb_ipstash_rt_load: routing-table-sized workload on the default IPStash
// array (two devices of 32 ways x 4096 sets and the 64-entry victim TCAM,
// skewed indexing, pruning on).
//
// A synthetic table is generated with a prefix-length mix typical of BGP
// tables (about two thirds /24, a few percent each of /16../23, a little
// Class 0 and very few short prefixes), expanded to the class lengths and
// loaded. Two sizes are run, each after a reset: 52,328 routes (the size of
// the smallest table, RT1) and 108,267 routes (RT3, the largest of the three
// tables the conflict study uses). Route prefixes are uniformly random, which
// is not how real tables are clustered, so the conflict counts are only
// indicative.
//
// The expected content is kept as a map from expanded prefix to the
// <unexpanded length, port> that must win there; every insertion status is
// checked against it (a conflict, ST_FULL, is allowed only for a new key and
// is counted), and searches are checked with a longest-prefix match over
// that map. The test also reports the array reads per search.
module tb_ipstash_rt_load;
  import ipstash_pkg::*;

  localparam int N_SIZES = 2;
  localparam int SIZES[N_SIZES] = '{52328, 108267};
  localparam int N_SEARCH = 20000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
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
    .cfg_skew_en  (1'b1),
    .cfg_prune_en (1'b1),
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
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int reads = 0;
  always @(negedge clk) reads += int'(array_read[0]) + int'(array_read[1]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic send(input req_t r, output rsp_t rs);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req       = r;
    @(negedge clk);
    req_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    rs = rsp;
  endtask

  function automatic bit [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFFFFFF >> len);
  endfunction

  function automatic int class_len(int len);
    return (len > 24) ? len : (len > 20) ? 24 : (len > 16) ? 20 : 16;
  endfunction

  // expected winner per expanded key {prefix, class length}: {len, port}
  int        win_map [bit [37:0]];
  bit        route_set [bit [37:0]];
  bit [31:0] pfx_list[$];
  int        len_list[$];

  function automatic int draw_len();
    int p;
    p = $urandom_range(9999);
    if (p < 2)    return 8;
    if (p < 152)  return 12 + $urandom_range(3);
    if (p < 852)  return 16;
    if (p < 1002) return 17;
    if (p < 1252) return 18;
    if (p < 1652) return 19;
    if (p < 1952) return 20;
    if (p < 2252) return 21;
    if (p < 2702) return 22;
    if (p < 3302) return 23;
    if (p < 9902) return 24;
    return 25 + $urandom_range(7);
  endfunction

  // longest prefix match over the expected-winner map
  function automatic bit model_lpm(bit [31:0] a, output int len, output int port);
    bit [37:0] k;
    for (int l = 32; l >= 25; l--) begin
      k = {a & pmask(l), 6'(l)};
      if (win_map.exists(k)) begin len = win_map[k] >> 8; port = win_map[k] & 255; return 1; end
    end
    for (int c = 0; c < 3; c++) begin
      int el;
      el = 24 - 4 * c;
      k = {a & pmask(el), 6'(el)};
      if (win_map.exists(k)) begin len = win_map[k] >> 8; port = win_map[k] & 255; return 1; end
    end
    len = 0; port = 0;
    return 0;
  endfunction

  task automatic run_size(input int n_routes);
    int n_exp, n_full, n_pruned, n_replaced, t_start, r_start;
    rsp_t rs;
    rst_n = 1'b0;
    win_map.delete();
    route_set.delete();
    pfx_list.delete();
    len_list.delete();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    n_exp = 0; n_full = 0; n_pruned = 0; n_replaced = 0;
    t_start = cyc;
    while (pfx_list.size() < n_routes) begin
      int        l, port;
      bit [31:0] p;
      l    = draw_len();
      p    = $urandom() & pmask(l);
      port = $urandom_range(63);
      if (!route_set.exists({p, 6'(l)})) begin
        route_set[{p, 6'(l)}] = 1;
        pfx_list.push_back(p);
        len_list.push_back(l);
        for (int i = 0; i < (1 << (class_len(l) - l)); i++) begin
          bit [31:0] e;
          bit [37:0] k;
          req_t      r;
          e = p | (32'(i) << (32 - class_len(l)));
          k = {e, 6'(class_len(l))};
          r.cmd = CMD_INSERT; r.addr = e; r.len = PLEN_W'(l); r.new_len = '0; r.port = PORT_W'(port);
          send(r, rs);
          n_exp++;
          if (!win_map.exists(k)) begin
            check(rs.status inside {ST_INSERTED, ST_FULL},
                  $sformatf("insert %h/%0d: status %0d", e, l, rs.status));
            if (rs.status == ST_INSERTED) win_map[k] = (l << 8) | port;
            else n_full++;
          end else if ((win_map[k] >> 8) > l) begin
            check(rs.status == ST_PRUNED, $sformatf("insert %h/%0d: status %0d, expected pruned",
                                                    e, l, rs.status));
            n_pruned++;
          end else begin
            check(rs.status == ST_REPLACED, $sformatf("insert %h/%0d: status %0d, expected replaced",
                                                      e, l, rs.status));
            win_map[k] = (l << 8) | port;
            n_replaced++;
          end
        end
      end
    end
    $display("table of %0d routes: %0d expanded prefixes (x%0.2f), %0d stored, %0d pruned, %0d replaced, %0d conflicts, %0d cycles",
             n_routes, n_exp, real'(n_exp) / n_routes, win_map.num(), n_pruned, n_replaced,
             n_full, cyc - t_start);
    // skewed 64-way array: conflicts must stay a small fraction of the table
    check(n_full * 100 < n_exp, $sformatf("%0d conflicts", n_full));

    r_start = reads;
    for (int n = 0; n < N_SEARCH; n++) begin
      bit [31:0] a;
      int        el, ep, idx;
      bit        f;
      req_t      r;
      if (n % 4 == 3) a = $urandom();
      else begin
        idx = $urandom_range(pfx_list.size() - 1);
        a = pfx_list[idx] | ($urandom() & ~pmask(len_list[idx]));
      end
      f = model_lpm(a, el, ep);
      r.cmd = CMD_SEARCH; r.addr = a; r.len = '0; r.new_len = '0; r.port = '0;
      send(r, rs);
      if (f) check(rs.status == ST_HIT && int'(rs.len) == el && int'(rs.port) == ep,
                   $sformatf("search %h: %0d /%0d port %0d, expected /%0d port %0d", a,
                             rs.status, rs.len, rs.port, el, ep));
      else   check(rs.status == ST_MISS, $sformatf("search %h: %0d, expected miss", a, rs.status));
    end
    @(negedge clk);
    $display("  %0d searches: %0.2f array reads per search per device", N_SEARCH,
             real'(reads - r_start) / (2.0 * N_SEARCH));
  endtask

  initial begin
    for (int s = 0; s < N_SIZES; s++) run_size(SIZES[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
