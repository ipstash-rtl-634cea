// tb_ipstash_lookup_cmp: fills the 32 ways of a set with expanded prefixes
// of random lengths, some equal to the searched address on their expanded
// bits and some differing in one tag bit, some of another class. The expected
// result is the longest unexpanded length among the entries whose class is
// the access class and whose expanded prefix equals the address on the
// expanded bits; the stored tag images are built here from the prefixes.
module tb_ipstash_lookup_cmp;
  import ipstash_pkg::*;

  localparam int NWAYS = 32;

  entry_t            ent [NWAYS];
  logic [TAG_W-1:0]  tag;
  acc_e              acc;
  logic              hit;
  logic [PLEN_W-1:0] hit_len;
  logic [PORT_W-1:0] hit_port;
  logic [4:0]        hit_way;
  logic [NWAYS-1:0]  hit_vec;

  ipstash_lookup_cmp #(.NWAYS(NWAYS)) dut (
    .entries(ent), .tag(tag), .acc(acc), .hit(hit), .hit_len(hit_len),
    .hit_port(hit_port), .hit_way(hit_way), .hit_vec(hit_vec)
  );

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int elen(int l);
    return (l > 24) ? l : (l > 20) ? 24 : (l > 16) ? 20 : 16;
  endfunction
  function automatic int cls(int l);
    return (l > 20) ? 0 : (l > 16) ? 1 : 2;
  endfunction
  function automatic bit [31:0] m(int l);
    return (l == 0) ? 32'h0 : ~(32'hFFFFFFFF >> l);
  endfunction
  function automatic logic [19:0] image(bit [31:0] p, int c);
    if (c == 0) return {p[31:20], p[7:0]};
    if (c == 1) return {p[31:24], 12'd0};
    return {p[31:28], 16'd0};
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      bit [31:0] a;
      int        c, best, bport;
      bit        any;
      a   = $urandom();
      c   = $urandom_range(2);
      acc = acc_e'(c);
      tag = image(a, c);
      any = 0; best = 0; bport = 0;
      for (int w = 0; w < NWAYS; w++) begin
        int        l, kind;
        bit [31:0] e;
        kind = $urandom_range(9);
        // length: mostly in the access class, sometimes in another class
        if (kind < 7)
          l = (c == 0) ? 21 + $urandom_range(11) : (c == 1) ? 17 + $urandom_range(3) : 8 + $urandom_range(8);
        else
          l = 8 + $urandom_range(24);
        e = a & m(elen(l));
        if (kind >= 4 && kind < 7) begin
          // flip one bit of the expanded prefix outside the index
          int b;
          b = $urandom_range(elen(l) - 1);
          if (c == 0 && b >= 12 && b < 24) b = b - 12;
          if (c == 1 && b >= 8)  b = b % 8;
          if (c == 2 && b >= 4)  b = b % 4;
          e[31-b] = ~e[31-b];
        end
        ent[w].valid = ($urandom_range(19) != 0);
        ent[w].tag   = image(e, cls(l));
        ent[w].len   = 5'(l - 1);
        ent[w].port  = 6'($urandom());
        if (ent[w].valid && cls(l) == c && (a & m(elen(l))) == e && (!any || l > best)) begin
          any = 1; best = l; bport = ent[w].port;
        end
      end
      #1;
      checks++;
      if (hit != any || (any && (int'(hit_len) != best || int'(hit_port) != bport))) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d: hit %0d len %0d port %0d, expected %0d %0d %0d", n, hit, hit_len,
                   hit_port, any, best, bport);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
