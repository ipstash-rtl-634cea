// ipstash_ref_pkg: reference model used by the IPStash testbenches.
//
// Holds a routing table as plain <prefix, length, port> routes and answers
// longest-prefix match by scanning every route, with no classes, expansion or
// hashing, so it shares nothing with the design under test. It also provides
// prefix expansion to the class lengths 16/20/24 (lengths above 24 unchanged),
// which is what an external agent does before writing routes into the device.
package ipstash_ref_pkg;

  typedef struct {
    bit [31:0] pfx;   // left-aligned, zero beyond len
    int        len;
    int        port;
  } route_t;

  function automatic bit [31:0] pmask(int len);
    bit [31:0] m;
    m = '0;
    for (int i = 0; i < len; i++) m[31-i] = 1'b1;
    return m;
  endfunction

  function automatic int class_len(int len);
    if (len > 24) return len;
    if (len > 20) return 24;
    if (len > 16) return 20;
    return 16;
  endfunction

  // 0: Class 1/0 (21..32), 1: Class 2 (17..20), 2: Class 3 (8..16)
  function automatic int class_of(int len);
    if (len > 20) return 0;
    if (len > 16) return 1;
    return 2;
  endfunction

  // Longest prefix match by linear scan.
  function automatic bit lpm(input route_t rt[$], input bit [31:0] a,
                             output int len, output int port);
    bit found;
    found = 0;
    len   = 0;
    port  = 0;
    foreach (rt[i]) begin
      if (((a ^ rt[i].pfx) & pmask(rt[i].len)) == 0 && (!found || rt[i].len > len)) begin
        found = 1;
        len   = rt[i].len;
        port  = rt[i].port;
      end
    end
    return found;
  endfunction

  // i-th expanded prefix of a route (0 .. 2**(class_len-len)-1).
  function automatic bit [31:0] expand(input route_t r, input int i);
    int el;
    bit [31:0] v;
    el = class_len(r.len);
    v  = r.pfx;
    for (int k = 0; k < el - r.len; k++)
      v[31 - r.len - (el - r.len - 1) + k] = 1'(i >> k);
    return v;
  endfunction

  function automatic int n_expand(int len);
    return 1 << (class_len(len) - len);
  endfunction

endpackage
