// ipstash_pkg: types, constants and address-slicing functions shared by the
// IPStash set-associative IP-lookup memory.
//
// Prefixes are sorted into classes by their unexpanded length and every class
// is stored at one fixed expanded length, as the architecture prescribes:
//   Class 3 : lengths  8..16, expanded to 16 bits, 4-bit tag,  index = addr[27:16]
//   Class 2 : lengths 17..20, expanded to 20 bits, 8-bit tag,  index = addr[23:12]
//   Class 1 : lengths 21..24, expanded to 24 bits, 12-bit tag, index = addr[19:8]
//   Class 0 : lengths 25..32, not expanded, folded onto Class 1 (same index and
//             same 12-bit tag); its extra low bits addr[7:0] are kept in the
//             stored tag so the comparator can check them.
// Prefixes of 1..7 bits (Class 4) are not supported; this design rejects them.
// A lookup therefore needs at most three accesses, one per access class
// (ACC_C1 covers Classes 1 and 0).
//
// Stored entry (32 bits): valid, 20-bit tag, 5-bit unexpanded length (stored
// as length-1, so 8..32 becomes 7..31) and a 6-bit output port. The 20-bit tag,
// 5-bit length and 6-bit port follow the document; the valid bit and the tag
// layout inside the 20 bits are this design's choice.
package ipstash_pkg;

  localparam int unsigned ADDR_W   = 32;  // IPv4 address / prefix width
  localparam int unsigned INDEX_W  = 12;  // 4096 sets
  localparam int unsigned TAG_W    = 20;  // stored tag bits (ADDR_W - INDEX_W)
  localparam int unsigned LEN_W    = 5;   // stored unexpanded length (len-1)
  localparam int unsigned PLEN_W   = 6;   // prefix length on the request, 0..32
  localparam int unsigned PORT_W   = 6;   // output port information
  localparam int unsigned ARB_W    = 32;  // arbitration bus width
  localparam int unsigned MIN_LEN  = 8;   // shortest supported prefix

  // Commands carried on the request bus (3 bits, as on the shared bus).
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,
    CMD_SEARCH = 3'd1,  // longest prefix match of addr
    CMD_INSERT = 3'd2,  // store expanded prefix addr/len -> port
    CMD_DELETE = 3'd3,  // invalidate expanded prefix addr with unexpanded length len
    CMD_MODIFY = 3'd4   // rewrite entries addr/len into addr/new_len -> port
  } cmd_e;

  // Access class: which index/tag slicing an access uses.
  typedef enum logic [1:0] {
    ACC_C1   = 2'd0,  // Classes 1 and 0
    ACC_C2   = 2'd1,
    ACC_C3   = 2'd2,
    ACC_NONE = 2'd3   // unsupported length
  } acc_e;

  typedef enum logic [3:0] {
    ST_MISS     = 4'd0,
    ST_HIT      = 4'd1,
    ST_INSERTED = 4'd2,  // written into a free way
    ST_UPDATED  = 4'd3,  // same prefix and length present: port rewritten
    ST_REPLACED = 4'd4,  // internal pruning: overwrote a shorter-origin entry
    ST_PRUNED   = 4'd5,  // internal pruning: a longer-origin entry already covers it
    ST_FULL     = 4'd6,  // conflict: no free way in any device
    ST_DELETED  = 4'd7,
    ST_MODIFIED = 4'd8,
    ST_NOTFOUND = 4'd9,
    ST_BADLEN   = 4'd10  // length outside 8..32
  } status_e;

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [LEN_W-1:0]  len;   // unexpanded length - 1
    logic [PORT_W-1:0] port;
  } entry_t;

  typedef struct packed {
    cmd_e              cmd;
    logic [ADDR_W-1:0] addr;     // IP address, or expanded prefix left-aligned
    logic [PLEN_W-1:0] len;      // unexpanded prefix length (updates)
    logic [PLEN_W-1:0] new_len;  // replacement length (CMD_MODIFY)
    logic [PORT_W-1:0] port;     // output port (insert / modify)
  } req_t;

  typedef struct packed {
    status_e           status;
    logic [PLEN_W-1:0] len;   // unexpanded length of the matching prefix
    logic [PORT_W-1:0] port;
  } rsp_t;

  // Access class of an unexpanded prefix length.
  function automatic acc_e acc_of_len(input logic [PLEN_W-1:0] len);
    if (len >= 6'd21 && len <= 6'd32) return ACC_C1;
    if (len >= 6'd17 && len <= 6'd20) return ACC_C2;
    if (len >= PLEN_W'(MIN_LEN) && len <= 6'd16) return ACC_C3;
    return ACC_NONE;
  endfunction

  // Set index of an address for an access class.
  function automatic logic [INDEX_W-1:0] acc_index(input logic [ADDR_W-1:0] a, input acc_e acc);
    case (acc)
      ACC_C1:  return a[19:8];
      ACC_C2:  return a[23:12];
      default: return a[27:16];
    endcase
  endfunction

  // Stored-tag image of an address for an access class.
  function automatic logic [TAG_W-1:0] acc_tag(input logic [ADDR_W-1:0] a, input acc_e acc);
    case (acc)
      ACC_C1:  return {a[31:20], a[7:0]};
      ACC_C2:  return {a[31:24], 12'd0};
      default: return {a[31:28], 16'd0};
    endcase
  endfunction

  // The tag bits that feed the skewing XOR: the 8 rightmost tag bits for
  // Classes 1/0 and 2, the whole 4-bit tag for Class 3.
  function automatic logic [7:0] acc_skew_bits(input logic [ADDR_W-1:0] a, input acc_e acc);
    case (acc)
      ACC_C1:  return a[27:20];
      ACC_C2:  return a[31:24];
      default: return {4'd0, a[31:28]};
    endcase
  endfunction

  // Tag bits that must match for a stored entry of unexpanded length len
  // (1..32). Class 0 entries additionally compare len-24 bits of addr[7:0].
  function automatic logic [TAG_W-1:0] len_mask(input logic [PLEN_W-1:0] len);
    logic [7:0] low;
    low = 8'd0;
    for (int i = 0; i < 8; i++)
      if (int'(len) > 24 + i) low[7-i] = 1'b1;
    case (acc_of_len(len))
      ACC_C1:  return {12'hfff, low};
      ACC_C2:  return {8'hff, 12'd0};
      default: return {4'hf, 16'd0};
    endcase
  endfunction

  // Length as stored (len-1) and back.
  function automatic logic [LEN_W-1:0] enc_len(input logic [PLEN_W-1:0] len);
    return LEN_W'(len - 6'd1);
  endfunction

  function automatic logic [PLEN_W-1:0] dec_len(input logic [LEN_W-1:0] l);
    return PLEN_W'(l) + 6'd1;
  endfunction

  // Length an entry occupies after expansion (class bound, or itself for Class 0).
  function automatic logic [PLEN_W-1:0] expanded_len(input logic [PLEN_W-1:0] len);
    if (len > 6'd24) return len;
    if (len > 6'd20) return 6'd24;
    if (len > 6'd16) return 6'd20;
    return 6'd16;
  endfunction

endpackage
