// ipstash_system: NDEV IPStash devices sharing one set of buses.
//
// Capacity grows by adding devices side by side: together they act as one
// array of NDEV times the associativity. Every device sees the same request
// bus and works in lockstep with the others. The 32-bit arbitration bus and
// the result bus are wired ORs of what the devices drive:
//   - search: the device whose hit comes from the earliest class wins outright
//     (the others stop searching); devices that hit in the same class drive
//     their unexpanded lengths and the longest one answers on the result bus
//     one cycle later;
//   - insert: devices that can take the prefix respond, and the one with the
//     highest static priority (lowest index) stores it; if none can, the
//     result is ST_FULL.
// Timing is that of one device: the result of a command accepted in cycle 0
// appears in cycle 4, 5 or 6, and req_ready is the AND of the devices'
// (they are always equal). Device i gets static priority i.
// A victim TCAM of VICTIM_ENTRIES entries (ipstash_victim, none if 0) joins
// the buses with static priority 15, below every device: it takes the
// expanded prefixes that conflict in all devices and is searched in parallel
// with them. ST_FULL then means that the victim is full too.
// The bus scheme and the victim TCAM are the document's; NDEV=2 and the
// victim size of 64 entries are this design's defaults (NDEV=2 is the
// smallest array that exercises the arbitration).
module ipstash_system
  import ipstash_pkg::*;
#(
  parameter int unsigned NDEV          = 2,
  parameter int unsigned BANKS         = 8,
  parameter int unsigned WAYS_PER_BANK = 4,
  parameter int unsigned VICTIM_ENTRIES = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_skew_en,
  input  logic             cfg_prune_en,
  input  logic             req_valid,
  input  req_t             req,
  output logic             req_ready,
  output logic             rsp_valid,
  output rsp_t             rsp,
  output logic [ARB_W-1:0] arb_bus,     // observed arbitration bus
  output logic [NDEV-1:0]  array_read,  // per-device array activity
  output logic [$clog2(VICTIM_ENTRIES+1)-1:0] victim_used  // valid victim entries
);

  localparam int unsigned NVIC = (VICTIM_ENTRIES > 0) ? 1 : 0;

  initial assert (NDEV >= 1 && NDEV + NVIC <= 16)
    else $error("ipstash_system: NDEV must be 1..16 (1..15 with a victim TCAM)");

  logic [ARB_W-1:0] d_arb  [NDEV];
  logic             d_rv   [NDEV];
  rsp_t             d_rsp  [NDEV];
  logic [NDEV-1:0]  d_rdy;

  for (genvar i = 0; i < NDEV; i++) begin : g_dev
    ipstash_device #(
      .BANKS         (BANKS),
      .WAYS_PER_BANK (WAYS_PER_BANK),
      .DEV_ID        (i)
    ) u_dev (
      .clk          (clk),
      .rst_n        (rst_n),
      .cfg_skew_en  (cfg_skew_en),
      .cfg_prune_en (cfg_prune_en),
      .req_valid    (req_valid && req_ready),
      .req          (req),
      .req_ready    (d_rdy[i]),
      .arb_out      (d_arb[i]),
      .arb_in       (arb_bus),
      .rsp_valid    (d_rv[i]),
      .rsp          (d_rsp[i]),
      .array_read   (array_read[i])
    );
  end

  logic [ARB_W-1:0] v_arb;
  logic             v_rv;
  rsp_t             v_rsp;

  if (VICTIM_ENTRIES > 0) begin : g_victim
    ipstash_victim #(
      .ENTRIES (VICTIM_ENTRIES),
      .VICT_ID (15)
    ) u_victim (
      .clk          (clk),
      .rst_n        (rst_n),
      .cfg_prune_en (cfg_prune_en),
      .req_valid    (req_valid && req_ready),
      .req          (req),
      .arb_out      (v_arb),
      .arb_in       (arb_bus),
      .rsp_valid    (v_rv),
      .rsp          (v_rsp),
      .used         (victim_used)
    );
  end else begin : g_no_victim
    assign v_arb       = '0;
    assign v_rv        = 1'b0;
    assign v_rsp       = '0;
    assign victim_used = '0;
  end

  // wired-OR buses
  always_comb begin
    arb_bus   = v_arb;
    rsp_valid = v_rv;
    rsp       = v_rsp;
    for (int i = 0; i < NDEV; i++) begin
      arb_bus   = arb_bus | d_arb[i];
      rsp_valid = rsp_valid | d_rv[i];
      rsp       = rsp_t'(rsp | d_rsp[i]);
    end
  end

  assign req_ready = &d_rdy;

endmodule
