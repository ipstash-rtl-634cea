// ipstash_dev_arb: one device's side of the shared 32-bit arbitration bus.
//
// Several IPStash devices sit on common buses and search in lockstep; the bus
// is a wired OR of what every device drives, and each device decides on its
// own whether it won.
// Search: a device with a hit drives the one wire that stands for its
// unexpanded prefix length (wire len-1). It is the winner when no longer
// length is on the bus; it then puts its result on the result bus.
// Update (insert, delete, modify): a device that can take the prefix drives a
// wire given by its static priority DEV_ID: wire 16+DEV_ID if it already holds
// the same prefix (update, replace or prune), wire DEV_ID if it only has a
// free way. Holders beat free space and, within a group, the lowest DEV_ID
// wins. The length wires and the static priority are the document's; the
// split into a holder group and a free group is this design's choice (it keeps
// a prefix from being stored twice). At most 16 devices.
//
// Combinational; arb_in is the OR of all devices' arb_out, this one's included.
module ipstash_dev_arb
  import ipstash_pkg::*;
#(
  parameter int unsigned DEV_ID = 0
) (
  input  logic              upd_mode,  // 0: search, 1: update
  input  logic              hit,       // search: this device hit
  input  logic [PLEN_W-1:0] hit_len,   // search: its unexpanded length, 1..32
  input  logic              hold,      // update: holds the same prefix
  input  logic              avail,     // update: has a free way
  input  logic [ARB_W-1:0]  arb_in,
  output logic [ARB_W-1:0]  arb_out,
  output logic              any,       // some device asserted a wire
  output logic              win        // this device won
);

  initial assert (DEV_ID < 16) else $error("ipstash_dev_arb: DEV_ID must be below 16");

  logic [ARB_W-1:0] hi_mask;
  logic [15:0]      grp, lower_mask;

  // what this device drives
  always_comb begin
    arb_out = '0;
    if (!upd_mode) begin
      if (hit && hit_len != '0) arb_out[hit_len-1] = 1'b1;
    end else if (hold) begin
      arb_out[16+DEV_ID] = 1'b1;
    end else if (avail) begin
      arb_out[DEV_ID] = 1'b1;
    end
  end

  // what it reads back from the bus (kept apart from the drive above so the
  // loop through the wired OR is not a loop in one process)
  always_comb begin
    for (int i = 0; i < ARB_W; i++) hi_mask[i] = (i >= int'(hit_len));
    for (int i = 0; i < 16; i++)    lower_mask[i] = (i < int'(DEV_ID));
    grp = (arb_in[31:16] != '0) ? arb_in[31:16] : arb_in[15:0];
    any = arb_in != '0;
    if (!upd_mode)
      win = hit && hit_len != '0 && (arb_in & hi_mask) == '0;
    else
      win = (hold || avail) && grp[DEV_ID] && ((grp & lower_mask) == '0) &&
            (hold || arb_in[31:16] == '0);
  end

endmodule
