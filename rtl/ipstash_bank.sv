// ipstash_bank: one bank of ways of the IPStash array (an SRAM macro's worth).
//
// SETS rows of WAYS entries each (default 4096 x 4 x 32 bits). The bank has a
// single port, like the SRAM subarrays the architecture is built from: each
// cycle it either reads the whole row at addr (all WAYS entries, registered,
// visible the next cycle) or writes the ways selected by wmask. A read and a
// write are never requested together (the device controller guarantees it);
// if they are, the write wins and rdata holds its old value.
// Storage has no reset: the device clears every row after reset.
// The row/port organisation is this design's choice; the document gives the
// array's geometry (32 ways as 8 banks of 4, 4096 sets) and the entry fields.
module ipstash_bank
  import ipstash_pkg::*;
#(
  parameter int unsigned SETS = 4096,
  parameter int unsigned WAYS = 4
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic                     we,
  input  logic [$clog2(SETS)-1:0]  addr,
  input  logic [WAYS-1:0]          wmask,
  input  entry_t                   wdata [WAYS],
  output entry_t                   rdata [WAYS]
);

  entry_t mem [SETS][WAYS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int w = 0; w < WAYS; w++)
        if (wmask[w]) mem[addr][w] <= wdata[w];
    end else if (re) begin
      for (int w = 0; w < WAYS; w++)
        rdata[w] <= mem[addr][w];
    end
  end

endmodule
