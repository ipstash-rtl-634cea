# IPStash: longest-prefix match in a set-associative RAM

A router must find, for every packet, the longest stored route prefix that
matches the destination address. Usually a TCAM does this. A TCAM compares the
address with every entry at once, so it burns a lot of power.

IPStash does the same lookup with an ordinary set-associative memory, organised
like a cache. A few slices of the address select a set. Only the 32 entries of
that set are read and compared. A prefix is found by probing a small, fixed
number of prefix lengths one after another, longest first. Three changes make a
real routing table fit:

- Every prefix is expanded to one of three fixed lengths.
- Redundant expanded entries are pruned as they are inserted.
- Each bank of ways uses its own skewed set index, which spreads out the load
  across sets.

Several devices can share one set of buses to build a larger, more associative
array. A small victim TCAM beside them catches the few entries that fit
nowhere else.

This repository is a synthesizable SystemVerilog model of that architecture for
IPv4. It has the device, the multi-device array, the victim TCAM and their buses,
with self-checking testbenches. At the default size (two devices) it holds
262,144 entries.

## Prefix classes and expansion

Prefixes are grouped by length into classes. Each class is stored at a single
*expanded* length:

| Class | Route lengths | Stored as | Set index      | Tag compared                         |
|-------|---------------|-----------|----------------|--------------------------------------|
| 1     | 21–24         | /24       | `addr[19:8]`   | `addr[31:20]` (12 bits)              |
| 0     | 25–32         | unexpanded | `addr[19:8]`  | `addr[31:20]` plus `len-24` bits of `addr[7:0]` |
| 2     | 17–20         | /20       | `addr[23:12]`  | `addr[31:24]` (8 bits)               |
| 3     | 8–16          | /16       | `addr[27:16]`  | `addr[31:28]` (4 bits)               |

A /22 route, for example, is stored as four /24 entries. A /8 route becomes
256 /16 entries.

Class 0 is not expanded. Its entries share Class 1's index and tag, so one
Class 1 access also finds Class 0 entries. The stored tag carries the 8 low
address bits, and a mask derived from the stored length decides how many of
them must match.

The set index is the 12 address bits just above the expanded length, which
gives 4096 sets. The remaining high bits form the tag.

Prefixes shorter than 8 bits are not supported. Commands with such lengths are
answered with `ST_BADLEN`.

Expansion is done by whoever drives the device. One INSERT command carries one
expanded prefix, together with the route's original length and its output
port. `tb/ipstash_ref_pkg.sv` shows the expansion in its `expand()` function.

Each stored entry is 32 bits (`ipstash_pkg::entry_t`):

- a valid bit,
- the 20-bit tag,
- the unexpanded length minus one (5 bits),
- a 6-bit output port.

The unexpanded length does real work. Several stored entries can match one
address in a single access: a Class 0 entry and a Class 1 entry, or the same
expanded prefix coming from routes of different lengths. The comparator then
returns the matching entry with the **longest unexpanded length**, not the
first match (`ipstash_lookup_cmp`).

## Skewed indexing

A plain set-associative table loads some sets far more heavily than others.
With skewing, each bank of 4 ways turns the class index into its own set
number (`ipstash_skew_index`). The rule depends on the class:

- **Classes 1/0 and 2.** The top 4 index bits pass through. The low 8 index
  bits are XORed with the 8 lowest tag bits, rotated right by the bank number
  `b` (0..7).
- **Class 3.** The tag has only 4 bits. The top 8 index bits pass through. The
  low 4 index bits are XORed with the tag rotated right by `b mod 4`, so
  there are 4 distinct indices, each used by two banks.

The same address therefore lands in a different set in each bank. An entry can
be placed in any bank whose own set still has room.

Skewing is switched on and off by `cfg_skew_en`. It must not change while the
table holds entries.

## The search pipeline (`ipstash_device`)

A search probes three access classes, always in this order:

1. C1, which covers Classes 1 and 0,
2. C2,
3. C3.

The probes go out on three consecutive cycles, and the first class that hits
ends the search. Each probe flows through three stages:

| Cycle after the request | Stage | Work |
|---|---|---|
| 1 | S1 | class index, 8 skewed bank indices, one row read per bank (32 entries) |
| 2 | S2 | tag and length compare over 32 ways; longest-length arbitration |
| 3 | S3 | drive and read the arbitration bus; array writes happen at the end of this cycle |
| 4 | – | the winner drives the result bus (`rsp_valid`, `rsp`) |

`rsp_valid` is asserted at these cycles after the request:

| Outcome | `rsp_valid` cycle |
|---|---|
| Class 1/0 hit | 4 |
| Class 2 hit | 5 |
| Class 3 hit | 6 |
| Miss | 6 |

A new command is accepted every third cycle (`req_ready`), because a search can
occupy the array for three cycles.

When a search is already decided, a probe still waiting in S1 is cancelled and
does not read the array. The decision can come from this device or from another
device, seen on the arbitration bus. The cancellation saves power:

- A Class 1 hit costs 2 array reads per device, not 3.
- A random search costs about 2.4 reads on average.
- The original study measured 2.55 accesses per search on real traffic.

`array_read` pulses once for each read, so power can be estimated by counting
them.

After reset the device writes every one of the 4096 sets to empty, one set per
cycle. `req_ready` stays low during this sweep.

## Updates and internal pruning (`ipstash_update_cmp`)

**INSERT** looks at the class's set in every bank. The *key* of an expanded
prefix is its class, expanded length and tag (masked by length for Class 0).

| Condition | Result | Status |
|---|---|---|
| An entry with the same key **and** the same unexpanded length exists | its port is rewritten | `ST_UPDATED` |
| Pruning on (`cfg_prune_en`), an entry with the same key from a **longer** route exists | the new entry would never be selected, so it is dropped | `ST_PRUNED` |
| Pruning on, an entry with the same key from a **shorter** route exists | it is overwritten in place | `ST_REPLACED` |
| Otherwise | the lowest free way is used | `ST_INSERTED` |
| No free way anywhere | nothing is written | `ST_FULL` |

With pruning off, same-key entries from different lengths coexist. The
longest-length arbitration still returns the right one.

**DELETE** invalidates the entries with the given expanded prefix and
unexpanded length. If none match, the status is `ST_NOTFOUND`.

**MODIFY** rewrites such entries to a new unexpanded length and port. The new
length must be in the same class (`ST_BADLEN` otherwise).

MODIFY exists for deleting routes when pruning is on. A longer route may have
overwritten parts of a shorter route's expansion, so simply deleting the longer
route would leave holes. Instead, the driver finds the longest remaining route
of the same class that covers the deleted one. It then MODIFYs each expanded
entry of the deleted route into that route, or DELETEs the entry if no such
route exists. The testbenches do exactly this.

## Several devices (`ipstash_system`)

`NDEV` devices (default 2) receive every command in parallel and search in
lockstep. They share two buses, each a wired OR of every device's drive:

- **Arbitration bus, 32 bits** (`ipstash_dev_arb`).
  - *Searches:* a device with a hit raises wire `len-1`. A device wins if no
    longer length is on the bus. Only the winner drives the result.
  - *Updates:* a device that already holds the key raises wire `16+DEV_ID`. A
    device that only has a free way raises wire `DEV_ID`. Holders beat free
    space, and within a group the lowest `DEV_ID` wins. This means a prefix is
    never stored twice, and a table fills device 0 first.
  - `NDEV` is at most 16.
- **Result bus.** This carries the winner's `rsp` (status, length and port).
  When nobody wins, every device reports the same miss, `ST_FULL` or
  `ST_NOTFOUND`, so the OR is still correct.

A search that hits early in any device cancels the remaining probes in all
devices.

## The victim TCAM (`ipstash_victim`)

Even with skewing, a table that nearly fills the array can have a set where
every way is taken in every device. A small fully associative store of
`VICTIM_ENTRIES` entries (default 64, in flip-flops) takes those entries.
`VICTIM_ENTRIES=0` removes it.

It joins the buses as one more participant with static priority 15:

- **Loading.** Its free-entry wire is the lowest priority on the bus, so it
  takes an expanded prefix only when no device can. An entry it already holds
  makes it the holder, with the same update and pruning rules as a device.
  `ST_FULL` now means the victim is full too.
- **Searching.** It matches the address against all entries at once (each
  masked to its expanded length). It then keeps the longest match separately
  for each access class. It answers in the arbitration slot of that class:
  - cycle 3 for C1,
  - cycle 4 for C2,
  - cycle 5 for C3.

  So a victim entry loses to a device hit in an earlier class and competes by
  length with hits in the same class, exactly as if it were in a device.
- **DELETE and MODIFY** act on its entries like on a device's.

`victim_used` on the top reports how many entries are occupied.

Doubling `NDEV` doubles both the capacity and the associativity:

| `NDEV` | Entries |
|---|---|
| 1 | 128K |
| 2 | 256K |
| 4 | 512K |
| 8 | 1M |

The devices reuse the same 8 skewing functions, so a 64-way array has 8
distinct indices, each covering 8 ways.

## Interface summary

`ipstash_pkg` defines the request and response types:

- `req_t`: `cmd` (3 bits), `addr` (32), `len` (6), `new_len` (6), `port` (6).
- `rsp_t`: `status` (4), `len` (6), `port` (6).

The commands are:

| Command | Meaning |
|---|---|
| `CMD_SEARCH` | longest-prefix match of `addr` |
| `CMD_INSERT` | store the expanded prefix `addr`, route length `len`, output `port` |
| `CMD_DELETE` | remove the expanded prefix `addr` stored with route length `len` |
| `CMD_MODIFY` | change such entries to route length `new_len` and output `port` |

The handshake works like this:

- A command is taken on a rising edge where both `req_valid` and `req_ready`
  are high.
- Exactly one response follows: a single-cycle pulse of `rsp_valid`.
- Update responses come 4 cycles after the request.

Other ports on the top module:

- `cfg_skew_en` and `cfg_prune_en` select the two capacity features.
- `victim_used` reports how many victim TCAM entries are occupied.
- `arb_bus` exposes the arbitration bus for observation.
- `array_read[NDEV]` has one activity pulse per device per array read.

## Parameters and size

| Parameter | Default | Meaning |
|---|---|---|
| `ipstash_system.NDEV` | 2 | devices on the buses |
| `BANKS` | 8 | banks per device, one skewed index each |
| `WAYS_PER_BANK` | 4 | ways per bank (32-way device) |
| `ipstash_system.VICTIM_ENTRIES` | 64 | victim TCAM entries (0 = none; `NDEV` then up to 16, else 15) |
| `ipstash_bank.SETS` | 4096 | sets (12-bit index, fixed by the class slicing in `ipstash_pkg`) |

The default array is 2 × 32 ways × 4096 sets × 32 bits, about 8.4 Mbit. Each
bank is a single-port memory that reads one 4-way row per cycle. A write takes
priority over a read.

Yosys reports about 21,400 cells of logic for the default top. About 8,100 of
them are the victim TCAM's parallel compare. There are 959 flip-flop bits
outside the RAMs.

## Capacity results

`tb_ipstash_rt_load` loads synthetic routing tables into the default array with
skewing and pruning on. The tables have the same route counts as two real
backbone tables (52,328 and 108,267 routes). Their length mix is typical of BGP
tables: about two thirds /24, the rest mostly /16–/23.

| Routes | Expanded entries | Conflicts |
|---|---|---|
| 52,328 | 94,042 | 0 |
| 108,267 | 191,046 | 0 |

After each load, 20,000 checked searches follow.

Keep two limits in mind:

- The prefixes are uniformly random, and real tables are more clustered, so
  real tables load sets less evenly.
- The architecture's own estimate is that the required associativity grows by
  about 0.0005 ways per (unexpanded) route. By that estimate a 225,000-route
  table needs `NDEV=4`.

## How far this follows the original architecture

These parts follow the architecture as described:

- the classes and their bounds, and the Class 0 folding;
- the index and tag slicing, and the 20-bit tag with 5-bit length and 6-bit port;
- longest-length arbitration among the ways;
- the skewing functions (8 per device, 4 for Class 3);
- internal pruning, and deletion by modification;
- the three-probe lockstep search with a 3-cycle pipeline;
- the 32-bit length arbitration bus, static-priority loading, and "full" when
  every device conflicts.

These are choices made here, because the description does not fix them:

- the command and status encodings;
- the valid bit and the layout of the tag inside its 20 bits;
- the reset sweep;
- the holder/free split of the update arbitration;
- the lowest-free-way placement.

Known departures and omissions:

- **Result timing.** The description counts a 3-cycle first access plus one
  cycle per extra access: 3/4/5 cycles for a Class 1/2/3 hit. The search
  decision here takes the same time, but the result bus is driven one cycle
  later, after the arbitration bus settles, so responses arrive at 4/5/6.
- **Fixed issue interval.** A command is accepted every 3 cycles regardless of
  how many probes a search used. Cancelled probes save array reads (power), not
  issue slots.
- **Separate buses.** The request, arbitration and result buses are separate
  signals. The described device multiplexes them onto one 40-bit bus; that
  multiplexing is not modelled.
- **External expansion only.** The alternative of expanding inside the device
  with a small state machine is not built.
- **Fixed classes.** The classes are fixed in `ipstash_pkg`. Classes
  configurable at power-up, and Class 4 (prefixes of 1–7 bits), are not
  implemented.
- **Victim TCAM choices.** The size of the victim TCAM and its bus protocol
  are not fixed by the architecture; both are choices made here. It stores
  expanded prefixes rather than original routes. It selects the longest length
  by comparison rather than by entry order.
- **No hash-rehash.** The other remedies mentioned for tables that almost fit,
  such as hash-rehash, are not built.
- **No external route store.** Off-line (Liu-style) pruning and the search for
  the covering route on deletion belong to the external agent. They appear only
  in the testbenches.

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

- `tb_ipstash_skew_index`, `tb_ipstash_bank`, `tb_ipstash_lookup_cmp`,
  `tb_ipstash_update_cmp` and `tb_ipstash_dev_arb` test the blocks against
  independently computed expectations.
- `tb_ipstash_device` tests one reduced device against a linear-scan reference
  (`ipstash_ref_pkg`). It covers:
  - random nested tables, searches, insert statuses and removals with pruning;
  - a full set (`ST_FULL`);
  - the latency of each hit class and of misses;
  - back-to-back searches at the 3-cycle interval.
- `tb_ipstash_victim` runs the victim TCAM alone at full command rate. It
  checks every response and its exact cycle against a model, including its
  filling up.
- `tb_ipstash_system` runs the top at its default parameters (two full-size
  devices and the victim). It covers:
  - overflow from device 0 into device 1, then into the victim, and a conflict
    when all are full;
  - hits served by the victim;
  - same-class hits in both devices resolved by length;
  - skewed placement, pruning, replacement, deletion and modification;
  - cancelled probes, with the latency of every case checked.

  It counts each of these mechanisms and fails if one never happens.
- `tb_ipstash_rt_load` runs the routing-table loads described above.

## Simulating

Verilator 5 is enough. For example, to run the full-size system test:

```
verilator --binary --timing -Wno-fatal \
  rtl/ipstash_pkg.sv rtl/ipstash_skew_index.sv rtl/ipstash_bank.sv \
  rtl/ipstash_lookup_cmp.sv rtl/ipstash_update_cmp.sv rtl/ipstash_dev_arb.sv \
  rtl/ipstash_device.sv rtl/ipstash_victim.sv rtl/ipstash_system.sv \
  tb/ipstash_ref_pkg.sv tb/tb_ipstash_system.sv \
  --top-module tb_ipstash_system -Mdir obj_sys
./obj_sys/Vtb_ipstash_system
```

For the other tests, swap in the testbench file and top module. Only
`tb_ipstash_device` and `tb_ipstash_system` need `tb/ipstash_ref_pkg.sv`. Every
test finishes within seconds. The routing-table test runs about 1.5 million
cycles.

## Files

| File | Contents |
|---|---|
| `rtl/ipstash_pkg.sv` | widths, entry/request/response types, class slicing functions |
| `rtl/ipstash_skew_index.sv` | per-bank skewed set index |
| `rtl/ipstash_bank.sv` | one bank: 4096 × 4 entries, single port |
| `rtl/ipstash_lookup_cmp.sv` | 32-way tag/length match with longest-length selection |
| `rtl/ipstash_update_cmp.sv` | insertion decision: update, prune, replace, free way |
| `rtl/ipstash_dev_arb.sv` | one device's side of the arbitration bus |
| `rtl/ipstash_device.sv` | a complete device: control, pipeline, banks |
| `rtl/ipstash_victim.sv` | victim TCAM for entries that conflict in every device |
| `rtl/ipstash_system.sv` | top: `NDEV` devices and the victim TCAM on wired-OR buses |
| `tb/ipstash_ref_pkg.sv` | reference longest-prefix match and route expansion |
| `tb/tb_*.sv` | testbenches |
