# Northcape northbridge: capability-based addressing at the bus

Northcape puts memory protection at the bus, not in the CPU. Every bus master (the CPU, DMA
engines, accelerators) addresses memory with a 64-bit *capability token* instead of a
physical address. One component, the *northbridge*, sits between all masters and all memory
and MMIO slaves. For every transaction it checks that the token is genuine, still valid and
allowed to make this access. It then forwards the access with the physical address, or
answers with a bus error so the access never reaches a slave. A misbehaving DMA device
therefore has no more reach than a misbehaving task. Capabilities are byte-granular segments
with R/W/X permissions, reference counts, an exclusive lock and revocation. Legacy software
keeps working because a plain 32-bit address is a valid token: it is an offset into the
*root capability*.

This repository holds synthesizable SystemVerilog for the northbridge. It covers:
- token decoding;
- the capability metadata table (CMT) controller with its resizable hash table;
- the chain walker that validates tokens;
- the access decision;
- the capability-operation unit and its MMIO registers;
- the revocation scrubber.

It also has a self-checking testbench for every block and two end-to-end testbenches.

## Capability tokens

A token is 64 bits:

```
 63  62 61          46 45                                   0
+------+--------------+--------------------------------------+
| type |   tag (16)   |  number n        |      offset       |
+------+--------------+--------------------------------------+
```

| type | number n | offset | used for |
|------|----------|--------|----------|
| 0 | 14 bits | 32 bits | root and segments over 16 MiB |
| 1 | 46 bits | none | many small objects, no pointer arithmetic |
| 2 | 30 bits | 16 bits | segments up to 64 KiB |
| 3 | 22 bits | 24 bits | segments up to 16 MiB |

- The **tag** is a 16-bit MAC over the capability's table entry, keyed by a secret held in the
  northbridge (`mac_key`). Guessing a valid token means guessing the tag.
- The **number n** identifies the capability. The table key is `{type, n}` (48 bits).
- The **offset** is a byte offset into the segment. Pointer arithmetic on a token only changes
  the offset.
- The root capability has type 0, tag 0 and number 0. Its segment starts at physical 0, so the
  token `0x0000_0000_xxxx_xxxx` is the physical address `xxxx_xxxx`.

A new capability's type follows its length (the smallest offset field that covers it), unless
type 1 is requested. Numbers come from a counter that starts at 1.

## The capability metadata table (CMT)

Each live capability has one 256-bit entry in a table in main memory (`cmt_entry_t` in
`nc_pkg.sv`). One slot is one 256-bit word, read in one memory access.

| field | bits | meaning |
|-------|------|---------|
| ctype | 3 | empty, direct, indirect (derived), paged-out |
| base, length | 32 + 32 | physical segment |
| refcnt | 16 | reference count |
| lock_holder | 55 | task id holding the lock (low 55 bits) |
| aux | 64 | user bits (direct), parent token (indirect), pagefile number (paged-out) |
| r, w, x, locked, lockable, cow | 6 | permissions and flags |
| tag | 16 | the MAC tag of the entry |
| nonce | 32 | value of the operation counter when the entry was written |

Entries do not store their number n. A slot matches a lookup when it is occupied and its
stored tag equals the tag in the token. The MAC covers the key, the entry type, the aux word,
R/W/X and the nonce. It deliberately leaves out everything that changes while a capability is
live: reference count, lock state, base and length. So clone, lock, create and merge do not
invalidate tokens that were already handed out. A revoked or re-created entry gets a new
number and a new nonce, and so a new tag. Old tokens then no longer match.

### Hashing and the slot layout

The table is one contiguous run of slots, `[start, start + 2^bits)`. The key's slot is
`start + (h_sel(key) mod 2^bits)`. `h_sel` is a seeded 64-bit avalanche mix (splitmix64
finaliser) whose seed comes from the function number `sel` (`nc_hash.sv`). Each directory
slot holds exactly one entry. A lookup therefore costs one memory read and one tag compare,
whatever the table holds.

### Growing the table without a latency spike (`nc_cmt_ctrl.sv`)

A normal hash table handles collisions by probing or chaining, so its lookup time depends on
the table's state. This table grows instead.

1. Software hands the controller an empty region for a **shadow table** with twice the slots
   (`bits + 1`), by writing its start to the SHADOW register. The controller clears the region
   in idle cycles and then reports `shadow_ready`.
2. The first insert that collides starts **expansion**. The shadow table becomes the target of
   every insert, using the next hash function (`sel + 1`).
3. During expansion every lookup checks, in order, the overflow buffer, the old table and the
   shadow table. An entry found in the old table is **rehashed on access**: it is written to its
   slot in the shadow table and its old slot is emptied. Software sees the new location
   transparently.
4. When the old table's entry count reaches zero, the shadow table is **promoted** to be the
   active table. The sticky `freed` status bit tells the allocator that the old region can be
   reused. Software then supplies the next shadow region, and the cycle can repeat up to
   `CMT_MAX_BITS`.
5. Collisions that have nowhere to go wait in the **overflow buffer**
   (`nc_overflow_cam.sv`, 8 entries in the northbridge). Such a collision is a shadow slot
   that is already taken during expansion, or a collision before any shadow region has been
   supplied. The buffer is a content-addressed memory that is searched in the same cycle.
   A lookup that hits there moves the entry to its home slot when that slot is free, so the
   buffer drains. An insert that finds the buffer full fails with `E_FULL`.

Every command therefore touches at most three slots plus the buffer. The worst case is a lookup
during expansion that also moves the entry.

**Limit to know about.** Expansion ends only when every entry left in the old table has been
accessed. Entries hold no copy of n, so the controller cannot rehash them on its own. An old
entry whose shadow slot is already taken, while the buffer is full, stays where it is. At high
load this can stall the expansion, and creates then fail with `E_FULL`. The table is meant to
be kept sparse. The full-size test, with 150 capabilities in a 1024-slot table growing to 2048,
completes a promotion. The small end-to-end test pushes a 4-slot table until creates are
refused.

At reset the controller clears the initial table (1024 slots at slot 0 by default). It then
writes the root entry, a direct capability over `[0, 0xFFFF_FFFF)` with R/W/X. Only then does
it accept the first command.

## Validating an access

For each upstream transaction, `nc_resolver.sv` decodes the token and looks up `{type, n}`
with the token's tag. An indirect entry's aux word is its parent's token, so the resolver
looks that up next, and so on, until it reaches a direct or paged-out entry: the *owner*.
A missing entry anywhere on the chain, whether forged, dropped or revoked, ends the walk with
`F_INVALID`. So revoking a direct capability invalidates everything derived from it without
any sweep. Chains longer than `MAX_DEPTH = 8` parent steps are refused (`F_DEPTH`), which keeps
the worst-case latency fixed.

`nc_access_check.sv` then decides, in this order:

1. the token did not resolve: fault from the resolver;
2. the owner is paged out: `F_PAGED`, raises `irq` so the OS can fault the segment in;
3. `offset + (len+1) << size > length`: `F_BOUNDS` (byte-granular, no wrap);
4. a read without R, a write without W, or an instruction fetch (AxPROT[2]) without X:
   `F_PERM`;
5. the owner is locked and the task id in AxUSER (low 55 bits) is not the holder: `F_LOCKED`;
6. a write to a copy-on-write capability: `F_COW`, raises `irq`.

Permissions are taken from the token's own entry (the leaf). The lock and paged-out state are
taken from the owner. A granted access goes downstream at `base + offset`. A refused one is
answered with SLVERR; its write data is accepted and dropped. For paged-out and copy-on-write
faults, the faulting token is also latched in FAULTTOK.

**Latency.** Outside expansion an access costs one CMT read per chain level (1 + depth)
plus a few cycles of control, before the downstream request. The end-to-end test checks that
latency grows with depth, and that exactly 1 + depth CMT reads happen per access.

## Capability operations (`nc_cap_ops.sv`)

Software runs operations by writing operands to the northbridge's registers and then the
opcode to CMD. The write response to CMD comes back only when the operation has finished. Every
operation, including refused ones, advances the nonce counter.

| op | code | effect |
|----|------|--------|
| create | 1 | From direct `a` (count 0), carve a new direct capability over the first LEN bytes with PERMS and USER bits. `a` keeps the rest under the same token (RES1), or is destroyed if LEN is all of it. RES0 = new token. |
| merge | 2 | Direct `a` and `b` (count 0, unlocked, `b` starts where `a` ends): `a` grows by `b`, `b` is destroyed. |
| derive | 3 | New indirect capability over `[OFFSET, OFFSET+LEN)` of `a` with PERMS within `a`'s. It starts at count 1 and adds 1 to `a`'s count. |
| lock | 4 | Lock the owner of `a` for task TID. The owner must be lockable and unlocked. RES bit = success. |
| unlock | 5 | Unlock, only by the same TID. |
| clone | 6 | Count + 1. |
| drop | 7 | Count − 1, never below 1 while the owner is locked. An indirect capability reaching 0 is destroyed and its parent is dropped in turn. RES bit = count reached 0. |
| revoke | 8 | Direct `a` only. Delete the entry, overwrite the segment with zeros (`nc_zero_fill.sv`), and insert a fresh direct capability (new number, R/W/X, lockable). RES0 = new token. All tokens derived from the old one die. |
| mkXonly | 9 | Derive an execute-only capability over all of `a`. `a` must have X. |

Error codes (CMD bits [5:2]):
- 0 ok;
- 1 operand does not resolve;
- 2 wrong capability type;
- 3 length, offset or permissions out of range;
- 4 reference count;
- 5 no CMT space;
- 6 lock refused;
- 7 bad opcode.

The zero filler writes 8-byte single beats with byte strobes, so unaligned neighbours are
untouched. While it runs, it owns the downstream write channels.

### Register map

The window is 256 bytes at physical `MMIO_BASE = 0xFFFF_0000`. It is reached through any
capability that covers it; at reset that is the root. All registers are 64-bit and take
single-beat accesses only; a burst to the window gets SLVERR.

| offset | name | read | write |
|--------|------|------|-------|
| 0x00 | CAP_A | operand a | operand a |
| 0x08 | CAP_B | operand b | operand b |
| 0x10 | LEN | | length |
| 0x18 | OFFSET | | offset (derive) |
| 0x20 | PERMS | | [0]R [1]W [2]X [3]lockable [4]cow [5]offset-less token |
| 0x28 | USER | | 64 device-specific bits |
| 0x30 | TID | | task id (lock / unlock) |
| 0x38 | CMD | {err[5:2], result bit[1], busy[0]} | opcode; the response is returned when the operation is done |
| 0x40, 0x48 | RES0, RES1 | result tokens | |
| 0x50 | CMTSTAT | [0] expanding, [1] shadow ready, [2] freed, [3] init done, [15:8] bits, [23:16] hash number, [47:24] table start, [55:48] overflow entries | bit 2 clears freed |
| 0x58 | SHADOW | {active count [56:32], shadow count [24:0]} | start slot of the next shadow table |
| 0x60 | NONCE | operation counter | |
| 0x68 | IRQ | {zero-filled words [63:32], irq [0]} | bit 0 clears irq |
| 0x70 | FAULTTOK | token of the last paged-out / copy-on-write fault | |
| 0x78 | STATS | {entries moved [63:32], promotions [31:0]} | |

Note that create and merge change the root's base when software carves from it. Register
addresses seen through the root therefore move by the carved length. A driver normally
derives a dedicated capability for the window early on.

## Bus interfaces

Both sides use a simplified AXI4 subset (`nc_pkg.sv`): separate AW/W/B/AR/R channels with
valid/ready, INCR bursts, 64-bit data, and one transaction in flight.

- Upstream (`s_*`): AxADDR is the 64-bit token and AxUSER the 64-bit task id.
- Downstream (`m_*`): 32-bit physical addresses.
- CMT port (`cmt_req_*` / `cmt_rsp_*`): one 256-bit slot per request, with exactly one response
  per request. It is meant to sit on a memory-controller port that reads 256 bits per cycle.

## Where this design fills in or departs

The document describes the mechanisms. These parts are this design's own:
- **MAC:** keyed splitmix64 rounds. It has the right interface and mixing but is not
  cryptographically strong. Replace `nc_mac.sv` with a real MAC for deployment.
- **Hash family:** seeded splitmix64.
- **Table format:** the 32-bit digest and the slot-index units.
- **Entry layout:** the entry-type codes and the placement of fields within the 256 bits.
- **Lookups:** entries match on the tag alone, because the entry has no room for n. Two live
  capabilities whose slots coincide and whose tags are equal (1 in 65536) would be confused.
- **Overflow buffer:** its size, and draining it on lookup.
- **Shadow regions:** the hardware clearing them.
- **Access checks:** the check order, and treating copy-on-write as a fault that raises the IRQ.
- **Chain depth:** the limit of 8.
- **Operations:** the initial reference counts (new direct 0, derived 1), and requiring X for
  mkXonly.
- **Derive bounds:** `off + len <= length` is allowed, so a whole segment can be derived.
- **Merge:** requires both operands unlocked with count 0.
- **Software interface:** the register map and error codes.
- **Bus:** the simplified AXI subset.

Not built:
- paging a capability out or back in. Paged-out entries are recognised: an access raises
  `F_PAGED` with the IRQ, and operations refuse them. But no operation creates a paged-out
  entry or converts one back to direct in place. A paged-out entry's aux word holds the
  pagefile number, so such an entry keeps no user bits;
- the CPU-side `calls` operation (protected procedure calls);
- isolating a compromised device from the bus;
- splitting the capability space over several northbridges.

The data stores, DRAM, memory controller and CPU are outside this RTL. Behavioural models
stand in for them in the testbenches.

## Files

`rtl/` holds one module or package per file:
- `nc_pkg.sv`: types, opcodes, error and fault codes, register offsets, and the token
  encode/decode helpers.
- `nc_token_codec.sv`
- `nc_hash.sv`
- `nc_mac.sv`
- `nc_overflow_cam.sv`
- `nc_cmt_ctrl.sv`
- `nc_resolver.sv`
- `nc_access_check.sv`
- `nc_zero_fill.sv`
- `nc_cap_ops.sv`
- `nc_northbridge.sv` (top)

The top's parameters and defaults:
- `MMIO_BASE = 0xFFFF_0000`
- `CMT_INIT_START = 0`
- `CMT_INIT_BITS = 10`
- `CMT_MAX_BITS = 20`
- `OVF_N = 8`
- `MAX_DEPTH = 8`

`tb/` holds a `tb_<module>.sv` per module and two models:
- `nc_cmt_mem_model.sv`: the CMT region, with latency and random stalls;
- `nc_axi_mem_model.sv`: a byte-addressed memory preset to `byte[a] = 7a + 3`, so expected
  data can be computed.

Highlights of the end-to-end tests:
- `tb_nc_northbridge` uses a 4-slot initial table, so collisions come early. It makes every
  mechanism happen at least once, counts each, and fails if one never occurs:
  - legacy access through the root;
  - forwarding with translation;
  - the bounds, permission, forged-tag, lock and revoked-parent refusals;
  - copy-on-write with IRQ;
  - mkXonly with instruction fetches;
  - recursive drop;
  - merge;
  - revoke with zero-fill;
  - expansion, rehash on access, promotion, and overflow.
- `tb_nc_northbridge_full` runs the top at its default parameters. It creates and reads back
  150 capabilities through a 1024-slot table that expands to 2048 slots and is promoted. It
  also checks a two-level derive and a revoke.

Each unit testbench compares against an independent reference model or scoreboard. The most
extensive:
- `tb_nc_cmt_ctrl`: random insert, lookup, update and delete on a growing table, checking
  entry counts after every command;
- `tb_nc_cap_ops`: every operation and refusal, and a random reference-count model.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nc_northbridge \
    -y rtl -y tb +libext+.sv rtl/nc_pkg.sv tb/tb_nc_northbridge.sv
./obj_dir/Vtb_nc_northbridge
```

Replace the top module to run any other testbench. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog if it hangs. All
testbenches pass. The full-size run takes a few seconds.
