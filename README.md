# IPv4 route lookup in two memory reads, with a 9C-compressed route store

A router has to find, for every packet, the longest route prefix that matches the
32-bit destination address. This design does it with the **DIR-24-8-BASIC** scheme.
Every prefix is expanded into two flat tables. The lookup is then a direct index into
the first table and, in a minority of cases, one more direct index into the second.
There is no search and no comparison of prefix lengths at lookup time. Because the
two reads go to separate memories, consecutive lookups overlap in a pipeline, and the
chip accepts one destination address per clock.

The design also contains a **nine-coded (9C) compressor**. Each inserted route is
compressed and kept in a 2^13 x 144-bit on-chip row memory, from which the routing
table can be read back.

## The two tables

| table   | entries | entry width | indexed by |
|---------|---------|-------------|------------|
| TBL24   | 2^24    | 16 bits     | address bits 31:8 |
| TBLlong | 2^23 (2^15 blocks of 256) | 15 bits | {block number, address bits 7:0} |

A TBL24 entry is `{flag, 15 bits}`:

* **flag = 0.** The 15 bits are the next hop. No route longer than 24 bits starts with
  these 24 bits.
* **flag = 1.** The 15 bits are a block number. The block's 256 TBLlong entries hold
  the next hop for each value of the last address byte.

A lookup of address `a`:

1. Read `e = TBL24[a[31:8]]`.
2. If `e.flag == 0`, the result is `e[14:0]`.
3. Otherwise read `TBLlong[{e[14:0], a[7:0]}]`. This is `e*256 + a[7:0]`, formed by
   concatenation without an adder. The entry read is the result.

The result is a 15-bit index into an external memory that holds the output-port
information. That memory is outside this RTL. Index 0 means "no route".

### How routes are laid out (worked example)

Routes 10.54/16 → A, 10.54.34/24 → B and 10.54.34.192/26 → C give:

* TBL24[10.54.0 … 10.54.255], except 10.54.34: `{0, A}`. The /16 is expanded over 256
  entries.
* TBL24[10.54.34]: `{1, n}`, where n is the block allocated for this /24 group.
* TBLlong[n*256 + 0 … n*256 + 191]: B.
* TBLlong[n*256 + 192 … n*256 + 255]: C. These are the 64 addresses of the /26.

The price is memory. TBL24 needs 32 MiB whatever the size of the routing table, and
every /24 group that contains a longer route takes a whole 256-entry block. There can
be at most 32768 such groups.

## Blocks

| module | role |
|--------|------|
| `iplk_pkg` | widths, the TBL24 entry struct, command enum, row layout |
| `tbl24`, `tbllong` | the two tables: synchronous memories, 1 read + 1 write port, 1-cycle read |
| `dir24_lookup` | 3-stage lookup pipeline |
| `route_update` | writes routes into the tables (prefix expansion, block allocation) |
| `lookup_alu` | lookup pipeline + update engine, sharing the TBL24 read port |
| `ninec_block_enc` | 9C encoder of one 8-bit block with don't-care bits |
| `ninec_compressor` | 9C compression of a 32-bit ternary prefix (4 blocks → 4…48 bits) |
| `ninec_decompressor` | the inverse |
| `onchip_mem` | 2^13 rows × 144 bits (about 1 Mbit) |
| `ip_lookup_chip` | top: all of the above |

## Lookup pipeline timing

```
cycle   t            t+1                         t+2                 t+3
        TBL24 read   TBL24 data; flag=1 ->       TBLlong data;       res_valid,
        (addr 31:8)  TBLlong read {ptr,a[7:0]}   select next hop     res_index
```

* An address is accepted when `lk_valid && lk_ready`. The result comes out exactly 3
  cycles later, in order. It carries the address (`res_addr`) and `res_long`, which
  is set when TBLlong supplied the result.
* Once accepted, an address never stalls. There is no output back-pressure.
* `lk_ready` drops for one cycle only when the update engine takes the TBL24 read port.
  This happens once per inserted route longer than 24 bits. `lk_stall` marks such
  cycles.

Clocked at the memory access rate, this is one lookup per memory access: 20 million
lookups/s with 50 ns memory.

## Route updates

`cmd_valid`/`cmd_ready` carries two commands. `cmd_ready` is high only while the engine
is idle. `upd_done` pulses when a command is finished.

* **CMD_CLEAR** writes `{0, 0}` into all 2^24 TBL24 entries. It frees all blocks and
  empties the route store. It takes 2^24 + 1 cycles.
* **CMD_INSERT** (prefix, length 0…32, next hop):
  * **length ≤ 24:** writes `{0, nh}` over the 2^(24-len) TBL24 entries of the prefix,
    one per cycle. `upd_done` comes 2^(24-len)+1 cycles after acceptance.
  * **length > 24:** reads the TBL24 entry of the /24 group first. What follows
    depends on that entry:
    * **Already a pointer:** only the 2^(32-len) entries of the route are written in
      the existing block.
    * **Next hop (flag 0):** the next block is allocated (0, 1, 2, …) and the TBL24
      entry becomes `{1, block}`. All 256 entries of the new block are then written.
      Entries inside the route get its next hop; the others get the next hop the TBL24
      entry held before. That is the shorter route that covered them, or 0.
    * **No free block:** the route is dropped and `upd_err_full` is set. The flag
      stays set until CLEAR.

**Ordering rule.** After a CLEAR, insert routes in order of non-decreasing prefix
length. This is what makes plain overwriting correct. A longer route always lands
after the shorter routes it refines. A short route never meets a block pointer it
would destroy. Deleting routes or inserting them in any order would need the prefix
length kept per entry, or a software shadow of the table. Neither is provided.

**Lookups during updates** see the tables as they are at that moment. A route is
fully visible once its `upd_done` has pulsed.

## 9C compression

A route prefix is a ternary word. Its first `len` bits are specified, and the rest are
don't-care. The compressor cuts the 32 bits into four 8-bit blocks, most significant
first. Each half of a block (upper 4 bits = left) is classed as "can be all 0", "can be
all 1" or "mismatch". The block gets one of nine prefix-free codewords:

| case | block | codeword | sent after it |
|------|-------|----------|---------------|
| 1 | 0000 0000 | `0` | – |
| 2 | 1111 1111 | `10` | – |
| 3 | 0000 1111 | `11000` | – |
| 4 | 1111 0000 | `11001` | – |
| 5 | 1111 xxxx | `11010` | right half |
| 6 | xxxx 1111 | `11011` | left half |
| 7 | 0000 xxxx | `11100` | right half |
| 8 | xxxx 0000 | `11101` | left half |
| 9 | xxxx xxxx | `1111` | whole block |

Don't-care bits take whatever value lets a half be constant. Where several cases fit,
the lowest case number wins, and it is always a shortest code. Don't-cares inside a
sent half are sent as 0.

Two examples:

* `00xx1001 xx11111x xxxx0xxx xx00xx0x` → cases 7, 2, 1, 1 → 9+2+1+1 = 13 bits.
* `xxxxxx0x xx0xxxxx 0x0xxx0x xxx00xxx` → four times case 1 → 4 bits.

The code string is left-aligned in a 48-bit field, with its length alongside.

**Route store.** Each accepted INSERT is compressed and written to the next row of
`onchip_mem`. A row is `{code_len(6), code(48), plen(6), nh(15)}` in bits 74:0; bits
143:75 are zero.

* Once 8192 routes are stored, `store_full` is set. Further routes still go into the
  tables but are not logged.
* `rb_en`/`rb_row` reads a row back. One cycle later, `rb_prefix` holds the
  decompressed prefix with the bits past `rb_len` zeroed. The row's next hop and code
  length come with it.

Real route prefixes are mostly ordinary bits, so 9C saves little on them. In the
end-to-end test, 405 random routes took 12409 code bits against 12960 plain bits. The
gain comes from long runs of zeros, ones and don't-cares.

## Where the design departs from, or adds to, the scheme

* **Tables inside the top.** The scheme keeps TBL24 and TBLlong in external DRAM. Here
  they are plain synchronous arrays inside `ip_lookup_chip` (256 Mbit + 120 Mbit). To
  use real DRAM, replace `tbl24`/`tbllong` with controllers that keep the
  one-cycle-read contract, or add the extra latency to the pipeline.
* **Choices of this design:**
  * the update engine as hardware, its command interface and its ordering rule
  * next hop 0 as "no route"
  * sequential block allocation
  * 15-bit TBLlong entries
* **The route store and read-back port** are this design's way of applying the 9C
  code to the routing table.
* **Not built:**
  * A tree-structured lookup over wide memory rows. Only its access counts (5 to 10
    per lookup, for row widths of 68 to 552 bits) are known, not its structure.
  * IPv6.
  * The 400 kbit-for-20000-routes memory figure, which belongs to that tree. This
    design's tables have a fixed size of 376 Mbit.

## Capacity

* **TBL24:** any number of routes of up to 24 bits.
* **TBLlong:** 32768 /24 groups that contain a longer route. Tables of 20000 and 31284
  prefixes always fit. Larger tables fit if no more than 32768 of their /24 groups hold
  a longer prefix.
* **Route store:** the first 8192 routes.
* **Addresses:** IPv4 only.

## Table sizes that were simulated

`tb_workload_ipv4_tables` loads synthetic IPv4 tables of 20000, 31284, 48210, 144124
and 223112 prefixes into the full-size chip. Their length mix is an assumption,
modelled on backbone tables: 0.3 % /8–/15, 40 % /16–/23, 58 % /24 and 1.7 % longer
than /24. For each size it checks 25000 lookups against a longest-prefix model.

| prefixes | insert cycles | TBLlong blocks used | 9C bits for the 8192 stored routes |
|---------:|--------------:|--------------------:|-----------------------------------:|
| 20000    | 1.89 M        | 357                 | 244905 (plain 262144) |
| 31284    | 2.61 M        | 515                 | 229380 |
| 48210    | 3.62 M        | 854                 | 215521 |
| 144124   | 11.5 M        | 2364                | 198475 |
| 223112   | 18.9 M        | 3828                | 196730 |

Most insert cycles go to expanding short prefixes: a /16 costs 256 writes and a /8
costs 65536. Block use stays far below 32768. Compression improves as more short
prefixes, which are mostly don't-care, reach the store, but it never gets much below
75 % of the plain size.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/iplk_pkg.sv tb/ninec_ref_pkg.sv rtl/*.sv tb/tb_ip_lookup_chip.sv \
  --top-module tb_ip_lookup_chip -o sim && obj_dir/sim
```

Swap in another `tb_*.sv` and its top name to run the others.

* **`tb_ip_lookup_chip`** runs the full-size chip (about 26 million cycles, under a
  minute):
  * a clear, then the worked example plus 400 random routes, with background lookups
  * directed and random lookups against a longest-prefix model
  * a 1000-lookup burst, which must take 1000 cycles
  * read-back of every stored route against an independent 9C model
  * /32 routes until all 32768 blocks are used and the store is full

  It counts every mechanism: short and long lookups, no-route results, stalls, block
  allocation and reuse, a dropped route, and the full store.
* **`tb_dir24_lookup`** covers the pipeline with full-size tables: the worked example,
  random entries, the 3-cycle latency, the burst rate and grant stalls.
* **`tb_route_update`** and **`tb_lookup_alu`** use a 16-bit address space (8-bit
  first level, 6 or 8 blocks), so that every address is checked after random route
  sets.
* **`tb_ninec_*`**:
  * `tb_ninec_block_enc` tries all 65536 value/care pairs.
  * `tb_ninec_compressor` checks both worked examples plus random words.
  * `tb_ninec_decompressor` checks the round trip.
* **`tb_tbl24`, `tb_tbllong`, `tb_onchip_mem`** check the memories at full size.
* **`tb_workload_ipv4_tables`** runs the five table sizes above (about 1 minute).

The widths live in `iplk_pkg`. The lookup and update modules take `ADDR_W`, `IDX_W`,
`PTR_W`, `NH_W` as parameters. A different split of the address (for example DIR-16-16)
or a smaller test configuration only needs those parameters. `LONG_BLOCKS` limits the
number of TBLlong blocks the update engine may allocate.
