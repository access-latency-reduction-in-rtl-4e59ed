# Low-latency DRAM controller: write-miss row closing and tag-based address remapping

A DRAM access takes much less time when the row it needs is already open in
the bank's sense amplifiers (a *row-buffer hit*). It takes more when another
row is open and has to be precharged first (a *miss*). This controller sits
between a 1 MB L2 cache and a 128 MB DDR SDRAM memory, and it uses two cheap
mechanisms to raise the share of hits.

1. **Write-miss row closing.** The L2 cache is write-back and sends its dirty
   lines through a write buffer. So a DRAM write is an old line leaving the
   cache. It seldom belongs to the access stream around it, and it usually
   misses the open row. Reads and write hits leave the row open (open-page).
   A write that misses is issued with auto-precharge, so its row is closed
   again at once (*Write-miss Only Close-Page*, `POL_WM1`). As an option, the
   controller then opens again the row that the write pushed out
   (*Write-miss Only Close-Page-Open previous Page*, `POL_WM2`). That way the
   stream that was running before the write finds its row still open.
2. **Address remapping into the L2 tag.** With plain page interleaving
   (row | group | bank | column), the group and bank bits fall inside the L2
   set index. Two lines that conflict in the L2 (same set, different tag)
   then always go to the same bank and to different rows: each write-back of
   a victim line followed by the fill of its replacement is a row conflict.
   The five schemes built here move the group field, the bank field or both
   into the lowest bits of the L2 tag. Conflicting lines then differ in
   their bank or group, and most of these schemes need no xor gates.

## Address layouts

The defaults give a 27-bit byte address. The DRAM is 2 groups (channels) of
4 x16 DDR SDRAM chips. Each chip has 4 banks of 4096 rows, with 1 KB per row,
so one group's page is 4 KB. The L2 cache is 4-way with 128 B lines and
2048 sets, so it splits the address into tag `[26:18]`, set index `[17:7]`
and line offset `[6:0]`. The column field, `[11:0]`, is the same in every
scheme: a page stays a page, and all 8 beats of a line stay in one row.
`R` is the part of the row above the moved field(s). `ow` is the rest of the
row, which fills the index bits below the tag. The row number is `{R, ow}`.

| scheme (`map_scheme_e`) | group | bank | row `{R, ow}` |
|---|---|---|---|
| `MAP_RGRBC`  R \| Gr \| ow \| Bank \| Col | `[18]` | `[13:12]` | `{[26:19],[17:14]}` |
| `MAP_RBRGC`  R \| Bank \| ow \| Gr \| Col | `[12]` | `[19:18]` | `{[26:20],[17:13]}` |
| `MAP_RGBRC`  R \| Gr \| Bank \| ow \| Col | `[20]` | `[19:18]` | `{[26:21],[17:12]}` |
| `MAP_RGRBCX` RGRBC, bank xor low bits of R | `[18]` | `[13:12]^[20:19]` | as RGRBC |
| `MAP_RBGBCX` RBRGC, group xor low bit of R | `[12]^[20]` | `[19:18]` | as RBRGC |

RBGBCX is the xor variant of RBRGC. The mixed spelling is the one the
schemes were published under.

For comparison, page interleaving would put the row at `[26:15]`, the group
at `[14]` and the bank at `[13:12]`, all inside the index.

How to read the schemes:

- **RGRBC and RBRGC** each move one field into the tag. Lines whose tags
  differ in bit 18 (or in bits 19:18) go to different groups (or banks). The
  field left in the index still spreads consecutive pages over banks.
- **RGBRC** moves both fields. It separates the most L2 conflicts, but
  consecutive pages now share a bank, so a program with a small footprint
  uses few banks.
- **The `X` variants** also fold higher tag bits (the lowest bits of `R`)
  into the field that stayed in the index. Two conflicting lines whose tags
  agree in the lowest bits but differ just above them still land in
  different banks (RGRBCX) or groups (RBGBCX).

The field orders are the published ones. Two things were not specified and
are this design's choices: that the xor takes the *lowest* bits of `R`, and
that the row is numbered `{R, ow}`. `addr_remap` checks at elaboration time
that the sizes allow all five schemes: the index must cover the group and
bank fields, and the tag must hold the moved fields plus the xor bits.

## Row management and timing

`dram_ctrl` takes one line request at a time. It compares the request with
the open-row register of its bank (`bank_state_table`) and acts on the
result:

| case | commands | first read beat at the L2 side, after the handshake |
|---|---|---|
| hit (row open) | RD / WR | 3 + CL = 6 cycles |
| closed bank | ACT, RD / WRA | 3 + tRCD + CL = 8 cycles |
| miss (other row open) | PRE, ACT, RD / WRA | 3 + tRP + tRCD + CL = 10 cycles |

A write to a closed bank also uses WRA: it counts as a miss for the policy,
but there is no previous row to open again. Under `POL_WM2` a write miss
that displaced a row is followed by ACT of that row. The ACT is issued as
soon as the auto-precharge of the write has ended (write burst + tWR + tRP),
and only then is the next request taken. At 100 MHz the timing is tRCD =
2 cycles (20 ns row access), CL = 3 (30 ns column access) and tRP = 2
(20 ns precharge). The fixed 3 cycles in the table are this implementation's
pipeline: a cycle for the handshake, a cycle for the decision (which waits
while the bank is busy), and registered read data. All DRAM outputs are
registered. Each bank has a busy counter that blocks the next command on it
until tRP, tRCD, write recovery or tRFC has passed.

Refresh: `refresh_timer` requests a refresh every 1560 cycles (64 ms / 4096
rows). The engine serves it between requests: PREA if any row is open, then
REF. All rows are closed afterwards. Up to seven missed deadlines are kept.

A line is 8 beats of 128 bits. Read data comes back as 8 consecutive
`rd_valid` beats, with `rd_last` on the eighth. Write data is put on the bus
together with WR/WRA and on the 7 cycles after it (write latency 0). The
beats are pulled straight from the write buffer head through
`wr_beat_idx`/`wr_beat_data`. `wr_done` pops the entry in the cycle of the
last beat. The `ev_*` outputs pulse once per access (class hit / miss /
closed, read or write), once per re-open and once per refresh, so that hit
rates can be counted outside the controller.

## Structure

```
L2 write-backs --> write_buffer (4 x 128 B FIFO) --+
                                                   +--> req_arbiter --> dram_ctrl --> DRAM bus
L2 read misses ------------------------------------+                    |- addr_remap
                         (read address compared with buffered lines)    |- bank_state_table
                                                                        '- refresh_timer
```

| file | role |
|---|---|
| `rtl/dram_pkg.sv` | default sizes and timing, command / policy / scheme / access-class enums |
| `rtl/mem_ctrl_top.sv` | top: write buffer + arbiter + command engine |
| `rtl/dram_ctrl.sv` | decision FSM, policy, command timing, refresh handling |
| `rtl/addr_remap.sv` | the five remapping schemes (combinational) |
| `rtl/bank_state_table.sv` | open flag, row register and busy counter per bank |
| `rtl/write_buffer.sv` | 4-entry write-back FIFO with a read-address match |
| `rtl/req_arbiter.sv` | read-first ordering with the write-buffer exceptions |
| `rtl/refresh_timer.sv` | refresh interval counter |
| `tb/dram_model.sv` | behavioural DDR SDRAM (testbench only): data store and rule checker |

The arbiter serves reads first, with two exceptions where the write-buffer
head goes first: the buffer is full, or the read asks for a line that is
still in the buffer. In the second case the buffer drains in order until the
line has reached the DRAM. So a read never returns stale data.

## Configuration and interface

`cfg_policy` (`POL_WM1` / `POL_WM2`) and `cfg_scheme` are static inputs. Change
them only while the controller is idle and the write buffer is empty. A new
scheme moves every line to a new place, so the memory contents are
meaningless afterwards. The L2 side uses valid/ready handshakes for reads and
write-backs (a write-back carries a full 1024-bit line). The returned read
data has no back-pressure. The DRAM side gives one command per cycle
(`dram_cmd_e`) with separate group, bank, row and column fields, plus a
128-bit write data bus with its enable and a 128-bit read data bus. The two
DDR edges are folded into one 128-bit beat per bus clock. Row and column are
not multiplexed onto one address bus.

All sizes and timings are parameters of `mem_ctrl_top` with the defaults
above. Other DRAM geometries with at least one group bit can be set through
`ROW_BITS`, `BANK_BITS`, `GROUP_BITS` and `PAGE_BITS` (their sum must equal
`ADDR_BITS`). `TAG_LSB` follows the L2 geometry.

## How far to trust it, and where it departs

- Built: the two proposed policies and the five proposed remapping schemes,
  on the DDR SDRAM organisation. The reference points the schemes are
  measured against are not built: open-page for every access,
  close-page-autoprecharge for every access, the gbrc/grbc/rgbc placements,
  and the xor-based permutation interleaving.
- Own choices, not from the published design: one request in flight with no
  overlap of commands to different banks; Wm2's re-open blocks the next
  request until it is issued; tWR = 2, tRFC = 7 and the refresh interval;
  write latency 0; the arbiter's ordering rule; the handshakes; the bits that
  feed the xor; the row numbering `{R, ow}`.
- Not modelled: tRAS, tRRD, tWTR and other secondary DRAM timings; the
  packet buses of SLDRAM and Rambus parts; the row caches of ESDRAM and
  Virtual Channel DRAM. Only the geometry and core timing of those parts
  have been simulated (see `tb_mem_ctrl_orgs`). Organisations with a
  single group (8 parallel SDR SDRAMs, one Direct Rambus channel) cannot
  be configured, because the schemes need a group field.
- The published results come from a cycle simulator running SPEC95 programs
  (cc1, ijpeg, perl). Against open-page, the write-miss policies cut the
  average latency by about 4 % to 21 %, depending on program and DRAM type.
  Those numbers cannot be reproduced here without the programs' address
  traces. The testbenches check correctness and cycle counts, not averages.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dram_pkg.sv tb/tb_mem_ctrl_top.sv --top-module tb_mem_ctrl_top
./obj_dir/Vtb_mem_ctrl_top
```

Replace the testbench name to run another: `tb_mem_ctrl_orgs`,
`tb_dram_ctrl`, `tb_addr_remap`, `tb_bank_state_table`, `tb_write_buffer`,
`tb_req_arbiter` or `tb_refresh_timer`.

- `tb_mem_ctrl_top` runs the whole controller at its defaults. An L2-side
  generator mixes read misses with bursts of write-backs, for every
  policy/scheme pair. The testbench checks every read against the last value
  written to its line, and every access class against its own open-row
  reference. It also counts each mechanism and fails if one never happens:
  hit, miss, closed bank, write miss, re-open, hit on a re-opened row,
  refresh, buffer full, read ahead of a buffered write, and write drained
  first for a conflicting read.
- `tb_mem_ctrl_orgs` runs four 128 MB organisations side by side, set
  through the parameters. One is the default DDR SDRAM. The others are
  SLDRAM-like (8 banks x 1024 rows, 8 KB page, tRCD/CL/tRP = 4/4/3),
  CRDRAM-like (4 x 1024, 16 KB page, 3/2/3) and
  ESDRAM-like (4 x 4096, 4 KB page, 2/1/2). The cycle counts are the chips'
  row-access, column-access and precharge times rounded up to 10 ns bus
  cycles. For every policy/scheme pair it checks access classes, data, read
  latency and the number of re-opens. The harness behind it,
  `tb/org_harness.sv`, is a starting point for trying other geometries.
- `tb_dram_ctrl` drives the engine alone. It also checks the read latency
  in cycles for each of the three cases.
- `dram_model` fails a run on any bank-state or timing violation. Examples:
  ACT to an open bank, RD before tRCD, PRE before write recovery, REF with a
  row open, overlapping bursts.
