# Three-level-cell PCM: a nonvolatile multilevel phase change memory device

Phase change memory (PCM) stores data as the resistance of a chalcogenide
cell. A multilevel cell stores more than one bit by programming one of
several resistance levels. The catch is *resistance drift*: after a write, a
cell's resistance rises slowly, roughly as a power of time. A four-level cell
(2 bits) crowds its levels so closely that its second-highest level drifts
into the highest within minutes. That forces a refresh every few minutes, and
a memory that needs refresh is not nonvolatile.

This design goes back from four levels to **three** (S1 = 1 kΩ, S2 = 10 kΩ,
S4 = 1 MΩ) and drops the drift-prone level. The margin above S2 is then wide
enough that drift errors take years to appear, so the device keeps data
without refresh or power. The logic described here recovers most of the lost
density and handles cells that wear out:

* **3-ON-2 coding** stores 3 bits in a pair of ternary cells (1.5 bits/cell).
* **Mark-and-spare** handles worn-out cells. It uses the ninth state of a cell
  pair, both cells at S4, as an *INV* mark. A pair holding a dead cell is
  marked INV and skipped, and a spare pair takes its place. This costs only
  two cells per tolerated failure, and no pointers are stored.
* **BCH-1 transient error correction** (a Hamming code, 10 check bits) serves
  as a safety net against drift. Its check bits sit in single-level cells.

A 64-byte block takes 364 cells, which is 1.406 bits per cell.

The RTL is the logic die of a 16 GB, 8-bank device: block sequencers with
their read and write paths, a shared four-write window, and a host port. It
also includes a behavioural model of the cell arrays so that the device can
be simulated end to end.

## Block layout

| part | cells | bits | notes |
|---|---|---|---|
| data pairs 0..170 | 342 ternary | 513 (512 used) | symbol *i* = data bits 3i+2..3i; bit 512 is padding, written 0 |
| spare pairs 171..176 | 12 ternary | – | take over from up to six worn-out pairs |
| check cells | 10 single-level | 10 | Hamming check bits, S1 = 0, S4 = 1 |

For the error code, every ternary cell is read as two bits: S1 = `00`,
S2 = `01`, S4 = `11`. A drift of one level (S1→S2 or S2→S4) therefore flips
exactly one bit. The 354 cells give a 708-bit message, with cell *c* in bits
2c+1..2c and pair *p* = cells 2p (first) and 2p+1 (second). `tlc_pkg` holds
these sizes, the cell-state enum and the pair symbol struct
`pair_sym_t {inv, data[2:0]}`.

## 3-ON-2 symbols (`pair_encode`, `pair_decode`)

Read the first cell as ternary digit *f* and the second as *s* (S1, S2, S4 =
0, 1, 2). The pair holds the value 3f + s:

| first \ second | S1 | S2 | S4 |
|---|---|---|---|
| **S1** | 000 | 001 | 010 |
| **S2** | 011 | 100 | 101 |
| **S4** | 110 | 111 | INV |

INV has to be (S4, S4). It is the state that a stuck-reset cell already holds.
A stuck-set cell can be forced into it with a reverse-current pulse. So any
pair with a dead cell can still be given the mark.

## Transient error correction (`tec_encoder`, `tec_decoder`)

The code is a Hamming single-error-correcting code over the 708-bit message.
Message bit *k* sits at the *k*-th Hamming position that is not a power of
two, and check bit *i* is the parity of the positions that have bit *i* set.
Because 2^10 ≥ 708 + 10 + 1, ten check bits are enough. An SEC-DED (Hsiao)
variant would need 11.

The decoder handles the syndrome as follows:

* **Zero:** the block is clean.
* **A power of two:** a check cell is wrong, and the message needs no repair.
* **A message position:** that bit is flipped back.
* **Above 718:** the pattern cannot come from a single error, and the decoder
  raises `uncorrectable`.

Other multi-bit patterns are miscorrected silently, as with any SEC code.

Correction happens **before** mark-and-spare. A drift from (S4, S2) to
(S4, S4) would otherwise look like a wearout mark and shift the whole block.

## Mark-and-spare

This is the least obvious part of the design.

### Reading: removing marked pairs (`or_prefix`, `ms_remove_stage`, `ms_corrector`)

The read path decodes all 177 pairs into INV flags and symbols. Six identical
stages then each throw out one pair:

```
stage input  : in[0] ... in[N-1]         (N = 177, 176, ..., 172)
S[j]         = inv[0] | inv[1] | ... | inv[j]      (prefix OR)
stage output : out[j] = S[j] ? in[j+1] : in[j],  j = 0 .. N-2
```

Below the first INV pair every `S[j]` is 0, so those pairs pass straight
through. From the first INV pair on, every output takes its upper neighbour,
which removes that INV pair. If a stage sees no INV pair at all, it drops the
last pair, which is an unused spare. After six stages the 171 outputs are
exactly the first 171 non-INV pairs, in order.

The MUX selects are made from the flags alone. No failure position is stored
anywhere.

If more than six pairs are INV, one survives the stages and the block is
reported uncorrectable. `ms_corrector` also counts the INV pairs it sees.

The prefix OR is the slow part: a ripple chain over 177 pairs is 176 gates
deep. `or_prefix` builds it as a **Sklansky** tree. At level *l*, each bit in
the upper half of a 2^(l+1)-bit group ORs in the last bit of the lower half.
That gives ⌈log2 N⌉ = 8 levels for N = 177.

### Writing: inserting marks (`ms_insert_stage`, `ms_placer`)

The write side mirrors the read side. The row starts as the 171 data symbols
followed by six fillers (both cells S1, the state least prone to drift). Each
of six stages inserts one mark:

1. The stage takes a prefix OR of the *remaining* mark mask. It finds the
   lowest marked slot *m* as the bit set in the mask but not in the prefix one
   place below.
2. Slot *m* receives INV.
3. Every slot above *m* takes its lower neighbour's symbol, and the top
   filler falls off.
4. The stage clears bit *m* from the mask for the next stage.

Because marks are inserted lowest position first, each mark lands at its
final slot. With at most six marks, the read stages undo the write stages
exactly. With more, `overflow` is raised.

### Finding worn-out pairs (`tlc_controller`)

Marks are stored only as INV pairs in the block itself. A write therefore
works as follows:

1. Read the block. Its INV pairs, after transient correction, are the current
   marks.
2. Lay the new data out around those marks (`tlc_write_path`) and write with
   write-and-verify.
3. If a ternary cell fails verification, add its pair to the marks and write
   again. On this rewrite the marked pair is driven to (S4, S4) with a
   reverse-current pulse allowed, which revives a stuck-set cell.
4. Repeat until a write verifies. If a seventh pair would be needed, the
   write ends with `write_fail`.

Two kinds of verify failure are left to the Hamming code and do not cause a
rewrite: those inside pairs that are already marked, and those in check
cells.

A read goes array → `tlc_read_path` (transient correction → pair decode →
`ms_corrector` → symbol assembly) → host. It reports `tec_corrected`, an
uncorrectable flag and the mark count.

## Device (`tlc_device`)

```
host req ──► bank select (addr % 8) ──► tlc_controller ×8 ──► pcm_array_model ×8
                                            │   ▲
                    write_window_limiter ◄──┘   │   (grant: lowest bank asking)
host rsp ◄── output register ◄── response slot ×8 (lowest full slot first)
```

* **Banks.** The eight banks are interleaved on the low address bits and work
  in parallel. A request is accepted when its bank is idle and that bank's
  response slot is empty. `req_ready` therefore depends on `req_addr`.
* **Responses.** A response is a one-cycle `rsp_valid` pulse carrying the
  request's address and kind. The host must take it; there is no
  back-pressure.
* **Write window.** PCM write current limits throughput to 40 MB/s, which is
  four 64-byte writes per 6.4 µs. `write_window_limiter` keeps one down-counter
  per allowed write and is shared by the whole device. `wr_stall` shows a bank
  waiting for it.
* **Refresh.** There is none: the three-level cells do not need it.

The default sizes are those of the evaluated configuration, at an assumed
1 GHz clock:

* 2^28 blocks of 64 B (16 GB) in 8 banks
* 200-cycle array reads and 1000-cycle array writes
* four writes per 6400 cycles

Without faults:

* **Read:** the response comes `READ_CYCLES + 5` cycles after the request is
  accepted, so the logic adds 5 ns.
* **Write:** `READ_CYCLES + WRITE_CYCLES + 8` cycles, because each write
  starts by reading the block. Every rewrite adds a write time.

The read, write and correction paths are combinational between registers. A
real implementation would add pipeline stages there.

## Cell array model (`pcm_array_model`)

This is a behavioural model, not synthesizable. Each cell stores its log10
resistance in hundredths of a decade.

* **Sensing.** A read compares each cell with two thresholds. The defaults are
  3.5 and 5.5 decades, the simple three-level mapping, i.e. the uniform
  four-level thresholds with S3 removed. The optimized mapping shifts S2 and
  the thresholds, but no numbers for it are given, so all levels and
  thresholds are parameters. Check cells are sensed against 4.5 decades.
* **Writing.** A write programs each healthy cell to its nominal level, then
  senses it again and reports per-cell verify failures.
* **Faults.** The `inj_*` port injects faults at any time: stuck-reset (held at
  S4), stuck-set (held at S1, revivable into S4), or drift (raise one cell by
  a given amount).
* **Storage.** Blocks are kept in associative arrays, so the full 16 GB
  address space can be used. A block that was never written reads as all-S1,
  which is a valid all-zero codeword.
* **Timing.** Drift is not computed from elapsed time, and write-and-verify
  lands exactly on the nominal value.

## Files

| module | role |
|---|---|
| `tlc_pkg` | sizes, cell-state enum, `pair_sym_t`, Hamming position/mask functions |
| `pair_encode`, `pair_decode` | 3-ON-2 pair coding |
| `tec_encoder`, `tec_decoder` | Hamming BCH-1 over 708 bits |
| `or_prefix` | Sklansky prefix OR |
| `ms_remove_stage`, `ms_corrector` | read-side mark-and-spare (6 stages) |
| `ms_insert_stage`, `ms_placer` | write-side mark-and-spare (6 stages) |
| `tlc_read_path`, `tlc_write_path` | block datapaths |
| `tlc_controller` | per-bank sequencer with write-and-verify marking |
| `write_window_limiter` | four-write window |
| `pcm_array_model` | behavioural cell array |
| `tlc_device` | top: 8 banks, shared window and response port |

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one compares the module with independent reference models in
`tb/tb_ref_pkg.sv`: the state table above, Hamming positions found by
enumeration, and a scalar placement loop. Each prints
`TB_RESULT checks=N failures=M`.

`tb_tlc_device` runs the whole device with short latencies. It checks every
mechanism and counts each one:

* round trips, and a read of a never-written block
* drift corrections, including a drift into the INV state
* remaps of stuck-set and stuck-reset pairs, and revival writes
* all six spares in use, a write that fails on a seventh worn-out pair, and
  an uncorrectable read
* window stalls, and all eight banks busy at once

`tb_tlc_device_full` runs the device at its default sizes: writes and reads at
both ends of the address space, exact latencies, and a window stall.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tlc_pkg.sv tb/tb_ref_pkg.sv tb/tb_tlc_device.sv --top-module tb_tlc_device
./obj_dir/Vtb_tlc_device
```

Replace `tb_tlc_device` with any other testbench name. Add `-Wno-fatal` if
your Verilator version turns style warnings into errors. All the testbenches
finish in well under a minute.

## Choices made in this design

These points are not fixed by the scheme and were chosen here:

* **Coding details:** the exact 3-ON-2 value mapping (value = 3f + s), the
  bit order inside the 708-bit message, the Hamming position assignment and
  the padding bit.
* **Spare filler and unused code:** unused spares hold (S1, S1). The unused
  cell code `10` is read as S4.
* **Where marks live:** marks are recovered by reading the block before every
  write.
* **Write-and-verify policy:** the retry rule and the revival flag on rewrite
  commands.
* **Device organisation:** bank interleaving on the low address bits, the
  host handshake, the response slots and their fixed-priority arbitration,
  and lowest-bank-first grants of the write window.
* **Clock:** 1 GHz, which sets all the cycle counts.
* **Array model:** the array model's thresholds (simple mapping), the
  single-level threshold, and explicit drift injection.

## Not included

* **Blocks with too many failures.** Remapping of whole blocks that exceed six
  failures, which the scheme suggests combining with an existing technique,
  is not built. Such blocks are reported with `write_fail` or
  `rsp_uncorrectable`.
* **The host side.** The processor, its caches and its memory controller are
  outside the device.
* **More spares.** The number of spare pairs is fixed at six in `tlc_pkg`.
  `ms_corrector` and `ms_placer` take `NSTAGE` as a parameter, but the block
  layout constants would have to change with it.
