# Ternary CAM from partitioned SRAM

A ternary content-addressable memory (TCAM) stores words whose bits may be
0, 1 or "don't care" (x). A search compares a key with every stored word
at once and returns the address of the first word that matches. A dedicated
TCAM cell is an SRAM pair plus a comparator. That makes it large, slow and
expensive compared with plain SRAM. This RTL builds the same function from
small ordinary memories. The table is cut into pieces so that each piece
can be searched with a single memory read.

The default configuration is a four-entry table of 4-bit words:

| address | sub-word 1 | sub-word 2 | layer |
|---------|------------|------------|-------|
| 0       | 10         | 10         | 1     |
| 1       | 01         | 01         | 1     |
| 2       | 0x         | 11         | 2     |
| 3       | 11         | 1x         | 2     |

All the numbers below use this example.

## Hybrid partitioning

The table is cut in two directions:

* **Layers.** Consecutive entries are grouped into `L` layers of `K`
  entries. Layer `l` holds the addresses `l*K` to `l*K+K-1`. All layers are
  searched in parallel.
* **Sub-words.** Each `C`-bit word is cut into `N = C/W` sub-words of `W`
  bits. Sub-word 1 is the most significant.

Every (layer, sub-word position) pair gets two memories. Both are addressed
by the `W`-bit sub-word value `s`:

* **Validation memory (VM)**, `2**W x 1`: bit `s` is 1 if *any* entry of the
  layer accepts value `s` at this position.
* **Original address table (OAT)**, `2**W x K`: bit `k` of row `s` is 1 if
  entry `k` of the layer accepts value `s` at this position.

A ternary sub-word is "expanded into binary": `0x` sets rows `00` and `01`.
For layer 2 of the example (entries 2 and 3; bit 0 of an OAT row is
address 2):

| row s | VM, sub-word 1 | VM, sub-word 2 | OAT, sub-word 1 | OAT, sub-word 2 |
|-------|----------------|----------------|-----------------|-----------------|
| 00    | 1              | 0              | 01              | 00              |
| 01    | 1              | 0              | 01              | 00              |
| 10    | 0              | 1              | 00              | 10              |
| 11    | 1              | 1              | 10              | 11              |

A word matches only if every one of its sub-words matches. The K-bit AND of
the OAT rows read for the key's sub-words therefore marks exactly the
matching entries.

Memory cost: `L * N * 2**W * (K + 1)` bits. The cost grows exponentially
with `W` and linearly with everything else. `W` is the parameter that
decides whether a configuration is practical.

## Searching a layer

`tcam_layer` searches one layer for the key. Take key `0011` (sub-words `00`
and `11`) in layer 2:

1. Each sub-word reads its VM: `VM[00] = 1` and `VM[11] = 1`.
2. The **1-bit AND** of the VM bits gives the *activation signal*. If any
   sub-word is unknown to the layer, the activation is 0 and the search of
   this layer stops there.
3. If the layer is activated, each sub-word reads its own OAT *directly*,
   with the sub-word as the address. The rows read are `01` and `11` (bit 0
   is address 2).
4. The **K-bit AND** of the rows gives `01`: only entry 2 matches.
5. The **layer priority encoder (LPE)** turns that vector into the
   *probable match address*: PMA = 2.

The OAT is addressed by the sub-word itself. An earlier form of this
architecture placed an extra memory between the VM and the OAT. That memory
translated the sub-word into a compacted OAT row number. Dropping it costs
some OAT rows, which are now `2**W` rows long. It saves a whole memory and
its logic per sub-word. This is where the area saving of this design comes
from.

### Clock gating

The OATs of a layer are only needed when the layer is activated.
`tcam_clk_gate` is a latch-based clock gate, one per layer. Its latch is
transparent while `clk` is low. It gives the layer's OATs a clock pulse only
on edges where the activation signal, or a memory write, was present. A
key that some sub-word rules out therefore costs one VM read per sub-word
and no OAT activity.

The OAT output registers keep their old rows when they are not clocked. For
this reason the registered activation also masks the K-bit AND
(`tcam_andk`), so a layer that was not activated never reports a match.

## Choosing the match address

Each layer delivers a PMA and a valid bit. The **CAM priority encoder**
(`tcam_cpe`) picks the match address `ma` from the lowest layer that has a
match. The LPE picks the lowest entry within a layer. Together they return
the lowest matching address in the table, which is the usual TCAM rule.
The output `match` is low when no entry matches.

## Pipeline and timing

All flip-flops use the rising edge of `clk`. Suppose a search is presented
in cycle 0, with `req & r_wb & ready` high. It is then sampled at edge 1,
the rising edge that ends cycle 0:

| edge | what happens |
|------|--------------|
| 1    | VMs read with the sub-words; sub-words registered |
| 2    | activation settled in cycle 1; OATs read on the gated clock |
| 3    | K-bit AND, LPE and CPE settled in cycle 2; `ma`, `match` registered, `ma_valid` high |

The result is visible in cycle 3, which is a latency of three cycles. A new
search can start every cycle. `layer_active[l]` shows the activation of
layer `l` in cycle 1.

## Writing the table

The table itself lives in `tcam_mapper` as registers. It holds `L*K`
entries, each with a data word, a care mask (a 0 bit is "x") and a valid
bit. A write is `req` with `r_wb = 0`. It replaces entry `wr_addr` with
`c`, `care` and `wr_valid`; `wr_valid = 0` deletes the entry.

After every write, the mapper rewrites row `s` of *every* VM and OAT, for
`s = 0 .. 2**W-1`, one row per cycle. It computes each row straight from
the entries, using the rules given under "Hybrid partitioning". During
those `2**W` cycles `ready` is low, and any request is ignored. After reset
the table is empty, and the same rewrite clears the memories, so `ready` is
low for the first `2**W` cycles.

A search issued once `ready` is high again sees the new table. Searches
already in the pipeline when a write is accepted finish with the old
contents. The VM and OAT reads of those searches happen before the first
memory write.

## Interface of `tcam_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `req` | in | 1 | request, taken when `ready` is high |
| `r_wb` | in | 1 | 1 = search for `c`; 0 = write entry `wr_addr` |
| `c` | in | C | search key, or data of the entry written |
| `care` | in | C | care mask of the entry written |
| `wr_addr` | in | AW | entry address |
| `wr_valid` | in | 1 | entry valid (0 deletes it) |
| `ready` | out | 1 | low while the memories are being rewritten |
| `layer_active` | out | L | layer passed its VMs (OATs clocked) |
| `ma_valid` | out | 1 | result strobe |
| `match` | out | 1 | some entry matched |
| `ma` | out | AW | lowest matching address |

Parameters are `C` (4), `W` (2), `L` (2) and `K` (2). `AW` is derived
(`clog2(L*K)`, at least 1). `C` must be a multiple of `W`. The defaults
live in `tcam_pkg`.

## What follows the published architecture, and what does not

Taken from the published architecture:

* the layer and sub-word partitioning;
* the VM and OAT sizes and contents;
* the 1-bit and K-bit ANDs;
* the direct OAT addressing;
* the per-layer priority encoder feeding a CAM priority encoder;
* the use of gated clocks;
* the default size.

Chosen in this RTL, where the architecture says nothing:

* **Pipeline.** Synchronous-read memories, the 3-cycle pipeline and
  read-before-write memories.
* **Priority rule.** The lowest address wins, both in the LPE and in the
  CPE.
* **`match` output.** Added so that "no match" can be told from address 0.
* **Writing.** The request/`ready` interface, the entry registers with a
  care mask and valid bit, and rewriting all memory rows after each write.
  The published work describes the mapping, not how a table gets loaded.
* **Clock gate.** The latch-plus-AND circuit. Gating is by layer, with the
  activation or a memory write as the enable.
* **Stale-row masking.** The K-bit AND is masked with the registered
  activation.
* **Not modelled.** The earlier architecture with an address-translation
  memory between VM and OAT is a comparison baseline and is not included.
  FPGA-specific results, such as slice counts on a Spartan-3E, are outside
  this RTL.

Holding the table in registers as well as in the expanded memories costs
`L*K*(2C+1)` flip-flops. If an external agent computes the expansion
instead, `tcam_mapper` can be replaced by anything that drives the
`mem_*` write bundle of the layers.

## Files

| file | contents |
|------|----------|
| `rtl/tcam_pkg.sv` | default sizes, address-width function, mapper state type |
| `rtl/tcam_top.sv` | top: input split, mapper, `L` layers, CPE, output register |
| `rtl/tcam_layer.sv` | one layer: VMs, 1-bit AND, clock gate, OATs, K-bit AND, LPE |
| `rtl/tcam_vm.sv` | validation memory |
| `rtl/tcam_oat.sv` | original address table |
| `rtl/tcam_and1.sv` | 1-bit AND, the activation signal |
| `rtl/tcam_andk.sv` | K-bit AND |
| `rtl/tcam_lpe.sv` | layer priority encoder |
| `rtl/tcam_cpe.sv` | CAM priority encoder |
| `rtl/tcam_clk_gate.sv` | latch-based clock gate |
| `rtl/tcam_mapper.sv` | ternary table and its expansion into VM/OAT rows |
| `tb/<module>_tb.sv` | a self-checking testbench for each module |
| `tb/tcam_top_wide_tb.sv` | end-to-end test at 8-bit words, 3 layers of 3 entries |

`tcam_clk_gate` contains an intended latch. Synthesis reports one latch bit
per layer.

## Verification

Every testbench compares the outputs with values computed independently.
Each one prints `TB_RESULT checks=<n> failures=<n>` and stops through a
watchdog if it hangs.

* `tcam_top_tb` runs at the default size.
  * It loads the example table and checks the worked searches: `0011 → 2`,
    `1111 → 3`, `1010 → 0`, `0101 → 1`, `0111 → 2`, and `1001 →` no match.
  * It then runs 3000 cycles of random searches and writes, issued back to
    back and also while the TCAM is busy.
  * Each result is checked against a direct ternary compare, and must
    arrive exactly 3 cycles after its search.
  * `layer_active` is checked against the model.
  * It counts each mechanism and fails if one never happens: a layer
    stopped at its VMs, all OATs gated, priority within a layer and across
    layers, a don't-care match, no match, a request ignored while busy, an
    entry deleted, and back-to-back searches.
* `tcam_top_wide_tb` runs the same kind of random test on a larger,
  irregular configuration: 8-bit words, 4 sub-words, and 3 layers of 3
  entries.
* `tcam_mapper_tb` checks every VM and OAT row written after each of 60
  random writes. It also checks the layer-2 table printed above.
* `tcam_layer_tb` uses a 6-bit, 3-sub-word, 3-entry layer. It checks the
  PMA, the activation and the number of gated-clock pulses.
* The leaf testbenches check the memories (read-before-write, hold), the
  ANDs, both encoders (exhaustively) and the clock gate (no glitch when the
  enable changes while `clk` is high).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tcam_pkg.sv tb/tcam_top_tb.sv \
          --top-module tcam_top_tb -Mdir obj_top
./obj_top/Vtcam_top_tb
```

Use the same command for any other `tb/<module>_tb.sv`.
