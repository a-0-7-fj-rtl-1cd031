# Hybrid NOR/NAND ternary CAM with hidden bank selection

A ternary CAM (TCAM) compares a search word against every stored entry at
once, and each stored bit may be 0, 1 or "don't care". The usual cost is
power: in a NOR-type CAM every entry's match line is precharged and mostly
discharged on every search. A NAND-type CAM wastes almost nothing, because its
match signal runs through a series chain of cells and only moves where cells
agree, but that chain makes it slow.

This design combines the two. It relies on a property of sorted lookup tables
such as IPv4 routing tables: many entries share their leading bits. Each
144-bit entry is split in two:

* the **merged field (MF)**, the upper 8 bits. Each MF value shared by a group
  of entries is stored once, in a small and fast NOR-type **main bank**;
* the **individual field (IF)**, the lower 136 bits. These are stored in a
  NAND-type **sub-bank**, one sub-bank per MF word.

Entries whose leading byte is not shared go whole, all 144 bits, into a NAND
**extra bank**. A search first matches the 8-bit MF in the main bank (the
coarse search). The matching main-bank word enables its own sub-bank. If no MF
matches, the extra bank is enabled instead. Only that one NAND bank drives its
search lines and evaluates (the fine search). With three sub-banks and one
extra bank, about a quarter of the NAND array is active per search.

The RTL models this at the logic level. Cells are flip-flops and the match
chains are gates. Precharge, evaluation and repeaters appear as enables, not as
voltages.

## Organisation and default sizes

| Part | Count | Size | Module |
|---|---|---|---|
| Main bank | 1 | 3 MF words x 8 bits (NOR) | `main_bank`, `nor_tcam_word` |
| Sub-bank | 3 | 128 word lines x 2 columns x 136 bits (NAND) | `nand_bank #(.W(136))` |
| Extra bank | 1 | 128 word lines x 2 columns x 144 bits (NAND) | `nand_bank #(.W(144))` |
| Control part | 1 | address decode, MF write rule | `tcam_ctrl` |

The NAND cells total 3 x 256 x 136 + 256 x 144 = 141,312 (138 kb), plus 24
main-bank cells. Storing the three MFs once saves what 3 x 256 copies of
8 bits would take: about 6 kb. There are 1,024 entries in all. The top
`hybrid_tcam` takes `M`, `K`, `N_SUB` and `WORDS` as parameters. The defaults
come from `tcam_pkg`.

Inside a NAND bank (`nand_bank`), each word line is a `word_block` holding two
entries, column 0 and column 1. A word is cut into four **cell blocks** A to D
(`nand_cell_block`). For 144 bits these cover bits 0-35, 36-71, 72-107 and
108-143. For 136 bits they are four blocks of 34 bits. The four blocks are
searched in parallel (sub-match lines). Their results are combined as follows:

```
 A ──┐            C ──┐
     PM → AB0/AB1     PM → CD0/CD1
 B ──┘            D ──┘
            AB, CD → MM → MLout0, MLout1
```

* `partial_match` (PM): a partial line matches when both cell blocks match in
  that column.
* `main_match` (MM): MLout0 = AB0 and CD0. MLout1 = AB1 and CD1 and not
  MLout0, so **column 0 has priority within a word line**. MM is thus also a
  local priority encoder.

Inside a cell block, each column is a chain of 36 (or 34) ternary cells in
series. A starter injects the match signal when the bank evaluates. A cell
passes the signal if it is don't-care or equals its search bit. After every
nine cells, a **match line repeater** (`ml_repeater`) regenerates the signal.
A 36-cell chain therefore has three repeaters. In the circuit this is what
keeps a long NAND chain fast. In the RTL the repeater is the point where the
evaluation enable re-gates the chain.

## Timing: hidden bank selection

The main bank would normally add a full search time in front of the NAND bank.
This design hides it in the NAND bank's precharge time instead. The clock high
phase plays the role of the precharge signal PCG:

```
            t0                        t1
clk     ____/‾‾‾‾‾‾‾‾‾‾‾‾\____________/‾‾‾‾
main    [cmd regs load]  main bank evaluates (NAND banks precharge)
            ─────────────┐
                        BEN sampled at falling edge, search lines of the
                        selected bank loaded
                         └─ selected NAND bank evaluates ─┐
                                                          ml_* registered
```

* A command presented before rising edge **t0** is registered.
* During the high phase the main bank compares the MF. Its bank enables
  (`ben`) settle.
* At the **falling edge**, each NAND bank samples its enable.
  * The enabled bank loads its search lines and evaluates in the low phase.
  * Disabled banks keep their search lines unchanged and never start their
    match chains.
* At **t1** the 256 match lines of every bank are registered.

A search therefore takes one clock of latency, and one search can be issued on
every clock. The published 100-nm test chip evaluates in 2.2 ns and
precharges in 1 ns, which allows a 300-MHz clock. That is circuit timing and
is not modelled here.

Both clock edges are used. A synthesis flow must constrain the half-cycle paths:

* from the command register through the main bank to the NAND banks' falling-edge registers;
* from those registers through the NAND chains to the rising-edge output register.

## Reads, writes and the control part

`addr` is `{msb[1:0], word_line[6:0], column}`.

* `msb = 0` selects main-bank word line WL0, i.e. the extra bank.
* `msb = n` (1 to 3) selects WL_n: MF word n together with sub-bank n.

For reads and writes, the main bank passes its word lines straight through as
the bank enables. The same word line thus selects both the MF word and its
sub-bank.

* **Write** (`op = OP_WRITE`). Give `wval` (values) and `wdc` (don't-care
  bits, 1 = don't care).
  * Extra bank: all 144 bits are stored.
  * Sub-bank: bits 135:0 go to the sub-bank entry. Bits 143:136 go to the MF
    word, but only if `tcam_ctrl` allows it. All entries of a sub-bank share
    one MF, so the controller writes the MF only on a write whose MSB address
    differs from the MSB of the previous write (or on the first write after
    reset). Later writes to the same sub-bank leave the MF alone, whatever
    their upper byte holds.
* **Read** (`op = OP_READ`). `rd_val`/`rd_dc` and `rd_valid` appear after one
  clock. A sub-bank entry reads back as `{MF, IF}`.
* **Search** (`op = OP_SEARCH`). `key` is binary. After one clock `srch_valid`
  is high and the outputs are:
  * `ml_sub[n-1]` and `ml_extra`: 256 match lines per bank. Bit 2w is column 0
    of word line w, and bit 2w+1 is column 1.
  * `ben_q`: which bank was searched. Bit 0 is the extra bank.

  A bank that was not searched reports all zeros.

The storage has no reset, like the SRAM it stands for. Write every entry, and
all three MF words, before relying on search results. An SVA assertion in the
top checks that the extra-bank enable always equals "no MF matched".

## Using the match outputs

The design keeps column 0 over column 1 inside a word line. It has no priority
encoder across word lines or across banks, because none is part of the
architecture: all match lines are brought out. If the table is stored in
sorted order, as routing tables are for longest-prefix match, the lowest set
match line of the searched bank is the best entry. The IPv4 testbench relies
on this.

More than one sub-bank can be enabled at once if two MF words overlap through
don't-care bits. Keep the MF words disjoint to get one active bank per search.

## Where this RTL departs from, or adds to, the source architecture

* **Logic instead of circuits.** The dynamic parts become gates and enables:
  precharge and evaluation, the NOR/NAND cell circuits, the sense amplifiers
  and the five-transistor repeater. The energy results (0.7 fJ/bit/search) and
  the 2.2-ns timing cannot be reproduced in RTL. What the RTL keeps is the
  activity pattern: only one bank's search lines and chains switch per search.
* **PCG is the clock.** Each phase maps to one clock edge. The narrower and
  wider PCG pulses the architecture allows are not modelled.
* **Own choices.** These are not specified by the architecture:
  * the command interface: opcodes, address layout, registered inputs and
    valid flags;
  * a 1-cycle read port;
  * the 34-bit cell blocks of the 136-bit sub-banks;
  * the 9/9/9/7 repeater spacing of a 34-cell chain;
  * the falling-edge sampling of bank enables.
* **Sub-bank shape.** Sub-banks have 128 word lines x 2 columns (256 entries),
  the same organisation as the extra bank.
* **The MF write rule** is read as "compare with the previous write's MSB".

## Files

| File | Contents |
|---|---|
| `rtl/tcam_pkg.sv` | sizes, `op_e` command type, ternary cell compare |
| `rtl/hybrid_tcam.sv` | top level |
| `rtl/tcam_ctrl.sv` | word-line decode and MF write rule |
| `rtl/main_bank.sv`, `rtl/nor_tcam_word.sv` | NOR main bank |
| `rtl/nand_bank.sv`, `rtl/word_block.sv`, `rtl/nand_cell_block.sv` | NAND banks |
| `rtl/ml_repeater.sv`, `rtl/partial_match.sv`, `rtl/main_match.sv` | repeater, PM, MM |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_hybrid_tcam.sv` | end-to-end test at full size |
| `tb/tb_ipv4_lookup.sv` | IPv4 prefix table search through the full-size top |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=F` and
ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_hybrid_tcam rtl/tcam_pkg.sv tb/tb_hybrid_tcam.sv
./obj_dir/Vtb_hybrid_tcam
```

Replace the top module name to run another testbench. The full-size design
(about 295k storage bits) takes 2-3 minutes for Verilator to compile and about
2 seconds to simulate the end-to-end test.

`tb_hybrid_tcam` runs at the default parameters. The steps are:

1. Fill all 1,024 entries. The three MF groups are 143, 203 (stored with its
   last bit don't care, so it also covers 202) and 201.
2. Read back a sample of entries.
3. Issue 1,500 back-to-back searches, plus writes each followed at once by a
   search.

Every result is compared with a reference model in the testbench, and so is
the one-cycle latency. The test fails if any of these never happens:

* a hit in each sub-bank;
* fall-through to the extra bank;
* column priority;
* several matching lines;
* a miss in the selected bank;
* an MF write, and an MF write held back;
* a ternary MF hit;
* reads of a sub-bank and of the extra bank;
* back-to-back searches.

The unit testbenches cover each module alone: exhaustive for the repeater, PM
and MM, random with a reference model for the rest.
