# apeNEXT root logic: global control tree in SystemVerilog

An apeNEXT machine is a massively parallel computer of up to thousands of
processing nodes. Some events must reach every node, or be agreed on by
every node, within a few clock cycles: an exception that must stop the whole
machine, a reset, a trigger, and the *global condition* of a data-dependent
branch ("global IF": are all nodes' local conditions true?). The *root logic*
handles these. It is a tree of small logic blocks laid over the machine's
packaging hierarchy:

| level     | sub-systems below it      | nodes  | lives in                   |
|-----------|---------------------------|--------|----------------------------|
| top       | N crates                  | 256·N  | ROOT2 (root board, FPGA2)  |
| crate     | 4 units                   | 256    | ROOT1 (root board, FPGA1)  |
| unit      | 4 processing boards       | 64     | ROOT1                      |
| board     | 2 halfboards              | 16     | ROOT0 (processing board)   |
| halfboard | 8 nodes                   | 8      | ROOT0                      |

Each level does two jobs:

* **upward:** it collects the commands its sub-systems send up, reduces them
  to a single command, and sends that command one level up;
* **downward:** it either creates the downward command itself (a *closed*
  level) or passes on the command it gets from above (an *open* level), and
  broadcasts it to its sub-systems.

This repository holds synthesizable RTL for every level, the three FPGAs
(ROOT0, ROOT1, ROOT2), the root board, and a whole multi-crate machine, plus
self-checking testbenches.

## Commands and their wires

Upward, three wires (signal 0, 1, 2) carry one of six commands, listed by
decreasing precedence:

| command | meaning                                              | reduction | s0 s1 s2 |
|---------|------------------------------------------------------|-----------|----------|
| KILL    | an exception on some node                            | any       | 1 1 0    |
| ALL     | every node below is in I²C (service) mode            | all       | 0 0 1    |
| TRIG    | some, but not all, nodes are in I²C mode             | any       | 1 0 1    |
| TRUE    | every node below has a true local condition          | all       | 0 1 1    |
| FALSE   | at least one node has a false local condition        | all       | 0 1 0    |
| NOP     | nothing                                              | –         | 0 0 0    |

Downward, three wires IFS, IFD2, IFD1 carry one of five commands, plus a
dedicated RST wire. Precedence is RST > KILL > TRIG > TRUE > FALSE:

| command | IFS IFD2 IFD1 |
|---------|---------------|
| KILL    | 0 1 1         |
| TRIG    | 0 0 1         |
| TRUE    | 0 0 0         |
| FALSE   | 0 1 0         |
| NOP     | 1 x x         |

Nodes use this same downward code on their own IFS/IFD2/IFD1 outputs when
they send their local condition upward. `root_pkg` holds both codes, the
enums `up_cmd_e`/`dn_cmd_e` (ordered so that a larger value means a higher
precedence), and the encode/decode functions.

## How a level reduces, masks and partitions

`up_reduce` decodes every child, drops the children whose **mask** bit is 1,
and applies the reductions above in order of precedence. Three rules need
care:

* A child that reports ALL counts as TRIG one level up unless *every*
  unmasked child reports ALL. Then TRIG means "some nodes are in I²C mode",
  and ALL means "all of them are".
* TRUE/FALSE is produced only when **every** unmasked child is sending a
  condition. Until then the result is NOP. This is what synchronises a global
  IF: the tree waits for the slowest node.
* If every child is masked, the result is NOP.

The reduced command is registered and **always** sent upward, whether the
level is open or closed. `dn_gen` then picks the downward command:

* **closed:** KILL if the reduction is KILL or the command register asks for
  KILL; TRIG from the upward TRIG or from the command register, depending on
  the TRIG-select bit; TRUE/FALSE from the reduction; RST from the command
  register. Commands arriving from above are ignored.
* **open:** the command and RST from above are passed on. The level's own
  register KILL/RST (and TRIG, when TRIG select is set) are merged in.

Masking and closing together let one machine run as several independent
partitions. Close a sub-tree and mask it at its parent: it then resolves its
own global IFs and exceptions, and the rest of the machine neither waits for
it nor sees its KILLs. `root_level` is one such level. It is instantiated
with 8, 2, 4, 4 and 16 children for the halfboard, board, unit, crate and
top levels.

## The global IF handshake at the nodes (the subtle part)

A node in a global IF keeps sending its condition until it receives the
global TRUE or FALSE. Its withdrawal then has to travel up the whole tree
and back down before the downward condition goes away. Two blocks on each
halfboard, in front of the node lines, keep this round trip from limiting
how often global IFs can run:

1. **`gfilter`**: a downward command reaches the nodes only after it has
   been sampled unchanged for `NSTAB` = 3 RCLK cycles. This rejects glitches
   and skew between the wires. A one-cycle KILL never reaches a node.
2. **`glock`**: a TRUE or FALSE goes to the nodes for exactly `GLOCK_LEN` =
   8 cycles and is then removed, even if the tree still carries it. Further
   TRUE/FALSE commands are ignored until the filtered input has carried no
   TRUE/FALSE for `NSTAB` cycles in a row. KILL and TRIG pass at all times.

So the spacing between two global IFs is set by `NSTAB`, not by the depth of
the tree.

Commands that the root logic creates itself (register KILL, TRIG and RST)
last 8 RCLK cycles (`cmd_pulse`). That is longer than the 3-cycle filter and
longer than one period of the slow I²C clock.

### Latency

Each level has one register per direction. For a closed top and open levels
below it, the latency from a node pin to its node line is:

```
halfboard, board, unit, crate (4 up) + top (1) + crate, unit, board,
halfboard (4 down) + gfilter (3) + glock (1) = 13 RCLK cycles
```

With a closed crate it is 11 cycles, and with a closed board 7. The
testbenches check these numbers.

## The three FPGAs

**`root0`** is one processing board (the root part of its PALREG FPGA).
`node_up_map` turns each node's pins into an upward command:

* STATUS_1 = 1 (exception) gives KILL;
* STATUS_2 = 1 (I²C mode) gives ALL;
* TRUE/FALSE on the node's IFS/IFD2/IFD1 gives TRUE/FALSE.

The node's own KILL and TRIG codes are ignored, because a node cannot send
KILL reliably during a global IF. The board has two halfboard levels and a
board level. Each halfboard has a gfilter and a glock in front of the shared
IFS/IFD2/IFD1 lines of its 8 nodes. RST drives the board's RESET_7512 wire.
Registers:

| addr | register | bits |
|------|----------|------|
| 0x00 | FSREG (ro) | type 00, version 00, revision 05 in [23:16], [15:8], [7:0] |
| 0x02 | RCREG | [31:16] node mask (bit 16+n = node n; nodes 0–7 form halfboard 0), [32]/[33] close halfboard 0/1, [34] close board, [35] KILL request, [36] RST request, [37] RST done (ro) |

A closed halfboard is masked at the board level. ROOT0 has no TRIG select:
its downward TRIG always comes from the upward TRIG.

**`root1`** holds the four unit levels and the crate level. It connects to
the 16 boards over the backplane, and to ROOT2 either over the root board's
internal bus (`sw_internal` = 1) or over the SRt connector J10 and a cable
(`sw_internal` = 0). With `sw_fixj10` = 1, upward signal 0 is inverted on J10
(`FIXJ10_MASK`). This is for early root boards whose J10 wiring reverses that
pair.

**`root2`** is the top level. It has 16 crate inputs, the connectors C0–C7
(Bank A) and C8–C15 (Bank B). With `sw_internal` = 1, input 0 comes from the
internal bus instead of C0.

ROOT1 and ROOT2 registers (`level_regs`, one pair per level):

| ROOT1 addr   | ROOT2 addr | register |
|--------------|------------|----------|
| 0x10+u       | 0x40       | partition (UuPREG / TPREG): [15:0] mask, [16] closed, [17] TRIG select (1 = from command register) |
| 0x20+u       | 0x41       | command (UuCREG / TCREG): [0] KILL, [1] TRIG, [2] RST request, [3] RST done (ro) |
| 0x30 / 0x31  | –          | CPREG / CCREG (crate level) |
| 0x00         | 0x00       | FSREG (ro): ROOT1 type 01, ROOT2 type 02, both version 03 revision 00; ROOT1 [35:32] = RB address switch |

Configuration registers are cleared only by `cfg_rst_n` (the I²C reset),
never by a root RST. This keeps software's view of the service channel
consistent across a machine reset. `rst_n` resets the root-internal state.

## Root board and multi-crate machine

**`root_board`** joins ROOT1 and ROOT2 with the internal bus and takes the
front-panel switches:

* `rt_add` (S1) is the board address. It is readable, but the root logic
  does not use it.
* `sw_int_clk_en` (S2-1) is passed out as `int_clk_en` to the clock circuit.
* `sw_internal` (S2-2) selects the internal bus or the cable.
* `sw_fixj10` (S2-4) enables the J10 negation.

Switch "left" is 0.

**`apenext_root_sys`** (the top module) is a machine of `NCRATE` crates
(default 4, two racks). There is no rack level: the SRt of every crate is
cabled directly to connector Ck of the master root board in crate 0, whose
ROOT2 is the top. Crate 0 may use the internal bus instead of its own cable.
The ROOT2 FPGAs of the other crates are present but unconnected.

The top brings out the node pins of all 16·16·NCRATE nodes, the switches,
the top's upward output, and one register port. On that port `cfg_crate`
and `cfg_dev` pick the FPGA: 0–15 is ROOT0 of that board, 16 is ROOT1, 17 is
ROOT2. A typical setup closes the master's top level and masks its
unconnected connectors: write `0x1_FFF0` to TPREG of crate 0 for 4 crates.

## Where this RTL departs from the hardware it models

* **Register access:** a synchronous register port on RCLK stands in for the
  I²C interface and its SCL clock domain. The I²C slave is not included.
* **Registers:** the layouts of the ROOT1/ROOT2 registers, the register
  addresses and the FSREG layout are this design's own; so is the RCREG
  KILL bit (bit 35). The RCREG bits 16–34, 36 and 37 follow the original.
* **Timing:** one register per level and direction, and `GLOCK_LEN` = 8, are
  choices. The original gives the behaviour but not these counts.
* **Pipeline ordering:** between gfilter, glock and the encoders, and within
  `glock` (absence is counted from the start of the command), the ordering
  is this design's own.
* **Not modelled:**
  * the clock sources (internal quartz, PECL/TTL inputs);
  * the push-button and power-up resets;
  * the ADC, the LEDs;
  * the rack level for multi-rack partitioning, which was never defined;
  * the alternative TRIG source (a node's TXTRIGGER instruction), which had
    no configuration bit.
* **Clocking:** all boards run on one clock `clk`, so skew and
  metastability between nodes and root logic are not modelled.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Itb \
    rtl/root_pkg.sv tb/tb_apenext_root_sys.sv --top-module tb_apenext_root_sys \
    -Mdir obj -o sim && obj/sim
```

Swap in any other `tb_<module>` to test one block.

`tb_apenext_root_sys` runs the 4-crate, 1024-node machine at its default
parameters. It builds in about 1.5 minutes and runs in well under a second.
Its node model takes part in global IFs and records what each node receives.
It drives and counts:

* all-TRUE and one-FALSE global IFs (latency 13);
* waiting for a silent node, and masking that node;
* KILL from a STATUS_1 exception, and a one-cycle exception removed by the
  filter;
* register KILL and TRIG (8 cycles at all 1024 nodes);
* TRIG and ALL from I²C mode;
* a closed-and-masked crate and a closed halfboard running their own global
  IFs at the same time as the rest of the machine;
* the master on cable instead of the internal bus;
* the glock cutting the lingering condition;
* register RST on every RESET_7512, and RST done.

The block testbenches cover:

* the reduction, against a counting model, including the rare cases;
* the downward selection, exhaustively;
* the filter, against a 3-sample model;
* the lock's 8-cycle length and its 2- versus 3-cycle unlock;
* the registers;
* each FPGA's paths and switches.

## Files

* `rtl/root_pkg.sv`: encodings, types, helpers
* `rtl/up_reduce.sv`, `rtl/dn_gen.sv`, `rtl/root_level.sv`: one tree level
* `rtl/cmd_pulse.sv`, `rtl/level_regs.sv`: command and partition registers
* `rtl/node_up_map.sv`, `rtl/gfilter.sv`, `rtl/glock.sv`: node side of ROOT0
* `rtl/root0.sv`, `rtl/root1.sv`, `rtl/root2.sv`: the three FPGAs
* `rtl/root_board.sv`: ROOT1 and ROOT2 with the switches
* `rtl/apenext_root_sys.sv`: the multi-crate machine
* `tb/tb_<module>.sv`: one testbench per module
