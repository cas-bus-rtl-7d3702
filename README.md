# CAS-BUS: a reconfigurable test bus for systems on a chip

A system on a chip carries many embedded cores, each wrapped for test
(IEEE P1500 style) and each with its own test method: scan chains, built-in
self-test, patterns from an on-chip source checked by a sink, or a whole
sub-system of further cores. CAS-BUS is a test access mechanism that reaches
all of them through one narrow serial bus of N wires. The bus leaves a
central test controller, passes through one small switch per core, the
**Core Access Switch (CAS)**, and returns to the controller. Each CAS decides
which P of the N wires it routes down into its core and back up again; the
other N-P wires pass by. By loading new switch settings, the same wires can
test several cores in parallel on different wires, chain several cores on one
wire, skip cores entirely, and be rearranged between tests of one session.

This repository holds synthesizable SystemVerilog for the CAS, the test
controller, an LFSR pattern source and MISR signature sink, and a top level
that wires seven CASes into a ring, plus self-checking testbenches for all of
them.

```
          tdi ─┐                                                 ┌─ tdo
        ┌──────┴───────┐  N   ┌─────┐   ┌─────┐        ┌─────┐   │
        │ SoC test     ├─────►│CAS 1├──►│CAS 2├─► ... ─►│CAS 7├───┘ (back to
        │ controller   │ cfg  └┬───▲┘   └┬───▲┘        └┬───▲┘      controller)
        └──────────────┘ upd   o│   │i    │   │          │   │
                               ▼   │     ▼   │          ▼   │
                              core 1    core 2         core 6
```

## The Core Access Switch

A CAS (`rtl/cas.sv`) has bus inputs `e[0..N-1]`, bus outputs `s[0..N-1]`,
core-side outputs `o[0..P-1]` (towards the core's test inputs, e.g. scan-in)
and core-side inputs `i[0..P-1]` (from the core's test outputs, e.g.
scan-out). It is made of three parts:

* **Instruction register** (`rtl/cas_instr_reg.sv`): a k-bit shift register
  loaded serially from wire 0, and behind it an **update register** that
  holds the instruction actually in force. The shift register can therefore
  be reloaded while the old instruction still drives the switch, and all
  CASes change together when the update is pulsed.
* **N/P switcher** (`rtl/cas_switch.sv`): combinational routing selected by
  the k-bit control word.
* **Wire-0 multiplexers**: while `cfg` is high, `e[0]` feeds the instruction
  register instead of the switcher and `s[0]` is driven from the end of the
  register. Wire 0 thus becomes one long configuration shift chain through
  every CAS on the bus.

Optionally the chain can run through the core wrapper's own instruction
register (`chain_wir = 1`: register out on `wir_si`, wrapper register back on
`wir_so`, then `s[0]`), so a CAS and its wrapper are configured in the same
shift operation.

### Modes

| mode          | control word          | wires                                     | core side          |
|---------------|-----------------------|-------------------------------------------|--------------------|
| CONFIGURATION | forced to all ones    | wire 0 is the config chain, 1..N-1 pass   | isolated           |
| BYPASS        | 0                     | all wires pass, `s = e`                   | disconnected       |
| TEST          | 1 .. N!/(N-P)!        | P wires loop through the core, rest pass  | connected, `o_en=1`|

During CONFIGURATION the control word is the OR of the update register and
`cfg`, so it reads all ones whatever was loaded before; the all-ones code is
reserved for this and isolates the core. Control words between
N!/(N-P)! + 1 and 2^k - 2 are unused and behave like BYPASS.

On silicon the core-side pins are tri-state. This model is two-state: a CAS
that is not in TEST drives `o` to 0, sets `o_en = 0`, and ignores `i`.

### The pairing rule and the instruction count

A TEST routing never splits a wire: if bus wire `w` feeds core pin `j`
(`o[j] = e[w]`), the core's output pin `j` goes back onto the same wire
(`s[w] = i[j]`). A routing is therefore just an ordered choice of P distinct
wires `w_0 .. w_{P-1}`, and there are N!/(N-P)! of them. With BYPASS and
CONFIGURATION added, a CAS has

    m = N!/(N-P)! + 2 instructions,   k = ceil(log2(m)) register bits.

This reproduces every row of the reference synthesis table for the CAS:

| N | P | m    | k  |
|---|---|------|----|
| 3 | 1 | 5    | 3  |
| 4 | 1 | 6    | 3  |
| 4 | 2 | 14   | 4  |
| 4 | 3 | 26   | 5  |
| 5 | 1 | 7    | 3  |
| 5 | 2 | 22   | 5  |
| 5 | 3 | 62   | 6  |
| 6 | 1 | 8    | 3  |
| 6 | 2 | 32   | 5  |
| 6 | 3 | 122  | 7  |
| 6 | 5 | 722  | 10 |
| 8 | 4 | 1682 | 11 |

`cas_pkg::cas_k(N, P)` computes k; all modules derive their widths from it.

### How a routing is numbered

Which code means which routing is this implementation's choice. The code of
routing `(w_0, .., w_{P-1})` is

    code = 1 + d_0 + d_1*N + d_2*N*(N-1) + ... + d_{P-1}*N*(N-1)*...*(N-P+2)

where `d_j` is the position of `w_j` (counting from 0) in the ascending list
of wires not already used by pins `0..j-1`. Decoding runs the other way:
digit `j` is `r mod (N-j)` of `r = code-1`, after which `r` is divided by
`N-j`.

Example, N = 6, P = 3, core pins 0, 1, 2 on wires 4, 0, 2:
`d_0 = 4` (wire 4 in {0..5}), `d_1 = 0` (wire 0 in {0,1,2,3,5}),
`d_2 = 1` (wire 2 in {1,2,3,5}); code = 1 + 4 + 0*6 + 1*30 = **35**.

In hardware the decoding is done at elaboration: `cas_switch` builds a
constant table with one entry per control word (the P wire numbers), so the
circuit is a small ROM followed by multiplexers. `tb/tb_cas_ref_pkg.sv` holds
an independent encoder and decoder for writing test programs.

## Configuring the bus

All CAS instruction registers, and every wrapper register chained in with
`chain_wir`, form one shift chain on wire 0, in ring order starting at the
controller. The controller (`rtl/soc_test_controller.sv`) takes the whole
chain contents as one word `cfg_data` of `cfg_len` bits and shifts it out
bit `cfg_len-1` first. Because the first bit shifted travels furthest, the
word is packed with the CAS nearest to the controller in the low bits:

    cfg_data = { ..., [wrapper 1 bits], CAS 1 instruction, [wrapper 0 bits], CAS 0 instruction }

Each instruction sits in its slice with its MSB at the top. Sequence and
timing, all on the rising edge of `tck`:

1. `cfg_start` with `cfg_len`, `cfg_data` while the controller is idle.
2. `cfg_len` cycles of SHIFT: `cfg = 1`, one bit per cycle on wire 0. The bits
   that come back from the end of the ring, the previous chain contents, are
   captured in `cfg_readback` with the same packing, so a test program can
   verify the chain.
3. One UPDATE cycle: `cfg = 1`, `upd = 1`; every CAS copies its shift register
   into its update register. `cfg_done` is high in this cycle. Shifting pauses
   while `upd` is high, so the cores stay isolated until the new instructions
   are in place.
4. `cfg` falls: the new routing is live. Total: `cfg_len + 1` cycles.

### Inner buses of hierarchical cores

A hierarchical core contains its own CAS-BUS, and its CAS in the outer ring
has P equal to the width of that inner bus. The inner CASes cannot share the
outer `cfg`, because the outer CASes must keep routing an outer wire into
the core while the inner chain is loaded. The controller therefore has
`NGRP` control groups: group 0 is the outer ring, each further group is one
inner bus with its own `cfg`/`upd` pair (`grp_cfg[g]`, `grp_upd[g]` on the
top level). To configure an inner bus:

1. configure the outer ring so that the core's CAS routes outer wire `x` to
   its pin 0 (which is the inner bus's wire 0);
2. start a configuration with `cfg_grp = g`, `cfg_wire = x`: the word is
   shifted on wire `x`, read back from wire `x`, and only group `g` sees
   `cfg`/`upd`. Packing and timing are as above.

Group 0 always shifts on wire 0, whatever `cfg_wire` holds.

### Test phase

Outside configuration the controller connects the ring to the pins:
`bus_out = tdi`, `tdo = bus_in`. Wires 1..N-1 carry `tdi` during
configuration as well. A new configuration can be started whenever the
controller is idle, so the architecture can be changed between tests within
one session; the configuration time is paid once per change, never per test
pattern.

## The top level, `casbus_soc`

The default SoC has seven CASes on a 6-wire bus, in ring order: the CASes of
cores 1, 2, 3, the CAS of the wrapped system bus, then cores 4, 5, 6.

| ring index | serves                         | P  | k  |
|------------|--------------------------------|----|----|
| 0          | core 1                         | 3  | 7  |
| 1          | core 2                         | 1  | 3  |
| 2          | core 3, via LFSR source / MISR | 1  | 3  |
| 3          | system bus                     | 2  | 5  |
| 4          | core 4                         | 5  | 10 |
| 5          | core 5                         | 2  | 5  |
| 6          | core 6                         | 3  | 7  |

The instruction chain is 40 bits; `CFG_MAX = 64` leaves room for wrapper
registers. `N`, `NCAS`, `P_LIST`, `CFG_MAX`, `NGRP` (control groups), `SS_IDX` and
`SS_W` (source/sink position and width) are parameters.

* Every CAS's core side is a port: `core_o[c]`, `core_i[c]` (pin `j` at bit
  `j`, bits at and above `P_LIST[c]` unused), `core_o_en[c]`, and the wrapper
  link `chain_wir[c]`, `wir_si[c]`, `wir_so[c]`. The group-0 controls
  `grp_cfg[0]`, `grp_upd[0]` are brought out for the wrappers, which are
  configured in step with the CASes; `grp_cfg[1]`, `grp_upd[1]` drive the
  inner CASes of a hierarchical core. Configuration requests take `cfg_grp`
  and `cfg_wire` besides `cfg_start`, `cfg_len`, `cfg_data`.
* The core behind ring index `SS_IDX` (2) is tested from a source and a sink
  on a single wire. Pin 0 of that CAS seeds an 8-bit LFSR (`rtl/lfsr_source.sv`)
  while `src_load` is high; with `ss_run` high the LFSR applies one pattern per
  cycle on `src_pattern` and the MISR (`rtl/misr_sink.sv`) compacts the core's
  response `snk_resp`; with `snk_unload` high the signature is shifted back
  onto the same wire, MSB first. Both use x^8 + x^6 + x^5 + x^4 + 1.
* A core with built-in self-test is served by a CAS with P = 1.
* A hierarchical core is served by a CAS whose P equals the width of the
  core's internal test bus; the internal bus is built from the same `cas`
  module. The top-level testbench builds one behind ring index 4: a 5-wire
  inner bus with two inner CASes (P = 2 and P = 1) in control group 1.

The data path from `tdi` through the ring to `tdo` is combinational except
for the cores' own scan cells. Cores in BYPASS keep their wrapper free for
functional operation, so some cores can be tested while the rest of the chip
runs.

## Cost

Gate counts from a generic synthesis of `cas` (yosys, 2-input gates and
muxes, including the 2k flip-flops), next to the counts in the reference
table, which came from a different tool and library and are only a scale:

| N,P  | 3,1 | 4,1 | 4,2 | 4,3 | 5,1 | 5,2 | 5,3 | 6,1 | 6,2 | 6,3 | 6,5  | 8,4  |
|------|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|------|------|
| this | 37  | 45  | 82  | 144 | 50  | 141 | 290 | 50  | 144 | 353 | 1331 | 1199 |
| ref  | 16  | 23  | 64  | 118 | 28  | 85  | 205 | 33  | 134 | 280 | 1154 | 4400 |

The switch grows with N!/(N-P)!, so wide buses with many switched wires
become expensive; a narrow bus with small P per core stays tiny next to the
cores.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cas_pkg.sv tb/tb_cas_ref_pkg.sv tb/tb_casbus_soc.sv \
    --top-module tb_casbus_soc
./obj_dir/Vtb_casbus_soc
```

Swap in another testbench for the last file and top module:

| testbench                 | what it covers                                                             |
|---------------------------|----------------------------------------------------------------------------|
| `tb_cas_instr_reg`        | reset, MSB-first loading, K-cycle chain latency, update, forcing to ones   |
| `tb_cas_switch`           | every control word of N=6, P=3; m and k for all table rows                 |
| `tb_cas`                  | serial configuration with and without a chained wrapper register, routing  |
| `tb_cas_table1`           | a CAS at each of the twelve table sizes, loaded serially and checked       |
| `tb_soc_test_controller`  | both control groups: chain contents, readback, `cfg_len + 1` cycles, data path |
| `tb_lfsr_source`          | seeding, sequence, period 255                                              |
| `tb_misr_sink`            | signature against a reference, serial unload, clear                        |
| `tb_casbus_soc`           | the whole SoC at default size: 8 scan configurations, source/sink test, hierarchical core |

`tb_casbus_soc` models scan chains of different lengths behind each CAS and
wrapper instruction registers of 2 to 4 bits. For every configuration it
works out, from the routings it chose, which chains each wire passes and
checks `tdo(t) = tdi(t - D)` with the resulting delay `D`. It also counts the
mechanisms it exercised (configuration, reconfiguration, BYPASS, TEST,
wrapper chaining, parallel wires, cores chained on one wire, untouched
wires, readback, source/sink, hierarchical core) and fails if any of them
never happened. It runs in well under a second.

## What follows the architecture and what is chosen here

Taken from the architecture: the ring of CASes with one CAS per core and one
for the system bus; the CAS structure (instruction shift register, update
register, control bits forced to ones while configuring, N/P switcher,
wire-0 multiplexers, optional chaining through the wrapper register); BYPASS
as the all-zero instruction; the pairing rule; the instruction count and
width formulas; configuration of all CASes through wire 0; P = 1 for BIST
and for LFSR/MISR source/sink cores; a hierarchical core's P equal to its
internal bus width.

Chosen in this design:

* the numbering of TEST routings and treating unused codes as BYPASS;
* MSB-first loading; update as a synchronous enable with shifting paused
  during the update cycle; an asynchronous active-low reset to BYPASS;
* two-state `o_en` signalling instead of tri-state pins;
* the controller's interface (parallel configuration word, readback,
  per-wire `tdi`/`tdo`) and its three-state sequence;
* N = 6, the P of each CAS, `CFG_MAX = 64`;
* LFSR and MISR width (8), polynomial, serial seeding, and their control
  inputs, which are top-level ports;
* separate control groups for the inner buses of hierarchical cores, loaded
  through a chosen outer wire;
* the control-bit forcing is a logical OR, inferred from the behaviour (all
  control bits at one while configuring).

Not built: the P1500 wrappers, the cores and their BIST, and the system bus,
which are third-party or functional parts; the top exposes their pins.
Alternative gate-level and pass-transistor switch implementations, mentioned
only as future work, are not included.
