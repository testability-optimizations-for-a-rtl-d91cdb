# eCPLD: a time-multiplexed CPLD with a loop-breaking test extension

This is a CPLD-like programmable logic block meant to be embedded in a
structured-ASIC design. The same AND-OR hardware is reused over time. Up to 16
complete configurations ("contexts") are stored on chip, next to the logic they
control, and a context switch turns the device into a different circuit within
a few clock cycles.

Storing the configuration in on-chip memory causes a test problem. A macrocell
can feed its own combinational outputs back into its AND array, and the
configuration decides whether such a loop is closed. Software never writes a
configuration that closes a loop. During scan test, however, the logic is
driven by test vectors and loops can be switched on, which costs test
coverage and can draw excessive current. The distinctive part of this design
is a small **test extension** in every macrocell. When the global test signal
`scanmode` is high, it replaces each combinational feedback with a registered
one, so no configuration can form a loop. In functional mode the logic behaves
exactly as it would without the extension.

The default configuration is a 64-macrocell device: 8 ePLDs of 8 macrocells
and 16 contexts. By default the configuration is kept in block RAM, which
makes context changes multi-cycle; a distributed-memory variant with
single-edge switching is selectable by a parameter.

## Structure

```
 pin_in[0..7] ──►┌──────────────────────┐── ePLD input bytes ──► ePLD 0 ─┐
  (bytes)        │  eConnect            │                         ...    ├─► epld_q
                 │  24 x (16:1 byte mux) │◄── ePLD output bytes ── ePLD 7 ─┘
 pin_out[0..7] ◄─┤                      │
                 └──────────▲───────────┘
                            │ selects          each ePLD and the eConnect
                  ctx_mem (eConnect)           has its own ctx_mem;
                                               ctx_ctrl switches all nine
```

| Module | Role |
|---|---|
| `ecpld` | Top level. It wires the ePLDs, the eConnect, nine context memories and the context controller, and holds the programming port and scan chain. |
| `epld` | One programmable AND-OR array with 8 macrocells and their test extensions. |
| `enode` | A row of programmable crossing points (pass, invert or "not connected"). |
| `test_ext` | The per-macrocell test extension: two `scanmode` multiplexers and one flip-flop. |
| `scan_dff` | A flip-flop with a scan multiplexer. Every flip-flop in the logic is one. |
| `econnect` | The byte-wide interconnect: one 16:1 byte multiplexer per destination byte. |
| `ctx_mem` | The 16-context configuration memory, either distributed or block RAM. |
| `ctx_ctrl` | The start/commit handshake that makes all memories switch in the same edge. |
| `ecpld_pkg` | The default sizes, the memory-mode enum and the configuration-size functions. |

## The ePLD array

An ePLD is a grid. The **columns** are the signals that can enter a product
term:

* columns 0–15: the 16 ePLD inputs (two bytes from the eConnect);
* then three feedback columns for each macrocell *m*:
  * `16+3m`: the **expansion term**;
  * `16+3m+1`: the **combinational OR output**;
  * `16+3m+2`: the **register output**.

The **rows** are product terms. Each macrocell owns `N_PT + 1 = 3` rows. The
first two feed the macrocell's OR gate. The third is the expansion term,
which is not OR-ed: it goes back into the array as a column, so products
wider than one row can be chained. The OR output is registered in the
macrocell flip-flop. That register is the ePLD output, and it also goes back
into the array as a column.

At each row/column crossing sits an eNode controlled by two bits, `Cp`
(programmed) and `Ci` (invert):

| Cp | Ci | AND-plane node | OR-plane node |
|---|---|---|---|
| 0 | x | 1 (drops out of the AND) | 0 (drops out of the OR) |
| 1 | 0 | line | line |
| 1 | 1 | inverted line | inverted line |

A configuration with every bit at zero leaves all nodes unprogrammed. Every
OR output is then 0, and no feedback path is active.

### Configuration bit layout (one ePLD, one context)

With `NCOL = 16 + 3·8 = 40`, `NROW = 8·3 = 24` and `OR_BASE = 2·NROW·NCOL = 1920`:

| Bits | Content |
|---|---|
| `[2r·NCOL +: NCOL]` | Cp of row *r*, one bit per column |
| `[(2r+1)·NCOL +: NCOL]` | Ci of row *r* |
| `[OR_BASE + 2m·N_PT +: N_PT]` | Cp of macrocell *m*'s OR-plane nodes (one per OR-ed row) |
| `[OR_BASE + (2m+1)·N_PT +: N_PT]` | Ci of the same nodes |

That gives 1952 bits, or 61 words of 32 bits. Word *w* of a context holds
bits `[32w +: 32]`.

## Why loops can appear, and the test extension

The expansion-term column and the combinational-OR column of a macrocell are
combinational. A product term may use them, including the product terms of
the same macrocell. A configuration that does so, whether written by mistake
or set by scan vectors, closes a combinational loop. The loop can latch or
oscillate.

Each macrocell therefore has a `test_ext`:

```
exp_fb  = scanmode ? exp_q : exp_in     // exp_q: extension flip-flop, captures exp_in
comb_fb = scanmode ? mc_q  : or_in      // mc_q:  the macrocell register (holds the OR value)
```

In `scanmode` every column the array reads comes from a flip-flop or an input.
The array is then pure combinational logic between flip-flops, whatever the
configuration, and ATPG can treat it as ordinary scan logic. The cost is one
flip-flop and two 2:1 multiplexers per macrocell output; no functional path
changes when `scanmode` is 0.

The second multiplexer is fed from the macrocell register. The register
already captures the OR output, so breaking that loop needs no extra
flip-flop. This is how this implementation reads "two multiplexers and one
flip-flop".

All macrocell and extension flip-flops are scan flip-flops on one chain:
`scan_in → ePLD0.mc0 reg → ePLD0.mc0 ext → ePLD0.mc1 reg → … → ePLD7.mc7 ext → scan_out`.
That is 128 flip-flops. `scan_en` shifts the chain. With `scanmode` high and
`scan_en` low, the flip-flops capture.

Lint tools report circular combinational logic in `epld`. This is expected:
the programmable feedback is part of the architecture.

## Contexts and context switching

Every ePLD (1952 bits) and the eConnect (96 bits) has its own `ctx_mem` with
16 contexts. All of them are written through one port:

| Port | Meaning |
|---|---|
| `cfg_we` | Write strobe. |
| `cfg_blk` | Target memory: 0–7 = that ePLD, 8 = the eConnect. |
| `cfg_ctx` | Context being written. |
| `cfg_addr` | Word within the context (0–60 for an ePLD, 0–2 for the eConnect). |
| `cfg_wdata` | The 32-bit word. |

A context that has never been written reads as all zeros after reset. A valid
bit per context handles this, so random memory contents can never enable a
loop. Writing a context while another one is active is always safe. In the
distributed version, a write to the active context takes effect immediately.

A switch is requested with `ctx_req` and `ctx_sel`. `ctx_busy` is high while
the switch runs, and `ctx_cur` then shows the new context. `ctx_ctrl` pulses
`start` to all nine memories. It waits until all of them report `ready`, then
pulses `commit` to all of them in the same cycle.

* **`MEM_MODE = MEM_BRAM` (default)**
  * Each memory is a one-word-per-cycle synchronous RAM. `start` copies the
    target context, word by word, into a shadow register while the old context
    keeps running.
  * `commit` then swaps the shadow register into the active configuration
    register in one edge.
  * The new configuration is active **63 rising edges** after the edge that
    takes the request (61 words + 2). `ctx_busy` is high for those 63 cycles.
* **`MEM_MODE = MEM_DISTRIBUTED`**
  * The memory is read in full, combinationally, at the active context index.
  * The edge that takes the request already switches the logic, and
    `ctx_busy` is high for one cycle.
  * This is fast but needs very wide memories. On the intended structured-ASIC
    fabric it spreads badly, which is why block RAM is the default.

## eConnect

The interconnect routes whole bytes. Each destination byte has a 16:1
multiplexer with a 4-bit select from the eConnect context memory.

* Sources: 0–7 are the register outputs of ePLD 0–7; 8–15 are `pin_in[0..7]`.
* Destinations: `2e` and `2e+1` are the two input bytes of ePLD *e*;
  16–23 are `pin_out[0..7]`.
* The select of destination *d* is at bits `[4d +: 4]` of the eConnect
  configuration.

ePLD outputs are registered, so routing through the eConnect never closes a
combinational loop. The ePLD outputs also leave the device directly on
`epld_q`.

## Parameters

| Parameter (`ecpld`) | Default | Origin |
|---|---|---|
| `MEM_MODE` | `MEM_BRAM` | The block RAM version is the preferred one in the source architecture. |
| `P_EPLD` | 8 | Source architecture (64 macrocells in 8 ePLDs). |
| `P_MC` | 8 | Source architecture. |
| `P_PT` | 2 | This design's choice. One ePLD context then fits a 32 kbit block RAM for 16 contexts: 16 × 1952 = 31232 bits. |
| `P_INB` | 2 | This design's choice. Two inputs per macrocell gives 16 ePLD inputs. |
| `P_PIN_I`, `P_PIN_O` | 8, 8 | This design's choice. With 8 ePLDs this fills the 16 multiplexer sources exactly. |
| `N_CTX` (package) | 16 | Source architecture. |
| `CFG_W` (package) | 32 | This design's choice (the RAM read/write width). |

`P_EPLD + P_PIN_I` must not exceed 16, the reach of a 4-bit select;
elaboration stops with an error otherwise.

## How far to trust it, and where it departs

* The source architecture fixes the following:
  * the eNode behaviour;
  * the AND-OR array with expansion term and register, and its feedback
    connections;
  * the test extension's structure and purpose;
  * the byte-wide 16:1 interconnect;
  * the 64-macrocell / 8-ePLD / 16-context size;
  * the two memory versions.
* This implementation chose the following:
  * product terms per macrocell and ePLD input count;
  * bit and word layouts, and source/destination numbering;
  * the programming port;
  * the shadow-register load and the start/commit switch handshake;
  * valid bits for unwritten contexts;
  * the scan chain order;
  * asynchronous active-low reset to 0.
* The second multiplexer of the test extension takes its registered input from
  the macrocell register, as described above.
* The configuration registers of the block RAM version are not on the scan
  chain. Only macrocell and test-extension flip-flops are.
* Outside the scope of this RTL:
  * mapping onto the structured-ASIC cells;
  * the vendor block RAM macro (the RTL infers a memory array);
  * the CAD software that would produce configurations.

## Simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_enode` | All eNode input/configuration combinations for both planes. |
| `tb_scan_dff`, `tb_test_ext` | Random stimulus against a reference flip-flop. The extension is checked in both modes. |
| `tb_econnect` | Random sources and selects. |
| `tb_ctx_ctrl` | Start/commit timing with memories that become ready after random delays. |
| `tb_ctx_mem` | Both memory versions: one-edge switch; block RAM `ready` exactly `WORDS+1` edges after start; the old configuration held until commit; unwritten contexts read zero; writes into the active context. |
| `tb_epld` | One ePLD against the reference model in `ecpld_ref_pkg`. Covers loop-free configurations that use the feedback columns, loop-forming configurations under `scanmode`, and scan shifting. |
| `tb_ecpld` | The whole device at default parameters (block RAM). It programs five contexts and makes seven switches. It checks every output, `scan_out`, `ctx_busy` and `ctx_cur` every cycle against a cycle-accurate model, including the 63-edge switch latency. It then enters `scanmode` in a context full of loops and shifts the whole 128-flop chain. |
| `tb_ecpld_v1` | The same test with distributed memories. |

The reference model (`tb/ecpld_ref_pkg.sv`) evaluates a configuration straight
from its bit layout. It resolves the feedback columns by repeated passes and
flags any configuration with an active loop in functional mode.

Running a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ecpld_pkg.sv tb/ecpld_ref_pkg.sv tb/tb_ecpld.sv --top-module tb_ecpld -o sim
./obj_dir/sim
```

Substitute any other testbench name. The full-size `tb_ecpld` builds and runs
in well under a minute. A two-state simulator starts undriven state at random
values, and the design is written so that this is harmless: every flip-flop
that is read is reset, and unwritten contexts are masked.
