# A block-RAM slave on the On-chip Peripheral Bus

The On-chip Peripheral Bus (OPB) is IBM's CoreConnect bus for slow on-chip
peripherals. The Xilinx MicroBlaze uses a 32-bit version of it. This RTL
builds one OPB segment around a small peripheral: a 512 × 8 block RAM
that a bus master reads and writes as if it were memory. It has three
parts:

* **`opb_bram`**: the peripheral. It has an address decoder, registered
  inputs, a four-state controller, the RAM and a registered output.
* **`opb_bus`**: the bus itself. There are no tri-state lines. Every
  device's outputs are ANDed with an enable and ORed together.
* **`opb_arbiter`**: grants the bus to one master at a time.

`opb_system` is the top. It joins the three and brings out the ports of
two masters and of one more slave, which live outside this design.

Most of what is subtle here is timing. OPB signals from a master arrive
late in the clock cycle, while a slave's data and acknowledge must be
valid early in the cycle. The peripheral's answer is to register
everything in both directions. That costs latency: a read takes four
cycles and a write three.

## Bit and byte numbering

The OPB is big-endian. Bit 0 is the most significant bit of every bus.
Byte lane 0 is bits 0–7 and sits at the most significant end of a 32-bit
word. Every vector in this RTL is declared `[0:N-1]` (see `opb_pkg`), so
bit numbers from the bus specification appear unchanged in the code.
Verilator reports these as `ASCRANGE` warnings. That is expected.

A byte-wide peripheral uses byte lane 0 only and word-aligned addresses.
RAM location *k* is therefore at byte address `base + 4k`, and its data
travels on `DBus[0:7]`:

| address bits | use |
|---|---|
| `ABus[0:20]`  | compared with `C_BASEADDR[0:20]` (chip select) |
| `ABus[21:29]` | RAM word address (512 words) |
| `ABus[30:31]` | byte within the word, ignored |

The peripheral therefore occupies a 2 KiB window aligned on 2 KiB. Byte
enables and the sequential-address hint are ignored.

## The peripheral (`opb_bram`)

```
 OPB_ABus[0:20] ─► opb_bram_cs ── chip_select ─┐
 OPB_select ───────────────────────────────────┼─► opb_bram_fsm ── Sln_xferAck
 OPB_RNW  ─► [reg] ── rnw ─────────────────────┘     │ ram_rst, ram_we   │ output_enable
 OPB_ABus[21:29] ─► [reg] ── ADDR ─►  opb_bram_ram ◄─┘                   │
 OPB_DBus[0:7]   ─► [reg] ── DI   ─►   (512 x 8)  ── DO ─► AND ─► [reg] ─► Sln_DBus[0:7]
```

* **`opb_bram_cs`** is combinational. It works on the raw bus signals
  because it only has to start the controller.
* **`opb_bram_inreg`** captures the address, the write byte and RNW on
  every clock, whether or not the peripheral is selected. By the second
  cycle of a transfer these registers hold stable copies.
* **`opb_bram_ram`** is a synchronous RAM with a registered output and a
  synchronous *output* reset (`RST` clears `DO`, not the array). The
  controller holds `RST` high all the time except in the one cycle in
  which it reads. So the RAM output is zero whenever the peripheral is not
  answering a read.
* **`opb_bram_outreg`** loads the RAM byte into lane 0 of `Sln_DBus` when
  `output_enable` is high and loads zero otherwise. Lanes 1–3 are always
  zero.
* **`opb_bram_fsm`** is the controller. The acknowledge comes straight
  from one of its state bits, so it is glitch-free and early in the cycle.

`Sln_retry`, `Sln_toutSup` and `Sln_errAck` are constant 0. This slave
never asks for a retry, never needs to suppress the bus time-out and never
reports an error.

### Controller

| state (code) | outputs | next state |
|---|---|---|
| Idle (000)     | –                                         | Selected if `chip_select`, else Idle |
| Selected (001) | read: `ram_rst = 0`; write: `ram_we = 1`  | Idle if `OPB_select` dropped; else Read (read) or Xfer (write) |
| Read (011)     | `output_enable = 1` if `OPB_select`       | Xfer if `OPB_select`, else Idle |
| Xfer (111)     | `xfer_ack = 1`                            | Idle |

`ram_rst` is 1 in every case not listed. The codes are chosen so that the
leftmost bit is 1 only in Xfer. That bit *is* `Sln_xferAck`. If you
change the encoding, the acknowledge moves with it.

### Cycle-by-cycle

Count the cycle in which `OPB_select` rises as cycle 1.

| cycle | read | write |
|---|---|---|
| 1 | Idle; `chip_select` high; inputs captured at the end | same |
| 2 | Selected; RAM reads (RST low) | Selected; RAM written at the end (WE high) |
| 3 | Read; RAM byte on `DO`; `output_enable` high | Xfer; `Sln_xferAck` high |
| 4 | Xfer; `Sln_xferAck` high, byte on `Sln_DBus[0:7]` | Idle |
| 5 | Idle; all outputs 0 | |

The master ends the transfer by dropping `OPB_select` at the edge that
ends the acknowledge cycle. It may also keep `OPB_select` high and present
the next address at once. Because of the Idle cycle after Xfer,
back-to-back reads then complete one every four cycles and writes one
every three.

If `OPB_select` drops before the acknowledge, the transfer is aborted.
The controller checks `OPB_select` in Selected and Read:

* A read whose select is low in cycle 2 or 3 returns to Idle. It gets no
  acknowledge and leaves no data on the bus.
* A write whose select is low in cycle 2 is never performed.
* A write that is still selected in cycle 2 has already written the RAM.
  It goes through Xfer and raises `Sln_xferAck` in cycle 3, even if select
  has dropped by then.

A master that aborts writes should keep this last case in mind.

## The bus (`opb_bus`) and the arbiter (`opb_arbiter`)

Each master drives its own copy of address, byte enables, RNW, seqAddr
and write data. Each slave drives its own read data and flags. `opb_bus`
gates them:

* a master's address and control signals are ANDed with its `select`;
* a master's write data is ANDed with its `dbus_en`;
* a slave's read data is ANDed with its `dbus_en`.

All the gated copies are ORed into the single shared `opb` struct. Slave
flags (`xfer_ack`, `retry`, `tout_sup`, `err_ack`) are ORed ungated,
because slaves keep them at zero when idle. Write data and read data share
one `DBus`. This scheme only works if two rules hold:

1. at most one master has `select` high at a time;
2. every slave outputs zero unless it is acknowledging.

The arbiter enforces rule 1. Its `grant` is registered and one-hot. In any
cycle with `OPB_select` low it grants the lowest-numbered requesting
master, or nobody. While `OPB_select` is high the grant is held. A master
may raise `select` in any cycle in which it sees its grant, and it must do
so in that same cycle: otherwise the grant can move at the next edge. A
master that keeps `select` high straight after an acknowledge keeps the
bus.

`opb_system` asserts rule 1 (one `select`, and only with `grant`).
`opb_bram` asserts rule 2 for itself.

## Top level (`opb_system`)

| port | direction | type | meaning |
|---|---|---|---|
| `OPB_Clk`, `OPB_Rst` | in | logic | clock; asynchronous active-high reset |
| `m_out[NUM_MASTERS]` | in | `opb_mst_out_t` | each master's request, select, abus, be, rnw, seq_addr, dbus, dbus_en |
| `m_grant` | out | `[NUM_MASTERS-1:0]` | grants |
| `ext_sl_out` | in | `opb_slv_out_t` | the second slave (e.g. a bridge to the processor bus) |
| `opb` | out | `opb_bus_t` | the shared bus, read by the masters and the second slave |

| parameter | default | meaning |
|---|---|---|
| `C_BASEADDR` | `32'hFFFF_FFFF` | BRAM window; only bits 0–20 count, so the default window is `0xFFFF_F800–0xFFFF_FFFF` |
| `NUM_MASTERS` | 2 | number of master ports |

The defaults of `opb_bram` are: `C_OPB_AWIDTH = C_OPB_DWIDTH = 32`,
`RAM_AWIDTH = 9` and `RAM_DWIDTH = 8`. Other RAM sizes follow from the
parameters. `C_HIGHADDR` exists for interface compatibility and is not
used. The decoder looks only at `C_BASEADDR`.

The all-ones default base address is a placeholder. Set `C_BASEADDR` for
your system.

## Where this design makes its own choices

The peripheral (decoder, registers, controller, timing) follows a
detailed published description. The following parts are this design's own:

* **RAM behaviour.** The peripheral is written around an FPGA block-RAM
  primitive. `opb_bram_ram` models it as an array: output reset has
  priority, and on a write `DO` takes the written data (write-first). The
  controller never reads and writes in the same cycle, so the write-first
  choice is not visible at the bus.
* **Arbiter.** Only its role and its request and grant lines are given.
  Fixed priority, the hold-while-busy rule and the absence of bus parking
  and bus locking are choices made here.
* **Bus gating of control signals.** The AND-OR scheme is given for the
  address and both data directions. Applying it to `be`, `rnw`, `seq_addr`
  and `select` is a choice made here.
* **No bus time-out counter.** The bus defines a slave time-out, which is
  the reason `toutSup` exists, but no counter is built. A master must
  abandon an unanswered transfer itself.
* **32 bits only.** The 64-bit data half of the IBM bus and dynamic bus
  sizing are not built.

## Simulating

Each testbench in `tb/` is self-checking. It ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. The package must
come first on the command line, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/opb_pkg.sv tb/tb_opb_system.sv --top-module tb_opb_system
./obj_dir/Vtb_opb_system
```

| testbench | what it exercises |
|---|---|
| `tb_opb_system` | whole segment at default parameters. Two concurrent masters write and read back all 512 RAM bytes, mixed with accesses to an external-slave model. Also covers back-to-back reads, aborted transfers, unmapped addresses and an arbitration conflict. Counts each and fails if one never happened. Checks data and latencies (RAM read 4, RAM write 3). |
| `tb_opb_bram` | the peripheral alone: random writes and read-backs with latency checks, back-to-back reads, aborted transfers, misses, zero outputs when idle |
| `tb_opb_bram_fsm` | every transition, cycle by cycle, plus random input against a transition table |
| `tb_opb_bram_ram`, `_inreg`, `_cs`, `_outreg` | each sub-block against a reference model |
| `tb_opb_bus` | AND-OR logic with three masters and three slaves |
| `tb_opb_arbiter` | priority, hold-while-busy, one-cycle grant latency |

The simulator used is two-state, so every register that is read is reset.
The RAM array is not reset, like real block RAM. Testbenches read only
locations they have written.
