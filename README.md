# Isoswitch: a frame-blind gigabit switch for Isochronet networks

An Isochronet divides bandwidth by time among *routing trees*, not among packets
or circuits. A global cycle is cut into **bands**. In each band, every switch
connects the tree links that cross it: frames entering on a tree's input links
flow towards the tree's root. The switch never parses a frame. What it does
with a word depends only on the current time, so the same hardware carries any
frame format at any link speed. This scheme is Route Division Multiple Access
(RDMA).

This repository holds SystemVerilog for the electronic **RDMA+ Isoswitch**:
4 input and 4 output ports at 1 Gb/s, moving 40-bit words internally. The RTL
also includes the host **interface card** that attaches a workstation to a
port, and the electronic **selection box** of the all-optical RDMA− variant.
Everything is synthesizable, written in IEEE 1800-2017 SystemVerilog, and
verified with Verilator.

Contention is handled in one of three ways:

- **RDMA−**: when inputs collide, one frame passes and the others are lost.
  The optical design works this way.
- **RDMA+**: the losers wait in a queue, but only until the band ends. The
  electronic switch works this way.
- **RDMA++**: queued frames are kept into the next band. It is not built here.

A band can also name a **priority input** for an output. That input wins
whenever it has data. When it is idle, contention traffic may use the output.

## The switch at a glance

```
 serial trunks                                                  serial trunks
 in[0..3] ─► input line card ─┐                      ┌─► output line card ─► out[0..3]
            (deserialise,     │   switching fabric   │   (delay module,
             input queue)     ├─► 4 x (4:1 mux) ─────┤    serialise)
                     Busy[i]  │        ▲ sel         │
                        │     │        │             │
                        ▼              │
              control unit: configuration memory ─► arbitration logic ─► grant register
                            (two tandem CT RAMs)         (combinational)
                            expiration counter, LFSR
                        ▲
                 host: CT loads, Delay values         sync pulses ─► attached nodes
```

`iso_switch` wires these parts together. `isonet_top` puts an `iso_interface`
card on each of the switch's four ports: card *k* sends into input *k* and
receives from output *k*. Beside the switch it places the optical design's
`iso_selection_box`. The host ports of all of them are top-level ports.

## Timing: bits, word slots and control ticks

The whole design runs on a single clock, `clk`, which is the trunk bit clock.
Each trunk carries one bit per clock and at 1 GHz gives 1 Gb/s.

| unit | length | meaning |
|---|---|---|
| word slot | `WORD_W` = 40 clocks | one 40-bit word crosses a trunk; `word_en` is high in the slot's last clock |
| control tick | `BATCH` = 8 slots = 320 clocks | the control unit decides once; `ctrl_tick` coincides with the batch's last `word_en` |
| band | `Expiration` ticks | one line of the configuration table is in force |
| cycle | all lines up to the data boundary | repeats forever |

At 1 GHz the control tick is 320 ns, which is a 3.125 MHz control clock, and
each port moves 8 × 40 bits per tick. A trunk is slot-aligned with the switch.
Alongside the data line it has a **carrier** line, which is high during every
slot that holds a word. An idle slot leaves the carrier low. This is how an
input is "busy".

On each control tick the control unit does the following:

1. If the current band has used its last tick, the program counter moves to the
   next table line. The counter is loaded with that line's Expiration, and
   `sync_band` is pulsed. `sync_cycle` is also pulsed when the new line is
   line 0. In the same clock, `flush` empties every input queue. This is the
   RDMA+ rule: queued words die with their band. A word the fabric sends in
   that last slot still leaves.
2. The arbitration logic runs on the line in force and the Busy lines. In a
   band's first tick, Busy counts as 0 because the queues have just been
   flushed. The result goes into the grant register.
3. For the next 8 word slots, every granted input gives its head word to the
   output multiplexer(s) that selected it, one word per slot.

A word that arrives at an idle output waits at most one control tick (320 ns)
for its grant. From the slot in which its last bit arrives to the slot in
which its last bit leaves, a word takes 3 word slots plus that wait plus the
output's Delay. The 3 slots are one to be granted and read, one in the output
register, and one on the wire.

## Configuration tables and the tandem memory

A **configuration table (CT)** line describes one band:

| field | width (4x4) | meaning |
|---|---|---|
| Port Connection `con[j][i]` | 4 words × 4 bits | input *i* is connected to output *j* in this band |
| Priority Port `pri[j][i]` | 4 words × 4 bits | input *i* has priority to output *j* (at most one bit per word) |
| Expiration | 12 bits | the band's length in control ticks (0 is taken as 1) |

Output *j*'s word sits at bits `[j*N_IN +: N_IN]`, with input *i* at bit *i*.
An input connected to several outputs multicasts: a word goes to all of
them at once.

`iso_config_mem` holds **two** CT RAMs. The switch executes one of them like a
program. The host loads the other through the `ct_*` ports, and writes to
`ct_we` always land in the idle RAM. Loading a new table takes four steps:

1. Write the lines with `ct_we`, `ct_addr`, `ct_con`, `ct_pri` and `ct_exp`.
2. Write the index of the last line with `ct_bound_we` and `ct_bound` (the
   data boundary register).
3. Pulse `ct_commit`. `ct_swap_pending` then stays high until the swap.
4. Wait until `ct_swap_pending` falls before loading again.

The decision logic swaps the RAMs when the running cycle ends, so a new
configuration never disturbs a cycle in progress. After reset no table is
active and nothing is connected. The first committed table starts at line 0
on the next control tick.

The memory is read combinationally. In the tick where a band expires, the
read already points at the next line. This lets the counter load and the
arbitration of a band's first tick use the new line. `cur_idx` gives that
line's address.

## Arbitration

`iso_arbiter` is combinational. Every output has its own O(N_IN) circuit, and
all of them work in parallel. For output *j*:

1. If a busy input has priority to *j*, grant it.
2. Otherwise, if some busy inputs are connected to *j*, grant one of them
   chosen at random.
3. Otherwise, the output stays idle.

The "random" choice searches the inputs in a circle, starting at
`(rnd + j) mod N_IN`. The control unit takes `rnd` from a 16-bit LFSR that
steps on every tick, so every contender is served over time. The testbenches
check this.

One parameter needs care. With `PRI_OWNS = 0` (the default), an output whose
priority input is idle goes to contention traffic: priority sources do not
own their band. With `PRI_OWNS = 1`, the output stays idle for the whole
band instead. This is the stricter reading of the arbitration steps.

## Datapath

**Input line card** (`iso_input_card`). It has a deserializer, then a
show-ahead queue of 256 words. `busy` means the queue is not empty. Two
saturating counters record the words thrown away by band flushes
(`drop_flush`) and those lost to a full queue (`drop_full`). Queueing at the
input costs nothing here. Every word queued at one input belongs to the same
routing tree and heads for the same outputs, so there is no head-of-line
blocking.

**Switching fabric** (`iso_fabric`). This is a full crossbar: one 4:1 word
multiplexer per output, steered by the grant register's `sel` and `sel_en`.
It is combinational and never looks at the data.

**Output line card** (`iso_output_card`). It has a delay module, then a
serializer. `iso_delay_module` gives a link a total delay that is a whole
number of cycle periods, so that cycles start together at both ends. It
works as follows:

- A dual-port RAM of 4096 entries stores each word with a status bit, which
  is 1 if the word is real.
- On every slot the module writes at PCW and reads at PCR.
- Writing an output's Delay register (`dly_we`, `dly_port`, `dly_val`)
  restarts PCW at Delay and PCR at 0. A word therefore leaves Delay slots
  later than it would with a Delay of 0.
- Entries read before the pipeline has refilled count as empty.
- A Delay of 0 (the reset value) gives a plain card with a one-slot register.

## Host interface card

`iso_interface` connects one host to one switch port. It has a transmit
buffer and a receive buffer of 256 words each, and a 32-bit register bus. The
register map is in `iso_pkg::if_reg_e`.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | STATUS | R / W1C | [0] cycle began, [1] band began, [2] word received (sticky events; write 1s to clear); [3] sending, [4] TX full, [5] RX not empty, [6] this port has priority in the band, [15:8] outputs this port is connected to, [31:16] band number |
| 1 | CONTROL | RW | [2:0] event enables, [6:4] interrupt enables, [8] TX_GO |
| 2 | TXLO | W | low 32 bits of the next transmit word |
| 3 | TXHI | W | bits 39:32; pushes the word |
| 4 | RXLO | R | low 32 bits of the oldest received word |
| 5 | RXHI | R | its bits 39:32 |
| 6 | RXPOP | W | drop the oldest received word |
| 7 | COUNTS | R | [15:0] words in TX buffer, [31:16] words in RX buffer |

`irq` is high while any event is pending whose interrupt is enabled. A host
sends a frame in four steps:

1. Wait for the band interrupt.
2. Read STATUS to learn which outputs it may reach in this band.
3. Write the frame's words into the transmit buffer.
4. Set TX_GO.

The card then sends one word per slot, at the full link rate, and clears
TX_GO when the buffer is empty. The band and cycle signals come from the
switch: `sync_band`, `sync_cycle`, `band_idx`, and the band's connection and
priority words. Software can use them directly to schedule synchronous
traffic.

## Optical selection box

In the all-optical switch each band uses its own wavelength. In the basic
form, all inputs share one broadcast link, which carries one tree per band.
`iso_selection_box` is the one electronic part:

- For every input and wavelength, a sensor reports light (`sensor[w][i]`).
- A filter at the exit passes or blocks that light (`filter_pass[c][i]`).
- For each channel, one `iso_arbiter` instance picks an input. Its inputs
  are the sensors and the current line of the box's own configuration table,
  which is the same `iso_config_mem` stepped by `tick`.
- The decision is combinational, so it acts in the cycle the light is sensed.
- The input that owns a channel keeps it while its light lasts, so an
  accepted frame is not cut. The exception is the band's priority input,
  which takes over immediately.
- Any other lit input of the tree is shut, and its frame is lost (RDMA−).
  `collision[c]` shows this. Light from an input outside the tree is blocked
  without raising `collision`.

A channel is one pair of broadcast link and wavelength, numbered
`c = link*N_WL + w`. With the default `N_BL = 1` there is one link, so a
channel is simply a wavelength.

Setting `N_BL > 1` builds the form that carries several trees per band. Every
input reaches every link through its own filter, and the table gives each
(link, wavelength) channel its own connection and priority words. A
wavelength can then carry different trees on different links, and each
link's channel sees the sensors of its wavelength.

The optical devices around the box are not logic and are not modelled:
multiplexers, the broadcast link, tunable receivers and transmitters.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_IN`, `N_OUT` (`N_PORTS` at the top) | 4 | published 4x4 switch |
| `WORD_W` | 40 | published internal word width |
| `BATCH` | 8 | published: 8 words per control tick |
| `EXP_W` | 12 | published CT example |
| `CT_AW` | 8 (256 lines per RAM) | own choice |
| `INQ_AW` | 8 (256-word input queues) | own choice |
| `DLY_AW` | 12 (4096-word delay RAM) | own choice |
| `BUF_AW` | 8 (256-word card buffers) | own choice |
| `N_WL` | 4 wavelengths | own choice, at most one per switch in the network |
| `N_BL` | 1 broadcast link | published basic form (one tree per band) |
| `PRI_OWNS` | 0 | own choice (see Arbitration) |

`WORD_W` must be between 33 and 64 wherever an interface card is used, since
the card splits a word into a 32-bit low half and a high half.

## How far to trust it, and where it departs from the original

The following parts follow the published design:

- the CT format;
- the tandem RAMs, with a program counter, data-boundary registers and a swap
  at the end of the cycle;
- the expiration counter;
- the arbitration rules;
- the crossbar of multiplexers;
- the input queueing;
- the delay module with PCW, PCR and status bits;
- the interface card's buffers, events, status and control registers;
- the word, batch and port sizes.

This design's own choices:

- **One clock with enables.** The original ran its control unit at 3.125 MHz
  and moved a 40-bit word every 40 ns, behind external serial links. Here the serialisers sit inside and
  everything is clocked by the bit clock. A synthesised version at 1 GHz
  would need the serialisers split into their own clock domain.
- **Trunk framing.** Trunks are slot-aligned, sent MSB first, with a carrier
  line. Clock recovery, line coding and optical/electrical conversion are not
  modelled.
- **Band timing.** A band is exactly Expiration ticks. Its first tick never
  grants, because the queues were just flushed.
- **Contention.** The random choice is an LFSR-seeded round search. A priority
  input that is idle lets contention traffic through.
- **Delay module.** The published prototype left it out, because its links
  inside a hub were short. It is built here, and with Delay 0 (the reset
  value) the card behaves as a plain output card. Delay counts word slots,
  one RAM word per slot. The restart rule and the 4096-word depth are own
  choices. That depth is 164 µs at 1 Gb/s. A longer cycle needs a larger
  `DLY_AW`.
- **Interface card.** The register map and bus are own choices. A simple
  synchronous bus stands in for the workstation's system bus.
- **Selection box.** The ownership-hold and priority-preemption rules are own
  choices. So is the channel numbering for several broadcast links.
- **Not built.** RDMA++ and the multi-switch hub are not built. Neither are
  the band-synchronisation protocols between switches, or the host software
  that computes band allocations and keeps time.

Assertions check two rules: at most one priority input per output in a CT
write, and at most one input granted per output (or per selection-box channel). The
grant register's flip-flops reset to 0, so nothing is granted after reset.
The optical sources are not modelled either. In particular, the idea of
sending each frame m times to make loss unlikely is left to them.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    --top-module tb_isonet_top rtl/iso_pkg.sv tb/tb_isonet_top.sv -o sim && obj_dir/sim
```

| testbench | what it exercises |
|---|---|
| `tb_isonet_top` | default-size system, four hosts driving their cards through the register bus: contention with flush at band end, priority flow, multicast to two hosts through a delayed output, band and cycle interrupts, a table reload that takes over at a cycle boundary, selection-box collision and preemption; each word is traced end to end and every sent word must be delivered or counted as dropped |
| `tb_iso_switch` | the switch alone with serial sources and receivers: band lengths in clocks, routing per band, order, duplicates, conservation, latency bounds, the exact added delay of the delay module, table reload |
| `tb_iso_control_unit` | band and cycle pulses, flush, grant-register rules, selection lines, fairness |
| `tb_iso_config_mem` | table execution, wrap at the boundary, read-ahead, swap only at cycle end, host writes isolated from the running table |
| `tb_iso_arbiter` | 3000 random patterns against a reference model, for both priority rules |
| `tb_iso_input_card`, `tb_iso_output_card`, `tb_iso_delay_module`, `tb_iso_fabric` | line cards, delay values 0 to 4095, crossbar |
| `tb_iso_interface` | registers, events, interrupts, full-rate transmission, loopback reception |
| `tb_iso_selection_box` | contention, holding, preemption, band change, wavelength reuse on two broadcast links |

Replace the two `tb_isonet_top` names to run another testbench. Each one
runs in seconds. `tb_isonet_top` uses every parameter at its default. The
block testbenches name their parameters explicitly, and they set them to the
default values. There are two exceptions. `tb_iso_arbiter` has a second
instance with `PRI_OWNS = 1`. `tb_iso_selection_box` has a second instance
with two broadcast links and two wavelengths. Verilator's `-Wall` lint adds a few
warnings. Some are for unused package constants and unused bits. Others flag
`rst_n` for being used both synchronously and as an asynchronous reset, which
comes from the assertions' `disable iff`.
