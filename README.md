# Hit Sum FPGA

A trigger FPGA for a flash-ADC board. Two ADC FPGAs on the board each deliver,
every 4 ns clock, 8 *hit bits* (one per channel, high while that channel sees a
hit) and a 16-bit partial energy sum. This FPGA

* decides from the 16 hit bits whether the hit pattern is interesting, in one
  of three modes, and turns that into a delayed, stretched trigger `T_HIT`;
* adds the two partial sums into the 16-bit board sum `bsum`, which goes to a
  serial link, and raises `T_SUM` when the board sum crosses a threshold;
* drives a *live trigger* to the board's VME FPGA and, in a handshake with it,
  writes a 32-bit word {event number, pattern} into an external FIFO that the
  VME FPGA reads out;
* sends either the hit bits or the board sum to the P2 backplane.

Everything is programmed through 16-bit registers on a control bus from the
VME FPGA. The RTL is synthesizable SystemVerilog for a 250 MHz clock; the
external FIFO, the VME FPGA, the serial transceiver core and the differential
pads are not part of it and appear as ports.

## Signal flow

```
 ADC FPGA 1: clk, 8 hits, 16-bit sum ─┐            ┌─ hit_bit_top ───────────────────────────────┐
 ADC FPGA 2: clk, 8 hits, 16-bit sum ─┴─ resync ─┬─►│ one_shot ─► hit_window (window / table) ─┐  │
                                                  │  │           └► overlap (boolean)  ─────────┴► mode mux ─► hit_bit_sm ─► T_HIT, hit pattern
                                                  │  └─────────────────────────────────────────────┘
                                                  └─► sum_top ─► bsum (serial link), T_SUM, sum pattern
   T_HIT / T_SUM + pattern ─► extern_fifo_write ─► live_trig, latched_trig, fifo_clk, fifo_data[31:0]
   control bus ─► vme_host ─► all settings, pattern-table writes and read-back
   fixed-width hit bits / bsum ─► P2 multiplexer ─► p2_data[15:0] + p2_clk
```

| module | role |
|---|---|
| `hit_sum_top` | top level; status register contents; P2 multiplexer |
| `resync`, `resync_fifo` | move each ADC link from its own clock into the FPGA clock |
| `one_shot` | give every hit bit the same programmed width |
| `hit_window`, `pattern_table` | window mode and table overlap mode; 65536 x 1 selection table |
| `overlap` | boolean overlap mode |
| `hit_bit_sm` | programmable delay and width of the hit trigger |
| `hit_bit_top` | the hit path: the above plus the mode multiplexer and pattern register |
| `sum_top` | board sum, threshold trigger, sum pattern |
| `extern_fifo_write` | live trigger and the external-FIFO handshake |
| `vme_host` | control-bus register file |
| `hit_sum_pkg` | register addresses, mode encoding, settings struct |

## The hit-bit trigger

This is the core of the design and the part with the most timing rules.

### Equal-width pulses

Hit bits arrive with whatever width the ADC FPGAs gave them. A non-retriggerable
one shot per bit (`one_shot`) turns each rising edge into a pulse of
`HITBITS_WIDTH[i] + 1` clocks; edges that arrive while the pulse runs are
ignored. Every bit has its own width register. All later logic sees only these
*fixed-width* bits, so "overlap" and "inside a window" are judged on pulses of
known length.

### Three modes (configuration bits 1:0)

| bits 1:0 | mode | trigger condition |
|---|---|---|
| `00` | table overlap | the 16 fixed-width bits, used directly as an address, select a one in the pattern table |
| `10` | window | a window opened by a trigger bit collects a pattern that selects a one in the table |
| `01` | boolean overlap | every qualified bit is high at the same time |
| `11` | undefined | no trigger |

**Pattern selection table.** 65536 x 1 bits. Address = a 16-bit hit pattern, a
one there means "trigger on this exact pattern". For example ones at 1, 125,
1000 and 5235 select bit 0 alone, bits 0 and 2..6, bits 3 and 5..9, and bits
0, 1, 4, 5, 6, 10, 12. It is loaded through one data register whose address
increments after every access, and can be read back the same way.

**Window mode.** A rising edge on any bit enabled in `TRIGGER HITBITS` opens a
window of `WINDOW WIDTH + 2` clocks (no reopening while it is open). Every bit
that rises from the opening clock to the last window clock, the opening bit
included, is OR-ed into the window pattern. One clock after the window closes
the pattern becomes the table read address; if the table holds a one, the
window trigger fires for one clock together with the pattern. Bits that rise
after the window do not count. A 16-bit hit counter counts these triggers.

**Table overlap mode.** No window: the fixed-width bits address the table every
clock, and the trigger fires on the first clock that a selected, non-zero
pattern is present.

**Boolean overlap mode.** The trigger is high for as long as all bits set in
`BOOLEAN OVERLAP QUALIFIED BITS` are high together. Because the inputs are the
stretched pulses, hits a few clocks apart overlap when their one-shot widths
are long enough.

### Delay and width

The chosen trigger is registered, and its rising edge starts `hit_bit_sm`:
after `HITS_DLY` clocks of delay, `T_HIT` goes high for `Live Trig Out WIDTH +
2` clocks. A width of 0 gives no pulse at all. While a delay or pulse is in
progress, new triggers are dropped. The pattern register loads the pattern of
the accepted trigger, so the pattern written to the FIFO always belongs to the
`T_HIT` pulse.

### Latencies (clocks of 4 ns)

| path | latency |
|---|---|
| ADC link input to hit bits inside the FPGA | about 5 (clock crossing) |
| completing hit bit sampled to `T_HIT` high, both overlap modes | 4 + `HITS_DLY` |
| opening hit bit sampled to `T_HIT` high, window mode | 8 + `WINDOW WIDTH` + `HITS_DLY` |
| hit at the ADC link to `live_trig`, table mode, `HITS_DLY` = 0 | 13 (measured in simulation) |
| `T_HIT` / `T_SUM` to `live_trig` | 1 |

The original register description quotes a fixed 14 clocks from the FPGA input
for `HITS_DLY` = 0; this implementation measures 13, and each `HITS_DLY` step
adds exactly one clock.

## Live trigger and the external FIFO

Configuration bit 2 selects `T_HIT` with the hit pattern (0) or `T_SUM` with
the sum pattern (1). The selected trigger is the live trigger. On its rising
edge, if the previous word is finished and `trig_ready` from the VME FPGA is
high:

1. `fifo_data` gets {event number, pattern}, the event number counting accepted
   triggers from 1 after reset, and `latched_trig` goes high;
2. one clock later `fifo_clk` is high for two clocks, writing the word;
3. the VME FPGA acknowledges by pulling `trig_ready` low; `latched_trig` falls;
4. the VME FPGA raises `trig_ready` again when it is ready for the next one.

A trigger that arrives during steps 1–3 is ignored, and so is one that arrives
while `trig_ready` is low. `trig_ready` is asynchronous and passes a two-flop
synchroniser. The VME FPGA reads the 32-bit word in two 16-bit reads, event
number first. With patterns 1, 1000, 125, 1, 5235 in table mode (table loaded
as above), the FIFO holds `{1,1} {2,1000} {3,125} {4,1} {5,5235}`.

## Board sum

`bsum = sum0 + sum1`, registered, 16 bits. Sixteen 12-bit ADCs cannot exceed
65520, so no carry is kept. `T_SUM` is a one-clock pulse when `bsum` rises
strictly above `SUM Threshold`; it fires again only after the sum has fallen
back. The sum pattern is `bsum` delayed to line up with `T_SUM`. The threshold
resets to 0xFFFF, so nothing fires before it is programmed. `bsum` is a port for
the serial-link core.

## Clock-domain crossing

Each ADC FPGA sends its data with its own clock, at the same frequency as this
FPGA's clock but with unknown phase. Per link, an input register captures the
24 bits (8 hits + 16-bit sum) on the link clock and writes them every link clock
into a 15-deep dual-clock FIFO (`resync_fifo`: Gray-coded pointers, two-flop
synchronisers). Writing starts after the hard reset is released. The FPGA side
reads whenever the FIFO is not empty and registers the word. The first word
after reset can be the input register's reset value (zero).

## Control registers

| address | name | use |
|---|---|---|
| 0x0400 | STATUS (read) | bit 0 `trig_ready`, 1 `latched_trig`, 2 `live_trig`, 3 window open, 4/5 link 0/1 data arriving |
| 0x0401 | CONFIGURATION | bits 1:0 mode; bit 2 sum path; bit 3 P2 gets hit bits (1) or sum (0); bit 4 table read-back (modes off) |
| 0x0402 + sec 0..15 | HITBITS_WIDTH | one-shot width per bit, pulse = value + 1 |
| 0x0403 | HITS_DLY | delay of `T_HIT` in clocks |
| 0x0404 | Live Trig Out WIDTH | `T_HIT` width = value + 2; 0 = no pulse |
| 0x0405 | TRIGGER HITBITS | bits that open a window |
| 0x0406 | WINDOW WIDTH | window = value + 2 clocks |
| 0x0407 | BOOLEAN OVERLAP QUALIFIED BITS | bits that must overlap |
| 0x0408 | TABLE DATA | bit 0 written to / read from the table; address increments after each access |
| 0x0409 | external FIFO | read by the VME FPGA from the FIFO chip; returns 0 here |
| 0x040A | SUM Threshold | `T_SUM` when `bsum` > value |

The table address returns to 0 on reset and on every write of CONFIGURATION.
The longest window, delay and width (value 65535) are 262.14 µs.

Bus protocol (this implementation's own): one-clock `cb_wr` or `cb_rd` strobe
with `cb_addr`, `cb_sec` (secondary address) and `cb_wdata`; `cb_ack` pulses one
clock after a write and two clocks after a read, with `cb_rdata` valid while
`cb_ack` is high. Wait for `cb_ack` before the next strobe; there are no bursts.

## Choices made here, and differences from the original description

* The description contradicts itself in places; these readings were taken:
  * the window opens on the **rising** edge of a trigger bit (one passage says
    falling), so the opening bit is part of the pattern as stated elsewhere;
  * the overlap and sum triggers are **active high** one-clock or level pulses
    (some passages describe them as low-going);
  * the window lasts `WINDOW WIDTH + 2` clocks (one passage gives 4 ns as the
    minimum);
  * one width register per hit bit (16 registers), as in the register map;
  * the table has 65536 entries (it is also called 65535 x 1).
* Own choices where the description is silent: the control-bus protocol; the
  status bits; table-address reset on CONFIGURATION writes; the FIFO clock
  pulse (2 clocks, one clock after the data); dropping triggers while the delay
  state machine is busy; an all-zero pattern never triggers in table mode; an
  empty qualified-bit mask never triggers; reset values (all zero, threshold
  0xFFFF); the table starts all zero; carrying each link's 24 bits in one FIFO
  word (the diagram of that circuit shows a 13-bit path).
* The "no delay" bypass around the delay state machine is folded into the state
  machine (zero delay goes straight to the pulse).
* The hit counter has no register in the map; `hit_count` and
  `reset_hit_count` are top-level ports.
* Not in this RTL: the serial-link core and transceivers (vendor IP; `bsum` is
  the port), differential pads, the external FIFO chip, the VME FPGA. Soft reset
  does not exist in this design; hard reset (`hard_reset_n`, active low) resets
  everything.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv` that
prints `TB_RESULT checks=N failures=M`. `tb_hit_sum_top` runs the whole chip at
its default sizes: it loads the table, replays the five-word FIFO example, reads
the table back, exercises each mode, the sum trigger, both ignored-trigger
cases, the delay and width, the P2 multiplexer and the status register, and
counts each of these.

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb rtl/hit_sum_pkg.sv \
    tb/tb_hit_sum_top.sv --top-module tb_hit_sum_top -y rtl +libext+.sv
./obj_dir/Vtb_hit_sum_top
```

Replace the testbench name for any other block. The testbenches use delays in
nanoseconds with fractions, hence `--timescale 1ns/1ps`. All testbenches finish within
seconds; two-state simulation is fine, as every register has a reset and the
table is initialised.

To change the design: widths and depths are module parameters (`N`, `CW`, `W`,
`DATA_W`, `DEPTH`, `AW`); register addresses and the mode encoding are in
`hit_sum_pkg`.
