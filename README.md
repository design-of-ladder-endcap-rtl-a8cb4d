# ALICE SSD ladder EndCap — control logic in SystemVerilog

The silicon strip detector (SSD) of the ALICE inner tracker consists of ladders of
double-sided detector modules. Each side of a module is read by a *hybrid* carrying
six HAL25 front-end chips of 128 channels. An **EndCap** sits at each end of a ladder,
covering half of it: up to 14 modules, which is 28 hybrids. It connects them to the
read-out and control system 25 m away. It has to do four things in a small, low-power
box, at the detector bias potential of each side:

* **Power control and latch-up protection.** Each hybrid has its own supply. The supply
  switches itself off on a sustained over-current, which is the signature of a single
  event latch-up.
* **Buffering and coupling.** Control signals are regenerated and AC-coupled across the
  bias potentials. The analogue hybrid outputs are multiplexed and buffered towards the
  ADCs.
* **Readout control.** The P- and N-side hybrids of a module share one ADC line. The
  EndCap sends their tokens one after the other, switches the analogue multiplexer and
  checks that each token comes back on time.
* **JTAG control and monitoring.** One JTAG chain configures the EndCap and the
  front-end chips. The EndCap keeps that chain intact when a hybrid is switched off.

All of this is built from two ASICs: the control chip **ALCAPONE** (31 per EndCap) and
the analogue buffer **ALABUF** (7 per EndCap). This repository holds:

* synthesizable RTL for the digital part of ALCAPONE;
* the EndCap-level wiring of 31 ALCAPONEs;
* a behavioural model of ALABUF;
* self-checking testbenches for every module and for a full EndCap.

## Structure of an EndCap

```
                     InterfaceCard                              7 x SupplyCard
              +---------------------------+           +-------------------------------+
 control  --->| chip 0 interface (ground) |--+------->| chips 2..15  P-side supplies    |--> 14 P hybrids
 JTAG     <-->|                           |  |  bus   |   (one ALCAPONE per hybrid)   |
 error    <---|   chip 1 P-side buffer ---|--+        | chips 17..30 N-side supplies   |--> 14 N hybrids
              |   chip 16 N-side buffer --|---------->|                               |
              +---------------------------+           | ALABUF x7: P/N mux + buffer  |--> 14 analogue outputs
                                                      +-------------------------------+
```

`endcap` instantiates 31 `alcapone` and 7 `alabuf`. Chips are numbered along the JTAG
chain:

| chip index | role | hybrid |
|---|---|---|
| 0 | interface chip, ground potential | none |
| 1 | P-side bus buffer | none |
| 2 + m (m = 0..13) | supply chip | P-side hybrid of module m |
| 16 | N-side bus buffer | none |
| 17 + m | supply chip | N-side hybrid of module m |

SupplyCard *c* holds modules 2c and 2c+1. Its ALABUF multiplexes the P and N hybrid of
each of those modules onto one output.

* **Token and fast clear.** The interface chip receives them, and the two buffer chips
  pass them to their side's supply chips.
* **JTAG.** The chain runs TDI → chip 0 → chip 1 → chips 2..15 → chip 16 → chips
  17..30 → TDO. A supply chip's hybrid sits right after the chip, but only while the
  hybrid is powered.
* **Error lines.** They form an OR chain: each supply chip ORs in the line of the next
  chip of its side, the buffer chips take their side's chain, and the interface chip ORs
  both. One error line therefore reports every supply, readout and register fault in the
  EndCap.

## One ALCAPONE (`alcapone`)

| sub-block | module | job |
|---|---|---|
| JTAG logic + control registers | `alcapone_jtag` (`jtag_tap`, `parity_reg`, `boundary_scan_reg`) | configuration, status, monitor readback, boundary scan |
| Power supply control | `supply_ctrl` | start-up timer, over-current timer, error latch, power-on reset |
| Readout control | `readout_ctrl` | delayed token, multiplexer select, return-token check, fast clear |
| Error control | `error_ctrl` | error flags, masks, error OR chain |
| Hybrid port | `hybrid_port` | driver disable and JTAG bypass of a dead hybrid |

There are two clock domains:

* `tck` runs the JTAG logic.
* `clk`, the 10 MHz readout clock, runs everything else.

Single control bits (supply on, readout enable, masks, clear, parity error) cross into
`clk` through two-flop synchronisers (`sync2`). Three things cross unsynchronised and
must be quasi-static:

* the readout delay;
* the readout length;
* the status word that JTAG reads.

So program the readout registers while no readout runs.

The analogue parts of the chip are outside the RTL: the LVDS/CMOS receivers and
drivers, the bandgap and shunt regulator, the supply's error amplifier, the voltage DAC
and the monitor ADC. Their digital sides are ports:

* `dac_code`
* `adc_temp` and `adc_cur`
* `overcurrent`
* `sup_out_en` and `sup_ilim_en`
* the hybrid pins

### Readout sequence (`readout_ctrl`)

This is the part that needs the most care. A hybrid is read by passing a token through
its six HAL25 chips. Each chip puts its 128 channels on the analogue line at one sample
per clock, with a few extra cycles for token handling. It then passes the token on. The
last chip returns it to the EndCap. In this implementation each supply chip runs the
sequence for its own hybrid:

1. The token arrives on `token_in` (cycle 0).
2. After `ro_delay` further cycles the token goes to the hybrid (`hyb_token`, one cycle,
   in cycle `ro_delay + 1`). At the same time `sel_readout` switches the ALABUF
   multiplexer to this hybrid.
3. The return token must arrive exactly `ro_len` cycles after `hyb_token`. If it does,
   the sequence ends cleanly. The following all raise `token_err` for one cycle:
   * a token that returns earlier or later;
   * a token that never returns (the error is raised at the expected cycle);
   * a return token outside a sequence.
4. `sel_readout` is high from the `hyb_token` cycle through the expected return cycle,
   which is `ro_len + 1` cycles. It drops early if the token returns early.

The P and N hybrids of a module are read one after the other by programming the delays
differently:

* **P-side chip:** `RODELAY = 0`.
* **N-side chip:** `RODELAY = P-side ROLEN + 1`.

The N-side select then follows the P-side select with no gap and no overlap. The ALABUF
inverts the N-side signal, so a module delivers P samples and then N samples of the same
polarity on one line.

When a front-end chip is broken, the HAL25 bypass keeps the token moving but shortens
the readout. Re-program `ROLEN` of that hybrid, and `RODELAY` of its N partner if it is
a P hybrid; the token check then passes again. The testbenches use the hybrid model's
timing: 128 + 2 cycles per active chip and 1 per bypassed chip. The real overhead per
HAL25 must be taken from the chip's documentation.

`fast_clear` aborts the sequence in every chip at once and clears the counters. A new
token is accepted in the next cycle. The sequence only starts when the supply is OK and
`ro_en` is set in the control register. A failing supply aborts a running sequence
without an error.

### Supply protection (`supply_ctrl`)

| event | result |
|---|---|
| `supply_on` rises | output enabled; start-up timer runs `STARTUP_CYCLES` = 2500 cycles (250 µs at 10 MHz) with current limit off (`ilim_en` = 0), over-current ignored and `po_reset` asserted to the hybrid |
| start-up timer ends | `ok` = 1, current limit active |
| over-current while running, lasting `OC_CYCLES` = 250 cycles (25 µs) | output off, error latch `err` set; shorter over-currents restart the timer |
| `supply_on` low, then high again | latch cleared by the new start-up, supply restarts |

The real circuit has analogue timers. Here they count the readout clock.

### Hybrid port (`hybrid_port`)

While the hybrid supply is off:

* the drivers' tri-state enable `drv_en` is low and every driven line is held low, so
  no current flows into an unpowered hybrid;
* the hybrid is also out of the JTAG chain: chain data passes straight from the chip to
  the next chip.

Once the supply reports OK after start-up, the hybrid rejoins the chain. The switch-over
happens on a falling TCK edge. Do it between JTAG scans.

### Errors and masking (`error_ctrl`)

| flag | source | behaviour |
|---|---|---|
| bit 0 `ERR_SUPPLY` | supply switched off by over-current | follows the supply's latch |
| bit 1 `ERR_TOKEN` | return token at the wrong time | sticky until `clr_err` |
| bit 2 `ERR_PARITY` | a configuration register lost its parity | until the register is rewritten |

`error_out = error_in | |(flags & ~mask)`. The STATUS register shows the flags whether
they are masked or not, so the control system can find which chip raised the line. A
mask bit keeps a permanent defect from holding the line.

### JTAG registers (`alcapone_jtag`)

The TAP follows IEEE 1149.1. Test-Logic-Reset selects BYPASS, because the chip has no
IDCODE. The instruction register is 4 bits wide. Registers shift LSB first.

| IR | name | bits | content |
|---|---|---|---|
| 0000 | EXTEST | 7 | boundary scan, outputs driven from the register |
| 0001 | SAMPLE | 7 | boundary scan, capture only |
| 0100 | CTRL | 6 | `[0]` supply_on, `[1]` ro_en, `[4:2]` mask, `[5]` clr_err (reset 0) |
| 0101 | DAC | 8 | supply voltage DAC code (reset 0x80) |
| 0110 | RODELAY | 12 | token delay in cycles (reset 0) |
| 0111 | ROLEN | 12 | expected return time in cycles (reset 768) |
| 1000 | STATUS | 6 | `[2:0]` error flags, `[3]` readout busy, `[4]` hybrid in chain, `[5]` supply OK (read only) |
| 1001 | ADC | 20 | `[9:0]` temperature, `[19:10]` detector current (read only) |
| 1111 | BYPASS | 1 | also selected by any unused code |

* **Boundary scan cell order** (cell 0 nearest TDO): token_in, fast_clear_in,
  hyb_ret_token, error_in, then the outputs hyb_token, sel_readout, error_out.
* **Parity.** The four writable registers (CTRL, DAC, RODELAY, ROLEN) keep a parity bit
  that is computed when they are written. A continuous compare detects a single event
  upset in any stored bit, including the parity bit itself.
* **Read-back.** Capture-DR loads a register's current value, so every write also reads
  back the previous contents.

### ALABUF model (`alabuf`)

This is a behavioural model with real-valued ports, not synthesizable. Each of its two
channels:

* multiplexes the P hybrid (`sel_p`) or the N hybrid (`sel_n`, inverted);
* sits at the reference level with neither selected;
* amplifies by 2.6;
* drives a differential output around 1.25 V;
* outputs 0 V differential while `disable_buf` is high.

The model is ideal. It has no settling time, noise or non-linearity.

## How far this follows the published design

**Taken from the design description:**

* the chip and card counts;
* six HAL25 chips of 128 channels per hybrid and the 10 MHz readout clock;
* the 250 µs start-up and 25 µs over-current timers, the power-on reset and the error
  latch;
* the programmable token delay, the return-token time check and the fast clear;
* driver disable and JTAG chain restore around a switched-off hybrid;
* an IEEE JTAG interface with parity-checked registers;
* registers for the DAC, readout control, ADC and boundary scan;
* maskable errors OR-ed onto one line;
* the ALABUF gain of 2.6, reference in the quiet state and inversion of one side.

**Choices of this implementation:**

* the instruction codes, register widths, layouts and reset values;
* the `ro_en` and `clr_err` control bits;
* the exact-cycle token check and its cycle offsets;
* splitting the readout controller over the P and N supply chips, with the N chip
  delayed by the P length;
* the restart rule of the over-current timer and clearing the latch by off/on;
* counting the timers on the readout clock;
* the boundary scan pins;
* the JTAG chain order and the error OR chain in the EndCap;
* one shared clock and reset for all chips.

**Not modelled:** the analogue circuits listed above and the AC coupling between chips.
In `endcap` those connections are plain wires. The three control chips have no hybrid:
their hybrid JTAG pins are looped back, and their readout stays disabled. In the real
EndCap the supply circuits of the InterfaceCard power the SupplyCard chips and give them
their power-on reset. Here every chip is always powered and shares `rst_n`, so the
control chips' supply outputs only appear on the `sup_out_en`/`sup_ilim_en` ports.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The testbenches use two helpers:

* `tb/jtag_drv_if.sv`, a JTAG master;
* `tb/hal25_hybrid_model.sv`, a behavioural hybrid. It holds six chips with token
  passing, bypass, analogue samples and a TAP-controlled bypass chain.

`tb_endcap` runs a whole EndCap with every parameter at its default: 31 chips, 28
hybrids, 2500-cycle start-up. Everything goes through the JTAG chain, the token, fast
clear and error lines and the analogue outputs. It walks through the following:

1. Chain discovery and ADC/DAC access on all chips.
2. Switch-on, with the hybrids joining the chain.
3. A full readout: every module shows 780 P samples and then 780 inverted N samples at
   gain 2.6.
4. A bypassed front-end chip: token error, located with STATUS, masked, cleared and
   fixed by reprogramming.
5. A fast clear in mid-readout.
6. A latch-up on one hybrid: supply off, hybrid bypassed in the chain, other modules
   unaffected; off/on then restores the chain.
7. A register upset caught by parity.
8. A boundary-scan interconnection test: EXTEST on one chip drives its error pin, and
   the next chip captures it.
9. The ALABUF buffers disabled during a readout.

It counts each of these mechanisms and fails if one never happened. The simulation
covers about 3 ms of EndCap time and takes well under a second with Verilator.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb rtl/endcap_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/jtag_drv_if.sv tb/hal25_hybrid_model.sv tb/tb_endcap.sv \
  --top-module tb_endcap && ./obj_dir/Vtb_endcap
```

To run a single block, replace `tb_endcap` with its testbench. Only
`tb_jtag_tap`, `tb_alcapone_jtag`, `tb_alcapone` and `tb_endcap` need
`jtag_drv_if.sv`. Only `tb_alcapone` and `tb_endcap` need the hybrid model. The
package `endcap_pkg.sv` must come first. The testbenches need a two-state simulator with
`--timing`.

Things to change:

* Timer lengths are parameters of `endcap`, `alcapone` and `supply_ctrl`.
* Register widths and instruction codes are in `rtl/endcap_pkg.sv`.
* The ROLEN reset value is a parameter of `alcapone_jtag`.
