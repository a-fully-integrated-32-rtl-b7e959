# MultiProbe: chained ring-oscillator PVT sensors with one controller

A large digital chip drifts with process, supply voltage and temperature
(PVT), and an adaptive voltage/frequency scheme needs to know by how much,
at many places on the die, while it runs. The MultiProbe is a small sensor
macro that can be dropped next to the logic it watches. It holds seven ring
oscillators (ROs), each built from a different kind of delay stage so that
each reacts to P, V and T in its own way, and one 32-bit register that counts
the periods of whichever RO is running. Any number of MultiProbes are
daisy-chained through their registers into one long shift register. A single
controller then serves all of them: it opens a sampling window of an exact
number of clock cycles on a line shared by all probes, and afterwards shifts
every probe's count out while shifting the next configuration in.

This repository holds SystemVerilog for the whole digital part (register,
decoder, multiplexer, controller with its register interface, serializer and
pulse generator, and the chained subsystem) plus behavioural models of the
ring oscillators, which are analog circuits.

## Inside one MultiProbe

```
            sample ─────────────┬──────────────────────────────┐
                                │                              │
  sel[2:0] ─► address decoder ─► select[6:0] ─► 7 x ring_osc ─► 8:1 mux ─► ro_clk
     ▲                                         (NAND(sample, select, fb))    │
     │                                                                       ▼
  scan_in ─► [ sel[31:29] | ovf[28] | count[27:0] ]  mp_register ─► scan_out
  scan_clk ─────────────────────────────────────────────┘
```

| code | oscillator (`mp_pkg::ro_sel_e`) | delay stage                                    | model f at 25 C | model slope |
|------|----------------------------------|------------------------------------------------|-----------------|-------------|
| 0    | `RO_TEMP`  | current-starved inverter pairs biased by a temperature-dependent current | 1000 MHz | +14.1 MHz/K |
| 1    | `RO_INV`   | 13 stages of 2 standard inverters (the reference ring)                   | 1000 MHz | -0.7 MHz/K |
| 2    | `RO_LWIRE` | 10 stages of 2 inverters joined by long multi-layer wires               | 800 MHz  | -0.6 MHz/K |
| 3    | `RO_LATCH` | 5 latch stages                                                           | 1100 MHz | -0.8 MHz/K |
| 4    | `RO_XOR`   | 8 XOR stages                                                             | 1200 MHz | -0.9 MHz/K |
| 5    | `RO_NCAP`  | 6 stages of 2 inverters loaded by NMOS capacitors                        | 900 MHz  | -0.6 MHz/K |
| 6    | `RO_PCAP`  | 6 stages of 2 inverters loaded by PMOS capacitors                        | 950 MHz  | -0.7 MHz/K |
| 7    | `RO_NONE`  | no oscillator; mux input tied high                                       | —        | —          |

Each ring is a chain of identical non-inverting stages closed by a 3-input
NAND whose other inputs are `sample` and the ring's decoder `select`. Only
one ring is ever enabled, so the rings cannot pull each other's frequency.
The stage types, the seven rings, the ~1 GHz target and the two slopes
14.1 MHz/K (temperature probe) and 0.7 MHz/K (inverter ring) are the
design's; the other frequencies and slopes and the slope signs are model
values chosen so the rings can be told apart in simulation.

### The register and its two modes

`mp_register` is the one piece of state in a probe. Its word
(`mp_pkg::mp_word_t`) is `{sel[2:0], ovf, count[27:0]}`.

* **Sampling** (`sample` = 1). The register is clocked by the selected
  ring. `count` advances once per oscillation period. When it wraps from
  `0xFFFFFFF` to 0, `ovf` is set and stays set. `sel` does not change.
* **Scanning** (`sample` = 0). The register is clocked by `scan_clk` and
  shifts right on each rising edge. `scan_in` enters at bit 31 and bit 0
  leaves on `scan_out`. After 32 edges the old word is gone and a new one
  is in place.

The new word holds the next RO selection *and* the counter's start value.
Normally that start value is 0, but a non-zero preload is allowed. The
testbenches use a preload to reach the overflow. Since results leave only by
scanning, every measurement has to be followed by a scan.

Counting detail: a stopped ring rests **high**, because the NAND output is
forced high. The register therefore counts rising edges of the *inverted*
ring output, which is one per period. Because the idle level of the
inverted ring and of `scan_clk` is the same (low), the clock multiplexer
inside the register, `reg_clk = sample ? ~ro_clk : scan_clk`, does not make
a spurious edge when `sample` switches. The rule is that `sample` may only
change while `scan_clk` is low. The controller guarantees this. In silicon
this multiplexer must be a glitch-free clock mux cell. The counter runs in
the ring's clock domain. It is read only by scanning, after the ring has
stopped, so no synchroniser is needed. Lint reports the register as clocked
from a net that depends on its own `sel` bits (through the mux select). That
report is accurate and harmless, because `sel` is frozen while sampling.

## The chain and the scan protocol

```
 controller.scan_out ─► probe0 ─► probe1 ─► … ─► probe(N-1) ─► controller.scan_in
 sample, scan_clk: common to all probes
```

The N probes form one N x 32-bit shift register that moves towards the
controller. One transfer is N x 32 scan clocks:

* Words travel LSB first.
* The controller sends the word for probe N-1 first and probe 0 last. The
  word that arrives first comes from probe N-1, and so on. Word k of a
  transfer belongs to probe N-1-k in both directions.
* `scan_clk` runs at half the controller clock. In the low cycle the
  controller captures the bit arriving from the last probe. In the high
  cycle every probe shifts on the rising edge. The outgoing bit changes
  only when `scan_clk` falls.
* A transfer takes 2 x 32 x N cycles: 256 cycles for the default N = 4.

`mpc_serdes` works one word at a time. At each word boundary it loads the
next configuration word, whose index it gives on `tx_idx` one word ahead. It
delivers each completed result word with `rx_valid`/`rx_idx`.

## The controller

`mp_controller` contains three parts, all clocked by `clk` with an
asynchronous active-low `rst_n`:

* `mpc_regs_intf`: the register interface. It is an APB-style slave with
  zero wait states. `pslverr` is raised for unmapped addresses and for
  writes to read-only registers.
* `mpc_serdes`: the serializer/deserializer for the chain, described above.
* `mpc_pulse_gen`: the sampling pulse generator. It drives `sample` high
  for exactly PWIDTH clock cycles, starting on the cycle after the command.

A small sequencer runs one command at a time:

| command (CTRL write) | action | duration (cycles, N probes) |
|---|---|---|
| bit 0 `scan`    | one transfer: results out, next configurations in | 2·32·N + ~2 |
| bit 1 `sample`  | one sampling pulse                                | PWIDTH + ~2 |
| bit 2 `measure` | pulse, then scan straight after                   | PWIDTH + 2·32·N + ~3 |

If several bits are written together, `measure` wins over `sample`, and
`sample` wins over `scan`. A command written while busy is dropped. An
assertion checks that `sample` is never high during a transfer. A second
assertion checks that `sample` changes only while `scan_clk` is low.

| address | name | access | contents |
|---|---|---|---|
| 0x000 | CTRL   | W / R | W: command bits as above. R: bit0 busy, bit1 done (set at the end of a command, cleared when the next one is accepted) |
| 0x004 | PWIDTH | R/W   | sampling window in clock cycles (PW_W = 24 bits) |
| 0x008 | INFO   | R     | number of probes N |
| 0x100 + 4i | CFG[i] | R/W | word scanned into probe i at the next transfer: `{sel, ovf, count preload}`, normally `sel << 29`. Reset value: `RO_NONE` |
| 0x200 + 4i | RES[i] | R   | last word scanned out of probe i |

### A measurement sequence

1. Write `CFG[i] = code_i << 29` for every probe, then issue `scan`. Every
   probe now has its ring selected and its counter at 0. What comes back in
   `RES` is whatever the probes held before.
2. Write PWIDTH. Write the *next* configuration into `CFG[i]`. Issue
   `measure`.
3. Poll CTRL until `done`. `RES[i].count` is the number of periods of
   probe i's ring in PWIDTH clock cycles, so f = count / (PWIDTH · T_clk).
   If `RES[i].ovf` is set, the window was too long. Go back to step 2.

The counter holds 2^28 − 1 periods. That is 268 ms at 1 GHz and about
114 ms at the 2.34 GHz the temperature-probe model reaches at 120 °C. A
24-bit PWIDTH at 100 MHz allows windows of up to 167 ms, so the overflow
flag does matter for long windows.

## The ring-oscillator models

`ring_osc` is a behavioural model and cannot be synthesised. It reproduces
what the register sees:

* a square wave with f(T) = F_NOM_MHZ + TC_MHZ_PER_K·(T − 25 °C), clamped at
  10 MHz;
* the first falling edge half a period after enable;
* the output high whenever either gate input is low.

`temp_c`, a signed 16-bit value in °C, is an input of the model only. It
appears as a port on `multiprobe` and, per probe, on `mp_system`, so a
testbench can heat individual probes. The model leaves out three things:

* the dependence on supply voltage;
* process corners;
* the non-linear behaviour of the real rings.

The silicon rings follow polynomial surfaces in V and T, of up to fifth
order in V and second in T for the temperature probe, with the zero
temperature coefficient point near 1.2 V for the inverter ring. Their fitted
coefficients are not available, so the model stays linear. Delays are
resolved to 1 ps, and expected counts in the testbenches account for that.

## Design choices not fixed by the underlying design

* The number of probes in the chain: `N_PROBES` = 4 by default. Any
  N ≥ 1 works.
* The 24-bit pulse-width register and a one-clock-cycle pulse resolution.
* The bus protocol (APB-style), the register map and the command set.
* The word layout `{sel, ovf, count}`, the right-shifting scan with LSB
  first, and the scan clock at clk/2.
* The RO code assignment, and code 7 as "no ring", feeding the spare 8th
  mux input.
* Counting one edge per period on the inverted ring output rather than on
  rising edges of the ring output.
* An overflow bit that is sticky while the counter wraps.
* No reset in the probe register, which is always loaded by a scan.
* A separate `scan_clk` pin on each probe.

## Files

`rtl/`:

| file | contents |
|---|---|
| `mp_pkg.sv` | widths, the RO code enum, the register word struct, the register map |
| `ring_osc.sv` | behavioural ring-oscillator model |
| `mp_addr_decoder.sv` | 3-bit to one-hot select |
| `mp_ro_mux.sv` | 8-to-1 ring multiplexer |
| `mp_register.sv` | the count/scan register |
| `multiprobe.sv` | one MultiProbe |
| `mpc_pulse_gen.sv` | sampling pulse generator |
| `mpc_serdes.sv` | chain serializer/deserializer |
| `mpc_regs_intf.sv` | register interface |
| `mp_controller.sv` | controller with sequencer |
| `mp_system.sv` | top level: controller and chain of `N_PROBES` MultiProbes |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

* `tb_mp_system` runs the top at its default size. It drives everything
  through the register port:
  * every ring code is measured;
  * the temperature probe is measured at four temperatures;
  * a preloaded counter overflows;
  * a separate `sample` command is followed by a separate `scan`;
  * a command written while busy is ignored;
  * the command durations are checked.
* `tb_temp_sweep` runs the temperature characterisation through the full
  system, from −40 °C to 120 °C in 10 °C steps, on the temperature ring and
  the inverter ring. It fits each ring's sensitivity from the measured
  counts: 14.1 MHz/K and −0.7 MHz/K, a ratio of about 20.
* `tb_mp_controller` and `tb_mpc_serdes` check the scan protocol against a
  reference chain written in the testbench.
* `tb_multiprobe` measures each ring of a single probe through its pins.

## Simulating

With Verilator 5 (timing support is needed for the oscillator models):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mp_system \
          -y rtl -Irtl rtl/mp_pkg.sv tb/tb_mp_system.sv -o sim
./obj_dir/sim
```

Replace `tb_mp_system` by any other testbench name. Every file declares
`timeunit 1ns; timeprecision 1ps`. The full-size system test simulates about
18 µs and finishes in well under a second. For synthesis, leave out
`ring_osc.sv` and connect the `multiprobe` ring inputs to the real
oscillator macros. All other modules are synthesizable.

## How far to trust it

* **Tested:** every module has a self-checking testbench. Each testbench
  has been shown to fail against a deliberately broken copy of its module.
  The end-to-end test compares every result word with counts computed
  independently from the oscillator law.
* **Not modelled:** the analog behaviour of the rings (voltage, process,
  non-linearity). The clock multiplexer and the asynchronous counter domain
  inside `mp_register` are correct in RTL simulation. They need a
  glitch-free clock-mux cell and proper timing constraints in an
  implementation.
