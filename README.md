# Arbiter-PUF test system with the DRILL power-analysis countermeasure

An arbiter PUF (physically unclonable function) answers a challenge with a
bit. The bit says which of two copies of one rising edge wins a race through
a chain of switch stages. Manufacturing variation sets the path delays, so two
chips built from the same bitstream answer differently.

The weak point is not the race. It is the flip-flop that stores the answer.
Storing a 1 after a reset to 0 switches the flip-flop and its output load.
Storing a 0 switches nothing. The supply current during that clock edge
therefore tells the response. A power profile learned on one chip also works
on every other chip of the same design: the storage circuit is identical on
all of them, even though the race is not. This is the *cross-PUF* attack.

**DRILL** (dual-rail logic plus random initialisation logic) hides that
leak:

* **Dual rail.** A *decoy* flip-flop stores the complement of the arbiter
  output next to the response flip-flop. Every capture then switches exactly
  one of the two.
* **Random initialisation.** Before each capture, a pseudo-random bit sets
  both flip-flops to 1 or resets both to 0. The switch that does happen is
  then 0→1 or 1→0 at random, whatever the response.

This repository holds SystemVerilog for the whole FPGA test system built
around such a PUF. A host PC sends challenges over a UART. A control state
machine fires the PUF and returns the response. A PLL makes the system clock
from the 48 MHz board clock. An optional generator toggles 18 pins to make
supply noise. The DRILL storage can be swapped for a plain register (the
unprotected baseline). The PUF can be single-bit or multi-bit parallel.

## Block map

```
 clk48 ──► clock_pll (×17 ÷2 ÷128) ──► clk_sys 3.1875 MHz
   │
   └────► noise_gen ──► noise_pins[17:0]        (while noise_en)

 uart_rxd ──► uart ──rx bytes──► puf_ctrl ──challenge[N-1:0]──► arbiter_puf × NUM_PUF
 uart_txd ◄── uart ◄─response──  puf_ctrl ──trigger──────────►   (apuf_switch × N,
                                   │  ▲                          path delays,
                       reg_init,   │  │ resp                     arbiter_latch)
                       cap_en,     ▼  │                              │ q, q_n
                       prng_step  lfsr_prng ──rnd──► drill_reg ◄─────┘
                                                     (or resp_reg when DRILL = 0)
```

| Module | File | Kind | Role |
|---|---|---|---|
| `puf_fpga_top` | `rtl/puf_fpga_top.sv` | top | wires everything; system reset held until PLL lock |
| `puf_ctrl` | `rtl/puf_ctrl.sv` | RTL | query sequencer |
| `uart` (`uart_rx`, `uart_tx`) | `rtl/uart*.sv` | RTL | 8N1 serial link |
| `arbiter_puf` | `rtl/arbiter_puf.sv` | behavioural | N-stage delay race plus arbiter |
| `apuf_switch` | `rtl/apuf_switch.sv` | RTL | one stage: two LUT multiplexers |
| `path_delay` | `rtl/path_delay.sv` | behavioural | delay of the path a stage selected |
| `arbiter_latch` | `rtl/arbiter_latch.sv` | behavioural | S-R latch that decides the race |
| `drill_reg` | `rtl/drill_reg.sv` | RTL | response plus decoy flip-flops with random preset |
| `resp_reg` | `rtl/resp_reg.sv` | RTL | plain response register (unprotected) |
| `lfsr_prng` | `rtl/lfsr_prng.sv` | RTL | 16-bit LFSR for the preset bits |
| `clock_pll` | `rtl/clock_pll.sv` | behavioural | 48 MHz → 3.1875 MHz |
| `noise_gen` | `rtl/noise_gen.sv` | RTL | 32-bit LFSR driving 18 pins at 48 MHz |
| `apuf_pkg` | `rtl/apuf_pkg.sv` | package | stage count, delay model, protocol helpers |

## One query, cycle by cycle

All of this runs on `clk_sys`. The UART bytes come first.

| State of `puf_ctrl` | Cycles | What happens |
|---|---|---|
| `CH_RX` | until 8 bytes | Challenge bytes are shifted in, least significant byte first. The challenge is applied to the PUF as it fills. |
| `INIT` | 1 | `reg_init` is high. At the closing edge, `drill_reg` loads the current LFSR bit into both the response and the decoy flip-flop. `prng_step` advances the LFSR. |
| `FIRE` | 1 | `trigger` rose at the edge that entered `FIRE`. The edge races through the chain in about N × 0.5 ns (32 ns for 64 stages), well inside the 314 ns period. `cap_en` is high, so the closing edge captures `q` and `q_n`. The response is thus registered **one clock after the trigger**. |
| `RELEASE` | 1 | `trigger` is low again. The falling edge clears the chain. |
| `SEND` | 1 + wait | The byte `{zeros, resp}` goes to the transmitter once it is free. |

With `DRILL = 0`, `INIT` still takes its cycle but `reg_init` stays low.
A query costs 9 frames × 10 bits × 332 cycles, about 9.4 ms at 9601 baud.

Host protocol: send ⌈N/8⌉ bytes (8 for N = 64), least significant first. The
board answers with one byte: bit *k* is lane *k*'s response. There is no
framing or command byte. A host that loses a byte must resynchronise by
resetting the board.

## How the PUF is modelled

The race cannot be written as synthesizable logic; in the FPGA it is a hand-placed
hard macro. `arbiter_puf` is therefore a behavioural model with real
`#` delays, built from the same structure:

* `apuf_switch` is the stage logic, with top output `(C & B) | (~C & A)`
  and the bottom output the same with A and B swapped. C = 0 passes the
  edges straight; C = 1 crosses them.
* Behind each output, `path_delay` adds the delay of the path the challenge
  bit selected. Each stage thus has four path delays: A→A′, B→B′, B→A′ and
  A→B′.
* `arbiter_latch` outputs `q = 1` if the top edge arrives first and
  `q = 0` otherwise, with `q_n = ~q`. It holds its decision while both
  inputs are low.

The path delays come from `apuf_pkg::stage_delay_ps(seed, stage, path)`.
This is a fixed integer hash that maps each path to a value in
500 ± 40 ps. The seed stands for the chip and for where the macro is placed.
`PLACEMENT` = 0…4 gives the five placements PUF-0 … PUF-4, and lane *k*
uses seed `placement × 16 + k + 1`. The model has no noise, so a challenge always gives the same answer.
With 1 ps resolution, roughly one challenge in 200 makes both edges arrive
in the same picosecond. The latch then settles on whichever edge the
simulator evaluates first, which stands in for a metastable arbiter. The
testbenches skip such challenges or leave their value unchecked.

At power-up, the chain and latch hold arbitrary values. Allow about
N × 0.55 ns for them to drain before the first query. The system-clock
domain has no clock until the PLL locks. Its reset synchroniser therefore
starts from the FPGA power-on value 00, which keeps the UART and the
controller in reset for two system-clock edges after lock.

The model does not model power, so it cannot show the leak or its
hiding. What the RTL does guarantee is the switching pattern DRILL relies
on. After every capture, exactly one flip-flop of each response/decoy pair
has changed. Over many queries, both 0→1 and 1→0 changes occur. The
testbenches check both.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `N_STAGES` | 64 | challenge bits / switch stages |
| `NUM_PUF` | 1 | parallel PUF lanes (2 = the 2-bit parallel PUF); at most 8 |
| `DRILL` | 1 | 1: `drill_reg` + `lfsr_prng`; 0: plain `resp_reg` |
| `PLACEMENT` | 0 | delay set, PUF-0 … PUF-4 |
| `CLKS_PER_BIT` | 332 | system clocks per UART bit (9601 baud at 3.1875 MHz) |
| `NOISE_PINS` | 18 | width of the noise generator |

The delay spread (`NOMINAL_PS`, `SPREAD_PS`) lives in `apuf_pkg`. The PLL
factors (17, 2, 128) are parameters of `clock_pll`.

## What follows the source design and what is this design's own

Taken from the published design:
* the system structure (UART, control state machine, arbiter PUF, PLL
  17/2/128 from 48 MHz);
* the switch LUT equation;
* the S-R latch arbiter with Q and Q̄;
* the response flip-flop with active-low reset;
* the DRILL decoy flip-flop on Q̄ with a pseudo-random set/reset;
* the one-cycle response after the trigger;
* single-bit and 2-bit parallel PUFs;
* five placements;
* the 18-pin, 48 MHz noise logic.

Chosen here, because the source gives no value or detail:
* 64 stages;
* the delay values and their hash;
* the arbiter polarity;
* the UART format and bit rate, and the host byte protocol;
* the controller's states;
* a synchronous preset strobe one cycle before the trigger;
* a 16-bit LFSR as the random source, with one bit per lane;
* lanes that share the challenge;
* the noise LFSR;
* holding the system in reset until the PLL locks.

Not represented at all:
* the FPGA slice itself and the placement of the hard macro;
* the load capacitances, which are where the leak physically comes from;
* the measurement board;
* the attacker's SVM model.

Equal loading of the two flip-flops in silicon is a placement-and-routing
matter. The RTL only brings the decoy out as a port (`decoy`), so that it is
kept and loaded like a data bit.

## Simulating

Everything uses `` `timescale 1ps/1ps ``. Testbenches need Verilator 5 with
`--timing`. The behavioural models use delays.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/apuf_pkg.sv tb/apuf_ref_pkg.sv tb/tb_puf_fpga_top.sv \
    --top-module tb_puf_fpga_top
./obj_dir/Vtb_puf_fpga_top
```

Each testbench prints `TB_RESULT checks=N failures=M`, and a watchdog ends
a hung run.

| Testbench | Checks |
|---|---|
| `tb_puf_fpga_top` | Full system at default parameters, 16 queries (about 2 min). Checks responses against an arithmetic model of the race. Checks the DRILL preset, one-cycle capture, dual-rail switching, both switching directions, both response values, the 3.1875 MHz clock and noise pin activity. |
| `tb_puf_fpga_top_par_drill`, `tb_puf_fpga_top_par_plain` | 2-bit parallel PUF with and without DRILL, 48 queries each. All four response values must occur. |
| `tb_puf_metrics` | Five placements PUF-0 … PUF-4, 400 challenges each, replayed once. Uniformity per instance, pairwise response distance (uniqueness, ideal 50 %) and exact repetition (reliability). The model gives about 52–58 % ones and a mean distance of about 50 %. |
| `tb_arbiter_puf` | 300 challenges on two 64-stage instances. Checks the response and the exact time the decision is made. |
| `tb_apuf_switch`, `tb_arbiter_latch` | Stage and arbiter |
| `tb_resp_reg`, `tb_drill_reg` | The storage |
| `tb_lfsr_prng`, `tb_noise_gen` | The random sources |
| `tb_uart`, `tb_puf_ctrl`, `tb_clock_pll` | Link, sequencing and clock |

`tb/apuf_ref_pkg.sv` computes the arrival times at the arbiter
arithmetically from the same per-path delays. The checks on `arbiter_puf`
thus test the switching and the delay assignment independently of the
event-driven structure.

## Synthesis notes

`apuf_switch`, the registers, the LFSRs, the UART and the controller are
synthesizable. For an FPGA build:
* replace `arbiter_puf` by a placed hard macro of `apuf_switch` stages and a
  latch;
* replace `clock_pll` by the vendor PLL primitive.

Keep the two flip-flops of each `drill_reg` pair, and their output loads,
symmetric.
