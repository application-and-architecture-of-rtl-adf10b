# Low-power LFSR test pattern generator with built-in response analysis

This design is a small built-in self-test (BIST) system. A linear feedback
shift register (LFSR) produces pseudo-random test patterns. The patterns are
applied to a circuit under test (CUT), the CUT's responses are compacted into
a signature, and the signature is compared with the one a fault-free circuit
gives. A mismatch raises an interrupt.

The "low-power" part is in how the LFSR starts. The binary seed is first
converted to Gray code, and the Gray-coded value is loaded as the LFSR's
initial state. From then on the register runs with ordinary XOR feedback.
Only the seed is Gray coded; later patterns are plain LFSR states.

Two example CUTs are tested side by side from the same pattern stream:

- a bank of five one-bit half adders;
- a 5-tap low-pass FIR filter.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017) and
passes Verilator lint and the slang front end.

## Block diagram

```
            en ──►┌────────────┐ load/step/check ┌──────────────┐
  intr_clear_i ──►│ controller │────────────────►│ LP-LFSR       │  seed ─► Gray ─► LFSR
        intr_o ◄──│            │                 └──────┬───────┘
                  └─────▲──────┘                        │ pattern (10 b)
                        │ fail/valid     ┌──────────────┼───────────────┐
                        │                ▼              ▼               ▼
                        │         half_adder_cut    fir_filter    pattern_memory
                        │                │              │         (bank 1: even,
                        │                ▼              ▼          bank 2: odd)
                        │              misr            misr
                        │                │              │
                        └──────────── tpa ◄─golden    tpa ◄─golden
```

| Module            | Role |
|-------------------|------|
| `lp_atpg_top`     | Top level: one pattern generator, two CUT channels, memory, controller |
| `atpg_controller` | Session state machine, enable in, interrupt out |
| `lp_lfsr`         | Low-power LFSR: `gray_code_gen` feeding the load port of `lfsr_core` |
| `lfsr_core`       | Loadable Fibonacci LFSR with a tap-mask parameter |
| `gray_code_gen`   | Binary to Gray code converter |
| `half_adder_cut`  | CUT 1: pattern split into A (upper 5 bits) and B (lower 5 bits), five `half_adder` cells |
| `half_adder`      | One-bit half adder |
| `fir_filter`      | CUT 2: 5-tap direct-form FIR filter |
| `misr`            | Multiple-input signature register |
| `tpa`             | Test pattern analyzer: compares a signature with its reference |
| `pattern_memory`  | Two-bank store of every generated pattern |
| `atpg_pkg`        | Shared widths, tap mask, FIR coefficients, controller state type |

## The pattern generator

### Gray-coded seed

`gray_code_gen` computes `gray = bin ^ (bin >> 1)`. The MSB is copied, and
each lower bit is the XOR of the binary bit at that position and the bit just
above it. For example, `01001` becomes `01101`. In `lp_lfsr`, the LFSR's
`load_val` is the Gray code of `seed`, so the first pattern of a session is
`gray(seed)`.

### Feedback

`lfsr_core` shifts towards the MSB on every `step`. The bit shifted into bit
0 is the XOR of the state bits selected by `TAPS`. The default mask,
`10'b10_0000_0001` (bits 9 and 0), reproduces this reference sequence:

```
0101100000 → 1011000000 → 0110000001 → 1100000011 → 1000000110 → 0000001101
```

The testbench `tb_lfsr_core` checks this sequence. Be aware that this
polynomial is **not maximal length**: from any non-zero state it cycles
through 889 states, not 1023. For a maximal-length 10-bit sequence, set
`TAPS = 10'b10_0100_0000` (bits 9 and 6). Both `lfsr_core` and `lp_lfsr` take
`TAPS` as a parameter; `lp_atpg_top` passes its own `TAPS` down to them.

A seed of zero gives a Gray code of zero, and the all-zero state never leaves
zero. An assertion in `lfsr_core` (`a_no_lockup`) fires if the register is
stepped from zero. Always use a non-zero seed.

## The circuits under test

### Half adders

The 10-bit pattern is split into operand A (`pattern[9:5]`) and operand B
(`pattern[4:0]`). Bit i of A and bit i of B go into their own half adder;
there is no carry chain between the cells. The response is
`{sum[4:0], carry[4:0]}`, ten bits, which is the MISR width.

### FIR filter

The filter is in direct form. The input sample goes through four delay
registers, each tap is multiplied by its coefficient, and the products are
summed. The low-pass coefficients (Blackman window, cut-off 0.5π) are
0, 0.1083, 0.5, 0.1081 and 0. They are stored in `atpg_pkg::FIR_COEF` as
unsigned fixed point with 12 fractional bits: 0, 444, 2048, 443, 0.

The input is the pattern, read as an unsigned 10-bit number. The output is
the integer part of the sum, `y = floor(Σ h_k·x(n−k) / 4096)`. The
coefficients add up to about 0.716, so the output always fits in 10 bits.
`y` is combinational in the current pattern and the delay line. The delay
line moves one place per pattern, and it is cleared when a session starts,
so every session sees the same response stream.

### Fault injection

`fault_ha` and `fault_fir` force one CUT output bit to 0, acting as a
stuck-at-0 fault:

- in the half-adder CUT, response bit 5 (`sum[0]`), set by `FAULT_BIT`;
- in the FIR filter, output bit 0.

These ports exist so that a faulty run can be demonstrated in simulation.
Tie them to 0 in a real use.

## Signature compaction and analysis

This is the part that needs the most care in using the design.

### MISR

The MISR is a ring of ten flip-flops with an XOR in front of each one:

```
sig'[i] = sig[i-1] ^ d[i]              for i = 1..9
sig'[0] = sig[9] ^ (^(sig & TAPS)) ^ d[0]
```

By default `TAPS = 0`, so the only feedback is the end-around connection from
the last stage to the first; the characteristic polynomial is x¹⁰ + 1. This
is the weakest useful MISR. An error that appears on the same output bit in
patterns whose distance from the end of the session differs by a multiple of
10 can cancel out (aliasing). If you need stronger compaction, give `misr` a
primitive tap mask, for example the same `10'b10_0100_0000` as above. The
MISR is cleared when a session starts and takes one response per `step`.

### Reference signatures

At the end of the run, each `tpa` compares its MISR signature with a
fault-free reference. The reference comes in on the `golden_sig_ha` and
`golden_sig_fir` ports. It is computed off-line, from a model or from a known
good device, for the seed in use. For the seed `0100101011` with the default
parameters:

| Value | Result |
|-------|--------|
| First pattern | `0110111110` |
| Half-adder signature | `10'h301` |
| FIR signature | `10'h343` |

`tb_lp_atpg_top` contains a reference model (`tb/atpg_ref_pkg.sv`) that
computes these values for any seed.

A stored reference is needed for any CUT that is not a plain buffer. The
simplest form of the scheme compares the compacted output directly with the
LFSR patterns. That only works when the CUT's output equals its input.

## Session control and timing

`atpg_controller` steps through these states:

| State | Clocks | What happens |
|-------|--------|--------------|
| IDLE  | –      | Waits for `en` |
| LOAD  | 1      | Loads `gray(seed)`; clears the MISRs, TPAs, FIR delay line and interrupt |
| RUN   | 64     | One pattern per clock (`NUM_PATTERNS`): the LFSR steps, both MISRs absorb a response, and the pattern is written to memory |
| CHECK | 1      | The TPAs compare the signatures |
| DONE  | –      | Result is held until `en` goes low |

The TPA result is registered. The interrupt is updated one clock after
CHECK, which is `NUM_PATTERNS + 3` clocks after the controller sees `en`
(67 clocks at the defaults). `done` stays high until `en` is dropped.

The interrupt is set if either TPA reports a mismatch:

| `intr_o` | Meaning |
|----------|---------|
| 1 | Signature mismatch: faulty CUT |
| 0 | Both CUTs passed |

`intr_o` is sticky. It stays set after `en` drops, until `intr_clear_i` is
pulsed or a new session starts. `tpa_ha` and `tpa_fir` show which CUT
failed.

Reset (`rst`) is synchronous and active high. It resets the controller, LFSR,
MISRs, TPAs and FIR delay line; the pattern memory is not reset. Hold `en`
high for the whole session. Dropping it early does not abort the run; it
only returns the controller to IDLE once DONE is reached.

Two assertions in the controller check the session:

- `a_strobes_exclusive`: `load`, `step` and `check` are never active in the
  same clock;
- `a_run_length`: RUN lasts exactly `NUM_PATTERNS` clocks.

## Pattern memory

Every pattern applied during RUN is written to `pattern_memory`. The memory
is split into two banks:

- pattern n goes to bank 1 when n is even, and to bank 2 when n is odd;
- it is stored at bank address n/2;
- one read address `mem_raddr` reads both banks at once, so patterns 2a and
  2a+1 appear together on `mem_data_out1` and `mem_data_out2`, one clock
  later.

The memory records the patterns but is not read back by the generator.

## Parameters

| Parameter | Where | Default | Notes |
|-----------|-------|---------|-------|
| `W` | top, most blocks | 10 | Pattern, response and signature width. The half-adder CUT needs an even W. `fir_filter` output width follows W. |
| `TAPS` | `lp_atpg_top`, `lp_lfsr`, `lfsr_core` | `10'b1000000001` | LFSR feedback mask, non-maximal (889-state cycle) |
| `NUM_PATTERNS` | `lp_atpg_top`, `atpg_controller`, `pattern_memory` | 64 | Patterns per session. Must be even; a power of two keeps the memory fully used. |
| `TAPS` | `misr` | 0 | Extra MISR feedback taps |
| `FAULT_BIT` | `half_adder_cut` / `fir_filter` | 5 / 0 | Bit forced by the fault ports |
| `FIR_COEF`, `FIR_FRAC` | `atpg_pkg` | 0,444,2048,443,0 / 12 | FIR coefficients and their fraction bits |

After synthesis the top level has 45 flip-flop bits plus 680 memory bits.
The memory bits are the 640-bit pattern store and the 40-bit FIR delay line.

## How far the RTL follows its source, and what it adds

These parts follow the description of the scheme:

- the set of blocks (controller with one enable input and one interrupt
  output, memory, low-power LFSR, CUT, MISR, TPA);
- Gray coding of the seed only;
- the 10-bit width, with the 5 + 5 operand split of the half adder;
- the sum-and-carry response;
- the five FIR coefficients;
- the MISR as a ring of XOR-fed flip-flops;
- a memory in two parts;
- interrupt = 1 on a mismatch.

These parts are choices of this design:

- **LFSR taps and shift direction.** They were fitted to the reference
  pattern sequence shown above, so the polynomial is not maximal length.
- **Reference signatures on ports.** The analyzer compares each signature
  with a supplied reference, instead of comparing the output with the LFSR
  patterns directly.
- **Both CUTs in one session.** The half adder and the FIR filter are
  instantiated together, not as separate builds.
- **Session details.** The session length (64), the state sequence and its
  timing, the clear input and reset behaviour.
- **FIR filter details.** The fixed-point format and the number of taps.
  The filter is described as "order 5" but with five coefficients; the five
  coefficients were followed.
- **Response bit order.** The half-adder response is `{sum, carry}`.
- **Memory layout.** The bank interleaving, depth and read timing, and the
  fact that the memory only records patterns.
- **Fault ports.** The fault-injection ports are additions.
- **No gated clock.** A clock enable replaces the gated MISR clock.

Not included:

- the buffer CUT, which has no logic;
- the plain binary-seeded LFSR system that the low-power version is compared
  with; `lfsr_core` on its own is that plain LFSR;
- any power or timing model. Power and delay savings are a property of the
  implementation and cannot be seen in RTL simulation.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
testbenches share the reference models in `tb/atpg_ref_pkg.sv`.

Example for the whole system:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/atpg_pkg.sv tb/atpg_ref_pkg.sv tb/tb_lp_atpg_top.sv \
  --top-module tb_lp_atpg_top -o sim
./obj_dir/sim
```

For another block, replace `tb_lp_atpg_top` with its testbench name.

`tb_lp_atpg_top` runs the top with every parameter at its default. For three
seeds it runs:

1. a fault-free session, which must not interrupt;
2. a session with the half-adder fault, which must interrupt on `tpa_ha`
   only;
3. a session with the FIR fault, which must interrupt on `tpa_fir` only.

It checks every pattern, both response streams and both signatures against
the reference models. It also checks the session length, `intr_clear_i` and
the contents of both memory banks. It counts how often each mechanism
happened (Gray seed load, pattern step, compaction, pass, interrupt, clear,
two-bank read) and fails if any never did. It runs in well under a second.

To test a different CUT, replace one channel in `lp_atpg_top`:

1. instantiate the new CUT between `lfsr_o` and the `d` input of its MISR;
2. extend `tb/atpg_ref_pkg.sv` with a model of the CUT;
3. compute the new reference signature with that model.
