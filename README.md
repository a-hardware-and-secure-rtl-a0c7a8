# GCIPRNG: a chaotic-iteration pseudorandom generator in SystemVerilog

A fast linear generator (LFSR113, Taus88 or xorshift128+) is cheap, but its
output fails demanding statistical batteries. This generator post-processes
such a stream. It keeps a short internal state, 32 bits by default. Every clock
it takes one word from the linear generator, called the *strategy*. That word
decides which bits of the state are pushed through a Boolean function; the
other bits are left alone. This update is a *generalized chaotic iteration*.
The new state is then scrambled by a bijective permutation, and the result is
the output. The scheme is chaotic in the sense of Devaney. It keeps
cryptographic security: if the strategy comes from a secure generator, the
output is secure too.

The hardware does one iteration per cycle: an N-bit output word every clock,
one cycle after the step that made it. Around the generator sits an FPGA test
platform. A host computer uses it over a serial line to configure the
generator, read its registers and stream its output. Both parts are here:

* the generator: `gciprng_core` with `gci_block`, `gci_permutation`,
  `strategy_mode` and the strategy generators `lfsr113`, `taus88` and
  `xorshift128p`;
* the platform `gci_test_platform`. It holds a decoder command controller
  (`dccu`), a DUT controller (`dut_controller`) and a UART (`axil_uart` with
  `uart_rx`/`uart_tx`), joined by an AXI4-Lite bus (`axil_if`,
  `axil_interconnect`).

Shared types and constants are in `gci_pkg`.

## One iteration, bit by bit

Let `x` be the N-bit state and `s` the N-bit strategy word. The state is cut
into N/8 lanes of 8 bits. Lane `l` is bits `8l+7..8l`, so lane A is the least
significant byte. Each lane is updated on its own (`gci_block`):

    x'[i] = s[i] ? f_i(x_lane) : x[i]

`f` is a Boolean function B^8 -> B^8 whose iteration graph is strongly
connected. The function built here is the vectorial negation, `f_i(x) = ~x_i`,
so an iteration simply inverts the selected bits: `x' = x ^ s`. The same
scheme also works with functions obtained by removing a balanced Hamiltonian
cycle from the 8-cube, but their truth tables are not available, so they are
not offered. To add one, replace the `f_x` line in `gci_block.sv`. The rest of
the datapath does not change.

Cutting the state into independent 8-bit lanes keeps the logic small. It would
ruin the statistics, though, since each lane behaves like an 8-bit generator.
The permutation at the output is what mixes the lanes together again.

## The output permutation

`gci_permutation` applies three invertible steps to the state. They follow the
"RXS M XS" output function of the PCG family:

    w1 = x  ^ (x >> (x[N-1 -: OPB] + OPB))     random xorshift, OPB = log2(N) - 1
    w2 = w1 * MULT  (mod 2^N)                   MULT = 811 (N = 32), 995 (N = 64)
    y  = w2 ^ (w2 >> (2N+2)/3)                  fixed xorshift: 22 (N = 32), 43 (N = 64)

For N = 32 the first shift is 4 to 19 positions. It is chosen by the top four
bits of the state itself, so the low 13 to 28 bits are mixed. The small
multipliers 811 and 995 are the ones that make the 32-bit and 64-bit outputs
pass BigCrush. They are much smaller than PCG's own 32-bit multiplier,
277803737. The three-step structure and the multipliers belong to the
original design. The shift amounts come from PCG, and the published text
describing them cannot be matched exactly. It speaks of scrambling "between 17
and 28" low bits, which no 4-bit shift field with offset 4 produces. Treat the
shift amounts as the least certain part of this RTL. Both are derived from N
in one place at the top of `gci_permutation.sv`.

Every step is a bijection (an xorshift by at least one position, and a
multiplication by an odd number). So the permutation loses no entropy, and the
chaos proof carries over to the output unchanged.

## Strategies and iteration modes

Three strategy generators are built. Each follows its published recurrence:

| generator | state | output | RTL |
|---|---|---|---|
| LFSR113 (L'Ecuyer) | 4 x 32 bits | 32 bits | `lfsr113` |
| Taus88 (L'Ecuyer) | 3 x 32 bits | 32 bits | `taus88` |
| xorshift128+ (Vigna, shifts 23/18/5) | 2 x 64 bits | 64 bits | `xorshift128p` |

Each exposes on `rnd_o` the value that its next step will produce. A consumer
uses `rnd_o` and pulses `step_i` in the same cycle, so nothing is wasted and
there is no extra latency.

All are seeded from one 32-bit word. Each component is the seed XORed with a
fixed constant, with its top bit forced to 1 so that no component can fall
below its minimum legal seed. Reset is the same as seeding with 0. The seeding
rule is this design's own.

LFSR113 with the negation function is the main configuration. It is the best
32-bit candidate in the original evaluation. For a 64-bit generator the
evaluated strategies are the concatenation {Taus88, LFSR113} and xorshift128+.

The DUT controller also offers three iteration modes (`strategy_mode`):

* **generalized**: the strategy word is used as it is (the main scheme);
* **unary**: one bit per lane is updated. Its index is the lane's three low
  strategy bits;
* **parallel**: every bit is updated. With the negation function the state
  then just alternates between two values, so this mode is only for
  comparison.

How the unary and parallel modes draw on the strategy word is this design's
own choice.

## Lighter form without permutation

An area-reduced form drops the permutation. It makes up for the weaker mixing
by delivering a word only once every five iterations. `gciprng_core`,
`dut_controller` and `gci_test_platform` build it with `PERMUTE = 0,
OUT_EVERY = 5`. `rnd_o` is then the raw state, and `valid_o` rises on every
fifth step. A read of `OUT_LO` starts five iterations, and later reads wait
until they are done. The defaults (`1, 1`) give the main form.

## Other widths

The evaluated widths are 32 and 64 bits, but `gciprng_core` and
`gci_permutation` accept any N of 8, 16, 32, 64 or 128, one 8-bit lane per
byte. The shift field of the permutation scales as log2(N) - 1 bits. Only the
32- and 64-bit multipliers were chosen by statistical testing. The other widths
reuse 811 (below 64 bits, taken modulo 2^N) or 995 (128 bits); re-tune the
multiplier before relying on them. The DUT controller and the platform support
32 and 64 bits only, because their strategy sources and registers are sized for
those.

## Timing

* `gciprng_core`: the state register is its only storage. After `step_i` at
  edge t, `rnd_o` holds the new output and `valid_o` is high during the next
  cycle: latency 1, throughput 1 word per clock. `load_i` wins over `step_i`
  and produces no output.
* The critical path is the strategy generator, the lane XOR, the state
  register, then the permutation's variable shifter, multiplier and XOR.
  Register `rnd_o` if the permutation limits the clock; that adds one cycle of
  latency.
* With `CTRL.run` set, the platform makes one output per clock on the
  `rnd_o` port: 32 bits x 125 MHz = 4 Gb/s at the platform's 125 MHz clock.
  The same logic at about 217 MHz gives about 7 Gb/s, the order of rate
  reported for FPGA builds of this generator.

## The test platform

```
            serial                    AXI4-Lite
 host  <----------->  axil_uart  <--------------+
 (PC)                 (0x1000)                   |
                                          axil_interconnect <--- dccu (bus master)
                      dut_controller <-----------+
                      (0x0000)  --> rnd_o / rnd_valid_o (full rate)
```

The decoder command controller (`dccu`) is the only bus master. It polls the
UART status register. It assembles the received bytes into commands and
carries out the register access each command asks for. It sends the reply
back through the UART, waiting for the transmit buffer to be free before each
byte. One AXI transaction is in flight at a time, so the interconnect simply
decodes address bit 12 and merges the responses. The bus interface
`axil_if` asserts the AXI valid-hold rules, and the interconnect asserts that
two slaves never answer at once.

Every unit has an identifier register that can be read and rewritten. The
DCCU's own register sits at 0x2000 and is served inside the DCCU, without a bus
transaction: offset 0 is its identifier (resets to `"DCCU"`); other offsets
read as zero and a write to them is answered with `'E'`.

### Serial commands (8N1, 115200 baud at 125 MHz: `DIV = 1085`)

| command bytes | action | reply |
|---|---|---|
| `'W' a1 a0 d3 d2 d1 d0` | write word d to address a | `'K'`, or `'E'` on a slave error |
| `'R' a1 a0` | read address a | 4 data bytes, most significant first |
| `'S' n1 n0` | n reads of the generator output | 4 bytes per word |
| anything else | – | `'?'` |

### DUT controller registers (base 0x0000)

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | ID | RW | identifier, resets to `"GCI0"` |
| 0x04 | CTRL | RW | [1:0] mode (0 generalized, 1 unary, 2 parallel), [3:2] strategy (0 LFSR113, 1 Taus88, 2 {Taus88,LFSR113}, 3 xorshift128+), [4] run |
| 0x08 / 0x0C | SEED_LO / SEED_HI | RW | seed x^0 (HI for N = 64) |
| 0x10 | SSEED | RW | seed of the strategy generators |
| 0x14 | CMD | W | [0] load x^0 into the core, [1] reseed the strategy generators |
| 0x18 | OUT_LO | R | current output [31:0]; the read also advances the generator |
| 0x1C | OUT_HI | R | [63:32] of the word returned by the last OUT_LO read |
| 0x20 | COUNT | R | outputs produced since reset |

Only the selected strategy generator steps (both of them for source 2). A
32-bit source feeding a 64-bit core fills both halves. A 64-bit source feeding
a 32-bit core is cut to its low half.

### UART registers (base 0x1000)

| offset | name | meaning |
|---|---|---|
| 0x00 | ID | identifier, resets to `"UART"` |
| 0x04 | STATUS | [0] byte received, [1] transmit buffer free, [2] overrun |
| 0x08 | RXDATA | received byte; reading clears [0] and [2] |
| 0x0C | TXDATA | byte to send; `SLVERR` if the buffer is full |

The platform's units, their roles, the AXI4-Lite bus, the identifiers and the
strategy choices follow the original platform. The register maps, the serial
protocol, the baud rate, the polling scheme and the step-on-read rule are this
design's own. The original describes what the units do, not their interfaces.

## What is not here

* The Hamiltonian-cycle functions F1..F4. Only their construction is
  described, not their truth tables.
* The host software and the statistical batteries (NIST SP800-22, TestU01).
  The platform streams data for them; the `'S'` command or the `rnd_o` port
  supply it.
* Any FPGA- or ASIC-specific part: the RTL has no vendor primitives.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
reference models (`tb/gci_ref_pkg.sv`) write out the published recurrences,
the bit-level iteration and the permutation with literal constants,
independently of the RTL. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gci_pkg.sv tb/gci_ref_pkg.sv tb/tb_gci_test_platform.sv \
    --top-module tb_gci_test_platform -o sim && obj_dir/sim
```

Replace `tb_gci_test_platform` by any other testbench name.
`tb_gci_test_platform` runs the whole platform at its default sizes (32-bit
generator, real baud divisor) through the serial line only:

* it rewrites identifiers;
* for every mode and every strategy source, it seeds, reseeds and streams
  words, comparing each one with the model;
* it provokes the error and unknown-command replies;
* it checks one output per clock in free-running mode.

It counts each of these mechanisms and fails if one never happened. The run
takes about 8 million clock cycles, under 20 seconds. `tb_dccu` covers the
command controller at a fast baud rate, including a 258-word stream.
`tb_gciprng_core` and `tb_dut_controller` also cover the 64-bit generator and
the lighter form; `tb_gciprng_core` also runs 8-, 16- and 128-bit instances.

`tb_workload_stream` runs the evaluated configurations (32-bit with LFSR113
and with Taus88, 64-bit with {Taus88, LFSR113} and with xorshift128+, and the
lighter form) free-running for 10^6 output bits each, the length of one
SP800-22 sequence. It checks every word against the model and the word rate,
then applies three quick tests at the 1% level: the SP800-22 frequency and
runs tests and a chi-square test on byte values. As a control, the parallel
mode must fail the byte test. It takes about 15 seconds.

The testbenches check that each block computes what the reference models
compute. The quick tests above only catch gross defects; they do not show
statistical quality. For that, stream a few gigabytes through the `rnd_o`
port into TestU01 or a similar tool.
