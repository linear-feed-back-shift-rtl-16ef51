# SRAM-based LFSR random sequence generator

A linear feedback shift register (LFSR) gives one pseudo-random bit per clock
from very little logic. However, the length of its sequence is tied to its
length: an n-stage register repeats after 2^n - 1 clocks. This generator
gets a longer sequence, and eight parallel bit streams, from a small memory
and two short LFSRs. A table of 8-bit words is written into two 64-word
SRAM banks. Each bank is then read at addresses stepped by its own LFSR, and
the two read words are XORed. Because the two address sequences have
different periods (63 and 65,535), the pair of addresses, and with it the
output word, repeats only after lcm(63, 65535) = **1,376,235 clocks**. A new
8-bit word `mum` comes out every clock.

Next to the SRAM generator, the top also holds plain LFSR generators of 8,
10, 16 and 32 stages. Each gives its whole state as a new word every clock.

## Block diagram

```
            din1 ─┐                         ┌─> dout11 ─┐
                  v                         │           │
   ┌────────┐ addr1 ┌──────────────────────┐│           v
   │ LFSR 6 ├──────>│ bank 1: 64 x 8       ├┘        ┌─────┐
   └────────┘       │   64:1 read mux, reg │         │ XOR ├──> mum[7:0]
   ┌────────┐ addr2 ├──────────────────────┤         └─────┘
   │ LFSR 16├──────>│ bank 2: 64 x 8       ├┐           ^
   └──┬──┬──┘ [5:0] │   64:1 read mux, reg ││           │
      │  │          └──────────────────────┘└─> dout22 ─┘
      │  └─> word16        ^   ^ we
      └────> prbs    din2 ─┘

   LFSR 8 ─> word8     LFSR 10 ─> word10     LFSR 32 ─> word32
```

All LFSRs step every clock and load their seeds while `rst` is high.

## Files

| file | module | role |
|---|---|---|
| `rtl/lfsr_pkg.sv` | package | SRAM sizes, table of maximal-length tap masks `max_taps(n)` |
| `rtl/dff.sv` | `dff` | D flip-flop with enable, one per LFSR stage |
| `rtl/lfsr_shift_reg.sv` | `lfsr_shift_reg` | right-shifting register of `dff`s with seed load |
| `rtl/lfsr_feedback.sv` | `lfsr_feedback` | XOR of the tapped stages |
| `rtl/lfsr.sv` | `lfsr` | the LFSR: shift register plus feedback |
| `rtl/mp_sram.sv` | `mp_sram` | two 64 x 8 banks, write-first, registered reads |
| `rtl/xor_combiner.sv` | `xor_combiner` | `mum = dout11 ^ dout22` |
| `rtl/sram_rng.sv` | `sram_rng` | top level |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.

## The LFSR

The register shifts **right**. Stage 0, the least significant bit, is the
serial output, and the new most significant stage is the XOR of the tapped
stages (a Fibonacci LFSR). The register is built as `WIDTH` instances of
`dff`, fed by `lfsr_shift_reg`. The XOR lives in `lfsr_feedback`.

Tap masks come from `lfsr_pkg::max_taps(n)`, for n = 2 to 32. For a
primitive polynomial with terms x^t, where tap t counts from 1 to n, stage
`n - t` is XORed. The widths this design uses are:

| stages | polynomial | mask | period |
|---|---|---|---|
| 6  | x^6+x^5+1 | `6'h03` | 63 |
| 8  | x^8+x^6+x^5+x^4+1 | `8'h1D` | 255 |
| 10 | x^10+x^7+1 | `10'h009` | 1023 |
| 16 | x^16+x^15+x^13+x^4+1 | `16'h100B` | 65535 |
| 32 | x^32+x^22+x^2+x+1 | `32'hC000_0401` | 2^32 - 1 |

In the 8-stage LFSR, for example, the next state is
`{s[0]^s[2]^s[3]^s[4], s[7:1]}`.

The all-zero state locks an LFSR up. A seed of zero is therefore replaced by
1 when it is loaded. `load` takes priority over `en`. Both act on the next
rising edge.

## The SRAM banks and their timing

`mp_sram` holds two independent banks of 64 words of 8 bits each. The two
banks share one write enable `we`. Each bank has one address, used for both
writing and reading. Reads are registered, so a word appears one clock
after its address. On each rising edge:

* `we = 1`: `bank1[addr1] <= din1`, `bank2[addr2] <= din2`, and the read
  registers take the words being written (write-first). So `dout11`/`dout22`
  echo `din1`/`din2` one clock later.
* `we = 0`: `dout11 <= bank1[addr1]`, `dout22 <= bank2[addr2]`.

The memory has no reset, like an SRAM. The read registers and the XOR make
up all the logic outside the two arrays. There are 128 stored words plus 2
output registers, 1040 bits in all.

## The top, `sram_rng`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high: all LFSRs load their seeds and do not step |
| `we` | in | 1 | write `din1`/`din2` at the current addresses |
| `din1`, `din2` | in | 8 | words for bank 1 and bank 2 |
| `dout11`, `dout22` | out | 8 | registered read words of bank 1 and bank 2 |
| `mum` | out | 8 | random word, `dout11 ^ dout22`, combinational from the registers |
| `prbs` | out | 1 | serial bit of the 16-stage LFSR |
| `word16`, `word8`, `word10`, `word32` | out | 16, 8, 10, 32 | LFSR state words |

Parameters: `DEPTH = 64` and `WIDTH = 8` (SRAM); `A1_BITS = 6` and
`A2_BITS = 16` (address LFSR lengths); and the seeds `SEED1 = 1`,
`SEED2 = 16'hACE1`, `SEED8 = 1`, `SEED10 = 1` and `SEED32 = 1`.

Bank 1 is addressed by the 6-stage LFSR. Bank 2 is addressed by the low 6
bits of the 16-stage LFSR.

**Using it:**

1. Hold `rst` for one clock.
2. Hold `we` high while feeding words on `din1`/`din2`. The addresses step
   on their own, so keep writing until every address has been visited.
   From the default seeds this takes 345 clocks.
3. Drop `we`. From then on `mum` is a new 8-bit word every clock.

The 6-stage LFSR never produces zero, so **bank 1 word 0 is never used**.
Bank 2 reaches all 64 addresses.

**Throughput:** 8 bits per clock from `mum`. An n-stage LFSR gives n bits per
clock on its state word. Read latency from address to `dout`/`mum` is one
clock.

**Period:** `mum` repeats after 1,376,235 clocks. This holds only if the
banks are not rewritten, and a given table can have a shorter period by
accident (for example, a table of all-equal words). Each bit of `mum` is one
of eight parallel binary sequences. `mum` is a pseudo-random sequence
derived from the table and from linear address sequences, and it is not
cryptographically strong.

## What is specified and what is chosen here

These points follow the published design description:

* The right-shifting LFSR, with the LSB as output, XOR feedback into the
  left-most stage and period 2^n - 1.
* The LFSR built from repeated D flip-flops.
* LFSR widths of 8, 10, 16 and 32.
* Two 64 x 8 banks with 64-to-1 read multiplexers and 8-bit output
  registers, 1040 flip-flops in all.
* An 8-bit XOR forming `mum` from `dout11` and `dout22`.
* The port names `clk`, `we`, `din1`, `din2`, `dout11`, `dout22` and `mum`.
* One 8-bit word per clock.

These points are this implementation's own:

* The LFSRs generate the SRAM addresses.
* The address LFSR lengths of 6 and 16, and so the 1,376,235-clock period.
* The tap polynomials.
* The seeds, and the synchronous reset that loads them.
* A single address per bank, with write-first behaviour.
* The clock enable on `dff`.
* Replacing a zero seed with 1.
* Housing the plain 8/10/16/32-stage generators in the same top.

The description also mentions an OR gate in the LFSR. No OR gate is used:
one in the feedback would destroy the linear, maximal-length sequence.
Comparison designs (leap-forward and de Bruijn LFSRs, and others) are not
included.

## Verification

| testbench | what it checks |
|---|---|
| `tb_dff` | q follows d only when enabled |
| `tb_lfsr_feedback` | feedback equals the polynomial's XOR for 16 and 8 stages |
| `tb_lfsr_shift_reg` | shift, hold and load against a model |
| `tb_lfsr` | period exactly 2^n - 1, and the zero state never reached, for every width 2 to 24; the 16- and 32-stage bit recurrences; enable, reload and zero seed |
| `tb_mp_sram` | random writes and reads against a reference memory |
| `tb_xor_combiner` | XOR of word pairs and of random words |
| `tb_sram_rng` | the whole design at its default parameters (see below) |

`tb_sram_rng` runs the top at its default parameters:

* It resets, fills both banks and reads for the full period.
* Every output is compared with an independent model on every clock.
* It checks that `mum` repeats after 1,376,235 clocks and not after 63 or
  65,535.
* It requires every mechanism to occur at least once: seed load, write,
  read, each LFSR's return to its seed, and the full period.

The tap masks for 25 to 32 stages are standard primitive polynomials, but
their maximal period has not been confirmed by simulation. For the 32-stage
LFSR only its recurrence is checked, over 20,000 clocks.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/lfsr_pkg.sv \
    tb/tb_sram_rng.sv --top-module tb_sram_rng
./obj_dir/Vtb_sram_rng
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. The
longest one, `tb_sram_rng`, runs about 1.4 million clocks in a few seconds.
