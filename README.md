# Clock-phase noise plus voltage noise around an unmodified AES-128 core

A power side-channel attack recovers an AES key by correlating many measured
supply-current traces with a model of what the cipher computes at known
instants. This design makes that correlation harder without changing the
cipher. Two countermeasures sit beside a standard AES-128 core:

* **Clock-phase noise (CPN)** clocks the core with a *random clock*. The
  clock switches at random between copies of one clock that differ only in
  phase. Each switch delays the next rising edge, so the rounds of an
  encryption no longer happen at fixed times from one trace to the next.
* **Voltage noise (VN)** is a bank of shift registers that draws extra supply
  current. On every clock a random subset of rows toggles every stored bit,
  which hides the cipher's own switching current under current that does not
  depend on the data.

The two are *compounded*: VN runs on the same random clock as AES. The noise
bursts therefore land on the same edges as the AES rounds, and they move with
them. The combined arrangement protects better than either countermeasure
alone. Since neither touches the core, the AES block can be a verified
standard block.

```
              +-------------------------- clock_phase_noise ---------------------+
 sys_clk ---->| lfsr (8 bit) --prng[0]--+                                        |
              |                         v                                        |
 clk_ph[0] -->|--------------------> clk_mux (glitch-free) ----------------------|--> rand_clk
 clk_ph[1] -->|-------------------->                                             |       |
              +------------------------------------------------------------------+       |
                        +------------------------------------------------------------+---+
                        |                                                            |
                        v                                                            v
   start,key,pt --> aes128 (1 round/clock) --> ct, busy, done          voltage_noise
                                                                   lfsr (32 bit) -> row_en[15:0]
                                                                   16 x row of 32 x 32-bit SRLs
```

`clk_ph` comes from an on-chip clock manager (PLL/MMCM). It is not part of
this RTL; see "Clock inputs" below.

## The random clock

This is the part that needs the most care, because it is clock logic.

**Select source.** `clock_phase_noise` runs an 8-bit Fibonacci LFSR
(x^8+x^6+x^5+x^4+1) on the system clock. Low bits of its state are the
select inputs of a tree of 2:1 clock multiplexers:

| `NUM_PHASES` | tree                                                        | select bits |
|--------------|-------------------------------------------------------------|-------------|
| 2 (default)  | `mux(ph0, ph1; prng[0])`                                     | 1           |
| 3            | `mux(mux(ph0, ph1; prng[0]), ph2; prng[1])`                  | 2           |
| 4            | `mux(mux(ph0, ph1; prng[0]), mux(ph2, ph3; prng[0]); prng[1])` | 2           |

The LFSR steps on every system clock, so a select bit can change on every
cycle. That is faster than a switch completes.

**Switching element (`clk_mux`).** This takes the role of an FPGA global
clock buffer with glitch-free switching. Each input has two enable stages:

1. The A stage samples the request on the input's own rising edge.
2. The B stage copies the A stage on the input's falling edge.

The output is `(clk0 & B0) | (clk1 & B1)`. Each stage of one side can only
turn on while the other side's B stage is off. An enable only changes while
its own clock is low. This gives three properties:

* A high pulse in progress is never cut short, and a new input only starts
  with a whole high phase.
* Periods are only ever *stretched*, never shortened. After a switch, the
  next rising edge comes one to two periods later, depending on the phases.
* At most one input is ever enabled, even when `sel` toggles faster than a
  switch completes.

The interlock on the B stage matters. The textbook version interlocks only
the A stage, and that version fails here. With the select changing every
cycle, both A stages can fire inside one switching window. Both inputs then
pass through together, and a cascaded mux tree gives periods as short as
0.75 T. The interlock assumes that the two inputs never fall at the same
instant. That holds for any two distinct phases of one clock.

**What the random clock looks like.** These numbers come from the end-to-end
test at the default 2-phase build, with 0° and 90° clocks at 19.2 MHz:

* About half of all random-clock periods are stretched.
* Every encryption took longer than its nominal 10 periods.
* The slowest took 1.9 times the nominal time.

So the worst case is close to twice the fixed-clock encryption time.

**Select bits in the 4-phase tree.** Both mux levels take *adjacent* bits of
a shift-register LFSR, and `prng[1]` is simply `prng[0]` one clock later. For
the output to show phase 1, `prng[0]` must stay 1 for the two cycles the
inner mux needs, while `prng[1]` stays 0. That almost never happens, so
phase 1 is starved. The test of the 4-phase build therefore requires only
three of its four phases. To spread the phases evenly, take the select bits
from LFSR positions that are further apart.

## The noise array

`voltage_noise` holds `ROWS` rows and a 32-bit LFSR (x^32+x^22+x^2+x+1) that
steps every clock. Bit *i* of the LFSR enables row *i* for that clock. So:

* `ROWS` sets how much the noise varies from clock to clock.
* The size of a row sets how much current an enabled row draws.

Both row types hold `NUM_SRL` = 32 shift registers of `SRL_DEPTH` = 32 bits.
Each maps to one 32-bit shift-register LUT on an FPGA. They are chained from
Q to D, and all start from the alternating pattern `...1010`.

* **SRL row (`vn_srl_row`, default).** The last Q feeds the first D, which
  makes a 1024-bit ring. The ring length is even and the contents alternate,
  so each enabled shift flips *every* bit. An enabled row is always at full
  switching activity, and an idle row is silent.
* **SRL-LFSR row (`vn_srl_lfsr_row`).** The first D is the XOR of the outputs
  of shift registers 1, 2, 22 and 32. The row becomes a long LFSR with less
  regular activity. Every tap distance is a multiple of 32, so the row is 32
  interleaved 32-stage LFSRs. With the alternating start pattern, the
  interleaved sequences that start at all-zero stay at zero. Only about half
  of the bits ever switch, so this row type draws clearly less current than
  the SRL ring.

`row_q` brings out the last bit of each row. The rows therefore have a
fan-out and are not trimmed away by synthesis. On an FPGA you may also want
a keep attribute on them.

## AES-128 core

`aes128` is a plain iterative encryption core.

* `start` is sampled while the core is idle. That edge loads
  `pt ^ key` and the key. Each of the next 10 clocks performs one round.
* The round keys are expanded on the fly, using 4 S-boxes besides the 16 on
  the state.
* MixColumns is left out in round 10.
* `done` pulses for one clock, **10 clocks after the start edge**. `ct` stays
  valid until the next start.
* `busy` is high during the encryption. `start` is ignored while busy.
* Byte 0 is in bits 127:120, in the order used by the standard's test
  vectors.
* The S-box is a 256-entry constant ROM. `aes_pkg` computes it at
  elaboration from its definition (inverse in GF(2^8), then the affine map).

The countermeasures never change the number of clocks an encryption takes.
They only change how long those clocks are.

## Top level: `cpn_vn_aes_top`

| port        | dir | width        | meaning                                                    |
|-------------|-----|--------------|------------------------------------------------------------|
| `sys_clk`   | in  | 1            | system clock; clocks the CPN LFSR                          |
| `rst_n`     | in  | 1            | active-low reset, asynchronous assert                      |
| `clk_ph`    | in  | `NUM_PHASES` | equal-frequency clocks, 90° apart, from the clock manager  |
| `rand_clk`  | out | 1            | the random clock                                           |
| `start`     | in  | 1            | start an encryption (`rand_clk` domain)                    |
| `key`, `pt` | in  | 128          | key and plaintext (`rand_clk` domain)                      |
| `ct`        | out | 128          | ciphertext, valid from `done`                              |
| `busy`      | out | 1            | encryption in progress; usable as a capture trigger        |
| `done`      | out | 1            | one-clock pulse                                            |
| `cpn_sel`   | out | 8            | CPN LFSR state                                             |
| `vn_row_en` | out | `VN_ROWS`    | noise-row enables of the current clock                     |
| `vn_row_q`  | out | `VN_ROWS`    | last bit of each noise row                                 |

**Clocking rule.** Everything that talks to the AES core must run on
`rand_clk`, which is brought out for this purpose. That covers driving
`start`, `key` and `pt`, and sampling `ct` and `done`. A host on a fixed
clock would see inputs and outputs move relative to its own edges.

**Reset.** `rst_n` directly resets the CPN LFSR and the clock muxes. A
two-flop synchroniser releases the `rand_clk` domain (AES and VN) on clean
edges of the random clock. The noise rows reload their alternating pattern
through a synchronous reset. A real shift-register LUT would get that
pattern from its INIT value instead.

**Clock inputs.** In the main configuration, `clk_ph[0]` and `clk_ph[1]` are
two clock-manager outputs of the same frequency, the second shifted 90°.
For the older 4-phase variant, connect the system clock itself to
`clk_ph[0]` and 90°, 180° and 270° outputs to the others.

### Parameters

| parameter      | default  | meaning                                     |
|----------------|----------|---------------------------------------------|
| `NUM_PHASES`   | 2        | clock phases mixed by CPN (2, 3 or 4)       |
| `VN_ROWS`      | 16       | noise rows (1..32, one LFSR bit each)       |
| `VN_NUM_SRL`   | 32       | shift registers per row                     |
| `VN_SRL_DEPTH` | 32       | bits per shift register                     |
| `VN_ROW_TYPE`  | `VN_SRL` | `VN_SRL` (ring) or `VN_SRL_LFSR`            |

The defaults are the combined configuration that was evaluated in most
depth: 2 phases and 16 SRL rows, which is 16,384 noise flip-flops. Other
configurations that were evaluated are 8, 24 and 32 rows, SRL-LFSR rows, and
3 or 4 phases. All of them are reachable through these parameters.

## Departures and what is not included

* **Clock manager.** It is an analog vendor primitive, so it is not RTL.
  Its outputs are top-level inputs. `tb/mmcm_model.sv` is a
  simulation-only stand-in that produces phase-delayed copies of the
  reference clock. It does not model frequency multiplication.
* **Clock multiplexer.** The original build used the FPGA's glitch-free
  global clock buffer. `clk_mux` reproduces its behaviour: no truncated
  pulses, and periods only stretched. Its switching latency (one to two
  periods) is not that of any particular vendor buffer. For an FPGA build,
  replace `clk_mux` with the vendor primitive.
* **Host link.** The evaluation board's register interface for loading key
  and plaintext and reading the ciphertext is not reproduced. Plain
  `start/key/pt/ct/busy/done` ports take its place.
* **VN on a faster clock than AES.** A standalone variant ran VN at 2× or 4×
  the AES clock. The `voltage_noise` block accepts any clock, but no top
  level here wires it that way: the combined top feeds VN the random clock.
  `tb_vn_aes_multiclock` builds that arrangement around `aes128` and
  `voltage_noise`, using clocks related by 1x, 2x and 4x. At 32 rows, the 4x
  array switches about 66 rows per AES clock, against 17 at 1x.
* **Constant-latency CPN.** This was suggested as future work: a positive
  phase shift is always followed by a negative one, so an encryption always
  takes the same total time. It is not built. Its selection rule is only
  sketched, and it would shorten some periods, which the `clk_mux` here
  rules out by design.
* **Design-specific choices with no source value.** These are the LFSR
  polynomials and seeds, the SRL-LFSR taps, the bit order of the
  alternating pattern, the AES architecture and handshake, the reset scheme,
  and which LFSR bit enables which noise row (row *i* takes bit *i*).
* **Not modelled.** Power, voltage, and the side-channel attack itself. RTL
  simulation shows the switching activity (how many rows toggle, and when),
  not supply current.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench                | what it checks                                                                                   |
|--------------------------|--------------------------------------------------------------------------------------------------|
| `tb_lfsr`                | 8-bit period is exactly 255; 32-bit state matches a tap-by-tap model; hold; reset                 |
| `tb_vn_srl_row`          | full-size row against a ring model; all 1024 bits flip on each enabled clock, none when idle      |
| `tb_vn_srl_lfsr_row`     | full-size row against an LFSR model; activity below the ring                                      |
| `tb_voltage_noise`       | row enables match a model of the 32-bit LFSR; SRL rows toggle exactly when enabled                |
| `tb_clk_mux`             | edges only from the active input; no short phase or period; never both enabled; follows `sel`   |
| `tb_clock_phase_noise`   | 2/3/4-phase trees: edge source, no short period, source matches a settled select, switches occur |
| `tb_aes_sbox`            | all 256 entries against an exp/log-table S-box                                                    |
| `tb_aes128`              | standard test vectors, 60 random key/plaintext pairs vs. a reference model, 10-clock latency, start ignored while busy |
| `tb_cpn_vn_aes_top`      | default build end to end; see below                                                               |
| `tb_cpn_vn_aes_variants` | the top at 3 and 4 phases, with SRL-LFSR rows, and with 8 and 32 rows                             |
| `tb_vn_aes_multiclock`   | noise alone beside AES: 8/16/24/32-row arrays clocked at 1x, 2x and 4x the AES clock             |

`tb_cpn_vn_aes_top` runs the top with all defaults. It performs 122
encryptions on the random clock and checks each ciphertext against a
reference model (`tb/aes_ref_pkg.sv`, written separately from the RTL). It
also checks the latency, the period and source of every random-clock edge,
and the row toggling. It counts, and requires, these events: clock-source
switches, stretched periods, encryptions slowed by the random clock, noise
row toggles, changes in the number of enabled rows, and every row enabled at
least once. It runs in well under a second.

To simulate with Verilator 5 (the testbench delays are in nanoseconds):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/vn_pkg.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_cpn_vn_aes_top.sv --top-module tb_cpn_vn_aes_top
./obj_dir/Vtb_cpn_vn_aes_top
```

To run another testbench, replace the testbench file and the top-module
name. Testbenches that do not use AES can leave out `aes_ref_pkg.sv`. The
RTL is plain synthesizable SystemVerilog with two packages, `vn_pkg` (row
type, LFSR polynomials) and `aes_pkg` (AES arithmetic and S-box table).

## Files

`rtl/`:

* `cpn_vn_aes_top.sv`: top level.
* `clock_phase_noise.sv`, `clk_mux.sv`: random clock.
* `voltage_noise.sv`, `vn_srl_row.sv`, `vn_srl_lfsr_row.sv`: noise array.
* `lfsr.sv`: PRNG.
* `aes128.sv`, `aes_sbox.sv`, `aes_pkg.sv`: AES core.
* `rst_sync.sv`: reset synchroniser.
* `vn_pkg.sv`: shared types and constants.

`tb/`:

* one `tb_*.sv` testbench per block, plus `tb_cpn_vn_aes_variants.sv` and
  `tb_vn_aes_multiclock.sv`;
* `top_variant_harness.sv`: harness for the variant runs;
* `mmcm_model.sv`: clock-manager stand-in;
* `aes_ref_pkg.sv`: reference AES model.
