# PUF-signed adder/subtracter IP

An IP core that is handed through many design and fabrication steps can pick up a
hardware trojan: a few extra gates that stay silent until a rare input pattern
appears and then corrupt the result. This design ties a small arithmetic IP core to
a *physically unclonable function* (PUF) so that its behaviour can be checked per
device. A Butterfly PUF gives every chip an 8-bit fingerprint that is set by
manufacturing variation. That fingerprint seeds a signature register that compacts
every result the IP produces. A trusted reference run of the same operations,
seeded with the same fingerprint, predicts the signature. A trojan that changes
even one result makes the two disagree, and a reference signature from one chip
does not work for any other.

The IP core is a 4-bit registered adder/subtracter with the usual control pins of an
FPGA arithmetic core. A demonstration trojan can be compiled into it to show the
check catching it.

```
             a, b, add, c_in, ce, bypass, sclr, sset, sinit
                           |
                 +---------v----------+
                 | addsub_ip          |   optional hw_trojan between
                 |  adder -> [reg] ---+---> s, c_out   adder and register
                 +--------------------+        |
                                               | {c_out, s}, one clock after a write
  puf_start  +----------------+  signature  +--v-----------------+
  ---------->| puf_controller |------------>| signature_analyzer |--> resp_sig
             |  excite, sel   |  done=seed  |  8-bit MISR        |--> tamper
             +---+--------^---+             +--^-----------------+
          excite |        | puf_bit            | sa_check, golden
             +---v--------+---+
             | bf_puf_array   |  8 butterfly_cell models + read-out mux
             +----------------+
```

## Files

| File | What it is |
|------|------------|
| `rtl/puf_ip_pkg.sv` | shared constants (signature width, MISR polynomial) and the controller state type |
| `rtl/addsub_ip.sv` | the adder/subtracter core |
| `rtl/hw_trojan.sv` | the demonstration trojan (combinational trigger and payload) |
| `rtl/butterfly_cell.sv` | **behavioural model** of one Butterfly PUF cell |
| `rtl/bf_puf_array.sv` | eight cells and the read-out multiplexer (model, because of the cells) |
| `rtl/puf_controller.sv` | excite sequence and 8-bit signature register |
| `rtl/signature_analyzer.sv` | PUF-seeded MISR and tamper flag |
| `rtl/puf_ip_top.sv` | the whole design |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_puf_ip_top_full.sv` | one full operation of the top at its default parameters |
| `tb/tb_puf_metrics.sv` | uniqueness and reliability of the PUF over 32 simulated devices |

## The adder/subtracter core (`addsub_ip`)

A and B are `WIDTH` = 4 bits. `add` = 1 computes A + B + C_IN; `add` = 0 subtracts.
Borrow sense is active low, which makes subtraction the plain two's-complement
A + ~B + C_IN: C_IN = 1 means "no borrow in" and C_OUT = 1 means "no borrow out".
S and C_OUT are registered, so a result appears one clock after its operands.

The register has five ways to be written. When several are asserted together, this
order of priority decides:

| Priority | Condition | S gets | C_OUT gets |
|---|---|---|---|
| 1 | `sclr` | 0 | 0 |
| 2 | `sset` | all ones | 1 |
| 3 | `sinit` | `INIT_VALUE` (0) | 0 |
| 4 | `ce && bypass` | B | 0 |
| 5 | `ce` | A ± B | carry / no-borrow |
| - | otherwise | held | held |

In other words, clear beats set, the three synchronous controls work with CE low,
and bypass only acts when CE is high. These three rules are the core's configured
options. The rank of SINIT below SCLR and SSET, and the C_OUT values under
set/init/bypass, are this design's choice. `rst_n` is an asynchronous power-on reset
to `POR_VALUE` (0). It stands in for the flip-flop initial value that an FPGA core
would use.

`trojan_hit` reports the trojan's trigger, so a testbench can count how often it
fired. It is tied to 0 when `TROJAN_EN` = 0.

## The Butterfly PUF and how the signature is read

A butterfly cell is two latches wired in a loop: each latch's output drives the
other's input. Raising *excite* clears one latch and presets the other, so the loop
is held at a point where the two nodes disagree. When excite falls, the loop is
unstable and drops into one of its two stable states. Which one it picks depends on
tiny delay differences in the cross-coupling wires. Those differences are fixed when
the chip is made, and they differ from cell to cell and from chip to chip. The
result is one bit that repeats on the same cell and is random across cells.

That cannot be written as synthesizable logic, so `butterfly_cell` is a
simulation model:

* The **mismatch** is a signed number in [-128, 127]. It is a hash of the
  `DEVICE_SEED` and `CELL_INDEX` parameters, so each (chip, cell) pair has a fixed
  bias. To simulate another chip, change `DEVICE_SEED`.
* The **noise** is a per-cell pseudo-random value, uniform in [-`NOISE`, `NOISE`].
  It is drawn fresh on every release.
* On the falling edge of excite, the cell settles to `mismatch + noise >= 0`. While
  excite is high, the cell reads 0.

Cells with a mismatch close to zero sometimes settle the other way. Real PUFs lose
reliability the same way. `NOISE` = 8 (the default) flips roughly 2–3 % of bits
between reads. Set `NOISE` = 0 for exactly repeatable signatures in a testbench.

The PUF delivers one bit per clock, and the signature needs eight. A single cell
settles to the same value every time, so `bf_puf_array` holds eight cells on one
shared excite line. A multiplexer puts the cell selected by `sel` on `bit_out`.
`puf_controller` runs this sequence:

```
clock edge:   0      1   2   3   4     5      6 ... 12     13
state:      IDLE | EXCITE x4      | SETTLE | READ x8      | DONE
excite:       _  |‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_________________________________
sel:                                       | 0 1 2 ... 7  |
                                                            done pulse, sig_valid = 1
```

`start` is sampled at edge 0. Excite stays high for `EXCITE_CYCLES` = 4 clocks.
Then comes one settle clock, then eight reads: bit *i* of the signature comes from
cell *i*. `done` pulses, and `sig_valid` stays high with the signature, from edge
`EXCITE_CYCLES + 1 + SIG_WIDTH` = 13 onwards until the next `start`. A `start` that
arrives while the controller is busy is ignored. An assertion checks that no bit is
read while excite is high.

## Signature analysis (`signature_analyzer`)

This part is the design's own construction, not taken from the source. The source
says only that the PUF signature is used to analyse the IP's response.

The analyser is an 8-bit multiple-input signature register (MISR) in Galois form with
polynomial x^8 + x^6 + x^5 + x^4 + 1. On every enabled clock:

    sig <= (sig << 1) ^ (sig[7] ? 8'h71 : 0) ^ {3'b0, c_out, s}

In the top:

* `done` from the PUF controller loads the fresh device signature as the seed. This
  also clears `tamper`.
* A clock in which the IP register was written (`ce`, `sclr`, `sset` or `sinit` high)
  is followed by one compaction step of the new `{c_out, s}`. Compaction only runs
  while `sig_valid` is high.
* `sa_check` compares `resp_sig` with `golden`. A mismatch sets `tamper`, which
  stays set until the next PUF generation.

To use it, first read the chip's `signature`. Then run a known sequence of operations
on the chip and on a trusted model (`tb/tb_puf_ip_top.sv` contains one, in the
function `misr` and the reference adder). Seed the model with that signature, and
present the model's final value as `golden`. The same operations on another chip
give a different signature, because the seed differs.

## The demonstration trojan (`hw_trojan`)

The trojan is combinational and fires on one input event: A = 0xA, B = 0x5 in add
mode. It then inverts bit 0 of the sum before the sum reaches the output register.
For every other input, the core works correctly. This is why simple functional tests
rarely find such a trojan, while the signature check does. The trojan is compiled in
with `TROJAN_EN` = 1 on `addsub_ip` or `puf_ip_top`. Its trigger (`TRIG_A`,
`TRIG_B`) and payload are parameters. The specific pattern is this design's choice.

## Parameters of `puf_ip_top`

| Parameter | Default | Meaning |
|---|---|---|
| `WIDTH` | 4 | operand and result width |
| `SIG_WIDTH` | 8 | PUF cells, signature and MISR width |
| `EXCITE_CYCLES` | 4 | clocks with excite high |
| `DEVICE_SEED` | 1 | which simulated chip (model only) |
| `NOISE` | 8 | read-to-read noise of the cell model |
| `TROJAN_EN` | 0 | compile the demonstration trojan into the core |
| `INIT_VALUE` | 0 | value loaded by `sinit` |

The MISR polynomial in `puf_ip_pkg` is written for 8 bits. If you change
`SIG_WIDTH`, pass a suitable `POLY` to `signature_analyzer` and update the reference
in the testbenches.

## PUF quality

`tb_puf_metrics` builds four sets of eight simulated chips, each with a PUF and a
controller at the default noise. The sets use excite lengths of 2, 3, 4 and 5 clocks;
in the model the excite length does not change the outcome, as long as excite is high
for at least one clock. Every chip generates its signature 21 times. With
n = 8 bits, p = 8 chips and s = 20 repeat reads, the test computes:

* **uniqueness**: the mean pairwise Hamming distance between chips, as a percentage
  of n (ideal 50 %);
* **reliability**: 100 % minus the mean Hamming distance between a chip's first
  signature and its later ones (ideal 100 %).

A typical run gives 96.8–98.1 % reliability and 49–52 % uniqueness per set. Hardware
measurements published for this kind of design show 98.0–99.2 % and 48.1–49.2 %.
The model's noise level was chosen to land near them, so this test checks the model
and the read-out, not silicon.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To
build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/puf_ip_pkg.sv tb/tb_puf_ip_top.sv --top-module tb_puf_ip_top
./obj_dir/Vtb_puf_ip_top
```

* `tb_puf_ip_top` runs three copies of the design side by side on the same
  stimulus:
  * chip 5, clean;
  * chip 5 with the trojan;
  * chip 6, clean.

  It checks every result of the clean copy against an integer model and checks the
  PUF latency. It also checks that the same chip repeats its signature and a
  different chip does not. At the end, the clean copy must pass the signature check,
  the trojan copy must be flagged, and chip 6 must fail against chip 5's reference.
  It counts each mechanism it drives (excite, trojan trigger, corrupted result,
  bypass, SCLR, SSET, SINIT, CE hold, subtract, carry out, detection, re-seed) and
  fails if any of them never happened.
* `tb_puf_ip_top_full` runs one operation at the default parameters: it generates
  the signature, performs 64 operations and checks them, then checks the signature.
* The module testbenches cover the corner cases:
  * all 1024 operand combinations and 4000 random control cycles for the core;
  * all 512 trojan inputs;
  * the excite, latency and busy rules of the controller;
  * MISR arithmetic and sticky tamper.

All testbenches finish in well under a second.

## Departures and limits

* **The PUF is a model.** `butterfly_cell` and `bf_puf_array` simulate; they do not
  build a PUF. On an FPGA each cell has to be two cross-coupled latches with
  clear/preset, placed and routed symmetrically by hand. Synthesis of the model
  produces ordinary flip-flops clocked by excite, which is meaningless as a PUF.
* **Eight cells rather than one.** The PUF is described as giving one bit per clock
  pulse and being read for eight pulses. Here the eight bits come from eight cells
  read in turn, because one cell would give the same bit eight times.
* **Signature analysis is this design's construction:** the MISR, its polynomial,
  when it compacts, and the sticky tamper flag.
* **Not derived from a specification:** the trojan's trigger and payload, the excite
  length (4 clocks), the settle clock, the handshake, and the reset behaviour. These
  are reasonable choices where the source is silent.
* **Resource figures differ.** The published FPGA result reports 16 registers with
  or without the PUF. This RTL adds a signature register and the MISR, so its count
  is higher.
* **Not modelled:**
  * Comparison PUFs (ring-oscillator and arbiter) were only used as baselines and are
    not included.
  * Machine-learning attack results cannot be reproduced in RTL simulation.
  * Power figures cannot be reproduced in RTL simulation.
