# TIVA: checksum-based integrity verification with a secret address permutation

An embedded device has to prove to a verifier that its memory image is
unmodified, but the software vendor does not want to hand the verifier the
image itself, which would expose the vendor's code. TIVA solves both problems
with one mechanism: a hardware permutation of word addresses.

* The vendor picks a secret permutation `pi_d` of the 1024 word indices of a
  4 KB image, burns it into the device, and gives the verifier only the
  *obfuscated* image `M_obf`, the words shuffled so that `M_obf[pi_d(i)] = M[i]`.
  Shuffling destroys the instruction order, so the verifier cannot rebuild the
  control flow of the code.
* For each check the verifier picks a fresh random permutation `pi_v` (a 39-bit
  challenge) and computes `sum_j sext(M_obf[j] ^ pi_v(j))` over its shuffled copy.
* The device walks its real image and computes
  `sum_i sext(M[i] ^ pi_v(pi_d(i)))`. Substituting `j = pi_d(i)` shows the two
  sums are equal, so an honest device matches the verifier without the
  verifier ever seeing `M` or `pi_d`. A modified image changes the sum. A new
  challenge every time defeats replay. An impostor without `pi_d` cannot
  produce the sum. The verifier also times the answer, so emulating the
  engine in software would be noticed.

This repository holds synthesizable SystemVerilog for the permutation unit,
the device-side checksum engine (XRPU), a hardware verifier, and a top level
that connects them. It also holds self-checking testbenches.

## The reconfigurable permutation unit (RPU)

The RPU (`rpu.sv`) is the core of the design. It maps a 10-bit index to a
10-bit index and is a bijection for every configuration. It is built from
blocks that are each reversible:

```
 a[0..4] -> LUT0 --+-- Exchanger(3,3) --> LUT2 --+                 +-> LUT4 -> p[0..4]
                   X                              Exchanger(5,5) --+
 a[5..9] -> LUT1 --+-- Exchanger(2,2) --> LUT3 --+                 +-> LUT5 -> p[5..9]
```

**Toffoli LUTs.** Each LUT (`lut5x5.sv`) has 5 inputs and 5 outputs. It holds
a *Toffoli(5,5)* function: one target line `t` is inverted when every line of
a control set `C` is 1 (`t` not in `C`). Such a function is its own inverse,
so it permutes the 32 input values. With 5 lines and control sets of size 2,
3 or 4 there are 30 + 20 + 5 = 55 such functions.

**Configuration store.** A generic LUT stores 64 rows. Each row is the full
truth table of one function: five 32-bit columns, 20 bytes. Rows 0..54 hold
the 55 functions and rows 55..63 repeat functions 0..8, so every 6-bit row
selector gives a bijection. A lookup selects a row with the 6-bit
*configuration selection*, then picks bit `a` out of each column with a
32-to-1 multiplexer. The functions are numbered by control-set size, then
control mask, then target bit (`toffoli_row` in `tiva_pkg.sv`).

**Exchangers.** An exchanger (`exchanger.sv`) swaps two groups of lines when
its configuration bit is 1 and passes them straight otherwise. The
Exchanger(3,3) and Exchanger(2,2) mix the two halves after the first column.
The Exchanger(5,5) swaps the halves as a whole before the last column.

**Configuration.** A challenge is therefore 6 x 6 row-select bits plus 3
exchanger bits, 39 bits in all (`rpu_cfg_t`). It is captured into the RPU's
configuration selection register before use. The path `a -> p` is
combinational: three LUT multiplexers and two exchanger multiplexers.

**Line numbering.** Address bit `n` travels on line `n` counted from the top
of the diagram. The split of lines into the second column follows the block
diagram of the published architecture. That diagram does not number the
lines, so this assignment is a reading of it. It affects which permutations
the unit can form, but not the fact that each one is a bijection. See
"Measured permutation quality" below.

## The secret permutation (`rpu_secret.sv`)

The device's `pi_d` needs only one configuration. So this block is the RPU
with one row per LUT: 6 x 160 bits of truth table (120 bytes) plus 3
exchanger bits. The vendor writes the six tables and the exchanger bits
through the `embed_*` port, then pulses `embed_lock`. Writes after the lock
are ignored. No port reads the tables back, and the block's output goes only
into the XRPU.

Here the secret sits in ordinary flip-flops, and reset clears the lock. A
product would use protected non-volatile storage.

## The device checksum engine (`xrpu.sv`)

The XRPU puts the two RPUs in series: `pi_d` first, then the generic RPU
loaded with the challenge `pi_v`. It sequences the whole walk in hardware:

```
for i in 0..1023:
    hash += sext64( MEM[start_addr + i] ^ zext32(pi_v(pi_d(i))) )
```

The 32-bit term is sign-extended into the 64-bit sum, as in the reference
PowerPC loop (a 32-bit add with carry into a 64-bit pair). Only `hash`
leaves the block. If the per-word permuted index were visible, `pi_d` could
be recovered from it.

Pipeline, one word per clock:

| stage | work |
|---|---|
| 0 | issue `mem_addr = start_addr + i`; compute `pi_d(i)` |
| 1 | register memory data (memory answers one clock after `mem_req`); compute `pi_v` |
| 2 | add the term to `hash` |

The XRPU part itself takes two clocks, one per RPU, which is the latency
the architecture budgets. From the clock that accepts `start` to the `done`
pulse is exactly 1024 + 3 = 1027 clocks.

After reset a `toffoli_table_loader` fills the generic RPU's six stores with
the 64-row Toffoli table, one row per clock. `ready` rises 64 clocks after
reset and stays high whenever no walk is running. `start` is accepted only
while `ready` is high, and an assertion checks this.

**Order of composition.** The device must apply `pi_d` before `pi_v`. That
is the only order for which its sum equals the verifier's sum over
`M_obf`, and it matches the published worked example. One formula in the
published description writes the composition the other way round. That
order would not verify.

## The verifier (`verifier.sv`)

The verifier can be software; this is a hardware version of it. For one
verification it:

1. Loads the challenge into its own generic RPU. It then reads `M_obf`
   through `obf_*` (one clock latency) and computes `ref_hash`.
   This takes 1024 + 2 clocks.
2. Waits for `dev_ready`, then sends the challenge and the device start
   address with a one-clock `chal_valid` pulse.
3. Counts clocks until the device's `resp_valid`. A device that raises
   `done` k clocks after the challenge gives `resp_cycles = k`. For the
   XRPU, k = 1027.
4. Sets `hash_ok`, `time_ok` (`resp_cycles <= t_max`) and
   `pass = hash_ok && time_ok`, and pulses `done`.

If no answer has come once `t_max` has passed, the verifier gives up and
reports a failure. The random source for challenges, and the expected time
`t_max`, come from outside.

## Top level (`tiva_top.sv`)

`tiva_top` connects the verifier to an XRPU through the challenge/response
link. The following are outside the top, and their ports are brought out:

* the device image memory (`dev_mem_*`, word address, read data one clock
  after the request);
* the verifier's obfuscated-image memory (`obf_*`);
* the vendor's embedding port (`embed_*`).

To use it:

1. Wait for `ver_ready`.
2. Embed and lock `pi_d`.
3. Pulse `ver_start` with a challenge, a start address and `t_max`.
4. Read the verdict when `ver_done` pulses.

One verification takes about 2 x 1024 clocks.

## Measured permutation quality

`rpu_obfuscation_tb` runs the RTL RPU with 4096 random configurations. For
each one it measures how many n-word runs of the original image survive as
contiguous runs in the shuffled image. OS_n is the percentage of runs that
were broken.

| | OS_5 | OS_6 | OS_7 | OS_8 | OS_9..OS_11 |
|---|---|---|---|---|---|
| this RTL, 4096 configurations | 96.7 | 97.9 | 98.8 | 99.5 | 100 |
| published, 2^20 configurations | 94.7 | 96.0 | 96.8 | 97.4 | 97.8 - 98.6 |

All configurations were bijective, and no mapping repeated. The published
work reports 0.3 % repeated mappings among 2^20 configurations, a sample far
larger than can be simulated here. The difference in OS_n comes from the
line assignment between the LUT columns. In this RTL, address bit 3 never
reaches output bit 3, so runs longer than 8 words never survive. The
published circuit evidently keeps more low-order lines in place.

## Departures and choices

* **Composition order:** `pi_v(pi_d(i))`, as explained above.
* **Walk:** a hardware sequencer at one word per clock. The published
  architecture allows microcode on the host processor; its PowerPC example
  needs 10 cycles per word.
* **Left to this design** (the architecture does not fix them): the
  start-address walk `start_addr + i`; word addressing with
  `MEM_AW = 30`; one-clock memory latency; the row-write ports; filling the
  tables from a generator after reset; the embedding port and its lock; the
  verifier's state machine and give-up rule; asynchronous active-low reset.
* **Not built:** the Fredkin-gate variant of the LUTs, which is an
  alternative only; the host processor; the memories; secure storage for
  `pi_d`.
* Area and delay figures for particular processes cannot be derived from
  RTL. For reference, each generic RPU here stores 6 x 64 x 160 bits
  (7.5 KB).

## Files

| file | contents |
|---|---|
| `rtl/tiva_pkg.sv` | sizes, `lut_row_t`, `rpu_cfg_t`, Toffoli table generator |
| `rtl/lut5x5.sv` | 64-row (or 1-row) 5x5 LUT |
| `rtl/exchanger.sv` | conditional swap |
| `rtl/rpu.sv` | permutation network |
| `rtl/rpu_secret.sv` | locked single-configuration RPU for `pi_d` |
| `rtl/toffoli_table_loader.sv` | fills the generic stores after reset |
| `rtl/xrpu.sv` | device checksum engine |
| `rtl/verifier.sv` | hardware verifier |
| `rtl/tiva_top.sv` | verifier + device |
| `tb/tiva_ref_pkg.sv` | independent reference model used by the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per block, `tiva_top_tb` end to end, `rpu_obfuscation_tb` for the quality measurements |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if it hangs. For example, to run the end-to-end
test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tiva_pkg.sv tb/tiva_ref_pkg.sv tb/tiva_top_tb.sv --top-module tiva_top_tb
./obj_dir/Vtiva_top_tb
```

`tiva_top_tb` plays the vendor (random `pi_d`, embedding, building
`M_obf`). It then runs honest verifications, including all-zero and all-one
exchanger settings, a rewrite attempt after the lock, a tampered word, a too
tight time limit, and an impostor device with another `pi_d`. It checks that
each of these happened at least once. It runs in well under a second.

Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/tiva_pkg.sv rtl/<module>.sv`.
The remaining warnings are unused package constants, and `rst_n` being used
both as an asynchronous reset and in the `disable iff` of the handshake
assertions.
