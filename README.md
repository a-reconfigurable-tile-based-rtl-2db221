# A shared FIR/FFT datapath for a dual-standard radio receiver

A receiver that handles both Bluetooth and HiperLAN/2 spends most of its
arithmetic on two kernels: FIR filtering (channel selection, decimation and
the matched filter on the Bluetooth side) and the 64-point FFT that
demodulates HiperLAN/2's OFDM symbols. Both reduce to "multiply, then add":
the transposed FIR tap is `w_k = h_k·x + w_(k-1)`, and the complex multiply
in a radix-2 butterfly is four multiplications followed by an addition or a
subtraction. This design builds one small array of identical
multiply-add tiles that runs either kernel. A central state machine switches
the array between the two kernels within a few clock cycles, and the FIR
state kept in the tiles survives an FFT run in between.

The RTL is synthesizable SystemVerilog. It includes the datapath, its
controller, the configuration logic and the on-chip memories. It does not
include the analog front end, the ADC or the down converter that fill the
input buffer. Their write port is a port of the top module.

## The system

```
 front end ──► input buffer ──┐                         ┌──► result RAM ◄── external read
                              ├─ data bus (2 complex) ─►│         ▲  │
                 result RAM ──┘                         │  tile   │  └─ (feeds FIR cascades
                 coef ROM ──── coefficient bus ────────►│  array ─┘     and FFT stages)
                                                         └──▲──────
 command ──► central controller ──► configuration unit ─────┘  one control word per tile per cycle
```

* **Input buffer** (`input_buffer`): 256 complex samples. It has one write
  port for the front end and two registered read ports.
* **Coefficient ROM** (`coef_rom`): 64 complex words. It holds 32 FFT
  twiddles and the unique coefficients of the two FIR filters.
* **Result RAM** (`result_ram`): 256 complex words. It holds filter outputs,
  FFT intermediate stages and FFT results. It has two write ports, two
  datapath read ports and one external read port.
* **Central controller** (`central_controller`): a state machine that
  carries out one command at a time. Each cycle it produces the state for
  the configuration unit, the memory addresses and delayed write strobes.
* **Configuration unit** (`config_unit`): combinational logic. It turns the
  controller state (operation, bank, step) into nine control words, one per
  tile. All of the algorithm mapping lives here.
* **Tile array** (`tile_array`): nine data-processing units (`dpu`).

Data is 16-bit two's complement. Coefficients and twiddles are Q1.15. A
product is truncated back to 16 bits (`(a*b) >>> 15`), and additions wrap.
The FFT does not scale between stages. A 64-point transform can grow a
component by up to 64×, so inputs should stay within about ±1/128 of full
scale per component. The testbench uses ±199 out of ±32768.

## The tile (DPU)

Each tile contains:

* a **local controller** (`dpu_local_ctrl`), the tile's control-word
  register;
* a 16-word **register file** (`dpu_regfile`) with two write ports;
* an **arithmetic unit** (`arith_unit`): a multiplier, an
  adder/subtractor and bypass multiplexers.

Every cycle the tile executes one control word (`dpu_cfg_t` in `sdr_pkg`).

* **Operands a, b, c** each come from any of these sources: data bus lanes
  0–3 (`a.re, a.im, b.re, b.im`), coefficient lanes 0–1 (ROM real and
  imaginary parts), the left or right neighbour, vertical link A or B, a
  register, or zero.
* **Multiplier stage**:
  * `MUL_BYPASS`: p = a
  * `MUL_LIVE`: p = a·b, and the product is kept
  * `MUL_HOLD`: p = the kept product, multiplier idle
  * `MUL_PIPE`: p = the kept product, while a·b becomes the new kept
    product. The multiplier and the adder then act as two pipeline stages.
* **Adder stage**: p, c+p, c−p or p−c.
* **Writes**:
  * The result always goes to the out register (when `en` is set).
  * It can also go to a register.
  * Independently, the *load path* copies any operand source into a
    register in the same cycle. The load path is used to load
    coefficients, to clear state, and to save a register before it is
    overwritten.
* **What the neighbours see** (`nb_out`): either the out register, or a
  register picked by the control word (a combinational read). This lets a
  FIR tile pass its *stored* partial sum to its neighbour in the same cycle
  in which it computes a new one.

Timing: the configuration unit's word is registered by the local
controller, so the tile executes it one cycle after the controller issued
it. This is also the cycle in which the registered memory reads arrive on
the buses.

## The array and its links

```
   T0 ⇄ T1 ⇄ T2 ⇄ T3            top row    (tiles 0..3)
   |  ╲ |  ╲  ...   |  ╲
   B0 ⇄ B1 ⇄ B2 ⇄ B3 ⇄ B4       bottom row (tiles 4..8)
```

Within a row, every tile reads both neighbours. The row ends read zero.
The vertical links are:

| tile | link A          | link B              | used by                               |
|------|-----------------|---------------------|---------------------------------------|
| Bj   | T min(j,3)      | T (j+2) mod 4       | FFT: B0,B1 read T0,T1; B2,B3 read T0,T1 (crossed) |
| Tj   | B(j+1)          | Bj                  | matched filter: T3 reads B4           |

The links from the top row to the bottom row carry the butterfly
differences to the multiplying tiles. The single upward hop, B4 → T3, closes
the matched-filter chain, which spans both rows.

## Mapping the FIR filters

Both Bluetooth filters have symmetric coefficients. A filter with 2F taps
uses the transposed form folded onto a chain of F tiles. Chain tile k owns
coefficient h_k (which equals h_(2F−1−k)) and two partial sums, lo_k and
hi_k. One input sample x takes two cycles:

| step     | chain tile k computes            | tile shows neighbours | multiplier |
|----------|----------------------------------|-----------------------|------------|
| forward  | lo_k ← h_k·x + lo_(k−1) (old)    | its old lo            | used, product kept |
| backward | hi_k ← p_k + hi_(k+1) (old)      | its old hi            | idle (kept product) |

* Tile 0 adds zero in the forward step.
* The last tile of the chain (the fold) closes the loop with its *own* old
  lo. It copies lo into the fold register `R_FOLD` through the load path in
  the same forward cycle that overwrites lo.
* The output y[n] = hi_0 sits in chain tile 0's out register after the
  backward step.
* Unrolled, the chain is the 2F-stage transposed filter
  lo_0 … lo_(F−1), hi_(F−1) … hi_0. By symmetry its output equals the
  direct form Σ h_k·x[n−k].
* Because every product is truncated before it is added, the result
  matches a direct-form model bit for bit.
* Skipping the multiplier in the backward step halves the multiplications.

**Halfband filter (`OP_HB`, 8 taps, F = 4)**

* The top row T0..T3 filters the real part (bus lane 0), and B0..B3 filters
  the imaginary part (lane 1), both at the same time.
* The forward step runs left to right; the backward step runs right to
  left.
* Cost: 2 cycles per complex sample. B4 is idle.
* There are two state banks, so two halfband stages of a decimation chain
  can share the coefficients and keep separate state.
* With `decim` set, only outputs of even-numbered samples are written.

**Matched filter (`OP_MF`, 18 taps, F = 9)**

* The chain is T0 → T1 → T2 → T3 → B4 → B3 → B2 → B1 → B0, and back.
* Steps 0–1 filter the real part and steps 2–3 the imaginary part, with
  separate state registers for each.
* Cost: 4 cycles per complex sample.
* The real output is held in the top level until the imaginary output is
  ready, and then both are written together.

Register map of every tile (`sdr_pkg`):

| register | contents |
|---|---|
| R0 | halfband coefficient |
| R1, R2 | halfband bank 0 lo/hi |
| R3, R4 | halfband bank 1 lo/hi |
| R5 | matched-filter coefficient |
| R6, R7 | matched filter, real part, lo/hi |
| R8, R9 | matched filter, imaginary part, lo/hi |
| R10 | fold register |

## Mapping the FFT butterfly

The FFT is a radix-2 decimation-in-frequency transform:
X_p ← a + b and X_q ← (a − b)·W. The array starts one butterfly per cycle.
All tiles keep the same control word for the whole FFT.

| tile | work | kind |
|---|---|---|
| T0, T1 | dr = ar − br, di = ai − bi | adder only |
| T2, T3 | ar + br, ai + bi (the X_p result) | adder only |
| B0 | dr·wr | multiplier only |
| B1 | B0 − di·wi = Re X_q | multiplier + subtractor, `MUL_PIPE` |
| B2 | dr·wi | multiplier only |
| B3 | B2 + di·wr = Im X_q | multiplier + adder, `MUL_PIPE` |
| B4 | nothing | idle |

B1 and B3 form their product one cycle and add it the next, so they line up
with B0 and B2.

If a butterfly's data is on the bus in cycle t, then:

* its sums are in T2/T3 at t+1;
* its twiddle must be on the coefficient bus at t+1;
* its rotated difference is in B1/B3 at t+3.

RAM write port 0 stores the sums. Port 1 stores the rotated difference two
cycles later.

The transform runs in 6 stages of 32 butterflies:

* Stage 0 reads the input buffer.
* The stages then alternate between RAM scratch areas 128–191 and 192–255.
* The last stage writes to bit-reversed addresses, so the spectrum arrives
  in natural order at `dst_base`.
* The controller leaves 4 idle cycles between stages, so that a stage's
  last results are in RAM before the next stage reads them.
* The twiddle of stage s, butterfly j, is W64^k with
  k = (j mod 2^(5−s))·2^s.

## Commands and timing

A command (`cmd_t`) is offered with `cmd_valid` and taken when `cmd_ready`
is high. `done` pulses when its results are in RAM.

| `op` | does | cycles from hand-over to `done` |
|---|---|---|
| `OP_LOAD` | load the 4 + 9 coefficients from ROM into the tiles, clear all filter state | 17 + 5 |
| `OP_HB` | halfband filter over `count` samples (`bank`, `decim`) | 2·count + 5 |
| `OP_MF` | matched filter over `count` samples | 4·count + 5 |
| `OP_FFT` | 64-point FFT of the 64 samples at `src_base` into `dst_base` | 192 + 5·4 + 5 = 217 |

* `count = 0` means 256 samples.
* FIR commands read the input buffer, or the RAM when `src_ram` is set. The
  RAM source lets the matched filter run on the halfband output.
* The FFT always reads the input buffer.
* The next command can start 1 cycle after `done`. Switching between the
  standards therefore costs about six cycles, and no state is reloaded.
* `dst_base` must not overlap the FFT scratch areas while an FFT runs.

Cycle budget for the dual-standard receiver:

* Bluetooth: two halfband stages at 20 and 10 Msample/s and the matched
  filter at 5 Msample/s need 40 + 20 + 20 = 80 Mcycles/s, plus the
  per-command overhead. Processed in blocks of 256 input samples (the most
  one command takes), the chain needs 1039 cycles per 12.8 µs, or
  81.1 MHz. The 5 cycles per command are what lifts it above 80 MHz.
* HiperLAN/2: one FFT per 4 µs OFDM symbol needs about 54 Mcycles/s
  (217 cycles of the 320 available at 80 MHz).

## What was assumed

Several parts of the design are fixed here rather than derived:

* **Tile count.** The architecture has nine tiles (4 + 5), the number the
  FIR and FFT mappings need.
* **Links and buses.**
  * Which tiles the vertical links join is this design's choice.
  * The B4 → T3 upward link is added so that the 18-tap filter can run on
    all nine tiles.
  * The data bus carries two complex words per cycle to sustain one
    butterfly per cycle.
* **Number format.** The word width, the Q1.15 format, truncation and the
  absence of FFT scaling are choices, not derived requirements.
* **Filter coefficients.** The coefficient values are examples:
  * an 8-tap Hamming-windowed lowpass, cut-off at a quarter of the sample
    rate, unit DC gain: h0..h3 = −169, −750, 3170, 14133;
  * an 18-tap Gaussian, exp(−((n−8.5)/3)²/2) normalised to unit DC gain:
    m0..m8 = 79, 192, 418, 814, 1418, 2212, 3087, 3855, 4309.

  Replace them in `coef_rom` (`HB_U`, `MF_U`) and in the testbenches'
  constants. The twiddles are cos(2πk/64) − j·sin(2πk/64), rounded to
  Q1.15 with +1.0 clamped to 32767. `coef_rom` computes them at
  elaboration, with a Taylor series, so the ROM needs no image file.
* **Control logic.** The command set, the memory sizes and the stage gaps
  are this design's. So are the local controller's role (a control-word
  register that inserts no-operations) and the pipelining of B1/B3.
* **Decimation.** Decimation keeps every second output. The transposed
  filter still processes every input sample, so it does not save cycles.
* **Butterfly count.** The full 64-point FFT executes 6 × 32 = 192
  butterflies (32 per stage).
* **Status signals.** The tiles report `busy`, which only feeds the top's
  `busy` output. The controller never waits on the datapath.
* **Not built.** Dedicated single-standard variants of the array (Bluetooth
  only, or HiperLAN/2 only) are not part of this RTL.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_sdr_top` runs the whole engine at its default sizes:
  1. coefficient load;
  2. halfband filter;
  3. matched filter on the halfband output read back from the RAM;
  4. 64-point FFT;
  5. halfband filter again, decimating, on the continuing stream (its
     state must survive the FFT);
  6. the second halfband bank.

  It compares every output word with fixed-point models of the direct-form
  FIR and the DIF FFT. It also compares the FFT with a floating-point DFT.
  It checks the cycle counts in the table above.
  It counts every mechanism and fails if one never happens. The counted
  mechanisms are the switches between standards, the cascade through the
  RAM, decimation, both state banks, and the three ways a tile uses its
  arithmetic unit: adder bypassed, multiplier bypassed, and held product.
* The block testbenches check:
  * every arithmetic mode;
  * register-file port priority;
  * every link of the array;
  * a pipelined butterfly stream through the array;
  * every control word the configuration unit emits;
  * the controller's full address and write schedule;
  * the memories' read-during-write behaviour;
  * every ROM word against `$cos`/`$sin`.
* The RTL also carries run-time assertions, active only outside reset, that
  every simulation evaluates when built with `--assert`:
  * a taken command is running on the next clock;
  * `done` follows a running command and leaves the engine idle;
  * a middle FFT stage never writes into the region it is reading;
  * the two RAM write ports never hit the same word in one cycle.

Two workload testbenches run the engine the way each standard uses it:

* `tb_bluetooth_chain` runs 256 samples through both decimating halfband
  stages (20 → 10 → 5 Msample/s) and then the matched filter. It checks
  every word against the reference chain and checks the cycle count.
* `tb_hiperlan_fft` runs four 64-point FFTs back to back. One input is a
  pure tone, whose energy must land in the right bin. It checks every bin
  against the fixed-point model and the exact DFT, and checks that each
  transform fits a 4 µs symbol at 80 MHz.

They share reference models in `tb/tb_ref_pkg.sv`. Add that file (after
`rtl/sdr_pkg.sv`) and `-Itb` when you build them.

```
verilator --binary --timing --assert -Irtl rtl/sdr_pkg.sv tb/tb_sdr_top.sv \
          --top-module tb_sdr_top -o tb_sdr_top
./obj_dir/tb_sdr_top
```

The same command works for any other testbench: replace both names. The
end-to-end test finishes in well under a second.

## Files

| file | module |
|---|---|
| `rtl/sdr_pkg.sv` | shared types: control word, operand sources, commands, register map, ROM map |
| `rtl/sdr_top.sv` | top level: memories, controller, configuration unit, array, write-back multiplexers |
| `rtl/central_controller.sv` | command state machine, addressing, write scheduling |
| `rtl/config_unit.sv` | algorithm mapping: controller state → nine control words |
| `rtl/tile_array.sv` | nine tiles and their links |
| `rtl/dpu.sv`, `rtl/dpu_local_ctrl.sv`, `rtl/dpu_regfile.sv`, `rtl/arith_unit.sv` | one tile |
| `rtl/input_buffer.sv`, `rtl/result_ram.sv`, `rtl/coef_rom.sv` | memories |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_bluetooth_chain.sv`, `tb/tb_hiperlan_fft.sv`, `tb/tb_ref_pkg.sv` | workload testbenches and their reference models |
