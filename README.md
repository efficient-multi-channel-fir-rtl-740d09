# Multi-channel FIR filter bank with 18-bit multipliers and 32-bit precision

This is a filter bank for FPGAs that filters many input streams in parallel with
32-bit samples and 32-bit coefficients. Each channel uses only **one 18x18 hardware
multiplier and two block RAMs**. A 32x32 product is built from three 18x18 partial
products, so a filter of T taps takes 3·T clock cycles per sample. All channels
run in lock-step. One central controller (the *FIR control logic*) and one address
generator (the *address processing unit*) drive all of them, so adding a channel
adds a multiplier, two memories and an accumulator, and no new control logic.

Each channel's memories are split into four blocks. Up to four FIR stages can
therefore be cascaded on every input sample, for example an input-compensation
filter followed by low-pass stages. Each stage can also decimate, up to 8x in total.

The default configuration (`fir_filterbank`, no parameters) is:

| item | value |
|---|---|
| channels | 8 (`CHANNELS`) |
| sample / coefficient width | 32 bit, stored as two 18-bit words |
| memories per channel | sample memory and coefficient memory, 1024 x 18 each, true dual port |
| blocks per memory | 4 x 128 entries of 32 bit |
| cascaded stages | 1..4 (mode register), reset: 4 |
| taps per stage | 1..128, reset: 100 |
| cycles per input sample | 2 + Σ(3·T<sub>s</sub> + 3) + (stages − 1); 1217 for 4 x 100 taps |

At a 160 MHz clock and a 100 kHz sample rate there are 1600 cycles per sample.
That is enough for four cascaded 100-tap stages on every channel (1217 cycles).
At 100 MHz (1000 cycles per sample), up to three 100-tap stages fit (913 cycles).

## The three-product multiplication

The key trick is how each 32-bit value is stored as two 18-bit words:

* MSW = bits 31:16, sign-extended to 18 bits (signed, −32768..32767)
* LSW = bits 15:0, zero-extended to 18 bits (unsigned, 0..65535)

so x = MSW·2¹⁶ + LSW exactly, and both halves fit an 18-bit *signed* multiplier
operand. For a coefficient C and a sample S,

    C·S = C_M·S_M·2³² + (C_L·S_M + C_M·S_L)·2¹⁶ + C_L·S_L

Divided by 2³², the last term is below one unit per tap, so it is dropped. The MAC
unit computes, over all taps of a stage:

    acc = ((Σ C_L·S_M + Σ C_M·S_L) >>> 16) + Σ C_M·S_M      ≈ Σ C·S / 2³²

This takes three passes of T cycles each, in this order:

| pass | product | accumulator feedback on its first cycle | on the other cycles |
|---|---|---|---|
| 1 | C_LSW · S_MSW | 0 (restart) | acc |
| 2 | C_MSW · S_LSW | acc | acc |
| 3 | C_MSW · S_MSW | **acc >>> 16** | acc |

The two cross-product sums are added at full precision first. Only then are they
scaled down, once, before the MSW·MSW products are added. This keeps the
truncation error to about one unit per tap, far below the noise of a 32-bit
result. Both testbenches check that every result is within 2·(T+2) LSB of the
exact Σ C·S / 2³¹.

**Output format.** The 32-bit result written back and shown on `out_data` is
`sat32(acc << 1)`. Coefficients are therefore Q1.31 fractions (0x4000_0000 = 0.5),
and a result that does not fit in 32 bits saturates instead of wrapping. This
output scaling is a choice of this design (`OUT_SHIFT` in `fir_pkg`). Because of
the shift, results are always even. The accumulator is 48 bits wide, so 128 taps
of cross products cannot overflow it.

**Pipeline.** Operand addresses are issued in cycle t. The block RAMs deliver the
words in t+1 and the product register loads at the end of t+1. The accumulator
loads at the end of t+2, so the result is valid in t+3. The controller waits two
drain cycles after the last fetch before it writes the result back.

## Memory layout

Both memories of a channel use the same word addresses:

    word address [9:8] block (= stage)   [7:1] entry within block   [0] 0 = LSW, 1 = MSW

The coefficient memory holds stage s's coefficients at entries `{s, k}`,
k = 0..T<sub>s</sub>−1. Coefficient 0 is applied to the newest sample.

The sample memory holds one circular buffer per block. Block s holds the input of
stage s: the new input samples for block 0, and the results of stage s−1 for block
s ≥ 1. The top entries of block 0 are kept free as the *reserved output space*.
Every stage also writes its result there, at the entry `OUT[s]` from the address
memory (reset: entries 120..123). So at reset block 0's buffer is 120 entries long.

## Address memory and address generation (`apu`)

The address processing unit holds an *address memory* with four fields per block.
The host writes it, and the write-back updates `SWA`:

| field | meaning | reset |
|---|---|---|
| `AM_SWA` | sample write address: entry offset of the newest sample of the block | 0 |
| `AM_LEN` | circular-buffer length in entries (1..128) | 120 for block 0, else 128 |
| `AM_TAPS` | taps of the stage that filters this block (1..LEN) | 100 |
| `AM_OUT` | absolute entry of the stage's reserved output word pair | 120 + s |

For stage s, tap k reads sample entry `{s, (SWA[s] − k) mod LEN[s]}` and
coefficient entry `{s, k}`. Two counters produce these addresses. They are loaded
on the first tap of every pass, and the address is produced combinationally in
that same cycle. After that, every fetch steps the sample counter down (wrapping
inside the buffer) and the coefficient counter up. Address bit 0 comes from the
pass (coefficient/sample: 0/1, 1/0, 1/1).

## Processing one input sample (`fir_control`)

The controller is made of three state machines:

* **CASC STATE**: idle, or running stage `stage`. The number of stages is taken
  from the mode register.
* **FIR STATE**: the three passes (`F_LM`, `F_ML`, `F_MM`), then `F_DRAIN`.
* **WR STATE**: `W_INPUT`, `W_OUTPUT`, `W_NEXT`.

Sequence for one sample, accepted in an idle cycle with `in_valid`:

1. `W_INPUT`: the sample of every channel is written to block 0 at `SWA[0]`. It
   is a single cycle, because the LSW goes through port A and the MSW through port B.
2. For each stage s:
   * 3·T<sub>s</sub> fetch cycles, then 2 drain cycles.
   * `W_OUTPUT`: the result goes to the reserved output entry `OUT[s]`.
     `out_valid` pulses, and the write address `SWA[s]` of the block just
     filtered advances, subject to decimation (see below).
   * `W_NEXT` (all stages except the last): the result goes to block s+1 at
     `SWA[s+1]`. This is the newest sample for stage s+1, which starts in the next cycle.
3. The unit is idle again. `in_ready` rises in the cycle after the last `W_OUTPUT`.

A sample that arrives while the unit is busy is dropped, and `overrun` is raised
in that cycle.

## Decimation

Decimation does not change the sequence above. It only changes when a block's
write address advances. The mode register holds `dec_log2[b]` for each block b.
`SWA[b]` advances only on the last of every 2^dec_log2[b] input samples, counted
by a free-running sample counter. Until then, the previous stage keeps
overwriting the same entry of block b. The value written last in the period is the
real decimated sample, and the stage filters it before the address moves on.

Decimation ratios are therefore *cumulative* and given relative to the input rate.
For 2x per stage over stages 1..3 (8x in total), set
`dec_log2 = {3, 2, 1, 0}` (blocks 3, 2, 1, 0). Every stage still runs on every
input sample, so its intermediate results are computed and then overwritten.
`out_final` marks the results of the last stage that are real outputs. With 8x
decimation, that is one input sample in eight.

## Interface of `fir_filterbank`

All signals are synchronous to `clk`. `rst_n` is an active-low synchronous reset.
It resets the controller, the counters, the address memory and the mode register,
but not the memory contents. No memory is written while `rst_n` is low.

| signals | use |
|---|---|
| `in_valid`, `in_data[CH]`, `in_ready`, `overrun` | one sample per channel; taken when `in_valid && in_ready` |
| `out_valid`, `out_stage`, `out_final`, `out_data[CH]` | one result per stage and sample; `out_data` is valid while `out_valid` is high |
| `cw_en`, `cw_mask[CH]`, `cw_entry`, `cw_data` | write a 32-bit coefficient at entry `cw_entry` of the channels in `cw_mask`; only while `in_ready` (assertion) |
| `am_we`, `am_stage`, `am_field`, `am_data` | write one address-memory field |
| `mode_we`, `mode_wdata` | write the mode register `{dec_log2[3:0], last_stage}`; change it only while idle |
| `hr_ch`, `hr_coef`, `hr_addr`, `hr_data` | read an 18-bit word of one channel's sample (`hr_coef`=0) or coefficient memory; data one cycle later; valid while idle |

A typical host setup:

1. Load the coefficients of every stage at entries `s*128 + k`.
2. If needed, set `AM_TAPS`, `AM_LEN` and `AM_OUT` for each block.
3. Write the mode register.
4. Stream samples in.

The sample memories start at zero, like FPGA block RAM after configuration.
Shrinking a buffer or moving `SWA` later leaves old samples in place.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths, memory layout constants, command and control structs, word-split functions |
| `rtl/dp_ram.sv` | 1024 x 18 true dual-port RAM (read-first, port B wins a write collision) |
| `rtl/mac_unit.sv` | one channel: both memories, multiplier, accumulator, output saturation |
| `rtl/apu.sv` | address processing unit with the address memory |
| `rtl/fir_control.sv` | controller (CASC, FIR and WR state machines) and the mode register |
| `rtl/fir_filterbank.sv` | top: controller, address unit, `CHANNELS` MAC units, host ports |
| `tb/fir_ref_pkg.sv` | reference arithmetic (three-product formula, and exact value for the error bound) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_fir_filterbank_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For
example, for the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/tb_fir_filterbank.sv \
        --top-module tb_fir_filterbank
    ./obj_dir/Vtb_fir_filterbank

Replace the testbench name to run the others: `tb_dp_ram`, `tb_mac_unit`,
`tb_apu`, `tb_fir_control` and `tb_fir_filterbank_full`.

What each testbench covers:

* **`tb_mac_unit`** drives a MAC unit directly. It runs filters of 1..100 taps
  with random operands and checks the result in the exact cycle it becomes valid.
  It also checks the write-back and the host reads.
* **`tb_apu`** checks the address sequences, including buffer wrap-around, and
  the decimated advance of the write addresses.
* **`tb_fir_control`** compares the controller's command stream, cycle by cycle,
  with an independently built schedule.
* **`tb_fir_filterbank`** runs the whole design with 3 channels and short filters
  through these phases:
  * four stages;
  * a switch to three stages with 4x decimation;
  * four stages with 8x decimation;
  * a saturating stage.

  It checks every result bit for bit against a queue-based model of the block
  buffers. It also counts that cascading, buffer wrap, decimation, overrun, mode
  switch and saturation each happened at least once.
* **`tb_fir_filterbank_full`** uses the default size: 8 channels and four
  100-tap windowed-sinc low-pass stages with 8x decimation, over 320 samples. It
  checks every result and the 1217-cycle sample period. It then switches to a
  single 100-tap stage and checks its 305-cycle period.

## Resources

Each MAC unit maps to one 18x18 multiplier and two 18 Kbit block RAMs (the
`dp_ram` arrays). Beyond that, its logic is the product register, the 48-bit
accumulator with its feedback multiplexer, and the output saturation. The
controller and the address unit are shared by all channels. Their largest storage
is the 16-entry address memory. No timing closure has been done on this RTL.

## Departures and design choices

These points are not fixed by the architecture. They are choices made in this RTL:

* The channel count (8), the accumulator width (48), the output format
  (Q1.31 coefficients, saturation), the two-cycle drain and the exact pipeline
  registers.
* The address memory holds a buffer length and a tap count per block, and the
  buffers are circular. The reserved output space is the top 8 entries of block 0.
* Decimation is set per block as a power-of-two advance period, counted against
  a global sample counter.
* The host ports (coefficient write with a channel mask, address-memory and mode
  writes, a one-word read port) and the `out_valid`/`out_final` result strobes are
  this design's own interface. Coefficients can only be changed while the unit is idle.
* A stage always reads its own block (stage s reads block s). The memories can
  hold four different filters, but applying several filters *in parallel to the
  same input block* would need per-stage source-block addressing, which is not
  provided. Only the cascade and decimation addressing is implemented.
* The design has not been synthesised for a specific FPGA. Clock rate and
  resource figures are not verified.
