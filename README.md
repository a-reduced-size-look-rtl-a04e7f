# Quarter-wave sine synthesizer with BASK and OOK modulators

A digital transmitter on an FPGA needs a carrier, and storing a whole period of
a sine in a table is the usual way to make one. The carrier here comes from a
table that holds only **the first quarter of the period: 64 of the 256
samples**. The other three quarters come from the symmetry of the sine: a
mirrored read order, a sign flip, or both. The carrier then drives two of
the simplest digital modulators:

* **Binary ASK (BASK):** full carrier for message bit 1, half-amplitude carrier for bit 0.
* **On-off keying (OOK):** full carrier for bit 1, zero for bit 0.

The method, the block structure and the widths (8-bit phase, 64-entry
table, 16-bit samples) follow the paper *A Reduced Size Look Up Table for
Sinusoidal Wave Generation in Digital Modulators Applications*. The points
where this RTL makes its own choices are listed below.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) with no vendor IP.
The table is computed at elaboration time from a formula, so no data file is
needed.

## Block diagram

```
         phase_inc                                   +--------------------+
            |                                        |  amplitude_halver  |-- S0 --+
   +--------v---------+   bits 7:6   +-------------+ |  (>>> 1)           |        |
   | phase_accumulator|------------->|             | +---------^----------+   +----v-----+
   |  8-bit, +inc/clk |   bits 5:0   | phase_adjust|           |              | bask_mux |--> bask[15:0]
   +------------------+------------->|  mirror/sign|   +-------+--+  S1 ----->|          |    pmod_je = bask[15:8]
                                     +--+-------+--+   |  output  |--+       +----^-----+
                                addr[5:0]   negate     | register |  |            |
                                     |        |        +----^-----+  |       +----+-----+
                             +-------v------+ |             |        +------>| ook_mux  |--> ook[15:0]
                             |quarter_sine_ | +--> +/- -----+          0 --->|          |
                             |lut  64 x 16  |------^                         +----^-----+
                             +--------------+                                     |
   message_counter -- bit MSG_BIT -- 1-clock delay ----------------------- message (select)
```

`sine_dds` holds the accumulator, phase adjustment, table, sign correction
and output register. `ask_ook_modulator_top` adds the halver, both selectors
and the message counter.

## Rebuilding the period from one quarter

The 8-bit phase `p` counts 256 samples per period. Bits 7:6 name the
quarter, and bits 5:0 are the offset `k` within it:

| phase     | quarter | sample          |
|-----------|---------|-----------------|
| 0 – 63    | 1       | `+T[k]`         |
| 64 – 127  | 2       | `+T[63 − k]`    |
| 128 – 191 | 3       | `−T[k]`         |
| 192 – 255 | 4       | `−T[63 − k]`    |

`63 − k` is the bitwise complement of `k`, so the mirror costs six
inverters, selected by phase bit 6. Phase bit 7 selects the negation.

Table entry `k` is sample `k` of a 256-sample period:

    T[k] = round(10000 · sin(2π·k / 256)),   k = 0 … 63

This gives `T[0] = 0`, `T[32] = 7071` and `T[63] = 9997`. The peak scale
10000 fits easily in the 16-bit signed sample.

**The seams are not a perfect sine, and this is easy to miss.** The table
holds samples 0…63 of a 256-point sine. Reading it backwards in quarter 2
repeats entry 63 at phase 64, and repeats entry 0 at phase 127. The same
happens in the negative half. The result:

* the peak value 9997 appears twice in a row (phases 63/64 and 191/192);
* zero appears twice in a row (phases 127/128 and 255/0);
* the wave reaches −9997 and +9997 but never ±10000;
* each half period is 128 samples, so the frequency is exact. Within a
  quarter, the waveform sits up to one sample away from an ideal sine.

This is the intended construction: quarter 2 is the first quarter played
backwards, and the negative half is the negated positive half. The testbench
reference model uses exactly this construction. To get a seamless sine,
store half-sample-offset values `sin(2π·(k + ½)/256)` in `quarter_sine_lut`.
That is a change to the formula only, and this design does not make it.

## Carrier timing and frequency

* `phase_accumulator` adds `phase_inc` on every rising edge, modulo 256.
  The carrier frequency is `f_clk · phase_inc / 256`. The top ties
  `phase_inc` to the parameter `PHASE_INC` (default 1: 256 clocks per period).
* Phase adjustment, the table read and the sign correction are
  combinational. The 16-bit sample is registered, so `sine` lags `phase` by
  one clock.
* The message bit is registered once more, so that it changes on the same
  edge as the carrier sample. `bask`, `ook` and `pmod_je` come from those
  registers through one level of selection logic.
* Reset is synchronous and active low (`rst_n`). It clears the phase, the
  sample register and the message counter. Just after reset every output is 0.

## The modulators

* **`amplitude_halver`:** an arithmetic shift right by one bit. The sign is
  kept, and odd negative values round down (−9997 → −4999). So the message-0
  BASK wave peaks at +4998 and −4999.
* **`bask_mux`:** `bask = message ? S1 : S0`, where S1 is the carrier and S0
  the halved carrier.
* **`ook_mux`:** `ook = message ? S1 : 0`. This is the BASK selector with
  the S0 input grounded.
* **`message_counter`:** a free-running counter on the system clock. Its bit
  `MSG_BIT` (default 10) is the test message, so each bit lasts 1024 clocks.
  At `PHASE_INC = 1` that is four carrier periods. With both defaults, each
  message change falls on a carrier zero. Other settings can change the
  message mid-period, giving a step in the output.
* **`pmod_je`:** the eight most significant bits of `bask`, for an 8-pin
  board connector.

Both modulators share one carrier generator: one accumulator and one table.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `dds_pkg` | `PHASE_W` | 8 | phase bits (256 samples/period) |
| `dds_pkg` | `ADDR_W` | 6 | table address bits (64 entries) |
| `dds_pkg` | `SAMPLE_W` | 16 | carrier and output width |
| `dds_pkg` | `LUT_AMPLITUDE` | 10000 | table peak scale |
| `ask_ook_modulator_top` | `PHASE_INC` | 1 | phase step per clock |
| `ask_ook_modulator_top` | `MSG_BIT` | 10 | counter bit used as message |

`sine_dds` and `quarter_sine_lut` take `PHASE_W`, `SAMPLE_W` and `AMPLITUDE`
as parameters. The table address width is always `PHASE_W − 2`. An assertion
in `quarter_sine_lut` rejects an amplitude that does not fit `SAMPLE_W`.

## Where this design makes its own choices

These points are not fixed by the method. Each one is a choice made here:

* the table amplitude 10000 and round-to-nearest quantisation;
* a constant, combinationally read table (a ROM). On an FPGA this maps to
  LUT logic or distributed memory, not to a block RAM;
* the phase increment as an input or parameter, the registered carrier
  output and the one-clock message delay;
* synchronous active-low reset, and the message counter's bit choice;
* OOK sends the full carrier for bit 1. Halving it, so that OOK has the same
  envelope as the message-0 level of BASK, would mean feeding `s0` instead
  of `carrier` to `ook_mux`;
* the top brings out `carrier`, `message`, the full 16-bit `bask` and `ook`,
  and `rst_n`, for observation. A board build that uses only `clk` and the
  8-pin `pmod_je` needs 9 pins.

Resource use: coarse synthesis of the top gives 36 flip-flop bits. These are
8 of phase, 16 of sample register, 11 of counter and 1 of message delay. The
table is 64 × 16 = 1024 constant bits. Drop the output register and use a
shorter counter for a smaller build.

Not included: board pin constraints, the DAC or RF stage that would follow
the digital output, and the ARM processor side of the Zynq device.

## Files

`rtl/`

| file | content |
|---|---|
| `dds_pkg.sv` | widths, `phase_t`/`sample_t`, `quadrant_e`, table formula |
| `phase_accumulator.sv` | 8-bit phase register |
| `phase_adjust.sv` | quarter decode, address mirror, negate flag |
| `quarter_sine_lut.sv` | 64-entry quarter-wave table |
| `sine_dds.sv` | complete carrier generator |
| `amplitude_halver.sv` | arithmetic shift right by one |
| `bask_mux.sv`, `ook_mux.sv` | modulator selectors |
| `message_counter.sv` | test message source |
| `ask_ook_modulator_top.sv` | top level |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus these:

* `tb_ref_pkg.sv`, an independent real-arithmetic model of the 256-sample wave;
* `tb_modulation_runs.sv`, which runs the top at eight samples per carrier
  period and checks the BASK and OOK envelopes (9997 for bit 1; 4999 for
  BASK bit 0; 0 for OOK bit 0).

`tb_ask_ook_modulator_top.sv` runs the top at its default parameters for
6144 clocks, checking every output on every clock. It also counts that all
four quarters, both BASK amplitudes, OOK on and off, and rising and falling
message edges each occurred. Each testbench prints one line
`TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dds_pkg.sv tb/tb_ref_pkg.sv tb/tb_ask_ook_modulator_top.sv \
    --top-module tb_ask_ook_modulator_top -Mdir obj_top
./obj_top/Vtb_ask_ook_modulator_top
```

Replace the testbench name to run any other one. `-Irtl` lets Verilator find
each module by its file name. The packages `dds_pkg.sv` and `tb_ref_pkg.sv`
must come first on the command line. Every testbench runs in well under a
second.

For lint: `verilator --lint-only -Wall -Irtl rtl/dds_pkg.sv rtl/<module>.sv --top-module <module>`.
