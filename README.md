# Split-window land surface temperature engine

This is a streaming hardware engine that computes land surface temperature (LST) from
thermal-infrared satellite data, one pixel per clock. It implements the split-window formula for
the AVHRR channels 4 and 5:

    LST = T4 + 1.40 (T4 - T5) + 0.32 (T4 - T5)^2 + 0.83
             + (57 - 5 W)(1 - eps) - (161 - 30 W) * deps

- `T4` and `T5` are the brightness temperatures of the two thermal channels.
- `W` is the total atmospheric water vapour.
- `eps` is the mean emissivity of the two channels.
- `deps` is their emissivity difference. It is fixed at 0.005 here, which is typical for
  vegetated land in summer. Because it is a constant, only four pixel streams need to come into
  the engine, not five.

The engine is meant for on-board processing, for example on a radiation-tolerant SRAM FPGA, and
is sized for scenes of 695 x 316 pixels. It stores no frame, so image size is not limited.
Radiation tolerance is expected to come from the device and its configuration hardening. The RTL
adds no redundancy of its own.

## Data formats

All pixel values are 16-bit integers, in the scaled units of the AVHRR land data sets:

| stream      | port        | unit                 | typical range |
|-------------|-------------|----------------------|---------------|
| T4          | `t4_i`      | kelvin x10, unsigned | 2600..3300    |
| T5          | `t5_i`      | kelvin x10, unsigned | 2600..3300    |
| W           | `w_i`       | g/cm^2 x1000         | 0..7000       |
| epsilon     | `epsilon_i` | x1000                | 900..1000     |
| LST         | `lst_o`     | kelvin x10, unsigned | 2600..3500    |

The result uses the same unit as the input temperatures, kelvin x10. So 3158 means 315.8 K.

## How the formula is split

The formula is computed as two independent parts that run side by side on the same pixel:

- **LST1**, the brightness-temperature term (`rtl/lst1_part1.sv`). With T4 and T5 in kelvin x10,
  it becomes `0.1 T4 + 0.14 d + 0.0032 d^2 + 0.83` in kelvin, where `d = T4 - T5`. The datapath
  has:
  - one subtractor for `d`,
  - a squarer,
  - three constant multipliers, for 0.1, 0.14 and 0.0032,
  - an adder that also adds 0.83,
  - a final constant multiplier by 10 that gives kelvin x10.
- **LST2**, the emissivity correction (`rtl/lst2_part2.sv`). With W and eps in x1000, it becomes
  `[(57000 - 5W)(1000 - eps) - (161000 - 30W) * 5] * 1e-6` in kelvin. The bracket is computed
  exactly in integers. One constant multiplier by 1e-5 then takes it to kelvin x10.
- **LST = LST1 + LST2** (`rtl/lst_adder.sv`). This is a plain 16-bit unsigned adder.
  - LST2 can be negative. For dry air over a near-black surface it is about -0.8 K.
  - LST2 is therefore carried as a 16-bit two's-complement value.
  - The unsigned sum modulo 2^16 is the correct LST whenever the true LST is in 0..6553.5 K.

Divisions by 10 and by 1000 are done as multiplications by fixed-point constants, so there is no
divider anywhere.

### Fixed point and rounding

- The LST1 coefficients have 24 fractional bits: 0.1 = 1677722/2^24, 0.14 = 2348810/2^24,
  0.0032 = 53687/2^24 and 0.83 = 13925106/2^24. Each constant is the nearest integer to
  `c * 2^24`.
- The LST2 scale has 40 fractional bits: 1e-5 = 10995116/2^40.
- All intermediates are 64-bit signed, or 96-bit for the last LST2 product, so no intermediate
  value can overflow for any 16-bit input.
- Each part rounds to nearest, then saturates:
  - LST1 saturates to 0..65535.
  - LST2 saturates to -32768..32767.
  - When either part saturates, `sat_o` is raised for that pixel. For realistic inputs this never
    happens. It only catches corrupted pixels.

The constants are in `rtl/lst_pkg.sv`. The testbenches check the results against a
double-precision evaluation of the formula. Each part must match the ideal value rounded to
nearest. Either neighbour is accepted when the ideal value lies within 0.01 of a rounding tie.

## Dataflow and FIFOs

```
 write_en                               read_en (held back by 'room')
    |                                        |
 T4 -> FIFO1 \                                |
 T5 -> FIFO2 -+- LST1 pipeline (5 stages) --> FIFO_1 \
 W  -> FIFO3 \                                        +-> adder reg --> LST
 eps-> FIFO4 -+- LST2 pipeline (5 stages) --> FIFO_2 /   (valid/ready)
```

- Every FIFO is a register array (`rtl/sync_fifo.sv`), not block RAM. Each FIFO is 16 deep by
  default and works in first-word-fall-through mode.
- `write_en_i` pushes one pixel into all four input FIFOs. It is ignored while they are full
  (`in_full_o`).
- `read_en_i` moves one pixel from the input FIFOs into both pipelines at once, so the two parts
  always work on the same pixel. It is ignored while the input FIFOs are empty (`in_empty_o`).
- The two results are written into the result FIFO pair (`rtl/lst_fifo.sv`). The pair releases
  LST1 and LST2 only together, so A and B always belong to the same pixel.
- The output is a valid/ready stream: `lst_o`, `lst_valid_o` and `lst_ready_i`.
  - If the consumer stops taking results, the result FIFOs fill up.
  - The engine then holds back reads (`stall_o`). It does this whenever the result FIFOs have
    fewer free entries than the pipeline can still deliver, which is five stages plus the pixel
    being read.
  - Because of this, a result is never dropped. Assertions in `lst_fifo` check this.

`clock_i`, `reset_i`, `read_en_i` and `write_en_i` go to every block. Reset is synchronous and
active high. It empties every FIFO and pipeline.

## Timing

- A pixel read in cycle n is on `lst_o` in cycle n+7, provided `lst_ready_i` is high. The seven
  cycles break down as follows:
  - 5 pipeline stages in each part.
  - 1 cycle to be written into the result FIFOs.
  - 1 cycle in the adder's output register.
- Throughput is one pixel per clock. With both enables held high, a scene of N pixels takes
  N + 7 cycles from its first write to its last result.
  - A 695 x 316 scene takes 219,627 cycles. That is 1.153 ms at 190 MHz.
  - At 16 bits per result this is 16 bits x f_clk, for example 3.05 Gbit/s at 190 MHz. A design
    that issued one pixel per latency period would reach only a seventh of that.

The clock rate quoted above is only a reference point. It has not been measured for this RTL.

## Where this RTL departs from the original description

The design comes from a published FPGA implementation. Some points in that description could not
be reproduced as stated, or were left open:

- **Output scale.** The published equations leave LST1 in kelvin, and LST2 in kelvin x1000 after
  its "x0.001". The operator diagram adds a further x0.1 after the LST1 sum. Taken literally, the
  two parts would be in different units. Here both are brought to kelvin x10 before the addition:
  the last LST1 constant is x10, and the last LST2 constant is 1e-5.
- **Result FIFOs.** One drawing sends LST1 and LST2 back through FIFO1 and FIFO2. The structural
  view has a separate result FIFO block with outputs A and B. This design uses a separate pair.
- **Enables and flow control.** The original shares `read_en` and `write_en` among all blocks but
  does not define what they do. The push/pop meaning, the output valid/ready handshake, the status
  outputs and the read hold-back are this design's.
- **Throughput and processing time.** The original reports 435.392 Mbit/s, which is 16 bits x
  190.484 MHz / 7, and 2.95 ms per scene. This engine is fully pipelined. It delivers a result
  every clock and needs 1.153 ms per scene at that clock.
- **Not reproduced.** The resource counts (slices, LUTs, 16 DSP blocks), the 190.484 MHz clock
  and all radiation-related properties belong to the original FPGA build. They are not claimed
  for this RTL.
- **Open choices.** The FIFO depths (16), the fixed-point formats, the rounding and saturation
  rule, and the reset style are this design's own.
- **Outside the engine.** The water vapour W is an input. Estimating it from the satellite data
  is done elsewhere. Image storage is also outside the engine.

## Files

| file | contents |
|------|----------|
| `rtl/lst_pkg.sv` | widths, pipeline depth, fixed-point constants |
| `rtl/sync_fifo.sv` | register-based first-word-fall-through FIFO |
| `rtl/lst1_part1.sv` | FIFO1, FIFO2 and the LST1 pipeline |
| `rtl/lst2_part2.sv` | FIFO3, FIFO4 and the LST2 pipeline |
| `rtl/lst_fifo.sv` | result FIFO pair with pairing of LST1/LST2 |
| `rtl/lst_adder.sv` | 16-bit unsigned adder with output register |
| `rtl/lst_module.sv` | top level |
| `tb/lst_ref_pkg.sv` | double-precision reference model and pixel generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lst_image` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a run that
hangs. Example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lst_pkg.sv tb/lst_ref_pkg.sv tb/tb_lst_module.sv --top-module tb_lst_module
./obj_dir/Vtb_lst_module
```

Replace the testbench name to run another one:

- `tb_sync_fifo`, `tb_lst1_part1`, `tb_lst2_part2`, `tb_lst_fifo` and `tb_lst_adder` test the
  blocks one at a time. They use random traffic against models and hand-worked values, for
  example T4=300.0 K and T5=295.0 K give LST1 = 315.8 K. They also check the 5-cycle part latency
  and saturation.
- `tb_lst_module` tests the whole engine. It checks the 7-cycle latency and one result per clock.
  Under random traffic it makes every mechanism happen and counts each one: full and empty input
  FIFOs, read hold-back, output back-pressure, saturation and negative corrections.
- `tb_lst_image` streams one full synthetic 695 x 316 scene through the engine at default
  parameters. It checks every pixel and the N + 7 cycle count. It runs in a few seconds.

## Changing it

- **FIFO depths.** These are the `IN_DEPTH` and `OUT_DEPTH` parameters of `lst_module`.
  `OUT_DEPTH` must exceed the pipeline depth plus one. An elaboration-time assertion checks this.
- **Emissivity difference.** This is the `DEPS` parameter of `lst2_part2`, in units of 0.001,
  taken from `lst_pkg::DEPS_X1000`.
- **Pipeline stages.** If you add or remove stages in a part, update `lst_pkg::PART_STAGES`. Both
  parts must keep the same depth, and the read hold-back depends on it.
