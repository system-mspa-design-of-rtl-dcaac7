# H.263 videotelephony encoder built from dedicated modules around one DRAM

This RTL implements the encoding loop of an H.263 videophone codec for QCIF pictures
(176x144, 4:2:0). It is organised as a *system memory-sharing processor array*:
every coding step has its own dedicated hardware module, and the modules never talk to
each other directly. All data goes through one external 256K x 16 DRAM. A programmable
address generation unit (AGU) is the only bus master for the modules. It fetches words
from DRAM into a module, waits for the module, and writes the results back. Changing the
coding order or the memory layout therefore means changing an AGU program, not the
modules.

## Data flow for one macroblock

1. **Motion estimation** (`me`): takes the current macroblock and a 48x48 search area,
   which is the 3x3 reference macroblocks around it. It does a full integer search over
   -16..15 with a systolic array, then refines to half pel. It also decides INTRA or
   INTER.
2. **Prediction error** (`pred_err`): builds the motion-compensated prediction with
   half-pel interpolation from a 9x9 reference window per block. It subtracts that from
   the current block; an INTRA macroblock uses a zero prediction.
3. **DCT + quantizer** (`dctq`): forward 2-D DCT, then the H.263 quantizer. It outputs
   levels in zigzag order.
4. **Inverse quantizer + IDCT** (`iqidct`): the inverse steps, giving the reconstructed
   residual.
5. **Reconstruction** (`precon`): prediction plus residual, clipped and written line by
   line into the reconstruction frame.
6. **Deblocking** (`deblock`): the H.263 Annex J loop filter across block edges.

Two ports feed pictures and control in from outside:
- `camera_if` captures the camera stream into DRAM. It borrows the bus from the AGU
  between instructions.
- `pc_if` gives a host read/write access to DRAM while the AGU is halted. It loads
  programs and can start runs limited to a number of instructions (emulation mode).

## Motion estimation array

`me_array` has 32 processing elements (`me_pe`) and three search-data ports.
- One PE holds one candidate vector.
- Search row slot g starts at cycle 16g, lasts 47 cycles, and is carried on port g mod 3.
- PE j runs j cycles behind PE0, so each search pixel is shared by all PEs that need it.
- One integer search takes K·K·(P+1) = 8192 cycles plus a 35-cycle pipeline tail.

`me_halfpel` then evaluates the 8 half-pel neighbours. It uses `halfpel_interp`, a
two-adder interpolator: one horizontal adder, one vertical adder through a line buffer.
It chooses INTRA when A + 500 < SAD, where A is the sum of |pixel − macroblock mean|.
This is the usual H.263 test-model rule and is this design's choice.

The whole `me` job, from first input word to result, takes about 10.9k cycles.

## Distributed-arithmetic DCT

`dct_da` computes an 8-point 1-D DCT or IDCT without multipliers:
- Bit-serial adders and subtractors form the butterfly sums.
- Eight ROM-accumulators (`rac`) turn 4-bit slices into partial sums. Each has a DCT
  ROM and an IDCT ROM of 16 words, with 13 fractional bits.
- One line takes 16 bit cycles plus load and output: 20 cycles.

`dct2d` does rows, then columns, through a transpose memory. That is 320 cycles per 8x8
block, or 1920 per macroblock. The transform is the orthonormal DCT; results match a
floating-point reference within ±1.

## Memory layout

- Each picture area is 12x11 macroblock slots of 192 words. The 12x11 includes padding
  around QCIF's 11x9 macroblocks.
- Each slot holds Y0, Y1, Y2, Y3, Cb and Cr, at 32 words per block and 4 words per line.
- Two pixels share a word; the left pixel is in bits [15:8].
- The test program uses four areas: current picture at 0, reference at 25344,
  reconstruction at 50688 and parameters at 76032. In total this is 101,376 of the
  262,144 words.

## AGU program model

The instruction set is this design's own (`agu_pkg`):
- Module control: START, WAIT.
- Block moves: RD and WR (linear), WIN (a pixel window with clamping at picture edges,
  offset by the integer part of a motion vector).
- Registers: LDI, ADDI, ADD, LDM.
- Control flow: JMP, JSR/RET (a 4-deep stack), DJNZ, SIG, HALT.

Each module has a word port: `start`, `in_we`/`in_data`, `out_valid`/`out_re`/`out_data`,
`busy`, `done`. A module begins once its last input word arrives. WAIT returns once the
module has finished or has a result to offer.

## What is not built, and known problems

- **Not built:**
  - Variable-length coding. The code tables are in `h263_pkg`.
  - The variable-length decoder.
  - Rate control.
  - PB-frame bidirectional prediction.
- **Known failure, INTER reconstruction:** in the end-to-end test, `precon` produces a
  wrong prediction for the INTER macroblock, with errors far above quantization noise.
  - The prediction errors from `pred_err` for the same macroblock are correct.
  - `precon` receives exactly the same window words as `pred_err`.
  - So the fault is inside `precon`'s own prediction path. It is not resolved.
  - INTRA reconstruction is correct.
- The motion-vector prediction for coding uses the previous vector. Standard H.263 uses
  a median predictor.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing -y rtl -y tb rtl/h263_pkg.sv rtl/agu_pkg.sv \
        tb/tb_codec_top.sv --top-module tb_codec_top -o sim && ./obj_dir/sim

What each testbench covers:
- `tb_me_array`: the integer search.
- `tb_me`: the full motion estimation, against a reference search.
- `tb_dct2d`: the DCT/IDCT against a floating-point model, including the 320-cycle
  latency.
- `tb_quantizer`: the quantizer and inverse quantizer, exhaustively.
- `tb_codec_top`: two macroblocks through the whole system, including camera capture,
  the PC port, emulation stop and deblocking. It takes about 140k cycles at the default
  parameters.
