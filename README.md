# H.264/AVC frame memory controller and entropy decoders

SystemVerilog RTL for three parts of an H.264/AVC baseline video decoder:

1. **A frame memory controller.** It stores decoded frames in SDR SDRAM and serves the reference-pixel requests of motion compensation.
2. **A UVLC (Exp-Golomb) decoder** for header and macroblock syntax elements.
3. **A CAVLC decoder** for residual 4x4 and chroma DC coefficient blocks.

The top module `h264_mem_entropy_top` holds all three side by side. Each keeps its own ports, and everything runs on one clock with an active-low asynchronous reset.

## Directory layout

| Path | Contents |
|------|----------|
| `rtl/` | Synthesizable design. There is one module or package per file. |
| `tb/` | Self-checking testbenches, the SDRAM behavioural model and the CAVLC reference-encoder tables. |

## Frame memory controller (`mem_ctrl`)

### Memory organisation

- Each channel is one 4-bank SDRAM: 4096 rows × 512 columns × 32 bits per bank. One word holds four 8-bit pixels.
- One SDRAM row holds a **64×32-pixel window** of a frame.
- Windows alternate banks in a checkerboard, so neighbouring windows are always in different banks.
- For coordinates (x, y) of 11 bits each and a 3-bit frame slot:

```
byte   = x[1:0]
column = {x[5:2], y[4:0]}
bank   = {y[5], x[6]}
row    = {frame[2:0], y[10:6], x[10:7]}
```

Frames up to 2048×2048 fit, with 8 frame slots per channel.

A motion-compensation request is at most 63×63 pixels (21×21 in practice), so it touches at most four rows, and those rows are always in four different banks. The address generator computes the end coordinates with two adders and classifies the request:

| Case | Rows touched |
|------|--------------|
| 1 | One row |
| 2 | Two rows (horizontal or vertical break) |
| 3 | Four rows |

### Access scheduling (`mc_ctrl`)

- **Burst length 1.** There is one READ or WRITE per 32-bit word, so no bandwidth goes on unused burst words.
- **Rows stay open after a request.** A table of open rows (`mc_detect`) shows whether every row a new request needs is already open.
- **Row hit:** the data phase starts at once. READs go back to back, and only the CAS latency is paid.
- **Row miss:** one PRECHARGE ALL, then one ACTIVE per needed row in the order top-left, top-right, bottom-left, bottom-right.
  - Activates have priority.
  - A cycle in which an activate must wait for tRRD is filled with a READ to a bank that is already open.
- With the default timing (tRCD = tRP = tRRD = 2 cycles, CAS latency 2), a miss takes L+4, L+5 and L+7 cycles for one, two and four rows. The count runs from the precharge to the last READ, and L is the number of words.
- A request into a closed memory takes L+2 cycles: ACT, NOP, then READs.
- The next request is accepted in the cycle of the previous request's last access, so consecutive requests leave no idle command slot.

### Datapath of one engine (`mc_engine`)

Each engine contains these units:

- address generator;
- detection unit;
- control FSM;
- command generator (`mc_cmd_gen`), which registers the command pins;
- for reads, a tag pipeline that follows each READ through the CAS latency;
- for reads, a data masker (`mc_data_masker`), which shifts each returned word so the wanted pixels start at byte 0 and gives their count, end-of-line and last flags.

A READ chosen in cycle c is on the pins in cycle c+1. Its data is sampled at the end of cycle c+1+CL and appears on `rd_*` two cycles later.

### Two channels

- The controller drives two SDRAM channels as ping-pong frame stores:
  - the read engine works on the channel holding the reference frame;
  - the write engine stores the frame being reconstructed on the other channel.
- `frame_swap` exchanges the two channels (`mc_arbiter`). After the pulse:
  1. new partition requests wait;
  2. both engines finish their work, precharge all banks and let in-flight read data return;
  3. the channels are then exchanged.
- Because of this, each engine's open-row table always describes the channel it drives.

### Motion-compensation scheduler (`mc_zscan_sched`)

A partition request gives:

- the frame slot;
- the top-left (x, y);
- the width and height in 4-pixel units (1, 2 or 4);
- fractional-vector flags for x and y;
- a `zscan` flag.

With `zscan` set, the partition is split into 4×4 blocks in H.264 z-scan order. Each block is requested as 4×4 pixels, or as 9 pixels along an axis with a fractional vector component; a 9-pixel request starts 2 pixels earlier, giving the support of the 6-tap interpolation filter. With `zscan` clear, the whole partition is requested at once: 4·w4 by 4·h4 pixels, plus 5 along each fractional axis.

### Ports

| Port group | Purpose |
|------------|---------|
| `mc_*` | Partition read requests (valid/ready). |
| `rd_*` | Read data: pixels in the low bytes, `rd_n_pix` valid pixels, plus end-of-line and last flags. |
| `wq_*` | Rectangular write requests (valid/ready). x and the width must be multiples of 4. |
| `wd_*` | Write data words in raster order (valid/ready). |
| `frame_swap` / `ref_ch` | Channel exchange request, and the channel that currently holds the reference frame. |
| `ch_pins[2]`, `ch_dq_out[2]`, `ch_dq_oe[2]`, `ch_dq_in[2]` | SDRAM command pins and data bus of each channel, split into out, enable and in. |
| `rd_hit`, `rd_miss`, `wr_hit`, `wr_miss` | One pulse per request, for statistics. |

### Not included

- A chroma-specific data arrangement: the controller stores and reads 8-bit sample planes in the luma layout.
- A display read port.

## UVLC decoder (`uvlc_decoder`)

### Bitstream window (`bs_shifter`)

- Two 32-bit registers hold the incoming bitstream.
- A 5-bit accumulator adds up the lengths of the codes already used.
- A shifter gives a 32-bit window aligned to the next unused bit.
- Up to 32 bits can be consumed per cycle.

### Decoding

- A leading-one detector on the window finds N, the number of leading zeros. The code length 2N+1 is therefore known at once, and the top 2N+1 bits equal CodeNum+1, so no code table is needed.
- Post-processing maps CodeNum to the requested element:

| Element | Mapping |
|---------|---------|
| `ue` | CodeNum |
| `se` | Signed mapping |
| `te` | One inverted bit when the range is 1, otherwise `ue` |
| `me` | coded_block_pattern through the intra 4×4 or inter table |
| `u(n)` | Fixed-length field of n bits |

### Interface and timing

- The caller names each element: `se_valid`, `se_kind`, `se_bits`, `te_range_gt1`.
- A request is taken when the window is full (`se_ready`).
- The result (value and code length) appears on `res_*` one cycle later, and one element per cycle is sustained.
- Codes of up to 31 bits are supported.
- The macroblock-layer syntax sequencer that decides which element comes next is **not** included.

## CAVLC decoder (`cavlc_decoder`)

### Decoding flow

Each step takes one cycle:

1. **coeff_token** (`cavlc_coeff_token`). It gives TotalCoeff and TrailingOnes, using the table for the nC class or for chroma DC. A zero-block detector recognises empty blocks early. The trailing-one sign bits are consumed in the same cycle.
2. **Levels** (`cavlc_level_dec`), one per cycle, with prefix, suffix, suffixLength adaptation and the escape code. The trailing ±1 values are written in the same cycle as the first level.
3. **total_zeros** (`cavlc_total_zeros`).
4. **run_before** (`cavlc_run_before`). It decodes one run per cycle while ZerosLeft > 6. When ZerosLeft ≤ 6 it decodes two runs per cycle; the second lookup uses ZerosLeft minus the first run.
5. **Placement.** Levels are kept in a 16-entry level buffer (`cavlc_level_buf`) in decoding order. The merge unit (`cavlc_merge`) places one or two of them per cycle into a zeroed coefficient array, at position = previous position − 1 − run. When ZerosLeft reaches 0, the remaining levels are copied in a single cycle.

An empty block takes 1 cycle. A block with 15 non-zero levels and 16 coefficient positions takes 24 cycles.

### Interface

| Signal | Purpose |
|--------|---------|
| `start` | Starts a block, when `ready` is high. |
| `nc` | nC of the block; −1 selects chroma DC. |
| `max_coeff` | 16, 15 or 4. |
| `done` | Pulses when the block is decoded. |
| `coeff[16]` | Coefficients in zig-zag scan order. |
| `total_coeff`, `zero_block` | Block summary. |
| `cycles` | Cycles the block took. |
| `bit_pos` | Bits consumed so far. |

Levels are `LEVEL_W` = 10 bits wide (16 ten-bit level registers); larger values are truncated.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `mem_ctrl`, `mc_engine` | `CL` | 2 | CAS latency in cycles. |
| `mem_ctrl`, `mc_engine`, `mc_ctrl` | `T_RCD`, `T_RP`, `T_RRD` | 2 | SDRAM timings in clock cycles. |
| `mem_ctrl`, `mc_engine`, `mc_ctrl` | `T_RAS` | 5 | SDRAM timing in clock cycles. |
| `mem_ctrl`, `mc_engine`, `mc_ctrl` | `T_WR` | 2 | SDRAM timing in clock cycles. |
| `h264_mem_entropy_top`, `cavlc_decoder` | `LEVEL_W` | 10 | Width of a decoded level. |

The timing defaults are the MT48LC8M32B2P minimum times rounded up at a 10 ns clock. For a faster clock, raise them.

## Design choices made here

These points are not fixed by the source design:

- The exact coordinate-to-address bit arrangement above.
- Timing defaults in clock cycles, matching the 10 ns command spacing of the original command sequences. The original controller was also quoted as running at 133 MHz with CAS latency 2. At 7.5 ns per cycle, tRCD and tRP (20 ns) need 3 cycles and tRAS (42 ns) needs 6, so set `T_RCD=3`, `T_RP=3`, `T_RAS=6` for that clock. The one/two/four-row miss counts then grow by the extra cycles. The testbenches run only the defaults.
- Closing both channels before a frame swap.
- Accepting the next request in the last access cycle.
- Registering the command pins.
- Writing the trailing-one signs together with the first level. This makes the critical CAVLC block 24 cycles, where the original schedule took 26.
- Standard H.264 code tables (coeff_token, total_zeros, run_before), written as case logic in `cavlc_pkg`. Each table is a prefix code: every table was checked to be prefix-free, with a Kraft sum of at most 1.
- CAVLC positions use position = previous position − 1 − run, the H.264 definition.

## Verification

All testbenches are self-checking and end with a `TB_RESULT checks=N failures=M` line.

- **`tb_cavlc_decoder`**
  - A reference encoder produces 400 random blocks in all nC classes and chroma DC, plus a known textbook block.
  - For each block it checks the coefficients, the bits consumed and the cycle count.
  - It requires that zero blocks, escapes, two-run cycles, copy-rest, full blocks and chroma DC all occur.
- **`tb_uvlc_decoder`**
  - A reference Exp-Golomb encoder produces 3008 random `ue`, `se`, `te`, `me` and `u(n)` elements.
  - It checks the value, the length and the one-cycle latency of each result.
- **`tb_mem_ctrl`**
  - Two SDRAM behavioural models (`tb/sdram_model.sv`) check tRCD, tRP, tRRD, tRAS, tWR and open-row rules.
  - Directed tests check the cycle counts: first access, row hit, and one-, two- and four-row misses.
  - Macroblock writes followed by a swap are read back.
  - Random partition reads run alongside random writes and swaps. Every returned pixel is compared with a prediction from an independent copy of the address map.
- **`tb_top`**
  - This is the full-size test: the top with default parameters, running the three traffic sources concurrently.
  - It fails if any mechanism never occurs: row hit, row miss, the 1/2/4-row cases, swap, writes, z-scan, fractional reads, each UVLC kind and each CAVLC path.

Each RTL module was also run with one deliberate bug, for example a dropped −1 in a merge position, a missing tRRD wait or a wrong bank bit. For every such bug the testbench that covers the module reported failures.

### Running a testbench

The packages must be listed first. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv rtl/cavlc_pkg.sv tb/cavlc_enc_pkg.sv tb/tb_top.sv \
    --top-module tb_top -o sim && ./obj_dir/sim
```

Replace `tb_top` with `tb_mem_ctrl`, `tb_uvlc_decoder` or `tb_cavlc_decoder` to run one unit alone. Every test finishes within seconds.
