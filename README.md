# A small Hough-transform line detector in SystemVerilog

A straight line can be written as `rho = x*cos(theta) + y*sin(theta)`.
`theta` is the direction of the line's normal and `rho` is its distance from
the origin. Every edge pixel `(x, y)` lies on one line for each angle. If
each pixel casts one vote for every `(rho, theta)` it could belong to, the
pixels of a real line all vote for the same pair, and that pair collects the
most votes. This engine does that voting in hardware. It takes a list of edge
pixels held in ROM, sweeps each pixel over 36 angles (0° to 175° in 5° steps)
and counts the votes in RAM.

Everything is integer arithmetic. Cosine and sine come from 8-bit ROM tables
holding `round(127*cos)` and `round(127*sin)`, so `rho` is 127 times the
geometric distance. The multiply-add is exact for coordinates up to 128.
Collinear pixels therefore produce exactly the same integer `rho` at the
line's angle.

## One vote, six clocks

A control unit runs each vote as a fixed sequence of six states:

| state | what happens | control signals |
|---|---|---|
| S1 | the angle and pixel counters address the four ROMs (registered read) | – |
| S2 | the COS, SIN, X and Y registers load the ROM words | LdC LdS LdX LdY |
| S3 | the Rho register loads `X*COS + Y*SIN` | LdR |
| S4 | Param_R and Param_T are read at address Rho (registered read) | – |
| S5 | the Acc register loads the old vote count | LdA |
| S6 | `Acc+1` is written to Param_R and `theta` to Param_T; theta steps by 5; on the last angle the pixel index steps too | Wren Ld1 (Ld2) |

S0 is idle. S7 lasts one clock at the end of a sweep and raises `done`. So
there are eight states in a 3-bit binary encoding. Every register with a
load input keeps its value except in the state that loads it. The next
vote's operands therefore cannot disturb a value that is still in use.

A sweep over the default 6 pixels × 36 angles is 216 votes, which is
**1296 clocks** from `start` to `done`. At 50 MHz that is 25.92 µs.

The two loop counters follow a simple rule:

* `theta_counter` adds 5 and returns to 0 when the sum would reach 180.
  Its `wrap` flag is high while it holds 175.
* `pixel_counter` adds 1 and returns to 0 after index 5.
  Its `done` flag is high while it holds 5.
* The control unit steps theta on every S6. It steps the pixel only in an S6
  where `wrap` is high.
* After the S6 in which both flags are high, the sweep ends. Both counters
  are then back at 0.

## The two result memories, and what an address means

There is no 2-D accumulator. Both RAMs have 256 words and are indexed by
`rho` alone:

* **Param_R** holds the number of votes at each `rho`.
* **Param_T** holds the `theta` of the most recent vote at that `rho`.

After a sweep, the word of Param_R with the most votes gives the line: its
address is `rho`, and the same word of Param_T gives its angle. This works
because an exact integer `rho` rarely comes from two different angles by
chance.

The address is the **low 8 bits of the 16-bit two's-complement Rho**. Rho
values that differ by a multiple of 256, including negative ones, share a
word. For the 6×6 test image, Rho spans −635 to 898, so sharing does happen.

The test image holds four collinear pixels `(1,3) (2,2) (3,1) (4,0)` on the
line `x + y = 4`, plus `(3,4)` and `(5,5)`. The four collinear pixels all give
Rho = 360 at 45°, and word 104 (360 mod 256) ends with five votes and
angle 45. Two other words also reach five votes through such sharing. To
give every Rho its own word, raise `RHO_AW`. With 11 address bits the
6×6 image needs no sharing.

The RAMs start at zero and nothing clears them. A second `start` adds its
votes to those of the first.

Reading out: while `busy` is low, `rd_addr` addresses both RAMs, and
`acc_rd` / `t_out` show the words one clock later. During a sweep the RAMs
are addressed by Rho.

## Module map

| file | role |
|---|---|
| `rtl/hough_pkg.sv` | widths (8-bit angle, pixel and trig values; 16-bit rho and votes), `state_t`, `ctrl_t` (the nine control signals) |
| `rtl/hough_top.sv` | top: control unit + counters + datapath |
| `rtl/control_unit.sv` | the S0..S7 machine and its control word |
| `rtl/theta_counter.sv`, `rtl/pixel_counter.sv` | loop counters |
| `rtl/hough_datapath.sv` | ROMs, operand registers, multiply-add, Rho, Acc, +1, Param_R, Param_T, readout mux |
| `rtl/trig_rom.sv` | 256×8 cosine or sine ROM with registered read; word `a` = `round(127*cos a°)` or `round(127*sin a°)` for `a` = 0..180, halves rounded away from zero, two's complement, 0 above 180; computed at elaboration |
| `rtl/sync_rom.sv` | 256×8 ROM with registered read, loaded by `$readmemh` (the pixel tables) |
| `rtl/rho_unit.sv` | `x*cos + y*sin`, 16-bit signed |
| `rtl/load_reg.sv` | register with load enable |
| `rtl/sp_ram.sv` | single-port RAM, registered read, read-before-write, zero at start |
| `rtl/x_pixel.hex`, `rtl/y_pixel.hex` | the test image's six pixels at words 0..5, zeros after |

`hough_top` parameters: `THETA_STEP` (5), `THETA_WRAP` (180), `LAST_PIXEL` (5,
the index of the last pixel), `RHO_AW` (8) and the two pixel-table file
names `X_HEX` and `Y_HEX`. To
process another image, write its coordinates into the X/Y tables and set
`LAST_PIXEL` to the number of pixels minus one. Keep coordinates at or below
128 so that Rho stays exact.

Top-level ports besides the handshake (`start`, `busy`, `done`) and the readout
(`rd_addr`, `acc_rd`, `t_out`) expose the internal registers. These are
`state`, `theta`, `xy`, `cos_out`, `sin_out`, `x_out`, `y_out`, `rho` and
`acc`, so that a waveform shows each vote being formed. For example, at 60°
on pixel (3,1): COS = 64, SIN = 110, Rho = 3·64 + 1·110 = 302.

Reset is synchronous and active high. It clears the state, the counters and
the registers, but not the RAMs.

## Where this departs from, or fills in, the original description

This design was written from a published description of an FPGA
implementation. Apart from the points below, its structure follows that
description: the blocks, the widths, the ROM contents, the six-step control
sequence and the test image.

* **Counter steps.** The original control table marks the theta and pixel
  loads active in every state S1..S6. Here theta steps once per vote, in S6,
  and the pixel once per angle sweep. This is the only reading in which every
  angle of every pixel gets a vote. It matches the original simulation trace
  (a new rho for every 5° step) and its reported run time of 25.93 µs for
  the 6×6 image (1296 clocks at 50 MHz).
* **Angles 0..175, not 0..180.** The 180 compare is applied to the advanced
  angle, so 180° (a repeat of 0°) is skipped. This also gives the 216 votes
  that the run time implies.
* **S7, start/busy/done and readout** are this implementation's own.
* **ROM and RAM timing.** Both use registered reads, as block memory does.
  S1 and S4 are the read cycles.
* **Trig tables** are computed from the formula when the design is
  elaborated, instead of being loaded from initialization files. A handful of
  the published table entries differ from it by one code, and the formula was
  followed.
* **Rho → address** uses the low 8 bits (see above). The original does not
  say how the 16-bit rho is fitted to a 256-word RAM.
* The original trace also shows the vote count rising by one on every angle
  step. That does not follow from a per-rho count and is not reproduced.

## Simulating

The testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
Run them from the repository root, because the pixel tables are opened by
the relative paths `rtl/x_pixel.hex` and `rtl/y_pixel.hex`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/hough_pkg.sv tb/tb_ref_pkg.sv tb/tb_hough_top.sv \
    --top-module tb_hough_top -o sim -Mdir obj
obj/sim
```

| testbench | what it checks |
|---|---|
| `tb_hough_top` | two full sweeps at default parameters with a 50 MHz clock. Checks every vote's angle, pixel, operands, Rho and Acc against a model, 1296 clocks per sweep, the 60° worked example, and both RAMs after each sweep. It counts the angle wrap, pixel steps, re-votes on a word, rho sharing a word, negative rho and readout, and fails if any of them never happens. |
| `tb_hough_line` | line detection with `RHO_AW = 11`: after one sweep the single strongest word is rho 360 with 4 votes and angle 45, the line `x + y = 4`; the whole vote table is compared with a model |
| `tb_hough_datapath` | 300 votes at random angles and pixels, driven step by step; then both RAMs are read out |
| `tb_control_unit` | state order, the control word in each state, 216 votes / 1296 clocks, the done pulse, with `start` held or pulsed |
| `tb_theta_counter`, `tb_pixel_counter` | sequences, flags, holding while not loaded |
| `tb_trig_rom` | all 256 words of both trig tables against real-valued `cos`/`sin`, worked values, read latency |
| `tb_sync_rom` | all 256 words of the X and Y pixel tables against the image; read latency |
| `tb_rho_unit` | worked example, range corners, 2000 random operands |
| `tb_sp_ram` | zero start, 3000 random accesses, read-before-write, read-increment-write |
| `tb_load_reg` | load enable and reset |

`tb/tb_ref_pkg.sv` holds the reference rounding (`trig127`) and the test
image used by the testbenches.

The sweep is short: the full-size run simulates in well under a second.
