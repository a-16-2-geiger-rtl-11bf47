# 16×2 SPAD photon counter with a Brent-Kung counting adder

This is a small synchronous data acquisition back end for an array of single
photon avalanche diodes (SPADs). There are 16 columns and 2 rows. Every pixel
that detects a photon raises a hit. The back end reads the two rows in turn
through a 16-bit 2-to-1 multiplexer and adds the photons of each read to a
16-bit running count. At the end of each counting frame, the count moves into
a parallel-in parallel-out (PIPO) register for readout.

The counting element is a Brent-Kung (BK) parallel-prefix adder. It is the
slowest path in a counter like this. A Kogge-Stone adder is somewhat faster,
but it costs almost twice as many prefix cells. Brent-Kung keeps most of the
speed at much less area. Using two rows instead of one doubles the light
collected per column, which raises sensitivity for weak signals.

The SPADs are analog devices, so the array is stood in for by a synthesizable
random-photon model. This lets the whole chain be simulated and synthesized
as one design.

## Block diagram

```
            rate                      en, frame_len
             |                              |
      +-------------+   row_rd[1:0]   +-----------+
      | spad_array  |<----------------| daq_ctrl  |---- frame_no
      | 2 x 16 pix  |                 +-----------+
      +-------------+                   | row_sel  | frame_end
      hit[0]  | hit[1]                  |          |
        +-----v---v-----+               |          |
        |   row_mux     |<--------------+          |
        +-------+-------+                          |
                | 16 bits                          |
        +-------v-------+                          |
        |   hit_count   |  0..16                   |
        +-------+-------+                          |
                |          +--------------+        |
        +-------v-------+  |  pipo_reg    |<-- clr-+
        |   bk_adder    |->|  (u_acc)     |        |
        |  16-bit BK    |<-|  running cnt |        |
        +-------+-------+  +--------------+        |
                | saturate                         |
        +-------v-------+                          |
        |  pipo_reg     |<-- load -----------------+
        |  (u_out)      |--> count_out, overflow_out, count_valid
        +---------------+
```

## The SPAD array model (`spad_array`)

A real SPAD is biased above its breakdown voltage. An absorbed photon triggers
an avalanche, and a quench circuit then stops it and recharges the diode. The
model keeps the part of this behaviour that the counter sees:

- **Photon arrival.** Each pixel has its own 16-bit Fibonacci LFSR (taps
  16, 14, 13, 11). The LFSR advances 8 steps per clock. A photon arrives at a
  pixel in a clock when the LFSR's low byte is below `rate`. The arrival
  probability is therefore `rate/256` per pixel per clock. Pixel `(r,c)` is
  seeded with `SEED ^ (k·0x9E37)` where `k = r·16 + c + 1`. A zero result is
  replaced by 1.
- **Dead time.** A detected photon sets the pixel's `hit` bit. The pixel then
  stays fired, and any further photons on it are lost, until its row is read.
- **Recharge on read.** When `row_rd[r]` is high, row `r` is recharged at the
  clock edge. A photon that arrives in that same clock is kept for the next
  read, so nothing is lost at the read boundary.

`hit` is registered. A photon drawn in clock *t* is therefore visible in
clock *t*+1.

## Reading and counting (`daq_ctrl`, `row_mux`, `hit_count`, `bk_adder`, `pipo_reg`)

While `en` is high, `daq_ctrl` alternates `row_sel` between 0 and 1 every
clock and raises the matching `row_rd` bit. Each pixel is therefore read, and
recharged, once every two clocks. Within the same clock:

1. `row_mux` passes the selected row's 16 hit bits.
2. `hit_count` turns them into a photon number from 0 to 16.
3. `bk_adder` adds that number to the running count held in the accumulator
   `pipo_reg`.

There is no pipeline. The new count is in the accumulator at the next edge.

**Frames.** `daq_ctrl` counts enabled clocks. In the last clock of every
`frame_len` clocks it raises `frame_end`. A `frame_len` of 0 is treated as 1.
On that edge, the sum, including that clock's photons, is loaded into the
output `pipo_reg`, and the accumulator is cleared. One clock later
`count_out` holds the frame's photon count, `count_valid` pulses for one
clock, and `frame_no` has been incremented. `frame_len` may change at any
time. The new value applies to the frame in progress.

**Pausing.** When `en` is low, the count, the frame position and the row
sequence all hold. The array keeps detecting photons, and its pixels stay
fired until read.

**Overflow.** At most 16 photons are added per clock. Frames of up to 4095
clocks can therefore never exceed 65535. If the adder carries out in a longer
frame, the count sticks at `0xFFFF` for the rest of that frame and
`overflow_out` is set along with that frame's count.

## The Brent-Kung adder

`bk_adder` forms a per-bit generate (`a&b`) and propagate (`a^b`). The carry
in is folded into bit 0's generate. It then combines these with the prefix
operator `(g1,p1)∘(g0,p0) = (g1 | p1·g0, p1·p0)` in two sweeps:

- **Up-sweep**, levels `l = 0 … log2(W)−1`. Each bit `i` with
  `(i+1) mod 2^(l+1) = 0` absorbs the group `2^l` below it. For 16 bits this
  produces the full prefixes of bits 1, 3, 7 and 15, plus partial groups
  elsewhere.
- **Down-sweep**, levels `l = log2(W)−2 … 0`. Each bit with
  `(i+1) mod 2^l = 0` that is not already complete absorbs the complete prefix
  `2^l` below it: bit 11 first, then bits 5, 9 and 13, then all remaining even
  bits.

The sum is then `sum[i] = p[i] ^ carry[i−1]`. At 16 bits this takes 26 prefix
cells in 7 levels. A Kogge-Stone network needs 49 cells in 4 levels. `WIDTH`
must be a power of two.

## Interface of the top (`photon_daq_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | single clock for everything |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `en` | in | 1 | acquisition runs while high |
| `rate` | in | 8 | photon probability of the SPAD model, `rate/256` per pixel per clock |
| `frame_len` | in | `FRAME_W` (20) | clocks per frame |
| `count_out` | out | `COUNT_W` (16) | photons in the last finished frame |
| `overflow_out` | out | 1 | that frame saturated |
| `count_valid` | out | 1 | one-clock pulse when a new frame count appears |
| `frame_no` | out | 16 | number of finished frames (wraps) |

The parameters are `N_COLS` (16), `COUNT_W` (16) and `FRAME_W` (20). The
number of rows is fixed at 2 in `daq_pkg` because the multiplexer is 2-to-1.

## What follows the reference design and what does not

These parts follow the reference design:

- the 16×2 array;
- a random signal generator standing in for the SPADs;
- the 16-bit 2-to-1 multiplexer;
- the 16-bit Brent-Kung adder as the counting element;
- a PIPO register after the adder.

The reference design names these blocks but does not say how they connect.
The following are choices made here:

- **Sequencing and counting.** Alternate-row reading, the population count
  between the multiplexer and the adder, and the frame structure with
  run-time `frame_len`.
- **Overflow and reset.** Saturation on overflow, and synchronous active-low
  reset.
- **Photon model.** The LFSR photon model with its `rate` encoding, and
  recharge-on-read as the pixel dead time.

Nothing in this RTL fixes the clock rate. The reference implementation
reports about 680 MHz for its layout in a 0.18 µm CMOS process. The SPAD
array it targets needs 200 MHz. With row alternation, reading every pixel at
that rate needs a 400 MHz system clock.

The reference design is compared against an older 16×1 system. That system
had a pulse discriminator, a clock divider, a parallel-in serial-out register
and a Kogge-Stone adder. Those parts are not included here.

## Files

- `rtl/daq_pkg.sv`: shared sizes.
- `rtl/spad_array.sv`, `rtl/daq_ctrl.sv`, `rtl/row_mux.sv`,
  `rtl/hit_count.sv`, `rtl/bk_adder.sv`, `rtl/pipo_reg.sv`: the blocks.
- `rtl/photon_daq_top.sv`: the top.
- `tb/tb_<block>.sv`: a self-checking testbench for each block and for the
  top.
- `tb/spad_ref_pkg.sv`: an independent reference model of the pixel LFSRs.
  `tb_spad_array` and `tb_photon_daq_top` both use it.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/daq_pkg.sv tb/spad_ref_pkg.sv rtl/photon_daq_top.sv tb/tb_photon_daq_top.sv \
  --top-module tb_photon_daq_top -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl` because every module lives
in a file of its own name. The testbenches for `bk_adder`, `row_mux` and
`pipo_reg` need only `rtl/` and the testbench itself.

`tb_photon_daq_top` runs the top at its default parameters. It compares
every clock against the reference model and covers several kinds of frames:

- short frames at low, zero and medium photon rates;
- pauses inside frames;
- a change of frame length;
- two 5000-clock frames at a high rate that saturate.

It fails unless each of the following happened at least once: reads of each
row carrying photons, empty frames, saturated frames, paused clocks, photons
lost on fired pixels, and pixels holding a hit across the other row's read.
`tb_spad_array` also checks that the measured hit fraction matches the
programmed probability.

## How far to trust it

All blocks pass lint with Verilator and elaborate with Yosys/slang.

- `tb_bk_adder` checks the adder exhaustively at 8 bits and on corner cases
  plus 20,000 random operand pairs at 16 bits.
- Every testbench has been seen to fail against a deliberately broken copy of
  its block.

Timing, area and power have not been characterized for this RTL.
