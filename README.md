# Two SDL-style designs in synthesizable SystemVerilog

This RTL contains two small designs. Each was first specified as a set of
communicating SDL processes: state machines that exchange messages over
channels. Here each one is written as synchronous hardware.

* **Polygon edge walker** (`poly_gen_points`). It takes one edge of a
  polygon, (x1, y1) to (x2, y2). For every scan line the edge crosses, it
  sends the point where the line meets the edge. A horizontal fill line runs
  between the points that two edges give for the same y. Five processes do
  the work and talk over send/acknowledge/data channels.
* **E1 drop/insert unit** (`drop_insert`). It works on a 2.048 Mbit/s E1
  line, whose frames have 32 time slots of 8 bits. It finds the frame
  alignment, takes the contents of selected slots out of the received frames
  (drop), and replaces selected slots on the way out with local bytes
  (insert).

The two designs share nothing. `sdl_hw_top` places them side by side, each
with its own clock and reset.

The process structure and what each process does come from the published
case study "Modeling of Embedded Digital Systems from SDL Language: a Case
Study". That includes the five Polygon processes, their channel names and the
fan-out of `delta_y`. It also includes the E1 frame format, the use of slot 0
for synchronisation and the 2.048 MHz bit rate. The case study gives no
internals for any of them. Number formats, the divider, the edge-stepping
scheme, handshake timing and the whole inside of the E1 unit are this
design's own choices. They are listed under "Where the design is its own"
below.

## The channel handshake

Every arrow between Polygon processes is an `sdl_chan` interface: `send`,
`ack` and `data`.

* A word moves in the clock cycle in which `send` and `ack` are both high.
* A sender that raised `send` must keep it high, with `data` unchanged, until
  that cycle. An assertion in the interface checks this rule.
* Each process has a one-word holding register on each input
  (`chan_in_reg`). Its `ack` is simply "register empty", so a word is taken
  the first cycle it is offered.
* Each output has a one-word register (`chan_out_reg`) that offers its word
  until it is acknowledged.
* A process "fires" when all its inputs are full and all its outputs are
  free. Firing clears the inputs and loads the outputs.

As a result, the inputs of a process may arrive in any order and at any
time. A slow receiver stalls only the processes that feed it. When one
output feeds two receivers (`delta_y`), each copy completes its own
handshake, and the process takes its next inputs only after both copies are
gone.

At the ports of `poly_gen_points` and `sdl_hw_top`, the channels appear as
plain vectors:

| index | input channel | carries |
|---|---|---|
| 0 | ci1   | x1 |
| 1 | ci3   | x2 |
| 2 | ci2   | y1 |
| 3 | ci4   | y2 |
| 4 | ci2_2 | y1 (copy for displac_y) |
| 5 | ci4_1 | y2 (copy for displac_y) |
| 6 | ci1_1 | x1 (copy for point_gen) |
| 7 | ci2_1 | y1 (copy for point_gen) |

The environment sends each coordinate on every channel that carries a copy
of it.

The outputs are:

* `co_send[0]`: pnt_x, on `co1_data`
* `co_send[1]`: pnt_y, on `co2_data`
* `co_send[2]`: done_ok, an event with no data

## The Polygon edge walker

```
 x1,x2 ──> delta_x ──(delta_x)──┐
 y1,y2 ──> delta_y ──(delta_y)──┴─> displac_x ──(displac_x)──┐
                   └─(delta_y2)───────────────────────────────┤
 y1,y2 ──> displac_y ──(displac_y)────────────────────────────┼─> point_gen ─> pnt_x, pnt_y, done_ok
 x1,y1 ───────────────────────────────────────────────────────┘
```

All values are signed 32-bit integers (`WIDTH`, the width of an SDL
integer).

* **delta_x**, **delta_y**: compute x2 - x1 and y2 - y1. `delta_y` sends its
  result twice: to `displac_x` and, as delta_y2, to `point_gen`.
* **displac_y**: compares y1 with y2. It sends +1 when y2 >= y1 and -1
  otherwise; this is the scan direction.
* **displac_x**: computes the inverse slope as a fixed-point number with
  `FRAC` = 16 fraction bits: `q = trunc(delta_x * 2^16 / delta_y)`.
  * It is a radix-2 restoring divider on magnitudes, with the sign applied at
    the end. It produces one quotient bit per cycle, so a division takes
    WIDTH + FRAC = 48 cycles.
  * A zero divisor (a horizontal edge) gives 0.
  * Only the low 32 bits of the quotient are sent. The result is exact only
    while |dx/dy| < 2^15.
* **point_gen**: copies the five values of an edge into working registers,
  which frees its inputs for the next edge. It then emits |dy| + 1 points.
  For line i it sends
  `y = y1 + s*i` and `x = floor((x1*2^16 + s*i*q) / 2^16)`, with s = ±1.
  * x is kept in a 48-bit accumulator, and s*q is added once per line.
  * pnt_x and pnt_y are offered together. The next point is offered only
    after both have been acknowledged.
  * done_ok follows the last point. The next edge starts only after done_ok
    has been acknowledged, so an edge's points and its done_ok never
    overtake each other.

The truncated slope makes x lag the exact crossing slightly. On line i, an
emitted x is off the true intersection by at most 1 + i/65536 units: one
unit from the floor and up to 2^-16 per line from truncating the slope. The
testbenches check this bound.

**Timing:** with all inputs offered together and receivers that are always
ready, the first point of an edge appears 56 cycles later (WIDTH + FRAC + 8).
Each further point follows 2 cycles after the previous one. A lone pair
takes 2 cycles through `delta_x`, `delta_y` or `displac_y`, and 51 cycles
through `displac_x`.

## The E1 drop/insert unit

One received bit enters per cycle of a 2.048 MHz clock (488 ns per bit).
There are three blocks.

**`e1_frame_sync`** finds where frames start. Slot 0 of every other frame
carries the alignment word `0011011` in bits 2..8. The frames in between
carry a 1 in bit 2.

* While hunting, a 7-bit window of the latest bits is compared with the
  word. A match sets the bit counter.
* Alignment is declared when, one frame later, bit 2 of slot 0 is 1, and one
  more frame later the word is there again (`ST_HUNT` → `ST_CHK_NFAS` →
  `ST_CHK_FAS` → `ST_SYNC`).
* While aligned, the word is checked every other frame. Alignment is lost
  after `LOSS_FAS` = 3 consecutive errored words; one or two errored words
  are tolerated.
* Every bit leaves one cycle later, on `bit_o`, labelled with its slot
  (`slot_o`), its bit number (`bitn_o`, 0 = first bit of the slot, the MSB),
  `in_sync` and `frame_start`.

The search is serial. Payload that happens to contain the word can lead it
into a false start, which costs one or two frames before it resumes.
Re-alignment time therefore depends on the traffic. This is also true of the
standard serial search. CRC-4 multiframes are not handled.

**`e1_drop`** acts on every slot enabled in `drop_mask`. It collects the
slot's 8 bits, first bit into the MSB. One cycle after the last bit, it
strobes `drop_valid` with `drop_slot` and `drop_data`.

**`e1_insert`** holds a 32 × 8 buffer, written at any time through
`ins_we` / `ins_addr` / `ins_wdata`.

* In every slot enabled in `ins_mask`, it sends the buffered byte, MSB
  first, in place of the received bits.
* Everything else passes through unchanged: slot 0 always, and the whole
  line while not aligned.
* `tx_bit` is registered.
* The buffer is not reset, so write a slot before enabling it.

**End to end:** `rx_bit` reaches `tx_bit` 2 cycles later. A dropped byte is
strobed 2 cycles after its last bit. Nothing is dropped or inserted unless
`in_sync` is high, and slot 0 is never touched; its mask bits are ignored.

## Where the design is its own

* **Channel timing.** The handshake is synchronous and single-cycle. Each
  input signal has its own register. A design generated automatically from
  SDL would serialise all the inputs of a process through one input port, at
  a large cost in cycles. That serialisation is not reproduced here.
* **Polygon arithmetic.** These are all this design's choices:
  * the direction encoding (±1)
  * the fixed-point slope (16 fraction bits)
  * the divide-by-zero result
  * the floor rounding of x
  * the count of |dy| + 1 points per edge, including one point for a
    horizontal edge
  * the operand order (end minus start)
* **Polygon speed.** The published manual implementation filled its test
  polygon in 30 cycles. The polygon used is not known. Here an edge costs at
  least 56 cycles, dominated by the bit-serial divider. A faster divider (a
  higher radix or a combinational one) would be a local change inside
  `displac_x`.
* **E1 unit.** Only its function is given: drop and insert time slots of an
  E1 frame, synchronised on slot 0, at 2.048 MHz. The alignment procedure is
  a simplified form of the E1 standard's. The split into sync, drop and
  insert blocks and the user interfaces (byte strobe, per-slot insert
  buffer, slot masks) are this design's own.
* **Reset.** All control state resets asynchronously on `rst_n` low. The
  insert buffer is not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` (poly) | 32 | width of every channel word (an SDL integer) |
| `FRAC` (poly) | 16 | fraction bits of the slope |
| `SLOTS` (E1) | 32 | time slots per frame |
| `SLOT_BITS` (E1) | 8 | bits per slot |

The shared defaults live in `poly_pkg` and `e1_pkg`. The E1 frame sync
assumes slot 0 holds the 8-bit alignment byte. The top brings out 32-slot
E1 ports.

## Files

| file | content |
|---|---|
| `rtl/poly_pkg.sv`, `rtl/e1_pkg.sv` | shared constants and the frame-sync state type |
| `rtl/sdl_chan.sv` | the channel interface and its hold assertion |
| `rtl/chan_in_reg.sv`, `rtl/chan_out_reg.sv` | channel ends |
| `rtl/delta_x.sv`, `rtl/delta_y.sv`, `rtl/displac_y.sv`, `rtl/displac_x.sv`, `rtl/point_gen.sv` | the five Polygon processes |
| `rtl/poly_gen_points.sv` | the Polygon system with plain ports |
| `rtl/e1_frame_sync.sv`, `rtl/e1_drop.sv`, `rtl/e1_insert.sv`, `rtl/drop_insert.sv` | the E1 unit |
| `rtl/sdl_hw_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_chan_src.sv`, `tb/tb_chan_sink.sv` | random-stall channel drivers |
| `tb/tb_poly_ref.sv` | reference model of the edge points |
| `tb/tb_e1_ref.sv` | E1 stream generator |

## Simulating

Every testbench checks its module against a model of its own. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs.

`tb_sdl_hw_top` runs both designs at their default parameters. It covers:

* a pentagon, a downward edge, a horizontal edge and random edges, with
  random stalls on every channel
* 30 E1 frames in which alignment is gained, survives two errored words, is
  lost after three and is gained again, with random drop and insert masks

It counts each of these mechanisms and fails if one never happens.

To run it with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/poly_pkg.sv rtl/e1_pkg.sv tb/tb_poly_ref.sv tb/tb_e1_ref.sv \
  tb/tb_sdl_hw_top.sv --top-module tb_sdl_hw_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way: replace the testbench file and the
`--top-module` name. Verilator simulates with two states, so the testbenches
reset or write everything they later read.

Lint with:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/poly_pkg.sv rtl/e1_pkg.sv rtl/sdl_hw_top.sv
```

It reports two kinds of warning, both intended:

* unused package constants
* `rst_n` used both asynchronously and by the assertion's clocked disable
  condition
