# Bit-serial SIMON32/64 encryption core

SIMON is a lightweight Feistel block cipher meant for small IoT hardware.
This core implements the SIMON32/64 variant: it encrypts a 32-bit block,
held as two 16-bit words, with a 64-bit key made of four 16-bit words, in
32 rounds. It is built for the smallest possible area and power. Each clock
it computes **one bit of one round**, so the whole datapath is a single
round-function bit and a single key-expansion bit. Every register is a
1-bit-wide FIFO. One round takes 16 clocks and one encryption takes
32 × 16 = 512 clocks.

The core was designed as the logic content of a full-custom SIMON core. That
core was laid out in 45 nm as a 2D design and as two monolithic-3D designs:
one with nMOS and pMOS split between tiers, one with whole gates split between
tiers. Those were used to study power delivery and ground bounce. All three
layouts run the same logic, and only that logic is described here. Power
grids, inter-tier vias and tier assignment are physical design and are not
part of this RTL.

## The cipher, word by word

One round takes the state (x, y) to (x', y'), where rotations `<<<` are
left rotations of 16-bit words:

    x' = y ^ ((x <<< 1) & (x <<< 8)) ^ (x <<< 2) ^ k_i
    y' = x

Key expansion for four key words (m = 4) uses right rotations `>>>`. Round i
makes the key word k_{i+4}. That word is pushed in as the newest word, and
the oldest word, k_i, is used up as the round key:

    t       = (k_{i+3} >>> 3) ^ k_{i+1}
    k_{i+4} = ~k_i ^ 3 ^ z_i ^ t ^ (t >>> 1)

Here z_i is bit i of the constant sequence z0 of SIMON32/64, which has a
period of 62. It is kept in `simon_pkg::Z0_SEQ`, with z0[0] in bit 0.

Reference vector: the key is `1918 1110 0908 0100` (k_3 … k_0) and the
plaintext is `6565 6877` (x y). The ciphertext is `c69b e9bb`.

## One bit per clock: the wrap-around problem

Bits move least-significant first. In clock j of a round (j = 0 … 15) the core
produces bit j of the new x:

    x'[j] = (x[j-1] & x[j-8]) ^ x[j-2] ^ y[j] ^ k_i[j]      (indices mod 16)

The rotations make this harder than it looks. In the first clocks of a round,
x[j-1], x[j-2] and x[j-8] wrap around to the *high* bits of the old x. Those
bits have not yet been overwritten. In later clocks, the same taps point at
low bits of the old x, which have already left the x store. So each rotated
operand comes from one of two places, depending on j. This is the main idea
of the design and the part most worth reading in the code.

### State store (`simon_round_serial`)

    entry ─► Shift Register Up (8 ff) ─► FIFO_1 (8×1) ─┬─► FIFO_2 (16×1) ─► y[j]
                                                        └─► Shift Register Down (8 ff)

- **Shift Register Up and FIFO_1** hold x, 16 bits. New bits x'[j] enter at
  the top.
- **FIFO_2** holds y. Each old bit x[j] leaves FIFO_1 and enters FIFO_2,
  where it becomes y' for the next round. This is the `y' = x` swap, and it
  costs nothing.
- **Shift Register Down** keeps a copy of the last 8 old x bits that left
  FIFO_1. It exists only so that the wrapped taps can still be read.

Three 2:1 multiplexers choose the source of each tap:

| operand  | source while j is small            | source afterwards                 |
|----------|------------------------------------|-----------------------------------|
| x <<< 1  | Up, newest flop (j = 0)            | Down, newest flop (j ≥ 1)         |
| x <<< 2  | Up, second flop (j < 2)            | Down, second flop (j ≥ 2)         |
| x <<< 8  | Up, oldest flop (j < 8)            | Down, oldest flop (j ≥ 8)         |

After 16 clocks, Up and FIFO_1 hold x' and FIFO_2 holds y' = x. The next
round can start straight away. Storage is 40 flip-flops: 32 for the state
and 8 for the tap copy.

### Key store (`simon_key_serial`)

The four key words form one 64-bit chain. At the start of round i it holds,
from entry to exit, k_{i+3}, k_{i+2}, k_{i+1} and k_i. The exit bit is the
round-key bit k_i[j]. The new bit k_{i+4}[j] enters at the other end, so after
16 clocks the chain holds k_{i+4} … k_{i+1}. Written per bit, the key
equation becomes a six-input function. `simon_key_lut` computes it:

    k_{i+4}[j] = k_i[j] ^ k_{i+1}[j] ^ k_{i+1}[j+1] ^ k_{i+3}[j+3] ^ k_{i+3}[j+4] ^ c[j]
    c[j] = 1 for j ≥ 2,  c[1] = 0,  c[0] = z_i

These right rotations read bits *ahead* of the current one. They wrap too, and
in late clocks the bits have already moved on into the next word store:

| operand       | store while j is small                  | store afterwards            |
|---------------|-----------------------------------------|-----------------------------|
| k_{i+3}[j+4]  | k_{i+3}: last stage of FIFO_3 (j < 12)  | k_{i+2}: same place (j ≥ 12)|
| k_{i+3}[j+3]  | k_{i+3}: first FIFO_3_FF flop (j < 13)  | k_{i+2}: same place (j ≥ 13)|
| k_{i+1}[j+1]  | k_{i+1}: second flop (j < 15)           | k_i: second flop (j = 15)   |

Each word store is a 1-bit FIFO followed by the flops that are tapped:

- k_{i+3}: FIFO_3 12×1 followed by FIFO_3_FF, 4 flops.
- k_{i+2}: 12×1 followed by 4 flops.
- k_{i+1}: FIFO_1 14×1 followed by 2 flops.
- k_i: FIFO_0 14×1 followed by 2 flops.

That is 64 flip-flops in total.

## Using the core (`simon_core`)

| port        | dir | meaning |
|-------------|-----|---------|
| `clk`       | in  | clock; everything happens on the rising edge |
| `rst_n`     | in  | asynchronous reset, active low; clears every store |
| `key_load`  | in  | while idle, shift `key_in` into the key store this clock |
| `key_in`    | in  | key bit: k_0 LSB first, then k_1, k_2, and k_3 MSB last (64 bits) |
| `text_load` | in  | while idle, shift `text_in` into the state store this clock |
| `text_in`   | in  | plaintext bit: y LSB first, then x (32 bits) |
| `start`     | in  | while idle, begin the 32 rounds |
| `busy`      | out | rounds or output in progress; load and start requests are ignored |
| `ct_valid`  | out | `ct_out` carries a ciphertext bit |
| `ct_out`    | out | ciphertext bit: y LSB first, then x; held at 0 when not valid |

Sequence:

1. Load the key and the plaintext. They can be loaded one after the other or
   on the same clocks. The load enables may drop at any time to pause a load.
2. Pulse `start`.
3. The clock edge that samples `start` begins the rounds.
4. Exactly 512 edges later, `ct_valid` rises and stays high for 32 clocks
   while the ciphertext comes out.
5. `busy` then falls.

At 13.56 MHz, the clock the physical implementations were characterized at,
the 512 round clocks take about 37.8 µs.

After an encryption the key store holds k_32 … k_35, not the original key.
Reload the key before the next block.

`simon_ctrl` sequences the core. It has three phases: idle, round (a 4-bit
bit counter j and a 5-bit round counter i) and output (32 clocks with zeros
entering the state store). It drives the entry multiplexers and the shift
enables, and looks up z_i from the round counter.

## Files

| file | contents |
|------|----------|
| `rtl/simon_pkg.sv` | word size, round count, rotation amounts, z0 sequence, mux and phase enums |
| `rtl/simon_core.sv` | top level |
| `rtl/simon_ctrl.sv` | sequencer |
| `rtl/simon_round_serial.sv` | state store, tap multiplexers, output multiplexer |
| `rtl/simon_round_fn.sv` | one round-function bit |
| `rtl/simon_key_serial.sv` | key store and its tap multiplexers |
| `rtl/simon_key_lut.sv` | one key-expansion bit |
| `rtl/bit_fifo.sv` | DEPTH×1 bit FIFO (a shift register with enable) |
| `tb/simon_ref_pkg.sv` | word-level reference model: key schedule and encryption |
| `tb/tb_*.sv` | one self-checking testbench per module |

The parameters are `N` (word size, default 16) and `T` (rounds, default 32).
Only N = 16, T = 32 is a defined SIMON variant with this z0 sequence. Other
values elaborate but do not give a standard cipher. The tapped registers of
the state store are 8 flops because the largest rotation is 8. The key store
assumes m = 4 key words.

## Simulation

Every testbench compares the design with independently computed values and
ends with `TB_RESULT checks=<n> failures=<n>`. `tb_simon_core` runs the whole
core at its default size. It encrypts the reference vector and random blocks,
with loads overlapped, separate and paused. It checks the 512-clock latency,
checks that `ct_out` is 0 outside `ct_valid`, and checks that requests made
while busy are ignored. Each of those cases is counted and must occur. To run
it with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_simon_core \
      rtl/simon_pkg.sv tb/simon_ref_pkg.sv rtl/bit_fifo.sv rtl/simon_round_fn.sv \
      rtl/simon_key_lut.sv rtl/simon_round_serial.sv rtl/simon_key_serial.sv \
      rtl/simon_ctrl.sv rtl/simon_core.sv tb/tb_simon_core.sv
    ./obj_dir/Vtb_simon_core

To run a different testbench, change the top module and the last file. For
example, `tb_simon_key_serial` checks every round-key bit of 32 rounds against
the word-level key schedule. `tb_simon_round_serial` drives the state store
with reference round keys.

## What follows the source architecture and what is this design's own

These parts follow the bit-serial architecture this core is based on:

- the cipher parameters: 32-bit block, 64-bit key, m = 4, 32 rounds;
- one bit of one round per clock;
- the state stores: FIFO_1 8×1, FIFO_2 16×1, and the two 8-flop shift
  registers called Up and Down;
- three 2:1 tap multiplexers that feed the round-function bit;
- an output multiplexer with a constant 0;
- in the key store: FIFO_3 12×1 with FIFO_3_FF 4×1, FIFO_1 14×1 with two
  flops, the 16-bit FIFO_0 that gives the round key, and a single LUT for the
  new key bit.

These parts are this design's own:

- **The wiring between the state stores and the tap-select rule.** Here,
  Shift Register Down is a copy of the bits that leave FIFO_1. The source
  architecture has extra multiplexers in front of FIFO_1 and the shift
  registers; they are not reproduced.
- **The handling of wrap-around in the key store.** This design taps the
  k_{i+2} store and the second bit of FIFO_0. The source architecture also
  has a 4-flop LUT output delay (LUT_FF) and a multiplexer in front of the
  k_{i+2} FIFO. Neither is used here, and the k_{i+2} FIFO and FIFO_0 are
  each split into a FIFO plus tapped flops.
- **The controller.** This includes the load/start/output handshake, the
  bit order (LSB first, lower word first), the 32-clock output phase and the
  asynchronous reset that clears all stores.
- **The key equation written out bit by bit**, and the z0 sequence. Both come
  from the SIMON cipher definition.

The core is verified against the published SIMON32/64 test vector and against
an independent word-level model. Cycle accuracy with respect to the original
custom layouts has not been established: their exact bit timing is not known.
