// simon_core: bit-serialized SIMON32/64 block cipher core.
//
// SIMON32/64 encrypts a 32-bit block held as two 16-bit words with a 64-bit
// key in 32 rounds. This core is built for the smallest area: it processes a
// single bit of a single round per clock, so every register is a one-bit FIFO
// and the only logic is one round-function bit, one key-expansion bit, a few
// tap multiplexers and the counters. A round takes N = 16 clocks and an
// encryption 32 x 16 = 512 clocks.
//
//   simon_ctrl          phases, bit and round counters, round constant z_i
//   simon_round_serial  state store (x, y) and round function
//   simon_key_serial    key store (k_i .. k_{i+3}) and key LUT
//
// Use (all signals synchronous to clk, rst_n asynchronous active low):
//   1. While idle, hold key_load high for 4N clocks presenting the key on
//      key_in: k_0 LSB first, then k_1, k_2, k_3 (k_3 is the most significant
//      word of the usual key notation).
//   2. While idle, hold text_load high for 2N clocks presenting the plaintext
//      on text_in: lower word y LSB first, then upper word x. Steps 1 and 2
//      may overlap.
//   3. Pulse start. busy rises after the edge that samples it. T*N = 512
//      clock edges later ct_valid rises; it stays high for 2N clocks while
//      ct_out gives y then x of the ciphertext, LSB first; ct_out is 0
//      otherwise. busy then falls.
// The key store holds k_T .. k_{T+3} afterwards; reload the key before the
// next block. The cipher, word sizes, round count and the serial one-bit-per-
// clock structure follow the document; the load/start/output protocol and
// bit order are this design's own.
module simon_core #(
  parameter int unsigned N = simon_pkg::WORD_BITS,
  parameter int unsigned T = simon_pkg::NUM_ROUNDS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic key_load,
  input  logic key_in,
  input  logic text_load,
  input  logic text_in,
  input  logic start,
  output logic busy,
  output logic ct_valid,
  output logic ct_out
);
  import simon_pkg::*;

  logic                 key_shift, key_ld, dp_shift, z_bit, out_en, key_bit;
  logic [$clog2(N)-1:0] bit_idx;
  dp_sel_e              dp_sel;

  simon_ctrl #(.N(N), .T(T)) u_ctrl (
    .clk, .rst_n, .key_load, .text_load, .start,
    .key_shift, .key_ld, .dp_shift, .dp_sel, .bit_idx, .z_bit, .out_en, .busy
  );

  simon_key_serial #(.N(N)) u_key (
    .clk, .rst_n, .shift(key_shift), .load(key_ld), .key_in,
    .bit_idx, .z_bit, .key_out(key_bit)
  );

  simon_round_serial #(.N(N)) u_round (
    .clk, .rst_n, .shift(dp_shift), .in_sel(dp_sel), .text_in,
    .bit_idx, .key_bit, .out_en, .ct_out
  );

  assign ct_valid = out_en;

endmodule
