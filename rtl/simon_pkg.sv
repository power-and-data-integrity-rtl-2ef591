// simon_pkg: constants and types shared by the bit-serial SIMON32/64 core.
//
// SIMON32/64 encrypts a 32-bit block (two 16-bit words) with a 64-bit key
// (four 16-bit words, m = 4) in 32 rounds. The core processes one bit of one
// round per clock, so a round takes WORD_BITS clocks. The round constant
// sequence z0 belongs to the SIMON cipher definition itself: bit i of Z0_SEQ
// is z0[i], the constant XORed into bit 0 of the key word made in round i.
package simon_pkg;

  localparam int unsigned WORD_BITS  = 16;  // n: word size of SIMON32/64
  localparam int unsigned NUM_ROUNDS = 32;  // T: rounds of SIMON32/64

  // Rotation amounts of the round function and of the key expansion.
  localparam int unsigned ROT_A = 1;  // x <<< 1 (AND input)
  localparam int unsigned ROT_B = 8;  // x <<< 8 (AND input)
  localparam int unsigned ROT_C = 2;  // x <<< 2 (XOR input)

  // z0 sequence, z0[0] in bit 0 (period 62).
  localparam int unsigned Z_LEN = 62;
  localparam logic [Z_LEN-1:0] Z0_SEQ =
      62'b01100111000011010100100010111110110011100001101010010001011111;

  // Entry multiplexer of the state store (in front of Shift Register Up).
  typedef enum logic [1:0] {
    SEL_TEXT  = 2'd0,  // serial plaintext input
    SEL_ROUND = 2'd1,  // new bit from the round function
    SEL_ZERO  = 2'd2   // zero, while the ciphertext is shifted out
  } dp_sel_e;

  // Phases of the sequencer.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,  // loading key / plaintext, waiting for start
    PH_ROUND = 2'd1,  // NUM_ROUNDS x WORD_BITS clocks of encryption
    PH_OUT   = 2'd2   // 2 x WORD_BITS clocks of serial ciphertext output
  } phase_e;

endpackage
