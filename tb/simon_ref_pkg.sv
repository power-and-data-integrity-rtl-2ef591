// simon_ref_pkg: word-level reference model of SIMON32/64 for the testbenches.
//
// Written from the cipher definition with whole-word rotations, independent of
// the bit-serial RTL: key_schedule() expands the four key words into the
// round keys, encrypt() runs the rounds on (x, y).
package simon_ref_pkg;

  typedef logic [15:0] word_t;
  typedef word_t       keys_t [64];

  // z0, first element = z0[0]
  localparam string Z0_STR =
      "11111010001001010110000111001101111101000100101011000011100110";

  function automatic logic z0(int i);
    return (Z0_STR[i % 62] == "1");
  endfunction

  function automatic word_t rol(word_t v, int r);
    return word_t'((v << r) | (v >> (16 - r)));
  endfunction

  function automatic word_t ror(word_t v, int r);
    return word_t'((v >> r) | (v << (16 - r)));
  endfunction

  // k[0..3] given; fills k[4..nkeys-1]
  function automatic void key_schedule(ref keys_t k, input int nkeys);
    word_t t;
    for (int i = 4; i < nkeys; i++) begin
      t = ror(k[i-1], 3) ^ k[i-3];
      t = t ^ ror(t, 1);
      k[i] = ~k[i-4] ^ t ^ word_t'(z0(i - 4)) ^ 16'd3;
    end
  endfunction

  function automatic void encrypt(input keys_t k, input int rounds,
                                  inout word_t x, inout word_t y);
    word_t t;
    for (int i = 0; i < rounds; i++) begin
      t = x;
      x = y ^ (rol(x, 1) & rol(x, 8)) ^ rol(x, 2) ^ k[i];
      y = t;
    end
  endfunction

endpackage
