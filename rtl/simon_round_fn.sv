// simon_round_fn: one bit of the SIMON round function.
//
// The SIMON round maps (x, y) to (y ^ ((x<<<1) & (x<<<8)) ^ (x<<<2) ^ k, x).
// In the bit-serial core the rotations are realised by picking the right
// stored bits (see simon_round_serial), so this block only combines five
// bits: out = (s1 & s8) ^ s2 ^ s0 ^ key, where s1, s8, s2 are bit j of x
// rotated left by 1, 8 and 2, s0 is bit j of the lower word y and key is bit j
// of the round key. Purely combinational; the operations are those of the
// cipher definition.
module simon_round_fn (
  input  logic s1,   // (x <<< 1)[j]
  input  logic s8,   // (x <<< 8)[j]
  input  logic s2,   // (x <<< 2)[j]
  input  logic s0,   // y[j]
  input  logic key,  // k_i[j]
  output logic out   // new x[j]
);

  always_comb out = (s1 & s8) ^ s2 ^ s0 ^ key;

endmodule
