// simon_key_lut: one bit of the SIMON key expansion for m = 4 key words.
//
// The key word made in round i is
//   k_{i+4} = ~k_i ^ 3 ^ z_i ^ t ^ (t >>> 1),  t = (k_{i+3} >>> 3) ^ k_{i+1},
// which is, bit j at a time (indices modulo N),
//   k_{i+4}[j] = k_i[j] ^ k_{i+1}[j] ^ k_{i+1}[j+1] ^ k_{i+3}[j+3]
//              ^ k_{i+3}[j+4] ^ c[j],
// with c[j] = 1 for j >= 2, c[0] = z_i and c[1] = 0 (c = 2^N - 4 ^ z_i).
// The caller supplies the five key bits already selected for bit j; this
// block adds the constant. Combinational; small enough to be one 6-input
// look-up table plus the bit-position decode.
module simon_key_lut #(
  parameter int unsigned N = simon_pkg::WORD_BITS
) (
  input  logic                 ki,     // k_i[j]
  input  logic                 k1_s0,  // k_{i+1}[j]
  input  logic                 k1_s1,  // k_{i+1}[j+1]
  input  logic                 k3_s3,  // k_{i+3}[j+3]
  input  logic                 k3_s4,  // k_{i+3}[j+4]
  input  logic                 z_bit,  // z_i
  input  logic [$clog2(N)-1:0] bit_idx,
  output logic                 out     // k_{i+4}[j]
);

  logic const_bit;

  always_comb begin
    unique case (bit_idx)
      '0:      const_bit = z_bit;
      'd1:     const_bit = 1'b0;
      default: const_bit = 1'b1;
    endcase
    out = ki ^ k1_s0 ^ k1_s1 ^ k3_s3 ^ k3_s4 ^ const_bit;
  end

endmodule
