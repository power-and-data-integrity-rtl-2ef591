// simon_key_serial: bit-serialized SIMON key expansion for m = 4.
//
// Four N-bit key words circulate one bit per clock, LSB first, through a
// 4N-bit chain. At the start of round i the chain holds, from the entry to the
// exit, k_{i+3}, k_{i+2}, k_{i+1}, k_i. In clock j the exit bit k_i[j] is the
// round key bit (key_out), and the bit k_{i+4}[j] made by the key LUT enters
// the chain, so after N clocks the chain holds k_{i+4} .. k_{i+1}.
//
// Each word store is a bit FIFO followed by a few tapped flip-flops:
//   k_{i+3}: FIFO_3 (N-4) + FIFO_3_FF (4 flops); >>4 is FIFO_3's last
//            stage, >>3 the first flop of FIFO_3_FF
//   k_{i+2}: FIFO (N-4) + 4 flops, same taps, used once the k_{i+3} bits have
//            moved on (wrap-around of the right rotations)
//   k_{i+1}: FIFO_1 (N-2) + 2 flops, taps >>0 and >>1
//   k_i   : FIFO_0 (N-2) + 2 flops, exit = key_out, second flop used for the
//            wrapped >>1 of k_{i+1} in the last bit
// Tap multiplexers: k_{i+3}[j+3] is read from the k_{i+3} store for j < N-3
// and from the k_{i+2} store after; k_{i+3}[j+4] likewise for j < N-4;
// k_{i+1}[j+1] from the k_{i+1} store for j < N-1 and from FIFO_0 for j = N-1.
// The store sizes 12 + 4 (k_{i+3}) and 14 + 2 (k_{i+1}), the LUT for the new
// key bit and the "Initial Key" entry follow the bit-serial key expansion the
// core is built on; the tapped k_{i+2} and k_i stores and the tap
// multiplexers that handle the wrap-around are this design's own.
//
// Interface: the chain moves on a rising clk edge when shift is high; load
// selects key_in (initial key, k_0 LSB first up to k_3 MSB, 4N shifts) instead
// of the LUT output. bit_idx is j, z_bit is z_i.
module simon_key_serial #(
  parameter int unsigned N = simon_pkg::WORD_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  input  logic                 load,
  input  logic                 key_in,
  input  logic [$clog2(N)-1:0] bit_idx,
  input  logic                 z_bit,
  output logic                 key_out
);

  logic       entry_bit, lut_out;
  logic       k3_fifo_out, k2_fifo_out, k1_fifo_out, k0_fifo_out;
  logic [3:0] k3_ff_q, k2_ff_q;  // [3] first, [0] last of each word store
  logic [1:0] k1_ff_q, k0_ff_q;
  logic       k1_s1, k3_s3, k3_s4;

  assign entry_bit = load ? key_in : lut_out;

  // k_{i+3} store: FIFO_3 and FIFO_3_FF
  bit_fifo #(.DEPTH(N - 4)) u_fifo_3 (
    .clk, .rst_n, .shift, .din(entry_bit), .dout(k3_fifo_out)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k3_ff_q <= '0;
    else if (shift) k3_ff_q <= {k3_fifo_out, k3_ff_q[3:1]};
  end

  // k_{i+2} store
  bit_fifo #(.DEPTH(N - 4)) u_fifo_2 (
    .clk, .rst_n, .shift, .din(k3_ff_q[0]), .dout(k2_fifo_out)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k2_ff_q <= '0;
    else if (shift) k2_ff_q <= {k2_fifo_out, k2_ff_q[3:1]};
  end

  // k_{i+1} store: FIFO_1 and two flops
  bit_fifo #(.DEPTH(N - 2)) u_fifo_1 (
    .clk, .rst_n, .shift, .din(k2_ff_q[0]), .dout(k1_fifo_out)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k1_ff_q <= '0;
    else if (shift) k1_ff_q <= {k1_fifo_out, k1_ff_q[1]};
  end

  // k_i store (FIFO_0)
  bit_fifo #(.DEPTH(N - 2)) u_fifo_0 (
    .clk, .rst_n, .shift, .din(k1_ff_q[0]), .dout(k0_fifo_out)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k0_ff_q <= '0;
    else if (shift) k0_ff_q <= {k0_fifo_out, k0_ff_q[1]};
  end

  // Tap multiplexers for the wrap-around of the right rotations.
  always_comb begin
    k1_s1 = (32'(bit_idx) < N - 1) ? k1_ff_q[1] : k0_ff_q[1];
    k3_s3 = (32'(bit_idx) < N - 3) ? k3_ff_q[3] : k2_ff_q[3];
    k3_s4 = (32'(bit_idx) < N - 4) ? k3_fifo_out : k2_fifo_out;
  end

  simon_key_lut #(.N(N)) u_lut (
    .ki(k0_ff_q[0]), .k1_s0(k1_ff_q[0]), .k1_s1, .k3_s3, .k3_s4,
    .z_bit, .bit_idx, .out(lut_out)
  );

  assign key_out = k0_ff_q[0];

  initial begin
    assert (N >= 8) else $error("simon_key_serial: N must be at least 8");
  end

endmodule
