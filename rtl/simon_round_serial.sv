// simon_round_serial: bit-serialized SIMON round datapath.
//
// The 2N-bit state (upper word x, lower word y) circulates one bit per clock,
// least significant bit first, through four one-bit stores:
//
//   entry mux -> Shift Register Up (8 flops) -> FIFO_1 (N-8) -> FIFO_2 (N) -> y
//                                                       \-> Shift Register Down (8 flops)
//
// Shift Register Up and FIFO_1 hold x, FIFO_2 holds y. In clock j of a round
// the round function takes y[j] from FIFO_2 and the key bit k_i[j], and its
// result x'[j] enters Shift Register Up. The old bit x[j] leaves FIFO_1 at the
// same time and goes into FIFO_2, where it becomes y' of the next round, and
// into Shift Register Down, which keeps a copy of the last 8 old bits of x.
// The rotated taps of x wrap around the word, so each has a 2:1 multiplexer:
//   x<<<1 : Shift Register Up top flop for j = 0, else Down first flop
//   x<<<2 : Up second flop for j < 2,          else Down second flop
//   x<<<8 : Up last flop   for j < 8,          else Down last flop
// After N clocks the new x fills Up + FIFO_1 and the old x fills FIFO_2.
//
// The stores, their sizes (8 flops, 8 flops, 8x1, 16x1 at N = 16) and the
// three tap multiplexers are those of the bit-serial round function this
// core follows; the exact routing between them and the tap-select rule above
// are this design's own.
//
// Interface: everything moves on a rising clk edge when shift is high.
// in_sel picks the bit entering Shift Register Up: text_in (loading, lower
// word first, LSB first), the round function output, or zero. Loading 2N bits
// fills the state. ct_out is FIFO_2's output when out_en is high, else 0: after
// the last round, 2N further shifts put out y then x, LSB first.
module simon_round_serial #(
  parameter int unsigned N = simon_pkg::WORD_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  input  simon_pkg::dp_sel_e   in_sel,
  input  logic                 text_in,
  input  logic [$clog2(N)-1:0] bit_idx,
  input  logic                 key_bit,
  input  logic                 out_en,
  output logic                 ct_out
);
  import simon_pkg::*;

  localparam int unsigned SR = ROT_B;  // flops in each tapped shift register

  logic [SR-1:0] sr_up_q;  // [SR-1] = newest bit
  logic [SR-1:0] sr_dn_q;  // [0]    = newest bit
  logic          fifo1_out, fifo2_out;
  logic          entry_bit, rf_out;
  logic          tap1, tap2, tap8;

  // Entry multiplexer.
  always_comb begin
    unique case (in_sel)
      SEL_TEXT:  entry_bit = text_in;
      SEL_ROUND: entry_bit = rf_out;
      default:   entry_bit = 1'b0;
    endcase
  end

  // Shift Register Up: newest x bits, tapped for the unwrapped rotations.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr_up_q <= '0;
    else if (shift) sr_up_q <= {entry_bit, sr_up_q[SR-1:1]};
  end

  bit_fifo #(.DEPTH(N - SR)) u_fifo_1 (
    .clk, .rst_n, .shift, .din(sr_up_q[0]), .dout(fifo1_out)
  );

  bit_fifo #(.DEPTH(N)) u_fifo_2 (
    .clk, .rst_n, .shift, .din(fifo1_out), .dout(fifo2_out)
  );

  // Shift Register Down: the last SR old x bits, for the wrapped rotations.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr_dn_q <= '0;
    else if (shift) sr_dn_q <= {sr_dn_q[SR-2:0], fifo1_out};
  end

  // Tap multiplexers.
  always_comb begin
    tap1 = (32'(bit_idx) < ROT_A) ? sr_up_q[SR-ROT_A] : sr_dn_q[ROT_A-1];
    tap2 = (32'(bit_idx) < ROT_C) ? sr_up_q[SR-ROT_C] : sr_dn_q[ROT_C-1];
    tap8 = (32'(bit_idx) < ROT_B) ? sr_up_q[SR-ROT_B] : sr_dn_q[ROT_B-1];
  end

  simon_round_fn u_round_fn (
    .s1(tap1), .s8(tap8), .s2(tap2), .s0(fifo2_out), .key(key_bit), .out(rf_out)
  );

  // Output multiplexer: ciphertext bit or constant 0.
  assign ct_out = out_en ? fifo2_out : 1'b0;

  initial begin
    assert (N >= 2 * SR) else $error("simon_round_serial: N must be at least 16");
  end

endmodule
