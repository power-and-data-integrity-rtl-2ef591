// simon_ctrl: sequencer of the bit-serial SIMON core.
//
// Three phases. IDLE: the key store shifts in key_in on each cycle with
// key_load high and the state store shifts in text_in on each cycle with
// text_load high; start moves to ROUND. ROUND: both stores shift every clock
// for T rounds of N clocks; bit_idx counts the bit j of the round and the
// round counter i selects the round constant z_bit = z0[i]. OUT: the state
// store shifts 2N more clocks with zeros entering while out_en marks the
// ciphertext bits; then back to IDLE. start, key_load and text_load are
// ignored while busy.
//
// Timing: the clock edge that samples start high in IDLE begins ROUND; the
// T*N round clocks are followed directly by the 2N output clocks, so out_en
// rises T*N clock edges after the edge that sampled start.
//
// The document gives the round count and the one-bit-per-clock schedule; the
// phases, the load/start handshake and the output phase are this design's own.
module simon_ctrl #(
  parameter int unsigned N = simon_pkg::WORD_BITS,
  parameter int unsigned T = simon_pkg::NUM_ROUNDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_load,
  input  logic                 text_load,
  input  logic                 start,
  output logic                 key_shift,
  output logic                 key_ld,
  output logic                 dp_shift,
  output simon_pkg::dp_sel_e   dp_sel,
  output logic [$clog2(N)-1:0] bit_idx,
  output logic                 z_bit,
  output logic                 out_en,
  output logic                 busy
);
  import simon_pkg::*;

  localparam int unsigned BW = $clog2(N);
  localparam int unsigned RW = $clog2(T);

  phase_e        phase_q;
  logic [BW-1:0] bit_q;
  logic [RW-1:0] rnd_q;
  logic          last_bit;

  assign last_bit = (bit_q == BW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      bit_q   <= '0;
      rnd_q   <= '0;
    end else begin
      unique case (phase_q)
        PH_IDLE: begin
          bit_q <= '0;
          rnd_q <= '0;
          if (start) phase_q <= PH_ROUND;
        end
        PH_ROUND: begin
          bit_q <= last_bit ? '0 : bit_q + 1'b1;
          if (last_bit) begin
            if (rnd_q == RW'(T - 1)) begin
              rnd_q   <= '0;
              phase_q <= PH_OUT;
            end else begin
              rnd_q <= rnd_q + 1'b1;
            end
          end
        end
        PH_OUT: begin
          // two words: the round counter's bit 0 tells which one
          bit_q <= last_bit ? '0 : bit_q + 1'b1;
          if (last_bit) begin
            rnd_q <= rnd_q + 1'b1;
            if (rnd_q[0]) phase_q <= PH_IDLE;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    key_shift = 1'b0;
    key_ld    = 1'b1;
    dp_shift  = 1'b0;
    dp_sel    = SEL_TEXT;
    out_en    = 1'b0;
    unique case (phase_q)
      PH_IDLE: begin
        key_shift = key_load;
        dp_shift  = text_load;
      end
      PH_ROUND: begin
        key_shift = 1'b1;
        key_ld    = 1'b0;
        dp_shift  = 1'b1;
        dp_sel    = SEL_ROUND;
      end
      PH_OUT: begin
        dp_shift = 1'b1;
        dp_sel   = SEL_ZERO;
        out_en   = 1'b1;
      end
      default: ;
    endcase
  end

  assign bit_idx = bit_q;
  assign z_bit   = Z0_SEQ[32'(rnd_q) % Z_LEN];
  assign busy    = (phase_q != PH_IDLE);

  // The key store must never load while the rounds run.
  a_no_key_load_in_round : assert property (
    @(posedge clk) disable iff (!rst_n) (phase_q == PH_ROUND) |-> (key_shift && !key_ld)
  );
  // Ciphertext output only in the output phase, with the state moving.
  a_out_shifts : assert property (
    @(posedge clk) disable iff (!rst_n) out_en |-> (dp_shift && dp_sel == SEL_ZERO)
  );

endmodule
