// bit_fifo: DEPTH x 1 bit FIFO of the serial SIMON core.
//
// Every storage element of a bit-serial cipher is a one-bit-wide FIFO whose
// read and write advance together: a bit written on a shift leaves DEPTH
// shifts later. It is therefore built as a DEPTH-stage shift register with a
// common enable (a flip-flop chain; in a custom layout it is the same chain).
// Interface: din is taken on a rising clk edge when shift is high; dout shows
// the bit written DEPTH shifts ago. Reset (asynchronous, active low) clears
// all stages; the reset and the shift enable are this design's own choices.
module bit_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic din,
  output logic dout
);

  logic [DEPTH-1:0] stage_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     stage_q <= '0;
    else if (shift) stage_q <= {stage_q[DEPTH-2:0], din};
  end

  assign dout = stage_q[DEPTH-1];

  initial begin
    assert (DEPTH >= 2) else $error("bit_fifo: DEPTH must be at least 2");
  end

endmodule
