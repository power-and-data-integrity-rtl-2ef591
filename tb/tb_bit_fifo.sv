// tb_bit_fifo: random shifts and data into bit_fifo (DEPTH 16 and 8) against a
// queue model; dout must equal the bit written DEPTH shifts earlier (zero
// after reset).
module tb_bit_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift16, din16, dout16, shift8, din8, dout8;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_fifo #(.DEPTH(16)) dut16 (.clk, .rst_n, .shift(shift16), .din(din16), .dout(dout16));
  bit_fifo #(.DEPTH(8))  dut8  (.clk, .rst_n, .shift(shift8),  .din(din8),  .dout(dout8));

  logic q16[$], q8[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift16 = 0; din16 = 0; shift8 = 0; din8 = 0;
    for (int i = 0; i < 16; i++) q16.push_back(1'b0);
    for (int i = 0; i < 8; i++)  q8.push_back(1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++; if (dout16 !== q16[0]) begin failures++; $display("depth16 mismatch cycle %0d", c); end
      checks++; if (dout8 !== q8[0])   begin failures++; $display("depth8 mismatch cycle %0d", c); end
      shift16 = ($urandom_range(3) != 0); din16 = $urandom_range(1);
      shift8  = ($urandom_range(1) != 0); din8  = $urandom_range(1);
      @(posedge clk);
      if (shift16) begin void'(q16.pop_front()); q16.push_back(din16); end
      if (shift8)  begin void'(q8.pop_front());  q8.push_back(din8);  end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
