// tb_simon_round_fn: all 32 input combinations of the round-function bit
// against (s1 AND s8) XOR s2 XOR s0 XOR key.
module tb_simon_round_fn;
  logic s1, s8, s2, s0, key, out;
  int   checks = 0, failures = 0;
  logic exp_bit;

  simon_round_fn dut (.s1, .s8, .s2, .s0, .key, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {s1, s8, s2, s0, key} = 5'(v);
      #1;
      exp_bit = (s1 && s8) != ((s2 + s0 + key) % 2 == 1);
      checks++;
      if (out !== exp_bit) begin
        failures++;
        $display("mismatch inputs=%b out=%b expected=%b", 5'(v), out, exp_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
