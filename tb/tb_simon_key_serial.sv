// tb_simon_key_serial: loads a 64-bit key serially, then runs 32 rounds of 16
// bit-clocks with the round constant z0[i], checking each round-key bit on
// key_out against the word-level key schedule. Random clocks with shift low
// are inserted and must leave key_out unchanged. The document's test key and
// random keys are used.
module tb_simon_key_serial;
  import simon_ref_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       shift, load, key_in, z_bit, key_out, held;
  logic [3:0] bit_idx;
  int         checks = 0, failures = 0, stalls = 0;
  keys_t      k;

  always #5 clk = ~clk;

  simon_key_serial dut (.clk, .rst_n, .shift, .load, .key_in, .bit_idx, .z_bit, .key_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key();
    key_schedule(k, 36);
    // serial load: k0 LSB first .. k3 MSB last
    for (int w = 0; w < 4; w++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        shift = 1'b1; load = 1'b1; key_in = k[w][b];
      end
    for (int r = 0; r < 32; r++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        if ($urandom_range(7) == 0) begin
          // stall one clock
          shift = 1'b0; load = 1'b0; key_in = $urandom_range(1);
          bit_idx = 4'($urandom); z_bit = $urandom_range(1);
          held = key_out;
          @(negedge clk);
          stalls++;
          checks++;
          if (key_out !== held) begin failures++; $display("key_out moved during stall"); end
        end
        shift = 1'b1; load = 1'b0; key_in = $urandom_range(1);
        bit_idx = 4'(j); z_bit = z0(r);
        #1;
        checks++;
        if (key_out !== k[r][j]) begin
          failures++;
          $display("round %0d bit %0d: key_out=%b expected=%b", r, j, key_out, k[r][j]);
        end
      end
    @(negedge clk);
    shift = 1'b0;
  endtask

  initial begin
    shift = 0; load = 0; key_in = 0; z_bit = 0; bit_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    k[0] = 16'h0100; k[1] = 16'h0908; k[2] = 16'h1110; k[3] = 16'h1918;
    run_key();
    for (int t = 0; t < 6; t++) begin
      for (int w = 0; w < 4; w++) k[w] = word_t'($urandom);
      run_key();
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
