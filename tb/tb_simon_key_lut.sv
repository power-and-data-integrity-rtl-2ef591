// tb_simon_key_lut: for random key words k_i, k_{i+1}, k_{i+3} and both z
// values, computes k_{i+4} with the word-level key schedule and checks every
// bit j of it against the LUT fed with the matching rotated bits.
module tb_simon_key_lut;
  import simon_ref_pkg::*;
  logic       ki, k1_s0, k1_s1, k3_s3, k3_s4, z_bit, out;
  logic [3:0] bit_idx;
  int         checks = 0, failures = 0;
  keys_t      k;

  simon_key_lut dut (.ki, .k1_s0, .k1_s1, .k3_s3, .k3_s4, .z_bit, .bit_idx, .out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 4; w++) k[w] = word_t'($urandom);
      key_schedule(k, 5);        // k[4] made with z0[0] = 1
      for (int j = 0; j < 16; j++) begin
        ki    = k[0][j];
        k1_s0 = k[1][j];
        k1_s1 = k[1][(j + 1) % 16];
        k3_s3 = k[3][(j + 3) % 16];
        k3_s4 = k[3][(j + 4) % 16];
        z_bit = z0(0);
        bit_idx = 4'(j);
        #1;
        checks++;
        if (out !== k[4][j]) begin
          failures++;
          $display("mismatch t=%0d j=%0d out=%b expected=%b", t, j, out, k[4][j]);
        end
        // z = 0 flips only bit 0 of the expected word
        z_bit = 1'b0;
        #1;
        checks++;
        if (out !== (k[4][j] ^ (j == 0))) begin
          failures++;
          $display("mismatch z=0 t=%0d j=%0d", t, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
