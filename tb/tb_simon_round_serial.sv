// tb_simon_round_serial: loads a plaintext serially, runs 32 rounds of 16
// bit-clocks feeding round-key bits from the word-level key schedule, then
// shifts the state out and compares it with the word-level encryption. Checks
// the document's test vector and random blocks, that ct_out is 0 while out_en
// is low, and that clocks with shift low change nothing.
module tb_simon_round_serial;
  import simon_pkg::*;
  import simon_ref_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       shift, text_in, key_bit, out_en, ct_out;
  dp_sel_e    in_sel;
  logic [3:0] bit_idx;
  int         checks = 0, failures = 0, stalls = 0;
  keys_t      k;
  word_t      x, y, ex, ey, gx, gy;

  always #5 clk = ~clk;

  simon_round_serial dut (.clk, .rst_n, .shift, .in_sel, .text_in, .bit_idx,
                          .key_bit, .out_en, .ct_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block();
    logic [31:0] pt;
    key_schedule(k, 32);
    ex = x; ey = y;
    encrypt(k, 32, ex, ey);
    pt = {x, y};
    for (int b = 0; b < 32; b++) begin
      @(negedge clk);
      shift = 1'b1; in_sel = SEL_TEXT; text_in = pt[b]; out_en = 1'b0;
    end
    for (int r = 0; r < 32; r++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        if ($urandom_range(9) == 0) begin
          shift = 1'b0; out_en = 1'b0; bit_idx = 4'($urandom); key_bit = $urandom_range(1);
          @(negedge clk);
          stalls++;
        end
        shift = 1'b1; in_sel = SEL_ROUND; text_in = $urandom_range(1);
        bit_idx = 4'(j); key_bit = k[r][j]; out_en = 1'b0;
        #1;
        checks++;
        if (ct_out !== 1'b0) begin failures++; $display("ct_out not 0 while out_en low"); end
      end
    for (int b = 0; b < 32; b++) begin
      @(negedge clk);
      shift = 1'b1; in_sel = SEL_ZERO; out_en = 1'b1; bit_idx = 4'(b);
      #1;
      if (b < 16) gy[b] = ct_out; else gx[b-16] = ct_out;
    end
    @(negedge clk);
    shift = 1'b0; out_en = 1'b0;
    checks++;
    if ({gx, gy} !== {ex, ey}) begin
      failures++;
      $display("pt %h%h: got %h%h expected %h%h", x, y, gx, gy, ex, ey);
    end else $display("pt %h %h -> ct %h %h", x, y, gx, gy);
  endtask

  initial begin
    shift = 0; in_sel = SEL_TEXT; text_in = 0; key_bit = 0; out_en = 0; bit_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    k[0] = 16'h0100; k[1] = 16'h0908; k[2] = 16'h1110; k[3] = 16'h1918;
    x = 16'h6565; y = 16'h6877;
    run_block();
    checks++;
    if ({gx, gy} !== 32'hc69be9bb) begin failures++; $display("test vector wrong"); end
    for (int t = 0; t < 6; t++) begin
      for (int w = 0; w < 4; w++) k[w] = word_t'($urandom);
      x = word_t'($urandom); y = word_t'($urandom);
      run_block();
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
