// tb_simon_core: end-to-end test of the SIMON32/64 core at its default size.
// Encrypts the published SIMON32/64 test vector (key 1918 1110 0908 0100,
// plaintext 6565 6877 -> ciphertext c69b e9bb) and random blocks against the
// word-level reference, with the key and plaintext loads separate or
// overlapped and with stalls (load enables low) in the middle of a load. It
// checks the latency (first ciphertext bit T*N clocks after the start edge),
// that ct_out stays 0 when ct_valid is low, and that start and loads while
// busy are ignored. Each mechanism is counted; one never seen is a failure.
module tb_simon_core;
  import simon_ref_pkg::*;
  localparam int N = 16, T = 32;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  key_load, key_in, text_load, text_in, start, busy, ct_valid, ct_out;
  int    checks = 0, failures = 0;
  int    n_enc = 0, n_overlap = 0, n_separate = 0, n_load_stall = 0, n_busy_req = 0;
  keys_t k;
  word_t x, y, ex, ey;

  always #5 clk = ~clk;

  simon_core dut (.clk, .rst_n, .key_load, .key_in, .text_load, .text_in, .start,
                  .busy, .ct_valid, .ct_out);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Loads key and plaintext; overlapped = both on the same clocks.
  task automatic load(input bit overlapped);
    logic [63:0] kb;
    logic [31:0] tb_;
    int ki = 0, ti = 0;
    kb = {k[3], k[2], k[1], k[0]};
    tb_ = {x, y};
    while (ki < 64 || ti < 32) begin
      @(negedge clk);
      start = 1'b0;
      key_load = 1'b0; text_load = 1'b0;
      if ($urandom_range(9) == 0) begin
        n_load_stall++;
        key_in = $urandom_range(1); text_in = $urandom_range(1);
        continue;
      end
      if (ki < 64) begin key_load = 1'b1; key_in = kb[ki]; ki++; end
      if (ti < 32 && (overlapped || ki >= 64)) begin
        text_load = 1'b1; text_in = tb_[ti]; ti++;
      end
    end
    @(negedge clk);
    key_load = 1'b0; text_load = 1'b0;
    if (overlapped) n_overlap++; else n_separate++;
  endtask

  task automatic encrypt_block(input bit overlapped);
    int    lat;
    word_t gx, gy;
    key_schedule(k, 32);
    ex = x; ey = y;
    encrypt(k, 32, ex, ey);
    load(overlapped);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;  // clocks since the edge that sampled start
    check(busy, "busy after start");
    while (!ct_valid) begin
      check(ct_out == 1'b0, "ct_out zero while not valid");
      @(negedge clk);
      start = $urandom_range(1); key_load = $urandom_range(1); text_load = $urandom_range(1);
      key_in = $urandom_range(1); text_in = $urandom_range(1);
      if (start || key_load || text_load) n_busy_req++;
      lat++;
      if (lat > 2000) break;
    end
    check(lat == T * N, $sformatf("latency %0d", lat));
    for (int b = 0; b < 32; b++) begin
      check(ct_valid, "ct_valid for 32 clocks");
      if (b < 16) gy[b] = ct_out; else gx[b - 16] = ct_out;
      @(negedge clk);
      start = 1'b0; key_load = 1'b0; text_load = 1'b0;
    end
    check(!ct_valid && !busy, "idle after output");
    check({gx, gy} == {ex, ey},
          $sformatf("ct %h %h expected %h %h", gx, gy, ex, ey));
    $display("key %h %h %h %h pt %h %h -> ct %h %h (latency %0d)",
             k[3], k[2], k[1], k[0], x, y, gx, gy, lat);
    n_enc++;
  endtask

  initial begin
    key_load = 0; key_in = 0; text_load = 0; text_in = 0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    k[0] = 16'h0100; k[1] = 16'h0908; k[2] = 16'h1110; k[3] = 16'h1918;
    x = 16'h6565; y = 16'h6877;
    encrypt_block(1'b0);
    check({ex, ey} == 32'hc69be9bb, "published test vector");
    for (int t = 0; t < 8; t++) begin
      for (int w = 0; w < 4; w++) k[w] = word_t'($urandom);
      x = word_t'($urandom); y = word_t'($urandom);
      encrypt_block(t % 2 == 0);
    end
    check(n_enc > 0,        "encryptions done");
    check(n_overlap > 0,    "overlapped load exercised");
    check(n_separate > 0,   "separate load exercised");
    check(n_load_stall > 0, "load stall exercised");
    check(n_busy_req > 0,   "requests while busy exercised");
    $display("encryptions=%0d overlapped=%0d separate=%0d load_stalls=%0d busy_requests=%0d",
             n_enc, n_overlap, n_separate, n_load_stall, n_busy_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
