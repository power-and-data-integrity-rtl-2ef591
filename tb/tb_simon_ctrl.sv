// tb_simon_ctrl: drives the sequencer through idle loads and two full
// encryptions and checks, clock by clock, its outputs against a cycle count:
// idle shifts follow key_load / text_load, start gives T*N round clocks with
// bit_idx = count mod N and z_bit = z0[count / N], then 2N output clocks with
// out_en high, and start or loads while busy are ignored.
module tb_simon_ctrl;
  import simon_pkg::*;
  import simon_ref_pkg::z0;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       key_load, text_load, start;
  logic       key_shift, key_ld, dp_shift, z_bit, out_en, busy;
  dp_sel_e    dp_sel;
  logic [3:0] bit_idx;
  int         checks = 0, failures = 0;
  int         busy_ignored = 0;

  always #5 clk = ~clk;

  simon_ctrl dut (.clk, .rst_n, .key_load, .text_load, .start, .key_shift, .key_ld,
                  .dp_shift, .dp_sel, .bit_idx, .z_bit, .out_en, .busy);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encryption();
    // idle with random load requests
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      key_load = $urandom_range(1); text_load = $urandom_range(1); start = 1'b0;
      #1;
      check(!busy && key_shift == key_load && key_ld && dp_shift == text_load &&
            dp_sel == SEL_TEXT && !out_en, "idle outputs");
    end
    @(negedge clk);
    key_load = 1'b0; text_load = 1'b0; start = 1'b1;
    #1 check(!busy, "idle at start");
    for (int c = 0; c < 512; c++) begin
      @(negedge clk);
      start = $urandom_range(1); key_load = $urandom_range(1); text_load = $urandom_range(1);
      if (start || key_load || text_load) busy_ignored++;
      #1;
      check(busy && key_shift && !key_ld && dp_shift && dp_sel == SEL_ROUND && !out_en,
            "round outputs");
      check(bit_idx == 4'(c % 16), "bit_idx");
      check(z_bit == z0(c / 16), "z_bit");
    end
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      start = $urandom_range(1); key_load = $urandom_range(1); text_load = $urandom_range(1);
      #1;
      check(busy && !key_shift && dp_shift && dp_sel == SEL_ZERO && out_en, "output phase");
    end
    @(negedge clk);
    start = 1'b0; key_load = 1'b0; text_load = 1'b0;
    #1 check(!busy && !out_en, "back to idle");
  endtask

  initial begin
    key_load = 0; text_load = 0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    encryption();
    encryption();
    check(busy_ignored > 0, "requests while busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
