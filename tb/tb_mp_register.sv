// tb_mp_register: scanning shifts 32 bits LSB first (new word in, old word
// out); sampling counts one per RO period without touching the configuration;
// the counter wraps and sets the sticky overflow bit.
module tb_mp_register;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic ro_clk = 1'b1, scan_clk = 1'b0, sample = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [2:0] sel;
  mp_word_t word;

  mp_register dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // shift a word in, LSB first; return the 32 bits that came out
  task automatic scan_word(input logic [31:0] w_in, output logic [31:0] w_out);
    for (int i = 0; i < 32; i++) begin
      scan_in = w_in[i];
      w_out[i] = scan_out;
      #5 scan_clk = 1'b1;
      #5 scan_clk = 1'b0;
    end
  endtask

  task automatic ro_periods(input int n);
    sample = 1'b1;
    #3;
    repeat (n) begin
      #1 ro_clk = 1'b0;
      #1 ro_clk = 1'b1;
    end
    #3 sample = 1'b0;
    #2;
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w1, w2, junk, got;
    w1 = 32'hA5C3_0F96;
    w2 = {3'd4, 1'b0, 28'h000_0000};
    #10;
    scan_word(w1, junk);
    check(word == w1, $sformatf("scan load %h", word));
    scan_word(w2, got);
    check(got == w1, $sformatf("scan out %h exp %h", got, w1));
    check(sel == 3'd4, "sel field");

    ro_periods(37);
    check(word.count == 28'd37, $sformatf("count %0d", word.count));
    check(word.ovf == 1'b0, "no overflow");
    check(word.sel == 3'd4, "sel unchanged by sampling");

    // scan clock edges while sampling must not shift; RO edges while scanning
    // must not count
    sample = 1'b1; #2; scan_clk = 1'b1; #2; scan_clk = 1'b0; #2; sample = 1'b0; #2;
    ro_clk = 1'b0; #2; ro_clk = 1'b1; #2;
    check(word.count == 28'd37 && word.sel == 3'd4, "modes isolated");

    // overflow: preload near the top
    scan_word({3'd2, 1'b0, 28'hFFF_FFFD}, got);
    check(got == {3'd4, 1'b0, 28'd37}, $sformatf("result %h", got));
    ro_periods(5);
    check(word.count == 28'd2, $sformatf("wrapped count %0d", word.count));
    check(word.ovf == 1'b1, "overflow set");
    ro_periods(3);
    check(word.ovf == 1'b1 && word.count == 28'd5, "overflow sticky");
    scan_word(32'h0, got);
    check(got == {3'd2, 1'b1, 28'd5}, $sformatf("overflowed result %h", got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
