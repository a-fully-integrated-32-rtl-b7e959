// tb_multiprobe: one MultiProbe driven directly through its pins. For each
// of the seven ROs: scan in its select code, open a 1 us sampling window,
// scan the result out and compare the count with the oscillator's expected
// frequency (independent table below). Also checks that code 7 counts
// nothing, that the temperature probe's count moves by 14.1 per K per us,
// and that the result word carries the configuration that was measured.
module tb_multiprobe;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic sample = 1'b0, scan_clk = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic signed [15:0] temp_c = 16'sd25;
  mp_word_t word;

  multiprobe dut (.*);

  // expected frequency in MHz of each RO code at temperature t
  function automatic real f_exp(input int code, input real t);
    case (code)
      0: return 1000.0 + 14.1 * (t - 25.0);
      1: return 1000.0 - 0.7 * (t - 25.0);
      2: return 800.0 - 0.6 * (t - 25.0);
      3: return 1100.0 - 0.8 * (t - 25.0);
      4: return 1200.0 - 0.9 * (t - 25.0);
      5: return 900.0 - 0.6 * (t - 25.0);
      6: return 950.0 - 0.7 * (t - 25.0);
      default: return 0.0;
    endcase
  endfunction

  // expected count in a window: the simulator resolves the half period to 1 ps
  function automatic int count_exp(input int code, input real t, input real window_ns);
    real half_ps;
    half_ps = $floor(500000.0 / f_exp(code, t) + 0.5);
    return int'($floor(window_ns * 1000.0 / (2.0 * half_ps) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_word(input logic [31:0] w_in, output logic [31:0] w_out);
    for (int i = 0; i < 32; i++) begin
      scan_in = w_in[i];
      w_out[i] = scan_out;
      #5 scan_clk = 1'b1;
      #5 scan_clk = 1'b0;
    end
  endtask

  task automatic sample_window(input real ns);
    #2 sample = 1'b1;
    #(ns) sample = 1'b0;
    #2;
  endtask

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] got;
    mp_word_t r;
    int e;
    #10;
    scan_word({3'd0, 1'b0, 28'h0}, got);
    for (int code = 0; code < 8; code++) begin
      sample_window(1000.0);
      scan_word({3'((code + 1) % 8), 1'b0, 28'h0}, got);
      r = got;
      e = (code < 7) ? count_exp(code, 25.0, 1000.0) : 0;
      check(r.sel == 3'(code), $sformatf("result sel %0d exp %0d", r.sel, code));
      check(!r.ovf, "no overflow");
      check(int'(r.count) >= e - 1 && int'(r.count) <= e + 1,
            $sformatf("code %0d count %0d exp %0d", code, r.count, e));
    end
    // temperature probe at two temperatures
    scan_word({3'd0, 1'b0, 28'h0}, got);
    temp_c = 16'sd65;
    sample_window(1000.0);
    scan_word({3'd1, 1'b0, 28'h0}, got);
    r = got;
    e = count_exp(0, 65.0, 1000.0);
    check(int'(r.count) >= e - 1 && int'(r.count) <= e + 1,
          $sformatf("temp probe at 65C count %0d exp %0d", r.count, e));
    // the inverter ring barely moves
    sample_window(1000.0);
    scan_word(32'h0, got);
    r = got;
    e = count_exp(1, 65.0, 1000.0);
    check(int'(r.count) >= e - 1 && int'(r.count) <= e + 1,
          $sformatf("inverter ring at 65C count %0d exp %0d", r.count, e));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
