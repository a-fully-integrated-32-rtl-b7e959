// tb_temp_sweep: temperature characterisation through the full subsystem.
// The die temperature is swept from -40 C to 120 C in 10 C steps (the range
// and step of the reference characterisation). At each step two probes
// measure the temperature-dedicated ring and two the standard inverter ring
// over a 1 us window, so a count equals the frequency in MHz. Each count is
// compared with the oscillator law, then a least-squares line through the
// counts gives each ring's sensitivity, expected near 14.1 MHz/K for the
// temperature ring and 0.7 MHz/K in magnitude for the inverter ring.
// Supply voltage and process corners are not part of the oscillator models
// and are not swept.
module tb_temp_sweep;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic signed [15:0] temp_c [N];
  mp_word_t probe_word [N];

  mp_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic run_cmd(input logic [31:0] cmd);
    logic [31:0] st;
    apb_write(A_CTRL, cmd);
    do apb_read(A_CTRL, st); while (st[1:0] != 2'b10);
  endtask

  function automatic int count_exp(input real f_mhz, input real window_ns);
    real half_ps;
    half_ps = $floor(500000.0 / f_mhz + 0.5);
    return int'($floor(window_ns * 1000.0 / (2.0 * half_ps) + 0.5));
  endfunction

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] code [N];
    logic [31:0] d;
    mp_word_t r;
    real st[2], stt[2], sf[2], stf[2], n[2], slope[2];
    code[0] = RO_TEMP; code[1] = RO_TEMP; code[2] = RO_INV; code[3] = RO_INV;
    for (int k = 0; k < 2; k++) begin st[k] = 0; stt[k] = 0; sf[k] = 0; stf[k] = 0; n[k] = 0; end
    for (int i = 0; i < N; i++) temp_c[i] = 16'sd25;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apb_write(A_PWIDTH, 32'd100);            // 100 cycles of 10 ns = 1 us
    for (int i = 0; i < N; i++) apb_write(A_CFG0 + 12'(4 * i), {code[i], 1'b0, 28'h0});
    run_cmd(32'h1);
    for (int t = -40; t <= 120; t += 10) begin
      for (int i = 0; i < N; i++) temp_c[i] = 16'(t);
      run_cmd(32'h4);                         // measure, same configuration again
      $write("T=%4d C:", t);
      for (int i = 0; i < N; i++) begin
        int e, k;
        real f;
        apb_read(A_RES0 + 12'(4 * i), d);
        r = d;
        k = (code[i] == RO_TEMP) ? 0 : 1;
        f = (k == 0) ? 1000.0 + 14.1 * (real'(t) - 25.0) : 1000.0 - 0.7 * (real'(t) - 25.0);
        e = count_exp(f, 1000.0);
        check(r.sel == code[i] && !r.ovf && int'(r.count) >= e - 2 && int'(r.count) <= e + 2,
              $sformatf("T=%0d probe %0d count %0d exp %0d", t, i, r.count, e));
        $write(" %5d", r.count);
        st[k] += real'(t); stt[k] += real'(t) * real'(t);
        sf[k] += real'(r.count); stf[k] += real'(t) * real'(r.count); n[k] += 1.0;
      end
      $write("\n");
    end
    for (int k = 0; k < 2; k++)
      slope[k] = (n[k] * stf[k] - st[k] * sf[k]) / (n[k] * stt[k] - st[k] * st[k]);
    $display("sensitivity: temperature ring %f MHz/K, inverter ring %f MHz/K", slope[0], slope[1]);
    check(slope[0] > 13.9 && slope[0] < 14.3, "temperature ring sensitivity");
    check(slope[1] < -0.5 && slope[1] > -0.9, "inverter ring sensitivity");
    check(slope[0] / -slope[1] > 15.0, "temperature ring far more sensitive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
