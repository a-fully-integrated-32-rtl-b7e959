// tb_ring_osc: checks the ring oscillator model - rests high when disabled
// by either NAND input, oscillates at F_NOM at 25 C, and follows the linear
// temperature law f = F_NOM + TC * (T - 25) with the temperature-probe slope.
module tb_ring_osc;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic sample = 0, select = 0;
  logic signed [15:0] temp_c = 16'sd25;
  logic ro_out;

  ring_osc #(.F_NOM_MHZ(1000.0), .TC_MHZ_PER_K(14.1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count falling edges over a window
  function automatic int expected_edges(real f_mhz, real window_ns);
    return int'($floor(window_ns * f_mhz / 1000.0 + 0.5));
  endfunction

  int edges;
  always @(negedge ro_out) edges++;

  task automatic run_window(input real window_ns, output int n);
    edges = 0;
    sample = 1; select = 1;
    #(window_ns);
    sample = 0;
    #1;
    n = edges;
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    real t0, t1;
    #5;
    check(ro_out == 1'b1, "rests high when disabled");
    sample = 1; #20;
    check(ro_out == 1'b1, "select low keeps it stopped");
    sample = 0; select = 1; #20;
    check(ro_out == 1'b1, "sample low keeps it stopped");
    select = 0;

    // 25 C: 1000 MHz, 1 us window -> 1000 periods
    run_window(1000.0, n);
    check(n == expected_edges(1000.0, 1000.0), $sformatf("25C edges %0d", n));
    check(ro_out == 1'b1, "high again after disable");

    // period at 25 C
    sample = 1; select = 1;
    @(negedge ro_out); t0 = $realtime;
    @(negedge ro_out); t1 = $realtime;
    check((t1 - t0) > 0.999 && (t1 - t0) < 1.001, $sformatf("period %f ns", t1 - t0));
    sample = 0; #5;

    // 45 C: 1000 + 14.1 * 20 = 1282 MHz
    temp_c = 16'sd45;
    run_window(1000.0, n);
    check(n >= expected_edges(1282.0, 1000.0) - 1 && n <= expected_edges(1282.0, 1000.0) + 1,
          $sformatf("45C edges %0d", n));
    // -15 C: 1000 - 14.1 * 40 = 436 MHz
    temp_c = -16'sd15;
    run_window(1000.0, n);
    check(n >= expected_edges(436.0, 1000.0) - 1 && n <= expected_edges(436.0, 1000.0) + 1,
          $sformatf("-15C edges %0d", n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
