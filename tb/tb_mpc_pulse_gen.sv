// tb_mpc_pulse_gen: the sampling pulse lasts exactly the programmed number
// of clock cycles, starts on the edge after 'start', ends with one 'done'
// pulse; width 0 gives no pulse; 'start' during a pulse is ignored.
module tb_mpc_pulse_gen;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [23:0] width = '0;
  logic sample, done;

  mpc_pulse_gen #(.PW_W(24)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int high_cycles, done_count;
  always @(posedge clk) begin
    if (sample) high_cycles++;
    if (done) done_count++;
  end

  task automatic pulse(input int w, input bit restart_midway);
    int lat;
    high_cycles = 0; done_count = 0;
    width = 24'(w);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(sample == (w != 0), $sformatf("w=%0d sample after one cycle", w));
    if (restart_midway && w > 2) begin
      @(negedge clk) start = 1'b1; width = 24'(3);
      @(negedge clk) start = 1'b0;
    end
    lat = 0;
    while (!done && lat < w + 10) begin @(negedge clk); lat++; end
    @(negedge clk);
    check(high_cycles == w, $sformatf("w=%0d high %0d cycles", w, high_cycles));
    check(done_count == 1, $sformatf("w=%0d done %0d", w, done_count));
    repeat (3) @(negedge clk);
    check(!sample && done_count == 1, "quiet after pulse");
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!sample && !done, "idle after reset");
    pulse(1, 0);
    pulse(5, 0);
    pulse(0, 0);
    pulse(17, 1);
    pulse(100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
