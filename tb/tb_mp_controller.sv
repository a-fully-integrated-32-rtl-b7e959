// tb_mp_controller: the controller with a reference chain of two 32-bit probe
// registers in the testbench, each of which counts clock cycles while
// 'sample' is high (a stand-in ring oscillator at the clock frequency).
// Checks scan, sample and measure commands: pulse width in cycles, no
// sampling during a scan, results landing in RES[i], configurations landing
// in the probes, and the command durations.
module tb_mp_controller;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 2;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic sample, scan_clk, scan_out, scan_in;

  mp_controller #(.N_PROBES(N), .PW_W(24)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] probe [N];
  assign scan_in = probe[N-1][0];
  always @(posedge scan_clk) begin
    for (int i = N - 1; i > 0; i--) probe[i] <= {probe[i-1][0], probe[i][31:1]};
    probe[0] <= {scan_out, probe[0][31:1]};
  end
  int sample_cycles;
  always @(posedge clk) if (rst_n && sample) begin
    sample_cycles++;
    for (int i = 0; i < N; i++) probe[i][27:0] <= probe[i][27:0] + 28'd1 + 28'(i);
  end

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

  // issue a command and count cycles until CTRL.busy falls
  task automatic run_cmd(input logic [31:0] cmd, output int cycles);
    logic [31:0] st;
    apb_write(A_CTRL, cmd);
    cycles = 0;
    st = 32'h1;
    while (st[0]) begin
      @(negedge clk); cycles++;
      st = {31'h0, dut.op_done ? 1'b0 : dut.busy};
    end
    apb_read(A_CTRL, st);
    check(st[1:0] == 2'b10, "done flag after command");
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc;
    probe[0] = 32'h1111_1111; probe[1] = 32'h2222_2222;
    sample_cycles = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(A_CFG0, {3'd1, 1'b0, 28'd0});
    apb_write(A_CFG0 + 12'h4, {3'd5, 1'b0, 28'd10});
    apb_write(A_PWIDTH, 32'd40);

    run_cmd(32'h1, cyc);                   // scan
    check(cyc >= 2 * 32 * N && cyc <= 2 * 32 * N + 4, $sformatf("scan %0d cycles", cyc));
    check(probe[0] == {3'd1, 1'b0, 28'd0} && probe[1] == {3'd5, 1'b0, 28'd10}, "configs in probes");
    apb_read(A_RES0, d);        check(d == 32'h1111_1111, $sformatf("RES0 %h", d));
    apb_read(A_RES0 + 12'h4, d); check(d == 32'h2222_2222, $sformatf("RES1 %h", d));

    apb_write(A_CFG0, {3'd2, 1'b0, 28'd0});
    apb_write(A_CFG0 + 12'h4, {3'd3, 1'b0, 28'd0});
    sample_cycles = 0;
    run_cmd(32'h4, cyc);                   // measure = sample then scan
    check(sample_cycles == 40, $sformatf("pulse %0d cycles", sample_cycles));
    check(cyc >= 40 + 2 * 32 * N && cyc <= 40 + 2 * 32 * N + 6, $sformatf("measure %0d cycles", cyc));
    apb_read(A_RES0, d);        check(d == {3'd1, 1'b0, 28'd40}, $sformatf("RES0 %h", d));
    apb_read(A_RES0 + 12'h4, d); check(d == {3'd5, 1'b0, 28'd90}, $sformatf("RES1 %h", d));
    check(probe[0][31:29] == 3'd2 && probe[1][31:29] == 3'd3, "next configs loaded");

    apb_write(A_PWIDTH, 32'd7);
    sample_cycles = 0;
    run_cmd(32'h2, cyc);                   // sample only
    check(sample_cycles == 7 && cyc <= 7 + 4, $sformatf("sample only %0d/%0d", sample_cycles, cyc));
    check(probe[0][27:0] == 28'd7 && probe[1][27:0] == 28'd14, "counts after sample only");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
