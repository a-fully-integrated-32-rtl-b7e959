// tb_mpc_regs_intf: register map over the APB-style port - CFG and PWIDTH
// read back, INFO, command pulses (one per write, priority measure > sample
// > scan, ignored while busy), done flag set by op_done and cleared by the
// next command, tx_word follows tx_idx, rx words land in RES, pslverr on
// unmapped or read-only addresses.
module tb_mpc_regs_intf;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic cmd_scan, cmd_sample, cmd_measure;
  logic [23:0] pwidth;
  logic busy = 0, op_done = 0;
  logic [1:0] tx_idx = '0, rx_idx = '0;
  logic [31:0] tx_word, rx_word = '0;
  logic rx_valid = 0;

  mpc_regs_intf #(.N_PROBES(N), .PW_W(24)) dut (.*);

  always #5 clk = ~clk;

  int n_scan, n_sample, n_measure;
  always @(posedge clk) if (rst_n) begin
    n_scan    += int'(cmd_scan);
    n_sample  += int'(cmd_sample);
    n_measure += int'(cmd_measure);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 err = pslverr;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata; err = pslverr;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, cfgv [N];
    logic e;
    n_scan = 0; n_sample = 0; n_measure = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_read(A_INFO, d, e);
    check(d == 32'(N) && !e, "INFO");
    apb_write(A_PWIDTH, 32'd1234, e);
    apb_read(A_PWIDTH, d, e);
    check(d == 32'd1234 && pwidth == 24'd1234, "PWIDTH");
    for (int i = 0; i < N; i++) begin
      cfgv[i] = $urandom;
      apb_write(A_CFG0 + 12'(4 * i), cfgv[i], e);
    end
    for (int i = 0; i < N; i++) begin
      apb_read(A_CFG0 + 12'(4 * i), d, e);
      check(d == cfgv[i] && !e, $sformatf("CFG[%0d]", i));
      tx_idx = 2'(i); #1;
      check(tx_word == cfgv[i], $sformatf("tx_word[%0d]", i));
    end
    // results
    for (int i = 0; i < N; i++) begin
      @(negedge clk); rx_valid = 1; rx_idx = 2'(N - 1 - i); rx_word = 32'hC000_0000 + 32'(i);
    end
    @(negedge clk); rx_valid = 0;
    for (int i = 0; i < N; i++) begin
      apb_read(A_RES0 + 12'(4 * i), d, e);
      check(d == 32'hC000_0000 + 32'(N - 1 - i), $sformatf("RES[%0d] %h", i, d));
    end
    // commands
    apb_write(A_CTRL, 32'h1, e);
    apb_write(A_CTRL, 32'h2, e);
    apb_write(A_CTRL, 32'h4, e);
    apb_write(A_CTRL, 32'h7, e);
    @(negedge clk);
    check(n_scan == 1 && n_sample == 1 && n_measure == 2,
          $sformatf("commands %0d %0d %0d", n_scan, n_sample, n_measure));
    busy = 1;
    apb_write(A_CTRL, 32'h1, e);
    check(n_scan == 1, "command ignored while busy");
    apb_read(A_CTRL, d, e);
    check(d[0] == 1'b1 && d[1] == 1'b0, "busy status");
    @(negedge clk); op_done = 1; busy = 0;
    @(negedge clk); op_done = 0;
    apb_read(A_CTRL, d, e);
    check(d[1:0] == 2'b10, "done status");
    apb_write(A_CTRL, 32'h1, e);
    apb_read(A_CTRL, d, e);
    check(d[1] == 1'b0, "done cleared by new command");
    // errors
    apb_read(12'h0F0, d, e);
    check(e, "unmapped read errors");
    apb_write(A_RES0, 32'h1, e);
    check(e, "write to RES errors");
    apb_read(A_CFG0 + 12'(4 * N), d, e);
    check(e, "CFG beyond N errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
