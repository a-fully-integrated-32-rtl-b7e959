// tb_mpc_serdes: Ser/Des against a reference chain of three 32-bit probe
// registers (shift right, scan_in at bit 31, scan_out from bit 0, clocked on
// scan_clk rising). After one transfer every probe holds its configuration
// word and every old word has been delivered with the right index; the
// transfer takes 2 x 32 x 3 cycles.
module tb_mpc_serdes;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 3;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, rx_valid, scan_clk, scan_out;
  logic [1:0] tx_idx, rx_idx;
  logic [31:0] tx_word, rx_word;
  logic scan_in;

  logic [31:0] cfg [N];
  logic [31:0] probe [N];
  logic [31:0] got [N];
  bit          got_seen [N];

  mpc_serdes #(.N_PROBES(N), .WORD_W(32)) dut (.*);

  always #5 clk = ~clk;

  assign tx_word = (tx_idx < 2'(N)) ? cfg[tx_idx] : 32'hDEAD_BEEF;
  assign scan_in = probe[N-1][0];

  always @(posedge scan_clk) begin
    for (int i = N - 1; i > 0; i--) probe[i] <= {probe[i-1][0], probe[i][31:1]};
    probe[0] <= {scan_out, probe[0][31:1]};
  end

  always @(posedge clk) if (rx_valid) begin
    got[rx_idx] <= rx_word;
    got_seen[rx_idx] <= 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic transfer(output int cycles);
    for (int i = 0; i < N; i++) got_seen[i] = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] old [N];
    int cyc;
    for (int i = 0; i < N; i++) probe[i] = 32'h1000_0000 * (i + 1) + 32'h0123_4567 * i;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < N; i++) begin
        cfg[i] = $urandom;
        old[i] = probe[i];
      end
      transfer(cyc);
      @(negedge clk);
      check(cyc == 2 * 32 * N + 1, $sformatf("transfer took %0d cycles", cyc));
      check(!busy && !scan_clk, "idle, scan clock low");
      for (int i = 0; i < N; i++) begin
        check(probe[i] == cfg[i], $sformatf("probe %0d holds %h exp %h", i, probe[i], cfg[i]));
        check(got_seen[i] && got[i] == old[i], $sformatf("result %0d %h exp %h", i, got[i], old[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
