// tb_mp_system: end-to-end test of the MultiProbe subsystem at its default
// size (four chained probes, each at its own temperature), driven only
// through the register port. Each probe is configured, measured and read
// back several times: every RO code is sampled, the temperature probe is
// read at four temperatures, a counter preloaded near its top overflows,
// a 'sample' command followed by a separate 'scan' is used, and a command
// written while busy is ignored. Results are compared with counts worked out
// from the oscillators' frequency law; command durations are checked against
// PWIDTH + 2 x 32 x N_PROBES cycles.
module tb_mp_system;
  import mp_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 4;
  localparam real TCLK = 10.0;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic signed [15:0] temp_c [N];
  mp_word_t probe_word [N];

  mp_system dut (.*);

  always #(TCLK / 2) clk = ~clk;

  // mechanism counters
  int n_scan_ops, n_pulses, n_overflow, n_ignored, n_sample_only;
  bit code_seen [8];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.u_serdes.done) n_scan_ops++;
    if (dut.u_ctrl.u_pulse.done)  n_pulses++;
  end

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

  // periods in a window; the simulator resolves the half period to 1 ps
  function automatic int count_exp(input int code, input real t, input real window_ns);
    real half_ps;
    if (code > 6) return 0;
    half_ps = $floor(500000.0 / f_exp(code, t) + 0.5);
    return int'($floor(window_ns * 1000.0 / (2.0 * half_ps) + 0.5));
  endfunction

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

  // write a command, then poll CTRL until done; returns cycles from the
  // command write to the read that saw it done (polling adds up to 3)
  task automatic run_cmd(input logic [31:0] cmd, output int cycles, input bit poke_busy = 0);
    logic [31:0] st;
    int t0;
    apb_write(A_CTRL, cmd);
    t0 = int'($time / TCLK);
    if (poke_busy) begin
      apb_write(A_CTRL, 32'h1);            // must be ignored
      n_ignored++;
    end
    do apb_read(A_CTRL, st); while (st[1:0] != 2'b10);
    cycles = int'($time / TCLK) - t0;
  endtask

  task automatic set_cfg(input int i, input logic [2:0] code, input logic [27:0] preload);
    apb_write(A_CFG0 + 12'(4 * i), {code, 1'b0, preload});
  endtask

  task automatic check_results(input logic [2:0] code [N], input logic [27:0] preload [N],
                               input real window_ns, input string tag);
    logic [31:0] d;
    mp_word_t r;
    for (int i = 0; i < N; i++) begin
      longint e;
      apb_read(A_RES0 + 12'(4 * i), d);
      r = d;
      e = longint'(preload[i]) + longint'(count_exp(int'(code[i]), real'(temp_c[i]), window_ns));
      check(r.sel == code[i], $sformatf("%s probe %0d sel %0d exp %0d", tag, i, r.sel, code[i]));
      check(r.ovf == (e >= 64'd268435456), $sformatf("%s probe %0d ovf %0d", tag, i, r.ovf));
      check((longint'(r.count) - (e % 64'd268435456)) <= 2 && ((e % 64'd268435456) - longint'(r.count)) <= 2,
            $sformatf("%s probe %0d count %0d exp %0d", tag, i, r.count, e % 64'd268435456));
      if (r.ovf) n_overflow++;
      code_seen[code[i]] = 1'b1;
    end
  endtask

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    logic [2:0]  code [N];
    logic [27:0] pre [N];
    int cyc;
    n_scan_ops = 0; n_pulses = 0; n_overflow = 0; n_ignored = 0; n_sample_only = 0;
    for (int i = 0; i < N; i++) temp_c[i] = 16'(25 + 20 * i);
    repeat (3) @(negedge clk);
    rst_n = 1;

    apb_read(A_INFO, d);
    check(d == 32'(N), "INFO");

    // 1. load the first configuration: probe i runs RO code i
    for (int i = 0; i < N; i++) begin code[i] = 3'(i); pre[i] = '0; set_cfg(i, code[i], '0); end
    run_cmd(32'h1, cyc);
    check(cyc <= 2 * 32 * N + 8, $sformatf("scan took %0d cycles", cyc));
    for (int i = 0; i < N; i++) check(probe_word[i].sel == code[i], "config reached probe");

    // 2. measure for 1 us, loading codes 4..7
    apb_write(A_PWIDTH, 32'd100);
    for (int i = 0; i < N; i++) set_cfg(i, 3'(i + 4), '0);
    run_cmd(32'h4, cyc, 1);
    check(cyc >= 100 + 2 * 32 * N && cyc <= 100 + 2 * 32 * N + 12, $sformatf("measure took %0d cycles", cyc));
    check_results(code, pre, 1000.0, "m1");
    for (int i = 0; i < N; i++) code[i] = 3'(i + 4);

    // 3. measure codes 4..7; load the temperature probe everywhere, preloaded near the top
    for (int i = 0; i < N; i++) set_cfg(i, RO_TEMP, 28'hFFF_FFFF - 28'd499);
    run_cmd(32'h4, cyc);
    check_results(code, pre, 1000.0, "m2");
    for (int i = 0; i < N; i++) begin code[i] = RO_TEMP; pre[i] = 28'hFFF_FFFF - 28'd499; end

    // 4. measure the temperature probes (they overflow); load inverter rings
    for (int i = 0; i < N; i++) set_cfg(i, RO_INV, '0);
    run_cmd(32'h4, cyc);
    check_results(code, pre, 1000.0, "m3");
    for (int i = 0; i < N; i++) begin code[i] = RO_INV; pre[i] = '0; end

    // 5. a separate sample command (500 ns), then a scan
    apb_write(A_PWIDTH, 32'd50);
    run_cmd(32'h2, cyc);
    check(cyc <= 50 + 8, $sformatf("sample took %0d cycles", cyc));
    n_sample_only++;
    for (int i = 0; i < N; i++)
      check(probe_word[i].sel == RO_INV && probe_word[i].count != 0, "counted in place");
    for (int i = 0; i < N; i++) set_cfg(i, RO_NONE, '0);
    run_cmd(32'h1, cyc);
    check_results(code, pre, 500.0, "s1");

    // mechanisms
    check(n_scan_ops == 5, $sformatf("scan operations %0d", n_scan_ops));
    check(n_pulses == 4, $sformatf("sampling pulses %0d", n_pulses));
    check(n_overflow > 0, "overflow happened");
    check(n_ignored > 0, "busy command ignored");
    check(n_sample_only > 0, "sample-only command");
    for (int c = 0; c < 8; c++) check(code_seen[c], $sformatf("RO code %0d measured", c));
    $display("mechanisms: scans=%0d pulses=%0d overflows=%0d ignored=%0d sample_only=%0d",
             n_scan_ops, n_pulses, n_overflow, n_ignored, n_sample_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
