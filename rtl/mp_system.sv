// mp_system: a MultiProbe sensing subsystem - one controller and a daisy
// chain of N_PROBES MultiProbes.
//
// The controller is reached over its APB-style register port. Its serial
// output feeds probe 0, each probe's scan_out feeds the next probe's scan_in
// and the last probe's scan_out returns to the controller; 'sample' and
// 'scan_clk' go to all probes. A measurement step writes the next
// configuration of each probe to CFG[i], then a 'measure' command opens a
// sampling window of PWIDTH clock cycles, during which each probe counts the
// periods of its selected ring oscillator, and scans all counts back into
// RES[i] while loading the next configurations. A single controller for
// many chained probes is the organisation of the design description; the
// chain length N_PROBES = 4 is this design's choice (not given).
// 'temp_c' gives each probe's local temperature to the oscillator models;
// 'probe_word' exposes each probe's register for observation.
module mp_system
  import mp_pkg::*;
#(
  parameter int unsigned N_PROBES = 4,
  parameter int unsigned PW_W     = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [11:0]        paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  output logic               pslverr,
  input  logic signed [15:0] temp_c     [N_PROBES],
  output mp_word_t           probe_word [N_PROBES]
);
  timeunit 1ns; timeprecision 1ps;

  logic sample, scan_clk, ctrl_tx, ctrl_rx;
  logic chain [N_PROBES+1];

  mp_controller #(.N_PROBES(N_PROBES), .PW_W(PW_W)) u_ctrl (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .sample, .scan_clk, .scan_out(ctrl_tx), .scan_in(ctrl_rx)
  );

  assign chain[0] = ctrl_tx;
  assign ctrl_rx  = chain[N_PROBES];

  for (genvar i = 0; i < int'(N_PROBES); i++) begin : g_probe
    multiprobe u_mp (
      .sample, .scan_clk, .scan_in(chain[i]), .scan_out(chain[i+1]),
      .temp_c(temp_c[i]), .word(probe_word[i])
    );
  end
endmodule
