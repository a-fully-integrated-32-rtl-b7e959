// mp_register: the 32-bit count/scan register of one MultiProbe.
//
// The word is {sel[2:0], ovf, count[27:0]}. The register has two modes,
// chosen by the 'sample' pin:
//  * sampling (sample = 1): the register is clocked by the selected ring
//    oscillator and the 28-bit counter advances once per oscillation period.
//    When it wraps from all ones to zero the overflow bit is set and stays
//    set. The configuration bits do not change.
//  * scanning (sample = 0): the register is clocked by 'scan_clk' and shifts
//    right by one bit per rising edge: 'scan_in' enters at bit 31 and bit 0
//    leaves on 'scan_out'. After 32 edges the old word has left and a new
//    one, with the next configuration and the counter's start value, is in.
// So every measurement has to be followed by a scan, which both reads the
// result and loads the next configuration. Chaining scan_out to the next
// probe's scan_in makes one long shift register of all the probes.
//
// Field widths and the two modes follow the design description. This design's
// own choices: the counter counts falling edges of the RO output (one per
// period), because a stopped ring rests high; counting the inverted RO output
// keeps the clock multiplexer from producing a spurious edge when 'sample'
// rises or falls with scan_clk low. The overflow bit is sticky and the counter
// wraps. There is no reset: the register is always loaded by a scan first.
// The clock multiplexer is an ordinary gate in this RTL; in silicon it must
// be a glitch-free clock mux and 'sample' must only change while scan_clk is low
// (the controller guarantees and asserts this).
module mp_register
  import mp_pkg::*;
(
  input  logic             ro_clk,    // selected RO output (rests high)
  input  logic             scan_clk,  // scan clock from the controller (rests low)
  input  logic             sample,    // 1: sampling mode, 0: scanning mode
  input  logic             scan_in,
  output logic             scan_out,
  output logic [SEL_W-1:0] sel,       // configuration bits, to decoder and mux
  output mp_word_t         word       // whole register, for observation
);
  timeunit 1ns; timeprecision 1ps;

  logic     reg_clk;
  mp_word_t q;

  always_comb reg_clk = sample ? ~ro_clk : scan_clk;

  always_ff @(posedge reg_clk) begin
    if (sample) begin
      q.count <= q.count + 1'b1;
      if (&q.count) q.ovf <= 1'b1;
    end else begin
      q <= {scan_in, q[REG_W-1:1]};
    end
  end

  assign scan_out = q[0];
  assign sel      = q.sel;
  assign word     = q;
endmodule
