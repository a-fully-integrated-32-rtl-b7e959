// ring_osc: behavioural model of one MultiProbe ring oscillator (not synthesizable).
//
// The real part is a loop of identical delay stages closed by a 3-input NAND
// whose other two inputs are 'sample' and 'select'; the stages act as buffers,
// so the NAND provides the inversion. When either gate input is low the NAND
// output is forced high and the ring settles with its output high; when both
// are high it oscillates. The silicon stage types (Table of RO variants in
// the README) cannot be expressed in RTL, so this model only reproduces the
// timing seen at the output: a square wave whose frequency depends linearly
// on temperature, f(T) = F_NOM_MHZ + TC_MHZ_PER_K * (T - 25 C), clamped to at
// least 10 MHz. The first falling edge comes half a period after enable.
// The nominal frequency of about 1 GHz and the slopes (14.1 MHz/K for the
// current-starved temperature probe, 0.7 MHz/K for a standard-inverter ring)
// follow the design description; the linear law, the signs of the slopes and
// the 25 C reference are this model's choice. 'temp_c' is a model-only input
// standing for the die temperature; supply voltage and process are not modelled.
module ring_osc #(
  parameter real F_NOM_MHZ    = 1000.0,
  parameter real TC_MHZ_PER_K = -0.7
) (
  input  logic               sample,
  input  logic               select,
  input  logic signed [15:0] temp_c,
  output logic               ro_out
);
  timeunit 1ns; timeprecision 1ps;

  function automatic real half_period_ns(input logic signed [15:0] t);
    real f;
    f = F_NOM_MHZ + TC_MHZ_PER_K * (real'(t) - 25.0);
    if (f < 10.0) f = 10.0;
    return 500.0 / f;
  endfunction

  initial ro_out = 1'b1;

  always begin
    if (sample && select) begin
      #(half_period_ns(temp_c));
      // The NAND forces the ring high as soon as it is disabled.
      ro_out = (sample && select) ? ~ro_out : 1'b1;
    end else begin
      ro_out = 1'b1;
      @(sample or select);
    end
  end
endmodule
