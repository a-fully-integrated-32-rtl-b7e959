// mp_ro_mux: 8-to-1 multiplexer from the ring oscillators to the counter.
//
// Routes the output of the selected ring oscillator to the clock input of the
// MultiProbe register. Input N_IN-1 (code 7) has no oscillator behind it and
// is tied high by the parent, the level a stopped ring rests at. Purely
// combinational. The 8-to-1 width follows the design description.
module mp_ro_mux #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned SEL_W = 3
) (
  input  logic [N_IN-1:0]  ro_in,
  input  logic [SEL_W-1:0] sel,
  output logic             ro_sel_out
);
  timeunit 1ns; timeprecision 1ps;

  always_comb ro_sel_out = ro_in[sel];
endmodule
