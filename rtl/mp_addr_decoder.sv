// mp_addr_decoder: one-hot select of the running ring oscillator.
//
// The three configuration bits held in the MultiProbe register are decoded
// into N_RO select lines, at most one of them high, so that a single RO runs
// at a time and the oscillators cannot couple. Codes N_RO and above select
// nothing. Purely combinational. The decoder and its role follow the design
// description; the code assignment (see mp_pkg::ro_sel_e) is this design's.
module mp_addr_decoder #(
  parameter int unsigned N_RO  = 7,
  parameter int unsigned SEL_W = 3
) (
  input  logic [SEL_W-1:0] sel,
  output logic [N_RO-1:0]  ro_select
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    ro_select = '0;
    for (int unsigned i = 0; i < N_RO; i++)
      if (sel == SEL_W'(i)) ro_select[i] = 1'b1;
  end

  always_comb assert ($onehot0(ro_select));
endmodule
