// multiprobe: one MultiProbe PVT sensor macro.
//
// Seven ring oscillators, each sensitive to process, voltage and temperature
// in its own way, share one 32-bit register. The register's three
// configuration bits go through the address decoder, which enables exactly
// one RO (through its NAND gate together with 'sample'), and through the
// 8-to-1 multiplexer, which routes that RO to the register's counter. While
// 'sample' is high the counter counts RO periods; while it is low the
// register is a 32-bit shift register between 'scan_in' and 'scan_out',
// clocked by 'scan_clk'. Probes are daisy-chained scan_out -> scan_in, and
// all probes share 'sample' and 'scan_clk', so one controller serves them all.
//
// The RO variants and their order are those of the design description:
// temperature-dedicated current-starved ring, 13x2 inverters, 10x2 inverters
// with long wires, 5 latches, 8 XORs, 6x2 inverters with NMOS and with PMOS
// load capacitors. The oscillators are behavioural models (ring_osc); their
// nominal frequencies below are assumed values around the described 1 GHz,
// chosen distinct so the probes can be told apart in simulation.
// 'temp_c' is a model-only input for the oscillators.
module multiprobe
  import mp_pkg::*;
(
  input  logic               sample,
  input  logic               scan_clk,
  input  logic               scan_in,
  output logic               scan_out,
  input  logic signed [15:0] temp_c,
  output mp_word_t           word
);
  timeunit 1ns; timeprecision 1ps;

  logic [SEL_W-1:0] sel;
  logic [N_RO-1:0]  ro_select;
  logic [7:0]       ro_out;
  logic             ro_sel;

  mp_addr_decoder #(.N_RO(N_RO), .SEL_W(SEL_W)) u_dec (.sel(sel), .ro_select(ro_select));

  ring_osc #(.F_NOM_MHZ(1000.0), .TC_MHZ_PER_K(14.1)) u_ro_temp
    (.sample(sample), .select(ro_select[RO_TEMP]),  .temp_c(temp_c), .ro_out(ro_out[RO_TEMP]));
  ring_osc #(.F_NOM_MHZ(1000.0), .TC_MHZ_PER_K(-0.7)) u_ro_inv
    (.sample(sample), .select(ro_select[RO_INV]),   .temp_c(temp_c), .ro_out(ro_out[RO_INV]));
  ring_osc #(.F_NOM_MHZ(800.0),  .TC_MHZ_PER_K(-0.6)) u_ro_lwire
    (.sample(sample), .select(ro_select[RO_LWIRE]), .temp_c(temp_c), .ro_out(ro_out[RO_LWIRE]));
  ring_osc #(.F_NOM_MHZ(1100.0), .TC_MHZ_PER_K(-0.8)) u_ro_latch
    (.sample(sample), .select(ro_select[RO_LATCH]), .temp_c(temp_c), .ro_out(ro_out[RO_LATCH]));
  ring_osc #(.F_NOM_MHZ(1200.0), .TC_MHZ_PER_K(-0.9)) u_ro_xor
    (.sample(sample), .select(ro_select[RO_XOR]),   .temp_c(temp_c), .ro_out(ro_out[RO_XOR]));
  ring_osc #(.F_NOM_MHZ(900.0),  .TC_MHZ_PER_K(-0.6)) u_ro_ncap
    (.sample(sample), .select(ro_select[RO_NCAP]),  .temp_c(temp_c), .ro_out(ro_out[RO_NCAP]));
  ring_osc #(.F_NOM_MHZ(950.0),  .TC_MHZ_PER_K(-0.7)) u_ro_pcap
    (.sample(sample), .select(ro_select[RO_PCAP]),  .temp_c(temp_c), .ro_out(ro_out[RO_PCAP]));
  assign ro_out[RO_NONE] = 1'b1;

  mp_ro_mux #(.N_IN(8), .SEL_W(SEL_W)) u_mux (.ro_in(ro_out), .sel(sel), .ro_sel_out(ro_sel));

  mp_register u_reg (
    .ro_clk(ro_sel), .scan_clk(scan_clk), .sample(sample),
    .scan_in(scan_in), .scan_out(scan_out), .sel(sel), .word(word)
  );
endmodule
