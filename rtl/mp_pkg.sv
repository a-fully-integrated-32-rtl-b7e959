// mp_pkg: constants and types shared by the MultiProbe macro and its controller.
//
// A MultiProbe holds seven ring oscillators (ROs) and one 32-bit register.
// The register word is laid out as {sel[2:0], ovf, count[27:0]}: three
// configuration bits choosing the running RO, a sticky overflow flag and a
// 28-bit edge counter. The field widths and the number of ROs follow the
// design description; the bit positions of the fields and the RO codes are
// this implementation's choice.
package mp_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned REG_W = 32;  // scan/count register width
  localparam int unsigned CNT_W = 28;  // edge counter width
  localparam int unsigned SEL_W = 3;   // RO select field width
  localparam int unsigned N_RO  = 7;   // ring oscillators per MultiProbe

  // RO select codes. Code 7 selects no oscillator (all stopped), which is
  // the eighth input of the 8-to-1 multiplexer.
  typedef enum logic [SEL_W-1:0] {
    RO_TEMP   = 3'd0,  // current-starved, temperature dedicated probe
    RO_INV    = 3'd1,  // 13 stages of 2 standard inverters
    RO_LWIRE  = 3'd2,  // 10 stages of 2 inverters joined by long wires
    RO_LATCH  = 3'd3,  // 5 latch stages
    RO_XOR    = 3'd4,  // 8 XOR stages
    RO_NCAP   = 3'd5,  // 6 stages of 2 inverters with NMOS load capacitors
    RO_PCAP   = 3'd6,  // 6 stages of 2 inverters with PMOS load capacitors
    RO_NONE   = 3'd7   // no RO running
  } ro_sel_e;

  typedef struct packed {
    logic [SEL_W-1:0] sel;
    logic             ovf;
    logic [CNT_W-1:0] count;
  } mp_word_t;

  // Controller register map (byte addresses on the APB-style bus).
  localparam logic [11:0] A_CTRL   = 12'h000;  // W: bit0 scan, bit1 sample, bit2 measure; R: bit0 busy, bit1 done
  localparam logic [11:0] A_PWIDTH = 12'h004;  // sampling pulse width in clock cycles
  localparam logic [11:0] A_INFO   = 12'h008;  // R: number of chained MultiProbes
  localparam logic [11:0] A_CFG0   = 12'h100;  // CFG[i] at A_CFG0 + 4*i: word scanned into probe i
  localparam logic [11:0] A_RES0   = 12'h200;  // RES[i] at A_RES0 + 4*i: word scanned out of probe i
endpackage
