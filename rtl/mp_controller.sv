// mp_controller: the single digital controller of a MultiProbe chain.
//
// It joins three parts: the register interface (mpc_regs_intf) on the
// on-chip network side, the Ser/Des (mpc_serdes) on the chain side, and the
// programmable sampling pulse generator (mpc_pulse_gen) that drives the
// chain's common 'sample' line. A small sequencer runs the commands written
// to CTRL:
//   scan    - one Ser/Des transfer: results out of, next configurations into
//             every probe (2 x 32 x N_PROBES cycles)
//   sample  - one sampling pulse of PWIDTH cycles on 'sample'
//   measure - a sampling pulse directly followed by a scan, the normal step
//             since every measurement must be followed by a scan.
// busy is high from the cycle after the command write until the command
// ends; op_done then pulses and CTRL.done is set. 'sample' is never high
// during a scan (asserted below). The three parts follow the design
// description; the command set and the sequencing are this design's.
module mp_controller
  import mp_pkg::*;
#(
  parameter int unsigned N_PROBES = 4,
  parameter int unsigned PW_W     = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // MultiProbe chain
  output logic        sample,
  output logic        scan_clk,
  output logic        scan_out,
  input  logic        scan_in
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IDX_W = (N_PROBES > 1) ? $clog2(N_PROBES) : 1;

  typedef enum logic [1:0] {Q_IDLE, Q_SAMPLE, Q_SCAN} seq_e;

  seq_e             seq;
  logic             cmd_scan, cmd_sample, cmd_measure;
  logic [PW_W-1:0]  pwidth;
  logic             busy, op_done;
  logic             then_scan;
  logic             pg_start, pg_done;
  logic             sd_start, sd_busy, sd_done;
  logic [IDX_W-1:0] tx_idx, rx_idx;
  logic [31:0]      tx_word, rx_word;
  logic             rx_valid;

  mpc_regs_intf #(.N_PROBES(N_PROBES), .PW_W(PW_W)) u_regs (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .cmd_scan, .cmd_sample, .cmd_measure, .pwidth, .busy, .op_done,
    .tx_idx, .tx_word, .rx_valid, .rx_idx, .rx_word
  );

  mpc_pulse_gen #(.PW_W(PW_W)) u_pulse (
    .clk, .rst_n, .start(pg_start), .width(pwidth), .sample, .done(pg_done)
  );

  mpc_serdes #(.N_PROBES(N_PROBES), .WORD_W(REG_W)) u_serdes (
    .clk, .rst_n, .start(sd_start), .busy(sd_busy), .done(sd_done),
    .tx_idx, .tx_word, .rx_valid, .rx_idx, .rx_word,
    .scan_clk, .scan_out, .scan_in
  );

  always_comb begin
    pg_start = (seq == Q_IDLE) && (cmd_sample || cmd_measure);
    sd_start = ((seq == Q_IDLE) && cmd_scan) || ((seq == Q_SAMPLE) && pg_done && then_scan);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq       <= Q_IDLE;
      then_scan <= 1'b0;
      busy      <= 1'b0;
      op_done   <= 1'b0;
    end else begin
      op_done <= 1'b0;
      unique case (seq)
        Q_IDLE: begin
          if (cmd_sample || cmd_measure) begin
            seq       <= Q_SAMPLE;
            then_scan <= cmd_measure;
            busy      <= 1'b1;
          end else if (cmd_scan) begin
            seq  <= Q_SCAN;
            busy <= 1'b1;
          end
        end
        Q_SAMPLE: if (pg_done) begin
          if (then_scan) seq <= Q_SCAN;
          else begin
            seq     <= Q_IDLE;
            busy    <= 1'b0;
            op_done <= 1'b1;
          end
        end
        Q_SCAN: if (sd_done) begin
          seq     <= Q_IDLE;
          busy    <= 1'b0;
          op_done <= 1'b1;
        end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  // The probes switch their register clock with 'sample': it may only change
  // while scan_clk rests low.
  a_sample_edge_scan_low: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(sample) |-> (!scan_clk && !$past(scan_clk)));
  a_no_sample_while_scan: assert property (@(posedge clk) disable iff (!rst_n) !(sample && sd_busy));
endmodule
