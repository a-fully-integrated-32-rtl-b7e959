// mpc_regs_intf: register interface of the MultiProbe controller.
//
// Connects the controller to the on-chip network through an APB-style slave
// (psel/penable/pwrite, zero wait states, pslverr on unmapped addresses).
// Registers (byte addresses, see mp_pkg):
//   CTRL   0x000  write: bit0 scan, bit1 sample, bit2 measure (sample then
//                 scan) - one-cycle command pulses, ignored while busy;
//                 read: bit0 busy, bit1 done (set when a command ends,
//                 cleared when the next one is accepted)
//   PWIDTH 0x004  sampling pulse width in clock cycles
//   INFO   0x008  read only: number of chained MultiProbes
//   CFG[i] 0x100+4i  32-bit word scanned into probe i at the next scan
//                 ({sel, ovf, count start value}; normally sel << 29)
//   RES[i] 0x200+4i  read only: last word scanned out of probe i
// The Ser/Des reads CFG through tx_idx/tx_word and writes RES through
// rx_valid/rx_idx/rx_word. The block's role (storing results, supplying the
// next configuration, talking to the network) follows the design
// description; the bus protocol and the register map are this design's.
module mpc_regs_intf
  import mp_pkg::*;
#(
  parameter int unsigned N_PROBES = 4,
  parameter int unsigned PW_W     = 24,
  localparam int unsigned IDX_W   = (N_PROBES > 1) ? $clog2(N_PROBES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB-style slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [11:0]       paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // to the sequencer
  output logic              cmd_scan,
  output logic              cmd_sample,
  output logic              cmd_measure,
  output logic [PW_W-1:0]   pwidth,
  input  logic              busy,
  input  logic              op_done,
  // to/from the Ser/Des
  input  logic [IDX_W-1:0]  tx_idx,
  output logic [31:0]       tx_word,
  input  logic              rx_valid,
  input  logic [IDX_W-1:0]  rx_idx,
  input  logic [31:0]       rx_word
);
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] cfg [N_PROBES];
  logic [31:0] res [N_PROBES];
  logic        done_q;

  logic        wr;
  logic        a_cfg, a_res;
  logic [11:0] off;
  logic [9:0]  word_idx;
  logic        idx_ok;

  always_comb begin
    wr       = psel && penable && pwrite;
    a_cfg    = (paddr[11:8] == A_CFG0[11:8]);
    a_res    = (paddr[11:8] == A_RES0[11:8]);
    off      = {4'h0, paddr[7:0]};
    word_idx = 10'(off >> 2);
    idx_ok   = (word_idx < 10'(N_PROBES));
  end

  assign pready = 1'b1;

  always_comb begin
    prdata  = '0;
    pslverr = 1'b0;
    if (psel && penable) begin
      if (paddr == A_CTRL)        prdata = {30'h0, done_q, busy};
      else if (paddr == A_PWIDTH) prdata = 32'(pwidth);
      else if (paddr == A_INFO)   prdata = 32'(N_PROBES);
      else if (a_cfg && idx_ok && paddr[1:0] == 2'b00) prdata = cfg[word_idx[IDX_W-1:0]];
      else if (a_res && idx_ok && paddr[1:0] == 2'b00) prdata = res[word_idx[IDX_W-1:0]];
      else pslverr = 1'b1;
      if (pwrite && (paddr == A_INFO || a_res)) pslverr = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_scan    <= 1'b0;
      cmd_sample  <= 1'b0;
      cmd_measure <= 1'b0;
      pwidth      <= '0;
      done_q      <= 1'b0;
      for (int i = 0; i < int'(N_PROBES); i++) begin
        cfg[i] <= {RO_NONE, 1'b0, 28'h0};
        res[i] <= '0;
      end
    end else begin
      cmd_scan    <= 1'b0;
      cmd_sample  <= 1'b0;
      cmd_measure <= 1'b0;
      if (op_done) done_q <= 1'b1;
      if (wr) begin
        if (paddr == A_CTRL) begin
          if (!busy && (pwdata[2:0] != 3'b000)) begin
            // one command at a time; measure has priority, then sample
            cmd_measure <= pwdata[2];
            cmd_sample  <= pwdata[1] && !pwdata[2];
            cmd_scan    <= pwdata[0] && !pwdata[1] && !pwdata[2];
            done_q      <= 1'b0;
          end
        end else if (paddr == A_PWIDTH) begin
          pwidth <= pwdata[PW_W-1:0];
        end else if (a_cfg && idx_ok && paddr[1:0] == 2'b00) begin
          cfg[word_idx[IDX_W-1:0]] <= pwdata;
        end
      end
      if (rx_valid) res[rx_idx] <= rx_word;
    end
  end

  assign tx_word = (32'(tx_idx) < N_PROBES) ? cfg[tx_idx] : '0;

  // bus protocol rules
  property p_enable_follows_setup;
    @(posedge clk) disable iff (!rst_n) (psel && !penable) |=> (psel && penable);
  endproperty
  a_apb_setup: assert property (p_enable_follows_setup);
endmodule
