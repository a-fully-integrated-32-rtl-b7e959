// mpc_serdes: serializer/deserializer between the controller and the
// daisy chain of N_PROBES MultiProbes.
//
// The chain is one shift register of N_PROBES x 32 bits that shifts toward
// the controller: the controller drives 'scan_out' into probe 0 and reads
// 'scan_in' from the last probe. One transfer ('start') shifts all
// N_PROBES x 32 bits: the words leaving the chain are the probes' results,
// the words entering it are their next configurations. Words travel LSB
// first, and the k-th word of a transfer belongs to probe N_PROBES-1-k, both
// ways. So 'tx_idx' names the probe whose next word is wanted on 'tx_word'
// (read at the start of each word, one word ahead) and 'rx_idx'/'rx_word' with 'rx_valid'
// deliver each result word as soon as it is complete.
//
// Timing: each bit takes two clock cycles, scan_clk low then high. The
// outgoing bit changes only when scan_clk falls, and the incoming bit is
// taken in the low cycle, just before the rising edge on which all probes
// shift. A transfer lasts 2 x 32 x N_PROBES cycles; 'done' pulses on the
// cycle after the last rising scan edge, with scan_clk low again.
// The block's role follows the design description; the bit order, the
// two-cycle scan clock and the word-at-a-time interface are this design's.
module mpc_serdes #(
  parameter int unsigned N_PROBES = 4,
  parameter int unsigned WORD_W   = 32,
  localparam int unsigned IDX_W   = (N_PROBES > 1) ? $clog2(N_PROBES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // next configuration words, read from the register interface
  output logic [IDX_W-1:0]  tx_idx,
  input  logic [WORD_W-1:0] tx_word,
  // result words, written to the register interface
  output logic              rx_valid,
  output logic [IDX_W-1:0]  rx_idx,
  output logic [WORD_W-1:0] rx_word,
  // serial chain
  output logic              scan_clk,
  output logic              scan_out,
  input  logic              scan_in
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_LO, S_HI} state_e;

  state_e                      state;
  logic [WORD_W-1:0]           tx_sh, rx_sh;
  logic [$clog2(WORD_W)-1:0]   bit_cnt;
  logic [IDX_W-1:0]            word_cnt;

  logic [IDX_W-1:0] cur_idx;
  // While idle tx_idx points at the first word to send; during a word it
  // already points at the following one, which is loaded at the word boundary.
  always_comb begin
    cur_idx = IDX_W'(N_PROBES - 1) - word_cnt;
    tx_idx  = (state == S_IDLE) ? IDX_W'(N_PROBES - 1) : cur_idx - 1'b1;
  end
  assign busy     = (state != S_IDLE);
  assign scan_out = tx_sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tx_sh    <= '0;
      rx_sh    <= '0;
      bit_cnt  <= '0;
      word_cnt <= '0;
      scan_clk <= 1'b0;
      done     <= 1'b0;
      rx_valid <= 1'b0;
      rx_idx   <= '0;
      rx_word  <= '0;
    end else begin
      done     <= 1'b0;
      rx_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          word_cnt <= '0;
          bit_cnt  <= '0;
          tx_sh    <= tx_word;       // tx_idx = N_PROBES-1 here
          state    <= S_LO;
        end
        S_LO: begin
          rx_sh    <= {scan_in, rx_sh[WORD_W-1:1]};
          scan_clk <= 1'b1;
          state    <= S_HI;
        end
        S_HI: begin
          scan_clk <= 1'b0;
          if (bit_cnt == $clog2(WORD_W)'(WORD_W - 1)) begin
            rx_valid <= 1'b1;
            rx_idx   <= cur_idx;
            rx_word  <= rx_sh;
            bit_cnt  <= '0;
            if (word_cnt == IDX_W'(N_PROBES - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              word_cnt <= word_cnt + 1'b1;
              tx_sh    <= tx_word;
              state    <= S_LO;
            end
          end else begin
            tx_sh   <= tx_sh >> 1;
            bit_cnt <= bit_cnt + 1'b1;
            state   <= S_LO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
