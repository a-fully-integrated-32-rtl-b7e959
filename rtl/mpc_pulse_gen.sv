// mpc_pulse_gen: programmable sampling pulse generator.
//
// On 'start' (one clock pulse) it latches 'width' and drives 'sample' high
// for exactly that many clock cycles, starting on the clock edge after
// 'start'. 'done' pulses for one cycle on the edge that lowers 'sample'.
// A width of zero produces no pulse and 'done' one cycle after 'start'.
// 'start' is ignored while a pulse is running. The pulse sets the sensing
// window of the MultiProbes, so its length is exact to the clock cycle.
// Its role follows the design description; the clock-cycle resolution and
// the width register size PW_W are this design's choice.
module mpc_pulse_gen #(
  parameter int unsigned PW_W = 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [PW_W-1:0] width,
  output logic            sample,
  output logic            done
);
  timeunit 1ns; timeprecision 1ps;

  logic [PW_W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample    <= 1'b0;
      done      <= 1'b0;
      remaining <= '0;
    end else begin
      done <= 1'b0;
      if (sample) begin
        if (remaining == PW_W'(1)) begin
          sample <= 1'b0;
          done   <= 1'b1;
        end
        remaining <= remaining - 1'b1;
      end else if (start) begin
        if (width == '0) done <= 1'b1;
        else begin
          sample    <= 1'b1;
          remaining <= width;
        end
      end
    end
  end
endmodule
