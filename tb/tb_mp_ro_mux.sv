// tb_mp_ro_mux: the output follows the selected input for all codes and random inputs.
module tb_mp_ro_mux;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [7:0] ro_in;
  logic [2:0] sel;
  logic ro_sel_out;

  mp_ro_mux #(.N_IN(8), .SEL_W(3)) dut (.*);

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      ro_in = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (ro_sel_out !== ((ro_in >> s) & 1'b1)) begin
          failures++; $display("FAIL in=%b sel=%0d out=%b", ro_in, s, ro_sel_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
