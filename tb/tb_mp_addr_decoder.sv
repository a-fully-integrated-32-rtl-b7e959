// tb_mp_addr_decoder: every code selects exactly its own RO; code 7 selects none.
module tb_mp_addr_decoder;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic [6:0] ro_select;

  mp_addr_decoder #(.N_RO(7), .SEL_W(3)) dut (.*);

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      logic [6:0] exp;
      sel = 3'(s);
      exp = (s < 7) ? 7'(1 << s) : 7'b0;
      #1;
      checks++;
      if (ro_select !== exp) begin
        failures++; $display("FAIL sel=%0d got %b exp %b", s, ro_select, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
