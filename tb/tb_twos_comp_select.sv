// tb_twos_comp_select -- exhaustive test of the 2's complement select stage.
//
// Both variants (NEGATE = 1, the default, and NEGATE = 0) get every 14-bit input; q must equal
// -d, respectively d, as a 15-bit signed value, including -(-8192) = +8192.
`timescale 1ns/1ps
module tb_twos_comp_select;

  logic signed [13:0] d;
  logic signed [14:0] qn, qp;
  int checks = 0, failures = 0;

  twos_comp_select                  u_neg (.d(d), .q(qn));
  twos_comp_select #(.NEGATE(1'b0)) u_pos (.d(d), .q(qp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -8192; v < 8192; v++) begin
      d = 14'(v);
      #1;
      checks++;
      if (int'(qn) != -v) begin failures++; if (failures < 10) $display("FAIL -(%0d) gave %0d", v, qn); end
      checks++;
      if (int'(qp) != v) begin failures++; if (failures < 10) $display("FAIL +(%0d) gave %0d", v, qp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
