// tb_dff_delay -- self-checking test of the pipeline delay element.
//
// Three instances: the default (1 bit, 1 stage), an 8-bit 3-stage delay line and a 0-stage
// (wire) instance. Random data is applied every clock and each q is compared with the value
// applied DEPTH clocks earlier, kept in the testbench's own history. The asynchronous reset is
// checked to clear every stage, also in the middle of a run.
`timescale 1ns/1ps
module tb_dff_delay;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       d1, q1;
  logic [7:0] d3, q3, d0, q0;
  int checks = 0, failures = 0;

  dff_delay                     u1 (.clk, .rst_n, .d(d1), .q(q1));
  dff_delay #(.W(8), .DEPTH(3)) u3 (.clk, .rst_n, .d(d3), .q(q3));
  dff_delay #(.W(8), .DEPTH(0)) u0 (.clk, .rst_n, .d(d0), .q(q0));

  always #5 clk = ~clk;

  logic [7:0] h3 [3];   // h3[i] = d3 applied i+1 clocks ago
  logic       h1;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d1 = 0; d3 = 0; d0 = 0;
    h1 = 0; h3 = '{default: '0};
    #12;
    chk(q1 == 0 && q3 == 0, "reset state");
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      chk(q1 == h1, $sformatf("depth 1: q=%0b expected %0b", q1, h1));
      chk(q3 == h3[2], $sformatf("depth 3: q=%0h expected %0h", q3, h3[2]));
      if (n == 300) begin
        rst_n = 1'b0;
        #1;
        chk(q1 == 0 && q3 == 0, "asynchronous reset");
        h1 = 0; h3 = '{default: '0};
        rst_n = 1'b1;
      end
      d1 = 1'($urandom);
      d3 = 8'($urandom);
      d0 = 8'($urandom);
      #1;
      chk(q0 == d0, "depth 0 is a wire");
      @(posedge clk);
      h3[2] = h3[1]; h3[1] = h3[0]; h3[0] = d3;
      h1 = d1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
