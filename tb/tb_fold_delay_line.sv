// tb_fold_delay_line -- self-checking test of the folded sample delay line (41 taps, 13 bits).
//
// Random samples enter every clock. After each clock every output is compared with the sample
// history kept by the testbench: pair_a[k] = x[n-k], pair_b[k] = x[n-40+k], centre = x[n-20],
// where x[n] is the sample currently on x_in. Samples from before the reset count as 0.
`timescale 1ns/1ps
module tb_fold_delay_line;

  localparam int NCYC = 500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [12:0] x_in = '0;
  logic [12:0] pa [20], pb [20], pc;
  int xs [NCYC];
  int checks = 0, failures = 0;

  fold_delay_line dut (.clk, .rst_n, .x_in, .pair_a(pa), .pair_b(pb), .centre(pc));

  always #5 clk = ~clk;

  function automatic logic [12:0] hist(int i);
    return (i < 0) ? 13'd0 : 13'(xs[i]);
  endfunction

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      xs[n] = int'($urandom_range(0, 8191));
      x_in = 13'(xs[n]);
      #1;
      for (int k = 0; k < 20; k++) begin
        chk(pa[k] == hist(n - k), $sformatf("n=%0d pair_a[%0d]", n, k));
        chk(pb[k] == hist(n - 40 + k), $sformatf("n=%0d pair_b[%0d]", n, k));
      end
      chk(pc == hist(n - 20), $sformatf("n=%0d centre", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
