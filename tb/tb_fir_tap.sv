// tb_fir_tap -- self-checking test of one filter tap (pre-adder, 2's complement select,
// registers and shift-and-add multiplier).
//
// Three taps run side by side: the default (coefficient -0.866, folded, negative), a folded tap
// with a positive coefficient (10.047, the largest) and the centre tap without pre-adder
// (0.933, HAS_PREADD = 0, whose x_b input must be ignored). Random 13-bit sample pairs enter
// every clock; each tap's output must equal floor((x_a + x_b) * H / 8192) (x_b left out for the
// centre tap), with H = h * 1024 signed, exactly 2 + popcount(|H|) clocks after the samples.
`timescale 1ns/1ps
module tb_fir_tap;
  import fir_comp_pkg::*;

  localparam int NCYC = 3000;
  localparam int HN = -886, HP = 10288, HC = 955;

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t xa = '0, xb = '0;
  prod_t pn, pp, pc;
  int xas [NCYC], xbs [NCYC];
  int cyc;
  int checks = 0, failures = 0;

  fir_tap u_neg (.clk, .rst_n, .x_a(xa), .x_b(xb), .p(pn));
  fir_tap #(.TAP_COEF(15'b010100000110000)) u_pos (.clk, .rst_n, .x_a(xa), .x_b(xb), .p(pp));
  fir_tap #(.TAP_COEF(15'b000001110111011), .HAS_PREADD(1'b0)) u_ctr (.clk, .rst_n, .x_a(xa), .x_b(xb), .p(pc));

  always #5 clk = ~clk;

  function automatic int ones(int v);
    int n = 0;
    v = (v < 0) ? -v : v;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  function automatic int expect_p(int h, bit centre);
    int i = cyc - (2 + ones(h));
    longint s;
    if (i < 0) return 0;
    s = centre ? longint'(xas[i]) : longint'(xas[i] + xbs[i]);
    return int'((s * h) >>> 13);
  endfunction

  task automatic chk(prod_t got, int e, string name);
    checks++;
    if (int'(got) != e) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s: p=%0d expected %0d", cyc, name, got, e);
    end
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
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      chk(pn, expect_p(HN, 1'b0), "negative folded tap");
      chk(pp, expect_p(HP, 1'b0), "positive folded tap");
      chk(pc, expect_p(HC, 1'b1), "centre tap");
      case ($urandom_range(0, 7))
        0:       begin xas[cyc] = -4096; xbs[cyc] = -4096; end
        1:       begin xas[cyc] = 4095;  xbs[cyc] = 4095;  end
        default: begin xas[cyc] = int'($urandom_range(0, 8191)) - 4096; xbs[cyc] = int'($urandom_range(0, 8191)) - 4096; end
      endcase
      xa = 13'(xas[cyc]);
      xb = 13'(xbs[cyc]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
