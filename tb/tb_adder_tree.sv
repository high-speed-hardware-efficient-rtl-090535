// tb_adder_tree -- self-checking test of the latency-balanced pipelined adder tree.
//
// The 21 leaves are driven, every clock, with fresh random 15-bit values. Leaf i stands for the
// product of tap LEAF_TAP[i], which is ready 2 + popcount(|h|) clocks after the samples enter the
// taps, so the sum that leaves the tree for sample set n must be the sum, over i, of the value
// leaf i held at clock n + 2 + popcount(|h_i|). The testbench keeps the history of every leaf
// and checks each output exactly, 14 clocks after sample set n (the tree's latency in this
// design). Mixing values from the wrong clocks, as an unbalanced tree would, is detected.
`timescale 1ns/1ps
module tb_adder_tree;
  import fir_comp_pkg::*;

  localparam int NCYC = 2000;
  localparam int TLAT = 14;
  // |h| * 1024 of the tap feeding each leaf, in leaf order
  localparam int LMAG [21] = '{3799, 3478, 1921, 10288, 6146, 8633, 1458, 1030, 561, 3502, 2616,
                               3338, 1398, 216, 1051, 1579, 394, 172, 1350, 886, 955};

  logic clk = 1'b0, rst_n = 1'b0;
  prod_t leaf [21];
  sum_t  sum;
  int lv [NCYC][21];
  int cyc;
  int checks = 0, failures = 0;

  adder_tree dut (.clk, .rst_n, .leaf(leaf), .sum(sum));

  always #5 clk = ~clk;

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  // value the tree should produce at clock c (sample set c - TLAT)
  function automatic int expect_sum(int c);
    int s = 0;
    int n = c - TLAT;
    for (int i = 0; i < 21; i++) begin
      int t = n + 2 + ones(LMAG[i]);
      if (n >= 0 && t >= 0 && t < c) s += lv[t][i];
    end
    return s;
  endfunction

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 21; i++) leaf[i] = '0;
    checks++;
    if (TREE_LAT != TLAT) begin failures++; $display("FAIL package tree latency %0d", TREE_LAT); end
    #12 rst_n = 1'b1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      if (cyc >= TLAT + 12) begin
        automatic int e = expect_sum(cyc);
        checks++;
        if (int'(sum) != e) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: sum=%0d expected %0d", cyc, sum, e);
        end
      end
      for (int i = 0; i < 21; i++) begin
        lv[cyc][i] = ($urandom_range(0, 9) == 0) ? (($urandom_range(0, 1) == 1) ? 16383 : -16384)
                                                 : int'($urandom_range(0, 32767)) - 16384;
        leaf[i] = 15'(lv[cyc][i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
