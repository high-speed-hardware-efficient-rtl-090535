// tb_fir_comp_filter -- end-to-end self-checking testbench of the 41-tap compensation filter,
// run with the top's default parameters.
//
// A reference model built from the coefficient values (h * 1024, written out below independently
// of the RTL package) computes every output sample from the input history:
//   y[n] = sum_{k=0..19} floor((x[n-k] + x[n-40+k]) * H[k] / 8192) + floor(x[n-20] * H[20] / 8192)
// and each y_out is compared with it exactly, 15 clocks after the sample that completes its
// window (the pipeline latency of this design). Stimulus: single impulses (one coefficient per
// output, which also checks the symmetry k / 40-k), full-scale steps, sign patterns that drive
// the output to its largest magnitude, random samples, gaps in in_valid, and a reset in the
// middle of a stream. Internal events are counted and each must happen at least once: a folded
// pre-addition with both samples non-zero, a 2's complement select of a negative coefficient,
// the centre tap without pre-adder, a balance register in the adder tree holding back an operand,
// and back-to-back output samples at one per clock.
`timescale 1ns/1ps
module tb_fir_comp_filter;
  import fir_comp_pkg::*;

  localparam int LAT   = 15;       // expected latency, x_in to y_out, in clocks
  localparam int NCYC  = 4000;

  // Coefficients of the 41-tap filter times 1024, k = 0..20 (taps k and 40-k).
  localparam int H [21] = '{-3478, 10288, -8633, 3799, -6146, 1921, 1458, 1030, 3502, -2616,
                             1398, -3338, 561, -1579, 394, -216, 1051, 172, 1350, -886, 955};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [12:0] x_in = '0;
  logic out_valid;
  logic signed [19:0] y_out;

  fir_comp_filter dut (.*);

  always #0.4 clk = ~clk;   // 1.25 GHz

  int checks = 0, failures = 0;
  int xs [NCYC];
  bit vs [NCYC];
  int cyc = 0;

  // event counters
  int n_preadd = 0, n_negate = 0, n_centre = 0, n_balance = 0, n_b2b = 0, n_fullscale = 0;
  int run = 0;

  function automatic int fdiv8192(longint v);   // floor(v / 8192)
    return int'(v >>> 13);
  endfunction

  function automatic int xat(int i);
    return (i < 0) ? 0 : xs[i];
  endfunction

  function automatic int yref(int m);
    longint acc = 0;
    if (m < 0) return 0;
    for (int k = 0; k < 20; k++)
      acc += fdiv8192(longint'(xat(m-k) + xat(m-40+k)) * H[k]);
    acc += fdiv8192(longint'(xat(m-20)) * H[20]);
    return int'(acc);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // Sample y_out and drive the next input at each falling edge.
  task automatic step(int x, bit v);
    @(negedge clk);
    if (rst_n) begin
      int m = cyc - LAT;
      int exp_y = yref(m);
      bit exp_v = (m >= 0) ? vs[m] : 1'b0;
      check(y_out == 20'(exp_y), $sformatf("y_out %0d expected %0d", y_out, exp_y));
      check(out_valid == exp_v, $sformatf("out_valid %0b expected %0b", out_valid, exp_v));
      if (out_valid && exp_v) begin
        run++;
        if (run >= 2) n_b2b++;
      end else run = 0;
      if (exp_y >= 50000 || exp_y <= -50000) n_fullscale++;
    end
    xs[cyc] = x;
    vs[cyc] = v;
    x_in = 13'(x);
    in_valid = v;
    cyc++;
  endtask

  // Internal events (hierarchical probes, counted on every rising edge).
  always @(posedge clk) if (rst_n) begin
    if (dut.g_tap[0].u_tap.x_a != 0 && dut.g_tap[0].u_tap.x_b != 0) n_preadd++;
    if (dut.g_tap[0].u_tap.pre_q != 0 && dut.g_tap[0].u_tap.sel_q != 0) n_negate++;  // COEF[0] < 0
    if (dut.u_tap_centre.x_a != 0) n_centre++;
    if (dut.u_tree.g_add[0].b_q != dut.u_tree.node[4]) n_balance++;  // leaf 4 is held back 1 clock
  end

  initial begin : watchdog
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FILTER_LAT == LAT, $sformatf("package latency %0d, expected %0d", FILTER_LAT, LAT));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. impulse response: each coefficient appears once, in order, 15 clocks later.
    step(1024, 1'b1);
    for (int i = 0; i < 60; i++) step(0, 1'b1);
    step(-4096, 1'b1);
    for (int i = 0; i < 60; i++) step(0, 1'b0);

    // 2. full-scale steps.
    for (int i = 0; i < 80; i++) step(4095, 1'b1);
    for (int i = 0; i < 80; i++) step(-4096, 1'b1);

    // 3. worst-case sign patterns: x[n-k] follows the sign of h_k (and the opposite).
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 82; i++) begin
        automatic int d = 40 - (i % 41);           // delay of sample i once the window is full
        automatic int kk = (d <= 20) ? d : 40 - d;
        automatic int sgn = (H[kk] < 0) ? -1 : 1;
        step((rep == 0) ? ((sgn > 0) ? 4095 : -4096) : ((sgn > 0) ? -4096 : 4095), 1'b1);
      end

    // 4. random samples with random gaps in in_valid.
    for (int i = 0; i < 1500; i++) step(int'($urandom_range(0, 8191)) - 4096, 1'($urandom_range(0, 3) != 0));

    // 5. reset in the middle of a stream, then more random samples.
    @(negedge clk);
    rst_n = 1'b0;
    x_in = '0;
    in_valid = 1'b0;
    for (int j = 0; j < cyc; j++) begin xs[j] = 0; vs[j] = 1'b0; end
    @(negedge clk);
    check(y_out == 0 && out_valid == 1'b0, "outputs not cleared by reset");
    rst_n = 1'b1;
    xs[cyc] = 0;            // the edge after the release captures the idle input
    vs[cyc] = 1'b0;
    cyc++;
    for (int i = 0; i < 1000; i++) step(int'($urandom_range(0, 8191)) - 4096, 1'b1);
    for (int i = 0; i < 60; i++) step(0, 1'b0);

    $display("events: preadd=%0d negate=%0d centre=%0d balance=%0d back_to_back=%0d fullscale=%0d",
             n_preadd, n_negate, n_centre, n_balance, n_b2b, n_fullscale);
    check(n_preadd > 0, "folded pre-addition never exercised");
    check(n_negate > 0, "2's complement select never exercised");
    check(n_centre > 0, "centre tap never exercised");
    check(n_balance > 0, "balance register never held back an operand");
    check(n_b2b > 0, "no back-to-back outputs");
    check(n_fullscale > 0, "no large-magnitude output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
