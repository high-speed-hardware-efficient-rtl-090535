// tb_shift_add_mult -- self-checking test of the pipelined shift-and-add constant multiplier.
//
// One instance per coefficient magnitude of the filter (21 constants, MAG = |h| * 1024), plus the
// default instance. A new random multiplicand in [-8192, 8192] is applied every clock (the full
// range a tap can present after the 2's complement select). Each product is compared with
// floor(x * MAG / 8192), taken exactly popcount(MAG) clocks after x was applied: the latency of
// one pipeline stage per set coefficient bit, and one result per clock.
`timescale 1ns/1ps
module tb_shift_add_mult;

  localparam int NM = 21;
  localparam int MAGS [NM] = '{3478, 10288, 8633, 3799, 6146, 1921, 1458, 1030, 3502, 2616,
                               1398, 3338, 561, 1579, 394, 216, 1051, 172, 1350, 886, 955};
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [14:0] x = '0;
  logic signed [14:0] p [NM];
  logic signed [14:0] p_def;
  int xs [NCYC];
  int cyc = 0;
  int checks = 0, failures = 0;

  for (genvar m = 0; m < NM; m++) begin : g_m
    shift_add_mult #(.MAG(MAGS[m])) u_mult (.clk, .rst_n, .x(x), .p(p[m]));
  end
  shift_add_mult u_def (.clk, .rst_n, .x(x), .p(p_def));   // default constant 955

  always #5 clk = ~clk;

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  function automatic int expect_p(int m, int lat);
    int i = cyc - lat;
    longint prod;
    if (i < 0) return 0;
    prod = longint'(xs[i]) * MAGS[m];
    return int'(prod >>> 13);
  endfunction

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
      for (int m = 0; m < NM; m++) begin
        automatic int e = expect_p(m, ones(MAGS[m]));
        checks++;
        if (int'(p[m]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d MAG=%0d: p=%0d expected %0d", cyc, MAGS[m], p[m], e);
        end
      end
      checks++;
      if (int'(p_def) != expect_p(20, ones(955))) failures++;
      // mostly random, with the extremes now and then
      case ($urandom_range(0, 9))
        0:       xs[cyc] = 8192;
        1:       xs[cyc] = -8192;
        default: xs[cyc] = int'($urandom_range(0, 16384)) - 8192;
      endcase
      x = 15'(xs[cyc]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
