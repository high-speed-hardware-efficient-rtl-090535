// tb_sqrt_csel_adder -- self-checking test of the square-root carry-select adder.
//
// Four widths are tested side by side (5, 14, 20 = default, 29 bits: the widths the filter uses
// plus one small one). Each is driven with corner operands (all zeros, all ones, alternating
// bits, carry chains that ripple through every block) and random operands with random carry-in;
// {cout, sum} is compared with a + b + cin computed in 64-bit arithmetic.
`timescale 1ns/1ps
module tb_sqrt_csel_adder;

  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, s5;    logic c5, co5;
  logic [13:0] a14, b14, s14; logic c14, co14;
  logic [19:0] a20, b20, s20; logic c20, co20;
  logic [28:0] a29, b29, s29; logic c29, co29;

  sqrt_csel_adder #(.W(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  sqrt_csel_adder #(.W(14)) u14 (.a(a14), .b(b14), .cin(c14), .sum(s14), .cout(co14));
  sqrt_csel_adder           u20 (.a(a20), .b(b20), .cin(c20), .sum(s20), .cout(co20));
  sqrt_csel_adder #(.W(29)) u29 (.a(a29), .b(b29), .cin(c29), .sum(s29), .cout(co29));

  task automatic apply(longint unsigned a, longint unsigned b, bit c);
    longint unsigned r;
    a5 = 5'(a);   b5 = 5'(b);   c5 = c;
    a14 = 14'(a); b14 = 14'(b); c14 = c;
    a20 = 20'(a); b20 = 20'(b); c20 = c;
    a29 = 29'(a); b29 = 29'(b); c29 = c;
    #1;
    r = longint'(a5) + longint'(b5) + longint'(c);
    checks++; if ({co5, s5} != 6'(r)) begin failures++; $display("FAIL W=5 %h+%h+%0d", a5, b5, c); end
    r = longint'(a14) + longint'(b14) + longint'(c);
    checks++; if ({co14, s14} != 15'(r)) begin failures++; $display("FAIL W=14 %h+%h+%0d", a14, b14, c); end
    r = longint'(a20) + longint'(b20) + longint'(c);
    checks++; if ({co20, s20} != 21'(r)) begin failures++; $display("FAIL W=20 %h+%h+%0d", a20, b20, c); end
    r = longint'(a29) + longint'(b29) + longint'(c);
    checks++; if ({co29, s29} != 30'(r)) begin failures++; $display("FAIL W=29 %h+%h+%0d", a29, b29, c); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0, 0);
    apply(0, 0, 1);
    apply('1, 0, 1);               // carry ripples through every block
    apply('1, '1, 1);
    apply(64'h5555_5555, 64'haaaa_aaaa, 1);
    apply(64'h5555_5555, 64'haaaa_aaaa, 0);
    for (int i = 0; i < 29; i++) apply((64'd1 << i) - 1, 1, 0);   // carry into each bit
    for (int i = 0; i < 5000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
