// fir_tap -- one pipelined tap of the folded linear-phase FIR filter.
//
// p = h * (x_a + x_b), where h is the tap's fixed coefficient, given as a 15-bit sign-magnitude
// code TAP_COEF (sign bit, 4 integer and 10 fractional bits). The datapath, in pipeline order:
//   pre-adder   x_a + x_b of the two symmetric samples (13-bit operands, 14-bit carry-select sum)
//   register
//   2's complement select: negate when the coefficient sign bit is set (15 bits)
//   register
//   shift_add_mult by the coefficient magnitude, one stage per set magnitude bit; it keeps the
//   15 product bits 27..13, i.e. p = floor(+-(x_a + x_b) * |h| * 2^10 / 2^13)
// Latency: fir_comp_pkg::TAP_PRE_LAT + popcount(magnitude) clocks; one sample pair per clock.
//
// With HAS_PREADD = 0 (the centre tap, which has a single sample) the pre-adder is left out and
// x_b is ignored; the first register then holds the sign-extended x_a, so all taps keep the same
// register structure. The stage order follows the document's tap figure; the widths inside the
// tap, the kept product bits and the centre-tap register are this design's choices.
module fir_tap
  import fir_comp_pkg::*;
#(
  parameter coef_t TAP_COEF   = fir_comp_pkg::COEF[fir_comp_pkg::CENTRE - 1],
  parameter bit    HAS_PREADD = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_a,
  input  sample_t x_b,
  output prod_t   p
);

  logic signed [PRE_W-1:0] pre, pre_q;
  logic signed [SEL_W-1:0] sel, sel_q;

  if (HAS_PREADD) begin : g_preadd
    logic unused_cout;
    sqrt_csel_adder #(.W(PRE_W)) u_preadd (
      .a   (PRE_W'(x_a)),
      .b   (PRE_W'(x_b)),
      .cin (1'b0),
      .sum (pre),
      .cout(unused_cout)
    );
  end else begin : g_single
    sample_t unused_x_b;
    assign unused_x_b = x_b;
    assign pre        = PRE_W'(x_a);
  end

  dff_delay #(.W(PRE_W), .DEPTH(1)) u_reg_pre (
    .clk, .rst_n, .d(pre), .q(pre_q)
  );

  twos_comp_select #(.W(PRE_W), .NEGATE(TAP_COEF[COEF_W-1])) u_sel (
    .d(pre_q), .q(sel)
  );

  dff_delay #(.W(SEL_W), .DEPTH(1)) u_reg_sel (
    .clk, .rst_n, .d(sel), .q(sel_q)
  );

  shift_add_mult #(
    .IN_W (SEL_W),
    .MAG_W(MAG_W),
    .MAG  (int'(TAP_COEF[MAG_W-1:0])),
    .OUT_W(PROD_W),
    .SHIFT(PROD_SHIFT)
  ) u_mult (
    .clk, .rst_n, .x(sel_q), .p(p)
  );

endmodule
