// fir_comp_filter -- 41-tap linear-phase pipelined FIR compensation filter (top level).
//
// Corrects the passband droop of the SINC decimation filters of a delta-sigma ADC. One 13-bit
// two's complement sample enters per clock (x_in) and one filtered sample leaves per clock
// (y_out):
//     y[n] = sum_{k=0}^{19} q_k(x[n-k] + x[n-40+k]) + q_20(x[n-20])
// where q_k(s) = floor(s * h_k * 2^10 / 2^13) is the 15-bit product of tap k and h_k the
// coefficient of fir_comp_pkg::COEF (taps k and 40-k share h_k). y_out is therefore the filter
// output scaled by 2^-3 in units of the input LSB; a full-scale input cannot drive |y| above
// 54,300, well inside the 20-bit output.
//
// Structure: input register -> fold_delay_line (symmetric sample pairs) -> 21 fir_tap
// instances (20 with pre-adder, the centre tap without) -> adder_tree, which sums the products
// of taps of different pipeline depth with balance registers. Latency is
// fir_comp_pkg::FILTER_LAT clocks from x_in to y_out; in_valid is carried along the same number
// of clocks as out_valid. The pipeline never stalls: it advances every clock, and in_valid is a
// tag only.
//
// The folded structure, the tap pipeline, the coefficients and the adder-tree topology follow
// the document. The input register, the valid tag, the reset, the kept product bits and the
// output width are this design's choices.
module fir_comp_filter
  import fir_comp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output logic    out_valid,
  output sum_t    y_out
);

  sample_t x_q;
  logic [DATA_W-1:0] pa [NUNIQ-1];
  logic [DATA_W-1:0] pb [NUNIQ-1];
  logic [DATA_W-1:0] pc;
  prod_t tap_p [NUNIQ];    // product of tap k (coefficient index)
  prod_t leaf  [NUNIQ];    // the same products in adder-tree leaf order

  dff_delay #(.W(DATA_W), .DEPTH(1)) u_in_reg (
    .clk, .rst_n, .d(x_in), .q(x_q)
  );

  fold_delay_line #(.NTAPS(NTAPS), .W(DATA_W)) u_delay (
    .clk, .rst_n, .x_in(x_q), .pair_a(pa), .pair_b(pb), .centre(pc)
  );

  for (genvar k = 0; k < NUNIQ - 1; k++) begin : g_tap
    fir_tap #(.TAP_COEF(COEF[k]), .HAS_PREADD(1'b1)) u_tap (
      .clk, .rst_n, .x_a(pa[k]), .x_b(pb[k]), .p(tap_p[k])
    );
  end

  fir_tap #(.TAP_COEF(COEF[CENTRE]), .HAS_PREADD(1'b0)) u_tap_centre (
    .clk, .rst_n, .x_a(pc), .x_b('0), .p(tap_p[CENTRE])
  );

  for (genvar i = 0; i < NUNIQ; i++) begin : g_leaf
    assign leaf[i] = tap_p[LEAF_TAP[i]];
  end

  adder_tree u_tree (
    .clk, .rst_n, .leaf(leaf), .sum(y_out)
  );

  dff_delay #(.W(1), .DEPTH(FILTER_LAT)) u_valid (
    .clk, .rst_n, .d(in_valid), .q(out_valid)
  );

endmodule
