// adder_tree -- pipelined, latency-balanced adder tree that sums the 21 tap products.
//
// sum = leaf[0] + leaf[1] + ... + leaf[20], with each product taken in the clock it is ready.
// The taps' multipliers have different pipeline depths, so leaf i is valid
// fir_comp_pkg::tap_lat(LEAF_TAP[i]) clocks after the samples entered the taps. The tree has the
// 20-adder topology of fir_comp_pkg::NODE_A / NODE_B: six chains in which the earliest products
// are added first and later ones join further down, then three levels that merge the chains.
// Every adder (a carry-select adder of SUM_W bits) is followed by a register. Where an adder's
// two operands would arrive in different clocks, balance registers (bal_a / bal_b, computed at
// elaboration) delay the earlier one, so both meet in the same clock. The result appears
// fir_comp_pkg::TREE_LAT clocks after the taps' inputs; one new set of products per clock.
//
// The topology and the leaf order follow the document's adder-tree figure; the balance register
// counts follow from the tap latencies of this design. An elaboration check stops the build if
// a leaf's tap no longer has as many 1 bits in its code as the figure's number for that leaf.
module adder_tree
  import fir_comp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  prod_t leaf [NUNIQ],
  output sum_t  sum
);

  sum_t node [NUNIQ + NNODES];   // ids 0..20: leaves, 21..40: adder outputs (registered)

  for (genvar i = 0; i < NUNIQ; i++) begin : g_leaf
    assign node[i] = SUM_W'(leaf[i]);
    // The leaf assignment must keep matching the figure's leaf numbers if COEF is edited.
    if (code_ones(COEF[LEAF_TAP[i]]) != LEAF_FIG[i]) begin : g_mismatch
      $error("adder_tree: leaf %0d gets tap %0d, whose code has %0d one bits, not %0d",
             i, LEAF_TAP[i], code_ones(COEF[LEAF_TAP[i]]), LEAF_FIG[i]);
    end
  end

  for (genvar j = 0; j < NNODES; j++) begin : g_add
    localparam int DA = bal_a(j);
    localparam int DB = bal_b(j);
    sum_t a_q, b_q, s;
    logic unused_cout;

    dff_delay #(.W(SUM_W), .DEPTH(DA)) u_bal_a (
      .clk, .rst_n, .d(node[NODE_A[j]]), .q(a_q)
    );
    dff_delay #(.W(SUM_W), .DEPTH(DB)) u_bal_b (
      .clk, .rst_n, .d(node[NODE_B[j]]), .q(b_q)
    );

    sqrt_csel_adder #(.W(SUM_W)) u_add (
      .a(a_q), .b(b_q), .cin(1'b0), .sum(s), .cout(unused_cout)
    );

    dff_delay #(.W(SUM_W), .DEPTH(1)) u_reg (
      .clk, .rst_n, .d(s), .q(node[NUNIQ + j])
    );
  end

  assign sum = node[ROOT];

endmodule
