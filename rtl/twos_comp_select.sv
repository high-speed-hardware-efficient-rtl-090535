// twos_comp_select -- sign stage of a filter tap: q = d, or q = -d when NEGATE is set.
//
// The coefficient codes are sign-magnitude, so each tap multiplies only by the magnitude and
// applies the sign here, before the multiplier. NEGATE is the sign bit of the tap's coefficient
// and is fixed at elaboration. The negation is the two's complement ~d + 1, formed with the
// carry-select adder. q is one bit wider than d so that negating the most negative input cannot
// overflow. Combinational; the tap registers its output.
//
// The block and its place between two registers follow the document's tap figure; reading it as
// a conditional negation driven by the coefficient sign is this design's interpretation.
module twos_comp_select #(
  parameter int W      = 14,
  parameter bit NEGATE = 1'b1
) (
  input  logic signed [W-1:0] d,
  output logic signed [W:0]   q
);

  logic [W:0] d_ext;
  assign d_ext = {d[W-1], d};

  if (NEGATE) begin : g_neg
    logic unused_cout;
    sqrt_csel_adder #(.W(W + 1)) u_inc (
      .a   (~d_ext),
      .b   ('0),
      .cin (1'b1),
      .sum (q),
      .cout(unused_cout)
    );
  end else begin : g_pass
    assign q = d_ext;
  end

endmodule
