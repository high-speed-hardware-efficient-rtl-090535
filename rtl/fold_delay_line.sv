// fold_delay_line -- the sample delay chain of the folded (symmetric) FIR filter.
//
// Each clock a new sample x_in = x[n] enters. The block presents to folded tap k (k = 0 ..
// NTAPS/2-1) the pair pair_a[k] = x[n-k] and pair_b[k] = x[n-(NTAPS-1)+k], whose coefficients are
// equal, and to the centre tap the single sample centre = x[n-(NTAPS-1)/2]. The pairs are what
// the forward and returning Z^-1 rows of a folded filter supply; here they are taken from one
// shift register of NTAPS-1 stages, which holds the same samples. x[n] itself is passed
// combinationally as pair_a[0]; all other outputs come straight from registers. The register
// clears to 0 on reset.
//
// The folded arrangement (pairs of samples with equal coefficients added ahead of one multiplier)
// follows the document's linear-phase filter figure; using one straight shift register instead of
// two drawn rows, and the reset, are this design's choices.
module fold_delay_line #(
  parameter int NTAPS = 41,
  parameter int W     = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x_in,
  output logic [W-1:0] pair_a [NTAPS/2],
  output logic [W-1:0] pair_b [NTAPS/2],
  output logic [W-1:0] centre
);

  localparam int NPAIR = NTAPS / 2;

  logic [W-1:0] z [1:NTAPS-1];   // z[i] = x[n-i]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NTAPS; i++) z[i] <= '0;
    end else begin
      z[1] <= x_in;
      for (int i = 2; i < NTAPS; i++) z[i] <= z[i-1];
    end
  end

  assign pair_a[0] = x_in;
  for (genvar k = 1; k < NPAIR; k++) begin : g_a
    assign pair_a[k] = z[k];
  end
  for (genvar k = 0; k < NPAIR; k++) begin : g_b
    assign pair_b[k] = z[NTAPS-1-k];
  end
  assign centre = z[(NTAPS-1)/2];

endmodule
