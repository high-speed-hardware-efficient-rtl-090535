// sqrt_csel_adder -- W-bit square-root carry-select adder (combinational).
//
// sum = a + b + cin (modulo 2^W), cout = carry out of bit W-1.
// The word is cut into blocks of 1, 2, 3, ... bits from the least significant end (the last
// block takes whatever is left). The first block is a plain ripple-carry adder fed by cin. Every
// later block holds two ripple-carry adders, one assuming a block carry-in of 0 and one of 1, and
// a multiplexer that picks the right one when the real carry arrives from the block below. With
// growing block sizes the worst-case delay grows with sqrt(W) rather than W.
//
// The document chooses this adder type for all its adders (12 to 24 bits); the block sizes are
// this design's choice.
module sqrt_csel_adder #(
  parameter int W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // Lowest bit of block i: blocks of size 1, 2, 3, ... start at 0, 1, 3, 6, 10, ...
  function automatic int blk_lo(int i);
    return (i * (i + 1)) / 2;
  endfunction

  // Number of blocks needed to cover W bits.
  function automatic int num_blocks(int w);
    int n = 0;
    while (blk_lo(n) < w) n++;
    return n;
  endfunction

  localparam int NB = num_blocks(W);

  logic [NB:0] bc;   // bc[i] = carry into block i
  assign bc[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam int LO = blk_lo(i);
    localparam int HI = (blk_lo(i + 1) < W) ? blk_lo(i + 1) - 1 : W - 1;
    localparam int BW = HI - LO + 1;

    logic [BW-1:0] s0, s1;   // block sums for carry-in 0 and 1
    logic          c0, c1;   // block carries for carry-in 0 and 1

    always_comb begin
      logic k0, k1;
      k0 = 1'b0;
      k1 = 1'b1;
      for (int j = 0; j < BW; j++) begin
        s0[j] = a[LO+j] ^ b[LO+j] ^ k0;
        k0    = (a[LO+j] & b[LO+j]) | (k0 & (a[LO+j] ^ b[LO+j]));
        s1[j] = a[LO+j] ^ b[LO+j] ^ k1;
        k1    = (a[LO+j] & b[LO+j]) | (k1 & (a[LO+j] ^ b[LO+j]));
      end
      c0 = k0;
      c1 = k1;
    end

    // Carry select: the incoming block carry picks the precomputed result.
    assign sum[HI:LO] = bc[i] ? s1 : s0;
    assign bc[i+1]    = bc[i] ? c1 : c0;
  end

  assign cout = bc[NB];

endmodule
