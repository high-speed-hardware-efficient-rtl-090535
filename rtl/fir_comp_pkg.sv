// fir_comp_pkg -- shared constants of the 41-tap linear-phase FIR compensation filter.
//
// Holds the word widths, the 21 distinct coefficient codes and the topology of the pipelined
// adder tree, together with elaboration-time functions that derive every pipeline latency from
// the coefficients. Nothing here is clocked.
//
// Coefficients: 15-bit sign-magnitude codes in Q5.10 form (sign bit, 4 integer bits, 10
// fractional bits), so a code stands for (-1)^s * MAG / 1024. COEF[k] is used by taps k and
// 40-k; COEF[20] is the centre tap. The codes follow the document's coefficient table.
//
// Tap latency: 2 registers in front of the multiplier plus one registered addition per set bit
// of the coefficient magnitude (shift_add_mult). Tree latency: every tree adder is followed by a
// register; balance registers delay the earlier operand so that both arrive in the same clock.
// The adder tree topology and the leaf numbering follow the document's adder-tree figure; the
// leaf-to-tap assignment (LEAF_TAP) is this design's reading of the numbers printed on that
// figure's leaves, which equal the count of 1 bits in each tap's 15-bit code.
package fir_comp_pkg;

  localparam int NTAPS   = 41;            // filter length
  localparam int NUNIQ   = (NTAPS + 1) / 2; // 21 distinct coefficients
  localparam int CENTRE  = NUNIQ - 1;     // index of the centre tap (20)
  localparam int DATA_W  = 13;            // input sample width
  localparam int PRE_W   = DATA_W + 1;    // pre-adder output width (14)
  localparam int SEL_W   = PRE_W + 1;     // after 2's complement select (15)
  localparam int COEF_W  = 15;            // coefficient code width
  localparam int MAG_W   = COEF_W - 1;    // coefficient magnitude width (14)
  localparam int FRAC_W  = 10;            // fractional bits of the coefficient
  localparam int PROD_W  = 15;            // multiplier output width
  localparam int PROD_SHIFT = SEL_W + MAG_W - 1 - PROD_W; // 13: product bits [27:13] are kept
  localparam int SUM_W   = 20;            // adder tree width: PROD_W + ceil(log2(21))
  localparam int TAP_PRE_LAT = 2;         // registers in a tap ahead of the multiplier
  localparam int NNODES  = NUNIQ - 1;     // 20 tree adders

  typedef logic [COEF_W-1:0] coef_t;
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  // Coefficient codes, index = tap number k (taps k and 40-k share COEF[k]).
  localparam coef_t COEF [NUNIQ] = '{
    15'b100110110010110,  // k=0   -3.397  (10011.0110010110)
    15'b010100000110000,  // k=1   10.047  (01010.0000110000)
    15'b110000110111001,  // k=2   -8.431  (11000.0110111001)
    15'b000111011010111,  // k=3    3.710  (00011.1011010111)
    15'b101100000000010,  // k=4   -6.002  (10110.0000000010)
    15'b000011110000001,  // k=5    1.876  (00001.1110000001)
    15'b000010110110010,  // k=6    1.424  (00001.0110110010)
    15'b000010000000110,  // k=7    1.006  (00001.0000000110)
    15'b000110110101110,  // k=8    3.420  (00011.0110101110)
    15'b100101000111000,  // k=9   -2.555  (10010.1000111000)
    15'b000010101110110,  // k=10   1.366  (00001.0101110110)
    15'b100110100001010,  // k=11  -3.260  (10011.0100001010)
    15'b000001000110001,  // k=12   0.548  (00000.1000110001)
    15'b100011000101011,  // k=13  -1.542  (10001.1000101011)
    15'b000000110001010,  // k=14   0.385  (00000.0110001010)
    15'b100000011011000,  // k=15  -0.211  (10000.0011011000)
    15'b000010000011011,  // k=16   1.027  (00001.0000011011)
    15'b000000010101100,  // k=17   0.168  (00000.0010101100)
    15'b000010101000110,  // k=18   1.319  (00001.0101000110)
    15'b100001101110110,  // k=19  -0.866  (10000.1101110110)
    15'b000001110111011   // k=20   0.933  (00000.1110111011)
  };

  // Number of set bits in a coefficient magnitude (= addition stages of its multiplier).
  function automatic int mag_ones(coef_t c);
    int n = 0;
    for (int i = 0; i < MAG_W; i++) n += int'(c[i]);
    return n;
  endfunction

  // Number of set bits in the whole 15-bit code, sign included (the figure's leaf numbers).
  function automatic int code_ones(coef_t c);
    int n = 0;
    for (int i = 0; i < COEF_W; i++) n += int'(c[i]);
    return n;
  endfunction

  // Clocks from a tap's inputs to its product.
  function automatic int tap_lat(int k);
    return TAP_PRE_LAT + mag_ones(COEF[k]);
  endfunction

  // ---------------------------------------------------------------- adder tree topology
  // Leaves 0..20 in the left-to-right order of the adder-tree figure; LEAF_FIG is the number the
  // figure prints on each leaf and LEAF_TAP the tap (coefficient index) that feeds it.
  localparam int LEAF_FIG [NUNIQ] = '{9,8,5,4,4, 8,6,3,4, 8,6,6, 7,5,5, 7,4,4,5, 8,8};
  localparam int LEAF_TAP [NUNIQ] = '{3,0,5,1,4, 2,6,7,12, 8,9,11, 10,15,16, 13,14,17,18, 19,20};

  // Adder j (source id NUNIQ+j) adds sources NODE_A[j] and NODE_B[j]; ids below NUNIQ are
  // leaves. Listed so that every adder comes after its operands; the last one is the root.
  localparam int NODE_A [NNODES] = '{ 3, 21, 22, 23,   7, 25, 26,  10, 28,  27, 24,
                                      13, 32,  16, 34, 35,  33,  19,  37,  31};
  localparam int NODE_B [NNODES] = '{ 4,  2,  1,  0,   8,  6,  5,  11,  9,  29, 30,
                                      14, 12,  17, 18, 15,  36,  20,  38,  39};
  localparam int ROOT = NUNIQ + NNODES - 1;

  // Clock at which source `id` holds its value, counted from the taps' inputs.
  function automatic int src_lat(int id);
    int lat [NUNIQ + NNODES];
    for (int i = 0; i < NUNIQ; i++) lat[i] = tap_lat(LEAF_TAP[i]);
    for (int j = 0; j < NNODES; j++) begin
      int la = lat[NODE_A[j]];
      int lb = lat[NODE_B[j]];
      lat[NUNIQ + j] = ((la > lb) ? la : lb) + 1;
    end
    return lat[id];
  endfunction

  // Balance registers ahead of operand A / B of adder j.
  function automatic int bal_a(int j);
    int la = src_lat(NODE_A[j]);
    int lb = src_lat(NODE_B[j]);
    return (lb > la) ? lb - la : 0;
  endfunction
  function automatic int bal_b(int j);
    int la = src_lat(NODE_A[j]);
    int lb = src_lat(NODE_B[j]);
    return (la > lb) ? la - lb : 0;
  endfunction

  localparam int TREE_LAT = src_lat(ROOT);   // taps' inputs to tree output
  // x_in to y_out: input register, then TREE_LAT (the delay line feeds the taps combinationally).
  localparam int FILTER_LAT = 1 + TREE_LAT;

endpackage
