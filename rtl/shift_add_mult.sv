// shift_add_mult -- pipelined multiplier by a fixed unsigned constant MAG, using shift-and-add.
//
// p = (x * MAG) >>> SHIFT (arithmetic shift, i.e. rounded toward minus infinity), truncated to
// OUT_W bits. Only the bits of MAG that are 1 produce a partial product, so a constant with few
// set bits costs few adders. The multiplier is pipelined at bit level: stage 0 registers x shifted
// to the position of the lowest set bit, and each later stage adds one more shifted copy of x
// (through a carry-select adder) and registers the result, carrying x along beside it. The
// latency is therefore NONES = popcount(MAG) clocks, and one new x is accepted every clock.
//
// x is signed, so the shifted copies are sign-extended partial products of ACC_W = IN_W + MAG_W
// bits. The document gives the shift-and-add idea, the removal of the rows for 0 coefficient bits
// and the bit-level pipelining; one addition per stage and the choice of kept product bits are
// this design's. With the filter's operands (|x| <= 2^13, MAG < 2^14) the product fits in 28 bits
// and the default SHIFT = 13 keeps bits 27..13, which cannot overflow.
module shift_add_mult #(
  parameter int          IN_W  = 15,
  parameter int          MAG_W = 14,
  parameter int unsigned MAG   = 955,
  parameter int          OUT_W = 15,
  parameter int          SHIFT = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  localparam int ACC_W = IN_W + MAG_W;
  localparam int NONES = $countones(MAG[MAG_W-1:0]);

  // Position of the j-th set bit of MAG (j = 0 is the least significant).
  function automatic int one_pos(int j);
    int n = 0;
    for (int i = 0; i < MAG_W; i++)
      if (MAG[i]) begin
        if (n == j) return i;
        n++;
      end
    return 0;
  endfunction

  if (NONES == 0) begin : g_zero
    // A zero constant needs no hardware at all.
    assign p = '0;
  end else begin : g_pipe
    logic signed [ACC_W-1:0] acc [NONES];   // partial sum after stage j
    logic signed [IN_W-1:0]  xs  [NONES];   // multiplicand travelling with acc

    logic signed [ACC_W-1:0] x_ext;
    assign x_ext = ACC_W'(x);

    // Stage 0: first partial product, a pure shift.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[0] <= '0;
        xs[0]  <= '0;
      end else begin
        acc[0] <= x_ext <<< one_pos(0);
        xs[0]  <= x;
      end
    end

    // Stages 1..NONES-1: add one shifted copy of x each.
    for (genvar j = 1; j < NONES; j++) begin : g_stage
      logic [ACC_W-1:0] pp, s;
      logic             unused_cout;
      assign pp = ACC_W'(xs[j-1]) << one_pos(j);

      sqrt_csel_adder #(.W(ACC_W)) u_add (
        .a   (acc[j-1]),
        .b   (pp),
        .cin (1'b0),
        .sum (s),
        .cout(unused_cout)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          acc[j] <= '0;
          xs[j]  <= '0;
        end else begin
          acc[j] <= s;
          xs[j]  <= xs[j-1];
        end
      end
    end

    assign p = acc[NONES-1][SHIFT +: OUT_W];
  end

endmodule
