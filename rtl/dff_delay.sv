// dff_delay -- pipeline delay element: DEPTH cascaded W-bit D flip-flops.
//
// Every pipeline register of the filter (tap registers, adder-tree registers and the balance
// registers that line up operands arriving in different clocks) is an instance of this module.
// q follows d DEPTH rising clock edges later; DEPTH = 0 gives a plain wire. All stages clear to 0
// on the asynchronous active-low reset.
//
// The document builds this element as a custom master-slave CMOS flip-flop; here it is a
// behavioural edge-triggered register with the same function. The reset is this design's choice.
module dff_delay #(
  parameter int W     = 1,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
