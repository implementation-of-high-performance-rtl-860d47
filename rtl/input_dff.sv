// input_dff: WIDTH-bit input flip-flops (DFF1 for the multiplicand, DFF2 for
// the multiplicator) on the gated clock.
//
// The published design clocks these flip-flops through an AND gate with the
// !(gating) output of the adaptive hold logic; a low !(gating) suppresses one
// clock edge and holds the current operands so that a slow pattern gets a
// second cycle. Here the AND-gated clock is written as an equivalent clock
// enable on the free-running clock (this design's choice, so that the whole
// design stays on one clock net). Synchronous active-high reset to zero.
module input_dff #(
  parameter int unsigned WIDTH = ahl_pkg::DEF_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,   // !(gating), further qualified by the top
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
