// razor_ff: WIDTH-bit Razor output register that detects late-arriving data.
//
// Each bit has a main flip-flop on the normal clock and a shadow register
// on a delayed clock, both fed by the combinational result `d`. When the
// result arrives after the main clock edge but before the delayed edge, the
// main flip-flop holds a stale value while the shadow holds the correct one;
// an XOR per bit compares the two and an OR over all bits raises `error`. A
// 2:1 multiplexer in front of the main flip-flop (select = error) then
// reloads the main flip-flop from the shadow on the next edge, so the stored
// product is corrected one cycle later. During that correcting cycle
// (`restoring`) the comparison is masked: the shadow has meanwhile sampled
// the next operation's result, which the main flip-flop takes on the
// following edge.
//
// Timing: `d` is sampled on rising `clk` (main) and rising `dclk` (shadow)
// when `en` is high. `dclk` may coincide with `clk` or rise after it and
// before the next `clk`; as for any Razor register, `d` must not change
// between the two edges except by a late arrival (the short-path
// constraint). `error` is combinational from the two registers; it is
// meaningful from the `dclk` edge to the next `clk` edge. The user of the
// register must not present a new operation in the cycle in which `error`
// is high (the top holds its operands). `rst` is synchronous, active high.
// The main flip-flop, shadow, XOR/OR error and restoring multiplexer follow
// the published cell. The shadow is written as an edge-triggered register
// rather than a level-sensitive latch, it samples `d` directly instead of
// the multiplexer output, and the masking during correction, `en` (the
// design's gated clock) and the reset are this design's choices.
module razor_ff #(
  parameter int unsigned WIDTH = 2 * ahl_pkg::DEF_WIDTH
) (
  input  logic             clk,
  input  logic             dclk,   // delayed copy of clk
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);

  logic [WIDTH-1:0] main_q;
  logic [WIDTH-1:0] shadow_q;
  logic             restoring;

  assign error = (|(main_q ^ shadow_q)) & ~restoring;

  always_ff @(posedge clk) begin
    if (rst) begin
      main_q    <= '0;
      restoring <= 1'b0;
    end else if (en) begin
      main_q    <= error ? shadow_q : d;
      restoring <= error;
    end
  end

  always_ff @(posedge dclk) begin
    if (rst)     shadow_q <= '0;
    else if (en) shadow_q <= d;
  end

  assign q = main_q;

endmodule
