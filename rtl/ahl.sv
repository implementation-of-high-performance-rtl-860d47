// ahl: adaptive hold logic that predicts whether a multiplication needs one
// or two clock cycles.
//
// Two decision blocks count the zero bits of the registered multiplicand:
// the first says "more than ZERO_THRESH zeros", the second "more than
// ZERO_THRESH+1 zeros". Many zeros mean many bypassed columns and a short
// critical path, so a true decision means a one-cycle pattern. A multiplexer
// picks the first block while the circuit is fresh and the second, stricter
// one once the aging indicator reports aging. The aging indicator is part of
// this block, as in the published drawing, and is fed by the Razor error. The multiplexer output is ORed
// with the inverted output of a D flip-flop and stored in it; the
// flip-flop's output is !(gating), the enable of the input registers:
//   - fresh pattern, one cycle : D = 1, inputs advance on the next edge;
//   - fresh pattern, two cycles: D = 0, the next input edge is suppressed;
//   - after a suppressed edge  : ~Q = 1 forces D = 1, so a pattern is never
//     held for more than two cycles.
//
// Timing: the flip-flop updates on the falling clock edge, so !(gating)
// settles in the low phase of the cycle in which the pattern was loaded and
// gates the very next rising edge (the enable of an AND clock gate may only
// change while the clock is low). The decision path therefore has half a
// cycle. The decision blocks, the multiplexer, the OR feedback and the
// flip-flop follow the published circuit; the falling-edge flip-flop, the
// reset value 1, the threshold value and the aging policy (see
// aging_indicator) are this design's choices.
module ahl #(
  parameter int unsigned WIDTH        = ahl_pkg::DEF_WIDTH,
  parameter int unsigned ZERO_THRESH  = ahl_pkg::DEF_ZERO_THRESH,
  parameter int unsigned AGING_WINDOW = ahl_pkg::DEF_AGING_WINDOW,
  parameter int unsigned AGING_ERRORS = ahl_pkg::DEF_AGING_ERRORS
) (
  input  logic             clk,
  input  logic             rst,       // synchronous, active high
  input  logic [WIDTH-1:0] md,        // registered multiplicand
  input  logic             error,     // Razor error
  input  logic             op_done,   // one operation completed
  output logic             aged,      // aging indicator output
  output ahl_pkg::latency_e decision, // multiplexer output
  output logic             gating_n   // !(gating): input register enable
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [CW-1:0] zeros;
  logic          more_than_n, more_than_n1;
  logic          d_in;

  always_comb begin
    zeros = '0;
    for (int k = 0; k < int'(WIDTH); k++) zeros += CW'(!md[k]);
    more_than_n  = (32'(zeros) > ZERO_THRESH);
    more_than_n1 = (32'(zeros) > ZERO_THRESH + 1);
    decision     = ahl_pkg::latency_e'(aged ? more_than_n1 : more_than_n);
    d_in         = decision | ~gating_n;
  end

  aging_indicator #(.WINDOW(AGING_WINDOW), .ERRORS(AGING_ERRORS)) u_aging (
    .clk(clk), .rst(rst), .op_done(op_done), .error(error), .aged(aged)
  );

  always_ff @(negedge clk) begin
    if (rst) gating_n <= 1'b1;
    else     gating_n <= d_in;
  end

  // A pattern is held for at most one extra cycle.
  a_hold_once : assert property (@(posedge clk) disable iff (rst)
    !gating_n |=> gating_n);

endmodule
