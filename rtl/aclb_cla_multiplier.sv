// aclb_cla_multiplier: variable-latency (adaptive) column-bypass multiplier
// with a carry look-ahead final adder and adaptive hold logic.
//
// Datapath: the operands md (multiplicand) and mr (multiplicator) are
// registered in DFF1/DFF2, multiplied by the combinational column-bypass
// array (clb_cla_multiplier) and captured by a Razor register. The clock
// period is meant to be shorter than the worst-case multiplier delay: the
// adaptive hold logic (ahl) looks at the registered multiplicand and, when it
// has too few zero bits (few bypassed columns, long path), drops !(gating)
// for one cycle so the operands and the Razor register are held and the
// multiplication gets two cycles. If the prediction was wrong and the Razor
// register still catches a late result, it raises `error`, corrects its
// stored value from the shadow copy one cycle later and the top holds the
// operands for that extra cycle, re-executing the operation that was in
// flight with two cycles (`re_execute`). Razor errors feed the aging
// indicator; once it reports aging the hold logic switches to its stricter
// zero-count threshold.
//
// Interface and timing (one rising-edge clock `clk`, synchronous active-high
// `rst`; `dclk` is a delayed copy of `clk` for the Razor shadow register):
//   - md/mr are taken on a rising edge where `gating_n` is high and `error`
//     is low (in_ready), so they must be held until such an edge;
//   - `product_valid` marks, for one cycle, a product of the operands taken
//     one or two accepted cycles earlier; products leave in issue order;
//     a product shown with `error` high is wrong and is followed, on the
//     next cycle, by the corrected one with `product_valid` high again.
//   - `one_cycle` (the hold logic's prediction for the registered operands),
//     `gating_n`, `aged` and `re_execute` are brought out for observation.
// The block structure follows the published block diagram; the clock
// enable in place of the AND-gated clock, the operand hold on error, the
// valid flag and the reset behaviour are this design's choices.
module aclb_cla_multiplier #(
  parameter int unsigned WIDTH        = ahl_pkg::DEF_WIDTH,
  parameter int unsigned ZERO_THRESH  = ahl_pkg::DEF_ZERO_THRESH,
  parameter int unsigned AGING_WINDOW = ahl_pkg::DEF_AGING_WINDOW,
  parameter int unsigned AGING_ERRORS = ahl_pkg::DEF_AGING_ERRORS
) (
  input  logic               clk,
  input  logic               dclk,
  input  logic               rst,
  input  logic [WIDTH-1:0]   md,
  input  logic [WIDTH-1:0]   mr,
  output logic               in_ready,
  output logic [2*WIDTH-1:0] product,
  output logic               product_valid,
  output logic               error,
  output logic               re_execute,
  output logic               one_cycle,
  output logic               gating_n,
  output logic               aged
);

  logic [WIDTH-1:0]   md_q, mr_q;
  logic [2*WIDTH-1:0] mult_p;
  logic               razor_en;
  logic               loaded;
  ahl_pkg::latency_e  decision;

  // Operand registers advance on an ungated edge unless the Razor register
  // is correcting a late result.
  assign in_ready = gating_n & ~error;
  // The Razor register samples whenever the operands advance, and also on
  // a correction cycle so that the shadow value is written back.
  assign razor_en = gating_n | error;

  input_dff #(.WIDTH(WIDTH)) u_dff1 (
    .clk(clk), .rst(rst), .en(in_ready), .d(md), .q(md_q)
  );

  input_dff #(.WIDTH(WIDTH)) u_dff2 (
    .clk(clk), .rst(rst), .en(in_ready), .d(mr), .q(mr_q)
  );

  clb_cla_multiplier #(.WIDTH(WIDTH)) u_mult (
    .a(md_q), .b(mr_q), .p(mult_p)
  );

  razor_ff #(.WIDTH(2 * WIDTH)) u_razor (
    .clk(clk), .dclk(dclk), .rst(rst), .en(razor_en),
    .d(mult_p), .q(product), .error(error)
  );

  ahl #(
    .WIDTH(WIDTH), .ZERO_THRESH(ZERO_THRESH),
    .AGING_WINDOW(AGING_WINDOW), .AGING_ERRORS(AGING_ERRORS)
  ) u_ahl (
    .clk(clk), .rst(rst), .md(md_q), .error(error),
    .op_done(product_valid & ~error), .aged(aged),
    .decision(decision), .gating_n(gating_n)
  );

  // `loaded`: the operand registers hold a real pattern (not the reset
  // value). A product is valid after an edge that retired a loaded pattern
  // or wrote back a corrected one.
  always_ff @(posedge clk) begin
    if (rst) begin
      loaded        <= 1'b0;
      product_valid <= 1'b0;
    end else begin
      if (in_ready) loaded <= 1'b1;
      product_valid <= (in_ready & loaded) | error;
    end
  end

  assign re_execute = error;
  assign one_cycle  = (decision == ahl_pkg::LAT_ONE_CYCLE);

endmodule
