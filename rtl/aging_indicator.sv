// aging_indicator: decides from the Razor error rate that the multiplier has
// aged.
//
// Completed operations are counted in windows of WINDOW operations. Razor
// errors seen within the current window are counted too; when they reach
// ERRORS the `aged` flag is set and stays set until reset, since transistor
// aging does not undo itself in operation. Both counters restart at the end
// of every window. Only the function (frequent errors mean the circuit has
// aged, and aging switches the hold logic to its stricter threshold) comes
// from the published design; the window counting, the sizes and the sticky
// flag are this design's choices.
//
// Interface: `op_done` pulses once per completed operation, `error` is the
// Razor error (one cycle per detected violation). Synchronous active-high
// reset; `aged` is registered.
module aging_indicator #(
  parameter int unsigned WINDOW = ahl_pkg::DEF_AGING_WINDOW,
  parameter int unsigned ERRORS = ahl_pkg::DEF_AGING_ERRORS
) (
  input  logic clk,
  input  logic rst,
  input  logic op_done,
  input  logic error,
  output logic aged
);

  localparam int unsigned OW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(ERRORS + 1);

  logic [OW-1:0] ops_cnt;
  logic [EW-1:0] err_cnt;
  logic          window_end;

  assign window_end = op_done && (ops_cnt == OW'(WINDOW - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      ops_cnt <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (error && (err_cnt == EW'(ERRORS - 1))) aged <= 1'b1;

      if (window_end) begin
        ops_cnt <= '0;
        err_cnt <= '0;
      end else begin
        if (op_done) ops_cnt <= ops_cnt + 1'b1;
        if (error && (err_cnt != EW'(ERRORS))) err_cnt <= err_cnt + 1'b1;
      end
    end
  end

endmodule
