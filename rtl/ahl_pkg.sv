// ahl_pkg: constants and helper functions shared by the adaptive-hold-logic
// column-bypass multiplier.
//
// The operand width of 16 bits is the configuration the design is built and
// evaluated at. The zero-count threshold n of the adaptive hold logic is not
// given a number anywhere, so DEF_ZERO_THRESH is this design's own choice:
// a multiplicand with more than 7 zero bits (out of 16) bypasses at least
// half of the adder columns and is treated as a one-cycle pattern while the
// circuit is fresh; once aged the threshold moves to n+1 = 8.
package ahl_pkg;

  // Operand width m (multiplicand and multiplicator), product is 2m bits.
  localparam int unsigned DEF_WIDTH = 16;

  // Zero-count threshold n of the first decision block ("#0's > n").
  localparam int unsigned DEF_ZERO_THRESH = 7;

  // Aging indicator: operations per observation window and number of Razor
  // errors within one window that declare the circuit aged.
  localparam int unsigned DEF_AGING_WINDOW = 64;
  localparam int unsigned DEF_AGING_ERRORS = 4;

  // Latency class the hold logic predicts for an input pattern.
  typedef enum logic {
    LAT_TWO_CYCLE = 1'b0,
    LAT_ONE_CYCLE = 1'b1
  } latency_e;

endpackage
