// bypass_fa: one cell of the column-bypass array multiplier.
//
// A full adder adds the partial-product bit a_i*b_j, the sum from the cell
// above and the carry from the previous cell of the same multiplicand column.
// The multiplicand bit a_i acts as the bypass select: when it is 0 the
// adder's three inputs are isolated (the tri-state buffers of the original
// cell, modelled here as AND gates so that the adder inputs are held at 0
// and do not toggle) and a 2:1 multiplexer passes the upper sum straight
// through. The isolated adder then produces carry 0, which is exact because
// every cell of a bypassed column has a zero partial product and a zero
// incoming carry.
//
// Interface: purely combinational, one bit per port. The mux/isolation
// structure follows the published cell; replacing tri-state buffers by AND
// gates is this design's choice (no tri-state nets inside logic).
module bypass_fa (
  input  logic a_i,      // multiplicand bit of this column, bypass select
  input  logic pp,       // partial product a_i & b_j
  input  logic sum_in,   // sum from the cell above
  input  logic carry_in, // carry from the previous cell in this column
  output logic sum_out,
  output logic carry_out
);

  logic x, y, z;   // isolated full-adder inputs
  logic fa_sum;

  always_comb begin
    x         = pp & a_i;
    y         = sum_in & a_i;
    z         = carry_in & a_i;
    fa_sum    = x ^ y ^ z;
    carry_out = (x & y) | (x & z) | (y & z);
    sum_out   = a_i ? fa_sum : sum_in;
  end

endmodule
