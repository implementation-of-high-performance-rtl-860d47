// clb_cla_multiplier: WIDTH x WIDTH unsigned column-bypass array multiplier
// with a carry look-ahead final adder (CLB-CLA).
//
// Array: WIDTH-1 rows of WIDTH-1 bypass_fa cells form a carry-save array.
// Cell (i,j), i = 0..WIDTH-2, j = 1..WIDTH-1, adds the partial product
// a_i*b_j, the sum of cell (i+1,j-1) (or a_{i+1}*b_0 in row 1, and
// a_{WIDTH-1}*b_{j-1} at the left edge) and the carry of cell (i,j-1)
// (0 in row 1). All cells that add a_i*b_j for one i form the "column" of
// multiplicand bit a_i; when a_i is 0 every cell of that column is bypassed,
// so the number of zero bits in the multiplicand sets how much of the array
// switches and how long the critical path is. p[j] is the sum of cell (0,j).
//
// Final row: the sums and carries leaving the last array row are added by a
// WIDTH-1 bit carry look-ahead adder built from 4-bit CLA groups, replacing
// the ripple row of the plain column-bypass multiplier. It produces
// p[2*WIDTH-1:WIDTH].
//
// Interface: a (multiplicand, the bypass selects), b (multiplicator),
// p = a*b, purely combinational. Array topology, bypass columns and the CLA
// last row follow the published design; the group-ripple joining of the
// 4-bit CLA groups is this design's choice (see cla_adder).
module clb_cla_multiplier #(
  parameter int unsigned WIDTH = ahl_pkg::DEF_WIDTH
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned R = WIDTH - 1;   // array rows and cells per row

  // sum_o[j][i], carry_o[j][i]: outputs of cell (i,j); row 0 is unused.
  logic [R-1:0] sum_o   [R+1];
  logic [R-1:0] carry_o [R+1];

  assign sum_o[0]   = '0;
  assign carry_o[0] = '0;

  for (genvar j = 1; j <= R; j++) begin : g_row
    for (genvar i = 0; i < R; i++) begin : g_col
      logic s_in, c_in;
      if (j == 1) begin : g_first
        assign s_in = a[i+1] & b[0];
        assign c_in = 1'b0;
      end else begin : g_next
        if (i == R - 1) begin : g_edge
          assign s_in = a[WIDTH-1] & b[j-1];
        end else begin : g_inner
          assign s_in = sum_o[j-1][i+1];
        end
        assign c_in = carry_o[j-1][i];
      end
      bypass_fa u_cell (
        .a_i      (a[i]),
        .pp       (a[i] & b[j]),
        .sum_in   (s_in),
        .carry_in (c_in),
        .sum_out  (sum_o[j][i]),
        .carry_out(carry_o[j][i])
      );
    end
  end

  // Operands of the carry look-ahead last row.
  logic [R-1:0] fx, fy, fs;
  logic         fc;

  always_comb begin
    fx = {a[WIDTH-1] & b[WIDTH-1], sum_o[R][R-1:1]};
    fy = carry_o[R];
  end

  cla_adder #(.WIDTH(R)) u_final (
    .a   (fx),
    .b   (fy),
    .cin (1'b0),
    .sum (fs),
    .cout(fc)
  );

  always_comb begin
    p[0] = a[0] & b[0];
    for (int j = 1; j <= int'(R); j++) p[j] = sum_o[j][0];
    p[2*WIDTH-2:WIDTH] = fs;
    p[2*WIDTH-1]       = fc;
  end

endmodule
