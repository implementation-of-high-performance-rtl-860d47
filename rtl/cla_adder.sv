// cla_adder: WIDTH-bit adder built from 4-bit carry look-ahead groups.
//
// The operands are zero-extended to a multiple of four bits and split into
// cla4 groups; the carry out of each group is the carry in of the next.
// Inside a group the carries are looked ahead; between groups they ripple.
// How the published 4-bit CLA is widened to the multiplier's last row is not
// spelled out, so this group-ripple arrangement is this design's choice.
//
// Combinational. sum is WIDTH bits, cout is the carry out of bit WIDTH-1.
module cla_adder #(
  parameter int unsigned WIDTH = 15
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned GROUPS = (WIDTH + 3) / 4;
  localparam int unsigned EXT    = GROUPS * 4;

  logic [EXT-1:0] a_ext, b_ext, s_ext;
  logic [GROUPS:0] gc;

  assign a_ext = EXT'(a);
  assign b_ext = EXT'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < GROUPS; k++) begin : g_grp
    logic gg_unused, gp_unused;
    cla4 u_cla4 (
      .a      (a_ext[4*k +: 4]),
      .b      (b_ext[4*k +: 4]),
      .cin    (gc[k]),
      .sum    (s_ext[4*k +: 4]),
      .cout   (gc[k+1]),
      .group_g(gg_unused),
      .group_p(gp_unused)
    );
  end

  // Carry out of the top real bit: with zero-extended operands the padding
  // bits only propagate it, so it shows up as the first padding sum bit or,
  // when there is no padding, as the last group carry.
  if (EXT == WIDTH) begin : g_nopad
    assign sum  = s_ext;
    assign cout = gc[GROUPS];
  end else begin : g_pad
    assign sum  = s_ext[WIDTH-1:0];
    assign cout = s_ext[WIDTH];
  end

endmodule
