// tb_clb_cla_multiplier: self-checking test of the column-bypass multiplier
// with carry look-ahead last row. The 16x16 instance gets corner operands and
// random operands whose multiplicand has a chosen number of zero bits (so
// that every amount of column bypassing is exercised); a 5x5 instance is
// checked exhaustively. Expected products come from integer multiplication.
// For every 16x16 case each array cell is also inspected: a cell in the
// column of a zero multiplicand bit must keep its adder inputs at 0, forward
// the upper sum and give carry 0 (the column is switched off).
module tb_clb_cla_multiplier;
  localparam int W = 16;
  localparam int WS = 5;

  logic [W-1:0]    a, b;
  logic [2*W-1:0]  p;
  logic [WS-1:0]   as, bs;
  logic [2*WS-1:0] ps;
  int checks = 0, failures = 0;

  clb_cla_multiplier dut (.a(a), .b(b), .p(p));
  clb_cla_multiplier #(.WIDTH(WS)) dut_small (.a(as), .b(bs), .p(ps));

  // Per-cell bypass check: 1 where the cell obeys the bypass rule.
  logic [W-2:0] cell_ok [1:W-1];
  for (genvar j = 1; j < W; j++) begin : g_chk_row
    for (genvar i = 0; i < W - 1; i++) begin : g_chk_col
      assign cell_ok[j][i] = a[i] ||
        (!dut.g_row[j].g_col[i].u_cell.x && !dut.g_row[j].g_col[i].u_cell.y &&
         !dut.g_row[j].g_col[i].u_cell.z && !dut.g_row[j].g_col[i].u_cell.carry_out &&
         dut.g_row[j].g_col[i].u_cell.sum_out == dut.g_row[j].g_col[i].u_cell.sum_in);
    end
  end
  int bypassed_cells = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] exp;
    a = x; b = y;
    #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
    for (int j = 1; j < W; j++) begin
      checks++;
      if (!(&cell_ok[j])) begin
        failures++;
        $display("FAIL bypass rule broken in row %0d for a=%h: %b", j, x, cell_ok[j]);
      end
    end
    for (int i = 0; i < W - 1; i++) if (!x[i]) bypassed_cells += W - 1;
  endtask

  // Random multiplicand with exactly `zeros` zero bits.
  function automatic logic [W-1:0] with_zeros(input int zeros);
    logic [W-1:0] v = '1;
    int placed = 0;
    while (placed < zeros) begin
      int k = int'($urandom_range(W - 1, 0));
      if (v[k]) begin v[k] = 1'b0; placed++; end
    end
    return v;
  endfunction

  initial begin
    check16('0, '0);
    check16('1, '1);
    check16('1, 16'd1);
    check16(16'd1, '1);
    check16(16'h9, 16'hF);          // 1001 * 1111
    check16(16'h8000, 16'h8000);
    check16(16'hAAAA, 16'h5555);
    for (int z = 0; z <= W; z++)
      for (int n = 0; n < 200; n++)
        check16(with_zeros(z), 16'($urandom));
    for (int n = 0; n < 2000; n++) check16(16'($urandom), 16'($urandom));

    checks++;
    if (bypassed_cells == 0) begin failures++; $display("FAIL no column bypassed"); end
    for (int x = 0; x < (1 << WS); x++)
      for (int y = 0; y < (1 << WS); y++) begin
        as = WS'(x); bs = WS'(y);
        #1;
        checks++;
        if (ps !== (2*WS)'(x * y)) begin
          failures++;
          $display("FAIL small %0d * %0d = %0d", x, y, ps);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
