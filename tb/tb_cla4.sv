// tb_cla4: exhaustive self-checking test of the 4-bit carry look-ahead adder:
// every a, b and carry-in (512 cases) against integer addition, plus the
// group generate/propagate outputs.
module tb_cla4;
  logic [3:0] a, b, sum;
  logic cin, cout, group_g, group_p;
  int checks = 0, failures = 0;

  cla4 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] exp;
      {cin, a, b} = 9'(v);
      #1;
      exp = 5'(a) + 5'(b) + 5'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b got %h exp %h", a, b, cin, {cout, sum}, exp);
      end
      checks++;
      if (group_p !== (5'(a) + 5'(b) == 5'd15) || group_g !== (5'(a) + 5'(b) > 5'd15)) begin
        failures++;
        $display("FAIL group a=%h b=%h gg=%b gp=%b", a, b, group_g, group_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
