// tb_bypass_fa: exhaustive self-checking test of the column-bypass adder cell.
// All 16 input combinations are applied; with a_i = 1 the cell must behave as
// a full adder, with a_i = 0 it must pass the upper sum and give carry 0.
module tb_bypass_fa;
  logic a_i, pp, sum_in, carry_in, sum_out, carry_out;
  int checks = 0, failures = 0;

  bypass_fa dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] exp;
      {a_i, pp, sum_in, carry_in} = 4'(v);
      #1;
      if (a_i) exp = 2'(pp) + 2'(sum_in) + 2'(carry_in);
      else     exp = {1'b0, sum_in};
      checks++;
      if ({carry_out, sum_out} !== exp) begin
        failures++;
        $display("FAIL in=%b got c=%b s=%b exp=%b", 4'(v), carry_out, sum_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
