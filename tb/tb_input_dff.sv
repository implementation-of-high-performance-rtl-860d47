// tb_input_dff: self-checking test of the gated input flip-flops: reset
// clears them, a random enable either takes the input or holds the previous
// value, checked against a model register in the testbench.
module tb_input_dff;
  localparam int W = 16;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [W-1:0] d = '1, q, model;
  int checks = 0, failures = 0;

  input_dff #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk) #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 1'b0;
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      d  = W'($urandom);
      en = $urandom_range(1, 0) == 1;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b q=%h expected %h", n, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
