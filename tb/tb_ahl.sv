// tb_ahl: self-checking test of the adaptive hold logic. A new multiplicand
// is applied after each rising edge on which !(gating) was high (as the input
// flip-flops would take it). The expected !(gating) after the next falling
// edge is worked out from a separate zero count: the pattern is one-cycle
// when it has more than n zeros (n+1 once aged); a two-cycle pattern drops
// !(gating) for exactly one cycle. Both thresholds and every zero count from
// 0 to 16 are exercised. The built-in aging indicator runs with a window of
// 16 operations and 3 errors; three Razor errors are applied halfway, and
// `aged` must rise then and not before.
module tb_ahl;
  localparam int W = 16;
  localparam int N = 7;
  logic clk = 1'b0, rst = 1'b1, aged, error = 1'b0, op_done = 1'b0;
  logic [W-1:0] md = '0;
  ahl_pkg::latency_e decision;
  logic gating_n;
  int checks = 0, failures = 0, holds = 0, ones = 0;

  ahl #(.WIDTH(W), .ZERO_THRESH(N), .AGING_WINDOW(16), .AGING_ERRORS(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] with_zeros(input int zeros);
    logic [W-1:0] v = '1;
    int placed = 0;
    while (placed < zeros) begin
      int k = int'($urandom_range(W - 1, 0));
      if (v[k]) begin v[k] = 1'b0; placed++; end
    end
    return v;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: md=%h aged=%b gating_n=%b", what, $time, md, aged, gating_n);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      int z;
      logic one;
      z = n % (W + 1);
      // Load a pattern on a rising edge with !(gating) high.
      @(posedge clk) #1;
      check(aged == (n > 500), "aged flag");
      if (n == 500) begin
        // Three Razor errors in a row: the circuit is declared aged.
        repeat (3) begin
          error = 1'b1;
          @(posedge clk) #1;
        end
        error = 1'b0;
        check(aged, "aged after errors");
        // Resume on an edge that the hold logic lets through.
        while (!gating_n) begin
          @(posedge clk) #1;
        end
      end
      md = with_zeros(z);
      one = aged ? (z > N + 1) : (z > N);
      @(negedge clk) #1;
      check(decision == ahl_pkg::latency_e'(one), "decision");
      check(gating_n == one, "gating after load");
      if (one) ones++;
      else begin
        holds++;
        @(posedge clk);
        @(negedge clk) #1;
        check(gating_n == 1'b1, "released after one held cycle");
      end
    end
    check(holds > 0 && ones > 0, "both latencies seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
