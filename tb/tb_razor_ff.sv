// tb_razor_ff: self-checking test of the Razor register with real late data.
// clk has a 10 ns period and dclk is clk delayed by 3 ns. On-time data
// changes at the falling clock edge; late data changes 1 ns after the rising
// edge, i.e. after the main flip-flop sampled but before the shadow did.
// Checks: on-time data is stored with no error; late data raises `error` in
// the next cycle while q is stale, q holds the correct value one cycle later
// and `error` drops; en = 0 holds both registers.
module tb_razor_ff;
  localparam int W = 32;
  logic clk = 1'b0, dclk = 1'b0, rst = 1'b1, en = 1'b1;
  logic [W-1:0] d = '0, q;
  logic error;
  int checks = 0, failures = 0;
  int late_seen = 0;

  razor_ff #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always @(clk) dclk <= #3 clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: q=%h error=%b", what, $time, q, error);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] v, stale;
      v = W'($urandom);
      if (n % 5 != 3) begin
        // On time: settles before the rising edge.
        @(negedge clk) d = v;
        @(posedge clk) #4;
        check(q == v && !error, "on-time capture");
      end else begin
        // Late: arrives 1 ns after the rising edge, before dclk.
        @(negedge clk) stale = d;
        @(posedge clk) #1 d = v;
        #3;
        if (v != stale) begin
          late_seen++;
          check(q == stale && error, "late arrival flagged");
          // New data during the correcting cycle: the main flip-flop must
          // take the shadow value and no error may be shown.
          @(negedge clk) d = ~v;
          @(posedge clk) #4;
          check(q == v && !error, "late arrival corrected");
        end
      end
    end
    // Hold with en = 0: new data must not be taken.
    @(negedge clk) begin en = 1'b0; d = ~q; end
    @(posedge clk) #4;
    check(q == ~d && !error, "hold when disabled");
    check(late_seen > 0, "late arrivals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
