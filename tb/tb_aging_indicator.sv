// tb_aging_indicator: self-checking test of the aging indicator. Random
// streams of completed operations and Razor errors are applied at several
// error rates; a reference model in the testbench counts operations per
// window and errors per window and predicts when `aged` must rise. After each
// run the block is reset. WINDOW = 16 and ERRORS = 3 keep the runs short.
module tb_aging_indicator;
  localparam int WINDOW = 16;
  localparam int ERRORS = 3;
  logic clk = 1'b0, rst = 1'b1, op_done = 1'b0, error = 1'b0, aged;
  int checks = 0, failures = 0, aged_runs = 0, fresh_runs = 0;

  aging_indicator #(.WINDOW(WINDOW), .ERRORS(ERRORS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 40; run++) begin
      int ops, errs, rate;
      logic model_aged;
      ops = 0; errs = 0; model_aged = 1'b0;
      rate = (run % 4) * 5;   // error percentage: 0, 5, 10, 15
      rst = 1'b1;
      @(posedge clk) #1 rst = 1'b0;
      for (int c = 0; c < 400; c++) begin
        op_done = ($urandom_range(99, 0) < 70);
        error   = ($urandom_range(99, 0) < rate);
        @(posedge clk);
        if (error && errs == ERRORS - 1) model_aged = 1'b1;
        if (op_done && ops == WINDOW - 1) begin
          ops = 0; errs = 0;
        end else begin
          if (op_done) ops++;
          if (error && errs != ERRORS) errs++;
        end
        #1;
        checks++;
        if (aged !== model_aged) begin
          failures++;
          $display("FAIL run %0d cycle %0d aged=%b expected %b", run, c, aged, model_aged);
        end
      end
      if (model_aged) aged_runs++; else fresh_runs++;
      op_done = 1'b0; error = 1'b0;
    end
    checks++;
    if (aged_runs == 0 || fresh_runs == 0) begin
      failures++;
      $display("FAIL runs aged=%0d fresh=%0d", aged_runs, fresh_runs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
