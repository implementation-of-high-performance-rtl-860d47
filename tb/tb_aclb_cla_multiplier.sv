// tb_aclb_cla_multiplier: end-to-end self-checking test of the adaptive
// column-bypass multiplier at its default parameters (16x16, n = 7, aging
// window of 64 operations, 4 errors).
//
// A stream of 700 operand pairs is offered; a pair is taken on a rising edge
// where in_ready is high. Every product with product_valid high and error low
// is compared with integer multiplication, in issue order, and its latency in
// cycles is compared with the one the hold rule predicts: 1 cycle when the
// multiplicand has more than n zeros (n+1 once aged), otherwise 2, plus one
// for an operation whose result the Razor register had to correct, and
// 2 for an operation taken while the Razor register was correcting.
//
// A zero-delay simulation cannot make a result arrive late, so timing
// violations are emulated: right after an edge that stored a product, the
// main flip-flop of the Razor register is overwritten with a wrong value
// while the shadow keeps the right one, which is exactly the state a late
// arrival leaves behind. Seven such errors are injected: three spread over
// separate aging windows (too rare to count as aging) and four within one
// window, which must set `aged`; afterwards patterns with exactly n+1 zeros
// must take two cycles. Each mechanism (column bypass, one-cycle and
// two-cycle patterns, Razor correction with re-execution, aging and the
// stricter threshold) is counted and must have happened.
module tb_aclb_cla_multiplier;
  localparam int W = 16;
  localparam int N = 7;
  localparam int OPS = 700;

  typedef struct {
    logic [W-1:0] md, mr;
    int           cyc;
    logic         aged_at;
    logic         err_in_flight;
    logic         corrupted;
  } op_t;

  logic clk = 1'b0, rst = 1'b1;
  logic dclk;
  logic [W-1:0] md = '0, mr = '0;
  logic in_ready, product_valid, error, re_execute, one_cycle, gating_n, aged;
  logic [2*W-1:0] product;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_one = 0, n_two = 0, n_corrected = 0, n_reexec = 0;
  int n_strict = 0, n_aged_rise = 0;

  aclb_cla_multiplier dut (.*);

  always #5 clk = ~clk;
  assign dclk = clk;   // shadow edge coincides with the main edge here

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zeros_of(input logic [W-1:0] v);
    int z = 0;
    for (int k = 0; k < W; k++) if (v[k] == 1'b0) z++;
    return z;
  endfunction

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic inject_at(input int done_ops);
    return done_ops == 50 || done_ops == 150 || done_ops == 250 ||
           done_ops == 400 || done_ops == 405 || done_ops == 410 || done_ops == 415;
  endfunction

  op_t inflight[$];
  int  issued = 0, done_ops = 0, cyc = 0;
  logic rdy = 1'b0, aged_prev = 1'b0, injected_for = 1'b0;

  task automatic next_operands();
    md = with_zeros(int'($urandom_range(W, 0)));
    mr = W'($urandom);
  endtask

  initial begin
    next_operands();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1 rdy = in_ready;
    while (done_ops < OPS) begin
      @(posedge clk) #1;
      cyc++;
      // Operand acceptance on this edge.
      if (rdy && issued < OPS + 4) begin
        op_t o;
        o.md = md; o.mr = mr; o.cyc = cyc; o.aged_at = 1'b0;
        o.err_in_flight = 1'b0; o.corrupted = 1'b0;
        inflight.push_back(o);
        issued++;
        next_operands();
      end
      // Emulated late arrival on the product just stored.
      if (product_valid && !error && inject_at(done_ops) && !injected_for &&
          inflight.size() > 0) begin
        logic [2*W-1:0] bad;
        bad = ~product;
        force dut.u_razor.main_q = bad;
        #0.5 release dut.u_razor.main_q;
        inflight[0].corrupted = 1'b1;
        injected_for = 1'b1;
      end
      #0.5;
      if (error) begin
        n_reexec++;
        check(re_execute, "re_execute follows error");
        if (rdy && inflight.size() > 0) inflight[inflight.size()-1].err_in_flight = 1'b1;
      end
      if (product_valid && !error) begin
        op_t o;
        int lat, exp_lat, z;
        logic one;
        check(inflight.size() > 0, "product without operation");
        if (inflight.size() > 0) begin
          o = inflight.pop_front();
          z = zeros_of(o.md);
          one = o.aged_at ? (z > N + 1) : (z > N);
          exp_lat = (one && !o.err_in_flight) ? 1 : 2;
          if (o.corrupted) exp_lat++;
          lat = cyc - o.cyc;
          check(product == 32'(o.md) * 32'(o.mr), "product value");
          check(lat == exp_lat, "latency");
          if (product != 32'(o.md) * 32'(o.mr) || lat != exp_lat)
            $display("  md=%h mr=%h got %h lat %0d exp %0d (z=%0d aged=%b corr=%b eif=%b)",
                     o.md, o.mr, product, lat, exp_lat, z, o.aged_at, o.corrupted,
                     o.err_in_flight);
          if (z > 0) n_bypass++;
          if (one) n_one++; else n_two++;
          if (o.corrupted) n_corrected++;
          if (o.aged_at && z == N + 1) n_strict++;
          done_ops++;
          injected_for = 1'b0;
        end
      end
      if (aged && !aged_prev) n_aged_rise++;
      aged_prev = aged;
      // Hold-logic state for the operation taken on this edge.
      @(negedge clk) #1;
      if (inflight.size() > 0 && inflight[inflight.size()-1].cyc == cyc)
        inflight[inflight.size()-1].aged_at = aged;
      rdy = in_ready;
    end
    check(n_bypass > 0,    "column bypass exercised");
    check(n_one > 0,       "one-cycle patterns exercised");
    check(n_two > 0,       "two-cycle patterns exercised");
    check(n_corrected == 7, "Razor corrections");
    check(n_reexec == 7,   "re-executions");
    check(n_aged_rise == 1, "aging detected once");
    check(n_strict > 0,    "stricter threshold applied after aging");
    $display("ops=%0d bypass=%0d one=%0d two=%0d corrected=%0d reexec=%0d aged_rise=%0d strict=%0d cycles=%0d",
             done_ops, n_bypass, n_one, n_two, n_corrected, n_reexec, n_aged_rise, n_strict, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
