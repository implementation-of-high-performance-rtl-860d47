// tb_waveform_sequence: replays the operand sequence of the published
// waveform of the adaptive multiplier (multiplicator 1, multiplicands 1,
// 4064, 65535, 255, 65532, 43690, 65528) on the top at its default
// parameters, and checks each product and its latency: with the default
// threshold (one cycle for more than 7 zero bits) the patterns with many
// zeros (1, 4064, 255, 43690) finish in one cycle and the dense ones
// (65535, 65532, 65528) in two. No Razor errors occur in this sequence.
module tb_waveform_sequence;
  localparam int W = 16;
  localparam int NOPS = 7;
  localparam logic [W-1:0] MDS [NOPS] = '{16'd1, 16'd4064, 16'd65535, 16'd255,
                                          16'd65532, 16'd43690, 16'd65528};
  localparam int LAT [NOPS] = '{1, 1, 2, 1, 2, 1, 2};

  logic clk = 1'b0, rst = 1'b1, dclk;
  logic [W-1:0] md = '0, mr = 16'd1;
  logic in_ready, product_valid, error, re_execute, one_cycle, gating_n, aged;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;
  int acc_cyc [NOPS];
  int issued = 0, done_ops = 0, cyc = 0;
  logic rdy;

  aclb_cla_multiplier dut (.*);

  always #5 clk = ~clk;
  assign dclk = clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md = MDS[0];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1 rdy = in_ready;
    while (done_ops < NOPS) begin
      @(posedge clk) #1;
      cyc++;
      if (rdy && issued < NOPS) begin
        acc_cyc[issued] = cyc;
        issued++;
        md = (issued < NOPS) ? MDS[issued] : '0;
      end
      checks++;
      if (error) begin failures++; $display("FAIL unexpected error"); end
      if (product_valid) begin
        checks += 2;
        if (product != 32'(MDS[done_ops])) begin
          failures++;
          $display("FAIL op %0d product %0d expected %0d", done_ops, product, MDS[done_ops]);
        end
        if (cyc - acc_cyc[done_ops] != LAT[done_ops]) begin
          failures++;
          $display("FAIL op %0d latency %0d expected %0d", done_ops, cyc - acc_cyc[done_ops],
                   LAT[done_ops]);
        end
        done_ops++;
      end
      @(negedge clk) #1 rdy = in_ready;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
