// clock_divider_tb: self-checking test of clock_divider.
//
// Three dividers run side by side with ratios 1, 2 and 7. A cycle counter kept
// by the testbench since reset predicts the tick: it must be high exactly in
// the cycles whose index is a multiple of the ratio. Each divider is checked
// every cycle, the interval between ticks is measured against the ratio, and
// a reset is applied mid-run to check that it restarts the count at 0.
module clock_divider_tb;

  localparam int unsigned N_CYCLES = 200;

  logic clk = 1'b0;
  logic rst;
  logic tick1, tick2, tick7;
  int   checks = 0;
  int   failures = 0;
  int   cyc;          // cycles since the end of reset
  int   last7;        // cycle of the previous tick of the divide-by-7

  always #5 clk = ~clk;

  clock_divider #(.DIVIDE(1)) u_d1 (.clk(clk), .rst(rst), .tick(tick1));
  clock_divider #(.DIVIDE(2)) u_d2 (.clk(clk), .rst(rst), .tick(tick2));
  clock_divider #(.DIVIDE(7)) u_d7 (.clk(clk), .rst(rst), .tick(tick7));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b expected %0b", what, cyc, got, exp);
    end
  endtask

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      // sample in the middle of the cycle, after the edge has settled
      #1;
      check(tick1, 1'b1, "div1 tick");
      check(tick2, (cyc % 2) == 0, "div2 tick");
      check(tick7, (cyc % 7) == 0, "div7 tick");
      if (tick7) begin
        if (cyc > 0) begin
          checks++;
          if (cyc - last7 != 7) begin
            failures++;
            $display("FAIL div7 period %0d", cyc - last7);
          end
        end
        last7 = cyc;
      end
      @(posedge clk);
      cyc++;
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cyc = 0; last7 = 0;
    // the first cycle after reset is cycle 0 of the count
    run(N_CYCLES);
    // reset in the middle of a divide-by-7 period
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cyc = 0; last7 = 0;
    run(N_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
