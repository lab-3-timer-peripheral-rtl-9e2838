// updown_timer_tb: self-checking test of updown_timer.
//
// en and up are driven with random values (en about one cycle in three), and
// a reference count kept by the testbench steps up or down modulo 256
// whenever en is high. The register is compared with it after every edge.
// Directed runs then take it across the wrap points 255 -> 0 counting up and
// 0 -> 255 counting down, and check that reset clears it.
module updown_timer_tb;

  localparam int unsigned W = 8;
  localparam int unsigned N_RANDOM = 2000;

  logic         clk = 1'b0;
  logic         rst, en, up;
  logic [W-1:0] count;
  logic [W-1:0] model;
  int           checks = 0;
  int           failures = 0;
  int           n_up = 0, n_down = 0, n_wrap = 0;

  always #5 clk = ~clk;

  updown_timer #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .en(en), .up(up), .count(count));

  task automatic step(input logic e, input logic u);
    @(negedge clk);
    en = e; up = u;
    @(posedge clk);
    if (e) begin
      if (u) begin
        if (model == 8'hFF) n_wrap++;
        model = model + 8'd1; n_up++;
      end else begin
        if (model == 8'h00) n_wrap++;
        model = model - 8'd1; n_down++;
      end
    end
    #1;
    checks++;
    if (count !== model) begin
      failures++;
      $display("FAIL en=%0b up=%0b: count %0d expected %0d", e, u, count, model);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; up = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (count !== 8'd0) begin failures++; $display("FAIL reset value %0d", count); end
    @(negedge clk) rst = 1'b0;
    model = 8'd0;
    for (int i = 0; i < N_RANDOM; i++) step(($urandom % 3) == 0, $urandom % 2);
    // down from 0 wraps to 255, then up across 255 back to 0
    @(negedge clk) rst = 1'b1;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model = 8'd0;
    step(1'b1, 1'b0);
    for (int i = 0; i < 3; i++) step(1'b1, 1'b1);
    // en low holds the value regardless of up
    for (int i = 0; i < 5; i++) step(1'b0, i[0]);
    checks++;
    if (n_wrap < 2 || n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL coverage: up=%0d down=%0d wraps=%0d", n_up, n_down, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
