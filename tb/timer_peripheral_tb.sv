// timer_peripheral_tb: end-to-end test of the timer peripheral, divider = 2.
//
// With DIVIDE = 2 the timer steps every two clock cycles, which keeps the run
// short while exercising the same logic as the 1 Hz configuration. The
// testbench stands in for the host computer: it makes IOR* by OR'ing M/IO*
// and W/R*, as the board computer does, and runs I/O and memory cycles on a
// pulled-up data bus, sometimes driving the bus itself like another device.
//
// A reference model counts clock cycles since reset and predicts the tick
// (every second cycle) and the timer value (up or down by one per tick, modulo
// 256). Every cycle it compares the tick, the count, sd_oe and the bus.
// It covers the four cases the timer is expected to show:
//   - IOR* not asserted with address 224H: bus high-impedance;
//   - IOR* asserted with address 220H: bus high-impedance;
//   - IOR* asserted with address 224H: the timer value is on the bus;
//   - the count steps up every two cycles with up high and down every two
//     cycles with up low.
// Each mechanism is counted and a failure is recorded for one that never
// happened: ticks, up steps, down steps, direction changes, wraps, decoded
// reads, idle (strobe high) cycles at 224H, I/O reads of 220H, memory reads
// at 224H and writes at 224H.
module timer_peripheral_tb;

  import timer_pkg::*;

  localparam int unsigned DIV = 2;
  localparam int unsigned N_CYCLES = 3000;

  logic              clk = 1'b0;
  logic              rst;
  logic              up;
  logic [ADDR_W-1:0] addr;
  logic              mio_n, wr_n;   // host CPU status: M/IO* low = I/O, W/R* low = read
  logic              ior_n;
  wire  [DATA_W-1:0] sd;
  logic              sd_oe;
  logic [DATA_W-1:0] count;
  logic              tick;
  logic              other_oe;
  logic [DATA_W-1:0] other_data;

  int checks = 0, failures = 0;
  int n_tick = 0, n_up = 0, n_down = 0, n_turn = 0, n_wrap = 0;
  int n_read = 0, n_idle224 = 0, n_io220 = 0, n_mem224 = 0, n_wr224 = 0;

  always #5 clk = ~clk;

  // strobe made on the board computer: low only during an I/O read
  assign ior_n = mio_n | wr_n;

  timer_peripheral #(.DIVIDE(DIV)) dut (
    .clk(clk), .rst(rst), .up(up), .addr(addr), .ior_n(ior_n),
    .sd(sd), .sd_oe(sd_oe), .count(count), .tick(tick)
  );

  assign sd = other_oe ? other_data : 'z;
  pullup pu[DATA_W-1:0] (sd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // compare bus behaviour with the decode rule for the current cycle
  task automatic check_bus(input logic [DATA_W-1:0] model);
    logic sel;
    sel = !mio_n && !wr_n && addr == 10'h224;
    check(sd_oe == sel, "sd_oe decode");
    if (sel)           check(sd == model,      "read data on bus");
    else if (other_oe) check(sd == other_data, "bus left to other device");
    else               check(sd == 8'hFF,      "bus high-impedance");
    if (sel) n_read++;
    if (addr == 10'h224 && ior_n) n_idle224++;
    if (addr == 10'h220 && !ior_n) n_io220++;
    if (addr == 10'h224 && mio_n && !wr_n) n_mem224++;
    if (addr == 10'h224 && wr_n) n_wr224++;
  endtask

  // choose one bus cycle type at random
  task automatic drive_bus();
    int kind;
    kind = $urandom % 8;
    case (kind)
      0, 1, 2: begin addr = 10'h224; mio_n = 1'b0; wr_n = 1'b0; end // I/O read of timer
      3:       begin addr = 10'h220; mio_n = 1'b0; wr_n = 1'b0; end // I/O read elsewhere
      4:       begin addr = 10'h224; mio_n = 1'b1; wr_n = 1'b0; end // memory read
      5:       begin addr = 10'h224; mio_n = 1'b0; wr_n = 1'b1; end // I/O write
      6:       begin addr = 10'h224; mio_n = 1'b1; wr_n = 1'b1; end // idle
      default: begin addr = ADDR_W'($urandom); mio_n = $urandom % 2; wr_n = $urandom % 2; end
    endcase
    other_oe   = !(!mio_n && !wr_n && addr == 10'h224) && ($urandom % 2 == 1);
    other_data = DATA_W'($urandom);
  endtask

  logic [DATA_W-1:0] model;
  logic              prev_dir;
  int                cyc, last_step;

  initial begin
    rst = 1'b1; up = 1'b1; addr = '0; mio_n = 1'b1; wr_n = 1'b1;
    other_oe = 1'b0; other_data = '0;
    repeat (3) @(posedge clk);
    #1;
    check(count == 8'd0, "count cleared by reset");
    @(negedge clk) rst = 1'b0;
    model = 8'd0; cyc = 0; last_step = -1; prev_dir = up;
    for (int i = 0; i < N_CYCLES; i++) begin
      // inputs change just after the clock edge, then settle before checking
      #1;
      if (i % 37 == 0 && i > 0) up = ~up;
      drive_bus();
      #1;
      check(tick == ((cyc % DIV) == 0), "tick every DIVIDE cycles");
      check(count == model, "count matches model");
      check_bus(model);
      if (tick) begin
        n_tick++;
        if (up != prev_dir) n_turn++;
        prev_dir = up;
        if (up) begin if (model == 8'hFF) n_wrap++; model = model + 8'd1; n_up++; end
        else    begin if (model == 8'h00) n_wrap++; model = model - 8'd1; n_down++; end
        if (last_step >= 0) check(cyc - last_step == DIV, "step spacing");
        last_step = cyc;
      end
      @(posedge clk);
      cyc++;
    end
    // force a wrap downwards from 0 if the random run had none
    @(negedge clk) rst = 1'b1;
    @(posedge clk);
    @(negedge clk) begin rst = 1'b0; up = 1'b0; mio_n = 1'b1; wr_n = 1'b1; other_oe = 1'b0; end
    repeat (2) @(posedge clk);
    #1;
    check(count == 8'hFF, "down from 0 wraps to FFh");
    if (count == 8'hFF) n_wrap++;
    check(n_tick > 0,    "mechanism: tick");
    check(n_up > 0,      "mechanism: count up");
    check(n_down > 0,    "mechanism: count down");
    check(n_turn > 0,    "mechanism: direction change");
    check(n_wrap > 0,    "mechanism: wrap");
    check(n_read > 0,    "mechanism: I/O read of 224H drives bus");
    check(n_idle224 > 0, "mechanism: IOR* high at 224H leaves bus");
    check(n_io220 > 0,   "mechanism: IOR* low at 220H leaves bus");
    check(n_mem224 > 0,  "mechanism: memory read at 224H leaves bus");
    check(n_wr224 > 0,   "mechanism: write at 224H leaves bus");
    $display("ticks=%0d up=%0d down=%0d turns=%0d wraps=%0d reads=%0d idle224=%0d io220=%0d mem224=%0d wr224=%0d",
             n_tick, n_up, n_down, n_turn, n_wrap, n_read, n_idle224, n_io220, n_mem224, n_wr224);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
