// timer_peripheral_full_tb: the timer at its full 25.175 MHz / 1 Hz size,
// read by a model of the console demonstration program.
//
// The peripheral runs with all parameters at their defaults, so the divider
// ratio is 25,175,000 and the timer steps once per simulated second. The
// testbench models the host side:
//   - a bus master that makes I/O read cycles of port 224H, with IOR* formed
//     by OR'ing M/IO* and W/R*, as the board computer does;
//   - the demonstration program: read the port, print the value as a digit
//     if it is 0..9 and as '*' otherwise, print a carriage return, stop when
//     the value is 10, otherwise read again (about once per millisecond).
//   - the push-button: released (up = 1) at first, held down from 2.5 s to
//     4.5 s so that the timer counts down for two steps, then released.
// Expected course: 1, 2, 3, then 2, 1 while the button is held, then up to
// 10, which the program reads about 13 s after reset and stops on.
// Checks: each value read from the bus against a reference count kept from
// the clock cycles and the button; the spacing of timer steps (exactly
// 25,175,000 cycles); the sequence of characters shown; the cycle at which
// the program stops; and that the bus is released between reads.
module timer_peripheral_full_tb;

  import timer_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  localparam longint unsigned D = longint'(CLK_HZ);
  // half of the 39.722 ns period of 25.175 MHz
  localparam realtime HALF = 19.861ns;
  // the program polls the port about once per millisecond
  localparam int unsigned POLL_NS = 1_000_000;

  logic              clk = 1'b0;
  logic              rst;
  logic              up;
  logic [ADDR_W-1:0] addr;
  logic              mio_n, wr_n;
  logic              ior_n;
  wire  [DATA_W-1:0] sd;
  logic              sd_oe;
  logic [DATA_W-1:0] count;
  logic              tick;
  int                n_ticks;

  int checks = 0, failures = 0;

  always #(HALF) clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) n_ticks <= 0;
    else if (tick) n_ticks <= n_ticks + 1;
  end

  assign ior_n = mio_n | wr_n;

  timer_peripheral dut (
    .clk(clk), .rst(rst), .up(up), .addr(addr), .ior_n(ior_n),
    .sd(sd), .sd_oe(sd_oe), .count(count), .tick(tick)
  );

  pullup pu[DATA_W-1:0] (sd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: cycles since reset, and the timer value they imply. Ticks fall
  // on cycles 0, D, 2D, ...; the step uses the button level at that edge.
  longint unsigned   cyc;
  logic [DATA_W-1:0] model;
  longint unsigned   last_change;
  int                n_steps, n_up, n_down, step_checks, step_failures;
  logic [DATA_W-1:0] prev_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
      model <= '0;
      prev_count <= '0;
      n_steps <= 0; n_up <= 0; n_down <= 0;
      step_checks <= 0; step_failures <= 0;
      last_change <= 0;
    end else begin
      cyc <= cyc + 1;
      if (cyc % D == 0) begin
        model <= up ? model + 1'b1 : model - 1'b1;
        if (up) n_up <= n_up + 1; else n_down <= n_down + 1;
      end
      prev_count <= count;
      if (count != prev_count) begin
        // count changed at the edge ending cycle cyc-1; steps are D apart
        if (n_steps > 0) begin
          step_checks <= step_checks + 1;
          if (cyc - 1 - last_change != D) begin
            step_failures <= step_failures + 1;
            $display("FAIL step spacing %0d cycles", cyc - 1 - last_change);
          end
        end
        last_change <= cyc - 1;
        n_steps <= n_steps + 1;
      end
    end
  end

  // one I/O read cycle of the timer port, two clocks long
  task automatic io_read(output logic [DATA_W-1:0] value);
    @(negedge clk);
    addr = TIMER_PORT; mio_n = 1'b0; wr_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    check(sd_oe, "timer drives bus during read");
    check(sd == model, "read value matches reference");
    value = sd;
    mio_n = 1'b1; wr_n = 1'b1; addr = '0;
    #1;
    check(!sd_oe && sd == 8'hFF, "bus released after read");
  endtask

  // the push-button: released, held from 2.5 s to 4.5 s, released
  initial begin
    up = 1'b1;
    repeat (2500) #(POLL_NS * 1ns);
    up = 1'b0;
    repeat (2000) #(POLL_NS * 1ns);
    up = 1'b1;
  end

  string shown = "";
  string expected = "1232123456789*";

  initial begin : program_model
    logic [DATA_W-1:0] v;
    byte               ch;
    byte               last_ch;
    rst = 1'b1; addr = '0; mio_n = 1'b1; wr_n = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    last_ch = 0;
    forever begin
      io_read(v);
      ch = (v <= 8'd9) ? byte'("0") + byte'(v) : byte'("*");
      // the display overwrites one character at the left margin; log changes
      if (ch != last_ch) begin
        $display("%0t: timer = %0d, shown '%c'", $time, v, ch);
        shown = {shown, string'(ch)};
        last_ch = ch;
      end
      if (v == 8'd10) break;
      #(POLL_NS * 1ns);
    end
    // value 10 is set by the 14th tick, at the end of cycle 13*D
    check(cyc >= 13 * D && cyc <= 13 * D + 30_000, "program stops about 13 s after reset");
    check(shown == expected, "sequence of characters shown");
    check(n_up == 12 && n_down == 2, "button held for exactly two steps");
    // fold in the step-spacing checks; 14 steps give 13 spacings
    checks += step_checks;
    failures += step_failures;
    check(step_checks == 13, "all step spacings measured");
    check(n_ticks == 14, "divider ticked once per second");
    $display("stopped at cycle %0d; shown \"%s\"; up steps %0d, down steps %0d",
             cyc, shown, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15_000) #(POLL_NS * 1ns);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
