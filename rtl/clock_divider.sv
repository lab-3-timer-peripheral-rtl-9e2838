// clock_divider: turns the system clock into a one-cycle count enable.
//
// A counter runs from 0 up to DIVIDE-1 and then starts again at 0. The tick
// output is high during the clock cycle in which the count is 0, so it pulses
// once every DIVIDE cycles. With DIVIDE = 25,175,000 and the 25.175 MHz board
// clock, that is once per second. The tick is an enable, not a clock: the
// whole design runs on the single system clock.
//
// Interface: clk, rst (synchronous, active high), tick (output).
// Timing: the count is 0 in the first cycle after reset, so tick is high then,
// and again every DIVIDE cycles after that. tick is decoded combinationally
// from the count register.
//
// The divide ratio and the counter width are both parameters, as the counter
// described for this timer asks. CNT_W defaults to the smallest width that
// holds DIVIDE-1 (25 bits for 25,175,000). The synchronous reset is this
// design's choice; a DIVIDE of 1 gives a tick on every cycle.
module clock_divider #(
  parameter int unsigned DIVIDE = 25_175_000,
  parameter int unsigned CNT_W  = (DIVIDE > 1) ? $clog2(DIVIDE) : 1
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam logic [CNT_W-1:0] LAST = CNT_W'(DIVIDE - 1);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || count == LAST) count <= '0;
    else                      count <= count + 1'b1;
  end

  assign tick = (count == '0);

  initial begin
    assert (DIVIDE >= 1) else $error("clock_divider: DIVIDE must be at least 1");
    assert (CNT_W >= 1 && (64'(DIVIDE) - 64'd1) < (64'd1 << CNT_W))
      else $error("clock_divider: CNT_W too small for DIVIDE");
  end

endmodule
