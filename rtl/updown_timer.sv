// updown_timer: the 8-bit timer register.
//
// On each clock cycle in which en (the divider tick) is high, the count goes
// up by one if up is high and down by one if up is low. With a 1 Hz tick it
// counts seconds. It wraps modulo 2**WIDTH in both directions (255 -> 0 going
// up, 0 -> 255 going down).
//
// Interface: clk, rst (synchronous, active high, clears the count), en, up,
// count (output, the register itself).
// Timing: count changes at the clock edge that samples en high; up is sampled
// at the same edge.
//
// The up/down behaviour and the 8-bit width follow the timer described for
// this peripheral. The reset to zero and the wrap-around are this design's
// choices.
module updown_timer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             up,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= up ? count + 1'b1 : count - 1'b1;
  end

endmodule
