// timer_peripheral: a one-second up/down timer readable over the PC-104 bus.
//
// The design has three parts, all on the single system clock:
//   clock_divider      - counts DIVIDE cycles and emits a one-cycle tick;
//                        DIVIDE = 25,175,000 gives 1 Hz from the 25.175 MHz
//                        board oscillator.
//   updown_timer       - 8-bit register that steps up (up = 1) or down
//                        (up = 0) on each tick.
//   cpu_read_interface - decodes an I/O read (IOR* low) of port 224H and
//                        then enables the data bus pins with the register
//                        value; the pins are tri-stated at all other times.
//
// Interface: clk (25.175 MHz), rst (synchronous, active high), up (from the
// push-button: the button pulls it low to count down), addr (I/O address
// SA9..SA0), ior_n (IOR*), sd (8-bit data bus, inout), sd_oe (high while sd
// is driven), count (the timer value, for observation), tick (divider pulse,
// for observation).
// Timing: after reset the count is 0 and tick is high in the first cycle, so
// the first step happens at the first clock edge; each later step comes
// DIVIDE cycles after the previous one. A bus read is combinational: sd shows
// the count as long as IOR* is low with the port address.
//
// The structure, divide ratio, register width and port address follow the
// timer peripheral described for this board. The reset input is this
// design's choice. up is used as it arrives; it is sampled only on tick
// cycles and should come from a synchronised or debounced source.
module timer_peripheral
  import timer_pkg::*;
#(
  parameter int unsigned DIVIDE = CLK_HZ
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              up,
  input  logic [ADDR_W-1:0] addr,
  input  logic              ior_n,
  inout  wire  [DATA_W-1:0] sd,
  output logic              sd_oe,
  output logic [DATA_W-1:0] count,
  output logic              tick
);

  clock_divider #(.DIVIDE(DIVIDE)) u_div (
    .clk  (clk),
    .rst  (rst),
    .tick (tick)
  );

  updown_timer #(.WIDTH(DATA_W)) u_timer (
    .clk   (clk),
    .rst   (rst),
    .en    (tick),
    .up    (up),
    .count (count)
  );

  logic [DATA_W-1:0] sd_o;

  cpu_read_interface u_cpu_if (
    .addr  (addr),
    .ior_n (ior_n),
    .rdata (count),
    .sd_o  (sd_o),
    .sd_oe (sd_oe)
  );

  // data bus pin drivers: released unless this device is being read
  assign sd = sd_oe ? sd_o : 'z;

  // The timer may only change on a divider tick, and the divider's tick lasts
  // one cycle unless it divides by 1.
  a_count_only_on_tick: assert property (@(posedge clk) disable iff (rst)
    !tick |=> $stable(count));
  a_tick_one_cycle: assert property (@(posedge clk) disable iff (rst)
    (DIVIDE > 1 && tick) |=> !tick);

endmodule
