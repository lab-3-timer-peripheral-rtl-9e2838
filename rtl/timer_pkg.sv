// timer_pkg: constants shared by the timer peripheral and its testbenches.
//
// The board clock is a 25.175 MHz oscillator, and the clock divider turns it
// into a once-per-second count enable. The timer register is 8 bits wide and
// the host reads it as I/O port 224H over a PC-104 (ISA) bus.
// The 10-bit I/O address width is this design's choice: ISA I/O decoding uses
// SA0..SA9.
package timer_pkg;

  // Clock frequency in Hz, which is also the divide ratio for a 1 Hz tick.
  localparam int unsigned CLK_HZ = 25_175_000;

  // Width of the timer register visible to the CPU.
  localparam int unsigned DATA_W = 8;

  // I/O address decoding width and the port address of the timer register.
  localparam int unsigned ADDR_W = 10;
  localparam logic [ADDR_W-1:0] TIMER_PORT = ADDR_W'('h224);

endpackage
