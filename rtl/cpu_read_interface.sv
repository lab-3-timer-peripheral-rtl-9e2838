// cpu_read_interface: lets the host CPU read the timer over the PC-104 bus.
//
// The host reads the timer register as I/O port TIMER_PORT (224H). The board
// computer makes the IOR* strobe by OR'ing its M/IO* and W/R* signals, so
// IOR* is low only during an I/O read. While IOR* is low and the address
// equals the port, this block drives the timer value onto the data bus; at
// all other times it leaves the bus pins high-impedance so that other devices
// can use the shared bus.
//
// Reading a register needs only combinational logic: IOR* is used as a
// level, never as a clock, and nothing here is stored.
//
// Interface: addr (I/O address, ADDR_W bits), ior_n (IOR*, active low),
// rdata (value to return, DATA_W bits), sd_o (value for the data bus pins,
// zero when not selected), sd_oe (output enable of the data bus pins). The
// tri-state pin buffer, sd = sd_oe ? sd_o : 'z, sits at the top level where
// the bus pins are.
// Timing: purely combinational from addr, ior_n and rdata to sd_o and sd_oe.
//
// Full decoding of ADDR_W = 10 address bits is this design's choice; AEN and
// the upper address lines are not used.
module cpu_read_interface
  import timer_pkg::*;
#(
  parameter int unsigned              ADDR_W_P = ADDR_W,
  parameter int unsigned              DATA_W_P = DATA_W,
  parameter logic [ADDR_W_P-1:0]      PORT     = TIMER_PORT
) (
  input  logic [ADDR_W_P-1:0] addr,
  input  logic                ior_n,
  input  logic [DATA_W_P-1:0] rdata,
  output logic [DATA_W_P-1:0] sd_o,
  output logic                sd_oe
);

  assign sd_oe = !ior_n && (addr == PORT);
  assign sd_o  = sd_oe ? rdata : '0;

endmodule
