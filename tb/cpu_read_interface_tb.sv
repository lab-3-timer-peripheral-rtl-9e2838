// cpu_read_interface_tb: self-checking test of cpu_read_interface.
//
// The block's outputs drive a tri-state pin buffer like the one at the top
// level. The data bus has pull-ups, so a bus nobody drives reads as FFh. The
// testbench can also drive the bus itself, standing in for another device.
// Checks:
//   - IOR* high with address 224H: bus released (reads FFh, sd_oe low);
//   - IOR* low with address 220H: bus released;
//   - IOR* low with address 224H: the read data appears on the bus;
//   - every one of the 1024 addresses with IOR* low: only 224H is decoded;
//   - while released, a value driven by another device passes unchanged;
//   - random address, strobe and data, compared with the decode rule.
module cpu_read_interface_tb;

  import timer_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic              ior_n;
  logic [DATA_W-1:0] rdata;
  wire  [DATA_W-1:0] sd;
  logic [DATA_W-1:0] sd_o;
  logic              sd_oe;
  logic              other_oe;
  logic [DATA_W-1:0] other_data;
  int                checks = 0;
  int                failures = 0;

  cpu_read_interface dut (.addr(addr), .ior_n(ior_n), .rdata(rdata), .sd_o(sd_o), .sd_oe(sd_oe));

  // pin buffer as the top level builds it
  assign sd = sd_oe ? sd_o : 'z;
  assign sd = other_oe ? other_data : 'z;
  pullup pu[DATA_W-1:0] (sd);

  task automatic apply(input logic [ADDR_W-1:0] a, input logic s, input logic [DATA_W-1:0] d);
    logic               sel;
    logic [DATA_W-1:0]  exp;
    addr = a; ior_n = s; rdata = d;
    sel = (s == 1'b0) && (a == 10'h224);
    // another device drives the bus only when this one must not
    other_oe = !sel && ($urandom % 2 == 1);
    other_data = DATA_W'($urandom);
    #1;
    exp = sel ? d : (other_oe ? other_data : '1);
    checks++;
    if (sd_oe !== sel || sd !== exp || sd_o !== (sel ? d : '0)) begin
      failures++;
      $display("FAIL addr=%h ior_n=%0b data=%h: sd=%h sd_oe=%0b expected %h/%0b",
               a, s, d, sd, sd_oe, exp, sel);
    end
  endtask

  initial begin
    other_oe = 1'b0; other_data = '0;
    // the three cases the timer must show on the bus
    apply(10'h224, 1'b1, 8'h5A);
    apply(10'h220, 1'b0, 8'h5A);
    apply(10'h224, 1'b0, 8'h5A);
    apply(10'h224, 1'b0, 8'h00);
    // full address sweep with IOR* low and high
    for (int a = 0; a < 1024; a++) begin
      apply(ADDR_W'(a), 1'b0, DATA_W'(a ^ 8'hA5));
      apply(ADDR_W'(a), 1'b1, DATA_W'(a));
    end
    // random traffic, biased towards the port address
    for (int i = 0; i < 2000; i++)
      apply(($urandom % 4 == 0) ? 10'h224 : ADDR_W'($urandom), $urandom % 2, DATA_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
