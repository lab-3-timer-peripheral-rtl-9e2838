# One-second up/down timer on the PC-104 bus

A small peripheral that gives a PC-104 single-board computer a seconds
counter. An 8-bit register counts once per second, up or down depending on a
push-button. The host reads it as one byte at I/O port **224H**. All of the
logic runs on a single 25.175 MHz clock. The one-second rate comes from a
divider that makes a count *enable*, not a derived clock, so the design stays
fully synchronous.

```
             25.175 MHz                       up (push-button; pressed = 0)
                 |                                 |
                 v                                 v
        +-----------------+   tick (1 cycle  +--------------+  count[7:0]
  clk ->|  clock_divider  |---- every -----> | updown_timer |------------+
        |  0..DIVIDE-1    |   DIVIDE cycles) |  8-bit +/-1  |            |
        +-----------------+                  +--------------+            v
                                                               +--------------------+
  addr[9:0] (SA9..SA0) ------------------------------------->  | cpu_read_interface |
  ior_n (IOR*) --------------------------------------------->  | decode 224H & IOR* |
                                                               +--------------------+
                                                                 sd_o |    | sd_oe
                                                                      v    v
                                                            tri-state pins sd[7:0] <-> PC-104 data bus
```

## The one-second tick

`clock_divider` is a counter that runs from 0 to `DIVIDE-1` and then wraps to
0. Its `tick` output is high during the one clock cycle in which the count is
0. With `DIVIDE = 25_175_000` and a 25.175 MHz clock, the tick comes once per
second and lasts one 39.7 ns cycle. The counter width `CNT_W` is a second
parameter. Its default, `$clog2(DIVIDE)`, gives 25 bits for the full ratio,
because 2^25 = 33,554,432 is the first power of two above 25,174,999. An
elaboration-time assertion rejects a `CNT_W` too narrow for `DIVIDE`.

Reset clears the count, so the tick is high in the **first** cycle after
reset. The timer therefore takes its first step on the first clock edge after
reset, and every `DIVIDE` cycles after that. Keep this in mind when you read
waveforms. After reset the register reads 1 almost at once, not after one
second.

The tick is only ever used as an enable (`en`) on registers clocked by `clk`.
Using it as a clock would make a second clock domain and a gated clock. The
design avoids that on purpose.

## The timer register

`updown_timer` is an 8-bit register. On a cycle where `en` is high it adds 1
if `up` is high and subtracts 1 if `up` is low. On other cycles it holds its
value. It wraps modulo 256 in both directions: 255 + 1 gives 0, and 0 - 1
gives 255. Reset clears it to 0.

On the board, `up` comes from a push-button that reads 1 when released. The
timer counts up by default and counts down while the button is held.

## Reading the register over the bus

The host's I/O read strobe, IOR*, is made on the board computer by OR'ing the
CPU's M/IO* and W/R* status lines. It is low only during a read of I/O space.
`cpu_read_interface` is purely combinational:

- `sd_oe = !ior_n && addr == 10'h224`
- `sd_o  = sd_oe ? count : 0`

The top level turns these into tri-state pins: `sd = sd_oe ? sd_o : 'z`. The
data bus is shared with every other device on the PC-104 bus, so the pins
must float at all other times. That includes reads of other ports (220H, for
example), memory reads at the same address, writes, and idle bus time.
Otherwise two drivers would fight on the bus.

IOR* is never used as a clock, and nothing is latched on it. The value on the
bus follows the register for as long as the strobe is low. If a tick falls
inside a read cycle, the byte changes mid-cycle from n to n±1. The host
samples it at the end of the cycle and gets one of the two values.

## Top level: `timer_peripheral`

| port    | dir   | width | meaning |
|---------|-------|-------|---------|
| `clk`   | in    | 1     | 25.175 MHz oscillator; the only clock |
| `rst`   | in    | 1     | synchronous reset, active high |
| `up`    | in    | 1     | 1 = count up, 0 = count down |
| `addr`  | in    | 10    | I/O address SA9..SA0 |
| `ior_n` | in    | 1     | IOR*, active low |
| `sd`    | inout | 8     | data bus SD7..SD0 |
| `sd_oe` | out   | 1     | high while `sd` is driven |
| `count` | out   | 8     | timer value (for observation) |
| `tick`  | out   | 1     | divider tick (for observation) |

Parameter: `DIVIDE` (default `timer_pkg::CLK_HZ` = 25,175,000). Shared
constants live in `rtl/timer_pkg.sv`: `CLK_HZ`, `DATA_W = 8`, `ADDR_W = 10`
and `TIMER_PORT = 10'h224`.

The top level holds two concurrent assertions. The count may change only on
a cycle after a tick. A tick lasts one cycle, unless `DIVIDE = 1`.

## Design choices beyond the basic specification

These points are this design's own choices. The timer, as specified, leaves
them open:

- **Reset.** A synchronous, active-high `rst` clears the divider and the
  timer. The specification has no reset, since an FPGA's configuration gives
  the initial state.
- **Address decoding.** All 10 ISA I/O address bits are compared, as is usual
  on PC-104. AEN (DMA address enable) is not used. On a system that runs DMA,
  qualify `ior_n` with AEN outside the block, or add it to the decode.
- **Wrap-around** at 255 and 0, as described above.
- **The `up` input is not synchronised or debounced.** It is sampled only on
  tick cycles, once per second, so bounce does no harm. A change that happens
  to land right at a tick edge can still go metastable, however. For a real
  board, put a two-flop synchroniser in front of `up`.
- `count` and `tick` are extra outputs, brought out only so the design can be
  observed.
- FPGA pin assignment is not part of the RTL. On the original board the
  25.175 MHz oscillator enters on FPGA pin 91. The bus and push-button pins
  depend on how the board is wired.
- The tick period is one second (25,175,000 cycles). Each tick pulse lasts one
  clock cycle (1/25,175,000 s).

## Simulating

Every testbench checks itself. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with
plain Verilator 5. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/timer_pkg.sv rtl/clock_divider.sv rtl/updown_timer.sv \
    rtl/cpu_read_interface.sv rtl/timer_peripheral.sv \
    tb/timer_peripheral_tb.sv --top-module timer_peripheral_tb
./obj_dir/Vtimer_peripheral_tb
```

| testbench | what it covers |
|-----------|----------------|
| `clock_divider_tb` | ratios 1, 2 and 7 run side by side; every cycle's tick compared with a cycle count; tick spacing; reset in mid-period |
| `updown_timer_tb` | 2000 random `en`/`up` cycles against a reference count; wrap in both directions; hold when `en` is low; reset |
| `cpu_read_interface_tb` | all 1024 addresses with IOR* low and high; another device driving the bus while this one is released; random traffic; the bus has pull-ups, so a floating bus reads FFh |
| `timer_peripheral_tb` | whole design at `DIVIDE = 2`: a step every two cycles up and down, direction changes, wrap, I/O reads of 224H, I/O reads of 220H, memory reads and writes at 224H, and idle cycles. IOR* is formed from M/IO* and W/R*. Each mechanism is counted and must occur. |
| `timer_peripheral_full_tb` | whole design at its default size (1 Hz from 25.175 MHz), with no parameter overrides |

`timer_peripheral_full_tb` models the console demonstration program. The
program reads port 224H about once per millisecond and shows the value as a
digit, or as `*` if it is 10 or more. It stops when it reads 10. The button is
held from 2.5 s to 4.5 s. The test checks every value read against a
reference, and checks that the steps are exactly 25,175,000 cycles apart. The
characters shown must be `1232123456789*`, and the program must stop 13 s
after reset. That is about 327 million clock cycles, which takes about two
minutes in Verilator.

All five testbenches pass. Each block's testbench was also run against a
deliberately broken copy of its module, and each one caught the fault.

## Changing it

- **Another clock frequency:** set `DIVIDE` on `timer_peripheral` (or change
  `CLK_HZ` in the package). `CNT_W` follows automatically.
- **Another port address or bus width:** edit `TIMER_PORT`, `ADDR_W` or
  `DATA_W` in `timer_pkg`. `cpu_read_interface` also takes these as
  parameters (`PORT`, `ADDR_W_P`, `DATA_W_P`).
- **Faster simulation:** lower `DIVIDE`, as `timer_peripheral_tb` does. The
  logic is the same at any ratio.
