# UART core with a bit period in clock cycles

This is a small universal asynchronous receiver-transmitter. It has an 8-bit
parallel interface on one side and a serial line on the other. The transmitter
and the receiver work independently but share one bit rate. That rate is not
set as a baud rate or a divisor. It is set as a **bit period**: an 8-bit input
giving the number of clock cycles per serial bit. The hardware only has to
count cycles, and the user can set any rate from 8 to 255 cycles per bit
(1 to 7 also work for transmission).

The design has two control blocks, one per direction, and two bit-sliced
datapaths:

```
                      bit_period (to both control blocks)

 txdata_write ─►┌───────────┐ tx_rdy, txshift_enable ┌─────────┐
                │ tx_module │───────────────────────►│ tx_line │──► TxD
 trdy ◄─────────└───────────┘   data_tx, txdata_write─►└─────────┘

         RxD ─┬►┌───────────┐ rxshift_enable, rxdata_rdy ┌─────────┐
              │ │ rx_module │───────────────────────────►│ rx_line │──► data_rx
 rxdata_rdy ◄───│           │◄───────── stopbit ─────────│         │
 rx_fe      ◄───└───────────┘                       RxD ─►└─────────┘
```

## Line format

A frame is 10 bits, each `bit_period` clock cycles long. The polarity is the
reverse of RS-232 convention:

| bit | level |
|-----|-------|
| start | **high** |
| data 0 … 7 | the byte, least significant bit first |
| stop | **low** |

The line idles **low**. A receiver idles in the stop level and takes the first
high level it sees as a start bit. There is no parity bit and no configurable
frame length. `bit_period = 0` behaves as 256 cycles per bit, because the
limit `bit_period - 1` wraps around.

## Ports of `uart`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `reset` | in | 1 | synchronous reset, active high |
| `bit_period` | in | 8 | clock cycles per bit, both directions |
| `data_tx` | in | 8 | byte to send; sampled only in the `txdata_write` cycle |
| `txdata_write` | in | 1 | one-cycle strobe: write `data_tx` into the transmit holding register |
| `trdy` | out | 1 | transmit holding register is empty (a write is accepted) |
| `TxD` | out | 1 | serial output |
| `RxD` | in | 1 | serial input; must be synchronous to `clk` |
| `rxdata_rdy` | out | 1 | one-cycle pulse: a frame has been received |
| `rx_fe` | out | 1 | one-cycle pulse with `rxdata_rdy` if the stop bit was high (framing error) |
| `data_rx` | out | 8 | last received byte, valid from the cycle **after** `rxdata_rdy` and held until the next frame |

`bit_period` should only change while both directions are idle.

## Transmitter

### Two registers, two status bits

The transmitter is double-buffered. A **holding register** (in `tx_line`)
captures `data_tx` when `txdata_write` is high. A 10-stage **shift register**
sends the frame. Two set/clear flip-flops (`status_bit`) track them:

* `trdy`: the holding register is empty. `txdata_write` clears it. The
  controller sets it again when it moves the byte into the shift register.
* `tmt`: the shift register is empty. The load clears it. The bit counter sets
  it when the tenth bit has gone out.

Reset sets both bits. If a set and a clear arrive in the same cycle, the set
wins.

### Controller (`tx_fsm`)

| state | output | next |
|-------|--------|------|
| `TX_IDLE` | – | `TX_READ` when the holding register is full (`!trdy`) and the shifter is empty (`tmt`) |
| `TX_READ` | `txdata_read`, `tx_rdy` | `TX_LOAD` |
| `TX_LOAD` | `tx_rdy` | `TX_SEND` |
| `TX_SEND` | – | stays while `!tmt`; then `TX_READ` if another byte is waiting, else `TX_IDLE` |

`txdata_read` has three effects: it sets `trdy`, clears the bit counter and
restarts the bit-rate generator. `tx_rdy` switches the 2:1 mux in front of each
shifter stage to the parallel frame `{0, byte, 1}`, and it also forces `TxD`
low.

### Bit timing (`tx_brg`, `bit_counter`)

The transmit bit-rate generator is a counter that is cleared by
`txdata_read` and whenever it reaches `bit_period - 1`. It pulses in the load
cycle and whenever the count is 0. The pulse is gated by `!tmt`, so the first
`txshift_enable` comes in `TX_LOAD`. That first enable loads the frame, with
the start bit already in the stage that drives `TxD`. Each later enable shifts
the next bit out. A 4-bit counter counts the enables. Its `done` pulse after
the tenth enable sets `tmt`.

With a write in cycle 0 and the transmitter idle:

| cycle | event |
|-------|-------|
| 0 | `txdata_write` |
| 1–2 | `trdy` low |
| 2 | `TX_READ` |
| 3 | `TX_LOAD`, frame loaded; `trdy` high again |
| 4 … 4+bp−1 | start bit on `TxD` |
| 4 + k·bp | bit k begins (k = 1…8 data, k = 9 stop) |
| 4 + 9·bp | bit counter done; the transmitter is free one cycle later |

A byte can be written as soon as `trdy` is high again, while the previous
frame is still going out. That byte is sent straight after the current frame.
Because the frame counts as sent once the stop bit has *started*, **the stop
bit between back-to-back frames lasts only 4 clock cycles**, whatever the bit
period. After the last frame, the line just stays at the stop (idle) level.
This is inherited from the original design. At bit periods of 8 and more, a
receiver of this same design samples such a line where it expects the stop
bit but finds the next start bit. It flags `rx_fe` and then re-arms late for
the frame that follows. Leave at least one bit period between writes (wait
for the frame to finish before writing) if the far end checks stop bits.

At `bit_period = 1` the generator fires in every cycle. This gives one extra
enable in the cycle the frame is reported done, which shifts in another low
bit and changes nothing visible.

## Receiver

### Start detection and mid-bit sampling (`rx_module`, `rx_brg`)

A status bit `rmt` ("receiver idle") is set by reset and by `rxdata_rdy`. While
it is set, `RxD` high is a start bit. In that cycle the receive bit-rate
generator is **preset to `bit_period / 2`** rather than 0, the bit counter is
cleared, and `rmt` is cleared. The generator then pulses each time it reaches
`bit_period - 1`. The first pulse therefore comes `bit_period - bit_period/2`
cycles after the start edge, near the middle of the start bit, and every later
one comes a full bit period after that. With the first high cycle as cycle 0:

* sample k (k = 0 start, 1–8 data, 9 stop) is taken in cycle
  `bp - bp/2 + k·bp`
* `rxdata_rdy` is high in cycle `bp - bp/2 + 9·bp + 1` (77 for `bp = 8`)
* the receiver looks for a new start bit from the cycle after that

The transmitter and the receiver each have their own generator, because only
the receiver needs the half-period preset.

### Datapath (`rx_line`)

`rxshift_enable` shifts `RxD` into the top of a 9-stage shift register. After
ten samples the start bit has dropped out of the bottom, the data bits sit in
stages 7…0 and the stop bit in stage 8. Stage 8 is fed back as `stopbit`, so
that `rx_fe = rxdata_rdy & stopbit`. `rxdata_rdy` also enables the 8-bit
holding register. **`data_rx` therefore changes in the cycle after
`rxdata_rdy`.** Read it then, or any time before the next frame completes.

### Limits

* A stop bit that is high, and is still high when the receiver re-arms (the
  cycle after `rxdata_rdy`), is taken as the next start bit. The receiver
  then reads a spurious frame. `rx_fe` flags the bad frame but does not stop
  this.
* `RxD` goes straight into the start detector and the sampler. There is no
  synchronizer. Add two flip-flops in front of `RxD` for an asynchronous line.
  This shifts every receive time above by two cycles.
* Rate tolerance: the last sample falls at about 9.5 bit periods. It stays
  inside the stop bit while the line's bit length L satisfies
  0.95 < L / bit_period ≤ 1.055. The design is meant to accept ±2.5 % for bit
  periods of 40 and above, and the exact rate from 8 to 39. The tolerance
  testbench sweeps exactly that and passes.

## Clocking and reset

The original design is clocked by two non-overlapping phases, `ph1` and
`ph2`. Each flip-flop is a master latch on `ph2` followed by a slave latch on
`ph1`. Here every register is an ordinary rising-edge flip-flop on a single
`clk`. The cycle-level behaviour is the same, and `ph1`'s rising edge
corresponds to `clk`'s. Reset is synchronous and active high everywhere: it
clears the counters and shift registers, sets `trdy`, `tmt` and `rmt`, and
puts the controller in `TX_IDLE`.

## Where this RTL departs from the original design

* **Single clock** instead of the `ph1`/`ph2` pair (see above). The core has
  32 signal ports instead of 33.
* **Holding register enable.** The original datapath schematic clocks the
  transmit holding register in every cycle, with no write strobe. Its
  functional description says that the write pulse enables the register. This
  RTL follows the description: `txdata_write` also goes to `tx_line`, and
  `data_tx` must be valid only in the write cycle.
* **Receive generator priority.** In the original, the counter's wrap-around
  clear wins over the start-bit preset. A start edge that lands on the idle
  counter's wrap cycle would then be timed from 0 instead of half a period.
  Here the preset wins.
* **Controller reset.** The original one-hot state register resets to all
  zeros and reaches `S0` one cycle later. Here reset goes straight to
  `TX_IDLE`, and the states are binary encoded.
* **Receive shift register** has 9 stages, as in the original schematic. The
  original behavioural model has a tenth stage for the start bit that drives
  nothing.
* The strobe is named `txdata_write` throughout. The original also uses
  `txdata_set`, `txdata_rdy` and `tx_data_write` for it.
* The original bring-up plan quotes some numbers that do not follow from the
  design's own timing. The testbenches check the values the timing gives:
  * A line alternating every 8 cycles from a start bit carries `0xAA` in this
    frame format, not `0x55`. `rxdata_rdy` does come at cycle 77.
  * At `bit_period = 39` with a 40-cycle line, `rxdata_rdy` comes at cycle
    372, not 380.
  * A two-cycle pulse on `RxD` gives `rxdata_rdy` 10–11 cycles later only at
    `bit_period = 1`. With all inputs low (`bit_period = 0`) it takes 2561
    cycles.
* Not included: the pad ring of the 40-pin package, and the transistor-level
  custom cells. The `flopr` module gives the logic function of the custom
  flip-flop.

## Files

| file | contents |
|------|----------|
| `rtl/uart_pkg.sv` | frame sizes (`DATA_BITS` 8, `PACKET_BITS` 10, `BP_WIDTH` 8) and the controller state type |
| `rtl/uart.sv` | top: wires the four blocks |
| `rtl/tx_module.sv` | transmit control: `trdy`/`tmt`, `tx_fsm`, `tx_brg`, bit counter |
| `rtl/tx_fsm.sv` | four-state transmit controller |
| `rtl/tx_brg.sv` | transmit bit-rate generator |
| `rtl/tx_line.sv` | holding register and 10-stage parallel-in shifter |
| `rtl/rx_module.sv` | receive control: start detection, `rmt`, `rx_brg`, bit counter, framing check |
| `rtl/rx_brg.sv` | receive bit-rate generator with half-period preset |
| `rtl/rx_line.sv` | 9-stage serial-in shifter and holding register |
| `rtl/bit_counter.sv` | self-clearing counter, `done` at `LIMIT` (10) |
| `rtl/status_bit.sv` | set/clear status flip-flop |
| `rtl/flopr.sv`, `rtl/flopenr.sv` | resettable register, with and without enable |

The two control modules carry concurrent assertions: the controller loads
only into an empty shifter, and the receiver samples only while busy.

## Simulation

Every module except the plain `flopenr` register has a self-checking
testbench in `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Three testbenches drive
the whole core at its only configuration:

* `uart_tb` exercises both directions at once and then in loopback. It covers
  idle and back-to-back transmission, framing errors, ±2.5 % off-rate
  reception, and bit periods 8, 13, 39, 40 and 255. It checks `TxD` cycle by
  cycle against the frame timing, and counts each of these events.
* `uart_testplan_tb` replays a bring-up sequence: reset state, write timing,
  `TxD` bit grid at several bit periods, and receive latencies 11, 77 and 372.
* `uart_tolerance_tb` covers every bit period from 8 to 255, at ±2.5 % from
  40 upward.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/uart_pkg.sv tb/uart_tb.sv --top-module uart_tb
./obj_dir/Vuart_tb
```

Substitute any other testbench name. All of them finish in well under a second.
