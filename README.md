# Anti-interference UART: oversampling receiver, byte widener and multi-byte transmitter

A UART receiver normally looks at each bit once, in its middle. A single spike
of interference at that moment corrupts the byte, and a spike on an idle line
looks like a start bit. This design makes the receiver resistant to such
glitches:

* the line is **synchronised** through three registers before anything looks at it;
* every bit is **sampled 16 times**, and only the **middle six samples** are counted;
* each bit is decided by a **vote** of those six samples;
* a start bit is **validated** after its sixth sample, and a spike on an idle
  line is dropped before it can produce a byte.

Around this receiver sits a small echo system, the slave side of a host/slave
link. Each received byte `d` is widened by a "main module" into a 3-byte word
`{d, d+1, d-1}`. A send terminal then returns that word to the host as three
UART frames, low byte first: 0x55 comes back as 0x54, 0x56, 0x55. The word
width is a parameter (`BN` bytes).

All defaults are those of the original system: a 50 MHz clock, 115200 baud,
8 data bits LSB first, one stop bit, no parity, and `BN = 3`.

```
             +---------------------------+    +----------+    +------------------------+
 rx -------->| uart_anti_interference_rx |--->| data_add |--->| uart_tx5               |---> bitout
             |  sync1-3, edge detect     |data|  din =   |din |  d_temp, n, b0/b1      |---> tx_busy
             |  uart_baud_gen (27 cyc)   |done| {d,d+1,  |en  |  +-------------------+ |
             |  accumulators, vote       |    |  d-1}    |    |  | uart_tx (byte)    | |
             +---------------------------+    +----------+    |  | uart_baud_gen(434)| |
                                                              |  +-------------------+ |
                                                              +------------------------+
```

## The receiver (`uart_anti_interference_rx`)

This block is the heart of the design, and the part whose timing matters most.

### Synchronisation and start detection

`rx` passes through `sync1 -> sync2 -> sync3`. A falling edge is seen when
`sync3` is high and `sync2` is low (`f_edge`). In the idle state a falling edge
raises `rx_state`, clears all accumulators and starts reception. Edges seen
while `rx_state` is high are ignored.

### The sampling grid

While `rx_state` is high, a baud-rate generator (`uart_baud_gen`, `DIV = 27`)
runs a counter `cnt` from 0 to 26. That makes 27 cycles per sample, because
50 MHz / (16 × 115200) = 27.1 is truncated to 27. On `cnt == 13` it raises the
sampling `flag`. A second counter, `cnt_for_flag`, counts the flags: 16 per
bit, 160 per frame. The receiver's bit is therefore 432 cycles long, against
the transmitter's 434. The drift over a frame is about 20 cycles, far inside
the margin.

Take the clock edge at which `rx` falls as edge 0. Then:

| event | clock edge |
|---|---|
| `rx_state` rises | 3 |
| sampling flag *k* (k = 1, 2, ...) | 16 + 27·(k−1) |
| voted samples of bit *b* (b = 0 start, 1..8 data, 9 stop) | flags 16·b + 7 … 16·b + 12 |
| start-bit check | flag 12 (edge 313) |
| `rx_done` high | 4310 (9.93 bit periods) |

The six voted samples of each bit sit at 41 %–72 % of the transmitted bit. This
is slightly late of centre because of the synchroniser and the half-period
offset of the flag.

Each voted sample adds the synchronised line value (`sync2`) to that bit's
3-bit accumulator:

* `accum_start_bit` for the start bit;
* `accum_data[0..7]` for the data bits;
* `accum_stop_bit` for the stop bit.

The accumulators therefore count *high* samples.

### Decisions

* **Start bit**, at the flag that brings `cnt_for_flag` to 12: if more than
  two of its six samples were high, the start is treated as interference.
  `rx_state` falls, the counters clear and the receiver is idle again. No byte
  is produced.
* **Data bits**, at the 160th flag: a bit is 1 when at least 3 of its 6
  samples were high.
* **Stop bit**, at the 160th flag: it must also vote high (3 or more of 6).
  If it does, the byte goes to `outdata` and `rx_done` pulses for one cycle. If
  it does not, the frame is dropped: `outdata` keeps its old value and there is
  no `rx_done`.

Either way, the receiver goes idle at edge 4310. That is 30 cycles before the
end of a nominal stop bit, so back-to-back frames are received without loss.

### What it tolerates, and what it does not

* A burst of up to one sampling period (27 cycles, about 6 % of a bit)
  anywhere inside a bit touches at most two of the six voted samples. It is
  always out-voted, whatever its polarity.
* A burst that touches three samples of a data bit ties the vote at 3:3, which
  decides high. Four or more flip the bit.
* A low spike on an idle line shorter than about 250 cycles leaves at least
  three high samples in the "start bit" and is rejected.
* Limitation: a spike in the last ~30 cycles of a stop bit, or just before a
  real start bit, starts a false reception. That reception is only rejected at
  edge 313. A real start edge inside that window is missed, and the frame is
  lost or misread.

## The main module (`data_add`)

This block is combinational. `din = {data, data+1, data-1}` (modulo 256), with
`data` as the most significant byte, and `en = rx_done`. The transmitter
therefore sees the new word in the same cycle as its enable. After reset
`outdata` is 0, so `din` reads 0x0001ff.

For `BN` other than 3 the lower bytes continue the pattern `data+1, data-1,
data+2, data-2, ...`. That extension is this implementation's own; only
`BN = 3` is defined by the original design.

## Sending (`uart_tx5` and `uart_tx`)

`uart_tx5` is the word-level send terminal:

1. A rising edge of `en` while idle copies `din` into the buffer register
   `d_temp`, puts `d_temp[7:0]` on `d`, raises `tx_busy` and pulses `tx`.
2. The byte transmitter's busy signal is synchronised through `b0`, `b1`. Its
   falling edge (`flag`) marks the end of one byte.
3. On that edge the byte counter `n` advances, `d_temp` shifts right by 8, the
   next byte is placed on `d`, and `tx` pulses again.
4. After `BN` bytes, `d_temp`, `d` and `n` are cleared and `tx_busy` falls.

A rising edge of `en` while `tx_busy` is high is **ignored**. The host is
expected to watch `tx_busy`: one received byte produces `BN` bytes of reply,
so a host that sends continuously would overrun the transmitter.

`uart_tx` sends one byte:

* `tx_en` is registered in `d0`, `d1`, and its rising edge (`tx_en_flag`)
  loads `tx_data` and raises `tx_flag` and `tx_busy`.
* A second `uart_baud_gen` (`DIV = 434`) counts `clk_cnt` over one bit
  period. Each time it wraps, the send counter `tx_cnt` advances.
* `tx_cnt = 0` sends the start bit, `1..8` send data bits LSB first, and `9`
  sends the stop bit. The frame ends when `tx_cnt` is 9 and `clk_cnt` wraps.
* `bit_out` is registered and idles high.

Send-side timing:

* The first start bit appears 3 edges after the edge at which `uart_tx5` sees
  `en`.
* Consecutive frames of a word start 4344 cycles apart: 10 bits plus a
  4-cycle idle gap.
* `tx_busy` stays high for `BN × 4344` cycles.
* End to end, the first reply start bit leaves 4314 edges after the host's
  start bit began.

## Interface of `uart_top`

| port | dir | meaning |
|---|---|---|
| `clk` | in | system clock (`CLK_FREQ`, 50 MHz) |
| `rst` | in | reset, **active low**, asynchronous |
| `rx` | in | serial line from the host |
| `bitout` | out | serial line to the host, idle high |
| `tx_busy` | out | reply in progress; wait for it to fall before sending the next byte |

Parameters (`int unsigned`):

* `CLK_FREQ` (50 000 000) and `BAUD` (115 200): both dividers are derived
  from them in `uart_pkg`. The receiver's is `CLK_FREQ / (16·BAUD)`; the
  transmitter's is `CLK_FREQ / BAUD`.
* `BN` (3): bytes in the widened word.

The sampling constants live in `uart_pkg`: 16 samples per bit, 6 voted
samples starting at position 6, and the start-bit limit of 2 high samples.

## Where this implementation makes its own choices

The original description fixes the techniques and the key numbers:

* three synchronisers, with edge detection on the last two;
* 16 samples per bit, of which the middle 6 are accumulated;
* start-bit rejection at count 12 when more than 2 samples are high;
* completion at count 160;
* the `{d, d+1, d-1}` widening for 3 bytes;
* the byte-by-byte sending with busy-edge detection;
* the transmitter's 0..9 send counter.

The following are not fixed there and were chosen here:

* active-low asynchronous reset; the original signal is named `rst` and is
  high in normal operation;
* the exact sample positions (6..11 of 0..15) and the 3-of-6 vote threshold
  for data and stop bits;
* dropping frames with a low stop bit;
* the one-cycle `rx_done`;
* ignoring requests while busy;
* the registered `bit_out`;
* a single parameterised divider used for both counters.

Not implemented:

* **Parity bit and more than one stop bit.** The protocol allows both, but the
  system as built uses 10-bit frames.
* **The generic UART shell of a processor peripheral.** This covers the
  peripheral-bus interface, a control unit, and the FIFO modes of the receive
  and transmit buffers. No register map, bus protocol or FIFO depth is
  defined for them, and the working system does not use them. Its
  single-byte holding registers are `outdata` in the receiver and
  `d_temp`/`d`/`tx_data` in the transmitter.
* **The host (a PC or PLC).** The end-to-end testbench plays the host.

## Files

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | shared constants and divider functions |
| `rtl/uart_baud_gen.sv` | enabled counter with middle and end ticks |
| `rtl/uart_anti_interference_rx.sv` | the receiver |
| `rtl/data_add.sv` | the main module |
| `rtl/uart_tx.sv` | byte transmitter |
| `rtl/uart_tx5.sv` | multi-byte send terminal |
| `rtl/uart_top.sv` | the three blocks wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs. What each one checks:

* **`tb_uart_top`** runs the whole slave at its default parameters. It sends
  bytes with a random burst of interference (1–27 cycles) inside every bit,
  plus idle-line spikes, a frame with a low stop bit, and a byte sent while
  busy. It decodes the replies and checks the values, the 4314-cycle latency,
  the 4344-cycle frame spacing and the `tx_busy` length. It also counts that
  each mechanism (vote, start rejection, stop-bit drop, multi-byte word,
  busy-ignore) actually happened.
* **`tb_uart_anti_interference_rx`** checks the receiver. This includes the
  exact 4310-cycle latency and both sides of the start-bit threshold: a
  250-cycle spike is rejected, and a 265-cycle one is read as 0xff.
* **`tb_interference_sweep`** moves a single burst of 1–27 cycles across the
  start bit, a 0 data bit, a 1 data bit and the stop bit, in 11-cycle steps
  (604 frames). It also checks the vote at its limit: three spoiled samples
  turn a 0 into a 1, four turn a 1 into a 0.
* **`tb_uart_tx`** and **`tb_uart_tx5`** check the transmit waveforms cycle
  by cycle.
* **`tb_data_add`** checks the main module exhaustively.
* **`tb_uart_baud_gen`** checks the divider against a reference counter.

## Simulating

With Verilator 5, run from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_uart_top \
    -y rtl -y tb +libext+.sv rtl/uart_pkg.sv tb/tb_uart_top.sv
./obj_dir/Vtb_uart_top
```

Replace `tb_uart_top` with any other testbench name. Each one runs in well
under a second. To lint a module on its own, run
`verilator --lint-only -Wall -Wno-fatal rtl/uart_pkg.sv rtl/<module>.sv -y rtl`.
The remaining lint warnings are unused package constants in some modules, and
the receiver's and transmitter's divider counts, which are kept visible but
not read.
