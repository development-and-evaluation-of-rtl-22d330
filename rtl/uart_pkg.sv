// uart_pkg: constants and helper functions shared by the anti-interference
// UART (receiver, data-processing main module, transmitters and top).
//
// The defaults are those of the published system: a 50 MHz clock, 115200
// baud, 16 samples per bit of which the middle 6 are voted on, a frame of one
// start bit, eight data bits (LSB first) and one stop bit, and a main module
// that widens each received byte into BN = 3 bytes. The helper functions turn
// the clock and baud rate into the two divider lengths: the receiver's
// sampling period (clock / (16 * baud), 27 cycles, a counter limit of 26 =
// 0x1a) and the transmitter's bit period (clock / baud, 434 cycles).
package uart_pkg;

  localparam int unsigned DEFAULT_CLK_FREQ = 50_000_000;
  localparam int unsigned DEFAULT_BAUD     = 115_200;

  // Samples taken per bit by the receiver.
  localparam int unsigned OVERSAMPLE   = 16;
  // Samples of each bit that are voted on, and the first of them (0-based
  // position inside the 16 samples of the bit).
  localparam int unsigned SAMPLE_NUM   = 6;
  localparam int unsigned SAMPLE_FIRST = 6;
  // Start bit is rejected when more than this many voted samples are high.
  localparam int unsigned START_MAX_HIGH = 2;

  // One start bit, eight data bits, one stop bit; no parity bit.
  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = DATA_BITS + 2;

  // Bytes produced by the main module per received byte.
  localparam int unsigned DEFAULT_BN = 3;

  // Receiver sampling period in clock cycles (27 at the defaults).
  function automatic int unsigned rx_sample_div(int unsigned clk_freq, int unsigned baud);
    return clk_freq / (baud * OVERSAMPLE);
  endfunction

  // Transmitter bit period in clock cycles (434 at the defaults).
  function automatic int unsigned tx_bit_div(int unsigned clk_freq, int unsigned baud);
    return clk_freq / baud;
  endfunction

endpackage
