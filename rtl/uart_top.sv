// uart_top: the slave side of the anti-interference UART system.
//
// A host sends bytes on `rx`. The anti-interference receiver
// (uart_anti_interference_rx) turns each frame into a byte `outdata` with a
// one-cycle `rx_done`; the main module (data_add) widens it into a BN-byte
// word `din` = {data, data + 1, data - 1} with enable `en`; the send terminal
// (uart_tx5) returns the word to the host on `bitout` as BN UART frames, low
// byte first, with `tx_busy` high meanwhile. Received 0x55 therefore comes
// back as 0x54, 0x56, 0x55.
//
// Interface: `clk` (50 MHz by default), `rst` (active low, asynchronous),
// `rx` in, `bitout` and `tx_busy` out. The line runs at BAUD (115200) with
// one start bit, eight data bits LSB first and one stop bit.
// Timing: the reply starts about 4314 cycles (9.94 bit periods) after the
// start edge of the received frame and lasts BN frames of 4340 cycles plus a
// four-cycle gap between them. A byte that arrives while tx_busy is high is
// received but not sent back; the host is expected to wait for tx_busy to
// fall.
//
// The three blocks and their connections are those of the published system;
// the clock, baud rate and BN defaults are its values.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ = DEFAULT_CLK_FREQ,
  parameter int unsigned BAUD     = DEFAULT_BAUD,
  parameter int unsigned BN       = DEFAULT_BN
) (
  input  logic clk,
  input  logic rst,
  input  logic rx,
  output logic bitout,
  output logic tx_busy
);

  logic [7:0]      data;
  logic            rx_done;
  logic [BN*8-1:0] din;
  logic            en;

  uart_anti_interference_rx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) rx_u (
    .clk     (clk),
    .rst     (rst),
    .rx      (rx),
    .outdata (data),
    .rx_done (rx_done)
  );

  data_add #(.BN(BN)) add_u (
    .clk     (clk),
    .rst     (rst),
    .data    (data),
    .rx_done (rx_done),
    .din     (din),
    .en      (en)
  );

  uart_tx5 #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .BN(BN)) uart_tx_u (
    .clk     (clk),
    .rst     (rst),
    .din     (din),
    .en      (en),
    .bitout  (bitout),
    .tx_busy (tx_busy)
  );

endmodule
