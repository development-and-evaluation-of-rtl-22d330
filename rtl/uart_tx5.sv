// uart_tx5: send terminal. Transmits a BN-byte word as BN back-to-back UART
// frames, least significant byte first, and reports `tx_busy` meanwhile.
//
// How it works: a rising edge of `en` while idle copies `din` into the buffer
// register `d_temp`, puts its low byte on `d` (the byte transmitter's input),
// raises `tx_busy` and pulses `tx` for one cycle to start the byte
// transmitter (uart_tx). The byte transmitter's busy signal is synchronised
// through two registers (b0, b1); its falling edge, `flag`, marks the end of
// one byte. On it the byte counter `n` advances, `d_temp` shifts right by
// eight bits, the next byte is placed on `d` and `tx` pulses again. When the
// count reaches BN the word is complete: `d_temp`, `d` and `n` are cleared and
// `tx_busy` falls.
//
// Interface: `clk`, `rst` (active low, asynchronous), `din[BN*8-1:0]`, `en`;
// outputs `bitout` (serial line, idle high) and `tx_busy`.
// Timing: the first start bit leaves 3 clock edges after the edge that first
// sees en high; consecutive frames are separated by an idle gap of four cycles (busy
// synchronisation, edge detection and the byte transmitter's own enable
// detection); tx_busy
// stays high from the cycle after en until the last stop bit has ended.
// A rising edge of en while tx_busy is high is ignored.
//
// Following the published design: the enable edge detection, the buffer
// register shifted by a byte at a time, the busy synchronisation and
// falling-edge detection, the byte counter and the clean-up at the end.
// Ignoring a request while busy is this implementation's own choice.
module uart_tx5
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ = DEFAULT_CLK_FREQ,
  parameter int unsigned BAUD     = DEFAULT_BAUD,
  parameter int unsigned BN       = DEFAULT_BN
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [BN*8-1:0] din,
  input  logic            en,
  output logic            bitout,
  output logic            tx_busy
);

  localparam int unsigned NW = $clog2(BN + 1) < 4 ? 4 : $clog2(BN + 1);

  logic            en_q, en_rise;
  logic [BN*8-1:0] d_temp;
  logic [7:0]      d;
  logic            tx;
  logic            busy;
  logic            b0, b1, flag;
  logic [NW-1:0]   n;
  logic [BN*8-1:0] next_word;

  assign next_word = d_temp >> 8;

  uart_tx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_byte_tx (
    .clk     (clk),
    .rst     (rst),
    .tx_en   (tx),
    .din     (d),
    .bit_out (bitout),
    .tx_busy (busy)
  );

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      en_q <= 1'b0;
      b0   <= 1'b0;
      b1   <= 1'b0;
    end else begin
      en_q <= en;
      b0   <= busy;
      b1   <= b0;
    end
  end

  assign en_rise = en & ~en_q;
  assign flag    = b1 & ~b0;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      d_temp  <= '0;
      d       <= '0;
      tx      <= 1'b0;
      tx_busy <= 1'b0;
      n       <= '0;
    end else begin
      tx <= 1'b0;
      if (!tx_busy) begin
        if (en_rise) begin
          d_temp  <= din;
          d       <= din[7:0];
          tx      <= 1'b1;
          tx_busy <= 1'b1;
          n       <= '0;
        end
      end else if (flag) begin
        if (n == NW'(BN - 1)) begin
          d_temp  <= '0;
          d       <= '0;
          n       <= '0;
          tx_busy <= 1'b0;
        end else begin
          d_temp <= next_word;
          d      <= next_word[7:0];
          n      <= n + 1'b1;
          tx     <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (BN >= 1) else $error("uart_tx5: BN must be at least 1");
  end

endmodule
