// uart_tx: byte transmitter (the submodule of the send terminal).
//
// A rising edge on `tx_en` starts one frame: start bit (0), the eight bits of
// `din` LSB first, stop bit (1). The enable is registered twice (d0, d1) and
// its rising edge (d0 high, d1 low) is `tx_en_flag`; on it the byte is
// captured in `tx_data` and `tx_flag` and `tx_busy` rise. A baud-rate
// generator then counts `clk_cnt` from 0 to CLK_FREQ / BAUD - 1 (433 at the
// defaults) and, each time it wraps, the send counter `tx_cnt` advances. The
// output bit is chosen from tx_cnt: 0 is the start bit, 1..8 are data bits,
// 9 is the stop bit. When tx_cnt is 9 and clk_cnt reaches its set value the
// frame ends: tx_flag and tx_busy fall and the module is idle, line high.
//
// Interface: `clk`, `rst` (active low, asynchronous), `tx_en`, `din[7:0]`;
// outputs `bit_out` (registered, idle high) and `tx_busy`.
// Timing: bit_out shows the start bit 3 cycles after tx_en rises, every bit
// lasts CLK_FREQ / BAUD cycles and tx_busy is high for 10 bit periods; a
// rising edge of tx_en while busy is ignored.
//
// The edge detector on the enable, the clock and send counters, and the
// meaning of the send-counter values follow the published design; ignoring a
// request while busy and the registered output are this implementation's
// own choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ = DEFAULT_CLK_FREQ,
  parameter int unsigned BAUD     = DEFAULT_BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_en,
  input  logic [7:0] din,
  output logic       bit_out,
  output logic       tx_busy
);

  localparam int unsigned BDIV = tx_bit_div(CLK_FREQ, BAUD);

  logic d0, d1, tx_en_flag;
  logic tx_flag;
  logic [7:0]  tx_data;
  logic [3:0]  tx_cnt;
  logic [15:0] clk_cnt;
  logic        bit_end;
  logic        unused_mid;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      d0 <= 1'b0;
      d1 <= 1'b0;
    end else begin
      d0 <= tx_en;
      d1 <= d0;
    end
  end

  assign tx_en_flag = d0 & ~d1;

  uart_baud_gen #(.DIV(BDIV), .CW(16)) u_baud (
    .clk      (clk),
    .rst      (rst),
    .en       (tx_flag),
    .cnt      (clk_cnt),
    .mid_tick (unused_mid),
    .end_tick (bit_end)
  );

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      tx_flag <= 1'b0;
      tx_busy <= 1'b0;
      tx_data <= '0;
      tx_cnt  <= '0;
    end else if (!tx_flag) begin
      if (tx_en_flag) begin
        tx_flag <= 1'b1;
        tx_busy <= 1'b1;
        tx_data <= din;
        tx_cnt  <= '0;
      end
    end else if (bit_end) begin
      if (tx_cnt == 4'(FRAME_BITS - 1)) begin
        tx_flag <= 1'b0;
        tx_busy <= 1'b0;
        tx_cnt  <= '0;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst)
      bit_out <= 1'b1;
    else if (!tx_flag)
      bit_out <= 1'b1;
    else if (tx_cnt == 4'd0)
      bit_out <= 1'b0;
    else if (tx_cnt == 4'(FRAME_BITS - 1))
      bit_out <= 1'b1;
    else
      bit_out <= tx_data[3'(tx_cnt - 4'd1)];
  end

endmodule
