// uart_anti_interference_rx: UART receiver that resists glitches on the line.
//
// Frame: one start bit (low), eight data bits LSB first, one stop bit (high),
// no parity. How it works:
//  * The line `rx` passes through three synchronisation registers
//    (sync1 -> sync2 -> sync3). A falling edge is seen when the last two
//    stages differ (sync3 high, sync2 low); in the idle state this raises
//    `rx_state` and starts a reception.
//  * While receiving, a baud-rate generator divides the clock into sampling
//    periods of CLK_FREQ / (16 * BAUD) cycles (27 at 50 MHz / 115200) and
//    gives a sampling `flag` in the middle of each. A second counter,
//    `cnt_for_flag`, counts the flags: 16 per bit, 160 per frame.
//  * Of the 16 samples of every bit only the middle six (positions 6..11) are
//    used: each high sample adds one to that bit's accumulator
//    (accum_start_bit, accum_data[0..7], accum_stop_bit).
//  * On the twelfth flag the start bit is judged: if more than two of its six
//    samples were high it was a glitch, and the receiver drops `rx_state`
//    and returns to idle.
//  * On the 160th flag every bit is decided by vote (high when at least three
//    of six samples were high), the byte is written to `outdata`, `rx_done`
//    pulses for one cycle and the receiver returns to idle.
//
// Interface: `clk`, `rst` (active low, asynchronous), serial input `rx`;
// outputs `outdata` (holds the last good byte, 0 after reset) and `rx_done`.
// Timing: counting the clock edge at which `rx` falls as edge 0, rx_state
// rises at edge 3 (two synchronisation stages, then the edge detector),
// sampling flag k comes 16 + 27 * (k - 1) edges after that edge, and rx_done
// is high after edge 3 + 13 + 159 * 27 + 1 = 4310 (9.93 bit periods of 434
// cycles), near the end of the stop bit, so the receiver is idle again
// before the next frame can start.
//
// Taken from the published design: the three synchronisation stages, the
// edge detection on the last two, 16 samples per bit with the middle six
// accumulated, the start-bit rejection at count 12 when more than two samples
// are high, and completion at count 160. This implementation's own choices:
// the vote threshold for data bits (three of six), dropping a frame whose
// stop bit votes low (no rx_done, outdata kept), and the exact position of
// the six samples inside each bit.
module uart_anti_interference_rx
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ = DEFAULT_CLK_FREQ,
  parameter int unsigned BAUD     = DEFAULT_BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] outdata,
  output logic       rx_done
);

  localparam int unsigned SDIV      = rx_sample_div(CLK_FREQ, BAUD);
  localparam int unsigned FLAG_LAST = FRAME_BITS * OVERSAMPLE;        // 160
  localparam int unsigned CFW       = $clog2(FLAG_LAST + 1);          // 8
  localparam int unsigned AW        = $clog2(SAMPLE_NUM + 1);         // 3
  localparam int unsigned POS_LAST  = SAMPLE_FIRST + SAMPLE_NUM - 1;  // 11

  // Synchroniser and falling-edge detector.
  logic sync1, sync2, sync3;
  logic f_edge;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      sync1 <= 1'b1;
      sync2 <= 1'b1;
      sync3 <= 1'b1;
    end else begin
      sync1 <= rx;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  assign f_edge = sync3 & ~sync2;

  // Sampling-period counter.
  logic          rx_state;
  logic [15:0]   cnt;
  logic          flag;
  logic          unused_end;

  uart_baud_gen #(.DIV(SDIV), .CW(16)) u_baud (
    .clk      (clk),
    .rst      (rst),
    .en       (rx_state),
    .cnt      (cnt),
    .mid_tick (flag),
    .end_tick (unused_end)
  );

  // Flag counter and per-bit accumulators.
  logic [CFW-1:0] cnt_for_flag;
  logic [AW-1:0]  accum_start_bit;
  logic [AW-1:0]  accum_data [DATA_BITS];
  logic [AW-1:0]  accum_stop_bit;

  // Position of the current flag: which bit of the frame, and which of its
  // 16 samples.
  logic [CFW-1:0] bit_idx;
  logic [CFW-1:0] pos;
  logic           in_window;
  logic           start_bad;
  logic           stop_ok;
  logic [7:0]     decided;

  always_comb begin
    bit_idx   = cnt_for_flag / CFW'(OVERSAMPLE);
    pos       = cnt_for_flag % CFW'(OVERSAMPLE);
    in_window = (pos >= CFW'(SAMPLE_FIRST)) && (pos <= CFW'(POS_LAST));
    // The judgement of the start bit includes the sample taken on this flag.
    start_bad = (32'(accum_start_bit) + 32'(sync2)) > START_MAX_HIGH;
    stop_ok   = 32'(accum_stop_bit) >= (SAMPLE_NUM + 1) / 2;
    for (int i = 0; i < DATA_BITS; i++)
      decided[i] = 32'(accum_data[i]) >= (SAMPLE_NUM + 1) / 2;
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      rx_state        <= 1'b0;
      cnt_for_flag    <= '0;
      accum_start_bit <= '0;
      accum_stop_bit  <= '0;
      for (int i = 0; i < DATA_BITS; i++) accum_data[i] <= '0;
      outdata         <= '0;
      rx_done         <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      if (!rx_state) begin
        if (f_edge) begin
          rx_state        <= 1'b1;
          cnt_for_flag    <= '0;
          accum_start_bit <= '0;
          accum_stop_bit  <= '0;
          for (int i = 0; i < DATA_BITS; i++) accum_data[i] <= '0;
        end
      end else if (flag) begin
        cnt_for_flag <= cnt_for_flag + 1'b1;
        if (in_window) begin
          if (bit_idx == 0)
            accum_start_bit <= accum_start_bit + AW'(sync2);
          else if (bit_idx == CFW'(FRAME_BITS - 1))
            accum_stop_bit <= accum_stop_bit + AW'(sync2);
          else
            accum_data[bit_idx - 1] <= accum_data[bit_idx - 1] + AW'(sync2);
        end
        if (bit_idx == 0 && pos == CFW'(POS_LAST) && start_bad) begin
          // Start bit failed: back to idle.
          rx_state     <= 1'b0;
          cnt_for_flag <= '0;
        end else if (cnt_for_flag == CFW'(FLAG_LAST - 1)) begin
          // 160th flag: frame complete.
          rx_state     <= 1'b0;
          cnt_for_flag <= '0;
          if (stop_ok) begin
            outdata <= decided;
            rx_done <= 1'b1;
          end
        end
      end
    end
  end

  initial begin
    assert (SDIV >= 4) else $error("uart_anti_interference_rx: clock too slow for 16x oversampling");
  end

endmodule
