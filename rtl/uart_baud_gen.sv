// uart_baud_gen: baud-rate generator, the clock divider shared by the
// receiver (its sampling counter) and the byte transmitter (its bit-period
// counter).
//
// While `en` is high the counter `cnt` runs 0, 1, ... DIV-1 and wraps to 0;
// while `en` is low it is held at 0, so each enable starts a fresh period.
// `mid_tick` is high for the one cycle in which cnt equals DIV/2 (the
// receiver's sampling flag, in the middle of each sampling period) and
// `end_tick` for the cycle in which cnt equals DIV-1 (the transmitter's end of
// bit). Both are combinational decodes of the registered count. `rst` is an
// active-low asynchronous reset, as in the rest of the design.
//
// The counter that wraps at a set value and the flag in the middle follow the
// published description; putting both counters into one parameterised unit
// is a choice of this implementation.
module uart_baud_gen #(
  parameter int unsigned DIV = 27,
  parameter int unsigned CW  = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [CW-1:0] cnt,
  output logic          mid_tick,
  output logic          end_tick
);

  localparam logic [CW-1:0] LAST = CW'(DIV - 1);
  localparam logic [CW-1:0] MID  = CW'(DIV / 2);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst)            cnt <= '0;
    else if (!en)        cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                 cnt <= cnt + 1'b1;
  end

  assign mid_tick = en && (cnt == MID);
  assign end_tick = en && (cnt == LAST);

  initial begin
    assert (DIV >= 2) else $error("uart_baud_gen: DIV must be at least 2");
    assert (DIV <= 2**CW) else $error("uart_baud_gen: DIV does not fit in CW bits");
  end

endmodule
