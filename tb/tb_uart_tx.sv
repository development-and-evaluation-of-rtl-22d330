// tb_uart_tx: self-checking test of the byte transmitter at the default
// 50 MHz / 115200 baud (434 cycles per bit).
//
// For a set of bytes (fixed corner values, then random ones) the testbench
// pulses tx_en, then checks bit_out cycle by cycle against the expected frame
// built in the testbench: 3 cycles of idle after the rising edge of tx_en,
// then start bit, eight data bits LSB first and a stop bit, each exactly 434
// cycles long. tx_busy must be high for exactly 4340 cycles. A second tx_en
// pulse in the middle of a frame must not disturb it.
`timescale 1ns/1ps
module tb_uart_tx;

  localparam int BIT = 434;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #10 clk = ~clk;

  logic       tx_en = 1'b0;
  logic [7:0] din = '0;
  logic       bit_out, tx_busy;

  uart_tx dut (.clk, .rst, .tx_en, .din, .bit_out, .tx_busy);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Send one byte and compare the line with the expected waveform. If
  // `poke` is set, a second enable pulse with other data arrives mid-frame.
  task automatic send_and_check(logic [7:0] b, bit poke);
    logic [9:0] frame;
    int busy_cycles = 0;
    int bad_line = 0;
    frame = {1'b1, b, 1'b0};
    @(posedge clk);
    din   <= b;
    tx_en <= 1'b1;
    @(posedge clk);
    tx_en <= 1'b0;
    // c counts clock edges since tx_en went high; edge 1 has just passed.
    for (int c = 2; c <= 3 + 10 * BIT + 2; c++) begin
      @(posedge clk);
      @(negedge clk);
      if (tx_busy) busy_cycles++;
      if (c < 3 + 0) begin
        if (bit_out !== 1'b1) bad_line++;
      end else if (c < 3 + 10 * BIT) begin
        if (bit_out !== frame[(c - 3) / BIT]) bad_line++;
      end else begin
        if (bit_out !== 1'b1) bad_line++;
      end
      if (poke && c == 3 + 4 * BIT) begin
        din   <= ~b;
        tx_en <= 1'b1;
      end
      if (poke && c == 3 + 4 * BIT + 5) tx_en <= 1'b0;
    end
    check(bad_line == 0, $sformatf("byte %02x: %0d cycles of the line were wrong", b, bad_line));
    check(busy_cycles == 10 * BIT, $sformatf("byte %02x: busy for %0d cycles", b, busy_cycles));
    check(tx_busy == 1'b0, "busy cleared after frame");
    repeat ($urandom_range(0, 50)) @(posedge clk);
  endtask

  initial begin
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    repeat (3) @(posedge clk);
    check(bit_out == 1'b1 && tx_busy == 1'b0, "idle after reset");
    send_and_check(8'h54, 1'b0);
    send_and_check(8'h56, 1'b0);
    send_and_check(8'h55, 1'b1);
    send_and_check(8'h00, 1'b0);
    send_and_check(8'hff, 1'b0);
    repeat (6) send_and_check(8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
