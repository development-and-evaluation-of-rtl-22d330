// tb_interference_sweep: sweeps a single burst of interference across every
// bit of a frame and checks the receiver's stated tolerance, at the default
// 50 MHz / 115200 baud.
//
// For burst lengths of 1, 9, 18 and 27 cycles (up to one 27-cycle sampling
// period) and offsets every 11 cycles across a 434-cycle bit, the line is
// inverted inside one bit of an otherwise clean frame. The start bit, a data
// bit that is 0, a data bit that is 1 and the stop bit are each hit in turn.
// Every frame must still be received with the right byte: such a burst can
// spoil at most two of the six voted samples. (Stop-bit bursts stay out of
// the last 54 cycles of the frame, where a falling edge would start a new
// reception.)
//
// A second part checks the vote at its limit: a burst that covers exactly
// three voted samples of a 0 bit turns it into a 1 (3 of 6 high decides
// high), and one that covers three samples of a 1 bit leaves it a 1.
`timescale 1ns/1ps
module tb_interference_sweep;

  localparam int BIT = 434;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #10 clk = ~clk;

  logic       rx = 1'b1;
  logic [7:0] outdata;
  logic       rx_done;

  uart_anti_interference_rx dut (.clk, .rst, .rx, .outdata, .rx_done);

  int checks = 0, failures = 0;
  int frames = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int n_done = 0;
  logic [7:0] last;
  always @(posedge clk) if (rx_done) begin
    n_done++;
    last = outdata;
  end

  // One frame with the line inverted for `len` cycles from `at` inside bit
  // `gb` (0 start, 1..8 data, 9 stop), then some idle time.
  task automatic frame(logic [7:0] b, int gb, int at, int len);
    logic [9:0] bits;
    bits = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++)
      for (int c = 0; c < BIT; c++) begin
        @(posedge clk);
        rx <= (i == gb && c >= at && c < at + len) ? ~bits[i] : bits[i];
      end
    repeat (60) begin
      @(posedge clk);
      rx <= 1'b1;
    end
    frames++;
  endtask

  task automatic expect_frame(logic [7:0] b, logic [7:0] exp, int gb, int at, int len);
    int n0;
    n0 = n_done;
    frame(b, gb, at, len);
    check(n_done == n0 + 1 && last == exp,
          $sformatf("byte %02x, burst of %0d at %0d in bit %0d: %0d bytes, last %02x",
                    b, len, at, gb, n_done - n0, last));
  endtask

  localparam logic [7:0] BYTE = 8'b1010_0110;  // bit 1 (frame bit 2) = 1, bit 0 (frame bit 1) = 0

  initial begin
    int lens[4] = '{1, 9, 18, 27};
    int gbits[4] = '{0, 1, 2, 9};
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    repeat (100) @(posedge clk);

    foreach (lens[l])
      foreach (gbits[g])
        for (int at = 0; at + lens[l] <= BIT - (gbits[g] == 9 ? 54 : 0); at += 11)
          expect_frame(BYTE, BYTE, gbits[g], at, lens[l]);

    // Vote limit. The voted samples of frame bit b see the line as driven
    // 176, 203, 230, 257, 284 and 311 cycles into the bit, less 2 * b (the
    // receiver's bit is 432 cycles, the line's 434); a burst over 170..240
    // covers three of them, over 170..270 four.
    expect_frame(BYTE, BYTE | 8'b0000_0001, 1, 170, 70);   // 0 bit, 3 high: reads 1
    expect_frame(BYTE, BYTE, 2, 170, 70);                  // 1 bit, 3 low: stays 1
    expect_frame(BYTE, BYTE, 1, 170, 40);                  // 0 bit, 2 high: stays 0
    expect_frame(BYTE, BYTE & 8'b1111_1101, 2, 170, 100);  // 1 bit, 4 low: reads 0

    $display("frames sent: %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
