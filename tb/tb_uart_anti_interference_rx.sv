// tb_uart_anti_interference_rx: self-checking test of the anti-interference
// receiver at the defaults (50 MHz, 115200 baud: 434 cycles per transmitted
// bit, sampling period 27 cycles).
//
// The testbench plays the host: it drives frames onto `rx` at 434 cycles per
// bit and can invert the line for a chosen stretch inside any bit to imitate
// a burst of interference. It checks:
//  * clean frames: the byte, a single one-cycle rx_done, and its latency of
//    4310 clock edges from the edge at which rx falls;
//  * frames whose bits each carry a glitch of up to 27 cycles (it can spoil
//    at most two of the six voted samples): still received correctly;
//  * a glitch that spoils exactly two start-bit samples: frame still taken;
//  * a low pulse on the idle line: the start bit is rejected on the twelfth
//    flag (rx_state falls, no rx_done), with the threshold checked on both
//    sides: a 250-cycle pulse leaves three high samples (rejected), a
//    265-cycle pulse leaves two (accepted, read as 0xff);
//  * a frame whose stop bit is low: dropped, outdata kept;
//  * back-to-back frames with no idle time between them.
`timescale 1ns/1ps
module tb_uart_anti_interference_rx;

  localparam int BIT = 434;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #10 clk = ~clk;

  logic       rx = 1'b1;
  logic [7:0] outdata;
  logic       rx_done;

  uart_anti_interference_rx dut (.clk, .rst, .rx, .outdata, .rx_done);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Monitor: every rx_done pulse, its byte and its cycle.
  logic [7:0] got[$];
  longint     got_t[$];
  int         long_done = 0;
  int         rejects = 0;
  always @(negedge clk) if (rst) begin
    if (rx_done) begin
      got.push_back(outdata);
      got_t.push_back(cycle);
    end
  end
  logic prev_done = 1'b0;
  always @(posedge clk) begin
    if (rx_done && prev_done) long_done++;
    prev_done <= rx_done;
  end
  // A reception that ends without rx_done: the start bit was rejected (or
  // the stop bit was bad, which the tests below account for separately).
  logic prev_state = 1'b0;
  int   silent_ends = 0;
  always @(negedge clk) if (rst) begin
    if (prev_state && !dut.rx_state && !rx_done) silent_ends++;
    prev_state = dut.rx_state;
  end

  // Drive one frame. glitch_at[i] < 0: bit i is clean; otherwise the line is
  // inverted for glitch_len[i] cycles starting glitch_at[i] cycles into bit i.
  // Returns the cycle of the edge at which rx falls.
  task automatic send_frame(input logic [7:0] b, input bit stop_val,
                            input int glitch_at[10], input int glitch_len[10],
                            output longint t_fall);
    logic [9:0] bits;
    bits = {stop_val, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      for (int c = 0; c < BIT; c++) begin
        @(posedge clk);
        if (glitch_at[i] >= 0 && c >= glitch_at[i] && c < glitch_at[i] + glitch_len[i])
          rx <= ~bits[i];
        else
          rx <= bits[i];
        if (i == 0 && c == 0) #1 t_fall = cycle;
      end
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(posedge clk);
      rx <= 1'b1;
    end
  endtask

  int no_g[10] = '{default: -1};
  int zero_l[10] = '{default: 0};

  // Send a frame, let it finish and expect exactly one byte `exp`.
  task automatic expect_byte(logic [7:0] b, int ga[10], int gl[10], int gap, string what);
    longint tf;
    int n0;
    n0 = got.size();
    send_frame(b, 1'b1, ga, gl, tf);
    idle(gap);
    check(got.size() == n0 + 1, $sformatf("%s: %0d bytes received", what, got.size() - n0));
    if (got.size() == n0 + 1) begin
      check(got[n0] == b, $sformatf("%s: got %02x expected %02x", what, got[n0], b));
      check(got_t[n0] - tf == 4310, $sformatf("%s: latency %0d", what, got_t[n0] - tf));
    end
  endtask

  initial begin
    int ga[10], gl[10];
    int n0, s0;
    longint tf;
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    idle(100);
    check(outdata == 8'h00 && !rx_done && !dut.rx_state, "idle after reset");

    // Clean frames, including the published example 0x55.
    foreach (ga[i]) ga[i] = -1;
    expect_byte(8'h55, no_g, zero_l, 200, "clean 55");
    expect_byte(8'h00, no_g, zero_l, 200, "clean 00");
    expect_byte(8'hff, no_g, zero_l, 200, "clean ff");
    expect_byte(8'ha3, no_g, zero_l, 200, "clean a3");

    // Two start-bit samples (flags 7 and 8) spoiled: still a valid start.
    ga = no_g; gl = zero_l;
    ga[0] = 170; gl[0] = 40;
    expect_byte(8'h3c, ga, gl, 200, "start bit, 2 bad samples");

    // Every bit glitched for up to 27 cycles at a random place.
    for (int f = 0; f < 30; f++) begin
      for (int i = 0; i < 10; i++) begin
        ga[i] = $urandom_range(40, 380);
        gl[i] = $urandom_range(1, 27);
      end
      expect_byte(8'($urandom), ga, gl, $urandom_range(100, 400), "glitched frame");
    end

    // Idle-line low pulses: false start bits.
    s0 = silent_ends;
    n0 = got.size();
    @(posedge clk); rx <= 1'b0;
    idle(0);
    repeat (59) @(posedge clk);
    rx <= 1'b1;
    idle(800);
    check(got.size() == n0, "60-cycle pulse gives no byte");
    check(silent_ends == s0 + 1, "60-cycle pulse rejected as start bit");
    @(posedge clk); rx <= 1'b0;
    repeat (249) @(posedge clk);
    rx <= 1'b1;
    idle(800);
    check(got.size() == n0, "250-cycle pulse gives no byte");
    check(silent_ends == s0 + 2, "250-cycle pulse rejected (3 high samples)");
    @(posedge clk); rx <= 1'b0;
    tf = cycle;
    repeat (264) @(posedge clk);
    rx <= 1'b1;
    idle(10 * BIT);
    check(got.size() == n0 + 1, "265-cycle pulse accepted (2 high samples)");
    if (got.size() == n0 + 1) check(got[n0] == 8'hff, "265-cycle pulse reads as ff");
    rejects = silent_ends - s0;

    // Stop bit low: frame dropped, outdata kept.
    n0 = got.size();
    s0 = silent_ends;
    send_frame(8'h12, 1'b0, no_g, zero_l, tf);
    idle(BIT);
    check(got.size() == n0, "bad stop bit: no rx_done");
    check(outdata == 8'hff, "bad stop bit: outdata kept");
    check(silent_ends == s0 + 1, "bad stop bit: reception ended");
    expect_byte(8'h34, no_g, zero_l, 200, "after bad stop bit");

    // Back-to-back frames.
    n0 = got.size();
    for (int f = 0; f < 5; f++) send_frame(8'(8'h81 + 8'(f * 17)), 1'b1, no_g, zero_l, tf);
    idle(BIT);
    check(got.size() == n0 + 5, $sformatf("back-to-back: %0d bytes", got.size() - n0));
    if (got.size() == n0 + 5)
      for (int f = 0; f < 5; f++)
        check(got[n0 + f] == 8'(8'h81 + 8'(f * 17)), "back-to-back byte");

    check(long_done == 0, "rx_done is a one-cycle pulse");
    check(rejects == 2, "two false starts rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
