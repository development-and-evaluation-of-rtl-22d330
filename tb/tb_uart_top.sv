// tb_uart_top: end-to-end test of the whole slave at its default parameters
// (50 MHz clock, 115200 baud, BN = 3); also the full-size test.
//
// The testbench is the host ("upper computer"): it sends bytes on `rx`, most
// of them with a short burst of interference inside every bit, waits for
// the reply on `bitout` and decodes it. For a byte d the reply must be the
// three frames d - 1, d + 1, d (the word {d, d + 1, d - 1} sent low byte
// first), its first start bit 4314 clock edges after the edge at which the
// host's start bit began (receiver latency 4310, then 4 cycles through the
// main module and the send terminal), later start bits 4344 cycles apart,
// and tx_busy high for 3 * 4344 cycles.
//
// Every mechanism of the design is made to happen and counted: glitches
// out-voted by the middle-six sampling, false start bits rejected, a frame
// with a low stop bit dropped, multi-byte words sent byte by byte, and a
// request that arrives while the transmitter is busy being ignored. A
// mechanism that never happens counts as a failure.
`timescale 1ns/1ps
module tb_uart_top;

  localparam int BIT = 434;
  localparam int BN  = 3;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #10 clk = ~clk;

  logic rx = 1'b1;
  logic bitout, tx_busy;

  uart_top dut (.clk, .rst, .rx, .bitout, .tx_busy);

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

  // Mechanism counters.
  int n_glitch_frames_ok = 0;   // frames with in-bit interference decoded right
  int n_false_start      = 0;   // receptions ended by the start-bit check
  int n_stop_drop        = 0;   // frames dropped for a low stop bit
  int n_multi_byte       = 0;   // words sent as BN frames
  int n_busy_ignored     = 0;   // requests ignored while busy

  // Reply decoder on bitout.
  logic [7:0] got[$];
  longint     got_t[$];
  initial begin
    logic [7:0] b;
    longint t0;
    forever begin
      @(negedge bitout);
      #1 t0 = cycle;
      repeat (BIT / 2) @(posedge clk);
      #1 check(bitout == 1'b0, "reply start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        #1 b[i] = bitout;
      end
      repeat (BIT) @(posedge clk);
      #1 check(bitout == 1'b1, "reply stop bit");
      got.push_back(b);
      got_t.push_back(t0);
    end
  end

  // Length of the last tx_busy pulse.
  longint busy_rise = 0, last_busy_len = 0;
  logic   prev_busy = 1'b0;
  always @(negedge clk) if (rst) begin
    if (tx_busy && !prev_busy) busy_rise = cycle;
    if (!tx_busy && prev_busy) last_busy_len = cycle - busy_rise;
    prev_busy = tx_busy;
  end

  // Receptions that end without rx_done.
  logic prev_state = 1'b0;
  int   silent_ends = 0;
  always @(negedge clk) if (rst) begin
    if (prev_state && !dut.rx_u.rx_state && !dut.rx_u.rx_done) silent_ends++;
    prev_state = dut.rx_u.rx_state;
  end

  // Host transmitter, with optional interference of up to `glen` cycles at a
  // random place inside every bit.
  task automatic send_frame(input logic [7:0] b, input bit stop_val, input int glen,
                            output longint t_fall);
    logic [9:0] bits;
    int ga, gl;
    bits = {stop_val, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      ga = $urandom_range(40, 380);
      gl = (glen > 0) ? $urandom_range(1, glen) : 0;
      for (int c = 0; c < BIT; c++) begin
        @(posedge clk);
        rx <= (c >= ga && c < ga + gl) ? ~bits[i] : bits[i];
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

  task automatic wait_not_busy();
    while (tx_busy) @(posedge clk);
  endtask

  // One complete operation: a byte in, its BN-byte word back.
  task automatic round_trip(logic [7:0] d, int glen);
    longint tf;
    int n0;
    logic [7:0] exp[BN];
    exp[0] = d - 8'd1;
    exp[1] = d + 8'd1;
    exp[2] = d;
    n0 = got.size();
    send_frame(d, 1'b1, glen, tf);
    // The reply begins near the end of the stop bit.
    while (!tx_busy) @(posedge clk);
    wait_not_busy();
    idle(2 * BIT);
    check(last_busy_len == BN * (10 * BIT + 4), $sformatf("tx_busy for %0d cycles", last_busy_len));
    check(got.size() == n0 + BN, $sformatf("byte %02x: %0d reply frames", d, got.size() - n0));
    if (got.size() == n0 + BN) begin
      bit ok = 1'b1;
      for (int k = 0; k < BN; k++) begin
        check(got[n0 + k] == exp[k], $sformatf("byte %02x: reply %0d is %02x, expected %02x",
                                               d, k, got[n0 + k], exp[k]));
        if (got[n0 + k] != exp[k]) ok = 1'b0;
        if (k > 0)
          check(got_t[n0 + k] - got_t[n0 + k - 1] == 10 * BIT + 4, "reply frame spacing");
      end
      check(got_t[n0] - tf == 4314, $sformatf("reply latency %0d", got_t[n0] - tf));
      if (ok) n_multi_byte++;
      if (ok && glen > 0) n_glitch_frames_ok++;
    end
  endtask

  initial begin
    int n0, s0;
    longint tf;
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    idle(200);
    check(bitout == 1'b1 && tx_busy == 1'b0, "idle after reset");

    // The published example, clean.
    round_trip(8'h55, 0);

    // Bytes under interference, with false start bits in between.
    for (int i = 0; i < 12; i++) begin
      round_trip(8'($urandom), 27);
      if (i % 4 == 1) begin
        s0 = silent_ends;
        n0 = got.size();
        @(posedge clk); rx <= 1'b0;
        repeat ($urandom_range(20, 200)) @(posedge clk);
        rx <= 1'b1;
        idle(800);
        check(silent_ends == s0 + 1 && got.size() == n0 && !tx_busy, "false start rejected");
        if (silent_ends == s0 + 1) n_false_start++;
      end
    end

    // A frame with a low stop bit is dropped: no reply.
    n0 = got.size();
    s0 = silent_ends;
    send_frame(8'h66, 1'b0, 0, tf);
    idle(2 * BIT);
    check(got.size() == n0 && !tx_busy, "bad stop bit: no reply");
    if (silent_ends == s0 + 1 && got.size() == n0) n_stop_drop++;
    round_trip(8'h67, 0);

    // A byte sent while the reply is still going out: received, not answered.
    n0 = got.size();
    send_frame(8'ha0, 1'b1, 0, tf);
    idle(3 * BIT);
    check(tx_busy, "busy while the first reply goes out");
    send_frame(8'h0b, 1'b1, 0, tf);
    idle(10);
    check(dut.rx_u.outdata == 8'h0b, "second byte received");
    wait_not_busy();
    idle(3 * BIT);
    check(got.size() == n0 + BN, $sformatf("only the first word answered: %0d frames", got.size() - n0));
    if (got.size() == n0 + BN) begin
      check(got[n0] == 8'h9f && got[n0 + 1] == 8'ha1 && got[n0 + 2] == 8'ha0, "first word intact");
      if (got[n0] == 8'h9f && got[n0 + 1] == 8'ha1 && got[n0 + 2] == 8'ha0) n_busy_ignored++;
    end
    round_trip(8'hfe, 27);

    $display("mechanisms: glitched frames ok %0d, false starts rejected %0d, stop-bit drops %0d, multi-byte words %0d, busy requests ignored %0d",
             n_glitch_frames_ok, n_false_start, n_stop_drop, n_multi_byte, n_busy_ignored);
    check(n_glitch_frames_ok > 0, "mechanism: glitch out-voted");
    check(n_false_start > 0,      "mechanism: false start rejected");
    check(n_stop_drop > 0,        "mechanism: stop-bit drop");
    check(n_multi_byte > 0,       "mechanism: multi-byte word");
    check(n_busy_ignored > 0,     "mechanism: request ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
