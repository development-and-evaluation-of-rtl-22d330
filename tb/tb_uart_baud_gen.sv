// tb_uart_baud_gen: self-checking test of the baud-rate generator at the
// receiver's default divider (27 cycles, count 0..26 = 0x1a) and at the
// transmitter's (434 cycles).
//
// A reference counter kept in the testbench predicts cnt, mid_tick and
// end_tick every cycle; the enable is switched on and off at random so the
// hold-at-zero behaviour is exercised as well. It also checks that the
// periods between end ticks are exactly the divider length.
`timescale 1ns/1ps
module tb_uart_baud_gen;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic en  = 1'b0;
  always #10 clk = ~clk;

  logic [15:0] cnt_a, cnt_b;
  logic mid_a, end_a, mid_b, end_b;

  uart_baud_gen #(.DIV(27))  dut_a (.clk, .rst, .en, .cnt(cnt_a), .mid_tick(mid_a), .end_tick(end_a));
  uart_baud_gen #(.DIV(434)) dut_b (.clk, .rst, .en, .cnt(cnt_b), .mid_tick(mid_b), .end_tick(end_b));

  int checks = 0, failures = 0;
  int ref_a = 0, ref_b = 0;
  int period_a = 0, last_end_a = -1, cycle = 0, full_periods = 0;
  bit run_in_periods = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Compare against the reference model before each clock edge.
  always @(negedge clk) if (rst) begin
    check(cnt_a == 16'(ref_a), $sformatf("cnt_a %0d expected %0d", cnt_a, ref_a));
    check(cnt_b == 16'(ref_b), $sformatf("cnt_b %0d expected %0d", cnt_b, ref_b));
    check(mid_a == (en && ref_a == 13),  "mid_a");
    check(end_a == (en && ref_a == 26),  "end_a");
    check(mid_b == (en && ref_b == 217), "mid_b");
    check(end_b == (en && ref_b == 433), "end_b");
    if (end_a) begin
      if (last_end_a >= 0 && run_in_periods) begin
        check(cycle - last_end_a == 27, $sformatf("period %0d", cycle - last_end_a));
        full_periods++;
      end
      last_end_a = cycle;
    end
  end

  always @(posedge clk) if (rst) begin
    cycle++;
    if (!en) begin ref_a = 0; ref_b = 0; last_end_a = -1; end
    else begin
      ref_a = (ref_a == 26)  ? 0 : ref_a + 1;
      ref_b = (ref_b == 433) ? 0 : ref_b + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    // Long uninterrupted run: exact periods.
    @(posedge clk); en <= 1'b1; run_in_periods = 1'b1;
    repeat (2000) @(posedge clk);
    run_in_periods = 1'b0;
    // Random on/off pattern.
    repeat (60) begin
      @(posedge clk); en <= ~en;
      repeat ($urandom_range(1, 500)) @(posedge clk);
    end
    en <= 1'b0;
    repeat (5) @(posedge clk);
    check(full_periods >= 70, $sformatf("only %0d full periods seen", full_periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
