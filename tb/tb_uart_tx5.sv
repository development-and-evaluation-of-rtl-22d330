// tb_uart_tx5: self-checking test of the send terminal at the defaults
// (BN = 3, 434 cycles per bit).
//
// Words are offered with a one-cycle `en` pulse. A line monitor in the
// testbench decodes `bitout` (start bit checked at its middle, eight data
// bits sampled at their centres, stop bit checked) and records each byte and
// the cycle of its start edge. For each word the testbench expects its BN
// bytes low byte first, start edges exactly 10 * 434 + 4 cycles apart, the
// first start bit 3 clock edges after the edge that sees en high, and
// tx_busy high for BN * 4344 cycles.
// An `en` pulse with other data in the middle of a word must be ignored.
`timescale 1ns/1ps
module tb_uart_tx5;

  localparam int BIT = 434;
  localparam int BN  = 3;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #10 clk = ~clk;

  logic [BN*8-1:0] din = '0;
  logic            en = 1'b0;
  logic            bitout, tx_busy;

  uart_tx5 dut (.clk, .rst, .din, .en, .bitout, .tx_busy);

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

  // Line monitor.
  logic [7:0] rx_bytes[$];
  longint     rx_start[$];
  initial begin
    logic [7:0] b;
    longint t0;
    forever begin
      @(negedge bitout);
      #1 t0 = cycle;
      repeat (BIT / 2) @(posedge clk);
      #1 check(bitout == 1'b0, "start bit low at its middle");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        #1 b[i] = bitout;
      end
      repeat (BIT) @(posedge clk);
      #1 check(bitout == 1'b1, "stop bit high");
      rx_bytes.push_back(b);
      rx_start.push_back(t0);
    end
  end

  task automatic send_word(logic [BN*8-1:0] w, bit poke);
    longint t_en, busy_cycles;
    int n0;
    n0 = rx_bytes.size();
    @(posedge clk);
    din <= w;
    en  <= 1'b1;
    @(posedge clk);
    en  <= 1'b0;
    #1 t_en = cycle;   // the edge that saw en high
    busy_cycles = 0;
    while (1) begin
      @(negedge clk);
      if (!tx_busy) break;
      busy_cycles++;
      if (poke && busy_cycles == 5000) begin
        din <= ~w;
        en  <= 1'b1;
      end
      if (poke && busy_cycles == 5001) en <= 1'b0;
    end
    check(busy_cycles == BN * (10 * BIT + 4), $sformatf("busy for %0d cycles", busy_cycles));
    repeat (2 * BIT) @(posedge clk);
    check(rx_bytes.size() == n0 + BN, $sformatf("%0d bytes for one word", rx_bytes.size() - n0));
    if (rx_bytes.size() == n0 + BN) begin
      for (int k = 0; k < BN; k++) begin
        check(rx_bytes[n0 + k] == w[k*8 +: 8],
              $sformatf("byte %0d is %02x, expected %02x", k, rx_bytes[n0 + k], w[k*8 +: 8]));
        if (k == 0)
          check(rx_start[n0] - t_en == 3, $sformatf("first start %0d cycles after en", rx_start[n0] - t_en));
        else
          check(rx_start[n0 + k] - rx_start[n0 + k - 1] == 10 * BIT + 4,
                $sformatf("start-to-start %0d", rx_start[n0 + k] - rx_start[n0 + k - 1]));
      end
    end
    check(dut.n == 0 && dut.d_temp == 0, "registers cleared at the end");
  endtask

  initial begin
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b1;
    repeat (3) @(posedge clk);
    check(bitout == 1'b1 && tx_busy == 1'b0, "idle after reset");
    send_word(24'h555654, 1'b0);
    send_word(24'h0001ff, 1'b1);
    for (int i = 0; i < 4; i++) send_word(24'($urandom), 1'(i % 2));
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
