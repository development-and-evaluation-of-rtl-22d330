// tb_data_add: exhaustive self-checking test of the main module at BN = 3,
// plus one value at BN = 5.
//
// For every byte value the expected word {d, d + 1, d - 1} is built in the
// testbench from the byte alone (modulo 256) and compared with din; en must
// equal rx_done in the same cycle. The published example 0x55 -> 0x555654
// and the value after reset, 0x00 -> 0x0001ff, are checked explicitly.
`timescale 1ns/1ps
module tb_data_add;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [7:0]  data;
  logic        rx_done;
  logic [23:0] din;
  logic        en;
  logic [39:0] din5;
  logic        en5;

  data_add dut (.clk, .rst, .data, .rx_done, .din, .en);
  data_add #(.BN(5)) dut5 (.clk, .rst, .data, .rx_done, .din(din5), .en(en5));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 2; r++) begin
        data = 8'(v);
        rx_done = r[0];
        @(posedge clk); #1;
        check(din[23:16] == 8'(v),         $sformatf("byte2 of %02x", v));
        check(din[15:8]  == 8'((v + 1) % 256), $sformatf("byte1 of %02x", v));
        check(din[7:0]   == 8'((v + 255) % 256), $sformatf("byte0 of %02x", v));
        check(en == rx_done, "en follows rx_done");
        check(din5 == {8'(v), 8'(v + 1), 8'(v - 1), 8'(v + 2), 8'(v - 2)},
              $sformatf("BN=5 word of %02x", v));
        check(en5 == rx_done, "en follows rx_done (BN=5)");
      end
    end
    data = 8'h55; #1;
    check(din == 24'h555654, $sformatf("0x55 gives %06x", din));
    data = 8'h00; #1;
    check(din == 24'h0001ff, $sformatf("0x00 gives %06x", din));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
