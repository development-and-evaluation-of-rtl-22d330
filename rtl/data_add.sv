// data_add: the main (data-processing) module. It widens each received byte
// into a BN-byte word for the transmitter.
//
// With the default BN = 3 the word is {data, data + 1, data - 1} (most
// significant byte first), so a received 0x55 becomes 0x555654 and the
// transmitter, which sends the low byte first, returns 0x54, 0x56, 0x55.
// For other BN the bytes below the first continue the pattern
// data + 1, data - 1, data + 2, data - 2, ... (modulo 256).
//
// Interface: `data` and `rx_done` come from the receiver; `din` and `en` go to
// the transmitter. The module is combinational: `din` follows `data` and `en`
// is the receiver's one-cycle `rx_done`, so the transmitter sees the new word
// in the same cycle as the enable. `clk` and `rst` are part of the module's
// published interface and are not needed by this combinational datapath.
//
// The BN = 3 mapping and the same-cycle timing of din and en follow the
// published simulation; the pattern for BN other than 3 is this
// implementation's own extension.
module data_add
  import uart_pkg::*;
#(
  parameter int unsigned BN = DEFAULT_BN
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      data,
  input  logic            rx_done,
  output logic [BN*8-1:0] din,
  output logic            en
);

  logic unused_clk_rst;
  assign unused_clk_rst = clk ^ rst;

  always_comb begin
    for (int k = 0; k < BN; k++) begin
      // k counts bytes from the most significant one.
      logic [7:0] b;
      if (k == 0)          b = data;
      else if (k % 2 == 1) b = data + 8'((k + 1) / 2);
      else                 b = data - 8'(k / 2);
      din[(BN-1-k)*8 +: 8] = b;
    end
  end

  assign en = rx_done;

  initial begin
    assert (BN >= 1) else $error("data_add: BN must be at least 1");
  end

endmodule
