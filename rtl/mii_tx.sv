// mii_tx: byte-to-nibble converter for a 10/100 Mb/s PHY with an MII
// transmit interface, used by fade_core when it is built for MII.
//
// The packet sender produces one byte per byte strobe (ce). This module
// makes ce high on every second tx clock and sends each byte as two nibbles,
// the low nibble first, as MII requires; tx_en follows the byte's enable on
// both nibbles. With a 25 MHz MII clock this is 100 Mb/s.
//
// The original core also ran on a board with a 10/100 PHY; the nibble
// interface itself is not described there and is this design's choice.
//
// Timing: the sender loads a byte at the clock edge where ce is high; its
// low nibble appears on txd one clock later and its high nibble one clock
// after that, so the MII output lags the byte interface by one clock.
module mii_tx (
  input  logic       clk,
  input  logic       rst_n,
  output logic       ce,        // byte strobe to the packet sender
  input  logic [7:0] txd_b,     // byte from the packet sender
  input  logic       tx_en_b,
  output logic [3:0] txd,       // MII transmit nibble
  output logic       tx_en
);

  logic ph;   // 0: the low nibble goes out next, 1: the high nibble

  assign ce = ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph    <= 1'b0;
      txd   <= '0;
      tx_en <= 1'b0;
    end else begin
      ph    <= ~ph;
      txd   <= ph ? txd_b[7:4] : txd_b[3:0];
      tx_en <= tx_en_b;
    end
  end

endmodule
