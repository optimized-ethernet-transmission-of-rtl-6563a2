// pkt_buf_mem: the packet buffers memory.
//
// A simple dual-port RAM with independent clocks. The write port sits in the
// system clock domain and is used by the data writer to store acquired words
// at {packet buffer, word}; the read port sits in the transmitter clock
// domain and is used by the packet sender. The default size, 32 buffers of
// 1024 bytes (32 KiB), is the configuration the core is described with; the
// 32-bit word width is this design's choice.
//
// Timing: a write takes effect at the rising edge of wclk when we is high.
// Read data appears one rclk cycle after the address (registered read), which
// maps onto FPGA block RAM.
module pkt_buf_mem #(
  parameter int unsigned DW = 32,    // word width in bits
  parameter int unsigned AW = 13     // address width: log2(32 buffers * 256 words)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
