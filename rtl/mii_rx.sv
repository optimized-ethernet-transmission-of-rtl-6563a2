// mii_rx: nibble-to-byte assembler for a 10/100 Mb/s PHY with an MII
// receive interface, used by fade_core when it is built for MII.
//
// MII delivers a frame as nibbles, the low nibble of each byte first,
// starting with a preamble of 0x5 nibbles and the start-of-frame delimiter
// 0xd5 (nibbles 0x5, 0xd). The assembler skips the preamble, aligns on the
// 0xd nibble and then pairs the following nibbles into bytes. It hands the
// packet receiver a byte interface with a strobe:
//   - while no frame is being received, ce is high every clock with
//     rx_dv_b low;
//   - at the delimiter it gives one byte 0xd5 with rx_dv_b high;
//   - then one byte every second clock, with rx_er_b if rx_er was seen on
//     either nibble;
//   - when rx_dv falls it gives one strobe with rx_dv_b low, which ends the
//     frame.
// A frame whose preamble holds anything but 0x5 before the 0xd is ignored.
// A trailing odd nibble is dropped.
//
// The original core also ran on a board with a 10/100 PHY; the nibble
// interface itself is not described there and is this design's choice.
//
// Timing: every output is registered; a byte is presented one clock after
// its high nibble.
module mii_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] rxd,       // MII receive nibble
  input  logic       rx_dv,
  input  logic       rx_er,
  output logic       ce,        // byte strobe to the packet receiver
  output logic [7:0] rxd_b,
  output logic       rx_dv_b,
  output logic       rx_er_b
);

  typedef enum logic [2:0] {M_IDLE, M_PRE, M_LO, M_HI, M_SKIP} state_t;

  state_t     state;
  logic [3:0] lo;
  logic       er_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      lo      <= '0;
      er_lo   <= 1'b0;
      ce      <= 1'b0;
      rxd_b   <= '0;
      rx_dv_b <= 1'b0;
      rx_er_b <= 1'b0;
    end else begin
      ce      <= 1'b0;
      rx_er_b <= 1'b0;
      case (state)
        M_IDLE: begin
          ce      <= 1'b1;
          rx_dv_b <= 1'b0;
          rxd_b   <= '0;
          if (rx_dv) state <= (rxd == 4'h5) ? M_PRE : M_SKIP;
        end
        M_PRE: begin
          if (!rx_dv) begin
            state <= M_IDLE;
          end else if (rxd == 4'hd) begin
            ce      <= 1'b1;
            rxd_b   <= 8'hd5;
            rx_dv_b <= 1'b1;
            rx_er_b <= rx_er;
            state   <= M_LO;
          end else if (rxd != 4'h5) begin
            state <= M_SKIP;    // not a preamble
          end
        end
        M_SKIP: begin                 // wait for the line to go idle
          if (!rx_dv) state <= M_IDLE;
        end
        M_LO: begin
          if (!rx_dv) begin
            ce      <= 1'b1;
            rx_dv_b <= 1'b0;
            state   <= M_IDLE;
          end else begin
            lo    <= rxd;
            er_lo <= rx_er;
            state <= M_HI;
          end
        end
        M_HI: begin
          if (!rx_dv) begin
            ce      <= 1'b1;
            rx_dv_b <= 1'b0;
            state   <= M_IDLE;
          end else begin
            ce      <= 1'b1;
            rxd_b   <= {rxd, lo};
            rx_dv_b <= 1'b1;
            rx_er_b <= rx_er || er_lo;
            state   <= M_LO;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
