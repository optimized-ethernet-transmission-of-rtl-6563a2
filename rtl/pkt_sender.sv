// pkt_sender: the packet sender, in the transmitter clock domain.
//
// On a start pulse it takes a transmit request (destination MAC, set number,
// packet number, inter-packet delay), waits the requested number of byte
// times, and then drives one complete Ethernet II DATA frame onto a GMII
// style byte interface:
//   7 x 0x55 preamble, 0xd5 start-of-frame delimiter,
//   destination MAC, source MAC (my_mac), ethertype 0xfade, opcode 0xa5a5,
//   set number (16 bit) & packet number (16 bit), delay (32 bit),
//   WPP*DW/8 payload bytes read from the packet buffers memory,
//   4-byte FCS (CRC-32),
// followed by a 12-byte idle gap, after which done pulses for one cycle.
//
// The frame content (ethertype, opcode, set and packet number, delay, 1024
// payload bytes) follows the protocol description; the description lists
// the addresses as "SRC TGT", but the frame is built in the Ethernet II
// order (destination first) so that switches and network cards accept it.
// The PHY interface (GMII bytes with a byte strobe, no tx_er), the field
// widths, most-significant-byte-first order of fields and payload words, and
// waiting the delay before rather than after each frame are this design's
// choices.
//
// Byte timing: every state change except taking a request happens on a
// cycle with ce high. With ce tied high (GMII) one byte leaves per clock; a
// nibble interface (MII, see mii_tx) holds ce high every second clock. The
// delay is counted in byte times.
//
// Timing: the payload is fetched from a RAM with one cycle of read latency
// (mem_raddr names the word needed on the next clock). txd/tx_en are
// registered. A frame occupies FRAME_BYTES = 8 + 24 + WPP*DW/8 + 4 byte
// times on the wire (1060 at the defaults) and the sender is busy for
// delay + FRAME_BYTES + 12 byte times plus one or two clocks of start-up.
module pkt_sender
  import fade_pkg::*;
#(
  parameter int unsigned NPKT = 32,
  parameter int unsigned WPP  = 256,
  parameter int unsigned DW   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [47:0]  my_mac,
  input  logic         ce,        // byte strobe: 1 for GMII, every 2nd cycle for MII
  input  logic         start,
  input  tx_req_t      req,
  output logic         done,
  output logic         busy,
  // packet buffers memory, read port
  output logic [$clog2(NPKT)+$clog2(WPP)-1:0] mem_raddr,
  input  logic [DW-1:0] mem_rdata,
  // GMII transmit
  output logic [7:0]   txd,
  output logic         tx_en,
  output logic         tx_er
);

  localparam int unsigned PW          = $clog2(NPKT);
  localparam int unsigned WW          = $clog2(WPP);
  localparam int unsigned BPW         = DW / 8;              // bytes per word
  localparam int unsigned HDR_START   = 8;                   // after preamble + SFD
  localparam int unsigned HDR_BYTES   = 24;
  localparam int unsigned PAY_START   = HDR_START + HDR_BYTES;
  localparam int unsigned PAY_BYTES   = WPP * BPW;
  localparam int unsigned FCS_START   = PAY_START + PAY_BYTES;
  localparam int unsigned FRAME_BYTES = FCS_START + 4;
  localparam int unsigned IFG_BYTES   = 12;
  localparam int unsigned CNTW        = $clog2(FRAME_BYTES + 1);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_FRAME, S_IFG} state_t;

  state_t              state;
  tx_req_t             r;
  logic [DELAY_W-1:0]  dcnt;
  logic [CNTW-1:0]     cnt;
  logic [31:0]         crc;
  logic [HDR_BYTES*8-1:0] hdr;
  logic [7:0]          byte_now;
  logic [CNTW-1:0]     pay_next, cnt_ahead;
  logic [$clog2(BPW > 1 ? BPW : 2)-1:0] bsel;
  logic [31:0]         fcs;

  assign hdr = {r.dst_mac, my_mac, ETHERTYPE_FADE, OP_DATA, r.set_num, r.pkt_num, r.delay};
  assign fcs = ~crc;

  // Payload word needed on the next clock: for the next byte when this
  // cycle is a byte strobe, else for the current byte (which is held).
  assign cnt_ahead = ce ? CNTW'(cnt + 1'b1) : cnt;
  assign pay_next  = CNTW'(cnt_ahead - CNTW'(PAY_START));
  assign mem_raddr = {r.pkt_num[PW-1:0],
                      (cnt_ahead >= CNTW'(PAY_START)) ? WW'(pay_next / CNTW'(BPW)) : WW'(0)};
  assign bsel      = ($bits(bsel))'((cnt - CNTW'(PAY_START)) % CNTW'(BPW));

  always_comb begin
    if (cnt < CNTW'(7))                  byte_now = 8'h55;
    else if (cnt < CNTW'(HDR_START))     byte_now = 8'hd5;
    else if (cnt < CNTW'(PAY_START))     byte_now = hdr[(HDR_BYTES - 1 - (int'(cnt) - HDR_START)) * 8 +: 8];
    else if (cnt < CNTW'(FCS_START))     byte_now = mem_rdata[(BPW - 1 - int'(bsel)) * 8 +: 8];
    else                                 byte_now = fcs[(int'(cnt) - FCS_START) * 8 +: 8];
  end

  assign busy  = (state != S_IDLE);
  assign tx_er = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r     <= '0;
      dcnt  <= '0;
      cnt   <= '0;
      crc   <= '1;
      txd   <= '0;
      tx_en <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      // start is a one-cycle pulse and is taken whether or not ce is high;
      // everything else moves only on byte strobes.
      if (state == S_IDLE) begin
        if (ce) begin
          tx_en <= 1'b0;
          txd   <= '0;
        end
        if (start) begin
          r     <= req;
          dcnt  <= req.delay;
          state <= S_DELAY;
        end
      end else if (ce) begin
      case (state)
        S_DELAY: begin
          if (dcnt == '0) begin
            cnt   <= '0;
            crc   <= '1;
            state <= S_FRAME;
          end else begin
            dcnt <= dcnt - 1'b1;
          end
        end
        S_FRAME: begin
          txd   <= byte_now;
          tx_en <= 1'b1;
          if (cnt >= CNTW'(HDR_START) && cnt < CNTW'(FCS_START))
            crc <= crc32_byte(crc, byte_now);
          if (cnt == CNTW'(FRAME_BYTES - 1)) begin
            cnt   <= '0;
            state <= S_IFG;
          end else begin
            cnt <= CNTW'(cnt + 1'b1);
          end
        end
        S_IFG: begin
          txd   <= '0;
          tx_en <= 1'b0;
          if (cnt == CNTW'(IFG_BYTES - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= CNTW'(cnt + 1'b1);
          end
        end
        default: state <= S_IDLE;
      endcase
      end
    end
  end

endmodule
