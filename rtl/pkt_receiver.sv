// pkt_receiver: the packet receiver, in the receiver clock domain.
//
// Watches a GMII style receive interface (one byte per rx clock while
// rx_dv is high). After the preamble and the 0xd5 start-of-frame delimiter
// it keeps the first 20 bytes of the frame (destination MAC, source MAC,
// ethertype, opcode, set number, packet number) and runs the CRC-32 over
// every byte including the FCS. When rx_dv falls the frame is accepted if
//   - the CRC residue is correct, no rx_er was seen and the frame is at
//     least 64 bytes long,
//   - the destination MAC equals my_mac and the ethertype is 0xfade,
//   - the opcode is START (0x0001), STOP (0x0005) or ACK (0x0003);
// it is then written into the acknowledge and commands FIFO as one cmd_t
// entry (kind, source MAC, set number, packet number). Anything else,
// including DATA frames, is ignored. If the FIFO is full the command is
// dropped and dropped pulses; the acknowledge and retransmission scheme
// recovers from a lost ACK, and the receiving computer repeats START/STOP.
//
// The frame formats and the filtering on the target MAC follow the protocol
// description. Taking the destination as the first address on the wire
// (Ethernet II order), the 16+16 bit split of the set/packet field, the
// minimum-length and CRC checks and the behaviour on a full FIFO are this
// design's choices.
//
// rxd, rx_dv and rx_er are taken only on cycles with ce high: tied high for
// GMII, or the byte strobe of the nibble assembler (mii_rx) for MII.
//
// Timing: the FIFO write happens one rx clock after the last byte of the
// frame (the cycle rx_dv is first seen low).
module pkt_receiver
  import fade_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] my_mac,
  input  logic [7:0]  rxd,
  input  logic        rx_dv,
  input  logic        rx_er,
  input  logic        ce,         // byte strobe: 1 for GMII; from mii_rx for MII
  // acknowledge and commands FIFO, write side
  output logic        fifo_we,
  output cmd_t        fifo_wdata,
  input  logic        fifo_full,
  // status pulses
  output logic        cmd_ok,     // a command was written into the FIFO
  output logic        bad_frame,  // a 0xfade frame for us failed a check
  output logic        dropped     // a valid command found the FIFO full
);

  localparam int unsigned KEEP = 20;  // header bytes kept
  localparam int unsigned MIN_LEN = 64;

  typedef enum logic [1:0] {R_IDLE, R_PREAMBLE, R_FRAME, R_DISCARD} state_t;

  state_t                state;
  logic [KEEP*8-1:0]     hdr;
  logic [10:0]           len;
  logic [31:0]           crc;
  logic                  err;

  logic [47:0] f_dst, f_src;
  logic [15:0] f_type, f_op, f_set, f_pkt;
  logic        frame_end, for_us, good, is_cmd;

  assign f_dst  = hdr[KEEP*8-1   -: 48];
  assign f_src  = hdr[KEEP*8-49  -: 48];
  assign f_type = hdr[KEEP*8-97  -: 16];
  assign f_op   = hdr[KEEP*8-113 -: 16];
  assign f_set  = hdr[KEEP*8-129 -: 16];
  assign f_pkt  = hdr[KEEP*8-145 -: 16];

  assign frame_end = ce && (state == R_FRAME) && !rx_dv;
  assign for_us    = (len >= 11'(KEEP)) && (f_dst == my_mac) && (f_type == ETHERTYPE_FADE);
  assign good      = !err && (crc == CRC_RESIDUE) && (len >= 11'(MIN_LEN));
  assign is_cmd    = (f_op == OP_START) || (f_op == OP_STOP) || (f_op == OP_ACK);

  always_comb begin
    fifo_wdata.src_mac = f_src;
    fifo_wdata.set_num = f_set;
    fifo_wdata.pkt_num = f_pkt;
    case (f_op)
      OP_START: fifo_wdata.kind = CMD_START;
      OP_STOP:  fifo_wdata.kind = CMD_STOP;
      OP_ACK:   fifo_wdata.kind = CMD_ACK;
      default:  fifo_wdata.kind = CMD_NONE;
    endcase
  end

  assign fifo_we   = frame_end && for_us && good && is_cmd && !fifo_full;
  assign cmd_ok    = fifo_we;
  assign dropped   = frame_end && for_us && good && is_cmd && fifo_full;
  assign bad_frame = frame_end && for_us && !good;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      hdr   <= '0;
      len   <= '0;
      crc   <= '1;
      err   <= 1'b0;
    end else if (ce) begin
      case (state)
        R_IDLE: begin
          if (rx_dv) begin
            err   <= rx_er;
            state <= (rxd == 8'hd5) ? R_FRAME : (rxd == 8'h55) ? R_PREAMBLE : R_DISCARD;
          end else begin
            err <= 1'b0;
          end
          len <= '0;
          crc <= '1;
        end
        R_PREAMBLE: begin
          if (!rx_dv)               state <= R_IDLE;
          else if (rxd == 8'hd5)    state <= R_FRAME;
          else if (rxd != 8'h55)    state <= R_DISCARD;
          if (rx_er) err <= 1'b1;
        end
        R_FRAME: begin
          if (!rx_dv) begin
            state <= R_IDLE;
          end else begin
            if (rx_er) err <= 1'b1;
            crc <= crc32_byte(crc, rxd);
            if (len < 11'(KEEP)) hdr <= {hdr[KEEP*8-9:0], rxd};
            if (len != '1) len <= len + 1'b1;
          end
        end
        R_DISCARD: begin
          if (!rx_dv) state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
