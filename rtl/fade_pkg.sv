// fade_pkg: types and constants shared by the blocks of the FPGA data
// transmission core.
//
// The protocol runs on raw Ethernet II frames with the private ethertype
// 0xfade. Four frame kinds exist: START (opcode 0x0001), STOP (0x0005) and
// ACK (0x0003) travel from the receiving computer to the front-end board,
// DATA (opcode 0xa5a5) travels from the board to the computer and carries a
// set number, a packet number, the current inter-packet delay and 1024 bytes
// of payload. These values follow the protocol description.
//
// Field widths that the protocol does not fix are this design's choice:
// the "set number & packet number" field is 32 bits (16-bit set number
// followed by 16-bit packet number), the delay field is 32 bits, and
// multi-byte fields go on the wire most significant byte first. The
// Ethernet FCS is the IEEE 802.3 CRC-32, computed here bit-serially in the
// reflected form (polynomial 0xEDB88320, preset to all ones, complemented
// and sent least significant byte first).
package fade_pkg;

  localparam logic [15:0] ETHERTYPE_FADE = 16'hfade;
  localparam logic [15:0] OP_START = 16'h0001;
  localparam logic [15:0] OP_STOP  = 16'h0005;
  localparam logic [15:0] OP_ACK   = 16'h0003;
  localparam logic [15:0] OP_DATA  = 16'ha5a5;

  localparam int unsigned SET_W   = 16;  // set number width on the wire
  localparam int unsigned PNUM_W  = 16;  // packet number width on the wire
  localparam int unsigned DELAY_W = 32;  // inter-packet delay field width

  // CRC-32 residue left in the (uncomplemented) register after a frame and
  // its own correct FCS have been shifted through.
  localparam logic [31:0] CRC_RESIDUE = 32'hdebb20e3;

  // Kind of entry in the acknowledge and commands FIFO.
  typedef enum logic [1:0] {
    CMD_NONE  = 2'd0,
    CMD_START = 2'd1,
    CMD_STOP  = 2'd2,
    CMD_ACK   = 2'd3
  } cmd_kind_t;

  // One entry of the acknowledge and commands FIFO.
  typedef struct packed {
    cmd_kind_t         kind;
    logic [47:0]       src_mac;  // sender of the command (the receiving computer)
    logic [SET_W-1:0]  set_num;  // meaningful for ACK only
    logic [PNUM_W-1:0] pkt_num;  // meaningful for ACK only
  } cmd_t;

  // A transmit request from the descriptor manager to the packet sender.
  typedef struct packed {
    logic [47:0]        dst_mac;
    logic [SET_W-1:0]   set_num;
    logic [PNUM_W-1:0]  pkt_num;
    logic [DELAY_W-1:0] delay;
  } tx_req_t;

  // One packet descriptor: set number and the valid / sent / confirmed flags.
  typedef struct packed {
    logic [SET_W-1:0] set_num;
    logic             v;
    logic             s;
    logic             c;
  } desc_t;

  // Advance a reflected CRC-32 register by one byte.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc,
                                             input logic [7:0]  b);
    logic [31:0] r;
    r = crc;
    for (int i = 0; i < 8; i++) begin
      if (r[0] ^ b[i]) r = (r >> 1) ^ 32'hedb88320;
      else             r = r >> 1;
    end
    return r;
  endfunction

endpackage
