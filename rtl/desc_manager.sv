// desc_manager: the descriptor manager, heart of the transmission core.
//
// The packet buffers memory is used as a circular buffer of NPKT packet
// buffers, each of WPP data words. Every buffer has a descriptor holding the
// number of the set its data belong to and three flags: V (filled with new
// data), S (transmitted at least once) and C (confirmed by the receiver).
// Three pointers walk the descriptors:
//   head  the buffer being filled with incoming data,
//   tail  the oldest buffer whose data are not yet confirmed,
//   retr  the next buffer to examine for (re)transmission, circulating over
//         the filled, partly unconfirmed window [tail, head).
//
// Data Writer: while the core is running and the buffer at head is being
// filled, dta_ready is high and each dta_we stores dta at {head, word}. When
// the last word of the buffer is written its V flag is set and the writer
// tries to move head on. If the next position is tail there is no free
// buffer: dta_ready stays low until tail moves. When head moves, the new
// head descriptor is reset (V=S=C=0) and its set number is incremented.
//
// Data Sender: when no transmission is in flight it looks at the descriptor
// under retr; a buffer with V=1 and C=0 is handed to the packet sender
// together with its set number, its packet number, the destination MAC and
// the current inter-packet delay. When the packet sender reports completion
// the S flag is set; whether it was already set tells the congestion
// avoidance unit (nca, instantiated here) whether this was a first
// transmission or a retransmission. retr then moves on, wrapping from head
// back to tail, so unconfirmed packets are retransmitted cyclically (a
// sliding window of NPKT packets).
//
// Commands from the acknowledge and commands FIFO, one per cycle: START
// (only while stopped) clears the descriptors, sets head = tail = retr = 0,
// remembers the sender's MAC as the destination of DATA frames and starts
// the core; STOP stops accepting data and issuing transmissions; ACK sets
// the C flag of the named packet buffer if it is valid, unconfirmed and
// holds the named set. tail then moves forward one position per cycle over
// confirmed buffers until it reaches an unconfirmed one or head.
//
// Follows the core's description: the descriptor contents, the three
// pointers and their rules, the stall on a full buffer, the set number
// increment, the cyclic retransmission and the use of S for counting
// retransmissions. This design's own choices: all these actions happen in
// one clocked process, the descriptors are a register array so that START
// can clear them in one cycle, the descriptors of buffers 1..NPKT-1 start at
// set number all-ones so that their first use gives set 0, the core accepts
// no data before START, a START received while running only updates the
// destination MAC, and tail never passes the buffer that is in flight, so a
// buffer cannot be refilled while the packet sender is reading it.
module desc_manager
  import fade_pkg::*;
#(
  parameter int unsigned NPKT         = 32,     // packet buffers in the ring
  parameter int unsigned WPP          = 256,    // words per packet buffer
  parameter int unsigned DW           = 32,     // data word width
  parameter int unsigned NCA_INTERVAL = 10000,  // transmissions per delay update
  parameter logic [DELAY_W-1:0] INIT_DELAY = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // acquired data
  input  logic [DW-1:0]         dta,
  input  logic                  dta_we,
  output logic                  dta_ready,
  // packet buffers memory, write port
  output logic                  mem_we,
  output logic [$clog2(NPKT)+$clog2(WPP)-1:0] mem_waddr,
  output logic [DW-1:0]         mem_wdata,
  // acknowledge and commands FIFO, read side
  input  logic                  cmd_empty,
  input  cmd_t                  cmd,
  output logic                  cmd_rd,
  // transmit requests to the packet sender (through the synchronizer)
  output logic                  tx_req,
  output tx_req_t               tx_req_data,
  input  logic                  tx_done,
  // status
  output logic                  running,
  output logic [$clog2(NPKT)-1:0] head,
  output logic [$clog2(NPKT)-1:0] tail,
  output logic [$clog2(NPKT)-1:0] retr,
  output logic                  full_stall,  // a filled buffer waits for a free one
  output logic                  tx_event,    // a transmission finished
  output logic                  tx_resent,   // ... and it was a retransmission
  output logic [DELAY_W-1:0]    delay,
  output logic                  nca_up,
  output logic                  nca_down
);

  localparam int unsigned PW = $clog2(NPKT);
  localparam int unsigned WW = $clog2(WPP);

  typedef enum logic {WR_FILL, WR_ADVANCE} wr_state_t;

  desc_t          desc [NPKT];
  wr_state_t      wr_state;
  logic [WW-1:0]  wcnt;
  logic [47:0]    host_mac;
  logic           inflight;
  logic [PW-1:0]  inflight_idx;

  logic [PW-1:0]  head_nx, retr_nx1;
  logic [PW-1:0]  win_len, retr_off;
  logic           retr_in_win;
  logic           do_write, buf_done;
  logic           cmd_take, cmd_is_start, cmd_is_stop, cmd_is_ack;
  logic           ack_hit;
  logic [PW-1:0]  ack_idx;
  logic           tail_move;
  logic           send_now;
  logic           nca_clear;

  assign head_nx  = PW'(head + 1'b1);
  assign retr_nx1 = PW'(retr + 1'b1);
  assign win_len  = PW'(head - tail);
  assign retr_off = PW'(retr - tail);
  assign retr_in_win = (retr_off < win_len);

  assign dta_ready  = running && (wr_state == WR_FILL);
  assign full_stall = running && (wr_state == WR_ADVANCE) && (head_nx == tail);
  assign do_write   = dta_ready && dta_we;
  assign buf_done   = do_write && (wcnt == WW'(WPP - 1));

  assign mem_we    = do_write;
  assign mem_waddr = {head, wcnt};
  assign mem_wdata = dta;

  // A START waits until no transmission is in flight, so the completion of
  // an old request cannot touch the freshly cleared descriptors.
  assign cmd_is_start = (cmd.kind == CMD_START);
  assign cmd_is_stop  = (cmd.kind == CMD_STOP);
  assign cmd_is_ack   = (cmd.kind == CMD_ACK);
  assign cmd_take     = !cmd_empty && !(cmd_is_start && !running && inflight);
  assign cmd_rd       = cmd_take;

  assign ack_idx = cmd.pkt_num[PW-1:0];
  assign ack_hit = cmd_take && cmd_is_ack && (cmd.pkt_num < PNUM_W'(NPKT)) &&
                   desc[ack_idx].v && !desc[ack_idx].c &&
                   (desc[ack_idx].set_num == cmd.set_num);

  assign tail_move = (tail != head) && desc[tail].c &&
                     !(inflight && (inflight_idx == tail));

  assign send_now = running && !inflight && (head != tail) && retr_in_win &&
                    desc[retr].v && !desc[retr].c;

  assign nca_clear = cmd_take && cmd_is_start && !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      head         <= '0;
      tail         <= '0;
      retr         <= '0;
      wcnt         <= '0;
      wr_state     <= WR_FILL;
      host_mac     <= '0;
      inflight     <= 1'b0;
      inflight_idx <= '0;
      tx_req       <= 1'b0;
      tx_req_data  <= '0;
      tx_event     <= 1'b0;
      tx_resent    <= 1'b0;
      for (int i = 0; i < NPKT; i++)
        desc[i] <= '{set_num: (i == 0) ? '0 : '1, v: 1'b0, s: 1'b0, c: 1'b0};
    end else begin
      a_no_req_while_inflight: assert (!tx_req || inflight);
      a_no_overwrite_valid:    assert (!(do_write && desc[head].v));
      tx_req   <= 1'b0;
      tx_event <= 1'b0;

      if (nca_clear) begin
        // START while stopped: fresh ring, fresh set numbering.
        running  <= 1'b1;
        host_mac <= cmd.src_mac;
        head     <= '0;
        tail     <= '0;
        retr     <= '0;
        wcnt     <= '0;
        wr_state <= WR_FILL;
        for (int i = 0; i < NPKT; i++)
          desc[i] <= '{set_num: (i == 0) ? '0 : '1, v: 1'b0, s: 1'b0, c: 1'b0};
      end else begin
        if (cmd_take && cmd_is_start) host_mac <= cmd.src_mac;
        if (cmd_take && cmd_is_stop)  running  <= 1'b0;
        if (ack_hit) desc[ack_idx].c <= 1'b1;

        // Data Writer
        if (do_write) begin
          wcnt <= WW'(wcnt + 1'b1);
          if (buf_done) begin
            desc[head].v <= 1'b1;
            wr_state     <= WR_ADVANCE;
          end
        end
        if (wr_state == WR_ADVANCE && head_nx != tail) begin
          head              <= head_nx;
          desc[head_nx].v   <= 1'b0;
          desc[head_nx].s   <= 1'b0;
          desc[head_nx].c   <= 1'b0;
          desc[head_nx].set_num <= SET_W'(desc[head_nx].set_num + 1'b1);
          wr_state          <= WR_FILL;
        end

        // tail: free one confirmed buffer per cycle
        if (tail_move) tail <= PW'(tail + 1'b1);

        // Data Sender: completion of the transmission in flight
        if (inflight && tx_done) begin
          inflight                <= 1'b0;
          desc[inflight_idx].s    <= 1'b1;
          tx_event                <= 1'b1;
          tx_resent               <= desc[inflight_idx].s;
        end

        // Data Sender: browse the window with retr
        if (running && !inflight) begin
          if (head == tail || !retr_in_win) begin
            retr <= tail;
          end else begin
            retr <= (retr_nx1 == head) ? tail : retr_nx1;
            if (send_now) begin
              inflight     <= 1'b1;
              inflight_idx <= retr;
              tx_req       <= 1'b1;
              tx_req_data  <= '{dst_mac: host_mac,
                                set_num: desc[retr].set_num,
                                pkt_num: PNUM_W'(retr),
                                delay:   delay};
            end
          end
        end
      end
    end
  end

  nca #(
    .INTERVAL  (NCA_INTERVAL),
    .INIT_DELAY(INIT_DELAY)
  ) u_nca (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (nca_clear),
    .tx_event (tx_event),
    .tx_resent(tx_resent),
    .delay    (delay),
    .adj_up   (nca_up),
    .adj_down (nca_down)
  );

endmodule
