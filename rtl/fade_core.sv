// fade_core: FPGA core for reliable transmission of acquired data over a
// raw-Ethernet link to a receiving computer, without a MAC core, soft CPU or
// external memory.
//
// Acquired words enter on dta/dta_we in the system clock domain whenever
// dta_ready is high. The descriptor manager stores them into a ring of
// NPKT packet buffers (32 x 1 KiB by default) and hands every filled,
// unconfirmed buffer to the packet sender, which runs in the transmitter
// clock domain and sends it as a DATA frame straight onto the PHY's GMII
// transmit pins. The receiving computer answers every DATA frame with an ACK
// naming its set and packet number; the packet receiver (receiver clock
// domain) parses ACK, START and STOP frames from the GMII receive pins and
// passes them through the acknowledge and commands FIFO to the descriptor
// manager. Unconfirmed buffers are retransmitted cyclically; the inter-packet
// delay is adapted from the ratio of retransmissions to first transmissions.
//
//   dta ---> desc_manager ---> pkt_buf_mem ---> pkt_sender ---> txd/tx_en
//             ^   |  (nca)         (sys->tx RAM)     ^
//             |   +------ cmd_status_sync -----------+
//             +---------- ack_cmd_fifo <--- pkt_receiver <--- rxd/rx_dv
//
// The partitioning, the three clock domains and the crossing by synchronizer,
// dual-port memory and FIFO follow the core's block diagram. This design's
// own choices: the GMII and MII PHY interfaces, one asynchronous reset input
// synchronised into each domain, the MAC address of the board as an input
// port, and the status outputs, which are there for monitoring.
//
// PHY interface: GMII by default (8 bits per clock, 125 MHz, 1 Gb/s). With
// MII = 1 the core drives a 10/100 PHY instead: txd[3:0]/rxd[3:0] carry
// nibbles through mii_tx/mii_rx, txd[7:4] is 0 and rxd[7:4] is unused; with
// 25 MHz MII clocks this is 100 Mb/s. The original core ran on boards with
// both kinds of PHY; the interfaces themselves are this design's choice.
//
// Clocks: sys_clk for the data side, tx_clk (125 MHz for gigabit GMII) for
// transmission, rx_clk from the PHY for reception; they may be unrelated.
// Status outputs are in the sys_clk domain except tx_busy (tx_clk domain)
// and rx_* (rx_clk domain).
module fade_core
  import fade_pkg::*;
#(
  parameter int unsigned NPKT         = 32,     // packet buffers (one set)
  parameter int unsigned WPP          = 256,    // 32-bit words per packet (1024 bytes)
  parameter int unsigned DW           = 32,     // acquired data word width
  parameter int unsigned NCA_INTERVAL = 10000,  // transmissions between delay updates
  parameter int unsigned FIFO_AW      = 4,      // log2 depth of the command FIFO
  parameter bit          MII          = 1'b0,   // 0: GMII (1 Gb/s), 1: MII (10/100 Mb/s)
  parameter logic [DELAY_W-1:0] INIT_DELAY = '0
) (
  input  logic                 rst_n,
  input  logic [47:0]          my_mac,
  // system clock domain: acquired data
  input  logic                 sys_clk,
  input  logic [DW-1:0]        dta,
  input  logic                 dta_we,
  output logic                 dta_ready,
  // GMII transmit
  input  logic                 tx_clk,
  output logic [7:0]           txd,
  output logic                 tx_en,
  output logic                 tx_er,
  // GMII receive
  input  logic                 rx_clk,
  input  logic [7:0]           rxd,
  input  logic                 rx_dv,
  input  logic                 rx_er,
  // status, sys_clk domain
  output logic                 running,
  output logic [$clog2(NPKT)-1:0] head,
  output logic [$clog2(NPKT)-1:0] tail,
  output logic [$clog2(NPKT)-1:0] retr,
  output logic                 full_stall,
  output logic                 tx_event,
  output logic                 tx_resent,
  output logic [DELAY_W-1:0]   delay,
  output logic                 nca_up,
  output logic                 nca_down,
  output logic                 tx_pending,   // a transmit request is in flight
  // status, tx_clk domain
  output logic                 tx_busy,      // the packet sender is busy
  // status, rx_clk domain
  output logic                 rx_cmd_ok,
  output logic                 rx_bad_frame,
  output logic                 rx_dropped
);

  localparam int unsigned AW = $clog2(NPKT) + $clog2(WPP);

  logic sys_rst_n, tx_rst_n, rx_rst_n;

  rst_sync u_rst_sys (.clk(sys_clk), .rst_n_in(rst_n), .rst_n_out(sys_rst_n));
  rst_sync u_rst_tx  (.clk(tx_clk),  .rst_n_in(rst_n), .rst_n_out(tx_rst_n));
  rst_sync u_rst_rx  (.clk(rx_clk),  .rst_n_in(rst_n), .rst_n_out(rx_rst_n));

  // packet buffers memory
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [DW-1:0] mem_wdata, mem_rdata;

  // command FIFO
  cmd_t fifo_wdata, fifo_rdata;
  logic fifo_we, fifo_full, fifo_rd, fifo_empty;

  // transmit handshake
  logic    s_req, s_done, t_start, t_done;
  tx_req_t s_req_data, t_req_data;

  desc_manager #(
    .NPKT(NPKT), .WPP(WPP), .DW(DW),
    .NCA_INTERVAL(NCA_INTERVAL), .INIT_DELAY(INIT_DELAY)
  ) u_desc_manager (
    .clk        (sys_clk),
    .rst_n      (sys_rst_n),
    .dta        (dta),
    .dta_we     (dta_we),
    .dta_ready  (dta_ready),
    .mem_we     (mem_we),
    .mem_waddr  (mem_waddr),
    .mem_wdata  (mem_wdata),
    .cmd_empty  (fifo_empty),
    .cmd        (fifo_rdata),
    .cmd_rd     (fifo_rd),
    .tx_req     (s_req),
    .tx_req_data(s_req_data),
    .tx_done    (s_done),
    .running    (running),
    .head       (head),
    .tail       (tail),
    .retr       (retr),
    .full_stall (full_stall),
    .tx_event   (tx_event),
    .tx_resent  (tx_resent),
    .delay      (delay),
    .nca_up     (nca_up),
    .nca_down   (nca_down)
  );

  pkt_buf_mem #(.DW(DW), .AW(AW)) u_pkt_buf_mem (
    .wclk (sys_clk),
    .we   (mem_we),
    .waddr(mem_waddr),
    .wdata(mem_wdata),
    .rclk (tx_clk),
    .raddr(mem_raddr),
    .rdata(mem_rdata)
  );

  cmd_status_sync u_cmd_status_sync (
    .s_clk     (sys_clk),
    .s_rst_n   (sys_rst_n),
    .s_req     (s_req),
    .s_req_data(s_req_data),
    .s_busy    (tx_pending),
    .s_done    (s_done),
    .t_clk     (tx_clk),
    .t_rst_n   (tx_rst_n),
    .t_start   (t_start),
    .t_req_data(t_req_data),
    .t_done    (t_done)
  );

  // PHY side: bytes straight to GMII, or through the nibble converters to MII
  logic       tx_ce, rx_ce;
  logic [7:0] txd_b, rxd_b;
  logic       tx_en_b, rx_dv_b, rx_er_b;

  if (MII) begin : g_mii
    mii_tx u_mii_tx (
      .clk    (tx_clk),
      .rst_n  (tx_rst_n),
      .ce     (tx_ce),
      .txd_b  (txd_b),
      .tx_en_b(tx_en_b),
      .txd    (txd[3:0]),
      .tx_en  (tx_en)
    );
    assign txd[7:4] = 4'h0;
    mii_rx u_mii_rx (
      .clk    (rx_clk),
      .rst_n  (rx_rst_n),
      .rxd    (rxd[3:0]),
      .rx_dv  (rx_dv),
      .rx_er  (rx_er),
      .ce     (rx_ce),
      .rxd_b  (rxd_b),
      .rx_dv_b(rx_dv_b),
      .rx_er_b(rx_er_b)
    );
  end else begin : g_gmii
    assign tx_ce   = 1'b1;
    assign txd     = txd_b;
    assign tx_en   = tx_en_b;
    assign rx_ce   = 1'b1;
    assign rxd_b   = rxd;
    assign rx_dv_b = rx_dv;
    assign rx_er_b = rx_er;
  end

  pkt_sender #(.NPKT(NPKT), .WPP(WPP), .DW(DW)) u_pkt_sender (
    .clk      (tx_clk),
    .rst_n    (tx_rst_n),
    .my_mac   (my_mac),
    .ce       (tx_ce),
    .start    (t_start),
    .req      (t_req_data),
    .done     (t_done),
    .busy     (tx_busy),
    .mem_raddr(mem_raddr),
    .mem_rdata(mem_rdata),
    .txd      (txd_b),
    .tx_en    (tx_en_b),
    .tx_er    (tx_er)
  );

  pkt_receiver u_pkt_receiver (
    .clk       (rx_clk),
    .rst_n     (rx_rst_n),
    .my_mac    (my_mac),
    .rxd       (rxd_b),
    .rx_dv     (rx_dv_b),
    .rx_er     (rx_er_b),
    .ce        (rx_ce),
    .fifo_we   (fifo_we),
    .fifo_wdata(fifo_wdata),
    .fifo_full (fifo_full),
    .cmd_ok    (rx_cmd_ok),
    .bad_frame (rx_bad_frame),
    .dropped   (rx_dropped)
  );

  ack_cmd_fifo #(.W($bits(cmd_t)), .AW(FIFO_AW)) u_ack_cmd_fifo (
    .wclk  (rx_clk),
    .wrst_n(rx_rst_n),
    .wr_en (fifo_we),
    .wdata (fifo_wdata),
    .full  (fifo_full),
    .rclk  (sys_clk),
    .rrst_n(sys_rst_n),
    .rd_en (fifo_rd),
    .rdata (fifo_rdata),
    .empty (fifo_empty)
  );

endmodule
