// cmd_status_sync: the command and status synchronizer between the system
// clock domain (descriptor manager) and the transmitter clock domain (packet
// sender).
//
// The core's description only says that dedicated synchronizers carry the
// signals between the two domains. This design uses a toggle handshake:
//   * sys side: s_req (one cycle, accepted only while s_busy is low) latches
//     s_req_data into a holding register and flips a request toggle. s_busy
//     stays high until the transmitter reports completion, and s_done pulses
//     for one sys cycle at that moment.
//   * tx side: the request toggle passes two flip-flops; a change gives a
//     one-cycle t_start pulse, with t_req_data (the holding register, stable
//     since before the toggle flipped) valid from then on. The sender answers
//     with a one-cycle t_done, which flips an acknowledge toggle sent back the
//     same way.
// Latency: t_start follows s_req by 2-3 tx cycles; s_done follows t_done by
// 2-3 sys cycles. Only one request is ever in flight.
module cmd_status_sync
  import fade_pkg::*;
(
  input  logic    s_clk,
  input  logic    s_rst_n,
  input  logic    s_req,
  input  tx_req_t s_req_data,
  output logic    s_busy,
  output logic    s_done,

  input  logic    t_clk,
  input  logic    t_rst_n,
  output logic    t_start,
  output tx_req_t t_req_data,
  input  logic    t_done
);

  logic    req_tgl, ack_tgl;
  tx_req_t hold;
  logic [2:0] req_sync;   // tx domain: two synchronizer stages plus history
  logic [2:0] ack_sync;   // sys domain: likewise

  // system domain
  always_ff @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      req_tgl  <= 1'b0;
      hold     <= '0;
      s_busy   <= 1'b0;
      ack_sync <= '0;
    end else begin
      a_req_when_idle: assert (!(s_req && s_busy));
      ack_sync <= {ack_sync[1:0], ack_tgl};
      if (s_req && !s_busy) begin
        hold    <= s_req_data;
        req_tgl <= ~req_tgl;
        s_busy  <= 1'b1;
      end else if (ack_sync[2] != ack_sync[1]) begin
        s_busy  <= 1'b0;
      end
    end
  end

  assign s_done = (ack_sync[2] != ack_sync[1]);

  // transmitter domain
  always_ff @(posedge t_clk or negedge t_rst_n) begin
    if (!t_rst_n) begin
      req_sync <= '0;
      ack_tgl  <= 1'b0;
    end else begin
      req_sync <= {req_sync[1:0], req_tgl};
      if (t_done) ack_tgl <= ~ack_tgl;
    end
  end

  assign t_start    = (req_sync[2] != req_sync[1]);
  assign t_req_data = hold;

endmodule
