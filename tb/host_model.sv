// host_model: behavioural model of the receiving computer and its kernel
// module, for simulation only (not synthesizable).
//
// It listens to the core's GMII transmit pins (clocked by the core's tx
// clock), checks the FCS of every frame and decodes DATA frames addressed to
// HOST_MAC. A frame may be thrown away on purpose (DROP_PCT percent, set at
// run time through drop_pct) to imitate a lost packet, and an ACK may be
// lost likewise (ack_drop_pct). For a kept DATA frame
// with global packet number gp = set * NPKT + packet:
//   * already received: it is a retransmission whose ACK got lost or came
//     too late; the ACK is sent again at once (n_dup counts these),
//   * new and within the two sets that can be in flight: the payload is
//     compared word by word with the expected stream (word k of the stream
//     is stream_word(k)) and an ACK is queued,
//   * from a set that cannot be in flight: counted in n_err, and a STOP is
//     sent, as the driver does.
// ACK, START and STOP frames go out on the core's GMII receive pins, clocked
// by the core's rx clock, with a 12-byte gap and ACK_LAT cycles of latency.
// corrupt_next makes the next queued frame carry a bad FCS. With MII set,
// both directions carry nibbles on bits [3:0], the low nibble of each byte
// first, as on a 10/100 Mb/s PHY. MII_IN (default: MII) sets the listening
// side alone, for a board behind a switch whose link to the computer is
// faster than the board's own.
module host_model
  import tb_eth_pkg::*;
#(
  parameter int unsigned NPKT     = 32,
  parameter int unsigned WPP      = 256,
  parameter logic [47:0] FEB_MAC  = 48'h02_46_8a_ce_f0_01,
  parameter logic [47:0] HOST_MAC = 48'h00_1b_21_aa_bb_cc,
  parameter int unsigned ACK_LAT  = 20,
  parameter bit          MII      = 1'b0,  // nibbles on [3:0], low nibble first
  parameter bit          MII_IN   = MII    // same for the frames it listens to
) (
  // from the core's transmitter
  input  logic       tclk,
  input  logic [7:0] txd,
  input  logic       tx_en,
  // to the core's receiver
  input  logic       rclk,
  output logic [7:0] rxd,
  output logic       rx_dv,
  output logic       rx_er
);

  int drop_pct = 0;            // percent of DATA frames thrown away
  int ack_drop_pct = 0;        // percent of ACK frames never sent
  bit corrupt_next = 0;
  int n_frames = 0, n_data = 0, n_new = 0, n_dup = 0, n_drop = 0, n_err = 0;
  int n_bad_fcs = 0, n_bad_data = 0, n_acks = 0, n_ack_lost = 0, max_set = 0;
  int contiguous = 0;          // packets 0 .. contiguous-1 all received
  bit got[int];
  logic [15:0] last_delay = '0;
  int unsigned max_delay = 0;

  bytes_t txq[$];              // frames waiting to be sent to the core

  function automatic logic [31:0] stream_word(input int k);
    return 32'(k) * 32'h9e37_79b9 + 32'h0bad_cafe;
  endfunction

  task automatic queue_cmd(input logic [15:0] op, input int s = 0, input int p = 0);
    txq.push_back(on_wire(cmd_body(FEB_MAC, HOST_MAC, op, 16'(s), 16'(p)), corrupt_next));
    corrupt_next = 0;
  endtask

  task automatic send_start(); queue_cmd(16'h0001); endtask
  task automatic send_stop();  queue_cmd(16'h0005); endtask

  // receive side
  bytes_t cur;
  logic [3:0] lo_nib;
  bit have_lo = 0;
  always @(posedge tclk) begin
    if (tx_en) begin
      if (!MII_IN) cur.push_back(txd);
      else if (have_lo) begin cur.push_back({txd[3:0], lo_nib}); have_lo = 0; end
      else begin lo_nib = txd[3:0]; have_lo = 1; end
    end else if (cur.size() != 0) begin
      handle(cur);
      cur.delete();
      have_lo = 0;
    end
  end

  task automatic handle(input bytes_t w);
    bytes_t body;
    logic [31:0] fcs;
    int s, p, gp, len;
    n_frames++;
    if (w.size() < 8 + 64) begin
      n_bad_fcs++;
      $display("%0t host: %0d-byte frame is too short", $time, w.size());
      return;
    end
    for (int i = 8; i < w.size() - 4; i++) body.push_back(w[i]);
    fcs = crc32(body);
    len = w.size();
    if ({w[len-1], w[len-2], w[len-3], w[len-4]} != fcs) begin
      n_bad_fcs++;
      $display("%0t host: bad FCS on a %0d-byte frame", $time, len);
      return;
    end
    if ({body[0], body[1], body[2], body[3], body[4], body[5]} != HOST_MAC) return;
    if ({body[12], body[13]} != 16'hfade || {body[14], body[15]} != 16'ha5a5) return;
    n_data++;
    if (int'($urandom % 100) < drop_pct) begin n_drop++; return; end
    s = int'({body[16], body[17]});
    p = int'({body[18], body[19]});
    last_delay = {body[22], body[23]};
    if ({body[20], body[21], body[22], body[23]} > max_delay)
      max_delay = {body[20], body[21], body[22], body[23]};
    gp = s * NPKT + p;
    if (s > max_set) max_set = s;
    if (p >= NPKT) begin n_err++; return; end
    if (got.exists(gp)) begin
      n_dup++;
      fork ack_later(s, p); join_none
      return;
    end
    if (gp >= (contiguous / NPKT + 2) * NPKT) begin
      n_err++;
      $display("host: unexpected set %0d (packet %0d)", s, p);
      send_stop();
      return;
    end
    if (body.size() != 24 + WPP * 4) begin n_bad_data++; return; end
    for (int i = 0; i < WPP; i++) begin
      logic [31:0] e = stream_word(gp * WPP + i);
      if ({body[24+4*i], body[25+4*i], body[26+4*i], body[27+4*i]} != e) begin
        n_bad_data++;
        break;
      end
    end
    got[gp] = 1;
    n_new++;
    while (got.exists(contiguous)) contiguous++;
    fork ack_later(s, p); join_none
  endtask

  task automatic ack_later(input int s, input int p);
    repeat (ACK_LAT) @(posedge rclk);
    if (int'($urandom % 100) < ack_drop_pct) begin n_ack_lost++; return; end
    queue_cmd(16'h0003, s, p);
    n_acks++;
  endtask

  // transmit side
  initial begin
    bytes_t f;
    rxd = '0; rx_dv = 0; rx_er = 0;
    forever begin
      @(posedge rclk);
      if (txq.size() != 0) begin
        f = txq.pop_front();
        foreach (f[i]) begin
          rx_dv <= 1;
          if (!MII) rxd <= f[i];
          else begin
            rxd <= {4'h0, f[i][3:0]};
            @(posedge rclk);
            rxd <= {4'h0, f[i][7:4]};
          end
          @(posedge rclk);
        end
        rx_dv <= 0; rxd <= '0;
        repeat (MII ? 24 : 12) @(posedge rclk);
      end
    end
  end

endmodule
