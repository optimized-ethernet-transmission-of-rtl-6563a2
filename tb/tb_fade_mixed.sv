// tb_fade_mixed: a gigabit board and a 100 Mb/s board sending at the same
// time through one switch to the receiving computer, as in the measurements
// with boards of different PHY speeds.
//
// Board 0 is a fade_core on GMII with a 125 MHz transmit clock; board 1 is
// built for MII (parameter MII) and runs its PHY side at 25 MHz, nibbles on
// txd[3:0] and rxd[3:0]. Both use a congestion-avoidance interval of 64
// transmissions. The switch model collects each board's frames at that
// board's own speed and forwards them to the computer through one gigabit
// output port with a queue of QDEPTH frames, dropping a frame when the queue
// is full. Each board has its own model of the receiving computer, which
// listens at gigabit speed and sends ACKs back at the board's speed.
// Together the boards offer about 955 + 95 Mb/s of payload to a port that
// carries at most 955, so frames are lost. Checks: both boards' data arrive
// complete and correct; the switch dropped frames; the gigabit board
// retransmitted and raised its delay; the 100 Mb/s board keeps at least
// half of its own link rate; and once the delays have settled the output
// carries at least 80 % of 1 Gb/s of payload in total. The shares are
// printed; how evenly they should split is not a checked property.
module tb_fade_mixed;
  timeunit 1ns; timeprecision 10ps;
  import fade_pkg::*;
  import tb_eth_pkg::*;
  localparam int NB = 2;
  localparam int QDEPTH = 6;
  localparam logic [47:0] HOST = 48'h00_1b_21_aa_bb_cc;
  localparam logic [47:0] FEB [NB] = '{48'h02_46_8a_ce_f0_01, 48'h02_46_8a_ce_f0_02};

  logic rst_n = 1, sys_clk = 0, tx_clk = 0, rx_clk = 0, mii_clk = 0;
  int checks = 0, failures = 0;

  always #5   sys_clk = ~sys_clk;
  always #4   tx_clk  = ~tx_clk;
  always #4.1 rx_clk  = ~rx_clk;
  always #20  mii_clk = ~mii_clk;     // board 1: 25 MHz MII

  // per board
  logic [31:0] dta [NB];
  logic [NB-1:0] dta_we, dta_ready, tx_en, tx_er, rx_dv, rx_er, h_tx_en;
  logic [7:0] txd [NB], rxd [NB], h_txd [NB];
  logic [NB-1:0] running, full_stall, tx_event, tx_resent, nca_up, nca_down, tx_pending, tx_busy;
  logic [NB-1:0] rx_cmd_ok, rx_bad_frame, rx_dropped;
  logic [4:0] head [NB], tail [NB], retr [NB];
  logic [31:0] delay [NB];
  int k [NB];
  int n_up [NB], n_resent [NB];

  for (genvar b = 0; b < NB; b++) begin : g_board
    localparam bit M = (b == 1);
    logic pclk_t, pclk_r;
    assign pclk_t = M ? mii_clk : tx_clk;
    assign pclk_r = M ? mii_clk : rx_clk;

    fade_core #(.NCA_INTERVAL(64), .MII(M)) dut (
      .rst_n(rst_n), .my_mac(FEB[b]),
      .sys_clk(sys_clk), .dta(dta[b]), .dta_we(dta_we[b]), .dta_ready(dta_ready[b]),
      .tx_clk(pclk_t), .txd(txd[b]), .tx_en(tx_en[b]), .tx_er(tx_er[b]),
      .rx_clk(pclk_r), .rxd(rxd[b]), .rx_dv(rx_dv[b]), .rx_er(rx_er[b]),
      .running(running[b]), .head(head[b]), .tail(tail[b]), .retr(retr[b]),
      .full_stall(full_stall[b]), .tx_event(tx_event[b]), .tx_resent(tx_resent[b]),
      .delay(delay[b]), .nca_up(nca_up[b]), .nca_down(nca_down[b]),
      .tx_pending(tx_pending[b]), .tx_busy(tx_busy[b]),
      .rx_cmd_ok(rx_cmd_ok[b]), .rx_bad_frame(rx_bad_frame[b]), .rx_dropped(rx_dropped[b]));

    host_model #(.FEB_MAC(FEB[b]), .HOST_MAC(HOST), .MII(M), .MII_IN(1'b0)) host (
      .tclk(tx_clk), .txd(h_txd[b]), .tx_en(h_tx_en[b]),
      .rclk(pclk_r), .rxd(rxd[b]), .rx_dv(rx_dv[b]), .rx_er(rx_er[b]));

    always @(posedge sys_clk) if (rst_n && dta_we[b] && dta_ready[b]) k[b] <= k[b] + 1;
    always_comb begin
      dta_we[b] = rst_n;
      dta[b]    = host.stream_word(k[b]);
    end
    always @(posedge sys_clk) if (rst_n) begin
      if (nca_up[b]) n_up[b]++;
      if (tx_event[b] && tx_resent[b]) n_resent[b]++;
    end

    // switch input port: collect whole frames from the board
    bytes_t cur;
    logic [3:0] lo;
    bit have_lo;
    always @(posedge pclk_t) begin
      if (rst_n && tx_en[b]) begin
        if (!M) cur.push_back(txd[b]);
        else if (have_lo) begin cur.push_back({txd[b][3:0], lo}); have_lo = 0; end
        else begin lo = txd[b][3:0]; have_lo = 1; end
      end else if (cur.size() != 0) begin
        if (q.size() < QDEPTH) begin q.push_back(cur); qport.push_back(b); end
        else n_sw_drop++;
        cur.delete();
        have_lo = 0;
      end
    end
  end

  // switch output port toward the computer: one frame at a time, 12-byte gap
  bytes_t q[$];
  int qport[$];
  int n_sw_drop = 0;
  longint out_bytes = 0;
  initial begin
    bytes_t f;
    int b;
    for (int i = 0; i < NB; i++) begin h_tx_en[i] = 0; h_txd[i] = '0; k[i] = 0; n_up[i] = 0; n_resent[i] = 0; end
    forever begin
      @(posedge tx_clk);
      if (q.size() != 0) begin
        f = q.pop_front();
        b = qport.pop_front();
        foreach (f[i]) begin
          h_tx_en[b] <= 1; h_txd[b] <= f[i];
          @(posedge tx_clk);
        end
        h_tx_en[b] <= 0; h_txd[b] <= '0;
        out_bytes += longint'(f.size());
        repeat (11) @(posedge tx_clk);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int total_new();
    return g_board[0].host.n_new + g_board[1].host.n_new;
  endfunction

  initial begin
    int p0;
    int q0, q1;
    realtime t0, t1;
    real mbps, mbps0, mbps1;
    #1 rst_n = 0;
    #50 rst_n = 1;
    g_board[0].host.n_frames = 0; g_board[0].host.n_bad_fcs = 0;
    g_board[1].host.n_frames = 0; g_board[1].host.n_bad_fcs = 0;
    repeat (20) @(posedge sys_clk);
    g_board[0].host.send_start();
    g_board[1].host.send_start();
    repeat (2000) @(posedge sys_clk);   // 100 Mb/s START takes 5.8 us
    check(&running, "both boards started");
    // let the delays settle
    while (total_new() < 2000) @(posedge tx_clk);
    p0 = total_new(); q0 = g_board[0].host.n_new; q1 = g_board[1].host.n_new;
    t0 = $realtime;
    while (total_new() < p0 + 1000) @(posedge tx_clk);
    t1 = $realtime;
    mbps  = 1000.0 * 1024 * 8 / (t1 - t0) * 1000.0;
    mbps0 = real'(g_board[0].host.n_new - q0) * 1024 * 8 / (t1 - t0) * 1000.0;
    mbps1 = real'(g_board[1].host.n_new - q1) * 1024 * 8 / (t1 - t0) * 1000.0;
    $display("payload rates: gigabit board %0.1f Mb/s, 100 Mb/s board %0.1f Mb/s, total %0.1f Mb/s (delays %0d %0d)",
             mbps0, mbps1, mbps, delay[0], delay[1]);
    check(mbps >= 800.0, $sformatf("total payload rate %0.1f Mb/s", mbps));
    check(mbps1 >= 47.5, $sformatf("100 Mb/s board's rate %0.1f Mb/s", mbps1));
    g_board[0].host.send_stop();
    g_board[1].host.send_stop();
    repeat (5000) @(posedge sys_clk);
    check(running == '0, "both boards stopped");
    check(n_sw_drop > 0, "switch dropped frames");
    check(n_up[0] > 0, "gigabit board raised its delay");
    check(n_resent[0] > 0, "gigabit board retransmitted");
    check(g_board[0].host.n_bad_data == 0 && g_board[1].host.n_bad_data == 0, "payload errors");
    check(g_board[0].host.n_bad_fcs == 0 && g_board[1].host.n_bad_fcs == 0, "bad FCS");
    check(g_board[0].host.n_err == 0 && g_board[1].host.n_err == 0, "unexpected set numbers");
    check(g_board[0].host.contiguous >= 500 && g_board[1].host.contiguous >= 50,
          $sformatf("contiguous packets %0d and %0d", g_board[0].host.contiguous,
                    g_board[1].host.contiguous));
    $display("switch drops %0d, resent %0d %0d, delay raises %0d %0d",
             n_sw_drop, n_resent[0], n_resent[1], n_up[0], n_up[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
