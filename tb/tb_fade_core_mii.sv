// tb_fade_core_mii: the core built for a 10/100 Mb/s PHY (MII = 1), with
// 25 MHz MII clocks, against the model of the receiving computer speaking
// MII nibbles. All other parameters are at their defaults.
//
// Sequence: a START with a bad FCS (ignored), START, 130 packets on a clean
// link with the payload rate measured over the last 100, then a lossy phase
// (20 % of DATA frames lost) of 60 more packets, then STOP. Checks: every
// payload word and FCS, contiguous packet order, the ring wraps into later
// sets, the buffer-full stall happens, retransmissions happen and repair the
// losses, the bad frame is reported, STOP takes effect, and the payload rate
// is at least 94 Mb/s (the frame format allows 1024/1072 x 100 = 95.5 Mb/s;
// the original measurements reached about 94.5 Mb/s from a 100 Mb/s board).
module tb_fade_core_mii;
  timeunit 1ns; timeprecision 10ps;
  import fade_pkg::*;
  localparam logic [47:0] FEB  = 48'h02_46_8a_ce_f0_07;
  localparam logic [47:0] HOST = 48'h00_1b_21_aa_bb_cc;

  logic rst_n = 1, sys_clk = 0, tx_clk = 0, rx_clk = 0;
  logic [31:0] dta;
  logic dta_we, dta_ready;
  logic [7:0] txd, rxd;
  logic tx_en, tx_er, rx_dv, rx_er;
  logic running, full_stall, tx_event, tx_resent, nca_up, nca_down, tx_pending, tx_busy;
  logic rx_cmd_ok, rx_bad_frame, rx_dropped;
  logic [4:0] head, tail, retr;
  logic [31:0] delay;

  int checks = 0, failures = 0;
  int k = 0;
  int n_stall = 0, n_resent = 0, n_tx = 0, n_badrx = 0;

  always #5    sys_clk = ~sys_clk;    // 100 MHz
  always #20   tx_clk  = ~tx_clk;     // 25 MHz MII transmit clock
  always #20.3 rx_clk  = ~rx_clk;     // MII receive clock, slightly off

  fade_core #(.MII(1'b1)) dut (.*, .my_mac(FEB));

  host_model #(.FEB_MAC(FEB), .HOST_MAC(HOST), .MII(1'b1)) host (
    .tclk(tx_clk), .txd(txd), .tx_en(tx_en),
    .rclk(rx_clk), .rxd(rxd), .rx_dv(rx_dv), .rx_er(rx_er));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge sys_clk) if (rst_n && dta_we && dta_ready) k <= k + 1;
  always_comb begin
    dta_we = rst_n;
    dta    = host.stream_word(k);
  end

  always @(posedge sys_clk) if (rst_n) begin
    if (full_stall) n_stall++;
    if (tx_event) n_tx++;
    if (tx_event && tx_resent) n_resent++;
  end
  always @(posedge rx_clk) if (rst_n && rx_bad_frame) n_badrx++;

  initial begin
    int p0;
    realtime t0, t1;
    real mbps;
    #1 rst_n = 0;
    #100 rst_n = 1;
    host.n_frames = 0; host.n_bad_fcs = 0;
    repeat (20) @(posedge sys_clk);
    host.corrupt_next = 1;
    host.send_start();
    repeat (2000) @(posedge sys_clk);
    check(!running && n_badrx == 1, "corrupted START rejected");
    host.send_start();
    repeat (2000) @(posedge sys_clk);
    check(running, "START");
    while (host.n_new < 30) @(posedge tx_clk);
    p0 = host.n_new; t0 = $realtime;
    while (host.n_new < p0 + 100) @(posedge tx_clk);
    t1 = $realtime;
    mbps = 100.0 * 1024 * 8 / (t1 - t0) * 1000.0;
    $display("payload rate %0.2f Mb/s", mbps);
    check(mbps >= 94.0 && mbps <= 95.6, $sformatf("payload rate %0.2f Mb/s", mbps));
    host.drop_pct = 20;
    while (host.n_new < p0 + 160) @(posedge tx_clk);
    host.drop_pct = 0;
    while (host.contiguous < host.n_new) @(posedge tx_clk);
    host.send_stop();
    repeat (3000) @(posedge sys_clk);
    check(!running && !dta_ready, "STOP");
    repeat (30000) @(posedge sys_clk);
    check(!tx_en && !tx_busy, "link quiet after STOP");
    check(host.n_bad_data == 0, "payload errors");
    check(host.n_bad_fcs == 0, "bad FCS");
    check(host.n_err == 0, "unexpected set numbers");
    check(host.contiguous == host.n_new && host.contiguous >= 190,
          $sformatf("contiguous %0d of %0d", host.contiguous, host.n_new));
    check(host.max_set >= 5, "ring wrapped into later sets");
    check(n_stall > 0, "buffer-full stall");
    check(host.n_drop > 0 && n_resent > 0, "losses repaired by retransmission");
    $display("tx %0d resent %0d new %0d lost %0d sets %0d", n_tx, n_resent, host.n_new,
             host.n_drop, host.max_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
