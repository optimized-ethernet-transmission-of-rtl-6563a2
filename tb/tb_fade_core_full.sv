// tb_fade_core_full: full-size test of the core with every parameter at its
// default (32 packet buffers of 1024 bytes, congestion-avoidance interval of
// 10000 transmissions, initial delay 0), against the model of the receiving
// computer.
//
// One complete acquisition: START from the host, continuous data offered by
// the source at 100 MHz x 32 bit (faster than the link, so the source is
// regularly held off by dta_ready), 400 packets (12.5 sets of 32) received,
// checked word by word and acknowledged, then STOP. Checks: all payload
// words and FCS correct, packets received contiguously from the first one,
// set numbers beyond the first wrap of the ring, at most 1 % of frames sent
// again on a clean link (only when a buffer's ACK is still on its way), no delay adjustment before 10000 transmissions, the buffer-full
// stall happened, and the payload rate with zero delay is at least 940 Mb/s
// (the link limit for 1024-byte payloads in 1072-byte slots is 955 Mb/s).
module tb_fade_core_full;
  timeunit 1ns; timeprecision 10ps;
  import fade_pkg::*;
  localparam logic [47:0] FEB  = 48'h02_46_8a_ce_f0_01;
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
  int n_stall = 0, n_resent = 0, n_adj = 0, n_tx = 0;

  always #5   sys_clk = ~sys_clk;     // 100 MHz
  always #4   tx_clk  = ~tx_clk;      // 125 MHz
  always #4.1 rx_clk  = ~rx_clk;

  fade_core dut (.*, .my_mac(FEB));

  host_model #(.FEB_MAC(FEB), .HOST_MAC(HOST)) host (
    .tclk(tx_clk), .txd(txd), .tx_en(tx_en),
    .rclk(rx_clk), .rxd(rxd), .rx_dv(rx_dv), .rx_er(rx_er));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  initial begin
    #10ms;
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
    if (nca_up || nca_down) n_adj++;
  end

  initial begin
    int p0;
    realtime t0, t1;
    real mbps;
    check(crc_ok(), "testbench CRC self-test");
    #1 rst_n = 0;
    #50 rst_n = 1;
    // anything seen on the pins before the first reset is not a frame
    host.n_frames = 0; host.n_bad_fcs = 0;
    repeat (20) @(posedge sys_clk);
    check(!running && !dta_ready, "idle after reset");
    host.send_start();
    while (!running) @(posedge sys_clk);
    while (host.n_new < 100) @(posedge tx_clk);
    p0 = host.n_new; t0 = $realtime;
    while (host.n_new < p0 + 300) @(posedge tx_clk);
    t1 = $realtime;
    mbps = 300.0 * 1024 * 8 / (t1 - t0) * 1000.0;
    $display("payload rate %0.1f Mb/s", mbps);
    check(mbps >= 940.0, $sformatf("payload rate %0.1f Mb/s", mbps));
    host.send_stop();
    repeat (500) @(posedge sys_clk);
    check(!running && !dta_ready, "STOP");
    repeat (3000) @(posedge sys_clk);
    check(!tx_en && !tx_busy && !tx_pending, "link quiet after STOP");
    check(host.n_bad_data == 0, "payload errors");
    check(host.n_bad_fcs == 0, "bad FCS");
    check(host.n_err == 0, "unexpected set numbers");
    check(host.contiguous == host.n_new, "packets received in order without gaps");
    check(host.contiguous >= 400, $sformatf("%0d packets", host.contiguous));
    check(host.max_set >= 12, $sformatf("last set %0d", host.max_set));
    $display("resent %0d dup %0d frames %0d bad fcs %0d", n_resent, host.n_dup, host.n_frames, host.n_bad_fcs);
    // A buffer can be sent again before its ACK is back when it is the only
    // unconfirmed one; the host then acknowledges it again at once.
    check(n_resent * 100 <= n_tx && host.n_dup == n_resent,
          "retransmissions on a clean link above 1 %");
    check(n_adj == 0 && delay == 0, "delay changed before 10000 transmissions");
    check(n_stall > 0, "buffer-full stall");
    check(!rx_dropped, "command dropped");
    $display("tx %0d new %0d sets %0d stall cycles %0d", n_tx, host.n_new, host.max_set, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit crc_ok();
    return tb_eth_pkg::crc_selftest();
  endfunction
endmodule
