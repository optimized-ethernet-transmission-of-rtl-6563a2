// tb_fade_core: end-to-end test of the whole core against a model of the
// receiving computer (host_model), with the core's default buffer sizes
// (32 packets of 1024 bytes) and a congestion-avoidance interval shortened to
// 64 transmissions so that several delay updates happen in a short run.
//
// A data source offers a word on every system clock cycle whenever the core
// is ready; the host checks every payload word of every packet against the
// same stream. The run: a START with a corrupted FCS (must be ignored), a
// real START, a lossy phase (30 % of DATA frames and 20 % of ACKs lost), a
// clean phase, and a STOP. It counts, and fails if any never happened: the
// full-buffer stall, retransmissions, duplicate DATA frames acknowledged
// again by the host, a rejected bad frame, an increase and a decrease of the
// inter-packet delay, wrap of the ring into later sets, and STOP. It checks
// that all data arrived correct and in full, no frame is sent before START
// or after STOP, and that in the clean phase, once the delay has decayed,
// the payload rate is at least 900 Mb/s at a 125 MHz GMII clock (the
// throughput reached by one gigabit board in the original measurements was
// about 920 Mb/s).
module tb_fade_core;
  timeunit 1ns; timeprecision 10ps;
  import fade_pkg::*;
  localparam logic [47:0] FEB  = 48'h02_46_8a_ce_f0_01;
  localparam logic [47:0] HOST = 48'h00_1b_21_aa_bb_cc;
  localparam int NPKT = 32, WPP = 256;

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
  int k = 0;                          // words accepted by the core
  int n_stall = 0, n_resent = 0, n_up = 0, n_down = 0, n_badrx = 0, n_tx = 0;
  bit frames_allowed = 0;
  int n_forbidden = 0;

  always #5   sys_clk = ~sys_clk;     // 100 MHz
  always #4   tx_clk  = ~tx_clk;      // 125 MHz
  always #4.1 rx_clk  = ~rx_clk;      // PHY receive clock, slightly off

  fade_core #(.NCA_INTERVAL(64), .INIT_DELAY(32'd400)) dut (.*, .my_mac(FEB));

  host_model #(.NPKT(NPKT), .WPP(WPP), .FEB_MAC(FEB), .HOST_MAC(HOST)) host (
    .tclk(tx_clk), .txd(txd), .tx_en(tx_en),
    .rclk(rx_clk), .rxd(rxd), .rx_dv(rx_dv), .rx_er(rx_er));

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

  // data source: always offers the next stream word
  always @(posedge sys_clk) begin
    if (rst_n && dta_we && dta_ready) k <= k + 1;
  end
  always_comb begin
    dta_we = rst_n;
    dta    = host.stream_word(k);
  end

  always @(posedge sys_clk) if (rst_n) begin
    if (full_stall) n_stall++;
    if (tx_event) n_tx++;
    if (tx_event && tx_resent) n_resent++;
    if (nca_up) n_up++;
    if (nca_down) n_down++;
  end
  always @(posedge rx_clk) if (rst_n && rx_bad_frame) n_badrx++;
  always @(posedge tx_clk) if (rst_n && tx_en && !frames_allowed) n_forbidden++;

  task automatic wait_tx(input int n);
    int target = n_tx + n;
    while (n_tx < target) @(posedge sys_clk);
  endtask

  initial begin
    int p0;
    realtime t0, t1;
    real mbps;
    #1 rst_n = 0;   // a falling edge, so the asynchronous resets take effect
    #50 rst_n = 1;
    // anything seen on the pins before the first reset is not a frame
    host.n_frames = 0; host.n_bad_fcs = 0;
    repeat (50) @(posedge sys_clk);
    check(!running && !dta_ready, "idle after reset");
    // corrupted START: ignored
    host.corrupt_next = 1;
    host.send_start();
    repeat (300) @(posedge sys_clk);
    check(!running && n_badrx == 1, "corrupted START rejected");
    // START
    frames_allowed = 1;
    host.send_start();
    repeat (300) @(posedge sys_clk);
    check(running, "START");
    // lossy phase
    host.drop_pct = 30;
    host.ack_drop_pct = 20;
    wait_tx(250);
    check(n_up > 0, "delay increased under loss");
    check(n_resent > 0, "retransmissions");
    check(delay > 400, $sformatf("delay %0d above its start value", delay));
    // clean phase
    host.drop_pct = 0;
    host.ack_drop_pct = 0;
    wait_tx(1400);
    $display("%0t after clean phase: delay %0d, tx %0d resent %0d", $time, delay, n_tx, n_resent);
    check(n_down > 0, "delay decreased without loss");
    // throughput over 100 new packets
    p0 = host.n_new; t0 = $realtime;
    while (host.n_new < p0 + 100) @(posedge tx_clk);
    t1 = $realtime;
    mbps = 100.0 * 1024 * 8 / (t1 - t0) * 1000.0;
    $display("payload rate %0.1f Mb/s with delay %0d", mbps, delay);
    check(mbps >= 900.0, $sformatf("payload rate %0.1f Mb/s", mbps));
    // STOP
    host.send_stop();
    repeat (400) @(posedge sys_clk);
    check(!running && !dta_ready, "STOP");
    repeat (3000) @(posedge sys_clk);     // let the last packet in flight finish
    frames_allowed = 0;
    repeat (3000) @(posedge sys_clk);
    check(n_forbidden == 0, "frames outside START..STOP");
    // data integrity
    check(host.n_bad_data == 0, "payload errors");
    check(host.n_err == 0, "unexpected set numbers");
    check(host.n_bad_fcs == 0, "bad FCS from the core");
    check(host.contiguous >= 1500, $sformatf("contiguous packets %0d", host.contiguous));
    check(host.max_set >= 2, "ring wrapped into later sets");
    check(n_stall > 0, "full-buffer stall");
    check(host.n_dup > 0, "duplicate DATA acknowledged again");
    $display("tx %0d resent %0d new %0d dup %0d lost %0d acks lost %0d stall cycles %0d up %0d down %0d bad rx %0d sets %0d",
             n_tx, n_resent, host.n_new, host.n_dup, host.n_drop, host.n_ack_lost, n_stall,
             n_up, n_down, n_badrx, host.max_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
