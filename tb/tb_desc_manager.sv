// tb_desc_manager: exercises the descriptor manager at a reduced size
// (8 packet buffers of 4 words, congestion window of 16 transmissions) with
// a command queue standing in for the FIFO and a responder standing in for
// the packet sender (done 10 cycles after each request).
//
// Checked against values the testbench works out from the global word
// count g: every memory write goes to buffer (g / WPP) % NPKT, word g % WPP,
// with the written data; every transmit request names a packet that has
// been completely written, with set number (global packet index) / NPKT,
// the host MAC from START and the delay the unit reports; no data are
// accepted before START or after STOP. Mechanisms made to happen: the
// cyclic retransmission of unconfirmed packets (tx_resent), the stall when
// all buffers are full (full_stall, dta_ready low), tail jumping over
// several already-confirmed buffers after one ACK, rejection of an ACK with the
// wrong set number, wrap-around of the ring with set numbers incrementing,
// a delay increase by the congestion avoidance, and STOP.
module tb_desc_manager;
  timeunit 1ns; timeprecision 100ps;
  import fade_pkg::*;
  localparam int NPKT = 8, WPP = 4, DW = 32, PW = 3, WW = 2;
  localparam logic [47:0] HOST = 48'h00_1b_21_aa_bb_cc;

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] dta = '0;
  logic dta_we = 0, dta_ready;
  logic mem_we;
  logic [PW+WW-1:0] mem_waddr;
  logic [DW-1:0] mem_wdata;
  logic cmd_empty, cmd_rd;
  cmd_t cmd;
  logic tx_req, tx_done = 0;
  tx_req_t tx_req_data;
  logic running, full_stall, tx_event, tx_resent, nca_up, nca_down;
  logic [PW-1:0] head, tail, retr;
  logic [31:0] delay;

  cmd_t cmdq[$];
  int checks = 0, failures = 0;
  int g = 0;                 // words written so far
  int words_to_write = 0;    // writer budget
  int n_req = 0, n_resent = 0, n_stall = 0, n_up = 0, n_tailjump = 0;
  tx_req_t last_req;
  logic [31:0] delay_q;

  always #5 clk = ~clk;

  assign cmd_empty = (cmdq.size() == 0);
  assign cmd = cmd_empty ? cmd_t'('0) : cmdq[0];

  desc_manager #(.NPKT(NPKT), .WPP(WPP), .DW(DW), .NCA_INTERVAL(16),
                 .INIT_DELAY(32'd100)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%0t FAIL: %s", $time, what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] word_of(input int k);
    return DW'(k * 32'h0101_0001 + 32'h1000_0000);
  endfunction

  // command FIFO model
  always @(posedge clk) if (rst_n && cmd_rd) void'(cmdq.pop_front());

  // writer: offers words while it has budget
  always @(negedge clk) begin
    dta_we <= 0;
    if (words_to_write > 0) begin
      dta_we <= 1;
      dta    <= word_of(g);
    end
  end
  always @(posedge clk) begin
    if (rst_n && mem_we) begin
      check(dta_we && dta_ready, "memory write without an accepted word");
      check(mem_waddr == {PW'((g / WPP) % NPKT), WW'(g % WPP)},
            $sformatf("write address %0d for word %0d", mem_waddr, g));
      check(mem_wdata == word_of(g), "write data");
      g++; words_to_write--;
    end
    if (rst_n && dta_we && !dta_ready) check(!mem_we, "write while not ready");
  end

  // packet sender model and request checks
  always @(posedge clk) begin
    if (rst_n && tx_req) begin
      int gp;
      n_req++;
      last_req = tx_req_data;
      check(tx_req_data.dst_mac == HOST, "destination MAC");
      check(tx_req_data.delay == delay_q, "delay in request");
      // the packet's global index: the newest full packet with this buffer number
      gp = (g / WPP) - 1;
      while (gp >= 0 && (gp % NPKT) != int'(tx_req_data.pkt_num)) gp--;
      check(gp >= 0, "request for a buffer never filled");
      check(int'(tx_req_data.set_num) == gp / NPKT,
            $sformatf("set number %0d for packet %0d (global %0d)", tx_req_data.set_num,
                      tx_req_data.pkt_num, gp));
      fork begin
        repeat (10) @(posedge clk);
        #1 tx_done = 1;
        @(posedge clk);
        #1 tx_done = 0;
      end join_none
    end
    if (rst_n && tx_event && tx_resent) n_resent++;
    if (rst_n && full_stall) n_stall++;
    if (rst_n && nca_up) n_up++;
    delay_q <= delay;
  end

  task automatic push(input cmd_kind_t k, input int s = 0, input int p = 0);
    cmdq.push_back('{kind: k, src_mac: HOST, set_num: SET_W'(s), pkt_num: PNUM_W'(p)});
  endtask

  task automatic wait_words_done();
    int t = 0;
    while (words_to_write > 0 && t < 2000) begin @(posedge clk); t++; end
  endtask

  task automatic ack(input int gp);
    push(CMD_ACK, gp / NPKT, gp % NPKT);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int r0;
    #22 rst_n = 1;
    repeat (5) @(posedge clk);
    // no data before START
    words_to_write = 3;
    repeat (20) @(posedge clk);
    check(g == 0 && !dta_ready && !running, "data accepted before START");
    words_to_write = 0;
    repeat (2) @(posedge clk);
    push(CMD_START);
    repeat (3) @(posedge clk);
    check(running && dta_ready, "START");
    check(n_req == 0, "request without data");

    // two packets, no acknowledge: cyclic retransmission
    words_to_write = 2 * WPP;
    wait_words_done();
    repeat (200) @(posedge clk);
    check(n_req >= 4, $sformatf("retransmission: %0d requests", n_req));
    check(n_resent >= 2, "retransmissions counted as resent");
    ack(0); ack(1);
    repeat (40) @(posedge clk);
    check(tail == 2 && head == 2, $sformatf("tail %0d head %0d after acks", tail, head));
    r0 = n_req;
    repeat (100) @(posedge clk);
    check(n_req == r0, "requests after everything was confirmed");

    // fill all buffers: stall
    words_to_write = 100;
    repeat (300) @(posedge clk);
    check(!dta_ready && full_stall, "full stall");
    check(g == 2 * WPP + NPKT * WPP, $sformatf("words accepted before stall: %0d", g));
    words_to_write = 0;
    // global packets 2..9 are now held; tail is at packet 2 (buffer 2)
    ack(3); ack(4);                  // out of order: tail must not move
    repeat (5) @(posedge clk);
    check(tail == 2, "tail moved over an unconfirmed buffer");
    ack(2 + NPKT);                   // wrong set number for buffer 2: ignored
    repeat (5) @(posedge clk);
    check(tail == 2, "ACK with wrong set number accepted");
    ack(2);                          // now tail jumps over 2, 3, 4
    repeat (10) @(posedge clk);
    if (tail == 5) n_tailjump++;
    check(n_tailjump == 1, $sformatf("tail %0d after the jump, expected 5", tail));
    repeat (5) @(posedge clk);
    check(dta_ready, "ready again after buffers were freed");
    // confirm the rest, keep writing across the wrap
    for (int p = 5; p < 10; p++) ack(p);
    words_to_write = 2 * WPP;
    wait_words_done();
    repeat (100) @(posedge clk);
    check(last_req.set_num >= 1, "set number incremented on wrap");
    for (int p = 10; p < g / WPP; p++) ack(p);
    repeat (50) @(posedge clk);
    check(tail == head, "all confirmed");
    check(n_up >= 1, "congestion avoidance raised the delay");
    check(delay > 100, "delay above its initial value");

    // STOP
    push(CMD_STOP);
    repeat (5) @(posedge clk);
    check(!running && !dta_ready, "STOP");
    r0 = g;
    words_to_write = 5;
    repeat (30) @(posedge clk);
    check(g == r0, "data accepted after STOP");
    words_to_write = 0;
    $display("requests %0d resent %0d stall cycles %0d delay ups %0d tail jumps %0d",
             n_req, n_resent, n_stall, n_up, n_tailjump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
