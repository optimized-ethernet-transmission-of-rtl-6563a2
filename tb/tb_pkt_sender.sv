// tb_pkt_sender: gives the packet sender three transmit requests at its
// default size (1024-byte packets) with a RAM model behind its read port,
// captures the GMII bytes and checks: preamble and SFD, every header field,
// all 1024 payload bytes against the RAM contents, the FCS against a CRC
// computed by the testbench, the frame length of 1060 bytes, the requested
// delay (tx_en rises at the delay+2-th clock edge after the edge that
// samples start) and done arriving 12 idle
// cycles after the last byte.
module tb_pkt_sender;
  timeunit 1ns; timeprecision 100ps;
  import fade_pkg::*;
  import tb_eth_pkg::*;
  localparam int NPKT = 32, WPP = 256, DW = 32, AW = 13;
  localparam logic [47:0] MY_MAC = 48'h02_46_8a_ce_f0_01;

  logic clk = 0, rst_n = 0, start = 0, done, busy, tx_en, tx_er;
  tx_req_t req = '0;
  logic [AW-1:0] mem_raddr;
  logic [DW-1:0] mem_rdata;
  logic [7:0] txd;
  logic [DW-1:0] mem [2**AW];
  logic ce = 1'b1;           // byte strobe: GMII, one byte per clock
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always_ff @(posedge clk) mem_rdata <= mem[mem_raddr];

  pkt_sender #(.NPKT(NPKT), .WPP(WPP), .DW(DW)) dut (.*, .my_mac(MY_MAC));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic send_and_check(input tx_req_t rq);
    bytes_t got, body;
    int wait_cyc = 0, idle = 0;
    logic [31:0] fcs;
    @(negedge clk);
    start = 1; req = rq;
    @(negedge clk);
    start = 0; req = '0;
    wait_cyc = 1;
    while (!tx_en) begin @(negedge clk); wait_cyc++; end
    check(wait_cyc == int'(rq.delay) + 3, $sformatf("delay: %0d cycles for %0d", wait_cyc, rq.delay));
    while (tx_en) begin got.push_back(txd); @(negedge clk); end
    check(got.size() == 1060, $sformatf("frame length %0d", got.size()));
    for (int i = 0; i < 7; i++) check(got[i] == 8'h55, "preamble");
    check(got[7] == 8'hd5, "sfd");
    for (int i = 8; i < got.size() - 4; i++) body.push_back(got[i]);
    for (int i = 0; i < 6; i++) check(body[i] == rq.dst_mac[(5-i)*8 +: 8], "dst mac");
    for (int i = 0; i < 6; i++) check(body[6+i] == MY_MAC[(5-i)*8 +: 8], "src mac");
    check({body[12], body[13]} == 16'hfade, "ethertype");
    check({body[14], body[15]} == 16'ha5a5, "opcode");
    check({body[16], body[17]} == rq.set_num, "set number");
    check({body[18], body[19]} == rq.pkt_num, "packet number");
    check({body[20], body[21], body[22], body[23]} == rq.delay, "delay field");
    for (int i = 0; i < 1024; i++) begin
      logic [31:0] w = mem[{rq.pkt_num[4:0], 8'(i / 4)}];
      check(body[24+i] == w[(3 - i % 4) * 8 +: 8], $sformatf("payload byte %0d", i));
    end
    fcs = crc32(body);
    for (int i = 0; i < 4; i++)
      check(got[got.size()-4+i] == fcs[i*8 +: 8], "fcs");
    while (!done) begin @(negedge clk); idle++; if (idle > 100) break; end
    check(idle == 11, $sformatf("done after %0d idle cycles", idle + 1));
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    check(crc_selftest(), "testbench crc self test");
    for (int a = 0; a < 2**AW; a++) mem[a] = $urandom;
    #20 rst_n = 1;
    repeat (3) @(posedge clk);
    send_and_check('{dst_mac: 48'h00_1b_21_aa_bb_cc, set_num: 16'h1234, pkt_num: 16'd3, delay: 32'd50});
    send_and_check('{dst_mac: 48'hff_00_ff_00_12_34, set_num: 16'h0007, pkt_num: 16'd31, delay: 32'd0});
    send_and_check('{dst_mac: 48'h00_1b_21_aa_bb_cc, set_num: 16'hffff, pkt_num: 16'd0, delay: 32'd333});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
