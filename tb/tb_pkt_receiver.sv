// tb_pkt_receiver: sends GMII frames to the packet receiver and checks what
// it writes into the command FIFO. Frames sent: START, ACK and STOP addressed
// to the board (must be written, with kind, source MAC, set and packet
// number), and frames that must be ignored: bad FCS, another target MAC,
// another ethertype, a DATA opcode, a frame shorter than 64 bytes, a frame
// with rx_er, and a valid ACK while the FIFO is full (reported as dropped).
module tb_pkt_receiver;
  timeunit 1ns; timeprecision 100ps;
  import fade_pkg::*;
  import tb_eth_pkg::*;
  localparam logic [47:0] MY_MAC   = 48'h02_46_8a_ce_f0_01;
  localparam logic [47:0] HOST_MAC = 48'h00_1b_21_aa_bb_cc;

  logic clk = 0, rst_n = 0;
  logic [7:0] rxd = '0;
  logic rx_dv = 0, rx_er = 0, fifo_full = 0;
  logic fifo_we, cmd_ok, bad_frame, dropped;
  cmd_t fifo_wdata;
  cmd_t got[$];
  logic ce = 1'b1;           // byte strobe: GMII, one byte per clock
  int checks = 0, failures = 0, n_bad = 0, n_drop = 0;

  always #4 clk = ~clk;

  pkt_receiver dut (.*, .my_mac(MY_MAC));

  always @(posedge clk) begin
    if (rst_n && fifo_we) got.push_back(fifo_wdata);
    if (rst_n && bad_frame) n_bad++;
    if (rst_n && dropped) n_drop++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input bytes_t w, input int er_at = -1);
    foreach (w[i]) begin
      @(negedge clk);
      rx_dv = 1; rxd = w[i]; rx_er = (i == er_at);
    end
    @(negedge clk);
    rx_dv = 0; rxd = '0; rx_er = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic expect_cmd(input cmd_kind_t k, input logic [15:0] s, input logic [15:0] p);
    check(got.size() == 1, $sformatf("one entry expected, %0d written", got.size()));
    if (got.size() != 0) begin
      check(got[0].kind == k, "kind");
      check(got[0].src_mac == HOST_MAC, "source mac");
      if (k == CMD_ACK) check(got[0].set_num == s && got[0].pkt_num == p, "set/packet number");
    end
    got.delete();
  endtask

  initial begin
    bytes_t b;
    #20 rst_n = 1;
    repeat (3) @(negedge clk);
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0001, 0, 0)));
    expect_cmd(CMD_START, 0, 0);
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 16'h0102, 16'h001f)));
    expect_cmd(CMD_ACK, 16'h0102, 16'h001f);
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0005, 0, 0)));
    expect_cmd(CMD_STOP, 0, 0);
    // frames to ignore
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 1, 2), 1));
    check(got.size() == 0 && n_bad == 1, "bad FCS rejected");
    send(on_wire(cmd_body(48'h02_46_8a_ce_f0_02, HOST_MAC, 16'h0003, 1, 2)));
    check(got.size() == 0, "other target ignored");
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 1, 2, 16'h0800)));
    check(got.size() == 0, "other ethertype ignored");
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'ha5a5, 1, 2)));
    check(got.size() == 0, "DATA opcode ignored");
    b = cmd_body(MY_MAC, HOST_MAC, 16'h0003, 1, 2);
    b = b[0:39];
    send(on_wire(b));
    check(got.size() == 0 && n_bad == 2, "short frame rejected");
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 1, 2)), 30);
    check(got.size() == 0 && n_bad == 3, "rx_er frame rejected");
    fifo_full = 1;
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 1, 2)));
    check(got.size() == 0 && n_drop == 1, "full FIFO drop");
    fifo_full = 0;
    // back to back after all this, still working
    send(on_wire(cmd_body(MY_MAC, HOST_MAC, 16'h0003, 16'hbeef, 16'h0000)));
    expect_cmd(CMD_ACK, 16'hbeef, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
