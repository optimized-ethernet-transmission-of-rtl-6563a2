// tb_pkt_buf_mem: writes a pseudo-random word to every address of the
// packet buffers memory through the write port (50 MHz), then reads every
// address through the read port (62.5 MHz) and checks the data and the
// one-cycle read latency.
module tb_pkt_buf_mem;
  timeunit 1ns; timeprecision 100ps;
  localparam int DW = 32, AW = 13;
  logic wclk = 0, rclk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  always #10 wclk = ~wclk;
  always #8  rclk = ~rclk;

  pkt_buf_mem #(.DW(DW), .AW(AW)) dut (.*);

  function automatic logic [DW-1:0] pattern(input int a);
    return DW'(a * 32'h9e37_79b1 ^ 32'h5a5a_0f0f);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge wclk);
      we = 1; waddr = AW'(a); wdata = pattern(a);
    end
    @(negedge wclk) we = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge rclk) raddr = AW'(a);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== pattern(a)) begin
        failures++;
        if (failures < 5) $display("addr %0d: got %h expected %h", a, rdata, pattern(a));
      end
    end
    // latency: the data of a new address must not appear before the edge
    @(negedge rclk) raddr = 13'd5;
    @(posedge rclk); #1;
    @(negedge rclk) raddr = 13'd6;
    #1; checks++;
    if (rdata !== pattern(5)) failures++;
    @(posedge rclk); #1; checks++;
    if (rdata !== pattern(6)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
