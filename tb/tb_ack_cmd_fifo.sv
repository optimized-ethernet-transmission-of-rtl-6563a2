// tb_ack_cmd_fifo: pushes 400 random entries from a 125 MHz write clock and
// pops them at random moments on an unrelated 77 MHz read clock. Checks that
// every entry arrives once and in order, that full is raised after 2**AW
// pushes without pops, that empty is raised when everything was read, and
// that no entry is lost when the writer respects full.
module tb_ack_cmd_fifo;
  timeunit 1ns; timeprecision 100ps;
  localparam int W = 40, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, pushed = 0, popped = 0;
  localparam int N = 400;

  always #4    wclk = ~wclk;
  always #6.5  rclk = ~rclk;

  ack_cmd_fifo #(.W(W), .AW(AW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase 1: fill without reading, phase 2: random traffic
  initial begin
    #30 wrst_n = 1; rrst_n = 1;
    repeat (5) @(posedge wclk);
    while (!full) begin
      @(negedge wclk);
      if (!full) begin
        wr_en = 1; wdata = {$urandom, $urandom} ; model.push_back(wdata); pushed++;
      end
      @(posedge wclk); #0.1 wr_en = 0;
    end
    checks++;
    if (pushed != 2**AW) begin
      failures++; $display("full after %0d pushes, expected %0d", pushed, 2**AW);
    end
    while (pushed < N) begin
      @(negedge wclk);
      wr_en = 0;
      if (!full && ($urandom % 3 != 0)) begin
        wr_en = 1; wdata = {$urandom, $urandom}; model.push_back(wdata); pushed++;
      end
    end
    @(negedge wclk) wr_en = 0;
  end

  initial begin
    #30;
    wait (pushed == 2**AW);
    repeat (20) @(posedge rclk);
    while (popped < N) begin
      @(negedge rclk);
      rd_en = 0;
      if (!empty && ($urandom % 2 == 0)) begin
        checks++;
        if (model.size() == 0 || rdata !== model[0]) begin
          failures++;
          if (failures < 5) $display("pop %0d: got %h", popped, rdata);
        end
        if (model.size() != 0) void'(model.pop_front());
        rd_en = 1; popped++;
      end
    end
    @(negedge rclk) rd_en = 0;
    repeat (5) @(posedge rclk); #1;
    checks++;
    if (!empty) begin failures++; $display("not empty at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
