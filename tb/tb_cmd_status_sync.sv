// tb_cmd_status_sync: sends 50 random transmit requests from a 100 MHz
// system clock to a 125 MHz transmitter clock. Checks that each request
// gives exactly one t_start pulse with the request's data, that s_busy is
// high until the matching s_done, that s_done pulses once per t_done, and
// the crossing latencies (t_start within 4 tx cycles, s_done within 4 sys
// cycles).
module tb_cmd_status_sync;
  timeunit 1ns; timeprecision 100ps;
  import fade_pkg::*;
  logic s_clk = 0, t_clk = 0, s_rst_n = 0, t_rst_n = 0;
  logic s_req = 0, s_busy, s_done, t_start, t_done = 0;
  tx_req_t s_req_data = '0, t_req_data;
  int checks = 0, failures = 0, starts = 0, dones = 0;
  tx_req_t sent;

  always #5 s_clk = ~s_clk;
  always #4 t_clk = ~t_clk;

  cmd_status_sync dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge t_clk) if (t_start && t_rst_n) starts++;
  always @(posedge s_clk) if (s_done && s_rst_n) dones++;

  initial begin
    #25 s_rst_n = 1; t_rst_n = 1;
    repeat (3) @(posedge s_clk);
    for (int n = 0; n < 50; n++) begin
      int lat;
      @(negedge s_clk);
      sent = '{dst_mac: {$urandom, $urandom}, set_num: 16'($urandom),
               pkt_num: 16'($urandom), delay: $urandom};
      s_req = 1; s_req_data = sent;
      @(negedge s_clk);
      s_req = 0; s_req_data = '0;
      checks++; if (!s_busy) begin failures++; $display("busy not set"); end
      lat = 0;
      while (!t_start) begin @(posedge t_clk); #1; lat++; end
      checks++; if (lat > 4) begin failures++; $display("start latency %0d", lat); end
      checks++; if (t_req_data !== sent) begin failures++; $display("data mismatch"); end
      repeat ($urandom % 10) @(posedge t_clk);
      checks++; if (!s_busy) begin failures++; $display("busy dropped early"); end
      @(negedge t_clk) t_done = 1;
      @(negedge t_clk) t_done = 0;
      lat = 0;
      while (!s_done) begin @(posedge s_clk); #1; lat++; end
      checks++; if (lat > 4) begin failures++; $display("done latency %0d", lat); end
      @(posedge s_clk); #1;
      checks++; if (s_busy) begin failures++; $display("busy still set"); end
    end
    repeat (10) @(posedge s_clk);
    checks++; if (starts != 50 || dones != 50) begin
      failures++; $display("starts %0d dones %0d", starts, dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
