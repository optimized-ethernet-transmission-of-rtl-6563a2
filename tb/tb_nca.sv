// tb_nca: drives the congestion avoidance unit with intervals of 40
// transmissions and a chosen number of retransmissions in each, and checks
// the resulting delay against a reference computed here:
// ratio > 1/8 -> d + max(floor(d/4), 1), ratio < 1/32 -> d - floor(d/4),
// otherwise unchanged. Also checks that clear restores the initial delay.
module tb_nca;
  timeunit 1ns; timeprecision 100ps;
  localparam int INTERVAL = 40;
  logic clk = 0, rst_n = 0, clear = 0, tx_event = 0, tx_resent = 0;
  logic [31:0] delay;
  logic adj_up, adj_down;
  int checks = 0, failures = 0;
  longint unsigned ref_d = 1000;

  always #5 clk = ~clk;

  nca #(.INTERVAL(INTERVAL), .INIT_DELAY(32'd1000)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_interval(input int resent);
    int sent = INTERVAL - resent;
    // reference
    if (resent * 8 > sent) ref_d = ref_d + ((ref_d / 4 == 0) ? 1 : ref_d / 4);
    else if (resent * 32 < sent) ref_d = ref_d - ref_d / 4;
    for (int i = 0; i < INTERVAL; i++) begin
      @(negedge clk);
      tx_event = 1; tx_resent = (i < resent);
      @(negedge clk);
      tx_event = 0;
      // the delay must not change before the interval completes
      if (i < INTERVAL - 1) begin
        checks++;
        if (adj_up || adj_down) begin failures++; $display("early adjust"); end
      end
    end
    @(negedge clk);
    checks++;
    if (delay != 32'(ref_d)) begin
      failures++;
      $display("resent %0d: delay %0d expected %0d", resent, delay, ref_d);
    end
  endtask

  initial begin
    #22 rst_n = 1;
    @(negedge clk);
    checks++; if (delay != 1000) failures++;
    run_interval(10);  // 10/30 > 1/8: up
    run_interval(10);  // up
    run_interval(5);   // 5/35 > 1/8 (0.143): up
    run_interval(4);   // 4/36 = 0.111: between thresholds, unchanged
    run_interval(1);   // 1/39 = 0.0256 < 1/32: down
    run_interval(0);   // down
    for (int k = 0; k < 40; k++) run_interval(0);  // keep going down
    checks++; if (delay > 3) begin failures++; $display("did not fall: %0d", delay); end
    for (int k = 0; k < 6; k++) run_interval(20); // up from a tiny value
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    ref_d = 1000;
    checks++; if (delay != 1000) begin failures++; $display("clear failed"); end
    run_interval(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
