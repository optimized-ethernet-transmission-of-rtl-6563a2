// nca: network congestion avoidance, the adaptive inter-packet delay.
//
// Every transmission of a DATA packet is reported with tx_event; tx_resent
// tells whether it was a first transmission (S flag clear, counted in
// C_sent) or a retransmission (S flag set, counted in C_rsnt). After
// INTERVAL transmissions the ratio C_rsnt / C_sent is compared with two
// thresholds and the delay is scaled:
//   C_rsnt / C_sent > T_high  ->  delay := delay * alpha_incr
//   C_rsnt / C_sent < T_low   ->  delay := delay * alpha_decr
// and both counters restart. The rule, the thresholds T_high = 1/8 and
// T_low = 1/32, the factors 1.25 and 0.75 and the 10000-packet interval
// follow the core's description. This design's choices: the thresholds are
// powers of two, so the comparisons are C_rsnt << 3 > C_sent and
// C_rsnt << 5 < C_sent with no divider; the factors are 1 + 2^-2 and
// 1 - 2^-2, applied as d + (d >> 2) and d - (d >> 2); an increase adds at
// least 1 so that a zero or tiny delay can grow, the delay saturates at
// MAX_DELAY and never falls below MIN_DELAY; clear (used on START) restores
// INIT_DELAY and zeroes the counters.
//
// Timing: delay changes one cycle after the tx_event that completes an
// interval; adj_up / adj_down pulse in that same cycle.
module nca #(
  parameter int unsigned DW          = fade_pkg::DELAY_W,
  parameter int unsigned INTERVAL    = 10000,
  parameter int unsigned HIGH_SHIFT  = 3,    // T_high = 2^-3 = 1/8
  parameter int unsigned LOW_SHIFT   = 5,    // T_low  = 2^-5 = 1/32
  parameter int unsigned INCR_SHIFT  = 2,    // alpha_incr = 1 + 2^-2 = 1.25
  parameter int unsigned DECR_SHIFT  = 2,    // alpha_decr = 1 - 2^-2 = 0.75
  parameter logic [DW-1:0] INIT_DELAY = DW'(0),
  parameter logic [DW-1:0] MIN_DELAY  = DW'(0),
  parameter logic [DW-1:0] MAX_DELAY  = DW'(32'h00ff_ffff)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          tx_event,
  input  logic          tx_resent,
  output logic [DW-1:0] delay,
  output logic          adj_up,
  output logic          adj_down
);

  localparam int unsigned CW = $clog2(INTERVAL + 1) + LOW_SHIFT + 1;

  logic [CW-1:0] c_sent, c_rsnt, c_sent_nx, c_rsnt_nx;
  logic          last;
  logic          go_up, go_down;
  logic [DW:0]   up_val;
  logic [DW-1:0] up_step, down_val;

  assign c_sent_nx = c_sent + CW'(!tx_resent);
  assign c_rsnt_nx = c_rsnt + CW'(tx_resent);
  assign last      = tx_event && (c_sent_nx + c_rsnt_nx == CW'(INTERVAL));

  assign go_up   = last && ((c_rsnt_nx << HIGH_SHIFT) > c_sent_nx);
  assign go_down = last && ((c_rsnt_nx << LOW_SHIFT)  < c_sent_nx);

  assign up_step  = ((delay >> INCR_SHIFT) == '0) ? DW'(1) : (delay >> INCR_SHIFT);
  assign up_val   = {1'b0, delay} + {1'b0, up_step};
  assign down_val = delay - (delay >> DECR_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_sent   <= '0;
      c_rsnt   <= '0;
      delay    <= INIT_DELAY;
      adj_up   <= 1'b0;
      adj_down <= 1'b0;
    end else begin
      adj_up   <= go_up;
      adj_down <= go_down;
      if (clear) begin
        c_sent <= '0;
        c_rsnt <= '0;
        delay  <= INIT_DELAY;
      end else if (tx_event) begin
        if (last) begin
          c_sent <= '0;
          c_rsnt <= '0;
        end else begin
          c_sent <= c_sent_nx;
          c_rsnt <= c_rsnt_nx;
        end
        if (go_up)
          delay <= (up_val > {1'b0, MAX_DELAY}) ? MAX_DELAY : up_val[DW-1:0];
        else if (go_down)
          delay <= (down_val > MIN_DELAY) ? down_val : MIN_DELAY;
      end
    end
  end

endmodule
