// ack_cmd_fifo: the acknowledge and commands FIFO.
//
// Carries the commands parsed by the packet receiver (START, STOP, ACK with
// its set and packet number) from the receiver clock domain into the system
// clock domain, where the descriptor manager consumes them. That it is a FIFO
// and that it is the clock-domain crossing follows the core's description;
// the construction is this design's own: a classic asynchronous FIFO with
// binary read and write pointers one bit wider than the address, their Gray
// codes crossing the boundary through two-flop synchronizers.
//
// Interface: the write side pushes wdata on wr_en when full is low; the
// read side sees the oldest entry on rdata whenever empty is low (first word
// fall-through) and pops it with rd_en. A push is visible to the reader
// three rclk edges later at most; a pop frees space for the writer after
// the same delay in wclk. Pushing while full or popping while empty is
// ignored and flagged by an assertion.
module ack_cmd_fifo #(
  parameter int unsigned W  = $bits(fade_pkg::cmd_t),  // entry width
  parameter int unsigned AW = 4                         // log2 of depth
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);

  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      a_no_overflow: assert (!(wr_en && full));
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // Full when the write pointer's Gray code equals the read pointer's with
  // its two top bits inverted.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      a_no_underflow: assert (!(rd_en && empty));
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

endmodule
