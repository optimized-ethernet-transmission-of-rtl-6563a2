// rst_sync: reset synchronizer. Asserts rst_n_out asynchronously with
// rst_n_in and releases it two clk edges after rst_n_in is released, so each
// clock domain of the core leaves reset cleanly on its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end

endmodule
