// Reset synchronizer: asserts its output asynchronously with rst_n and
// releases it on the second rising edge of clk after rst_n rises, so a clock
// domain leaves reset cleanly even when its clock starts late (the IP clock
// only runs once the clock manager has locked). This is this design's own
// reset scheme; the published framework does not describe one.
`timescale 1ns/1ps
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta       <= 1'b0;
      rst_n_sync <= 1'b0;
    end else begin
      meta       <= 1'b1;
      rst_n_sync <= meta;
    end
  end

endmodule
