// Counter half of the ring-oscillator sensor.
// A COUNT_W-bit up-counter is clocked by the RO clock itself, so it advances
// once per rising RO edge. Its value is copied into a COUNT_W-bit output
// register on every RO edge while `active` (the sensor's activation register)
// is high. When the activation drops the ring stops, so both registers freeze
// and count_q holds c_ro, from which software computes f_ro = c_ro / T.
// Because the output register samples the counter before each increment,
// c_ro equals the number of rising RO edges in the window minus one.
// `clr` (asynchronous, active high, from the system clock domain) clears both
// registers; it is only raised while the ring is stopped.
// The 16-bit counter, the output register and its enable follow the published
// sensor; the asynchronous clear is this design's choice.
`timescale 1ns/1ps
module ro_counter #(
  parameter int unsigned COUNT_W = 16
) (
  input  logic               ro_clk,
  input  logic               clr,
  input  logic               active,
  output logic [COUNT_W-1:0] count_q
);

  logic [COUNT_W-1:0] cnt;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)
      count_q <= '0;
    else if (active)
      count_q <= cnt;
  end

endmodule
