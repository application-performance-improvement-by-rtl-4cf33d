// One ring-oscillator sensor macro: activation register, ring oscillator,
// counter and output register.
// The 1-bit activation register is clocked by the system clock and loads
// `activate` when `enable` (its clock enable) is high; its output starts or
// stops the ring and enables the output register. The ring's output clocks the
// counter (ro_counter). After a measurement window the frozen count_q is read
// through the network multiplexer in the system clock domain; it is stable
// then because the ring has stopped, so no synchronizer is used.
// Interface: sys_clk/sys_rst_n (system domain), enable/activate (activation
// register CE/D), clr (counter clear), count_q (result c_ro).
// Structure follows the published sensor figure; the delay parameter only
// affects the behavioural ring model.
`timescale 1ns/1ps
module ro_sensor #(
  parameter int unsigned COUNT_W          = 16,
  parameter int unsigned ELEMENT_DELAY_PS = 312
) (
  input  logic               sys_clk,
  input  logic               sys_rst_n,
  input  logic               enable,
  input  logic               activate,
  input  logic               clr,
  output logic [COUNT_W-1:0] count_q
);

  logic act_q;
  logic ro_clk;

  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n)
      act_q <= 1'b0;
    else if (enable)
      act_q <= activate;
  end

  ring_oscillator #(
    .ELEMENT_DELAY_PS(ELEMENT_DELAY_PS)
  ) u_ring (
    .enable(act_q),
    .ro_clk(ro_clk)
  );

  ro_counter #(
    .COUNT_W(COUNT_W)
  ) u_counter (
    .ro_clk (ro_clk),
    .clr    (clr),
    .active (act_q),
    .count_q(count_q)
  );

endmodule
