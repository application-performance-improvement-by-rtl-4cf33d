// The network of NUM_RO ring-oscillator sensors spread over the fabric, and the
// multiplexer that forwards one sensor's result.
// All sensors share the activation register inputs (enable/activate) and the
// counter clear, so they start and stop together and measure over the same
// window T. `sel` picks the sensor whose count appears on `count`; an address
// beyond the last sensor reads as zero. The multiplexer is combinational; the
// caller registers its output.
// The 408 sensors and the result multiplexer follow the published design. In
// simulation each position gets its own ring delay from
// ro_pkg::ro_element_delay_ps(), standing in for process variation; on silicon
// the spread comes from the die and the parameters have no effect.
`timescale 1ns/1ps
module ro_network
  import ro_pkg::*;
#(
  parameter int unsigned N_RO          = NUM_RO,
  parameter int unsigned CNT_W         = COUNT_W,
  parameter int unsigned ADDR_W        = RO_ADDR_W,
  parameter int unsigned BASE_DELAY_PS = 290,
  parameter int unsigned STEP_DELAY_PS = 1
) (
  input  logic              sys_clk,
  input  logic              sys_rst_n,
  input  logic              enable,
  input  logic              activate,
  input  logic              clr,
  input  logic [ADDR_W-1:0] sel,
  output logic [CNT_W-1:0]  count
);

  logic [CNT_W-1:0] counts [N_RO];

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ro_sensor #(
      .COUNT_W         (CNT_W),
      .ELEMENT_DELAY_PS(ro_element_delay_ps(i, BASE_DELAY_PS, STEP_DELAY_PS))
    ) u_sensor (
      .sys_clk  (sys_clk),
      .sys_rst_n(sys_rst_n),
      .enable   (enable),
      .activate (activate),
      .clr      (clr),
      .count_q  (counts[i])
    );
  end

  localparam int unsigned IDX_W = (N_RO > 1) ? $clog2(N_RO) : 1;

  always_comb begin
    count = '0;
    for (int i = 0; i < N_RO; i++)
      if (32'(sel) == i)
        count = counts[IDX_W'(i)];
  end

endmodule
