// Behavioural model (not synthesizable) of the sensing ring oscillator.
// The real part is an asynchronous loop: an input gate that admits the
// activation signal, followed by three inverting stages, each a LUT followed by
// a pass-through latch, with the last stage fed back to the gate. Placement,
// routing and LUT pins are pinned by constraints so that every copy has the
// same structure and only the local silicon sets its speed. That loop cannot
// be expressed as synchronous logic, so this model reproduces its behaviour:
// while `enable` is high the output toggles every half period, where the half
// period is the sum of the delays of the four loop elements (gate and three
// inverting stages, each LUT plus latch); while `enable` is low the loop rests
// at 0. With the default 312 ps per element the model runs at about 400 MHz,
// inside the 380-440 MHz range measured on 28 nm devices; the per-element
// delay is this model's own figure.
// Interface: enable (activation register output), ro_clk (the RO clock that
// drives the sensor's counter).
`timescale 1ns/1ps
module ring_oscillator #(
  parameter int unsigned ELEMENT_DELAY_PS = 312,
  parameter int unsigned LOOP_ELEMENTS    = 4
) (
  input  logic enable,
  output logic ro_clk
);

  localparam real HALF_PERIOD_NS = real'(ELEMENT_DELAY_PS * LOOP_ELEMENTS) / 1000.0;

  initial ro_clk = 1'b0;

  always begin
    if (!enable) begin
      ro_clk = 1'b0;
      @(posedge enable);
    end
    #(HALF_PERIOD_NS);
    if (enable)
      ro_clk = ~ro_clk;
    else
      ro_clk = 1'b0;
  end

endmodule
