// Fully parallel Direct-Form-I FIR filter, the user IP whose clock the
// framework pushes beyond its rated frequency.
// A TAPS-deep delay line of signed DIN_W-bit samples feeds TAPS multipliers
// that all work in the same cycle; their products are summed into a signed
// ACC_W-bit result. Three register stages: the delay line (stage 1), the
// products (stage 2) and the sum (stage 3), so one sample is accepted and one
// result produced per clock and a sample's result appears on the third clock
// edge after it is accepted. The pipeline stalls as a whole while a result is
// waiting and out_ready is low (in_ready = !out_valid || out_ready).
// Coefficients come from fir_pkg::fir_coef() and are COEF_W bits wide.
// Published sizes: 64 taps, 10-bit samples, 26-bit internal precision (IP1,
// the defaults) and 32 taps, 7-bit samples, 19-bit internal precision (IP2).
// The coefficient width equal to the sample width (so that products plus the
// log2(TAPS) growth of the sum give exactly the internal width), the
// coefficient values, the pipeline split and the full-precision output are
// this design's choices.
`timescale 1ns/1ps
module fir_filter #(
  parameter int unsigned TAPS   = 64,
  parameter int unsigned DIN_W  = 10,
  parameter int unsigned COEF_W = 10,
  parameter int unsigned ACC_W  = 26
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [DIN_W-1:0] in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [ACC_W-1:0] out_data
);

  localparam int unsigned PROD_W = DIN_W + COEF_W;

  logic signed [DIN_W-1:0]  x    [TAPS];
  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [ACC_W-1:0]  sum;
  logic                     v1, v2;
  logic                     advance;

  assign advance  = !out_valid || out_ready;
  assign in_ready = advance;

  // Stage 1: delay line, x[0] is the newest sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) x[i] <= '0;
      v1 <= 1'b0;
    end else if (advance) begin
      v1 <= in_valid;
      if (in_valid) begin
        x[0] <= in_data;
        for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
      end
    end
  end

  // Stage 2: all products in parallel.
  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    localparam logic signed [COEF_W-1:0] C = COEF_W'(fir_pkg::fir_coef(i, TAPS, COEF_W));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        prod[i] <= '0;
      else if (advance)
        prod[i] <= PROD_W'(x[i]) * PROD_W'(C);
    end
  end

  // Stage 3: sum of products.
  always_comb begin
    sum = '0;
    for (int i = 0; i < TAPS; i++) sum += ACC_W'(prod[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2        <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (advance) begin
      v2        <= v1;
      out_valid <= v2;
      out_data  <= sum;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
