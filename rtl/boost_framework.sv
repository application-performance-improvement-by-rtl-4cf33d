// Programmable-logic side of the frequency-boost framework.
// The user IP (here the FIR filter) runs in its own clock domain, driven by a
// clock manager that the CPU reprograms at run time through an AXI-Lite
// register bank. Two dual-clock FIFOs of FIFO_DEPTH words cross the samples
// between the fixed 100 MHz domain of the DMA (AXI-Stream slave s_axis_* in,
// AXI-Stream master m_axis_* out) and the IP domain. Software runs the
// application at the rated frequency to record a reference output, then
// raises the IP clock step by step, re-running the same input and comparing
// outputs until they differ; the last correct frequency is kept.
// The IP clock is stopped while the clock manager relocks; the FIFOs keep
// their contents across a relock, so software only reconfigures between
// runs. The IP domain reset is the global reset, released synchronously to
// the IP clock once it runs.
// Structure (IP, two FIFOs, PLL with AXI-Lite control, 100 MHz DMA side)
// follows the published framework; the stream handshakes, the full-precision
// 26-bit output word and the reset scheme are this design's choices.
// Timing: a sample entering s_axis reaches m_axis after the FIFO
// synchronizer latency (a few cycles of each clock) plus 3 IP cycles.
`timescale 1ns/1ps
module boost_framework
  import axil_pkg::*;
#(
  parameter int unsigned TAPS         = 64,
  parameter int unsigned DIN_W        = 10,
  parameter int unsigned ACC_W        = 26,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter logic [9:0]  RST_MULT     = 10'd14,
  parameter logic [7:0]  RST_DIVCLK   = 8'd1,
  parameter logic [7:0]  RST_OUTDIV   = 8'd10,
  parameter int unsigned LOCK_TIME_NS = 28000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        clk_axil_req,
  output axil_rsp_t        clk_axil_rsp,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic [DIN_W-1:0] s_axis_tdata,
  output logic             m_axis_tvalid,
  input  logic             m_axis_tready,
  output logic [ACC_W-1:0] m_axis_tdata,
  output logic             ip_clk_locked
);

  logic [9:0] mult;
  logic [7:0] divclk, outdiv;
  logic       load;
  logic       ip_clk;
  logic       ip_rst_n;
  logic       dma_rst_n;

  rst_sync u_dma_rst (.clk(clk),    .rst_n(rst_n), .rst_n_sync(dma_rst_n));
  rst_sync u_ip_rst  (.clk(ip_clk), .rst_n(rst_n), .rst_n_sync(ip_rst_n));

  clk_reconfig_regs #(
    .RST_MULT  (RST_MULT),
    .RST_DIVCLK(RST_DIVCLK),
    .RST_OUTDIV(RST_OUTDIV)
  ) u_regs (
    .clk     (clk),
    .rst_n   (dma_rst_n),
    .axil_req(clk_axil_req),
    .axil_rsp(clk_axil_rsp),
    .mult    (mult),
    .divclk  (divclk),
    .outdiv  (outdiv),
    .load    (load),
    .locked  (ip_clk_locked)
  );

  pll_model #(
    .LOCK_TIME_NS(LOCK_TIME_NS)
  ) u_pll (
    .ref_clk(clk),
    .rst    (!dma_rst_n),
    .mult   (mult),
    .divclk (divclk),
    .outdiv (outdiv),
    .load   (load),
    .clk_out(ip_clk),
    .locked (ip_clk_locked)
  );

  logic             in_valid, in_ready;
  logic [DIN_W-1:0] in_data;
  logic             out_valid, out_ready;
  logic [ACC_W-1:0] out_data;

  async_fifo #(
    .WIDTH(DIN_W),
    .DEPTH(FIFO_DEPTH)
  ) u_in_fifo (
    .w_clk  (clk),
    .w_rst_n(dma_rst_n),
    .w_valid(s_axis_tvalid),
    .w_ready(s_axis_tready),
    .w_data (s_axis_tdata),
    .r_clk  (ip_clk),
    .r_rst_n(ip_rst_n),
    .r_valid(in_valid),
    .r_ready(in_ready),
    .r_data (in_data)
  );

  fir_filter #(
    .TAPS  (TAPS),
    .DIN_W (DIN_W),
    .COEF_W(DIN_W),
    .ACC_W (ACC_W)
  ) u_ip (
    .clk      (ip_clk),
    .rst_n    (ip_rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data)
  );

  async_fifo #(
    .WIDTH(ACC_W),
    .DEPTH(FIFO_DEPTH)
  ) u_out_fifo (
    .w_clk  (ip_clk),
    .w_rst_n(ip_rst_n),
    .w_valid(out_valid),
    .w_ready(out_ready),
    .w_data (out_data),
    .r_clk  (clk),
    .r_rst_n(dma_rst_n),
    .r_valid(m_axis_tvalid),
    .r_ready(m_axis_tready),
    .r_data (m_axis_tdata)
  );

  a_s_axis_hold: assert property (@(posedge clk) disable iff (!dma_rst_n)
                                  s_axis_tvalid && !s_axis_tready |=> s_axis_tvalid);

endmodule
