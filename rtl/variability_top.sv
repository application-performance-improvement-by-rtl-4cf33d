// Top level: the two hardware parts of the variability study side by side.
//  * u_sense: the ring-oscillator sensing infrastructure, NUM_RO sensors
//    with a command/readout port on AXI-Lite (ro_axil_*). It maps how fast
//    the silicon is at each position of the die.
//  * u_boost: the frequency-boost framework around the user IP (a 64-tap
//    FIR filter by default), with the clock manager's AXI-Lite port
//    (clk_axil_*) and the DMA-side AXI-Stream ports (s_axis_*, m_axis_*).
// Both run from the same 100 MHz system clock `clk` and active-low reset.
// The CPU, its DDR memory and the DMA controller sit outside: their AXI
// sides are this module's ports. In the published flow the two parts are
// separate experiments (measure the die, then boost an application); they
// share nothing but clock and reset here.
`timescale 1ns/1ps
module variability_top
  import axil_pkg::*;
#(
  parameter int unsigned N_RO          = ro_pkg::NUM_RO,
  parameter int unsigned TAPS          = 64,
  parameter int unsigned DIN_W         = 10,
  parameter int unsigned ACC_W         = 26,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned LOCK_TIME_NS  = 28000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        ro_axil_req,
  output axil_rsp_t        ro_axil_rsp,
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

  ro_infrastructure #(
    .N_RO(N_RO)
  ) u_sense (
    .clk     (clk),
    .rst_n   (rst_n),
    .axil_req(ro_axil_req),
    .axil_rsp(ro_axil_rsp)
  );

  boost_framework #(
    .TAPS        (TAPS),
    .DIN_W       (DIN_W),
    .ACC_W       (ACC_W),
    .FIFO_DEPTH  (FIFO_DEPTH),
    .LOCK_TIME_NS(LOCK_TIME_NS)
  ) u_boost (
    .clk          (clk),
    .rst_n        (rst_n),
    .clk_axil_req (clk_axil_req),
    .clk_axil_rsp (clk_axil_rsp),
    .s_axis_tvalid(s_axis_tvalid),
    .s_axis_tready(s_axis_tready),
    .s_axis_tdata (s_axis_tdata),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready),
    .m_axis_tdata (m_axis_tdata),
    .ip_clk_locked(ip_clk_locked)
  );

endmodule
