// Programmable-logic side of the variability sensing infrastructure: the
// AXI-Lite command decoder wired to the network of ring-oscillator sensors.
// The CPU starts all rings with a control word, times the window T with its
// own timer, stops them with a second control word, and then reads the 408
// counts one by one (write the address, read the count); f_ro = c_ro / T.
// Interface: clk/rst_n (system clock, 100 MHz in the published set-up),
// axil_req/axil_rsp (AXI-Lite slave). The split into a command port and a
// multiplexed sensor array follows the published infrastructure; timing the
// window in software rather than in a PL timer does too.
`timescale 1ns/1ps
module ro_infrastructure
  import axil_pkg::*;
  import ro_pkg::*;
#(
  parameter int unsigned N_RO          = NUM_RO,
  parameter int unsigned CNT_W         = COUNT_W,
  parameter int unsigned BASE_DELAY_PS = 290,
  parameter int unsigned STEP_DELAY_PS = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp
);

  logic                 ro_enable, ro_activate, ro_clr;
  logic [RO_ADDR_W-1:0] ro_sel;
  logic [CNT_W-1:0]     ro_count;

  ro_axil_ctrl #(
    .CNT_W (CNT_W),
    .ADDR_W(RO_ADDR_W)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .axil_req   (axil_req),
    .axil_rsp   (axil_rsp),
    .ro_enable  (ro_enable),
    .ro_activate(ro_activate),
    .ro_clr     (ro_clr),
    .ro_sel     (ro_sel),
    .ro_count   (ro_count)
  );

  ro_network #(
    .N_RO         (N_RO),
    .CNT_W        (CNT_W),
    .ADDR_W       (RO_ADDR_W),
    .BASE_DELAY_PS(BASE_DELAY_PS),
    .STEP_DELAY_PS(STEP_DELAY_PS)
  ) u_net (
    .sys_clk  (clk),
    .sys_rst_n(rst_n),
    .enable   (ro_enable),
    .activate (ro_activate),
    .clr      (ro_clr),
    .sel      (ro_sel),
    .count    (ro_count)
  );

endmodule
