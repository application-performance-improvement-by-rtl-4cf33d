// AXI4-Lite request/response bundles shared by the two register ports of the
// design (the ring-oscillator command port and the clock-manager port).
// The master-to-slave signals travel in axil_req_t and the slave-to-master
// signals in axil_rsp_t, so a port is two struct signals instead of nineteen
// loose wires. Widths are the 32-bit address and data of a Zynq general
// purpose AXI port; protection bits are omitted because nothing here uses them.
`timescale 1ns/1ps
package axil_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  typedef logic [1:0] axil_resp_t;
  localparam axil_resp_t AXIL_OKAY = 2'b00;

  typedef struct packed {
    logic                 awvalid;
    logic [AXIL_AW-1:0]   awaddr;
    logic                 wvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 bready;
    logic                 arvalid;
    logic [AXIL_AW-1:0]   araddr;
    logic                 rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic               bvalid;
    axil_resp_t         bresp;
    logic               arready;
    logic               rvalid;
    logic [AXIL_DW-1:0] rdata;
    axil_resp_t         rresp;
  } axil_rsp_t;

endpackage
