// AXI4-Lite slave front end shared by the design's register ports.
// It turns AXI-Lite transactions into a one-cycle write strobe (wr_en with
// wr_addr/wr_data) and a one-cycle read strobe (rd_en with rd_addr) whose data
// the owner returns combinationally on rd_data in the same cycle.
// A write is accepted when the address and data channels are both valid and no
// write response is pending (AW and W are taken together); the OKAY response
// follows on the next cycle and is held until bready. A read is accepted when
// no read response is pending; rdata is captured on acceptance and held with
// rvalid until rready. One transaction of each kind is outstanding at a time.
// Byte strobes are ignored (every register write is a full 32-bit word) and
// every response is OKAY.
// This is this design's own glue: the published design only says the CPU
// reaches the programmable logic through AXI-Lite.
`timescale 1ns/1ps
module axil_reg_port
  import axil_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          req,
  output axil_rsp_t          rsp,
  output logic               wr_en,
  output logic [AXIL_AW-1:0] wr_addr,
  output logic [AXIL_DW-1:0] wr_data,
  output logic               rd_en,
  output logic [AXIL_AW-1:0] rd_addr,
  input  logic [AXIL_DW-1:0] rd_data
);

  logic               bvalid_q;
  logic               rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;

  always_comb begin
    wr_en   = req.awvalid && req.wvalid && !bvalid_q;
    wr_addr = req.awaddr;
    wr_data = req.wdata;
    rd_en   = req.arvalid && !rvalid_q;
    rd_addr = req.araddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)
        bvalid_q <= 1'b1;
      else if (req.bready)
        bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = AXIL_OKAY;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = AXIL_OKAY;
  end

  // AXI rule: a response, once raised, stays with stable data until accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             bvalid_q && !req.bready |=> bvalid_q);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
