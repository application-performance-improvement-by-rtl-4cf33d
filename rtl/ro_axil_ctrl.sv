// Command decoder of the ring-oscillator network, seen by the CPU as an
// AXI-Lite slave.
// Every write carries one 32-bit command word (layout in ro_pkg):
//  * control word (bit 31 set): if RST is set, `clr` is raised for one cycle
//    two cycles after acceptance to clear all counters; the cycle after
//    that, `enable` is pulsed with `activate` = ACT, and the next clock edge
//    loads every sensor's activation register. Start is
//    "RST|ACT", stop after the window T is "ACT=0". The activation
//    registers change four clock edges after the word is accepted, RST or not, so start and stop have
//    the same delay and the window is exactly the CPU's write-to-write time.
//  * address word (bit 31 clear): bits [15:0] become the multiplexer select.
// A read, at any address, returns {16'b0, count of the selected sensor}.
// The CPU therefore reads the network by writing each of the 408 addresses in
// turn and reading after each, as in the published procedure; the word layout
// and the two-cycle sequencing are this design's own.
`timescale 1ns/1ps
module ro_axil_ctrl
  import axil_pkg::*;
  import ro_pkg::*;
#(
  parameter int unsigned CNT_W  = COUNT_W,
  parameter int unsigned ADDR_W = RO_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         axil_req,
  output axil_rsp_t         axil_rsp,
  output logic              ro_enable,
  output logic              ro_activate,
  output logic              ro_clr,
  output logic [ADDR_W-1:0] ro_sel,
  input  logic [CNT_W-1:0]  ro_count
);

  logic               wr_en, rd_en;
  logic [AXIL_AW-1:0] wr_addr, rd_addr;
  logic [AXIL_DW-1:0] wr_data, rd_data;

  axil_reg_port u_port (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (axil_req),
    .rsp    (axil_rsp),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(wr_data),
    .rd_en  (rd_en),
    .rd_addr(rd_addr),
    .rd_data(rd_data)
  );

  // Sequence: stage 1 registers the word, stage 2 optionally clears the
  // counters, stage 3 loads the activation registers.
  logic s1_valid, s1_rst, s1_act;
  logic s2_valid, s2_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_rst      <= 1'b0;
      s1_act      <= 1'b0;
      s2_valid    <= 1'b0;
      s2_act      <= 1'b0;
      ro_clr      <= 1'b0;
      ro_enable   <= 1'b0;
      ro_activate <= 1'b0;
      ro_sel      <= '0;
    end else begin
      s1_valid  <= wr_en && wr_data[CMD_CTRL_BIT];
      s1_rst    <= wr_data[CMD_RST_BIT];
      s1_act    <= wr_data[CMD_ACT_BIT];
      s2_valid  <= s1_valid;
      s2_act    <= s1_act;
      ro_clr    <= s1_valid && s1_rst;
      ro_enable <= s2_valid;
      if (s2_valid)
        ro_activate <= s2_act;
      if (wr_en && !wr_data[CMD_CTRL_BIT])
        ro_sel <= wr_data[ADDR_W-1:0];
    end
  end

  assign rd_data = AXIL_DW'(ro_count);

  logic unused;
  assign unused = ^{wr_addr, rd_addr, rd_en};

endmodule
