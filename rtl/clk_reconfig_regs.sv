// AXI-Lite register bank through which the CPU reprograms the clock manager
// that drives the user IP (one 32-bit write per register, as the CPU's
// Xil_out32 calls do).
// Register map (byte offsets, bits [4:2] of the address decoded):
//   0x00 STATUS  read-only, bit 0 = clock manager locked
//   0x04 FACTORS bits [9:0] MULT (feedback multiplier M),
//                bits [23:16] DIVCLK (input divider D)
//   0x08 OUTDIV  bits [7:0] CLKOUT_DIV (output divider O)
//   0x0C CTRL    write bit 0 = 1 : apply FACTORS/OUTDIV (starts relocking)
// The IP clock is f_ref * M / (D * O). The reset values give 140 MHz from
// the 100 MHz reference (M = 14, D = 1, O = 10), the rated frequency of the
// 64-tap filter. A write of CTRL with bit 0 set produces a one-cycle `load`
// pulse with the new factors held on mult/divclk/outdiv. Unmapped offsets read
// as zero and ignore writes.
// That the CPU sets frequency factors and configuration flags in designated
// registers over AXI-Lite is from the published framework; the register map,
// field widths and reset values are this design's own.
`timescale 1ns/1ps
module clk_reconfig_regs
  import axil_pkg::*;
#(
  parameter logic [9:0] RST_MULT   = 10'd14,
  parameter logic [7:0] RST_DIVCLK = 8'd1,
  parameter logic [7:0] RST_OUTDIV = 8'd10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  axil_req,
  output axil_rsp_t  axil_rsp,
  output logic [9:0] mult,
  output logic [7:0] divclk,
  output logic [7:0] outdiv,
  output logic       load,
  input  logic       locked
);

  typedef enum logic [2:0] {
    REG_STATUS  = 3'd0,
    REG_FACTORS = 3'd1,
    REG_OUTDIV  = 3'd2,
    REG_CTRL    = 3'd3
  } reg_e;

  logic               wr_en, rd_en;
  logic [AXIL_AW-1:0] wr_addr, rd_addr;
  logic [AXIL_DW-1:0] wr_data, rd_data;
  reg_e               wr_reg, rd_reg;

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

  assign wr_reg = reg_e'(wr_addr[4:2]);
  assign rd_reg = reg_e'(rd_addr[4:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mult   <= RST_MULT;
      divclk <= RST_DIVCLK;
      outdiv <= RST_OUTDIV;
      load   <= 1'b0;
    end else begin
      load <= 1'b0;
      if (wr_en) begin
        case (wr_reg)
          REG_FACTORS: begin
            mult   <= wr_data[9:0];
            divclk <= wr_data[23:16];
          end
          REG_OUTDIV: outdiv <= wr_data[7:0];
          REG_CTRL:   load   <= wr_data[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    case (rd_reg)
      REG_STATUS:  rd_data[0]     = locked;
      REG_FACTORS: rd_data        = {8'b0, divclk, 6'b0, mult};
      REG_OUTDIV:  rd_data[7:0]   = outdiv;
      default: ;
    endcase
  end

  logic unused;
  assign unused = ^{wr_addr[31:5], wr_addr[1:0], rd_addr[31:5], rd_addr[1:0], rd_en};

endmodule
