// Testbench for the RO command decoder: sends control and address words over
// AXI-Lite and checks the clear pulse, the activation-register strobe and its
// value, their cycle timing, the multiplexer select and the read path.
`timescale 1ns/1ps
module tb_ro_axil_ctrl;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  axil_req_t   axil_req = '0;
  axil_rsp_t   axil_rsp;
  logic        ro_enable, ro_activate, ro_clr;
  logic [15:0] ro_sel;
  logic [15:0] ro_count;

  always #5 clk = ~clk;

  ro_axil_ctrl dut (.clk(clk), .rst_n(rst_n), .axil_req(axil_req), .axil_rsp(axil_rsp),
                    .ro_enable(ro_enable), .ro_activate(ro_activate), .ro_clr(ro_clr),
                    .ro_sel(ro_sel), .ro_count(ro_count));

  // A stand-in for the network: count = bit-reversed select XOR a constant.
  assign ro_count = {<<{ro_sel}} ^ 16'h5A5A;

  `include "axil_tasks.svh"

  int clr_pulses = 0, en_pulses = 0;
  int clr_cycle, en_cycle, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (ro_clr)    begin clr_pulses++; clr_cycle = cyc; end
    if (ro_enable) begin en_pulses++;  en_cycle  = cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    #1 rst_n = 1'b0;
    #22 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // start: RST|ACT
    axil_write(32'h0, 32'h8000_0003);
    repeat (6) @(posedge clk);
    check(clr_pulses == 1 && en_pulses == 1, $sformatf("start pulses clr=%0d en=%0d", clr_pulses, en_pulses));
    check(en_cycle == clr_cycle + 1, "enable follows clear by one cycle");
    check(ro_activate == 1'b1, "activate set by start");
    // stop: ACT=0, no clear
    axil_write(32'h0, 32'h8000_0000);
    repeat (6) @(posedge clk);
    check(clr_pulses == 1 && en_pulses == 2, "stop gives one strobe, no clear");
    check(ro_activate == 1'b0, "activate cleared by stop");
    // addresses and reads
    for (int k = 0; k < 20; k++) begin
      logic [15:0] a;
      a = (k < 2) ? 16'(k * 407) : 16'($urandom_range(0, 65535));
      axil_write(32'h0, {16'h0000, a});
      check(ro_sel == a, $sformatf("select %0d", a));
      axil_read(32'h0, rd);
      check(rd == {16'h0, {<<{a}} ^ 16'h5A5A}, $sformatf("read of address %0d gave %h", a, rd));
    end
    check(en_pulses == 2, "address words do not strobe the sensors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
