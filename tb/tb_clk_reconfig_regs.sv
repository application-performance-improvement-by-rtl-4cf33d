// Testbench for the clock-manager register bank: checks the reset values
// (140 MHz from 100 MHz), writes and reads back the factor registers, checks
// that a CTRL write gives exactly one load pulse with the new factors on the
// outputs, that STATUS follows the lock input and that unmapped offsets read
// zero.
`timescale 1ns/1ps
module tb_clk_reconfig_regs;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  axil_req_t  axil_req = '0;
  axil_rsp_t  axil_rsp;
  logic [9:0] mult;
  logic [7:0] divclk, outdiv;
  logic       load;
  logic       locked = 1'b0;

  always #5 clk = ~clk;

  clk_reconfig_regs dut (.clk(clk), .rst_n(rst_n), .axil_req(axil_req), .axil_rsp(axil_rsp),
                         .mult(mult), .divclk(divclk), .outdiv(outdiv), .load(load), .locked(locked));

  `include "axil_tasks.svh"

  int loads = 0;
  logic [9:0] mult_at_load;
  always @(posedge clk) if (load) begin loads++; mult_at_load = mult; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    #1 rst_n = 1'b0;
    #22 rst_n = 1'b1;
    check(mult == 14 && divclk == 1 && outdiv == 10 && !load, "reset factors give 140 MHz");
    axil_read(32'h0, rd);
    check(rd == 32'h0, "status unlocked");
    locked = 1'b1;
    axil_read(32'h0, rd);
    check(rd == 32'h1, "status locked");
    for (int k = 0; k < 10; k++) begin
      logic [9:0] m; logic [7:0] d, o;
      m = 10'($urandom_range(1, 1023)); d = 8'($urandom_range(1, 255)); o = 8'($urandom_range(1, 255));
      axil_write(32'h4, {8'h00, d, 6'h00, m});
      axil_write(32'h8, {24'h0, o});
      check(loads == k, "no load before CTRL write");
      axil_read(32'h4, rd);
      check(rd == {8'h00, d, 6'h00, m}, $sformatf("FACTORS readback %h", rd));
      axil_read(32'h8, rd);
      check(rd == {24'h0, o}, "OUTDIV readback");
      axil_write(32'hC, 32'h1);
      repeat (2) @(posedge clk);
      check(loads == k + 1 && mult_at_load == m && divclk == d && outdiv == o,
            $sformatf("one load pulse with new factors (loads=%0d)", loads));
    end
    axil_write(32'hC, 32'h0);
    repeat (2) @(posedge clk);
    check(loads == 10, "CTRL write of 0 does not load");
    axil_read(32'h10, rd);
    check(rd == 0, "unmapped offset reads zero");
    axil_read(32'hC, rd);
    check(rd == 0, "CTRL reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
