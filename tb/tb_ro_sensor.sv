// Testbench for one ring-oscillator sensor macro: activates it for a window
// on the 100 MHz system clock and checks the count against the window length
// divided by the ring period, then checks that a second window gives the same
// count and that the result holds after the stop.
`timescale 1ns/1ps
module tb_ro_sensor;
  int checks = 0, failures = 0;

  localparam int unsigned DLY_PS = 312;
  localparam real RO_PERIOD_NS = 2.0 * 4.0 * 0.312;   // 2.496 ns

  logic        sys_clk = 1'b0;
  logic        sys_rst_n = 1'b1;
  logic        enable = 1'b0, activate = 1'b0, clr = 1'b0;
  logic [15:0] count_q;

  always #5 sys_clk = ~sys_clk;

  ro_sensor #(.COUNT_W(16), .ELEMENT_DELAY_PS(DLY_PS)) dut (
    .sys_clk(sys_clk), .sys_rst_n(sys_rst_n), .enable(enable),
    .activate(activate), .clr(clr), .count_q(count_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input logic act, input logic rst);
    @(posedge sys_clk); #1;
    clr = rst;
    @(posedge sys_clk); #1;
    clr = 1'b0; enable = 1'b1; activate = act;
    @(posedge sys_clk); #1;
    enable = 1'b0;
  endtask

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, first;
    int cycles [2] = '{1000, 3003};
    #1 sys_rst_n = 1'b0;
    #22 sys_rst_n = 1'b1;
    for (int k = 0; k < 2; k++) begin
      cmd(1'b1, 1'b1);
      repeat (cycles[k] - 3) @(posedge sys_clk);
      cmd(1'b0, 1'b0);
      // the ring runs for exactly cycles[k] system periods of 10 ns
      expected = int'($floor(real'(cycles[k]) * 10.0 / RO_PERIOD_NS)) - 1;
      #50;
      check(count_q >= 16'(expected - 1) && count_q <= 16'(expected + 1),
            $sformatf("window %0d: count %0d expected %0d", cycles[k], count_q, expected));
      first = count_q;
      #500;
      check(count_q == 16'(first), "result holds while stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
