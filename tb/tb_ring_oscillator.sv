// Testbench for the behavioural ring-oscillator model: checks the oscillation
// period against the sum of the four loop-element delays, that the ring rests
// at 0 while disabled, and that it restarts when enabled again.
`timescale 1ns/1ps
module tb_ring_oscillator;
  int checks = 0, failures = 0;

  localparam int unsigned DLY_PS = 300;          // 4 x 300 ps = 1.2 ns half period
  localparam real PERIOD_NS = 2.0 * 4.0 * 0.300; // 2.4 ns

  logic enable = 1'b0;
  logic ro_clk;
  int   edges = 0;

  ring_oscillator #(.ELEMENT_DELAY_PS(DLY_PS)) dut (.enable(enable), .ro_clk(ro_clk));

  always @(posedge ro_clk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    #20;
    check(edges == 0 && ro_clk == 1'b0, "ring idle while disabled");
    enable = 1'b1;
    @(posedge ro_clk); t0 = $realtime;
    @(posedge ro_clk); t1 = $realtime;
    check((t1 - t0) > PERIOD_NS - 0.01 && (t1 - t0) < PERIOD_NS + 0.01, $sformatf("period %f ns", t1 - t0));
    edges = 0;
    #(PERIOD_NS * 100.0);
    check(edges >= 99 && edges <= 101, $sformatf("edges in 100 periods = %0d", edges));
    enable = 1'b0;
    #5;
    edges = 0;
    #100;
    check(edges == 0 && ro_clk == 1'b0, "ring stops when disabled");
    enable = 1'b1;
    #(PERIOD_NS * 10.0 + 0.1);
    check(edges == 10, $sformatf("restart edges = %0d", edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
