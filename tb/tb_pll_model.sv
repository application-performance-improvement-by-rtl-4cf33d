// Testbench for the behavioural clock manager: from a 100 MHz reference it
// checks the lock time after reset and after each reload, that the output is
// silent while unlocked, and the output period for several factor sets
// (T_out = T_ref * D * O / M).
`timescale 1ns/1ps
module tb_pll_model;
  int checks = 0, failures = 0;

  localparam int unsigned LOCK_NS = 2000;

  logic       ref_clk = 1'b0;
  logic       rst = 1'b0;
  logic [9:0] mult = 10'd14;
  logic [7:0] divclk = 8'd1, outdiv = 8'd10;
  logic       load = 1'b0;
  logic       clk_out, locked;
  int         edges = 0;

  always #5 ref_clk = ~ref_clk;
  always @(posedge clk_out) edges++;

  pll_model #(.LOCK_TIME_NS(LOCK_NS)) dut (
    .ref_clk(ref_clk), .rst(rst), .mult(mult), .divclk(divclk), .outdiv(outdiv),
    .load(load), .clk_out(clk_out), .locked(locked));

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

  task automatic measure(input real exp_ns, input string what);
    realtime t0, t1;
    @(posedge clk_out); t0 = $realtime;
    repeat (10) @(posedge clk_out);
    t1 = $realtime;
    check((t1 - t0) / 10.0 > exp_ns - 0.01 && (t1 - t0) / 10.0 < exp_ns + 0.01,
          $sformatf("%s: period %f ns expected %f", what, (t1 - t0) / 10.0, exp_ns));
  endtask

  initial begin
    realtime t_rel, t_lock;
    int m [4] = '{234, 241, 335, 176};
    #1 rst = 1'b1;
    #50 rst = 1'b0;
    t_rel = $realtime;
    @(posedge locked); t_lock = $realtime;
    check(t_lock - t_rel > LOCK_NS - 1 && t_lock - t_rel < LOCK_NS + 1, "lock time after reset");
    measure(1000.0 / 140.0, "reset factors");
    for (int k = 0; k < 4; k++) begin
      @(negedge ref_clk);
      mult = 10'(m[k]); divclk = 8'd100; outdiv = 8'd1;
      load = 1'b1; @(negedge ref_clk); load = 1'b0;
      check(!locked, "lock drops on load");
      #20 edges = 0;
      #(real'(LOCK_NS) - 100.0);
      check(edges == 0 && !locked, "output silent while relocking");
      @(posedge locked);
      measure(1000.0 / real'(m[k]), $sformatf("%0d MHz", m[k]));
    end
    // a reload during a pending relock restarts the wait
    @(negedge ref_clk);
    mult = 10'd200; load = 1'b1; @(negedge ref_clk); load = 1'b0;
    #(real'(LOCK_NS) / 2.0);
    @(negedge ref_clk);
    mult = 10'd250; load = 1'b1; @(negedge ref_clk); load = 1'b0;
    t_rel = $realtime;
    @(posedge locked); t_lock = $realtime;
    check(t_lock - t_rel > LOCK_NS - 15 && t_lock - t_rel < LOCK_NS + 1, "second load restarts the lock wait");
    measure(4.0, "250 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
