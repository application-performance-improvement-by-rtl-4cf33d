// Testbench for ro_counter: drives a clock in place of the ring, checks that
// the output register holds (edges - 1) while active, freezes once active
// drops, and that clr clears both registers.
`timescale 1ns/1ps
module tb_ro_counter;
  int checks = 0, failures = 0;

  logic        ro_clk = 1'b0;
  logic        clr = 1'b0;
  logic        active = 1'b0;
  logic [15:0] count_q;

  ro_counter #(.COUNT_W(16)) dut (.ro_clk(ro_clk), .clr(clr), .active(active), .count_q(count_q));

  task automatic pulses(input int n);
    repeat (n) begin #1 ro_clk = 1'b1; #1 ro_clk = 1'b0; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1 clr = 1'b1;
    #4 clr = 1'b0;
    check(count_q == 0, "cleared");
    for (int trial = 0; trial < 6; trial++) begin
      n = (trial == 5) ? 65537 : 1 + $urandom_range(0, 3000);
      clr = 1'b1; #1 clr = 1'b0;
      check(count_q == 0, "clr clears output register");
      active = 1'b1;
      pulses(n);
      active = 1'b0;
      check(count_q == 16'(n - 1), $sformatf("n=%0d count=%0d", n, count_q));
      pulses(7);   // edges after the window must not change the result
      check(count_q == 16'(n - 1), $sformatf("hold after window n=%0d count=%0d", n, count_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
