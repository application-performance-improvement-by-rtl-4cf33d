// Testbench for the sensing infrastructure as the CPU sees it: over AXI-Lite
// it starts all rings, waits a window timed in system cycles, stops them, then
// reads every sensor by writing its address and reading the count. Counts are
// checked against the window divided by each sensor's simulated period.
`timescale 1ns/1ps
module tb_ro_infrastructure;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned N      = 16;
  localparam int unsigned WINDOW = 1000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b1;
  axil_req_t axil_req = '0;
  axil_rsp_t axil_rsp;

  always #5 clk = ~clk;

  ro_infrastructure #(.N_RO(N), .CNT_W(16), .BASE_DELAY_PS(312), .STEP_DELAY_PS(2)) dut (
    .clk(clk), .rst_n(rst_n), .axil_req(axil_req), .axil_rsp(axil_rsp));

  `include "axil_tasks.svh"

  // Times at which control words are accepted. Start and stop act on the
  // sensors with the same delay, so the rings run for exactly the time
  // between the two accepts.
  realtime t_start, t_stop;
  always @(posedge clk)
    if (axil_rsp.awready && axil_req.wdata[31]) begin
      if (axil_req.wdata[0]) t_start = $realtime;
      else                   t_stop  = $realtime;
    end

  function automatic int delay_ps(int i);
    return 312 + 2 * ((7 * i + i / 17) % 16);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #300000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int expected;
    #1 rst_n = 1'b0;
    #22 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      int w;
      w = WINDOW * (run + 1);
      axil_write(32'h0, 32'h8000_0003);
      repeat (w) @(posedge clk);
      axil_write(32'h0, 32'h8000_0000);
      repeat (10) @(posedge clk);
      for (int i = 0; i < N + 1; i++) begin
        axil_write(32'h0, 32'(i));
        axil_read(32'h0, rd);
        if (i < N) begin
          expected = int'($floor((t_stop - t_start) * 1000.0 / real'(8 * delay_ps(i)))) - 1;
          check(rd >= 32'(expected - 2) && rd <= 32'(expected + 2),
                $sformatf("run %0d RO %0d: %0d expected %0d", run, i, rd, expected));
        end else begin
          check(rd == 0, "address beyond the network reads zero");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
