// Testbench for the sensor network: 24 sensors with different simulated ring
// delays run over one common window; every sensor is then selected through
// the multiplexer and its count compared with the window divided by that
// sensor's own period. Out-of-range addresses must read zero.
`timescale 1ns/1ps
module tb_ro_network;
  int checks = 0, failures = 0;

  localparam int unsigned N      = 24;
  localparam int unsigned BASE   = 312;
  localparam int unsigned STEP   = 2;
  localparam int unsigned WINDOW = 800;   // system cycles of 10 ns

  logic        sys_clk = 1'b0;
  logic        sys_rst_n = 1'b1;
  logic        enable = 1'b0, activate = 1'b0, clr = 1'b0;
  logic [15:0] sel = '0;
  logic [15:0] count;

  always #5 sys_clk = ~sys_clk;

  ro_network #(.N_RO(N), .CNT_W(16), .ADDR_W(16), .BASE_DELAY_PS(BASE), .STEP_DELAY_PS(STEP)) dut (
    .sys_clk(sys_clk), .sys_rst_n(sys_rst_n), .enable(enable), .activate(activate),
    .clr(clr), .sel(sel), .count(count));

  // Independent statement of the simulated delay map.
  function automatic int delay_ps(int i);
    int slot;
    slot = (7 * i + i / 17) % 16;
    return BASE + STEP * slot;
  endfunction

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
    int expected;
    int distinct;
    logic [15:0] seen [N];
    #1 sys_rst_n = 1'b0;
    #22 sys_rst_n = 1'b1;
    @(posedge sys_clk); #1 clr = 1'b1;
    @(posedge sys_clk); #1 clr = 1'b0; enable = 1'b1; activate = 1'b1;
    @(posedge sys_clk); #1 enable = 1'b0;
    repeat (WINDOW - 1) @(posedge sys_clk);
    #1 enable = 1'b1; activate = 1'b0;
    @(posedge sys_clk); #1 enable = 1'b0;
    #100;
    for (int i = 0; i < N; i++) begin
      sel = 16'(i);
      #1;
      expected = int'($floor(real'(WINDOW) * 10000.0 / real'(8 * delay_ps(i)))) - 1;
      seen[i] = count;
      check(count >= 16'(expected - 1) && count <= 16'(expected + 1),
            $sformatf("RO %0d: count %0d expected %0d", i, count, expected));
    end
    distinct = 0;
    for (int i = 1; i < N; i++) if (seen[i] != seen[0]) distinct++;
    check(distinct > 0, "sensors report different speeds");
    sel = 16'(N); #1;
    check(count == 0, "address past the last sensor reads zero");
    sel = 16'hFFFF; #1;
    check(count == 0, "address 0xFFFF reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
