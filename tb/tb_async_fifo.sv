// Testbench for the dual-clock FIFO: two unrelated clocks (100 MHz writer,
// then a faster and a slower reader), random valid/ready patterns, and a
// scoreboard that checks every word arrives once and in order. It also fills
// the FIFO with the reader stopped and checks that exactly DEPTH words are
// taken before w_ready drops, and that r_valid is low when it has drained.
`timescale 1ns/1ps
module tb_async_fifo;
  int checks = 0, failures = 0;

  localparam int W = 10;
  localparam int D = 16;

  logic         w_clk = 1'b0, r_clk = 1'b0;
  logic         w_rst_n = 1'b1, r_rst_n = 1'b1;
  logic         w_valid = 1'b0, w_ready;
  logic [W-1:0] w_data = '0;
  logic         r_valid, r_ready = 1'b0;
  logic [W-1:0] r_data;
  real          r_half = 2.9;

  always #5 w_clk = ~w_clk;
  always #(r_half) r_clk = ~r_clk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .w_clk(w_clk), .w_rst_n(w_rst_n), .w_valid(w_valid), .w_ready(w_ready), .w_data(w_data),
    .r_clk(r_clk), .r_rst_n(r_rst_n), .r_valid(r_valid), .r_ready(r_ready), .r_data(r_data));

  logic [W-1:0] q [$];
  int           pushed = 0, popped = 0;
  bit           rand_rd = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge w_clk) if (w_valid && w_ready) begin q.push_back(w_data); pushed++; end
  always @(posedge r_clk) if (r_valid && r_ready) begin
    logic [W-1:0] exp;
    popped++;
    if (q.size() == 0) check(1'b0, "pop from empty FIFO");
    else begin
      exp = q.pop_front();
      check(r_data == exp, $sformatf("data %h expected %h", r_data, exp));
    end
  end

  always @(negedge r_clk) if (rand_rd) r_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    #400000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_burst(input int n);
    int sent = 0;
    while (sent < n) begin
      @(negedge w_clk);
      if (w_valid && w_ready) sent++;   // previous edge accepted it
      if (sent < n) begin
        if (!w_valid || w_ready) begin
          w_valid = ($urandom_range(0, 4) != 0);
          w_data  = W'($urandom);
        end
      end else w_valid = 1'b0;
    end
    @(negedge w_clk);
    w_valid = 1'b0;
  endtask

  initial begin
    int took;
    #1 w_rst_n = 1'b0; r_rst_n = 1'b0;
    #30 w_rst_n = 1'b1; r_rst_n = 1'b1;
    repeat (3) @(posedge w_clk);
    check(!r_valid && w_ready, "empty after reset");
    write_burst(500);                       // fast reader
    r_half = 13.7;                          // slow reader
    write_burst(300);
    #2000;
    check(pushed == popped && q.size() == 0, $sformatf("drained: pushed %0d popped %0d", pushed, popped));
    // fill with the reader stopped
    rand_rd = 1'b0; r_ready = 1'b0;
    r_half = 3.3;
    took = 0;
    @(negedge w_clk);
    for (int i = 0; i < 40; i++) begin
      w_valid = 1'b1; w_data = W'(i);
      @(posedge w_clk); if (w_ready) took++;
      @(negedge w_clk);
    end
    w_valid = 1'b0;
    check(took == D, $sformatf("FIFO took %0d words with the reader stopped", took));
    check(!w_ready, "full flag raised");
    check(r_valid, "not empty when full");
    rand_rd = 1'b1;
    #3000;
    check(!r_valid && w_ready && q.size() == 0, "empty again after draining");
    check(pushed == popped, "every word read once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
