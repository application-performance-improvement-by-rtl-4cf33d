// Testbench for the boost framework in the second published configuration
// (32-tap filter, 7-bit samples, 19-bit results, rated 176 MHz), with a
// shortened relock time. Bursts of samples are streamed through the DMA-side
// ports at several IP clock frequencies: above the 100 MHz DMA clock, at the
// rated frequency and far below it, so that the input FIFO fills and throttles
// the stream. The output stream is also throttled so that the output FIFO
// fills and stalls the filter. Every result is compared with a reference
// convolution computed here; each clock reprogramming is checked through the
// lock status and by measuring the IP clock period.
`timescale 1ns/1ps
module tb_boost_framework;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  localparam int T = 32, DW = 7, AW = 19;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  axil_req_t     axil_req = '0;
  axil_rsp_t     axil_rsp;
  logic          s_valid = 1'b0, s_ready;
  logic [DW-1:0] s_data = '0;
  logic          m_valid, m_ready = 1'b1;
  logic [AW-1:0] m_data;
  logic          locked;

  always #5 clk = ~clk;

  boost_framework #(.TAPS(T), .DIN_W(DW), .ACC_W(AW), .FIFO_DEPTH(16),
                    .RST_MULT(10'd176), .RST_DIVCLK(8'd100), .RST_OUTDIV(8'd1),
                    .LOCK_TIME_NS(3000)) dut (
    .clk(clk), .rst_n(rst_n), .clk_axil_req(axil_req), .clk_axil_rsp(axil_rsp),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data),
    .ip_clk_locked(locked));

  `include "axil_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint coef(int i);
    int k, m;
    k = (i <= T - 1 - i) ? i : T - 1 - i;
    m = ((k + 1) * ((2 ** (DW - 1)) - 1)) / ((T + 1) / 2);
    return ((i % 5) == 2) ? -longint'(m) : longint'(m);
  endfunction

  longint hist [T];
  longint expq [$];
  int     in_full_cycles = 0, out_full_cycles = 0, results = 0;

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      longint s;
      for (int i = T - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'($signed(s_data));
      s = 0;
      for (int i = 0; i < T; i++) s += coef(i) * hist[i];
      expq.push_back(s);
    end
    if (s_valid && !s_ready) in_full_cycles++;
    if (m_valid && m_ready) begin
      longint e;
      results++;
      e = expq.pop_front();
      check(longint'($signed(m_data)) == e, $sformatf("result %0d expected %0d", $signed(m_data), e));
    end
  end
  always @(posedge dut.ip_clk) if (dut.out_valid && !dut.out_ready) out_full_cycles++;

  initial begin
    #2000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_freq(input int mhz);
    logic [31:0] rd;
    axil_write(32'h4, {8'h00, 8'd100, 6'h00, 10'(mhz)});
    axil_write(32'h8, 32'd1);
    axil_write(32'hC, 32'd1);
    repeat (3) @(posedge clk);
    axil_read(32'h0, rd);
    check(rd[0] == 1'b0, "unlocked while reprogramming");
    do begin repeat (50) @(posedge clk); axil_read(32'h0, rd); end while (!rd[0]);
  endtask

  task automatic measure_ip_clk(input int mhz);
    realtime t0, t1;
    @(posedge dut.ip_clk); t0 = $realtime;
    repeat (20) @(posedge dut.ip_clk); t1 = $realtime;
    check((t1 - t0) / 20.0 > 1000.0 / mhz - 0.01 && (t1 - t0) / 20.0 < 1000.0 / mhz + 0.01,
          $sformatf("IP clock at %0d MHz: period %f", mhz, (t1 - t0) / 20.0));
  endtask

  task automatic run_burst(input int n, input bit throttle_out);
    int sent, r0;
    sent = 0; r0 = results;
    fork
      begin
        while (sent < n) begin
          @(negedge clk);
          s_valid = 1'b1; s_data = DW'($urandom);
          @(posedge clk);
          while (!s_ready) @(posedge clk);
          sent++;
          #1 s_valid = 1'b0;
        end
      end
      begin
        while (results - r0 < n) begin
          @(negedge clk);
          m_ready = throttle_out ? ($urandom_range(0, 3) == 0) : 1'b1;
        end
        m_ready = 1'b1;
      end
    join
    check(results - r0 == n, $sformatf("burst of %0d gave %0d results", n, results - r0));
  endtask

  initial begin
    for (int i = 0; i < T; i++) hist[i] = 0;
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    wait (locked);
    measure_ip_clk(176);
    run_burst(300, 1'b0);
    set_freq(300);
    measure_ip_clk(300);
    run_burst(300, 1'b1);
    check(out_full_cycles > 0, "output FIFO filled and stalled the filter");
    set_freq(20);
    measure_ip_clk(20);
    run_burst(200, 1'b0);
    check(in_full_cycles > 0, "input FIFO filled and throttled the stream");
    repeat (20) @(posedge clk);
    check(expq.size() == 0, "no result missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
