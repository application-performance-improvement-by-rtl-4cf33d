// Frequency search on the second filter configuration: the boost framework
// built with the 32-tap, 7-bit-sample, 19-bit-result filter, starting from its
// rated 176 MHz with the real 28 us relock time. The testbench acts as the
// CPU: it records the reference output at the rated clock (checked against a
// reference convolution), then raises the clock in 10 MHz steps and, after the
// first mismatch, in 1 MHz steps. A simulated filter never fails timing, so
// above FMAX_EMU = 298 MHz (a figure measured for this filter on one device)
// the testbench corrupts one result word per run, as a setup violation would.
// The search must end at 298 MHz after 12 coarse and 3 fine steps.
`timescale 1ns/1ps
module tb_ip2_search;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  localparam int T = 32, DW = 7, AW = 19;
  localparam int F_RATED = 176, FMAX_EMU = 298, NSAMP = 200;

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
                    .RST_MULT(10'(F_RATED)), .RST_DIVCLK(8'd100), .RST_OUTDIV(8'd1)) dut (
    .clk(clk), .rst_n(rst_n), .clk_axil_req(axil_req), .clk_axil_rsp(axil_rsp),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data),
    .ip_clk_locked(locked));

  `include "axil_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1500us failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint coef(int i);
    int k, m;
    k = (i <= T - 1 - i) ? i : T - 1 - i;
    m = ((k + 1) * ((2 ** (DW - 1)) - 1)) / ((T + 1) / 2);
    return ((i % 5) == 2) ? -longint'(m) : longint'(m);
  endfunction

  logic [DW-1:0] vec [NSAMP];
  logic [AW-1:0] d_c [NSAMP];
  logic [AW-1:0] d   [NSAMP];
  int cur_mhz = F_RATED, n_coarse = 0, n_fine = 0, n_mismatch = 0, n_relock = 0;
  logic locked_q = 1'b0;
  always @(posedge clk) begin
    if (!locked && locked_q) n_relock++;
    locked_q <= locked;
  end

  task automatic set_freq(input int mhz);
    logic [31:0] rd;
    axil_write(32'h4, {8'h00, 8'd100, 6'h00, 10'(mhz)});
    axil_write(32'h8, 32'd1);
    axil_write(32'hC, 32'd1);
    do begin repeat (100) @(posedge clk); axil_read(32'h0, rd); end while (!rd[0]);
    cur_mhz = mhz;
  endtask

  task automatic run_app();
    int got;
    got = 0;
    fork
      for (int n = 0; n < NSAMP; n++) begin
        @(negedge clk);
        s_valid = 1'b1; s_data = vec[n];
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        #1 s_valid = 1'b0;
      end
      while (got < NSAMP) begin
        @(posedge clk);
        if (m_valid && m_ready) begin
          d[got] = m_data;
          if (cur_mhz > FMAX_EMU && got == 40) d[got] = d[got] ^ 19'h1;
          got++;
        end
      end
    join
  endtask

  function automatic bit same();
    for (int n = 0; n < NSAMP; n++) if (d[n] !== d_c[n]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int f, fstep, bad;
    bit done;
    longint hist [T];
    longint e;
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    wait (locked);
    for (int n = 0; n < NSAMP; n++) vec[n] = (n < NSAMP - T) ? DW'($urandom) : '0;
    run_app();
    for (int n = 0; n < NSAMP; n++) d_c[n] = d[n];
    for (int i = 0; i < T; i++) hist[i] = 0;
    bad = 0;
    for (int n = 0; n < NSAMP; n++) begin
      for (int i = T - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'($signed(vec[n]));
      e = 0;
      for (int i = 0; i < T; i++) e += coef(i) * hist[i];
      if (longint'($signed(d_c[n])) != e) bad++;
    end
    check(bad == 0, $sformatf("reference run: %0d wrong results", bad));
    f = F_RATED; fstep = 10; done = 1'b0;
    while (!done) begin
      f = f + fstep;
      set_freq(f);
      if (fstep == 10) n_coarse++; else n_fine++;
      run_app();
      if (!same()) begin
        n_mismatch++;
        f = f - fstep;
        if (fstep == 10) fstep = 1; else done = 1'b1;
      end
    end
    set_freq(f);
    run_app();
    check(same(), "operation at the found frequency matches the reference");
    $display("IP2 search: %0d MHz (rated %0d MHz, +%0.1f %%), coarse=%0d fine=%0d mismatch=%0d relock=%0d",
             f, F_RATED, 100.0 * real'(f - F_RATED) / real'(F_RATED), n_coarse, n_fine, n_mismatch, n_relock);
    check(f == FMAX_EMU, "search ends at the emulated limit");
    check(n_coarse == 13 && n_fine == 3 && n_mismatch == 2, "13 coarse and 3 fine steps, two mismatches");
    check(n_relock == 17, "one relock per step plus the final setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
