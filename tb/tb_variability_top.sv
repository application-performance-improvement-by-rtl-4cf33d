// End-to-end testbench of the whole design at its default sizes: 408 ring
// oscillators and the 64-tap, 10-bit filter in the boost framework.
//
// Part 1 plays the CPU of the sensing experiment: start every ring, wait a
// window of 10,000 periods of a 333 MHz timer (30.03 us), stop them, then
// read all 408 counts by address. Each count is checked against the window
// divided by that sensor's simulated ring period, and the spread of the
// derived frequencies (intra-chip variability) is reported.
//
// Part 2 plays the CPU running the frequency search: record the output for a
// test vector at the rated 140 MHz, then raise the IP clock in 10 MHz steps,
// re-running the same input and comparing with the recording; on the first
// mismatch step back and continue in 1 MHz steps; report the last frequency
// that still matched. A simulated filter never fails timing, so the testbench
// stands in for the silicon: above FMAX_EMU MHz it corrupts one result word
// of each run, as a setup violation would. The search must end at FMAX_EMU.
// The recorded output is also checked against a reference convolution.
// Every mechanism exercised is counted; a mechanism never seen is a failure.
`timescale 1ns/1ps
module tb_variability_top;
  import axil_pkg::*;
  int checks = 0, failures = 0;

  localparam int N_RO     = 408;
  localparam int T        = 64, DW = 10, AW = 26;
  localparam int F_RATED  = 140;
  localparam int FMAX_EMU = 234;
  localparam int NSAMP    = 256;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  axil_req_t     ro_req = '0, ck_req = '0, axil_req = '0;
  axil_rsp_t     ro_rsp, ck_rsp, axil_rsp;
  bit            port_clk = 1'b0;   // which AXI-Lite port the tasks talk to
  logic          s_valid = 1'b0, s_ready;
  logic [DW-1:0] s_data = '0;
  logic          m_valid, m_ready = 1'b1;
  logic [AW-1:0] m_data;
  logic          locked;

  always #5 clk = ~clk;

  variability_top dut (
    .clk(clk), .rst_n(rst_n),
    .ro_axil_req(ro_req), .ro_axil_rsp(ro_rsp),
    .clk_axil_req(ck_req), .clk_axil_rsp(ck_rsp),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data),
    .ip_clk_locked(locked));

  always_comb begin
    ro_req   = port_clk ? '0 : axil_req;
    ck_req   = port_clk ? axil_req : '0;
    axil_rsp = port_clk ? ck_rsp : ro_rsp;
  end

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

  // ---------------- mechanism counters ----------------
  int n_ro_start = 0, n_ro_stop = 0, n_ro_reads = 0;
  int n_relock = 0, n_coarse = 0, n_fine = 0, n_mismatch = 0;
  int n_in_full = 0, n_fir_stall = 0;

  logic locked_q = 1'b0;
  always @(posedge clk) begin
    if (s_valid && !s_ready) n_in_full++;
    if (!locked && locked_q) n_relock++;
    locked_q <= locked;
  end
  int out_words = 0;

  // ---------------- part 1: ring oscillators ----------------
  function automatic int delay_ps(int i);
    return 290 + ((7 * i + i / 17) % 16);
  endfunction

  realtime t_start, t_stop;
  always @(posedge clk)
    if (!port_clk && axil_rsp.awready && axil_req.wdata[31]) begin
      if (axil_req.wdata[0]) begin t_start = $realtime; n_ro_start++; end
      else                   begin t_stop  = $realtime; n_ro_stop++;  end
    end

  task automatic ro_experiment();
    logic [31:0] rd;
    real fmin, fmax, f, exp_c, win;
    int  bad;
    port_clk = 1'b0;
    axil_write(32'h0, 32'h8000_0003);          // reset and activate
    #(30030.0);                                // 10,000 periods of 333 MHz
    axil_write(32'h0, 32'h8000_0000);          // stop
    win = t_stop - t_start;
    fmin = 1.0e9; fmax = 0.0; bad = 0;
    for (int i = 0; i < N_RO; i++) begin
      axil_write(32'h0, 32'(i));
      axil_read(32'h0, rd);
      n_ro_reads++;
      exp_c = win * 1000.0 / real'(8 * delay_ps(i)) - 1.0;
      if (real'(rd) < exp_c - 1.5 || real'(rd) > exp_c + 1.5) begin
        bad++;
        $display("RO %0d: count %0d expected %f", i, rd, exp_c);
      end
      f = real'(rd) / win * 1000.0;            // MHz
      if (f < fmin) fmin = f;
      if (f > fmax) fmax = f;
    end
    check(bad == 0, $sformatf("%0d of %0d ring counts off", bad, N_RO));
    check(win > 30029.0 && win < 30061.0, $sformatf("measurement window %f ns", win));
    $display("ring frequencies %0.1f .. %0.1f MHz, intra-chip variability %0.2f %%",
             fmin, fmax, 100.0 * (fmax - fmin) / fmin);
    check(fmin > 380.0 && fmax < 440.0, "ring frequencies inside the 380-440 MHz range");
  endtask

  // ---------------- part 2: frequency search ----------------
  int cur_mhz = F_RATED;

  function automatic longint coef(int i);
    int k, m;
    k = (i <= T - 1 - i) ? i : T - 1 - i;
    m = ((k + 1) * ((2 ** (DW - 1)) - 1)) / ((T + 1) / 2);
    return ((i % 5) == 2) ? -longint'(m) : longint'(m);
  endfunction

  logic [DW-1:0] vec [NSAMP];
  logic [AW-1:0] d_c [NSAMP];
  logic [AW-1:0] d   [NSAMP];

  always @(posedge dut.u_boost.ip_clk)
    if (dut.u_boost.out_valid && !dut.u_boost.out_ready) n_fir_stall++;

  task automatic set_freq(input int mhz);
    logic [31:0] rd;
    port_clk = 1'b1;
    axil_write(32'h4, {8'h00, 8'd100, 6'h00, 10'(mhz)});
    axil_write(32'h8, 32'd1);
    axil_write(32'hC, 32'd1);
    do begin repeat (100) @(posedge clk); axil_read(32'h0, rd); end while (!rd[0]);
    cur_mhz = mhz;
    port_clk = 1'b0;
  endtask

  // Streams the test vector and collects NSAMP results into d.
  task automatic run_app(input bit throttle);
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
        @(negedge clk);
        m_ready = throttle ? ($urandom_range(0, 5) == 0) : 1'b1;
        @(posedge clk);
        if (m_valid && m_ready) begin
          d[got] = m_data;
          // stand-in for a timing failure of the silicon above FMAX_EMU
          if (cur_mhz > FMAX_EMU && got == 17) d[got] = d[got] ^ 26'h1;
          got++;
        end
        if (m_valid && !m_ready) out_words++;
      end
    join
    m_ready = 1'b1;
  endtask

  function automatic bit same();
    for (int n = 0; n < NSAMP; n++) if (d[n] !== d_c[n]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic search(output int f_out);
    int f, fstep, run;
    bit done;
    f = F_RATED; fstep = 10; run = 0; done = 1'b0;
    while (!done) begin
      f = f + fstep;                            // step 3
      set_freq(f);
      if (fstep == 10) n_coarse++; else n_fine++;
      run_app(run % 3 == 1);                    // step 4 (some runs throttled)
      run++;
      if (!same()) begin                        // steps 5-6
        n_mismatch++;
        f = f - fstep;
        if (fstep == 10) fstep = 1;             // step 7
        else done = 1'b1;
      end
    end
    set_freq(f);
    f_out = f;
  endtask

  initial begin
    int f_found;
    longint hist [T];
    longint e;
    int bad;
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    repeat (5) @(posedge clk);

    ro_experiment();

    // step 1-2: rated frequency (reset value of the clock manager)
    wait (locked);
    for (int n = 0; n < NSAMP; n++) vec[n] = DW'($urandom);
    vec[0] = 10'h200; vec[1] = 10'h1FF;        // both full-scale ends
    // a tail of T zeros leaves the delay line clear, so every run of the
    // vector starts from the same filter state
    for (int n = NSAMP - T; n < NSAMP; n++) vec[n] = '0;
    run_app(1'b0);
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
    check(bad == 0, $sformatf("reference run at the rated clock: %0d wrong results", bad));

    search(f_found);
    $display("frequency search result %0d MHz (rated %0d MHz, +%0.1f %%)",
             f_found, F_RATED, 100.0 * real'(f_found - F_RATED) / real'(F_RATED));
    check(f_found == FMAX_EMU, $sformatf("search ended at %0d MHz, expected %0d", f_found, FMAX_EMU));
    // normal operation at the found frequency reproduces the reference
    run_app(1'b0);
    check(same(), "operation at the found frequency matches the reference");

    $display("mechanisms: ro_start=%0d ro_stop=%0d ro_reads=%0d relock=%0d coarse=%0d fine=%0d mismatch=%0d in_fifo_full=%0d out_backpressure=%0d fir_stall=%0d",
             n_ro_start, n_ro_stop, n_ro_reads, n_relock, n_coarse, n_fine, n_mismatch, n_in_full, out_words, n_fir_stall);
    check(n_ro_start > 0 && n_ro_stop > 0, "ring start and stop");
    check(n_ro_reads == N_RO, "every ring read");
    check(n_relock > 0, "clock manager relocked");
    check(n_coarse > 0, "coarse 10 MHz steps");
    check(n_fine > 0, "fine 1 MHz steps");
    check(n_mismatch == 2, "one mismatch ends each search phase");
    check(n_coarse == 10 && n_fine == 5, "10 coarse and 5 fine steps from 140 to 234 MHz");
    check(n_in_full > 0, "input FIFO full throttled the stream");
    check(out_words > 0, "output stream back-pressure");
    check(n_fir_stall > 0, "output FIFO full stalled the filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
