// Testbench for the FIR filter in both published sizes: IP1 (64 taps, 10-bit
// samples, 26-bit sum) and IP2 (32 taps, 7-bit samples, 19-bit sum). Random
// samples, including full-scale ones, are streamed with random gaps and random
// output back-pressure; every result is compared with a reference convolution
// computed here, and the latency of an unstalled sample is checked to be three
// clock edges. A full-rate phase checks one result per cycle.
`timescale 1ns/1ps
module tb_fir_filter;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Coefficient rule of the design, restated independently.
  function automatic longint coef(int i, int taps, int w);
    int k, m;
    k = (i <= taps - 1 - i) ? i : taps - 1 - i;
    m = ((k + 1) * ((2 ** (w - 1)) - 1)) / ((taps + 1) / 2);
    if ((i % 5) == 2) return -m;
    return m;
  endfunction

  // ---------------- generic harness, instantiated twice ----------------
  `define FIR_HARNESS(NAME, T, DW, AW) \
  logic                 NAME``_iv = 1'b0, NAME``_ir, NAME``_ov, NAME``_or = 1'b1; \
  logic signed [DW-1:0] NAME``_id = '0; \
  logic signed [AW-1:0] NAME``_od; \
  fir_filter #(.TAPS(T), .DIN_W(DW), .COEF_W(DW), .ACC_W(AW)) NAME ( \
    .clk(clk), .rst_n(rst_n), .in_valid(NAME``_iv), .in_ready(NAME``_ir), .in_data(NAME``_id), \
    .out_valid(NAME``_ov), .out_ready(NAME``_or), .out_data(NAME``_od)); \
  longint NAME``_hist [T]; \
  longint NAME``_exp [$]; \
  int     NAME``_acc_cyc [$]; \
  int     NAME``_outs = 0, NAME``_lat_ok = 0, NAME``_lat_checked = 0; \
  always @(posedge clk) if (rst_n) begin \
    if (NAME``_iv && NAME``_ir) begin \
      longint s; \
      for (int i = T - 1; i > 0; i--) NAME``_hist[i] = NAME``_hist[i-1]; \
      NAME``_hist[0] = longint'(NAME``_id); \
      s = 0; \
      for (int i = 0; i < T; i++) s += coef(i, T, DW) * NAME``_hist[i]; \
      NAME``_exp.push_back(s); \
      NAME``_acc_cyc.push_back(cyc); \
    end \
    if (NAME``_ov && NAME``_or) begin \
      longint e; int c; \
      NAME``_outs++; \
      e = NAME``_exp.pop_front(); c = NAME``_acc_cyc.pop_front(); \
      check(longint'(NAME``_od) == e, $sformatf(`"NAME result %0d expected %0d`", NAME``_od, e)); \
      if (stall_free) begin \
        NAME``_lat_checked++; \
        check(cyc - c == 3, $sformatf(`"NAME latency %0d`", cyc - c)); \
      end \
    end \
  end

  int cyc = 0;
  bit stall_free = 1'b0;
  always @(posedge clk) cyc++;

  `FIR_HARNESS(ip1, 64, 10, 26)
  `FIR_HARNESS(ip2, 32, 7, 19)

  initial begin
    for (int i = 0; i < 64; i++) ip1_hist[i] = 0;
    for (int i = 0; i < 32; i++) ip2_hist[i] = 0;
  end

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] pick(int w);
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return -(16'sd1 <<< (w - 1));        // most negative
    if (r == 1) return (16'sd1 <<< (w - 1)) - 1;     // most positive
    return 16'($urandom_range(0, (1 << w) - 1)) - 16'(1 << (w - 1));
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // phase 1: random gaps and back-pressure
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!ip1_iv || ip1_ir) begin ip1_iv = ($urandom_range(0, 3) != 0); ip1_id = 10'(pick(10)); end
      if (!ip2_iv || ip2_ir) begin ip2_iv = ($urandom_range(0, 3) != 0); ip2_id = 7'(pick(7)); end
      ip1_or = ($urandom_range(0, 4) != 0);
      ip2_or = ($urandom_range(0, 4) != 0);
    end
    @(negedge clk);
    ip1_iv = 1'b0; ip2_iv = 1'b0; ip1_or = 1'b1; ip2_or = 1'b1;
    repeat (8) @(negedge clk);
    // phase 2: full rate, no stalls: one result per cycle, latency 3
    stall_free = 1'b1;
    begin
      int o1, o2;
      o1 = ip1_outs; o2 = ip2_outs;
      for (int n = 0; n < 500; n++) begin
        ip1_iv = 1'b1; ip1_id = 10'(pick(10));
        ip2_iv = 1'b1; ip2_id = 7'(pick(7));
        @(negedge clk);
      end
      ip1_iv = 1'b0; ip2_iv = 1'b0;
      check(ip1_outs - o1 >= 497 && ip2_outs - o2 >= 497, "one result per cycle at full rate");
    end
    repeat (8) @(negedge clk);
    check(ip1_exp.size() == 0 && ip2_exp.size() == 0, "every accepted sample produced a result");
    check(ip1_lat_checked == 500 && ip2_lat_checked == 500, "latency checked on the full-rate stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
