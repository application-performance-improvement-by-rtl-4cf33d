// Dual-clock FIFO that carries samples between the fixed 100 MHz DMA domain
// and the user IP's reconfigurable clock domain.
// DEPTH words (a power of two, 16 in the published framework) are held in a
// register array written in the write domain and read in the read domain.
// Each side keeps a binary pointer one bit wider than the address plus its
// Gray-coded copy; the Gray pointer crosses to the other domain through two
// flip-flops. Full is raised when the write pointer equals the synchronized
// read pointer with its two top bits inverted, empty when the read pointer
// equals the synchronized write pointer. Flags are therefore pessimistic by
// the synchronizer latency, never wrong, whatever the ratio of the clocks.
// The read side is first-word-fall-through: r_data shows the head word while
// r_valid is high, and r_valid && r_ready pops it. The write side pushes on
// w_valid && w_ready. Both resets are asynchronous and must be applied
// together. Depth and widths follow the published framework; the Gray-code
// structure is this design's choice.
`timescale 1ns/1ps
module async_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 16
) (
  input  logic             w_clk,
  input  logic             w_rst_n,
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,
  input  logic             r_clk,
  input  logic             r_rst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] w_bin, w_gray, r_bin, r_gray;
  logic [AW:0] w_gray_r1, w_gray_r2;   // write pointer seen in read domain
  logic [AW:0] r_gray_w1, r_gray_w2;   // read pointer seen in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic        push;
  logic [AW:0] w_bin_next;

  assign push       = w_valid && w_ready;
  assign w_bin_next = w_bin + (AW+1)'(push);
  assign w_ready    = (w_gray != {~r_gray_w2[AW:AW-1], r_gray_w2[AW-2:0]});

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      w_bin     <= '0;
      w_gray    <= '0;
      r_gray_w1 <= '0;
      r_gray_w2 <= '0;
    end else begin
      w_bin     <= w_bin_next;
      w_gray    <= bin2gray(w_bin_next);
      r_gray_w1 <= r_gray;
      r_gray_w2 <= r_gray_w1;
    end
  end

  always_ff @(posedge w_clk) begin
    if (push)
      mem[w_bin[AW-1:0]] <= w_data;
  end

  // ---------------- read domain ----------------
  logic        pop;
  logic [AW:0] r_bin_next;

  assign r_valid    = (r_gray != w_gray_r2);
  assign pop        = r_valid && r_ready;
  assign r_bin_next = r_bin + (AW+1)'(pop);
  assign r_data     = mem[r_bin[AW-1:0]];

  always_ff @(posedge r_clk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      r_bin     <= '0;
      r_gray    <= '0;
      w_gray_r1 <= '0;
      w_gray_r2 <= '0;
    end else begin
      r_bin     <= r_bin_next;
      r_gray    <= bin2gray(r_bin_next);
      w_gray_r1 <= w_gray;
      w_gray_r2 <= w_gray_r1;
    end
  end

  a_depth_pow2: assert final (DEPTH == (1 << AW) && AW >= 2);

endmodule
