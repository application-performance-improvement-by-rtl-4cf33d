// Behavioural model (not synthesizable) of the clock manager: the PLL in an
// FPGA clock tile that produces the user IP's clock from the reference clock
// and can be reprogrammed at run time.
// The model measures the reference period from successive rising edges of
// ref_clk. After reset, and on every `load` pulse, it drops `locked`, stops
// its output (held low, as a clock buffer gated by the lock signal would) and,
// after LOCK_TIME_NS, restarts clk_out with period
//   T_out = T_ref * DIVCLK * CLKOUT_DIV / MULT
// taken from the factors present at the load, and raises `locked` again.
// The default lock time of 28 us sits in the 27-30 us reconfiguration time
// measured for the published framework; the formula is the usual one for an
// integer-factor PLL. Factors of zero are treated as one.
// Interface: ref_clk, rst (active high), mult/divclk/outdiv/load from the
// register bank, clk_out (IP clock), locked.
`timescale 1ns/1ps
module pll_model #(
  parameter int unsigned LOCK_TIME_NS = 28000
) (
  input  logic       ref_clk,
  input  logic       rst,
  input  logic [9:0] mult,
  input  logic [7:0] divclk,
  input  logic [7:0] outdiv,
  input  logic       load,
  output logic       clk_out,
  output logic       locked
);

  realtime last_edge;
  real     ref_period_ns;
  real     half_ns;
  int      lock_gen;

  initial begin
    clk_out       = 1'b0;
    locked        = 1'b0;
    last_edge     = 0;
    ref_period_ns = 10.0;
    half_ns       = 5.0;
    lock_gen      = 0;
  end

  always @(posedge ref_clk) begin
    if (last_edge > 0)
      ref_period_ns = $realtime - last_edge;
    last_edge = $realtime;
  end

  function automatic real out_half_ns(real tref, int m, int d, int o);
    int mm, dd, oo;
    mm = (m == 0) ? 1 : m;
    dd = (d == 0) ? 1 : d;
    oo = (o == 0) ? 1 : o;
    return tref * real'(dd) * real'(oo) / real'(mm) / 2.0;
  endfunction

  // (Re)lock sequence, started by reset release or a load pulse. A newer
  // request supersedes one still waiting (lock_gen).
  always @(negedge rst or posedge load) begin
    if (!rst) begin
      lock_gen = lock_gen + 1;
      locked   = 1'b0;
      half_ns  = out_half_ns(ref_period_ns, int'(mult), int'(divclk), int'(outdiv));
      fork
        begin
          automatic int my_gen = lock_gen;
          #(real'(LOCK_TIME_NS));
          if (my_gen == lock_gen && !rst)
            locked = 1'b1;
        end
      join_none
    end
  end

  always @(posedge rst) begin
    lock_gen = lock_gen + 1;
    locked   = 1'b0;
  end

  always begin
    if (!locked) begin
      clk_out = 1'b0;
      @(posedge locked);
    end
    #(half_ns);
    clk_out = locked ? ~clk_out : 1'b0;
  end

endmodule
