// Constants of the ring-oscillator (RO) sensing network: its size, the width of
// each sensor's counter and the encoding of the 32-bit command word the CPU
// writes over AXI-Lite.
//
// Command word (written to any address of the RO port):
//   bit 31 = 1 : control command
//                bit 1 RST : clear every RO counter and output register first
//                bit 0 ACT : value loaded into every activation register
//                            (1 = start the ROs, 0 = stop them)
//   bit 31 = 0 : bits [15:0] are a multiplexer address; a following AXI read
//                returns that RO's 16-bit count in bits [15:0].
// The 408 sensors and the 16-bit counter follow the published design; the
// bit layout of the command word is this implementation's own.
//
// ro_element_delay_ps() is only used by the behavioural ring-oscillator model:
// it gives each sensor position a slightly different delay per loop element so
// that a simulated run shows a spread of frequencies, the way a real die does.
`timescale 1ns/1ps
package ro_pkg;

  localparam int unsigned NUM_RO     = 408;
  localparam int unsigned COUNT_W    = 16;
  localparam int unsigned RO_ADDR_W  = 16;

  localparam int unsigned CMD_CTRL_BIT = 31;
  localparam int unsigned CMD_RST_BIT  = 1;
  localparam int unsigned CMD_ACT_BIT  = 0;

  // Behavioural delay of one loop element (LUT plus pass-through latch) at
  // sensor position idx: BASE plus one of 16 steps of STEP picoseconds.
  function automatic int unsigned ro_element_delay_ps(int unsigned idx,
                                                      int unsigned base_ps,
                                                      int unsigned step_ps);
    return base_ps + ((idx * 7 + idx / 17) % 16) * step_ps;
  endfunction

endpackage
