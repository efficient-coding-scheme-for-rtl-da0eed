`timescale 1ps / 1ps
// Shared constants of the pulsed-latch shift register.
//
// The register is clocked by a single main clock CLK. Every rising CLK edge is
// turned into K+1 short, non-overlapping pulses, one per latch position of a
// sub shift register. This package holds the default word lengths and the
// pulse timing, in picoseconds, and fixes how the pulse bus is indexed:
//   clk_pulse[0]      = CLK_pulse[T], the pulse of the temporary storage latch
//   clk_pulse[i], i>0 = CLK_pulse[i], the pulse of data latch i of a sub register
// Pulses fire in the order clk_pulse[0], clk_pulse[K], ..., clk_pulse[1], i.e.
// opposite to the direction the data moves.
//
// Word lengths (256 bits, 4-bit sub registers), pulse width (170 ps), pulse
// interval (50 ps) and pulse-to-pulse delay (220 ps) are the values of the
// fabricated design. The delay from CLK to the first pulse is not given there
// and is this design's own choice.
package pl_shift_pkg;

  // Word length of the whole shift register.
  localparam int unsigned N_BITS = 256;
  // Word length of one sub shift register.
  localparam int unsigned K_BITS = 4;

  // Width of one pulsed clock.
  localparam int unsigned T_PULSE_PS    = 170;
  // Gap between the end of one pulse and the start of the next.
  localparam int unsigned T_INTERVAL_PS = 50;
  // Delay between the rising edges of two neighbouring pulses.
  localparam int unsigned T_DELAY_PS    = T_PULSE_PS + T_INTERVAL_PS;
  // Delay from the rising edge of CLK to the rising edge of CLK_pulse[T].
  localparam int unsigned T_CP_PS       = 100;

  // Position of CLK_pulse[T] on the pulse bus.
  localparam int unsigned PULSE_T = 0;

  // Time from a rising CLK edge until the last pulse of its train has ended:
  // the shortest CLK period the pulse train fits in (latch delays excluded).
  function automatic int unsigned pulse_train_ps(int unsigned k, int unsigned t_cp,
                                                 int unsigned t_delay, int unsigned t_pulse);
    return t_cp + k * t_delay + t_pulse;
  endfunction

endpackage
