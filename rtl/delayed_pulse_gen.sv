`timescale 1ps / 1ps
// Behavioural model: delayed pulsed clock generator.
//
// From every rising edge of the main clock it makes K+1 short pulses that do
// not overlap: first CLK_pulse[T] for the temporary storage latches, then
// CLK_pulse[K], CLK_pulse[K-1], ..., CLK_pulse[1] for the data latches, i.e.
// in the opposite order to the one in which data moves through a sub shift
// register. That ordering is what lets pulsed latches be chained: each latch
// is written only after the latch it feeds has already taken its old value.
//
// Structure: CLK passes a delay chain; the first tap is T_CP_PS after CLK and
// each further tap T_DELAY_PS later. Each tap feeds a clock-pulse circuit (a
// delay element of T_PULSE_PS and an AND gate) that cuts a pulse of width
// T_PULSE_PS out of the tap. Pulse slot s (s = 0..K) therefore rises at
// T_CP_PS + s*T_DELAY_PS after CLK; slot 0 drives CLK_pulse[T] and slot s > 0
// drives CLK_pulse[K+1-s]. With T_DELAY_PS > T_PULSE_PS there is a gap of
// T_DELAY_PS - T_PULSE_PS between pulses.
//
// Pulse width 170 ps, interval 50 ps and delay 220 ps are the fabricated
// design's; T_CP_PS is this design's own choice. The delays make this a
// timing model of a custom circuit, not synthesizable logic.
//
// Ports: clk (main clock), clk_pulse[K:0] (clk_pulse[0] = CLK_pulse[T],
// clk_pulse[i] = CLK_pulse[i]).
// Timing: the whole train lasts T_CP_PS + K*T_DELAY_PS + T_PULSE_PS; CLK's
// period must be at least that, and CLK must stay high and low for at least
// T_PULSE_PS each.
module delayed_pulse_gen
  import pl_shift_pkg::*;
#(
  parameter int unsigned K          = K_BITS,
  parameter int unsigned T_CP       = T_CP_PS,
  parameter int unsigned T_PULSE    = T_PULSE_PS,
  parameter int unsigned T_DELAY    = T_DELAY_PS
) (
  input  logic         clk,
  output logic [K:0]   clk_pulse
);

  // tap[s]: CLK delayed by T_CP + s*T_DELAY.
  logic [K:0] tap;
  // slot_pulse[s]: the pulse cut out of tap[s].
  logic [K:0] slot_pulse;

  delay_line #(.DELAY_PS(T_CP)) u_first (
    .a (clk),
    .y (tap[0])
  );

  for (genvar s = 1; s <= K; s++) begin : g_chain
    delay_line #(.DELAY_PS(T_DELAY)) u_delay (
      .a (tap[s-1]),
      .y (tap[s])
    );
  end

  for (genvar s = 0; s <= K; s++) begin : g_pulse
    clock_pulse_circuit #(.WIDTH_PS(T_PULSE)) u_pulse (
      .clk_in (tap[s]),
      .pulse  (slot_pulse[s])
    );
  end

  // Slot 0 is CLK_pulse[T]; slots 1..K are CLK_pulse[K] down to CLK_pulse[1].
  assign clk_pulse[PULSE_T] = slot_pulse[0];
  for (genvar i = 1; i <= K; i++) begin : g_order
    assign clk_pulse[i] = slot_pulse[K + 1 - i];
  end

endmodule
