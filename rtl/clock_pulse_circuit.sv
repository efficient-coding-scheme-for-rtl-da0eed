`timescale 1ps / 1ps
// Behavioural model: one clock-pulse circuit of the pulse generator.
//
// Turns the rising edge of a (delayed) clock into a single pulse of width
// WIDTH_PS: an AND gate combines the clock with an inverted copy of itself
// taken WIDTH_PS later from a delay element, so the output is high only
// between the rising edge of `clk_in` and the rising edge of its delayed copy.
// Because the pulse is cut out of two delayed signals, its width is set by
// the delay element alone and may be shorter than a rise plus a fall time of
// the clock. The delay makes this a model, not synthesizable logic.
//
// Ports: clk_in (clock tap of the delay chain), pulse (the pulsed clock).
// Timing: pulse rises with clk_in and falls WIDTH_PS later; clk_in must stay
// high and low for at least WIDTH_PS each.
module clock_pulse_circuit #(
  parameter int unsigned WIDTH_PS = 170
) (
  input  logic clk_in,
  output logic pulse
);

  logic clk_late;

  delay_line #(.DELAY_PS(WIDTH_PS)) u_width (
    .a (clk_in),
    .y (clk_late)
  );

  assign pulse = clk_in & ~clk_late;

endmodule
