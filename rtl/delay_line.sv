`timescale 1ps / 1ps
// Behavioural model: a delay element of the pulse generator.
//
// Repeats its input after DELAY_PS picoseconds with transport semantics:
// every edge of a comes out of y, however short the pulse. In silicon this is
// an inverter chain sized for the delay; here it only models that delay, so
// it has no synthesizable meaning. The output starts low.
//
// Ports: a (input), y (a delayed by DELAY_PS).
module delay_line #(
  parameter int unsigned DELAY_PS = 220
) (
  input  logic a,
  output logic y
);

  initial y = 1'b0;

  always @(a) y <= #(DELAY_PS) a;

endmodule
