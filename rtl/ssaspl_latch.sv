`timescale 1ps / 1ps
// One pulsed latch, modelled on the static differential sense-amp shared
// pulse latch (SSASPL).
//
// The transistor cell holds its bit in two cross-coupled inverters (Q, Qb) and
// has a single clocked NMOS: while the pulsed clock is high, the differential
// data input pulls Q or Qb to ground and so writes D into the cell. There is
// no inverter inside to make Db from D: both rails come from the previous
// latch's Q and Qb, so a chain of these latches passes both rails along.
//
// At the logic level this is a level-sensitive latch: transparent while
// clk_pulse is high, holding otherwise. Only a differential input (d != db)
// can flip the cell; with d == db neither side is pulled down and the cell
// keeps its value. The asynchronous clear rst is this design's addition (the
// transistor cell has none); it lets the register start from a known state.
//
// Ports: rst (clear, active high), clk_pulse (pulsed clock), d/db (data and
// its complement), q/qb (stored bit and its complement).
// Timing: q follows d while clk_pulse is high; d must be stable for the whole
// pulse, which the pulse ordering of the shift register guarantees. This
// module is an intended latch.
module ssaspl_latch (
  input  logic rst,
  input  logic clk_pulse,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);

  logic state;

  always_latch begin
    if (rst) begin
      state = 1'b0;
    end else if (clk_pulse && (d != db)) begin
      state = d;
    end
  end

  assign q  = state;
  assign qb = ~state;

endmodule
