`timescale 1ps / 1ps
// One sub shift register: K data latches and one temporary storage latch.
//
// The data latches Q1..QK form a K-bit shift register; the temporary latch T
// keeps a copy of QK so that the next sub shift register can still read the
// old QK after QK itself has been overwritten. One shift takes K+1 pulses:
// CLK_pulse[T] first copies QK into T, then CLK_pulse[K] ... CLK_pulse[1]
// write QK from QK-1, ..., Q2 from Q1 and finally Q1 from the input. Because
// every latch is pulsed after the latch it feeds, each latch sees a constant
// input during its pulse, and pulsed latches can be chained without delay
// elements between them. The first sub register takes its input from the
// shift register input; every other one from the T latch of the previous sub
// register.
//
// All latches carry differential data: each latch's D/Db come from the
// previous latch's Q/Qb, and din/din_b must be complementary.
//
// Ports: rst (clears all latches), clk_pulse[K:0] (clk_pulse[0] =
// CLK_pulse[T], clk_pulse[i] = CLK_pulse[i]), din/din_b (serial input), q[K-1:0]
// (data latches, q[0] = Q1), t/t_b (temporary storage latch).
// Timing: one bit shift per pulse train; din must be stable from the start of
// the train until CLK_pulse[1] has ended. The latches are intended.
module sub_shift_register
  import pl_shift_pkg::*;
#(
  parameter int unsigned K = K_BITS
) (
  input  logic         rst,
  input  logic [K:0]   clk_pulse,
  input  logic         din,
  input  logic         din_b,
  output logic [K-1:0] q,
  output logic         t,
  output logic         t_b
);

  logic [K-1:0] qb;
  // d_in[j], db_in[j]: differential input of data latch j+1.
  logic [K-1:0] d_in;
  logic [K-1:0] db_in;

  assign d_in[0]  = din;
  assign db_in[0] = din_b;
  if (K > 1) begin : g_link
    assign d_in[K-1:1]  = q[K-2:0];
    assign db_in[K-1:1] = qb[K-2:0];
  end

  for (genvar j = 0; j < K; j++) begin : g_data
    ssaspl_latch u_latch (
      .rst       (rst),
      .clk_pulse (clk_pulse[j+1]),
      .d         (d_in[j]),
      .db        (db_in[j]),
      .q         (q[j]),
      .qb        (qb[j])
    );
  end

  ssaspl_latch u_temp (
    .rst       (rst),
    .clk_pulse (clk_pulse[PULSE_T]),
    .d         (q[K-1]),
    .db        (qb[K-1]),
    .q         (t),
    .qb        (t_b)
  );

endmodule
