`timescale 1ps / 1ps
// Low-power, area-efficient N-bit shift register built from pulsed latches.
//
// A pulsed latch (one latch plus a short clock pulse) is about half the size
// and power of a master-slave flip-flop, but latches cannot simply be chained
// under one pulsed clock: a latch's input would change while that latch is
// still open. This register avoids the race by pulsing the latches in the
// opposite order to the data flow, with several non-overlapping delayed
// pulses. To keep the number of pulses small, the N bits are split into N/K
// sub shift registers of K bits that all share the same K+1 pulses; each sub
// register has one extra temporary storage latch that hands its last bit to
// the next sub register. With N = 256 and K = 4 this is 64 sub registers,
// 320 latches and 5 pulsed clocks.
//
// Per rising edge of clk the pulse generator fires CLK_pulse[T] (every T
// latch copies its sub register's last bit), then CLK_pulse[K] ... CLK_pulse[1]
// (each sub register shifts by one, its first latch reading the previous T
// latch, or din for the first sub register). The net effect is one shift per
// clock: after a rising edge q[0] holds the din of that edge, q[i] the din of
// i edges earlier, and dout (the last T latch) the bit q[N-1] held before.
//
// Following the fabricated design: the sub register structure, the pulse
// order, N = 256, K = 4 and the pulse timing. This design's own choices: the
// asynchronous clear rst, the inverter making din_b from din, the delay from
// clk to the first pulse, and dout taken from the last temporary latch.
//
// Ports: clk (main clock), rst (clear, active high, hold across at least one
// pulse train), din (serial input), q[N-1:0] (all data latches, q[0] = Q1),
// dout (serial output).
// Timing: din must be stable from the rising edge of clk until CLK_pulse[1]
// has ended, T_CP + K*T_DELAY + T_PULSE after the edge (1150 ps at the
// defaults); q is valid from then until the next rising edge. The clock
// period must be at least that long. The pulse generator is a timing model
// (delay elements), the rest is latch logic; the latches are intended. The
// complement rail of the last temporary latch has no reader and stays unused.
module pl_shift_register
  import pl_shift_pkg::*;
#(
  parameter int unsigned N       = N_BITS,
  parameter int unsigned K       = K_BITS,
  parameter int unsigned T_CP    = T_CP_PS,
  parameter int unsigned T_PULSE = T_PULSE_PS,
  parameter int unsigned T_DELAY = T_DELAY_PS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         din,
  output logic [N-1:0] q,
  output logic         dout
);

  localparam int unsigned M = N / K;  // number of sub shift registers

  if (K == 0 || N % K != 0) begin : g_bad_size
    $error("N must be a multiple of K");
  end

  logic [K:0]   clk_pulse;
  logic [M-1:0] t;
  logic [M-1:0] t_b;

  delayed_pulse_gen #(
    .K       (K),
    .T_CP    (T_CP),
    .T_PULSE (T_PULSE),
    .T_DELAY (T_DELAY)
  ) u_pulse_gen (
    .clk       (clk),
    .clk_pulse (clk_pulse)
  );

  for (genvar m = 0; m < M; m++) begin : g_sub
    logic sub_din;
    logic sub_din_b;
    if (m == 0) begin : g_first
      assign sub_din   = din;
      assign sub_din_b = ~din;
    end else begin : g_next
      assign sub_din   = t[m-1];
      assign sub_din_b = t_b[m-1];
    end

    sub_shift_register #(.K(K)) u_sub (
      .rst       (rst),
      .clk_pulse (clk_pulse),
      .din       (sub_din),
      .din_b     (sub_din_b),
      .q         (q[m*K +: K]),
      .t         (t[m]),
      .t_b       (t_b[m])
    );
  end

  assign dout = t[M-1];

endmodule
