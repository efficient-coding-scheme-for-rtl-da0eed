`timescale 1ps / 1ps
// Self-checking test of the delayed pulsed clock generator.
//
// Runs the main clock at 100 MHz and then at 800 MHz. For every clock cycle it
// records when each pulse line rose and fell and checks, against times worked
// out from the timing constants: CLK_pulse[T] rises T_CP after the clock edge,
// CLK_pulse[i] rises T_CP + (K+1-i)*T_DELAY after it, every pulse is T_PULSE
// wide, each line pulses exactly once per cycle, and no two lines are ever
// high at the same time.
module tb_delayed_pulse_gen;
  import pl_shift_pkg::*;

  localparam int unsigned K = K_BITS;

  logic       clk = 1'b0;
  logic [K:0] clk_pulse;
  int         checks = 0;
  int         failures = 0;
  int         overlaps = 0;

  delayed_pulse_gen dut (
    .clk       (clk),
    .clk_pulse (clk_pulse)
  );

  // Per line: time of the last rise and fall, and pulses seen this cycle.
  longint rise_at [K+1];
  longint fall_at [K+1];
  int     n_pulses[K+1];
  longint edge_at;

  for (genvar i = 0; i <= K; i++) begin : g_mon
    always @(posedge clk_pulse[i]) begin
      rise_at[i] = longint'($time);
      n_pulses[i]++;
    end
    always @(negedge clk_pulse[i]) fall_at[i] = longint'($time);
  end

  always @(clk_pulse) begin
    if ($countones(clk_pulse) > 1) overlaps++;
  end

  function automatic longint expected_rise(int unsigned i);
    if (i == PULSE_T) return longint'(T_CP_PS);
    return longint'(T_CP_PS) + longint'(K + 1 - i) * longint'(T_DELAY_PS);
  endfunction

  task automatic run_cycles(input int n, input int unsigned half_ps);
    for (int c = 0; c < n; c++) begin
      for (int i = 0; i <= K; i++) n_pulses[i] = 0;
      clk = 1'b1;
      edge_at = longint'($time);
      #(half_ps);
      clk = 1'b0;
      #(half_ps);
      // The whole train has ended by now (period >= train length).
      for (int i = 0; i <= K; i++) begin
        checks++;
        if (n_pulses[i] != 1) begin
          failures++;
          $display("FAIL line %0d pulsed %0d times in cycle %0d", i, n_pulses[i], c);
        end
        checks++;
        if (rise_at[i] - edge_at != expected_rise(i)) begin
          failures++;
          $display("FAIL line %0d rose %0d ps after the edge, expected %0d",
                   i, rise_at[i] - edge_at, expected_rise(i));
        end
        checks++;
        if (fall_at[i] - rise_at[i] != longint'(T_PULSE_PS)) begin
          failures++;
          $display("FAIL line %0d pulse width %0d ps", i, fall_at[i] - rise_at[i]);
        end
      end
    end
  endtask

  initial begin
    // Let the delay chain settle with the clock low.
    #5000;
    overlaps = 0;
    run_cycles(20, 5000);   // 100 MHz
    run_cycles(20, 625);    // 800 MHz
    checks++;
    if (overlaps != 0) begin
      failures++;
      $display("FAIL pulses overlapped %0d times", overlaps);
    end
    // The train must fit the shortest period used above.
    checks++;
    if (pulse_train_ps(K, T_CP_PS, T_DELAY_PS, T_PULSE_PS) > 1250) begin
      failures++;
      $display("FAIL pulse train longer than 1250 ps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
