`timescale 1ps / 1ps
// End-to-end test of the pulsed-latch shift register at its default size
// (N = 256, K = 4: 64 sub shift registers, 320 latches, 5 pulsed clocks).
//
// Serial data is shifted in at 100 MHz, 10 MHz and 800 MHz. Just before every
// rising clock edge all N data outputs and the serial output are compared
// with a reference shift register, so the check also covers the latency: a
// bit taken at one edge is in q[i] after i more edges and at dout after N
// more. A walking one measures that latency explicitly, and a clear is applied
// in the middle of the data stream.
//
// Monitors inside the design count what the mechanisms of the register did:
// pulse trains seen in the required order (T, K, ..., 1), overlapping pulses
// (must never happen), hand-overs through the temporary storage latches
// between sub registers, and clears. A mechanism that never happened counts
// as a failure.
module tb_pl_shift_register;
  import pl_shift_pkg::*;

  localparam int unsigned N = N_BITS;
  localparam int unsigned K = K_BITS;
  localparam int unsigned M = N / K;

  logic         clk = 1'b0;
  logic         rst;
  logic         din;
  logic [N-1:0] q;
  logic         dout;
  int           checks = 0;
  int           failures = 0;

  pl_shift_register dut (
    .clk  (clk),
    .rst  (rst),
    .din  (din),
    .q    (q),
    .dout (dout)
  );

  // ---------------------------------------------------------------- reference
  logic [N-1:0] exp_q;
  logic         exp_dout;

  // ------------------------------------------------------------- monitors
  int n_trains_ordered = 0;
  int n_trains_bad     = 0;
  int n_overlaps       = 0;
  int n_handovers      = 0;
  int n_clears         = 0;
  int n_shifts         = 0;
  int n_phases         = 0;

  // Order of pulse rises within the current train.
  int pulse_seq[$];

  always @(dut.clk_pulse) begin
    if ($countones(dut.clk_pulse) > 1) n_overlaps++;
  end

  for (genvar i = 0; i <= K; i++) begin : g_pulse_mon
    always @(posedge dut.clk_pulse[i]) pulse_seq.push_back(i);
  end

  // Expected order: CLK_pulse[T] (line 0), then K, K-1, ..., 1.
  function automatic bit train_ok();
    if (pulse_seq.size() != K + 1) return 1'b0;
    if (pulse_seq[0] != int'(PULSE_T)) return 1'b0;
    for (int s = 1; s <= K; s++) begin
      if (pulse_seq[s] != int'(K + 1 - s)) return 1'b0;
    end
    return 1'b1;
  endfunction

  // One clock cycle: drive din before the edge, raise the clock, and check
  // just before the next edge, when the pulse train has long ended.
  task automatic cycle(input logic b, input int unsigned half_ps);
    logic [M-1:0] t_before;
    din = b;
    #20;
    t_before = dut.t;
    pulse_seq.delete();
    clk = 1'b1;
    #(half_ps);
    clk = 1'b0;
    #(half_ps - 40);
    if (!rst) begin
      exp_dout = exp_q[N-1];
      exp_q    = {exp_q[N-2:0], b};
      n_shifts++;
    end
    if (train_ok()) n_trains_ordered++;
    else            n_trains_bad++;
    // A temporary latch that changed carried a bit into the next sub register.
    for (int m = 0; m < int'(M) - 1; m++) begin
      if (dut.t[m] != t_before[m]) n_handovers++;
    end
    checks++;
    if (q !== exp_q || dout !== exp_dout) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: q=%h dout=%b expected q=%h dout=%b",
                 $time, q, dout, exp_q, exp_dout);
    end
    #20;
  endtask

  task automatic clear(input int unsigned half_ps);
    rst = 1'b1;
    exp_q = '0;
    exp_dout = 1'b0;
    cycle(1'b0, half_ps);
    rst = 1'b0;
    n_clears++;
  endtask

  task automatic random_phase(input int n, input int unsigned half_ps);
    for (int c = 0; c < n; c++) cycle(1'($urandom), half_ps);
    n_phases++;
  endtask

  int first_seen;

  initial begin
    rst = 1'b1;
    din = 1'b0;
    exp_q = '0;
    exp_dout = 1'b0;
    #2000;
    clear(5000);
    checks++;
    if (q !== '0 || dout !== 1'b0) begin
      failures++;
      $display("FAIL register not cleared");
    end

    // Walking one: latency to every data latch and to the serial output.
    cycle(1'b1, 5000);
    first_seen = -1;
    // After c edges (the capturing one included) the one is in q[c-1].
    for (int c = 1; c <= int'(N) + 1; c++) begin
      checks++;
      if (c <= int'(N) && q !== (N'(1) << (c - 1))) begin
        failures++;
        $display("FAIL walking one: after %0d edges q=%h", c, q);
      end
      if (dout === 1'b1 && first_seen < 0) first_seen = c;
      cycle(1'b0, 5000);
    end
    checks++;
    if (first_seen != int'(N) + 1) begin
      failures++;
      $display("FAIL walking one reached dout after %0d edges, expected %0d",
               first_seen, N + 1);
    end

    random_phase(3 * N, 5000);   // 100 MHz
    clear(5000);                 // clear in the middle of the stream
    random_phase(N + 50, 50000); // 10 MHz
    random_phase(3 * N, 625);    // 800 MHz

    // Mechanisms that must have happened.
    checks++;
    if (n_trains_bad != 0 || n_trains_ordered == 0) begin
      failures++;
      $display("FAIL pulse trains: %0d in order, %0d not", n_trains_ordered, n_trains_bad);
    end
    checks++;
    if (n_overlaps != 0) begin
      failures++;
      $display("FAIL %0d overlapping pulses", n_overlaps);
    end
    checks++;
    if (n_handovers == 0) begin
      failures++;
      $display("FAIL no hand-over through a temporary latch");
    end
    checks++;
    if (n_clears < 2) begin
      failures++;
      $display("FAIL clear applied %0d times", n_clears);
    end
    checks++;
    if (n_phases != 3) begin
      failures++;
      $display("FAIL %0d clock-rate phases", n_phases);
    end

    $display("mechanisms: shifts=%0d ordered_trains=%0d handovers=%0d clears=%0d rate_phases=%0d overlaps=%0d",
             n_shifts, n_trains_ordered, n_handovers, n_clears, n_phases, n_overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
