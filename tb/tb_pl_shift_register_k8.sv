`timescale 1ps / 1ps
// Test of the 256-bit register built from 8-bit sub shift registers
// (K = 8: 32 sub registers, 288 latches, 9 pulsed clocks), the second
// organisation of the fabricated chip, next to the default K = 4.
//
// Its pulse train is T_CP + 8*T_DELAY + T_PULSE = 2030 ps long, so the clock
// may run at up to about 490 MHz. Random data is shifted in at 100 MHz,
// 10 MHz and 480 MHz, and all outputs are compared with a reference shift
// register just before every rising edge. The test also counts pulse trains
// seen in the order T, 8, 7, ..., 1 and overlapping pulses.
module tb_pl_shift_register_k8;
  import pl_shift_pkg::*;

  localparam int unsigned N = 256;
  localparam int unsigned K = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic         din;
  logic [N-1:0] q;
  logic         dout;
  int           checks = 0;
  int           failures = 0;

  pl_shift_register #(.N(N), .K(K)) dut (
    .clk  (clk),
    .rst  (rst),
    .din  (din),
    .q    (q),
    .dout (dout)
  );

  logic [N-1:0] exp_q;
  logic         exp_dout;
  int           n_overlaps = 0;
  int           n_trains_ordered = 0;
  int           pulse_seq[$];

  always @(dut.clk_pulse) begin
    if ($countones(dut.clk_pulse) > 1) n_overlaps++;
  end

  for (genvar i = 0; i <= K; i++) begin : g_pulse_mon
    always @(posedge dut.clk_pulse[i]) pulse_seq.push_back(i);
  end

  function automatic bit train_ok();
    if (pulse_seq.size() != K + 1) return 1'b0;
    if (pulse_seq[0] != int'(PULSE_T)) return 1'b0;
    for (int s = 1; s <= K; s++) begin
      if (pulse_seq[s] != int'(K + 1 - s)) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic cycle(input logic b, input int unsigned half_ps);
    din = b;
    #20;
    pulse_seq.delete();
    clk = 1'b1;
    #(half_ps);
    clk = 1'b0;
    #(half_ps - 40);
    if (!rst) begin
      exp_dout = exp_q[N-1];
      exp_q    = {exp_q[N-2:0], b};
    end
    if (train_ok()) n_trains_ordered++;
    checks++;
    if (q !== exp_q || dout !== exp_dout) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: q=%h dout=%b expected q=%h dout=%b",
                 $time, q, dout, exp_q, exp_dout);
    end
    #20;
  endtask

  int n_cycles = 0;

  initial begin
    rst = 1'b1;
    din = 1'b0;
    exp_q = '0;
    exp_dout = 1'b0;
    #3000;
    cycle(1'b0, 5000);
    rst = 1'b0;
    for (int c = 0; c < 2 * int'(N); c++) begin cycle(1'($urandom), 5000);  n_cycles++; end
    for (int c = 0; c < int'(N) + 20; c++) begin cycle(1'($urandom), 50000); n_cycles++; end
    for (int c = 0; c < 2 * int'(N); c++) begin cycle(1'($urandom), 1040); n_cycles++; end

    checks++;
    if (n_trains_ordered != n_cycles + 1) begin
      failures++;
      $display("FAIL %0d of %0d pulse trains in order", n_trains_ordered, n_cycles + 1);
    end
    checks++;
    if (n_overlaps != 0) begin
      failures++;
      $display("FAIL %0d overlapping pulses", n_overlaps);
    end
    checks++;
    if (pulse_train_ps(K, T_CP_PS, T_DELAY_PS, T_PULSE_PS) > 2080) begin
      failures++;
      $display("FAIL pulse train does not fit a 2080 ps period");
    end
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
