`timescale 1ps / 1ps
// Self-checking test of one sub shift register.
//
// The pulsed clocks are driven directly by the testbench, in the order and
// with the timing of the pulse generator: CLK_pulse[T], then CLK_pulse[K] down
// to CLK_pulse[1], each 170 ps wide with 50 ps gaps. After every pulse train
// the K data latches and the temporary latch are compared with a reference
// shift register of K+1 bits. The test also checks that a single pulse on
// its own moves exactly one latch, that the clear works and that din_b is
// taken as the complement rail.
module tb_sub_shift_register;
  import pl_shift_pkg::*;

  localparam int unsigned K = K_BITS;

  logic         rst;
  logic [K:0]   clk_pulse;
  logic         din, din_b;
  logic [K-1:0] q;
  logic         t, t_b;
  int           checks = 0;
  int           failures = 0;

  sub_shift_register dut (
    .rst       (rst),
    .clk_pulse (clk_pulse),
    .din       (din),
    .din_b     (din_b),
    .q         (q),
    .t         (t),
    .t_b       (t_b)
  );

  // Reference: exp_q[0] = Q1 ... exp_q[K-1] = QK, exp_t = T.
  logic [K-1:0] exp_q;
  logic         exp_t;

  task automatic fire(input int unsigned line);
    clk_pulse[line] = 1'b1;
    #(T_PULSE_PS);
    clk_pulse[line] = 1'b0;
    #(T_INTERVAL_PS);
  endtask

  task automatic shift(input logic b);
    din = b;
    din_b = ~b;
    #20;
    fire(PULSE_T);
    for (int i = K; i >= 1; i--) fire(i);
    exp_t = exp_q[K-1];
    exp_q = {exp_q[K-2:0], b};
  endtask

  task automatic check(input string what);
    checks++;
    if (q !== exp_q || t !== exp_t || t_b !== ~exp_t) begin
      failures++;
      $display("FAIL %s: q=%b t=%b expected q=%b t=%b", what, q, t, exp_q, exp_t);
    end
  endtask

  initial begin
    rst = 1'b1; clk_pulse = '0; din = 1'b0; din_b = 1'b1;
    exp_q = '0; exp_t = 1'b0;
    #100;
    check("after clear");
    rst = 1'b0;
    #50;

    // Walking one: it must take K trains to reach QK and one more to reach T.
    shift(1'b1);
    check("one shifted in");
    for (int s = 0; s < K; s++) begin
      shift(1'b0);
      check("walking one");
    end
    checks++;
    if (t !== 1'b1) begin
      failures++;
      $display("FAIL the one is not in T after K+1 shifts");
    end

    // A single CLK_pulse[T] copies QK into T and nothing else.
    for (int s = 0; s < K; s++) shift(1'b1);
    check("ones loaded");
    fire(PULSE_T);
    exp_t = exp_q[K-1];
    check("CLK_pulse[T] alone");

    // din_b is the rail that pulls Q down: d == db leaves Q1 unchanged.
    din = 1'b0; din_b = 1'b0;
    #20;
    fire(1);
    check("non-differential input ignored by Q1");

    // Random data.
    for (int n = 0; n < 500; n++) begin
      shift(1'($urandom));
      check("random shift");
    end

    rst = 1'b1;
    #20;
    exp_q = '0; exp_t = 1'b0;
    check("clear at the end");

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
