`timescale 1ps / 1ps
// Self-checking test of one pulsed latch.
//
// Drives the clear, the pulsed clock and both data rails directly and checks
// the stored bit against the expected latch behaviour: cleared by rst, written
// while the pulse is high with a differential input, transparent to input
// changes during the pulse, holding when the pulse is low, and unchanged by a
// non-differential input (d == db). qb must always be the complement of q.
module tb_ssaspl_latch;

  logic rst, clk_pulse, d, db;
  logic q, qb;
  int   checks = 0;
  int   failures = 0;

  ssaspl_latch dut (
    .rst       (rst),
    .clk_pulse (clk_pulse),
    .d         (d),
    .db        (db),
    .q         (q),
    .qb        (qb)
  );

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || qb !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%0b qb=%0b expected q=%0b", what, q, qb, exp);
    end
  endtask

  // Apply one pulse of 170 ps with the input held constant.
  task automatic pulse_write(input logic bit_in);
    d = bit_in;
    db = ~bit_in;
    #50;
    clk_pulse = 1'b1;
    #170;
    clk_pulse = 1'b0;
    #50;
  endtask

  logic model;

  initial begin
    rst = 1'b1; clk_pulse = 1'b0; d = 1'b1; db = 1'b0;
    #100;
    check(1'b0, "cleared by rst");
    clk_pulse = 1'b1;
    #10;
    check(1'b0, "rst wins over the pulse");
    clk_pulse = 1'b0;
    rst = 1'b0;
    #10;
    check(1'b0, "holds after rst");

    // Input changes without a pulse are ignored.
    d = 1'b1; db = 1'b0;
    #100;
    check(1'b0, "holds without pulse (d=1)");

    pulse_write(1'b1);
    check(1'b1, "write 1");
    d = 1'b0; db = 1'b1;
    #100;
    check(1'b1, "holds 1 after the pulse");
    pulse_write(1'b0);
    check(1'b0, "write 0");

    // Transparent during the pulse.
    d = 1'b0; db = 1'b1;
    clk_pulse = 1'b1;
    #50;
    d = 1'b1; db = 1'b0;
    #10;
    check(1'b1, "transparent while the pulse is high");
    clk_pulse = 1'b0;
    #10;
    d = 1'b0; db = 1'b1;
    #10;
    check(1'b1, "closed after the pulse");

    // A non-differential input cannot flip the cell.
    d = 1'b0; db = 1'b0;
    clk_pulse = 1'b1;
    #170;
    clk_pulse = 1'b0;
    #10;
    check(1'b1, "d=db=0 keeps the value");
    d = 1'b1; db = 1'b1;
    pulse_write(1'b0);
    check(1'b0, "write 0 again");
    d = 1'b1; db = 1'b1;
    clk_pulse = 1'b1;
    #170;
    clk_pulse = 1'b0;
    #10;
    check(1'b0, "d=db=1 keeps the value");

    // Random writes and idle pulses against a one-bit model.
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      logic b;
      b = 1'($urandom);
      if ($urandom % 4 == 0) begin
        d = b; db = b;        // no differential input: hold
        #50; clk_pulse = 1'b1; #170; clk_pulse = 1'b0; #50;
      end else begin
        pulse_write(b);
        model = b;
      end
      check(model, "random sequence");
      // The input moves on after the pulse: the latch must hold.
      d = ~model; db = model;
      #30;
      check(model, "random sequence, hold");
    end

    rst = 1'b1;
    #10;
    check(1'b0, "cleared again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
