// tb_io_irq_ctrl: self-checking test of the prioritized I/O interrupt.
// Checks that a wake-up raises the interrupt when no accelerated thread runs,
// is held back while one runs and delivered once it stops, that one
// acknowledge clears several aggregated wake-ups, and that a wake-up in the
// acknowledge cycle is not lost.
`timescale 1ns/1ps
module tb_io_irq_ctrl;
  logic clk = 0, rst_n = 0;
  logic wake_hi, ack, cur_accel, pending, irq_io;
  int checks = 0, failures = 0;

  io_irq_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit w, input bit a);
    wake_hi = w; ack = a; @(posedge clk); #1; wake_hi = 0; ack = 0;
  endtask

  initial begin
    bit ref_p;
    wake_hi = 0; ack = 0; cur_accel = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(!irq_io && !pending, "quiet after reset");
    step(1, 0);
    check(pending && irq_io, "wake raises interrupt");
    step(0, 1);
    check(!pending && !irq_io, "ack clears");
    cur_accel = 1;
    step(1, 0);
    check(pending && !irq_io, "held back while accelerated thread runs");
    cur_accel = 0; #1;
    check(irq_io, "delivered after context switch away");
    step(1, 0); step(1, 0);
    step(0, 1);
    check(!pending, "one ack clears aggregated wake-ups");
    step(1, 1);
    check(pending && irq_io, "wake in ack cycle kept");
    step(0, 1);
    // random sequence against a model
    ref_p = 0;
    for (int i = 0; i < 300; i++) begin
      automatic bit w = 1'($urandom_range(0, 1));
      automatic bit a = 1'($urandom_range(0, 1));
      cur_accel = 1'($urandom_range(0, 1));
      step(w, a);
      ref_p = w ? 1 : (a ? 0 : ref_p);
      check(pending == ref_p && irq_io == (ref_p && !cur_accel), "model match");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
