// tb_event_queue: self-checking test of the ICT control event queue.
// Checks link-down/link-up events from the link level, overflow and NIC error
// events with their payload, the order of events raised in one cycle, the
// interrupt line, FIFO order, and the sticky overflow flag when the queue is
// full.
`timescale 1ns/1ps
module tb_event_queue;
  import accio_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic link_up, rx_overflow, nic_error, pop_req, head_valid, overflow, evt_irq;
  logic [7:0] rx_overflow_entry; logic [15:0] rx_overflow_len, nic_error_code;
  event_t head;
  int checks = 0, failures = 0;

  event_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_pop(input event_code_e code, input int entry, input int info);
    check(head_valid && evt_irq, $sformatf("event %s expected, queue empty", code.name()));
    check(head.code == code && head.entry == 8'(entry) && head.info == 16'(info),
          $sformatf("head %0d/%0d/%0h expected %s/%0d/%0h", head.code, head.entry, head.info,
                    code.name(), entry, info));
    pop_req = 1; @(posedge clk); #1; pop_req = 0;
  endtask

  initial begin
    link_up = 0; rx_overflow = 0; nic_error = 0; pop_req = 0;
    rx_overflow_entry = 0; rx_overflow_len = 0; nic_error_code = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    check(!head_valid && !evt_irq && !overflow, "empty after reset");
    link_up = 1; @(posedge clk); #1;
    expect_pop(EV_LINK_UP, 0, 0);
    check(!evt_irq, "irq low when empty");
    // three sources in one cycle: link, overflow, error in that order
    link_up = 0; rx_overflow = 1; rx_overflow_entry = 8'd9; rx_overflow_len = 16'd1234;
    nic_error = 1; nic_error_code = 16'hBEEF;
    @(posedge clk); #1; rx_overflow = 0; nic_error = 0;
    expect_pop(EV_LINK_DOWN, 0, 0);
    expect_pop(EV_RX_OVERFLOW, 9, 1234);
    expect_pop(EV_NIC_ERROR, 0, 16'hBEEF);
    check(!head_valid, "drained");
    // fill past the depth
    for (int i = 0; i < DEPTH + 2; i++) begin
      nic_error = 1; nic_error_code = 16'(i); @(posedge clk); #1;
    end
    nic_error = 0;
    check(overflow, "overflow flag set when full");
    for (int i = 0; i < DEPTH; i++) begin
      expect_pop(EV_NIC_ERROR, 0, i);
      check(!overflow, "overflow cleared by pop");
    end
    check(!head_valid && !evt_irq, "lost events not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
