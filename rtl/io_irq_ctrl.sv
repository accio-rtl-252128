// io_irq_ctrl: the prioritized I/O wake-up interrupt of the ICT.
//
// A thread that blocked on an accelerated connection whose interrupt flag is
// set is woken through a dedicated interrupt, distinct from ordinary device
// interrupts. Following the document, the interrupt is delivered only when
// the CPU is not already running an accelerated I/O thread (a thread of equal
// priority); that condition comes from cur_accel, the extra ASID bit that the
// operating system updates on every context switch. Wake-ups of several
// connections are aggregated into one pending flag, and one acknowledge from
// the kernel clears it for all of them, as in the document's prototype.
//
// Timing: wake_hi sets `pending` at the clock edge; irq_io follows pending
// combinationally while cur_accel is low, so a wake-up held back while an
// accelerated thread runs is delivered as soon as the kernel clears
// cur_accel. An ack and a wake-up in the same cycle leave pending set.
module io_irq_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic wake_hi,    // an interrupt-flagged entry became ready
  input  logic ack,        // kernel acknowledges all pending wake-ups
  input  logic cur_accel,  // CPU runs an accelerated I/O thread
  output logic pending,
  output logic irq_io
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pending <= 1'b0;
    else if (wake_hi) pending <= 1'b1;
    else if (ack)     pending <= 1'b0;
  end

  assign irq_io = pending && !cur_accel;
endmodule
