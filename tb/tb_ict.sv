// tb_ict: self-checking test of the I/O Connection Table peripheral.
// Through its MMIO port the testbench acts as kernel and as user threads, and
// through the sideband as the NIC. Checked:
//   * entry registers write and read back; unmapped entries read zero;
//   * protection: a user access with another ASID faults, a user store to a
//     register it does not own faults, its own pointer store succeeds;
//   * a pointer store sends a CPU-to-NIC notification with index and
//     direction;
//   * the RX lookup finds only valid, accelerated RX entries by port;
//   * WAIT suspends only when the ring is not ready (RX empty, TX short of
//     space), and a NIC pointer update then wakes the entry: ready queue,
//     I/O interrupt for interrupt-flagged entries, held back while an
//     accelerated thread runs, cleared by one acknowledge;
//   * the ready queue pops interrupt-flagged entries first;
//   * freeing a slot removes it from the ready queue;
//   * link changes and NIC errors come out of the event queue with irq_evt.
`timescale 1ns/1ps
module tb_ict;
  import accio_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  mmio_req_t mmio_req; mmio_rsp_t mmio_rsp;
  logic notify_valid; logic [2:0] notify_idx; dir_e notify_dir;
  logic [15:0] rx_lkp_sock; logic rx_lkp_hit; logic [2:0] rx_lkp_idx; ict_entry_t rx_lkp_entry;
  logic rx_upd_valid; logic [2:0] rx_upd_idx; logic [31:0] rx_upd_wr_ptr;
  logic [2:0] tx_rd_idx; ict_entry_t tx_rd_entry;
  logic tx_upd_valid; logic [2:0] tx_upd_idx; logic [31:0] tx_upd_rd_ptr;
  logic link_up, rx_overflow, nic_error; logic [2:0] rx_overflow_idx;
  logic [15:0] rx_overflow_len, nic_error_code;
  logic irq_io, irq_evt;
  int checks = 0, failures = 0;

  ict #(.N_ENTRIES(N), .EVQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // notifications seen
  int n_notify = 0; int last_nidx; dir_e last_ndir;
  always_ff @(posedge clk) if (rst_n && notify_valid) begin
    n_notify <= n_notify + 1; last_nidx <= notify_idx; last_ndir <= notify_dir;
  end

  logic [63:0] rd; logic flt;
  task automatic mmio(input bit wr, input logic [15:0] addr, input logic [63:0] wd,
                      input bit kern, input logic [15:0] asid);
    mmio_req = '{valid: 1, write: wr, addr: addr, wdata: wd, kernel: kern, asid: asid};
    @(posedge clk); #1;
    mmio_req.valid = 0;
    check(mmio_rsp.valid, "response one cycle later");
    rd = mmio_rsp.rdata; flt = mmio_rsp.fault;
  endtask
  function automatic logic [15:0] ea(input int e, input ict_reg_e r);
    return 16'(e * 64 + int'(r) * 8);
  endfunction
  function automatic logic [15:0] ga(input ict_greg_e r);
    return 16'h8000 + 16'(int'(r) * 8);
  endfunction
  function automatic logic [63:0] ctrl(input bit irq, input bit susp, input bit accel, input bit valid,
                                       input dir_e d, input logic [15:0] asid, input logic [15:0] sock);
    return {27'd0, irq, susp, accel, valid, d, asid, sock};
  endfunction
  task automatic setup(input int e, input bit irq, input dir_e d, input logic [15:0] asid,
                       input logic [15:0] sock, input logic [31:0] base, input logic [31:0] len);
    mmio(1, ea(e, REG_ADDR), 64'(base), 1, 0);
    mmio(1, ea(e, REG_LEN), 64'(len), 1, 0);
    mmio(1, ea(e, REG_RDPTR), 0, 1, 0);
    mmio(1, ea(e, REG_WRPTR), 0, 1, 0);
    mmio(1, ea(e, REG_CTRL), ctrl(irq, 0, 1, 1, d, asid, sock), 1, 0);
  endtask

  initial begin
    int n0;
    mmio_req = '0; rx_lkp_sock = 0; rx_upd_valid = 0; rx_upd_idx = 0; rx_upd_wr_ptr = 0;
    tx_rd_idx = 0; tx_upd_valid = 0; tx_upd_idx = 0; tx_upd_rd_ptr = 0;
    link_up = 0; rx_overflow = 0; nic_error = 0; rx_overflow_idx = 0; rx_overflow_len = 0; nic_error_code = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---- setup and read back
    setup(1, 1, DIR_RX, 16'd7, 16'd5000, 32'h1000, 32'd4096);
    setup(2, 0, DIR_RX, 16'd8, 16'd5001, 32'h3000, 32'd4096);
    setup(3, 0, DIR_TX, 16'd7, 16'd5000, 32'h5000, 32'd256);
    setup(4, 1, DIR_RX, 16'd9, 16'd5002, 32'h7000, 32'd4096);
    mmio(0, ea(1, REG_CTRL), 0, 1, 0);
    check(rd == ctrl(1, 0, 1, 1, DIR_RX, 16'd7, 16'd5000) && !flt, "CTRL reads back");
    mmio(0, ea(3, REG_ADDR), 0, 1, 0);
    check(rd == 64'h5000, "ADDR reads back");
    mmio(0, ea(3, REG_LEN), 0, 1, 0);
    check(rd == 64'd256, "LEN reads back");
    mmio(0, ea(6, REG_CTRL), 0, 1, 0);
    check(rd == 0 && !flt, "unused entry reads zero");

    // ---- protection
    mmio(0, ea(1, REG_WRPTR), 0, 0, 16'd7);
    check(!flt, "owner may read its entry");
    mmio(0, ea(1, REG_WRPTR), 0, 0, 16'd8);
    check(flt && rd == 0, "other ASID faults on load");
    mmio(1, ea(1, REG_RDPTR), 64'd16, 0, 16'd8);
    check(flt, "other ASID faults on store");
    mmio(1, ea(1, REG_CTRL), ctrl(1, 0, 1, 1, DIR_RX, 16'd8, 16'd5000), 0, 16'd7);
    check(flt, "user store to CTRL faults");
    mmio(1, ea(1, REG_WRPTR), 64'd64, 0, 16'd7);
    check(flt, "user store to the NIC-owned pointer faults");
    mmio(0, ea(1, REG_CTRL), 0, 1, 0);
    check(rd[31:16] == 16'd7, "faulting store changed nothing");
    mmio(0, ga(GREG_READY_POP), 0, 0, 16'd7);
    check(flt, "user access to globals faults");
    mmio(0, ea(6, REG_CTRL), 0, 0, 16'd0);
    check(flt, "user access to an invalid entry faults");

    // ---- notifications
    n0 = n_notify;
    mmio(1, ea(3, REG_WRPTR), 64'd32, 0, 16'd7);
    @(posedge clk); #1;
    check(!flt && n_notify == n0 + 1 && last_nidx == 3 && last_ndir == DIR_TX, "TX pointer store notifies NIC");
    tx_rd_idx = 3; #1;
    check(tx_rd_entry.wr_ptr == 32 && tx_rd_entry.buf_addr == 32'h5000, "TX sideband read");
    mmio(1, ea(1, REG_RDPTR), 64'd0, 0, 16'd7);
    @(posedge clk); #1;
    check(n_notify == n0 + 2 && last_nidx == 1 && last_ndir == DIR_RX, "RX pointer store notifies NIC");

    // ---- lookup
    rx_lkp_sock = 16'd5001; #1;
    check(rx_lkp_hit && rx_lkp_idx == 2 && rx_lkp_entry.buf_addr == 32'h3000, "lookup port 5001");
    rx_lkp_sock = 16'd5000; #1;
    check(rx_lkp_hit && rx_lkp_idx == 1, "lookup port 5000 finds the RX entry");
    mmio(1, ea(2, REG_CTRL), ctrl(0, 0, 0, 1, DIR_RX, 16'd8, 16'd5001), 1, 0);   // leave accelerated state
    rx_lkp_sock = 16'd5001; #1;
    check(!rx_lkp_hit, "non-accelerated entry not found");
    mmio(1, ea(2, REG_CTRL), ctrl(0, 0, 1, 1, DIR_RX, 16'd8, 16'd5001), 1, 0);
    rx_lkp_sock = 16'd4999; #1;
    check(!rx_lkp_hit, "unknown port not found");

    // ---- suspend and wake (RX, interrupt flag)
    mmio(1, ea(1, REG_WAIT), 0, 1, 0);
    mmio(0, ea(1, REG_CTRL), 0, 1, 0);
    check(rd[35], "WAIT on empty RX ring suspends");
    check(!irq_io, "no interrupt yet");
    rx_upd_valid = 1; rx_upd_idx = 1; rx_upd_wr_ptr = 32'd80; @(posedge clk); #1; rx_upd_valid = 0;
    check(irq_io, "NIC update wakes: I/O interrupt");
    mmio(0, ea(1, REG_CTRL), 0, 1, 0);
    check(!rd[35], "susp cleared by wake-up");
    mmio(0, ga(GREG_IRQ), 0, 1, 0);
    check(rd[0] && rd[1] && rd[3] && rd[4], "IRQ status: pending, irq_io, ready, high");
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(rd[63] && rd[62] && rd[7:0] == 1, "ready queue returns entry 1");
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(!rd[63], "ready queue empty");
    mmio(1, ga(GREG_IRQ), 1, 1, 0);
    check(!irq_io, "acknowledge clears the interrupt");
    // WAIT with data present: no suspend
    mmio(1, ea(1, REG_WAIT), 0, 1, 0);
    mmio(0, ea(1, REG_CTRL), 0, 1, 0);
    check(!rd[35], "WAIT on non-empty ring does not suspend");

    // ---- cur_accel holds the interrupt back; ordinary entry has lower priority
    mmio(1, ea(2, REG_WAIT), 0, 1, 0);       // entry 2: ordinary
    mmio(1, ea(4, REG_WAIT), 0, 1, 0);       // entry 4: interrupt flag
    mmio(1, ga(GREG_CUR_ACCEL), 1, 1, 0);
    rx_upd_valid = 1; rx_upd_idx = 2; rx_upd_wr_ptr = 32'd40; @(posedge clk); #1;
    rx_upd_idx = 4; rx_upd_wr_ptr = 32'd40; @(posedge clk); #1; rx_upd_valid = 0;
    check(!irq_io, "interrupt held while accelerated thread runs");
    mmio(1, ga(GREG_CUR_ACCEL), 0, 1, 0);
    check(irq_io, "interrupt delivered after switch to ordinary thread");
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(rd[63] && rd[7:0] == 4, "interrupt-flagged entry first");
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(rd[63] && !rd[62] && rd[7:0] == 2, "then the ordinary entry");
    mmio(1, ga(GREG_IRQ), 1, 1, 0);
    mmio(0, ga(GREG_STATS), 0, 1, 0);
    check(rd[31:0] == 3, $sformatf("three wake-ups counted (%0d)", rd[31:0]));

    // ---- TX: wait for space, woken by the NIC read pointer update
    mmio(1, ea(3, REG_WRPTR), 64'd240, 0, 16'd7);   // 16 bytes free
    mmio(1, ea(3, REG_WAIT), 64'd8, 1, 0);
    mmio(0, ea(3, REG_CTRL), 0, 1, 0);
    check(!rd[35], "TX WAIT with enough space does not suspend");
    mmio(1, ea(3, REG_WAIT), 64'd100, 1, 0);
    mmio(0, ea(3, REG_CTRL), 0, 1, 0);
    check(rd[35], "TX WAIT short of space suspends");
    tx_upd_valid = 1; tx_upd_idx = 3; tx_upd_rd_ptr = 32'd200; @(posedge clk); #1; tx_upd_valid = 0;
    check(!irq_io, "ordinary entry woken without interrupt");
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(rd[63] && rd[7:0] == 3, "TX entry in ready queue");
    mmio(0, ea(3, REG_RDPTR), 0, 0, 16'd7);
    check(rd == 200, "NIC read pointer visible to the owner");

    // ---- freeing a slot drops it from the ready queue
    mmio(1, ea(2, REG_WAIT), 0, 1, 0);
    mmio(1, ea(2, REG_RDPTR), 64'd40, 1, 0);     // consume: ring empty
    mmio(1, ea(2, REG_WAIT), 0, 1, 0);
    rx_upd_valid = 1; rx_upd_idx = 2; rx_upd_wr_ptr = 32'd80; @(posedge clk); #1; rx_upd_valid = 0;
    mmio(1, ea(2, REG_CTRL), 0, 1, 0);
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    check(!rd[63], "freed entry removed from ready queue");

    // ---- control events
    link_up = 1; @(posedge clk); #1;
    link_up = 0; @(posedge clk); #1;
    nic_error = 1; nic_error_code = 16'h0042; @(posedge clk); #1; nic_error = 0;
    check(irq_evt, "event interrupt");
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_LINK_UP, "LINK_UP event");
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_LINK_DOWN, "LINK_DOWN event");
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_NIC_ERROR && rd[15:0] == 16'h42, "NIC error event");
    check(!irq_evt, "event interrupt cleared when queue empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
