// tb_accio_top: end-to-end test of the Accio node at its default size
// (64 connection slots). The testbench plays the operating system, two user
// threads, host memory, the remote peer on the wire and the normal traffic
// engine, and walks through the paths of the design:
//   RX fast path   a frame for a running thread lands in its ring; the thread
//                  sees the new write pointer, reads the data, frees the space;
//   RX slow path   the thread is suspended; the frame wakes it through the
//                  ready queue and the I/O interrupt;
//   TX fast path   the thread writes a record and stores its write pointer;
//                  the frame leaves on the wire, read pointer advances;
//   TX slow path   the thread waits for ring space; the transmitted frame
//                  frees it and wakes the thread;
//   interrupt held back while an accelerated thread runs;
//   normal path    frames of other connections go to the normal engine, and
//                  normal-engine frames share the wire with offload frames;
//   ring overflow  drop plus control event; link change events;
//   fallback       a connection taken out of the accelerated state goes to the
//                  normal path, and back;
//   protection     a thread touching another thread's entry faults.
// Each mechanism is counted and must have happened at least once.
`timescale 1ns/1ps
module tb_accio_top;
  import accio_pkg::*;
  import accio_tb_pkg::*;
  localparam logic [31:0] MY_IP = 32'h0A00_0002, PEER_IP = 32'h0A00_0001;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_02, PEER_MAC = 48'h02_00_00_00_00_01;
  localparam int RXA = 0, TXA = 1, RXB = 2;          // slots used
  localparam logic [15:0] ASID_A = 16'd7, ASID_B = 16'd9;

  logic clk = 0, rst_n = 0;
  mmio_req_t mmio_req; mmio_rsp_t mmio_rsp;
  logic irq_io, irq_evt, notify_valid; logic [5:0] notify_idx; dir_e notify_dir;
  logic link_up, nic_error; logic [15:0] nic_error_code;
  logic mac_rx_valid, mac_rx_ready, mac_rx_last; logic [63:0] mac_rx_data; logic [7:0] mac_rx_keep;
  logic mac_tx_valid, mac_tx_ready, mac_tx_last; logic [63:0] mac_tx_data; logic [7:0] mac_tx_keep;
  logic norm_rx_valid, norm_rx_ready, norm_rx_last; logic [63:0] norm_rx_data; logic [7:0] norm_rx_keep;
  logic norm_tx_valid, norm_tx_ready, norm_tx_last; logic [63:0] norm_tx_data; logic [7:0] norm_tx_keep;
  logic rx_dma_valid, rx_dma_ready; logic [31:0] rx_dma_addr; logic [63:0] rx_dma_data;
  logic tx_dma_valid, tx_dma_ready, tx_dma_rsp_valid; logic [31:0] tx_dma_addr; logic [63:0] tx_dma_rsp_data;
  logic rx_fast_frame, rx_norm_frame, tx_fast_frame;
  int checks = 0, failures = 0;

  accio_top dut (.*, .local_mac(MY_MAC), .peer_mac(PEER_MAC), .local_ip(MY_IP));

  host_mem #(.WORDS(32768)) mem (.clk,
    .wr_valid(rx_dma_valid), .wr_ready(rx_dma_ready), .wr_addr(rx_dma_addr), .wr_data(rx_dma_data),
    .rd_valid(tx_dma_valid), .rd_ready(tx_dma_ready), .rd_addr(tx_dma_addr),
    .rsp_valid(tx_dma_rsp_valid), .rsp_data(tx_dma_rsp_data));

  always #10 clk = ~clk;   // 50 MHz, the prototype's clock
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  int c_rx_fast, c_rx_norm, c_tx_fast, c_rx_wake, c_tx_wake, c_irq_held, c_mux_contend,
      c_overflow, c_link_evt, c_fallback, c_fault;
  always_ff @(posedge clk) begin
    if (rx_fast_frame) c_rx_fast <= c_rx_fast + 1;
    if (rx_norm_frame) c_rx_norm <= c_rx_norm + 1;
    if (tx_fast_frame) c_tx_fast <= c_tx_fast + 1;
    if (dut.u_txmux.in_valid == 2'b11) c_mux_contend <= c_mux_contend + 1;
  end

  // ---------------------------------------------------------------- CPU side
  logic [63:0] rd; logic flt;
  task automatic mmio(input bit wr, input logic [15:0] addr, input logic [63:0] wd,
                      input bit kern, input logic [15:0] asid);
    mmio_req = '{valid: 1, write: wr, addr: addr, wdata: wd, kernel: kern, asid: asid};
    @(posedge clk); #1;
    mmio_req.valid = 0;
    rd = mmio_rsp.rdata; flt = mmio_rsp.fault;
    if (flt) c_fault++;
  endtask
  function automatic logic [15:0] ea(input int e, input ict_reg_e r);
    return 16'(e * 64 + int'(r) * 8);
  endfunction
  function automatic logic [15:0] ga(input ict_greg_e r);
    return 16'h8000 + 16'(int'(r) * 8);
  endfunction
  task automatic open_conn(input int e, input bit irq, input dir_e d, input logic [15:0] asid,
                           input logic [15:0] port, input logic [31:0] base, input logic [31:0] len);
    mmio(1, ea(e, REG_ADDR), 64'(base), 1, 0);
    mmio(1, ea(e, REG_LEN), 64'(len), 1, 0);
    mmio(1, ea(e, REG_RDPTR), 0, 1, 0);
    mmio(1, ea(e, REG_WRPTR), 0, 1, 0);
    mmio(1, ea(e, REG_CTRL), {27'd0, irq, 1'b0, 1'b1, 1'b1, d, asid, port}, 1, 0);
  endtask
  logic [31:0] base_of [3] = '{32'h1_0000, 32'h2_0000, 32'h3_0000};
  logic [31:0] len_of  [3] = '{32'd8192, 32'd8192, 32'd512};

  // ---------------------------------------------------------------- wire side
  bytes_t wire_q [$];      // frames seen on the MAC transmit port
  bytes_t cur_tx;
  always_ff @(posedge clk) mac_tx_ready <= $urandom_range(0, 4) != 0;
  always_ff @(posedge clk) if (rst_n && mac_tx_valid && mac_tx_ready) begin
    for (int i = 0; i < 8; i++) if (mac_tx_keep[i]) cur_tx.push_back(mac_tx_data[8*i +: 8]);
    if (mac_tx_last) begin wire_q.push_back(cur_tx); cur_tx.delete(); end
  end
  bytes_t norm_q [$]; bytes_t cur_n;
  always_ff @(posedge clk) norm_rx_ready <= $urandom_range(0, 3) != 0;
  always_ff @(posedge clk) if (rst_n && norm_rx_valid && norm_rx_ready) begin
    for (int i = 0; i < 8; i++) if (norm_rx_keep[i]) cur_n.push_back(norm_rx_data[8*i +: 8]);
    if (norm_rx_last) begin norm_q.push_back(cur_n); cur_n.delete(); end
  end

  task automatic wire_rx(input bytes_t f);
    int nw = n_words(f.size());
    @(posedge clk); #1;   // start clear of a clock edge
    for (int w = 0; w < nw; w++) begin
      mac_rx_valid = 1; mac_rx_data = word_of(f, w); mac_rx_keep = keep_of(f, w); mac_rx_last = w == nw - 1;
      // ready is sampled at the falling edge, where it is stable for the next rising edge
      forever begin
        automatic bit r;
        @(negedge clk); r = mac_rx_ready;
        @(posedge clk);
        if (r) break;
      end
      #1;
    end
    mac_rx_valid = 0; mac_rx_last = 0;
  endtask
  function automatic bytes_t to_me(input logic [15:0] dport, input bytes_t pay);
    return udp_frame(MY_MAC, PEER_MAC, PEER_IP, MY_IP, 16'd4000, dport, 16'd77, pay);
  endfunction

  // normal engine transmitting one frame (runs in parallel)
  task automatic norm_send(input bytes_t f);
    int nw = n_words(f.size());
    @(posedge clk); #1;   // start clear of a clock edge
    for (int w = 0; w < nw; w++) begin
      norm_tx_valid = 1; norm_tx_data = word_of(f, w); norm_tx_keep = keep_of(f, w); norm_tx_last = w == nw - 1;
      // ready is sampled at the falling edge, where it is stable for the next rising edge
      forever begin
        automatic bit r;
        @(negedge clk); r = norm_tx_ready;
        @(posedge clk);
        if (r) break;
      end
      #1;
    end
    norm_tx_valid = 0; norm_tx_last = 0;
  endtask

  // ---------------------------------------------------------------- user library
  function automatic logic [63:0] ring_rd(input int e, input logic [31:0] p);
    return mem.mem[((base_of[e] + (p & (len_of[e] - 1))) >> 3) % 32768];
  endfunction
  // recv(): returns the payload of the next record, advancing the read pointer
  task automatic user_recv(input int e, input logic [15:0] asid, output bytes_t pay, output bit got);
    logic [31:0] rp, wp; logic [63:0] d;
    pay.delete();
    mmio(0, ea(e, REG_WRPTR), 0, 0, asid); wp = rd[31:0];
    mmio(0, ea(e, REG_RDPTR), 0, 0, asid); rp = rd[31:0];
    got = wp != rp;
    if (got) begin
      d = ring_rd(e, rp);
      for (int i = 0; i < int'(d[15:0]); i++) pay.push_back(ring_rd(e, rp + 8 + 8*(i/8))[8*(i%8) +: 8]);
      check(d[63:32] == PEER_IP && d[31:16] == 16'd4000, "descriptor carries the sender");
      mmio(1, ea(e, REG_RDPTR), 64'(rp + 8 + 8 * n_words(int'(d[15:0]))), 0, asid);
    end
  endtask
  logic [15:0] tx_ident = 0;
  task automatic user_send(input int e, input logic [15:0] asid, input bytes_t pay, output bytes_t expf);
    logic [31:0] wp;
    mmio(0, ea(e, REG_WRPTR), 0, 0, asid); wp = rd[31:0];
    mem.mem[((base_of[e] + (wp & (len_of[e] - 1))) >> 3) % 32768] = {PEER_IP, 16'd4000, 16'(pay.size())};
    for (int w = 0; w < n_words(pay.size()); w++)
      mem.mem[((base_of[e] + ((wp + 8 + 8*w) & (len_of[e] - 1))) >> 3) % 32768] = word_of(pay, w);
    mmio(1, ea(e, REG_WRPTR), 64'(wp + 8 + 8 * n_words(pay.size())), 0, asid);
    expf = udp_frame(PEER_MAC, MY_MAC, MY_IP, PEER_IP, 16'd5000, 16'd4000, tx_ident, pay);
    tx_ident++;
  endtask

  task automatic wait_cycles_until(ref int cnt, input int target, input int limit);
    int t = 0;
    while (cnt < target && t < limit) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk); #1;
  endtask

  // kernel: handle an I/O interrupt, return the woken entry
  task automatic kernel_irq(output int entry);
    mmio(0, ga(GREG_READY_POP), 0, 1, 0);
    entry = rd[63] ? int'(rd[7:0]) : -1;
    mmio(1, ga(GREG_IRQ), 1, 1, 0);
  endtask

  initial begin
    bytes_t pay, got_pay, f, ef;
    bit got; int e, w0, t;
    mmio_req = '0; link_up = 0; nic_error = 0; nic_error_code = 0;
    mac_rx_valid = 0; mac_rx_data = 0; mac_rx_keep = 0; mac_rx_last = 0;
    norm_tx_valid = 0; norm_tx_data = 0; norm_tx_keep = 0; norm_tx_last = 0;
    {c_rx_wake, c_tx_wake, c_irq_held, c_overflow, c_link_evt, c_fallback, c_fault} = '0;
    repeat (4) @(posedge clk); #1 rst_n = 1;
    link_up = 1;
    // connection setup by the kernel (socket ioctl)
    open_conn(RXA, 1, DIR_RX, ASID_A, 16'd5000, base_of[RXA], len_of[RXA]);
    open_conn(TXA, 1, DIR_TX, ASID_A, 16'd5000, base_of[TXA], len_of[TXA]);
    open_conn(RXB, 0, DIR_RX, ASID_B, 16'd6000, base_of[RXB], len_of[RXB]);
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_LINK_UP, "link-up event");
    if (rd[63]) c_link_evt++;

    // ---- RX fast path (thread A running)
    for (int i = 0; i < 4; i++) begin
      pay = rand_bytes(64 * (i + 1) - i);
      w0 = c_rx_fast;
      wire_rx(to_me(16'd5000, pay));
      wait_cycles_until(c_rx_fast, w0 + 1, 500);
      repeat (30) @(posedge clk); #1;
      user_recv(RXA, ASID_A, got_pay, got);
      check(got && got_pay == pay, $sformatf("RX fast path payload %0d bytes", pay.size()));
    end
    check(!irq_io, "fast path raises no interrupt");

    // ---- RX slow path: thread A blocks in recv()
    mmio(1, ea(RXA, REG_WAIT), 0, 1, 0);
    mmio(0, ea(RXA, REG_CTRL), 0, 1, 0);
    check(rd[35], "thread A suspended");
    pay = rand_bytes(200);
    wire_rx(to_me(16'd5000, pay));
    t = 0; while (!irq_io && t < 500) begin @(posedge clk); t++; end #1;
    check(irq_io, "I/O interrupt wakes thread A");
    kernel_irq(e);
    check(e == RXA, "ready queue names the RX entry");
    if (e == RXA) c_rx_wake++;
    user_recv(RXA, ASID_A, got_pay, got);
    check(got && got_pay == pay, "woken thread reads its data");

    // ---- interrupt held back while an accelerated thread runs
    mmio(1, ea(RXA, REG_WAIT), 0, 1, 0);
    mmio(1, ga(GREG_CUR_ACCEL), 1, 1, 0);
    pay = rand_bytes(10);
    wire_rx(to_me(16'd5000, pay));
    repeat (40) @(posedge clk); #1;
    mmio(0, ga(GREG_IRQ), 0, 1, 0);
    check(rd[0] && !irq_io, "wake-up pending, interrupt held back");
    if (rd[0] && !irq_io) c_irq_held++;
    mmio(1, ga(GREG_CUR_ACCEL), 0, 1, 0);
    check(irq_io, "interrupt delivered after the switch");
    kernel_irq(e);
    check(e == RXA, "held wake-up names the RX entry");
    if (e == RXA) c_rx_wake++;
    user_recv(RXA, ASID_A, got_pay, got);
    check(got && got_pay == pay, "data after held wake-up");

    // ---- TX fast path, with the normal engine sending at the same time
    wire_q.delete();
    begin
      bytes_t nf = rand_bytes(90);
      bytes_t exp_tx [$];
      nf[12] = 8'h08; nf[13] = 8'h06;    // an ARP-typed frame from the normal engine
      fork
        begin
          for (int i = 0; i < 3; i++) begin
            user_send(TXA, ASID_A, rand_bytes(50 + 37 * i), ef);
            exp_tx.push_back(ef);
          end
        end
        begin
          // start while the offload engine is mid-frame
          t = 0; while (!dut.off_tx_valid && t < 2000) begin @(posedge clk); t++; end
          #1; norm_send(nf);
        end
      join
      t = 0; while (wire_q.size() < 4 && t < 3000) begin @(posedge clk); t++; end
      repeat (5) @(posedge clk); #1;
      check(wire_q.size() == 4, $sformatf("four frames on the wire (%0d)", wire_q.size()));
      begin
        int k = 0, seen_norm = 0;
        foreach (wire_q[i]) begin
          if (wire_q[i] == nf) seen_norm++;
          else begin
            check(k < exp_tx.size() && wire_q[i] == exp_tx[k], $sformatf("TX frame %0d correct", k));
            k++;
          end
        end
        check(seen_norm == 1 && k == 3, "normal frame and three offload frames, none mixed");
      end
      mmio(0, ea(TXA, REG_RDPTR), 0, 0, ASID_A); w0 = rd[31:0];
      mmio(0, ea(TXA, REG_WRPTR), 0, 0, ASID_A);
      check(w0 == rd[31:0], "TX ring drained");
    end

    // ---- TX slow path: ring too full for the next message; the NIC frees it
    wire_q.delete();
    mmio(1, ga(GREG_CUR_ACCEL), 0, 1, 0);
    for (int i = 0; i < 7; i++) user_send(TXA, ASID_A, rand_bytes(1100), ef);
    mmio(1, ea(TXA, REG_WAIT), 64'd2000, 1, 0);    // next message needs 2000 bytes
    mmio(0, ea(TXA, REG_CTRL), 0, 1, 0);
    if (rd[35]) begin
      t = 0; while (!irq_io && t < 20000) begin @(posedge clk); t++; end #1;
      check(irq_io, "TX space wake-up interrupt");
      kernel_irq(e);
      check(e == TXA, "ready queue names the TX entry");
      if (e == TXA) c_tx_wake++;
    end else check(0, "TX WAIT should have suspended");
    t = 0; while (wire_q.size() < 7 && t < 30000) begin @(posedge clk); t++; end
    check(wire_q.size() == 7, "all queued messages sent");

    // ---- normal path: unknown port and non-UDP frames
    norm_q.delete();
    f = to_me(16'd5555, rand_bytes(30));
    wire_rx(f);
    t = 0; while (norm_q.size() < 1 && t < 500) begin @(posedge clk); t++; end
    check(norm_q.size() == 1 && norm_q[0] == f, $sformatf("unknown port to the normal engine (%0d frames, %0d bytes of %0d)",
          norm_q.size(), norm_q.size() ? norm_q[0].size() : 0, f.size()));

    // ---- ring overflow on connection B (512-byte ring, thread B not reading)
    for (int i = 0; i < 4; i++) wire_rx(to_me(16'd6000, rand_bytes(150)));
    repeat (50) @(posedge clk); #1;
    check(irq_evt, "overflow raises the event interrupt");
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_RX_OVERFLOW && rd[23:16] == RXB && rd[15:0] == 150, "overflow event");
    if (rd[63] && rd[27:24] == EV_RX_OVERFLOW) c_overflow++;
    user_recv(RXB, ASID_B, got_pay, got);
    check(got && got_pay.size() == 150, "thread B reads a stored message");

    // ---- link down / up events
    link_up = 0; @(posedge clk); #1; link_up = 1; @(posedge clk); #1;
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_LINK_DOWN, "link-down event");
    if (rd[27:24] == EV_LINK_DOWN) c_link_evt++;
    mmio(0, ga(GREG_EVENT_POP), 0, 1, 0);
    check(rd[63] && rd[27:24] == EV_LINK_UP, "link-up event again");

    // ---- fallback: kernel takes connection A out of the accelerated state
    mmio(1, ea(RXA, REG_CTRL), {27'd0, 1'b1, 1'b0, 1'b0, 1'b1, DIR_RX, ASID_A, 16'd5000}, 1, 0);
    norm_q.delete();
    f = to_me(16'd5000, rand_bytes(44));
    wire_rx(f);
    t = 0; while (norm_q.size() < 1 && t < 500) begin @(posedge clk); t++; end
    check(norm_q.size() == 1 && norm_q[0] == f, "fallback: frame goes to the normal path");
    if (norm_q.size() == 1) c_fallback++;
    mmio(1, ea(RXA, REG_CTRL), {27'd0, 1'b1, 1'b0, 1'b1, 1'b1, DIR_RX, ASID_A, 16'd5000}, 1, 0);
    pay = rand_bytes(44);
    w0 = c_rx_fast;
    wire_rx(to_me(16'd5000, pay));
    wait_cycles_until(c_rx_fast, w0 + 1, 500);
    repeat (30) @(posedge clk); #1;
    user_recv(RXA, ASID_A, got_pay, got);
    check(got && got_pay == pay, "back on the fast path");

    // ---- protection
    w0 = c_fault;
    mmio(0, ea(RXA, REG_WRPTR), 0, 0, ASID_B);
    check(flt, "thread B cannot read thread A's entry");
    mmio(1, ea(RXA, REG_RDPTR), 64'd0, 0, ASID_B);
    check(flt, "thread B cannot move thread A's pointer");

    // ---- every mechanism happened
    repeat (10) @(posedge clk); #1;
    $display("rx_fast=%0d rx_norm=%0d tx_fast=%0d rx_wake=%0d tx_wake=%0d irq_held=%0d mux_contend=%0d overflow=%0d link_evt=%0d fallback=%0d fault=%0d",
             c_rx_fast, c_rx_norm, c_tx_fast, c_rx_wake, c_tx_wake, c_irq_held, c_mux_contend,
             c_overflow, c_link_evt, c_fallback, c_fault);
    check(c_rx_fast > 0, "RX fast path used");
    check(c_rx_norm > 0, "normal RX path used");
    check(c_tx_fast > 0, "TX offload used");
    check(c_rx_wake > 0, "RX wake-up happened");
    check(c_tx_wake > 0, "TX wake-up happened");
    check(c_irq_held > 0, "interrupt hold-back happened");
    check(c_mux_contend > 0, "TX port contention happened");
    check(c_overflow > 0, "ring overflow happened");
    check(c_link_evt > 0, "link event happened");
    check(c_fallback > 0, "fallback happened");
    check(c_fault > 0, "protection fault happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
