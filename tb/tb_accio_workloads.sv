// tb_accio_workloads: the evaluation workloads of the original design, run on
// the top level at its default size (64 slots, 8 KB rings, 50 MHz clock).
//   1. UDP sink: a stream of 64-byte UDP messages arrives back to back for one
//      accelerated connection while a user thread consumes and discards the
//      records. With host memory that never stalls, the receive path must
//      take one 64-bit word on every cycle (the whole bus bandwidth: 3.2
//      Gbit/s at 50 MHz, against the 3.1 Gbit/s measured on the prototype)
//      and drop nothing.
//   2. Connection multiplexing: all 64 slots are opened as receive
//      connections with a suspended thread each (half of them interrupt-
//      flagged). 64-byte messages arrive interleaved over all connections with
//      a memory that stalls a quarter of the time. Every ring must hold its
//      messages, every thread must be woken once, and the kernel must pop the
//      flagged entries first.
//   3. Echo ping-pong with 64, 128, 256, 512 and 1024-byte messages: a message
//      received on one connection is sent back by the user thread on a
//      transmit connection; the frame on the wire must be the expected UDP
//      frame with a correct IPv4 header checksum, sent without a gap between
//      its words when memory does not stall.
// Message counts are kept small (200 / 256 / 5 messages) so the run stays
// short; the sizes are those of the original evaluation. The wire is driven
// by a clocked process so frames follow each other with no idle cycle.
`timescale 1ns/1ps
module tb_accio_workloads;
  import accio_pkg::*;
  import accio_tb_pkg::*;
  localparam logic [31:0] MY_IP = 32'h0A00_0002, PEER_IP = 32'h0A00_0001;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_02, PEER_MAC = 48'h02_00_00_00_00_01;
  localparam logic [15:0] ASID = 16'd7;
  localparam int RING = 8192;            // bytes per ring
  localparam int MEMW = 64 * RING / 8;   // host memory words: 64 rings
  localparam int SINK_N = 200, MUX_ROUNDS = 4;

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

  host_mem #(.WORDS(MEMW)) mem (.clk,
    .wr_valid(rx_dma_valid), .wr_ready(rx_dma_ready), .wr_addr(rx_dma_addr), .wr_data(rx_dma_data),
    .rd_valid(tx_dma_valid), .rd_ready(tx_dma_ready), .rd_addr(tx_dma_addr),
    .rsp_valid(tx_dma_rsp_valid), .rsp_data(tx_dma_rsp_data));

  always #10 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------------ wire driver
  typedef struct packed { logic [63:0] d; logic [7:0] k; logic l; } beat_t;
  beat_t wq [$];
  int widx = 0;
  int t_first = -1, t_last = -1, cyc = 0;
  always_comb begin
    mac_rx_valid = rst_n && widx < wq.size();
    {mac_rx_data, mac_rx_keep, mac_rx_last} = mac_rx_valid ? wq[widx] : '0;
  end
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mac_rx_valid && mac_rx_ready) begin
      widx <= widx + 1;
      if (t_first < 0) t_first <= cyc;
      t_last <= cyc;
    end
  end
  function automatic void queue_frame(input bytes_t f);
    for (int w = 0; w < n_words(f.size()); w++)
      wq.push_back('{d: word_of(f, w), k: keep_of(f, w), l: w == n_words(f.size()) - 1});
  endfunction
  function automatic bytes_t to_me(input logic [15:0] dport, input bytes_t pay);
    return udp_frame(MY_MAC, PEER_MAC, PEER_IP, MY_IP, 16'd4000, dport, 16'd1, pay);
  endfunction

  // frames leaving on the wire
  bytes_t tx_q [$]; bytes_t cur_tx;
  int tx_start, tx_span [$];   // cycles from first to last word of each frame
  always_ff @(posedge clk) if (rst_n && mac_tx_valid && mac_tx_ready) begin
    automatic int st = (cur_tx.size() == 0) ? cyc : tx_start;
    tx_start <= st;
    for (int i = 0; i < 8; i++) if (mac_tx_keep[i]) cur_tx.push_back(mac_tx_data[8*i +: 8]);
    if (mac_tx_last) begin
      tx_q.push_back(cur_tx); cur_tx.delete();
      tx_span.push_back(cyc - st + 1);
    end
  end
  int n_norm = 0, n_irq = 0;
  always_ff @(posedge clk) if (rst_n && norm_rx_valid && norm_rx_ready && norm_rx_last) n_norm <= n_norm + 1;
  always_ff @(posedge clk) if (rst_n && irq_io) n_irq <= n_irq + 1;

  // ------------------------------------------------------------ CPU side
  logic [63:0] rd; logic flt;
  task automatic mmio(input bit wr, input logic [15:0] addr, input logic [63:0] wd, input bit kern);
    mmio_req = '{valid: 1, write: wr, addr: addr, wdata: wd, kernel: kern, asid: ASID};
    @(posedge clk); #1;
    mmio_req.valid = 0;
    rd = mmio_rsp.rdata; flt = mmio_rsp.fault;
  endtask
  function automatic logic [15:0] ea(input int e, input ict_reg_e r);
    return 16'(e * 64 + int'(r) * 8);
  endfunction
  function automatic logic [15:0] ga(input ict_greg_e r);
    return 16'h8000 + 16'(int'(r) * 8);
  endfunction
  task automatic open_conn(input int e, input bit irq, input dir_e d, input logic [15:0] port);
    mmio(1, ea(e, REG_ADDR), 64'(e * RING), 1);
    mmio(1, ea(e, REG_LEN), 64'(RING), 1);
    mmio(1, ea(e, REG_RDPTR), 0, 1);
    mmio(1, ea(e, REG_WRPTR), 0, 1);
    mmio(1, ea(e, REG_CTRL), {27'd0, irq, 1'b0, 1'b1, 1'b1, d, ASID, port}, 1);
  endtask
  function automatic logic [63:0] ring_rd(input int e, input logic [31:0] p);
    return mem.mem[(e * RING + int'(p % RING)) / 8];
  endfunction
  // read one record at p of ring e into pay; returns its size in the ring
  function automatic int take_record(input int e, input logic [31:0] p, output bytes_t pay);
    logic [63:0] d = ring_rd(e, p);
    pay.delete();
    for (int i = 0; i < int'(d[15:0]); i++) pay.push_back(ring_rd(e, p + 8 + 32'(8 * (i / 8)))[8*(i%8) +: 8]);
    return 8 + 8 * n_words(int'(d[15:0]));
  endfunction
  task automatic wait_rx_done(input int limit);
    int t = 0;
    while ((widx < wq.size() || dut.u_rx.state != 0) && t < limit) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk); #1;
  endtask

  initial begin
    bytes_t exp_pay [64][$];
    bytes_t pay, p;
    logic [31:0] rp, wp;
    int got, bad, sz;
    mmio_req = '0; link_up = 1; nic_error = 0; nic_error_code = 0;
    norm_tx_valid = 0; norm_tx_data = 0; norm_tx_keep = 0; norm_tx_last = 0;
    mac_tx_ready = 1; norm_rx_ready = 1;
    mem.stall_pct = 0;
    repeat (4) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;
    mmio(0, ga(GREG_EVENT_POP), 0, 1);   // the link-up event
    check(rd[63] && rd[27:24] == 4'(EV_LINK_UP), "link-up event recorded");

    // ---------------------------------------------------- 1. UDP sink
    open_conn(0, 0, DIR_RX, 16'd7000);
    for (int i = 0; i < SINK_N; i++) begin
      pay = rand_bytes(64);
      exp_pay[0].push_back(pay);
      queue_frame(to_me(16'd7000, pay));
    end
    // the sink thread: read the write pointer, take every record, free it
    got = 0; bad = 0; rp = 0;
    while (got < SINK_N) begin
      mmio(0, ea(0, REG_WRPTR), 0, 0); wp = rd[31:0];
      while (rp != wp) begin
        sz = take_record(0, rp, p);
        if (p != exp_pay[0][got]) bad++;
        got++; rp += 32'(sz);
      end
      mmio(1, ea(0, REG_RDPTR), 64'(rp), 0);
      if (cyc > 100000) break;
    end
    wait_rx_done(1000);
    check(got == SINK_N && bad == 0, $sformatf("sink: %0d of %0d messages, %0d corrupt", got, SINK_N, bad));
    check(t_last - t_first + 1 == wq.size(),
          $sformatf("sink: %0d words took %0d cycles (one per cycle expected)", wq.size(), t_last - t_first + 1));
    $display("sink: %0d frames, %0d words in %0d cycles: %0d Mbit/s of frame words, %0d Mbit/s of payload at 50 MHz",
             SINK_N, wq.size(), t_last - t_first + 1,
             64 * wq.size() * 50 / (t_last - t_first + 1), 64 * 8 * SINK_N * 50 / (t_last - t_first + 1));
    mmio(0, ga(GREG_EVENT_POP), 0, 1);
    check(!rd[63] && !irq_evt, $sformatf("sink: no drop reported (event word %h)", rd));
    exp_pay[0].delete();

    // ---------------------------------------------------- 2. 64 connections
    mem.stall_pct = 25;
    for (int e = 0; e < 64; e++) begin
      open_conn(e, e % 2 == 0, DIR_RX, 16'(5000 + e));
      mmio(1, ea(e, REG_WAIT), 0, 1);            // thread blocks: ring empty
      mmio(0, ea(e, REG_CTRL), 0, 1);
      check(rd[35], $sformatf("conn %0d: thread suspended", e));
    end
    for (int r = 0; r < MUX_ROUNDS; r++)
      for (int e = 0; e < 64; e++) begin
        pay = rand_bytes(64);
        exp_pay[e].push_back(pay);
        queue_frame(to_me(16'(5000 + e), pay));
      end
    wait_rx_done(50000);
    check(n_irq > 0, "multiplexing: I/O interrupt raised");
    // kernel: pop the ready queue until empty
    begin
      int seen [64]; int order_ok = 1, n_pop = 0, n_hi = 0;
      foreach (seen[i]) seen[i] = 0;
      for (int i = 0; i < 70; i++) begin
        mmio(0, ga(GREG_READY_POP), 0, 1);
        if (!rd[63]) break;
        n_pop++;
        seen[int'(rd[15:0])]++;
        if (rd[62]) begin n_hi++; if (n_pop != n_hi) order_ok = 0; end
      end
      mmio(1, ga(GREG_IRQ), 1, 1);
      check(n_pop == 64 && n_hi == 32, $sformatf("multiplexing: %0d threads woken (%0d flagged)", n_pop, n_hi));
      check(order_ok == 1, "multiplexing: flagged threads popped first");
      foreach (seen[i]) if (seen[i] != 1) begin check(0, $sformatf("conn %0d woken %0d times", i, seen[i])); break; end
    end
    bad = 0;
    for (int e = 0; e < 64; e++) begin
      mmio(0, ea(e, REG_WRPTR), 0, 0); wp = rd[31:0];
      rp = 0;
      for (int r = 0; r < MUX_ROUNDS; r++) begin
        sz = take_record(e, rp, p);
        if (p != exp_pay[e][r]) bad++;
        rp += 32'(sz);
      end
      if (rp != wp) bad++;
      mmio(1, ea(e, REG_RDPTR), 64'(rp), 0);
    end
    check(bad == 0, $sformatf("multiplexing: %0d of %0d rings wrong", bad, 64));
    check(n_norm == 0, "multiplexing: nothing went to the normal path");

    // ---------------------------------------------------- 3. echo ping-pong
    mem.stall_pct = 0;
    open_conn(0, 0, DIR_RX, 16'd4000);
    open_conn(1, 0, DIR_TX, 16'd4001);
    rp = 0;
    for (int s = 64, id = 0; s <= 1024; s *= 2, id++) begin
      bytes_t expf;
      int t0;
      pay = rand_bytes(s);
      t0 = cyc;
      queue_frame(to_me(16'd4000, pay));
      // user thread: wait for the message, then send it back
      do mmio(0, ea(0, REG_WRPTR), 0, 0); while (rd[31:0] == rp && cyc - t0 < 5000);
      sz = take_record(0, rp, p);
      check(p == pay, $sformatf("echo %0d B: message received", s));
      rp += 32'(sz);
      mmio(1, ea(0, REG_RDPTR), 64'(rp), 0);
      mmio(0, ea(1, REG_WRPTR), 0, 0); wp = rd[31:0];
      mem.mem[(RING + int'(wp % RING)) / 8] = {PEER_IP, 16'd4000, 16'(s)};
      for (int w = 0; w < n_words(s); w++) mem.mem[(RING + int'((wp + 8 + 32'(8 * w)) % RING)) / 8] = word_of(p, w);
      mmio(1, ea(1, REG_WRPTR), 64'(wp + 8 + 32'(8 * n_words(s))), 0);
      expf = udp_frame(PEER_MAC, MY_MAC, MY_IP, PEER_IP, 16'd4001, 16'd4000, 16'(id), p);
      while (tx_q.size() == 0 && cyc - t0 < 20000) @(posedge clk);
      #1;
      check(tx_q.size() == 1 && tx_q[0] == expf, $sformatf("echo %0d B: reply frame on the wire", s));
      check(tx_span.size() == 1 && tx_span[0] == n_words(expf.size()),
            $sformatf("echo %0d B: reply sent at one word per cycle", s));
      tx_span.delete();
      $display("echo %0d B: %0d cycles from first received word to last sent word", s, cyc - t0);
      tx_q.delete();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
