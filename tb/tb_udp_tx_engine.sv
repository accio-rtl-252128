// tb_udp_tx_engine: self-checking test of the transmit offload engine.
// The testbench models two accelerated TX connections and one RX entry in a
// small connection table, writes records ({dst_ip, dst_port, len} + payload)
// into their rings in host memory, moves the write pointer and sends the
// notification, as the user library would. Every frame on the output is
// compared byte for byte with a reference frame built independently
// (addresses, lengths, identification, IPv4 checksum, payload), and the read
// pointer the engine publishes is checked. Also checked: a notification for
// an entry that is not an accelerated TX entry sends nothing, several records
// queued behind one notification all go out, both connections are served
// when both are pending, and a corrupt record empties the ring.
`timescale 1ns/1ps
module tb_udp_tx_engine;
  import accio_pkg::*;
  import accio_tb_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] MY_IP = 32'h0A00_0002;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_02, PEER_MAC = 48'h02_00_00_00_00_01;

  logic clk = 0, rst_n = 0;
  logic notify_valid; logic [1:0] notify_idx, ent_idx, upd_idx;
  ict_entry_t ent; logic upd_valid; logic [31:0] upd_rd_ptr;
  logic dma_rd_valid, dma_rd_ready, dma_rsp_valid; logic [31:0] dma_rd_addr; logic [63:0] dma_rsp_data;
  logic out_valid, out_ready, out_last, frame_sent; logic [63:0] out_data; logic [7:0] out_keep;
  int checks = 0, failures = 0;

  udp_tx_engine #(.N_ENTRIES(N)) dut (.*, .local_mac(MY_MAC), .peer_mac(PEER_MAC), .local_ip(MY_IP));

  logic wr_nc = 0, wr_ready_nc;
  host_mem #(.WORDS(8192)) mem (.clk, .wr_valid(wr_nc), .wr_ready(wr_ready_nc), .wr_addr(32'd0),
    .wr_data(64'd0), .rd_valid(dma_rd_valid), .rd_ready(dma_rd_ready), .rd_addr(dma_rd_addr),
    .rsp_valid(dma_rsp_valid), .rsp_data(dma_rsp_data));

  always #5 clk = ~clk;
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

  ict_entry_t tbl [N];
  assign ent = tbl[ent_idx];
  int n_upd = 0;
  always_ff @(posedge clk) if (rst_n && upd_valid) begin tbl[upd_idx].rd_ptr <= upd_rd_ptr; n_upd <= n_upd + 1; end

  // output capture
  bytes_t frames [$];
  bytes_t cur;
  always_ff @(posedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always_ff @(posedge clk) if (rst_n && out_valid && out_ready) begin
    for (int i = 0; i < 8; i++) if (out_keep[i]) cur.push_back(out_data[8*i +: 8]);
    if (out_last) begin frames.push_back(cur); cur.delete(); end
  end

  // expected frames, in the order the engine will send them
  bytes_t exp_q [$];
  logic [15:0] ident = 0;

  task automatic put_record(input int e, input logic [31:0] dip, input logic [15:0] dport, input bytes_t pay);
    logic [31:0] p = tbl[e].wr_ptr;
    mem.mem[(tbl[e].buf_addr + (p & (tbl[e].buf_len - 1))) >> 3] = {dip, dport, 16'(pay.size())};
    for (int w = 0; w < n_words(pay.size()); w++)
      mem.mem[(tbl[e].buf_addr + ((p + 8 + 8*w) & (tbl[e].buf_len - 1))) >> 3] = word_of(pay, w);
    tbl[e].wr_ptr = p + 8 + 8 * n_words(pay.size());
  endtask

  task automatic notify(input int e);
    notify_valid = 1; notify_idx = 2'(e); @(posedge clk); #1; notify_valid = 0;
  endtask

  task automatic expect_frame(input int e, input logic [31:0] dip, input logic [15:0] dport, input bytes_t pay);
    exp_q.push_back(udp_frame(PEER_MAC, MY_MAC, MY_IP, dip, tbl[e].sock, dport, ident, pay));
    ident++;
  endtask

  task automatic wait_frames(input int n);
    int tmo = 0;
    while (frames.size() < n && tmo < 20000) begin @(posedge clk); tmo++; end
    repeat (4) @(posedge clk); #1;
    check(frames.size() == n, $sformatf("%0d frames sent, %0d expected", frames.size(), n));
  endtask

  function automatic bit same_set(bytes_t a [$], bytes_t b [$]);
    // frames of different connections may come out in either order
    if (a.size() != b.size()) return 0;
    foreach (a[i]) begin
      int hit = 0;
      foreach (b[j]) if (a[i] == b[j]) hit = 1;
      if (!hit) return 0;
    end
    return 1;
  endfunction

  initial begin
    bytes_t pay;
    notify_valid = 0; notify_idx = 0;
    foreach (tbl[i]) tbl[i] = '0;
    tbl[0] = '{valid: 1, accel: 1, susp: 0, irq_en: 0, dir: DIR_TX, asid: 16'd3, sock: 16'd5000,
               buf_addr: 32'h2000, buf_len: 32'd1024, rd_ptr: 32'd0, wr_ptr: 32'd0};
    tbl[1] = '{valid: 1, accel: 1, susp: 0, irq_en: 1, dir: DIR_TX, asid: 16'd4, sock: 16'd6000,
               buf_addr: 32'h8000, buf_len: 32'd8192, rd_ptr: 32'hFFFF_FFC0, wr_ptr: 32'hFFFF_FFC0};
    tbl[2] = '{valid: 1, accel: 1, susp: 0, irq_en: 0, dir: DIR_RX, asid: 16'd5, sock: 16'd7000,
               buf_addr: 32'h6000, buf_len: 32'd256, rd_ptr: 32'd0, wr_ptr: 32'd64};
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // one record per notification, every payload alignment, connection 0 (ring wraps)
    for (int len = 0; len <= 24; len++) begin
      pay = rand_bytes(len);
      put_record(0, 32'h0A000001, 16'd9000 + 16'(len), pay);
      expect_frame(0, 32'h0A000001, 16'd9000 + 16'(len), pay);
      notify(0);
      wait_frames(1);
      check(frames[0] == exp_q[0], $sformatf("frame with %0d-byte payload matches", len));
      check(tbl[0].rd_ptr == tbl[0].wr_ptr, "read pointer published");
      frames.delete(); exp_q.delete();
    end
    // notification of an RX entry: nothing sent
    notify(2);
    repeat (50) @(posedge clk);
    check(frames.size() == 0 && tbl[2].rd_ptr == 0, "RX entry ignored");
    // three records behind one notification on connection 1 (pointer wraps 2^32)
    for (int i = 0; i < 3; i++) begin
      pay = rand_bytes(60 + i);
      put_record(1, 32'h0A000003, 16'd1234, pay);
      expect_frame(1, 32'h0A000003, 16'd1234, pay);
    end
    notify(1);
    wait_frames(3);
    check(frames == exp_q, "three queued records in order");
    check(tbl[1].rd_ptr == tbl[1].wr_ptr, "connection 1 drained");
    frames.delete(); exp_q.delete();
    // both connections pending at once: one large message each
    begin
      automatic bytes_t p0 = rand_bytes(1000), p1 = rand_bytes(333);
      bytes_t e0, e1;
      put_record(0, 32'h0A000001, 16'd1, p0);
      put_record(1, 32'h0A000003, 16'd2, p1);
      notify(0); notify(1);
      wait_frames(2);
      // identification follows the order of transmission
      e0 = udp_frame(PEER_MAC, MY_MAC, MY_IP, 32'h0A000001, 16'd5000, 16'd1, ident, p0);
      e1 = udp_frame(PEER_MAC, MY_MAC, MY_IP, 32'h0A000003, 16'd6000, 16'd2, ident + 16'd1, p1);
      exp_q.push_back(e0); exp_q.push_back(e1);
      check(frames.size() == 2 && frames[0] == exp_q[0] && frames[1] == exp_q[1],
            "both pending connections served");
      ident += 2;
      frames.delete(); exp_q.delete();
    end
    // corrupt record: length beyond the write pointer
    mem.mem[(tbl[0].buf_addr + (tbl[0].wr_ptr & 1023)) >> 3] = {32'h0A000001, 16'd1, 16'd500};
    tbl[0].wr_ptr = tbl[0].wr_ptr + 16;
    notify(0);
    repeat (100) @(posedge clk); #1;
    check(frames.size() == 0 && tbl[0].rd_ptr == tbl[0].wr_ptr, "corrupt record discarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
