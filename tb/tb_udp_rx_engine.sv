// tb_udp_rx_engine: self-checking test of the receive offload engine.
// A small connection table is modelled in the testbench (two accelerated RX
// connections, one with a 256-byte ring, one with an 8 KiB ring). Frames are
// built byte by byte and sent with random gaps while host memory and the
// normal path apply random back-pressure. For every frame the testbench
// predicts, on its own, where it must go:
//   fast path  -> descriptor and payload in the ring at the old write pointer,
//                 zero padding, and the published write pointer;
//   normal     -> the frame comes out of the normal port unchanged
//                 (wrong port, wrong IP, not UDP, IP options, fragment, runt);
//   ring full  -> overflow pulse with entry and length, nothing written.
// Finally a stream of 64-byte messages is sent without stalls to check that
// the engine takes one frame word per cycle.
`timescale 1ns/1ps
module tb_udp_rx_engine;
  import accio_pkg::*;
  import accio_tb_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] MY_IP = 32'h0A00_0002, PEER_IP = 32'h0A00_0001;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_02, PEER_MAC = 48'h02_00_00_00_00_01;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, norm_valid, norm_ready, norm_last;
  logic [63:0] in_data, norm_data; logic [7:0] in_keep, norm_keep;
  logic dma_wr_valid, dma_wr_ready; logic [31:0] dma_wr_addr; logic [63:0] dma_wr_data;
  logic [15:0] lkp_sock; logic lkp_hit; logic [1:0] lkp_idx; ict_entry_t lkp_entry;
  logic upd_valid; logic [1:0] upd_idx; logic [31:0] upd_wr_ptr;
  logic overflow; logic [1:0] overflow_idx; logic [15:0] overflow_len;
  logic fast_frame, norm_frame;
  int checks = 0, failures = 0;

  udp_rx_engine #(.N_ENTRIES(N)) dut (.*, .local_ip(MY_IP));

  logic rd_valid_nc = 0, rd_ready_nc, rsp_valid_nc; logic [63:0] rsp_data_nc;
  host_mem #(.WORDS(4096)) mem (.clk, .wr_valid(dma_wr_valid), .wr_ready(dma_wr_ready),
    .wr_addr(dma_wr_addr), .wr_data(dma_wr_data), .rd_valid(rd_valid_nc), .rd_ready(rd_ready_nc),
    .rd_addr(32'd0), .rsp_valid(rsp_valid_nc), .rsp_data(rsp_data_nc));

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

  // connection table model
  ict_entry_t tbl [N];
  always_comb begin
    lkp_hit = 0; lkp_idx = 0;
    for (int i = 0; i < N; i++)
      if (!lkp_hit && tbl[i].valid && tbl[i].accel && tbl[i].dir == DIR_RX && tbl[i].sock == lkp_sock) begin
        lkp_hit = 1; lkp_idx = 2'(i);
      end
  end
  assign lkp_entry = tbl[lkp_idx];
  int n_upd = 0, n_ovf = 0, last_ovf_idx, last_ovf_len;
  always_ff @(posedge clk) begin
    if (upd_valid) begin tbl[upd_idx].wr_ptr <= upd_wr_ptr; n_upd <= n_upd + 1; end
    if (overflow) begin n_ovf <= n_ovf + 1; last_ovf_idx <= overflow_idx; last_ovf_len <= overflow_len; end
  end

  // normal path sink
  bytes_t norm_q; int norm_frames = 0;
  bit norm_rdy_rand = 1;
  always_ff @(posedge clk) norm_ready <= norm_rdy_rand ? $urandom_range(0, 3) != 0 : 1'b1;
  always_ff @(posedge clk) if (rst_n && norm_valid && norm_ready) begin
    for (int i = 0; i < 8; i++) if (norm_keep[i]) norm_q.push_back(norm_data[8*i +: 8]);
    if (norm_last) norm_frames <= norm_frames + 1;
  end

  // frame driver
  bit gaps = 1;
  task automatic send(input bytes_t f);
    int nw = n_words(f.size());
    #1;   // start clear of a clock edge
    for (int w = 0; w < nw; w++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(posedge clk); #1; end
      in_valid = 1; in_data = word_of(f, w); in_keep = keep_of(f, w); in_last = w == nw - 1;
      // ready is sampled at the falling edge, where it is stable for the next rising edge
      forever begin
        automatic bit r;
        @(negedge clk); r = in_ready;
        @(posedge clk);
        if (r) break;
      end
      #1;
    end
    in_valid = 0; in_last = 0;
  endtask

  function automatic logic [63:0] ring_word(input int e, input logic [31:0] ptr);
    return mem.mem[(tbl[e].buf_addr + (ptr & (tbl[e].buf_len - 1))) >> 3];
  endfunction

  // send one frame and check where it went
  typedef enum {EXP_FAST, EXP_NORM, EXP_OVF} exp_e;
  task automatic rx_one(input bytes_t f, input exp_e exp, input int e, input int plen,
                        input logic [15:0] sport, input bytes_t pay);
    int u0 = n_upd, o0 = n_ovf, nf0 = norm_frames, w0 = mem.writes;
    logic [31:0] wr0 = (e >= 0) ? tbl[e].wr_ptr : 0;
    int tmo = 0;
    norm_q.delete();
    send(f);
    case (exp)
      EXP_FAST: begin
        while (n_upd == u0 && tmo < 2000) begin @(posedge clk); tmo++; end
        #1;
        check(n_upd == u0 + 1, "fast frame published");
        check(tbl[e].wr_ptr == wr0 + 8 + 8 * ((plen + 7) / 8),
              $sformatf("wr_ptr %0d expected %0d", tbl[e].wr_ptr, wr0 + 8 + 8 * ((plen + 7) / 8)));
        check(ring_word(e, wr0) == {PEER_IP, sport, 16'(plen)},
              $sformatf("descriptor %h", ring_word(e, wr0)));
        for (int w = 0; w < (plen + 7) / 8; w++) begin
          logic [63:0] expw = '0;
          for (int b = 0; b < 8; b++) if (8*w + b < plen) expw[8*b +: 8] = pay[8*w + b];
          check(ring_word(e, wr0 + 8 + 8*w) == expw,
                $sformatf("payload word %0d %h expected %h", w, ring_word(e, wr0 + 8 + 8*w), expw));
        end
        check(norm_frames == nf0, "fast frame not on normal path");
      end
      EXP_NORM: begin
        while (norm_frames == nf0 && tmo < 2000) begin @(posedge clk); tmo++; end
        #1;
        check(norm_q == f, $sformatf("normal path frame of %0d bytes unchanged (got %0d)", f.size(), norm_q.size()));
        check(mem.writes == w0 && n_upd == u0, "normal frame not written to a ring");
      end
      EXP_OVF: begin
        while (n_ovf == o0 && tmo < 2000) begin @(posedge clk); tmo++; end
        repeat (3) @(posedge clk); #1;
        check(n_ovf == o0 + 1 && last_ovf_idx == e && last_ovf_len == plen, "overflow reported");
        check(mem.writes == w0 && n_upd == u0 && norm_frames == nf0, "dropped frame not written");
      end
      default: ;
    endcase
  endtask

  function automatic bytes_t mk(input logic [15:0] dport, input bytes_t pay);
    return udp_frame(MY_MAC, PEER_MAC, PEER_IP, MY_IP, 16'd7000, dport, 16'd1, pay);
  endfunction

  initial begin
    bytes_t f, pay;
    int ovf_seen = 0;
    in_valid = 0; in_data = 0; in_keep = 0; in_last = 0;
    foreach (tbl[i]) tbl[i] = '0;
    tbl[0] = '{valid: 1, accel: 1, susp: 0, irq_en: 0, dir: DIR_RX, asid: 16'd3, sock: 16'd5000,
               buf_addr: 32'h1000, buf_len: 32'd256, rd_ptr: 32'd0, wr_ptr: 32'd0};
    tbl[1] = '{valid: 1, accel: 1, susp: 0, irq_en: 1, dir: DIR_RX, asid: 16'd4, sock: 16'd6000,
               buf_addr: 32'h4000, buf_len: 32'd8192, rd_ptr: 32'hFFFF_FF00, wr_ptr: 32'hFFFF_FF00};
    tbl[2] = '{valid: 1, accel: 0, susp: 0, irq_en: 0, dir: DIR_RX, asid: 16'd5, sock: 16'd7000,
               buf_addr: 32'h6000, buf_len: 32'd256, rd_ptr: 32'd0, wr_ptr: 32'd0};
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // payload sizes around every alignment, on the large ring (pointer wraps 2^32)
    for (int len = 0; len <= 40; len++) begin
      pay = rand_bytes(len);
      rx_one(mk(16'd6000, pay), EXP_FAST, 1, len, 16'd7000, pay);
      tbl[1].rd_ptr = tbl[1].wr_ptr;
    end
    pay = rand_bytes(1024); rx_one(mk(16'd6000, pay), EXP_FAST, 1, 1024, 16'd7000, pay);
    tbl[1].rd_ptr = tbl[1].wr_ptr;
    // frames for the normal path
    pay = rand_bytes(20);
    rx_one(mk(16'd5001, pay), EXP_NORM, -1, 0, 0, pay);                 // unknown port
    rx_one(mk(16'd7000, pay), EXP_NORM, -1, 0, 0, pay);                 // not accelerated
    f = udp_frame(MY_MAC, PEER_MAC, PEER_IP, 32'h0A000009, 16'd7000, 16'd6000, 16'd1, pay);
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // other IP
    f = mk(16'd6000, pay); f[23] = 8'd6;
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // TCP
    f = mk(16'd6000, pay); f[14] = 8'h46;
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // IP options
    f = mk(16'd6000, pay); f[20] = 8'h20;
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // fragment
    f = mk(16'd6000, pay); f[12] = 8'h86; f[13] = 8'hDD;
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // IPv6 ethertype
    f = rand_bytes(30);
    rx_one(f, EXP_NORM, -1, 0, 0, pay);                                  // runt frame
    // small ring: fill it, then overflow, then drain and succeed
    for (int i = 0; i < 8; i++) begin
      pay = rand_bytes(40);
      if (tbl[0].buf_len - (tbl[0].wr_ptr - tbl[0].rd_ptr) >= 48) begin
        rx_one(mk(16'd5000, pay), EXP_FAST, 0, 40, 16'd7000, pay);
      end else begin
        rx_one(mk(16'd5000, pay), EXP_OVF, 0, 40, 16'd7000, pay);
        ovf_seen++;
      end
    end
    check(ovf_seen == 3, $sformatf("three overflows on the 256-byte ring (%0d)", ovf_seen));
    tbl[0].rd_ptr = tbl[0].wr_ptr;
    pay = rand_bytes(100); rx_one(mk(16'd5000, pay), EXP_FAST, 0, 100, 16'd7000, pay);

    // throughput: 64-byte messages back to back, no stalls anywhere
    begin
      int t0, t1, nwords;
      bytes_t fr;
      mem.stall_pct = 0; gaps = 0; norm_rdy_rand = 0;
      tbl[1].rd_ptr = tbl[1].wr_ptr;
      fr = mk(16'd6000, rand_bytes(64));
      nwords = n_words(fr.size());
      @(posedge clk); #1;
      t0 = $time;
      for (int i = 0; i < 20; i++) send(fr);
      t1 = $time;
      repeat (5) @(posedge clk); #1;
      check((t1 - t0) / 10 == 20 * nwords,
            $sformatf("20 frames of %0d words in %0d cycles", nwords, (t1 - t0) / 10));
      check(tbl[1].wr_ptr - tbl[1].rd_ptr == 20 * 72, "all 20 records published");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
