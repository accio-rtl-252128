// udp_rx_engine: receive half of the fast-path UDP offload engine.
//
// Frames arrive from the MAC as a 64-bit stream (byte 0 of the frame in bits
// [7:0] of the first word, FCS already removed). The engine holds the first
// five words (bytes 0-39 hold every header field it needs) and decides when
// the sixth word arrives:
//   * fast path: IPv4 without options, not fragmented, protocol UDP, sent to
//     local_ip, and the destination port names an accelerated RX entry of the
//     I/O Connection Table (sideband lookup). The engine writes the payload,
//     padded with zeros to whole words, into the connection's DMA ring just
//     after the write pointer, then the descriptor word
//     {src_ip, src_port, payload_len} at the write pointer, and then
//     publishes the new write pointer to the ICT (which wakes a suspended
//     reader). The descriptor write overlaps the next frame's header. The payload starts at byte 42, so each ring
//     word is built from the top six bytes of one frame word and the low two
//     bytes of the next.
//   * ring full (fewer free bytes than the record needs): the frame is
//     dropped and an overflow event is raised for the control event queue.
//   * anything else: the held words are replayed to the normal traffic path
//     (norm_*), followed by the rest of the frame unchanged.
// If the frame ends before its UDP length says, the missing payload bytes are
// written as zeros. The document gives the engine's role (header processing,
// direct placement of data in user memory, ICT pointer update, fallback to the
// normal path); the ring record format, the header checks and this state
// machine are this design's own.
//
// Timing: one frame word per cycle, back to back, when the DMA port is ready
// (the rate of the 64-bit bus, which the document reports the prototype
// reaching). The write pointer is published the cycle after the descriptor
// write is accepted. The decision for a frame waits until the previous
// frame's pointer update has reached the ICT, so it always sees fresh
// pointers.
module udp_rx_engine
  import accio_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [31:0]                  local_ip,
  // frames from the MAC
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [DATA_W-1:0]            in_data,
  input  logic [KEEP_W-1:0]            in_keep,
  input  logic                         in_last,
  // frames for the normal traffic engine
  output logic                         norm_valid,
  input  logic                         norm_ready,
  output logic [DATA_W-1:0]            norm_data,
  output logic [KEEP_W-1:0]            norm_keep,
  output logic                         norm_last,
  // DMA write port into host memory
  output logic                         dma_wr_valid,
  input  logic                         dma_wr_ready,
  output logic [ADDR_W-1:0]            dma_wr_addr,
  output logic [DATA_W-1:0]            dma_wr_data,
  // ICT sideband
  output logic [SOCK_W-1:0]            lkp_sock,
  input  logic                         lkp_hit,
  input  logic [$clog2(N_ENTRIES)-1:0] lkp_idx,
  input  ict_entry_t                   lkp_entry,
  output logic                         upd_valid,
  output logic [$clog2(N_ENTRIES)-1:0] upd_idx,
  output logic [PTR_W-1:0]             upd_wr_ptr,
  output logic                         overflow,
  output logic [$clog2(N_ENTRIES)-1:0] overflow_idx,
  output logic [15:0]                  overflow_len,
  // activity pulses
  output logic                         fast_frame,
  output logic                         norm_frame
);
  localparam int unsigned IW = $clog2(N_ENTRIES);
  localparam int unsigned HW = 6;   // frame words held for a replay

  typedef enum logic [2:0] {S_HDR, S_REPLAY, S_PASS, S_PAY, S_TAIL, S_DROP} state_e;
  state_e state;

  logic [DATA_W-1:0] hw_data [HW];
  logic [KEEP_W-1:0] hw_keep [HW];
  logic [2:0]        n_hw;      // frame words held
  logic [2:0]        rp;        // replay position
  logic              in_done;   // frame's last word has been taken

  // header fields, bytes in network order (all within words 0-4)
  function automatic logic [7:0] hb(input int unsigned i);
    return hw_data[i/8][8*(i%8) +: 8];
  endfunction

  logic [15:0] ethertype, frag, udp_len, src_port, dst_port;
  logic [7:0]  verihl, proto;
  logic [31:0] src_ip, dst_ip;
  always_comb begin
    ethertype = {hb(12), hb(13)};
    verihl    = hb(14);
    frag      = {hb(20), hb(21)};
    proto     = hb(23);
    src_ip    = {hb(26), hb(27), hb(28), hb(29)};
    dst_ip    = {hb(30), hb(31), hb(32), hb(33)};
    src_port  = {hb(34), hb(35)};
    dst_port  = {hb(36), hb(37)};
    udp_len   = {hb(38), hb(39)};
  end
  assign lkp_sock = dst_port;

  logic             hdr_ok;
  logic [15:0]      pay_len;
  logic [13:0]      pay_words;
  logic [PTR_W-1:0] rec_bytes, used, free_b;
  assign hdr_ok    = in_keep[1:0] == 2'b11 &&
                     ethertype == ETHERTYPE_IPV4 && verihl == 8'h45 &&
                     (frag & 16'h3FFF) == 16'd0 && proto == IPPROTO_UDP &&
                     dst_ip == local_ip && udp_len >= 16'd8;
  assign pay_len   = udp_len - 16'd8;
  assign pay_words = 14'((32'(pay_len) + 7) / 8);
  assign rec_bytes = PTR_W'(8) + PTR_W'(pay_words) * 8;
  assign used      = lkp_entry.wr_ptr - lkp_entry.rd_ptr;
  assign free_b    = lkp_entry.buf_len - used;

  // connection of the frame being written
  logic [IW-1:0]     c_idx;
  logic [ADDR_W-1:0] c_base;
  logic [PTR_W-1:0]  c_mask, c_wr, c_off;
  logic [15:0]       c_len;
  logic [13:0]       c_words, k;   // payload words to write, written
  logic [47:0]       carry;        // payload bytes waiting for their next word
  logic [63:0]       c_desc;
  // descriptor write still to do, and the pointer it publishes
  logic              d_pend;
  logic [ADDR_W-1:0] d_addr;
  logic [63:0]       d_data;
  logic [IW-1:0]     d_idx;
  logic [PTR_W-1:0]  d_wr;

  // mask of valid payload bytes in ring word k
  function automatic logic [63:0] byte_mask(input logic [15:0] len, input logic [13:0] kk);
    logic [63:0] m;
    for (int b = 0; b < 8; b++)
      m[8*b +: 8] = (32'(kk) * 8 + b < 32'(len)) ? 8'hFF : 8'h00;
    return m;
  endfunction

  // the decision needs the previous record's pointer update in the ICT
  logic stall_dec;
  assign stall_dec = d_pend || upd_valid;

  always_comb begin
    dma_wr_valid = d_pend;
    dma_wr_addr  = d_addr;
    dma_wr_data  = d_data;
    in_ready     = 1'b0;
    norm_valid   = 1'b0;
    norm_data    = in_data;
    norm_keep    = in_keep;
    norm_last    = in_last;
    unique case (state)
      S_HDR:    in_ready = !(n_hw == 3'd5 && stall_dec);
      S_REPLAY: begin
        norm_valid = 1'b1;
        norm_data  = hw_data[rp];
        norm_keep  = hw_keep[rp];
        norm_last  = in_done && rp == n_hw - 3'd1;
      end
      S_PASS: begin
        norm_valid = in_valid;
        in_ready   = norm_ready;
      end
      S_PAY: begin
        dma_wr_valid = in_valid;
        dma_wr_addr  = c_base + ADDR_W'((c_wr + c_off) & c_mask);
        dma_wr_data  = {in_data[15:0], carry} & byte_mask(c_len, k);
        in_ready     = dma_wr_ready;
      end
      S_TAIL: begin
        dma_wr_valid = k != c_words;
        dma_wr_addr  = c_base + ADDR_W'((c_wr + c_off) & c_mask);
        dma_wr_data  = {16'd0, carry} & byte_mask(c_len, k);
      end
      S_DROP:   in_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HDR;
      n_hw       <= '0;
      rp         <= '0;
      in_done    <= 1'b0;
      c_idx      <= '0;
      c_base     <= '0;
      c_mask     <= '0;
      c_wr       <= '0;
      c_off      <= '0;
      c_len      <= '0;
      c_words    <= '0;
      k          <= '0;
      carry      <= '0;
      c_desc     <= '0;
      d_pend     <= 1'b0;
      d_addr     <= '0;
      d_data     <= '0;
      d_idx      <= '0;
      d_wr       <= '0;
      upd_valid  <= 1'b0;
      upd_idx    <= '0;
      upd_wr_ptr <= '0;
      overflow   <= 1'b0;
      overflow_idx <= '0;
      overflow_len <= '0;
      fast_frame <= 1'b0;
      norm_frame <= 1'b0;
      for (int i = 0; i < HW; i++) begin
        hw_data[i] <= '0;
        hw_keep[i] <= '0;
      end
    end else begin
      automatic logic finish = 1'b0;   // the record's last data word is written
      upd_valid  <= 1'b0;
      overflow   <= 1'b0;
      fast_frame <= 1'b0;
      norm_frame <= 1'b0;

      // descriptor write, then publish the record
      if (d_pend && state != S_PAY && state != S_TAIL && dma_wr_ready) begin
        d_pend     <= 1'b0;
        upd_valid  <= 1'b1;
        upd_idx    <= d_idx;
        upd_wr_ptr <= d_wr;
      end

      unique case (state)
        S_HDR: if (in_valid && in_ready) begin
          hw_data[n_hw] <= in_data;
          hw_keep[n_hw] <= in_keep;
          n_hw          <= n_hw + 3'd1;
          rp            <= '0;
          in_done       <= in_last;
          if (n_hw != 3'd5) begin
            if (in_last) begin           // too short for UDP
              state      <= S_REPLAY;
              norm_frame <= 1'b1;
            end
          end else if (!(hdr_ok && lkp_hit)) begin
            state      <= S_REPLAY;
            norm_frame <= 1'b1;
          end else if (free_b < rec_bytes) begin
            overflow     <= 1'b1;
            overflow_idx <= lkp_idx;
            overflow_len <= pay_len;
            state        <= in_last ? S_HDR : S_DROP;
            n_hw         <= '0;
          end else begin
            fast_frame <= 1'b1;
            c_idx   <= lkp_idx;
            c_base  <= lkp_entry.buf_addr;
            c_mask  <= lkp_entry.buf_len - 1'b1;
            c_wr    <= lkp_entry.wr_ptr;
            c_off   <= PTR_W'(8);        // payload follows the descriptor slot
            c_len   <= pay_len;
            c_words <= pay_words;
            k       <= '0;
            carry   <= in_data[63:16];
            c_desc  <= {src_ip, src_port, pay_len};
            state   <= (pay_words == '0 || in_last) ? S_TAIL : S_PAY;
          end
        end
        S_REPLAY: if (norm_ready) begin
          rp <= rp + 3'd1;
          if (rp == n_hw - 3'd1) begin
            state   <= in_done ? S_HDR : S_PASS;
            n_hw    <= '0;
          end
        end
        S_PASS: if (in_valid && norm_ready && in_last) state <= S_HDR;
        S_PAY: if (in_valid && dma_wr_ready) begin
          carry <= in_data[63:16];
          k     <= k + 14'd1;
          c_off <= c_off + PTR_W'(8);
          in_done <= in_last;
          if (k + 14'd1 == c_words) begin
            finish = 1'b1;
            state  <= in_last ? S_HDR : S_DROP;
          end else if (in_last) begin
            state <= S_TAIL;
          end
        end
        S_TAIL: begin
          if (k == c_words) begin
            finish = 1'b1;
            state  <= in_done ? S_HDR : S_DROP;
          end else if (dma_wr_ready) begin
            carry <= '0;
            k     <= k + 14'd1;
            c_off <= c_off + PTR_W'(8);
          end
        end
        S_DROP: if (in_valid && in_last) state <= S_HDR;
        default: state <= S_HDR;
      endcase

      if (finish) begin
        n_hw   <= '0;
        d_pend <= 1'b1;
        d_addr <= c_base + ADDR_W'(c_wr & c_mask);
        d_data <= c_desc;
        d_idx  <= c_idx;
        d_wr   <= c_wr + PTR_W'(8) + PTR_W'(c_words) * 8;
      end
    end
  end

  a_no_desc_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state == S_PAY || state == S_TAIL) |-> !d_pend)
    else $error("udp_rx_engine: descriptor pending while payload is written");

endmodule
