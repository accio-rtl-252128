// udp_tx_engine: transmit half of the fast-path UDP offload engine.
//
// A user thread appends a record to its TX ring and stores the new write
// pointer into its I/O Connection Table entry; the ICT forwards that store as
// a CPU-to-NIC notification carrying the entry index. The engine keeps one
// pending bit per entry and serves pending entries round-robin, one record at
// a time:
//   1. read the entry over the ICT sideband; if it is not a valid, accelerated
//      TX entry or its ring is empty, drop the pending bit;
//   2. DMA-read the record's descriptor word {dst_ip, dst_port, payload_len}
//      at the read pointer;
//   3. send the Ethernet II + IPv4 + UDP header (42 bytes, built from the
//      descriptor, the entry's socket id as source port and the local
//      addresses) followed by the payload, shifted by two bytes to follow the
//      header. Payload reads start as soon as the descriptor is known and run
//      up to RD_OUTSTANDING words ahead of the output into a small FIFO;
//   4. after the last word has left, publish the new read pointer to the ICT,
//      which wakes a thread suspended waiting for ring space.
// The IPv4 header checksum is computed here; the UDP checksum is sent as zero
// (allowed for IPv4). A record whose length runs past the write pointer is
// treated as corrupt and the ring is emptied. The document gives the engine's
// role and the notification scheme; the record format, the header fields and
// the state machine are this design's own. Frames shorter than the Ethernet
// minimum are padded by the MAC, not here.
//
// Timing: per record, one cycle to pick, one to read the entry, then the
// descriptor read (memory latency) and the 5 header words. While the header
// goes out the payload reads are already in flight, so with a memory latency
// below RD_OUTSTANDING cycles the payload leaves at one word per cycle.
module udp_tx_engine
  import accio_pkg::*;
#(
  parameter int unsigned N_ENTRIES      = 64,
  parameter int unsigned RD_OUTSTANDING = 8    // payload reads in flight or buffered
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [47:0]                  local_mac,
  input  logic [47:0]                  peer_mac,   // next-hop MAC, kept by the OS
  input  logic [31:0]                  local_ip,
  // CPU-to-NIC notification (TX entries)
  input  logic                         notify_valid,
  input  logic [$clog2(N_ENTRIES)-1:0] notify_idx,
  // ICT sideband
  output logic [$clog2(N_ENTRIES)-1:0] ent_idx,
  input  ict_entry_t                   ent,
  output logic                         upd_valid,
  output logic [$clog2(N_ENTRIES)-1:0] upd_idx,
  output logic [PTR_W-1:0]             upd_rd_ptr,
  // DMA read port from host memory
  output logic                         dma_rd_valid,
  input  logic                         dma_rd_ready,
  output logic [ADDR_W-1:0]            dma_rd_addr,
  input  logic                         dma_rsp_valid,
  input  logic [DATA_W-1:0]            dma_rsp_data,
  // frames to the MAC
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [DATA_W-1:0]            out_data,
  output logic [KEEP_W-1:0]            out_keep,
  output logic                         out_last,
  // activity pulse: a frame was sent
  output logic                         frame_sent
);
  localparam int unsigned IW = $clog2(N_ENTRIES);

  typedef enum logic [2:0] {S_IDLE, S_PICK, S_DREQ, S_DRSP, S_HDR, S_PSEND, S_TAIL, S_DONE} state_e;
  state_e state;

  logic [N_ENTRIES-1:0] pend;
  logic [IW-1:0]        rr_last, sel;
  logic                 sel_ok;
  rr_pick #(.N(N_ENTRIES)) u_pick (.req(pend), .last(rr_last), .found(sel_ok), .idx(sel));

  // latched record
  logic [IW-1:0]     c_idx;
  logic [ADDR_W-1:0] c_base;
  logic [PTR_W-1:0]  c_mask, c_rd, c_used;
  logic [15:0]       c_sport, c_dport, c_len, ident;
  logic [31:0]       c_dip;
  logic [13:0]       c_words, k;     // payload words, payload words sent
  logic [13:0]       req;            // payload words requested
  logic [2:0]        hw;             // header word being sent (0..4)
  logic [15:0]       carry;          // bytes held for the next output word

  // payload read-ahead FIFO; req - k counts words in flight plus buffered,
  // which never exceeds RD_OUTSTANDING, so the FIFO cannot overflow
  localparam int unsigned FW = $clog2(RD_OUTSTANDING);
  logic [DATA_W-1:0] fifo [RD_OUTSTANDING];
  logic [FW:0]       f_wr, f_rd;
  logic              f_empty, f_pop, f_push, pay_rd;
  logic [DATA_W-1:0] pword;          // payload word at the FIFO head
  assign f_empty = f_wr == f_rd;
  assign pword   = fifo[f_rd[FW-1:0]];

  assign ent_idx = state == S_IDLE ? sel : c_idx;

  // header bytes in network order
  logic [7:0]  hdr [42];
  logic [15:0] ip_len, csum;
  assign ip_len = c_len + 16'd28;
  assign csum   = ipv4_checksum(ip_len, ident, local_ip, c_dip);
  always_comb begin
    for (int i = 0; i < 6; i++) begin
      hdr[i]     = peer_mac[8*(5-i) +: 8];
      hdr[6 + i] = local_mac[8*(5-i) +: 8];
    end
    {hdr[12], hdr[13]} = ETHERTYPE_IPV4;
    hdr[14] = 8'h45;           hdr[15] = 8'h00;
    {hdr[16], hdr[17]} = ip_len;
    {hdr[18], hdr[19]} = ident;
    {hdr[20], hdr[21]} = 16'h4000;   // don't fragment
    hdr[22] = 8'd64;           hdr[23] = IPPROTO_UDP;
    {hdr[24], hdr[25]} = csum;
    {hdr[26], hdr[27], hdr[28], hdr[29]} = local_ip;
    {hdr[30], hdr[31], hdr[32], hdr[33]} = c_dip;
    {hdr[34], hdr[35]} = c_sport;
    {hdr[36], hdr[37]} = c_dport;
    {hdr[38], hdr[39]} = c_len + 16'd8;
    {hdr[40], hdr[41]} = 16'h0000;   // UDP checksum not used
  end

  // frame geometry
  logic [15:0] frame_bytes;
  logic [13:0] frame_words;
  assign frame_bytes = c_len + 16'd42;
  assign frame_words = 14'((32'(frame_bytes) + 7) / 8);

  function automatic logic [KEEP_W-1:0] last_keep(input logic [15:0] nbytes);
    return (nbytes[2:0] == 3'd0) ? '1 : KEEP_W'((1 << nbytes[2:0]) - 1);
  endfunction

  // output word index of the current output word
  logic [13:0] oword;
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_keep  = '1;
    out_last  = 1'b0;
    oword     = 14'(hw);
    unique case (state)
      S_HDR: begin
        out_valid = 1'b1;
        for (int b = 0; b < 8; b++) out_data[8*b +: 8] = hdr[8*hw + b];
        oword = 14'(hw);
      end
      S_PSEND: begin
        out_valid = !f_empty;
        out_data  = {pword[47:0], carry};
        oword     = 14'd5 + k;
      end
      S_TAIL: begin
        out_valid = 1'b1;
        out_data  = {48'd0, carry};
        oword     = 14'd5 + k;
      end
      default: ;
    endcase
    if (oword + 14'd1 == frame_words) begin
      out_last = out_valid;
      out_keep = last_keep(frame_bytes);
    end
  end

  // payload reads run while the header and payload are sent
  assign pay_rd       = (state == S_HDR || state == S_PSEND) && req != c_words &&
                        32'(req - k) < RD_OUTSTANDING;
  assign dma_rd_valid = state == S_DREQ || pay_rd;
  assign dma_rd_addr  = state == S_DREQ ? c_base + ADDR_W'(c_rd & c_mask)
                                        : c_base + ADDR_W'((c_rd + PTR_W'(8) + PTR_W'({req, 3'b000})) & c_mask);
  assign f_pop        = state == S_PSEND && !f_empty && out_ready;
  assign f_push       = state != S_DRSP && dma_rsp_valid;

  always_ff @(posedge clk) if (f_push) fifo[f_wr[FW-1:0]] <= dma_rsp_data;

  logic [PTR_W-1:0] e_used;
  assign e_used = ent.wr_ptr - ent.rd_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pend       <= '0;
      rr_last    <= IW'(N_ENTRIES - 1);
      c_idx      <= '0;
      c_base     <= '0;
      c_mask     <= '0;
      c_rd       <= '0;
      c_used     <= '0;
      req        <= '0;
      f_wr       <= '0;
      f_rd       <= '0;
      c_sport    <= '0;
      c_dport    <= '0;
      c_len      <= '0;
      c_dip      <= '0;
      c_words    <= '0;
      k          <= '0;
      hw         <= '0;
      carry      <= '0;
      ident      <= '0;
      upd_valid  <= 1'b0;
      upd_idx    <= '0;
      upd_rd_ptr <= '0;
      frame_sent <= 1'b0;
    end else begin
      automatic logic [N_ENTRIES-1:0] p = pend;
      upd_valid  <= 1'b0;
      frame_sent <= 1'b0;
      unique case (state)
        S_IDLE: if (sel_ok) begin
          c_idx   <= sel;
          rr_last <= sel;
          state   <= S_PICK;
        end
        S_PICK: begin
          // the entry is read one cycle after the pick, so a pointer update
          // from the previous record is already visible
          c_base  <= ent.buf_addr;
          c_mask  <= ent.buf_len - 1'b1;
          c_rd    <= ent.rd_ptr;
          c_used  <= e_used;
          c_sport <= ent.sock;
          if (ent.valid && ent.accel && ent.dir == DIR_TX && e_used != '0) begin
            state <= S_DREQ;
          end else begin
            p[c_idx] = 1'b0;
            state    <= S_IDLE;
          end
        end
        S_DREQ: if (dma_rd_ready) state <= S_DRSP;
        S_DRSP: if (dma_rsp_valid) begin
          c_len   <= dma_rsp_data[15:0];
          c_dport <= dma_rsp_data[31:16];
          c_dip   <= dma_rsp_data[63:32];
          c_words <= 14'((32'(dma_rsp_data[15:0]) + 7) / 8);
          k       <= '0;
          req     <= '0;
          hw      <= '0;
          if (PTR_W'(8) + ((PTR_W'(dma_rsp_data[15:0]) + 7) & ~PTR_W'(7)) > c_used) begin
            // corrupt record: discard the whole ring content
            upd_valid  <= 1'b1;
            upd_idx    <= c_idx;
            upd_rd_ptr <= c_rd + c_used;
            state      <= S_IDLE;
          end else begin
            state <= S_HDR;
          end
        end
        S_HDR: if (out_ready) begin
          hw <= hw + 3'd1;
          if (hw == 3'd4) begin
            carry <= {hdr[41], hdr[40]};
            state <= (c_words == '0) ? S_TAIL : S_PSEND;
          end
        end
        S_PSEND: if (f_pop) begin
          carry <= pword[63:48];
          k     <= k + 14'd1;
          if (out_last)                 state <= S_DONE;
          else if (k + 14'd1 == c_words) state <= S_TAIL;
        end
        S_TAIL: if (out_ready) state <= S_DONE;
        S_DONE: begin
          upd_valid  <= 1'b1;
          upd_idx    <= c_idx;
          upd_rd_ptr <= c_rd + PTR_W'(8) + {15'd0, c_words, 3'b000};
          frame_sent <= 1'b1;
          ident      <= ident + 16'd1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (pay_rd && dma_rd_ready) req <= req + 14'd1;
      if (f_push) f_wr <= f_wr + 1'b1;
      if (f_pop) f_rd <= f_rd + 1'b1;
      if (notify_valid) p[notify_idx] = 1'b1;
      pend <= p;
    end
  end

endmodule
