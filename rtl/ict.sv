// ict: the I/O Connection Table, a memory-mapped peripheral that caches the
// state of accelerated connections so that user threads and the NIC can move
// data without calling the operating system, much as a TLB caches page-table
// entries.
//
// Each of the N_ENTRIES slots holds one connection (see ict_entry_t): socket
// id, owner ASID, direction, DMA ring address and length, read and write
// pointers, and the state bits valid, accel (accelerated), susp (a thread is
// blocked on this entry) and irq_en (wake that thread with the prioritized I/O
// interrupt). The table contains the hardware ready queue, the control event
// queue and the I/O interrupt logic of the document.
//
// CPU side (mmio_req/mmio_rsp, answered one cycle after the request):
//   entry registers at byte offset idx*64 + reg*8 (ict_reg_e), globals at
//   0x8000 + greg*8 (ict_greg_e). Kernel accesses always succeed. A user
//   access succeeds only on a valid entry whose ASID matches the running
//   process, and may only store the pointer the thread owns (rd_ptr of an RX
//   entry, wr_ptr of a TX entry); anything else returns fault = 1 (the
//   memory-protection exception of the document) and has no effect.
//   Storing either pointer sends a CPU-to-NIC notification carrying the entry
//   index (notify_*), so the NIC never scans the table.
//   A store to WAIT is the kernel's atomic "block unless ready": it sets susp
//   only if an RX ring is empty, or a TX ring has fewer free bytes than the
//   value stored; the kernel reads CTRL afterwards and sleeps the thread only
//   if susp is set, so a wake-up cannot be lost.
// NIC side (sideband, combinational reads, updates at the clock edge):
//   rx_lkp_* finds the accelerated RX entry of a UDP port; tx_rd_* reads an
//   entry by index; rx_upd_* sets an RX entry's wr_ptr and tx_upd_* a TX
//   entry's rd_ptr. If that entry has susp set, the update clears it and puts
//   the entry in the ready queue; an entry with irq_en also raises the I/O
//   interrupt unless an accelerated thread is running (cur_accel register).
//   A NIC update wins over an MMIO store to the same field in the same cycle.
//
// The fields and behaviour follow the document; the register map, widths,
// the WAIT register and the single-cycle sideband are this design's choices.
module ict
  import accio_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 64,
  parameter int unsigned EVQ_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // CPU MMIO port
  input  mmio_req_t                    mmio_req,
  output mmio_rsp_t                    mmio_rsp,
  // CPU-to-NIC notification
  output logic                         notify_valid,
  output logic [$clog2(N_ENTRIES)-1:0] notify_idx,
  output dir_e                         notify_dir,
  // NIC sideband: RX lookup by destination port, RX write-pointer update
  input  logic [SOCK_W-1:0]            rx_lkp_sock,
  output logic                         rx_lkp_hit,
  output logic [$clog2(N_ENTRIES)-1:0] rx_lkp_idx,
  output ict_entry_t                   rx_lkp_entry,
  input  logic                         rx_upd_valid,
  input  logic [$clog2(N_ENTRIES)-1:0] rx_upd_idx,
  input  logic [PTR_W-1:0]             rx_upd_wr_ptr,
  // NIC sideband: TX entry read, TX read-pointer update
  input  logic [$clog2(N_ENTRIES)-1:0] tx_rd_idx,
  output ict_entry_t                   tx_rd_entry,
  input  logic                         tx_upd_valid,
  input  logic [$clog2(N_ENTRIES)-1:0] tx_upd_idx,
  input  logic [PTR_W-1:0]             tx_upd_rd_ptr,
  // NIC events for the control event queue
  input  logic                         link_up,
  input  logic                         rx_overflow,
  input  logic [$clog2(N_ENTRIES)-1:0] rx_overflow_idx,
  input  logic [15:0]                  rx_overflow_len,
  input  logic                         nic_error,
  input  logic [15:0]                  nic_error_code,
  // interrupts to the CPU
  output logic                         irq_io,
  output logic                         irq_evt
);
  localparam int unsigned IW = $clog2(N_ENTRIES);

  ict_entry_t tbl [N_ENTRIES];
  logic       cur_accel;
  logic [31:0] wakeups;

  // ---------------------------------------------------------------- decode
  logic          is_global;
  logic [8:0]    a_idx;
  logic [2:0]    a_reg;
  logic          idx_ok;
  ict_entry_t    a_ent;
  logic          owner_ok, user_wr_ok, allowed;

  assign is_global = mmio_req.addr[15];
  assign a_idx     = mmio_req.addr[14:6];
  assign a_reg     = mmio_req.addr[5:3];
  assign idx_ok    = 32'(a_idx) < N_ENTRIES;
  assign a_ent     = tbl[IW'(a_idx)];
  assign owner_ok  = !is_global && idx_ok && a_ent.valid && a_ent.asid == mmio_req.asid;
  assign user_wr_ok = (a_reg == REG_RDPTR && a_ent.dir == DIR_RX) ||
                      (a_reg == REG_WRPTR && a_ent.dir == DIR_TX);
  assign allowed   = mmio_req.kernel || (owner_ok && (!mmio_req.write || user_wr_ok));

  logic do_acc, do_wr, do_rd;
  assign do_acc = mmio_req.valid && allowed;
  assign do_wr  = do_acc && mmio_req.write;
  assign do_rd  = do_acc && !mmio_req.write;

  // ------------------------------------------------------ ready queue etc.
  logic [N_ENTRIES-1:0] wake_mask, wake_hi_mask;
  logic                 rq_pop, rq_valid, rq_hi, rq_any_hi;
  logic [IW-1:0]        rq_idx;
  logic [IW:0]          rq_count;
  logic                 rq_clear;
  logic                 evq_pop, evq_valid, evq_ovf;
  event_t               evq_head;
  logic                 irq_ack, irq_pending;

  ready_queue #(.N_ENTRIES(N_ENTRIES)) u_rq (
    .clk, .rst_n,
    .push_mask(wake_mask), .push_hi_mask(wake_hi_mask),
    .clear_valid(rq_clear), .clear_idx(IW'(a_idx)),
    .pop_req(rq_pop), .pop_valid(rq_valid), .pop_idx(rq_idx), .pop_hi(rq_hi),
    .any_hi(rq_any_hi), .count(rq_count)
  );

  event_queue #(.DEPTH(EVQ_DEPTH)) u_evq (
    .clk, .rst_n,
    .link_up, .rx_overflow,
    .rx_overflow_entry(8'(rx_overflow_idx)), .rx_overflow_len,
    .nic_error, .nic_error_code,
    .pop_req(evq_pop), .head_valid(evq_valid), .head(evq_head),
    .overflow(evq_ovf), .evt_irq(irq_evt)
  );

  io_irq_ctrl u_irq (
    .clk, .rst_n,
    .wake_hi(|(wake_mask & wake_hi_mask)), .ack(irq_ack), .cur_accel,
    .pending(irq_pending), .irq_io
  );

  assign rq_pop   = do_rd && is_global && a_reg == GREG_READY_POP && rq_valid;
  assign evq_pop  = do_rd && is_global && a_reg == GREG_EVENT_POP && evq_valid;
  assign irq_ack  = do_wr && is_global && a_reg == GREG_IRQ;
  assign rq_clear = do_wr && !is_global && idx_ok && a_reg == REG_CTRL && !mmio_req.wdata[33];

  // ------------------------------------------------------ NIC sideband
  always_comb begin
    rx_lkp_hit = 1'b0;
    rx_lkp_idx = '0;
    for (int i = 0; i < N_ENTRIES; i++) begin
      if (!rx_lkp_hit && tbl[i].valid && tbl[i].accel && tbl[i].dir == DIR_RX &&
          tbl[i].sock == rx_lkp_sock) begin
        rx_lkp_hit = 1'b1;
        rx_lkp_idx = IW'(i);
      end
    end
  end
  assign rx_lkp_entry = tbl[rx_lkp_idx];
  assign tx_rd_entry  = tbl[tx_rd_idx];

  always_comb begin
    wake_mask    = '0;
    wake_hi_mask = '0;
    for (int i = 0; i < N_ENTRIES; i++) wake_hi_mask[i] = tbl[i].irq_en;
    if (rx_upd_valid && tbl[rx_upd_idx].susp) wake_mask[rx_upd_idx] = 1'b1;
    if (tx_upd_valid && tbl[tx_upd_idx].susp) wake_mask[tx_upd_idx] = 1'b1;
  end

  // ------------------------------------------------------ WAIT condition
  logic [PTR_W-1:0] a_used;
  logic             a_ready;
  assign a_used  = a_ent.wr_ptr - a_ent.rd_ptr;
  assign a_ready = (a_ent.dir == DIR_RX) ? (a_used != '0)
                                         : (a_ent.buf_len - a_used >= mmio_req.wdata[PTR_W-1:0]);

  // ------------------------------------------------------ table update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) tbl[i] <= '0;
      cur_accel <= 1'b0;
      wakeups   <= '0;
    end else begin
      if (do_wr && !is_global && idx_ok) begin
        unique case (a_reg)
          REG_CTRL: begin
            tbl[IW'(a_idx)].sock   <= mmio_req.wdata[15:0];
            tbl[IW'(a_idx)].asid   <= mmio_req.wdata[31:16];
            tbl[IW'(a_idx)].dir    <= dir_e'(mmio_req.wdata[32]);
            tbl[IW'(a_idx)].valid  <= mmio_req.wdata[33];
            tbl[IW'(a_idx)].accel  <= mmio_req.wdata[34];
            tbl[IW'(a_idx)].susp   <= mmio_req.wdata[35];
            tbl[IW'(a_idx)].irq_en <= mmio_req.wdata[36];
          end
          REG_ADDR:  tbl[IW'(a_idx)].buf_addr <= mmio_req.wdata[ADDR_W-1:0];
          REG_LEN:   tbl[IW'(a_idx)].buf_len  <= mmio_req.wdata[PTR_W-1:0];
          REG_RDPTR: tbl[IW'(a_idx)].rd_ptr   <= mmio_req.wdata[PTR_W-1:0];
          REG_WRPTR: tbl[IW'(a_idx)].wr_ptr   <= mmio_req.wdata[PTR_W-1:0];
          REG_WAIT:  if (!a_ready) tbl[IW'(a_idx)].susp <= 1'b1;
          default: ;
        endcase
      end
      if (do_wr && is_global && a_reg == GREG_CUR_ACCEL)
        cur_accel <= mmio_req.wdata[0];
      // NIC updates last: they win over a store to the same field
      if (rx_upd_valid) tbl[rx_upd_idx].wr_ptr <= rx_upd_wr_ptr;
      if (tx_upd_valid) tbl[tx_upd_idx].rd_ptr <= tx_upd_rd_ptr;
      for (int i = 0; i < N_ENTRIES; i++)
        if (wake_mask[i]) tbl[i].susp <= 1'b0;
      wakeups <= wakeups + 32'($countones(wake_mask));
    end
  end

  // ------------------------------------------------------ notifications
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      notify_valid <= 1'b0;
      notify_idx   <= '0;
      notify_dir   <= DIR_RX;
    end else begin
      notify_valid <= do_wr && !is_global && idx_ok && (a_reg == REG_RDPTR || a_reg == REG_WRPTR);
      notify_idx   <= IW'(a_idx);
      notify_dir   <= a_ent.dir;
    end
  end

  // ------------------------------------------------------ read data
  logic [DATA_W-1:0] rdata;
  always_comb begin
    rdata = '0;
    if (is_global) begin
      unique case (a_reg)
        GREG_READY_POP: rdata = {rq_valid, rq_hi, 46'd0, 16'(rq_idx)};
        GREG_IRQ:       rdata = {59'd0, rq_any_hi, rq_valid, irq_evt, irq_io, irq_pending};
        GREG_CUR_ACCEL: rdata = {63'd0, cur_accel};
        GREG_EVENT_POP: rdata = {evq_valid, evq_ovf, 34'd0, evq_head.code, evq_head.entry, evq_head.info};
        GREG_STATS:     rdata = {23'd0, 9'(rq_count), wakeups};
        default:        rdata = '0;
      endcase
    end else if (idx_ok) begin
      unique case (a_reg)
        REG_CTRL:  rdata = {27'd0, a_ent.irq_en, a_ent.susp, a_ent.accel, a_ent.valid,
                            a_ent.dir, a_ent.asid, a_ent.sock};
        REG_ADDR:  rdata = DATA_W'(a_ent.buf_addr);
        REG_LEN:   rdata = DATA_W'(a_ent.buf_len);
        REG_RDPTR: rdata = DATA_W'(a_ent.rd_ptr);
        REG_WRPTR: rdata = DATA_W'(a_ent.wr_ptr);
        default:   rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mmio_rsp <= '0;
    end else begin
      mmio_rsp.valid <= mmio_req.valid;
      mmio_rsp.fault <= mmio_req.valid && !allowed;
      mmio_rsp.rdata <= do_rd ? rdata : '0;
    end
  end

endmodule
