// accio_top: the Accio I/O hardware of one node, the I/O Connection Table
// (ICT) peripheral together with the fast-path UDP offload engine of the NIC.
//
// The CPU reaches the ICT over a memory-mapped port (mmio_req/mmio_rsp): the
// kernel sets connections up, user threads move their ring pointers directly,
// and the kernel pops the hardware ready queue and the control event queue.
// The offload engine sits between the MAC and the rest of the NIC:
//   receive:  mac_rx_* -> udp_rx_engine -> payload into the connection's DMA
//             ring (rx_dma_*), or the whole frame to the normal traffic
//             engine (norm_rx_*);
//   transmit: a pointer store to a TX entry notifies udp_tx_engine, which
//             reads the ring (tx_dma_*), frames the data and sends it; its
//             frames and those of the normal engine (norm_tx_*) share the MAC
//             transmit port (mac_tx_*) through tx_frame_mux.
// Both engines talk to the ICT over its sideband: RX looks connections up by
// UDP port and advances write pointers, TX reads entries and advances read
// pointers. A pointer advance on an entry with a suspended thread puts it in
// the ready queue and, for interrupt-flagged entries, raises irq_io unless an
// accelerated thread is already running. irq_evt signals control events (link
// changes, ring overflow drops, NIC errors).
//
// The normal traffic engine, the MAC/PHY, the CPU and the memory system are
// outside this module; their connections are ports. All streams are 64-bit
// valid/ready with byte keep and last; the DMA ports take one word per
// handshake, and a read answers with dma_rsp_valid some cycles later.
module accio_top
  import accio_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 64,
  parameter int unsigned EVQ_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // node configuration (set by the OS)
  input  logic [47:0]                  local_mac,
  input  logic [47:0]                  peer_mac,
  input  logic [31:0]                  local_ip,
  // CPU memory-mapped access to the ICT and interrupts
  input  mmio_req_t                    mmio_req,
  output mmio_rsp_t                    mmio_rsp,
  output logic                         irq_io,
  output logic                         irq_evt,
  // CPU-to-NIC notifications, also visible outside
  output logic                         notify_valid,
  output logic [$clog2(N_ENTRIES)-1:0] notify_idx,
  output dir_e                         notify_dir,
  // NIC status
  input  logic                         link_up,
  input  logic                         nic_error,
  input  logic [15:0]                  nic_error_code,
  // MAC receive stream
  input  logic                         mac_rx_valid,
  output logic                         mac_rx_ready,
  input  logic [DATA_W-1:0]            mac_rx_data,
  input  logic [KEEP_W-1:0]            mac_rx_keep,
  input  logic                         mac_rx_last,
  // MAC transmit stream
  output logic                         mac_tx_valid,
  input  logic                         mac_tx_ready,
  output logic [DATA_W-1:0]            mac_tx_data,
  output logic [KEEP_W-1:0]            mac_tx_keep,
  output logic                         mac_tx_last,
  // normal traffic engine: frames it receives and frames it sends
  output logic                         norm_rx_valid,
  input  logic                         norm_rx_ready,
  output logic [DATA_W-1:0]            norm_rx_data,
  output logic [KEEP_W-1:0]            norm_rx_keep,
  output logic                         norm_rx_last,
  input  logic                         norm_tx_valid,
  output logic                         norm_tx_ready,
  input  logic [DATA_W-1:0]            norm_tx_data,
  input  logic [KEEP_W-1:0]            norm_tx_keep,
  input  logic                         norm_tx_last,
  // DMA write port (RX rings)
  output logic                         rx_dma_valid,
  input  logic                         rx_dma_ready,
  output logic [ADDR_W-1:0]            rx_dma_addr,
  output logic [DATA_W-1:0]            rx_dma_data,
  // DMA read port (TX rings)
  output logic                         tx_dma_valid,
  input  logic                         tx_dma_ready,
  output logic [ADDR_W-1:0]            tx_dma_addr,
  input  logic                         tx_dma_rsp_valid,
  input  logic [DATA_W-1:0]            tx_dma_rsp_data,
  // activity pulses
  output logic                         rx_fast_frame,
  output logic                         rx_norm_frame,
  output logic                         tx_fast_frame
);
  localparam int unsigned IW = $clog2(N_ENTRIES);

  logic [SOCK_W-1:0] rx_lkp_sock;
  logic              rx_lkp_hit;
  logic [IW-1:0]     rx_lkp_idx;
  ict_entry_t        rx_lkp_entry;
  logic              rx_upd_valid;
  logic [IW-1:0]     rx_upd_idx;
  logic [PTR_W-1:0]  rx_upd_wr_ptr;
  logic              rx_ovf;
  logic [IW-1:0]     rx_ovf_idx;
  logic [15:0]       rx_ovf_len;
  logic [IW-1:0]     tx_rd_idx;
  ict_entry_t        tx_rd_entry;
  logic              tx_upd_valid;
  logic [IW-1:0]     tx_upd_idx;
  logic [PTR_W-1:0]  tx_upd_rd_ptr;

  ict #(.N_ENTRIES(N_ENTRIES), .EVQ_DEPTH(EVQ_DEPTH)) u_ict (
    .clk, .rst_n,
    .mmio_req, .mmio_rsp,
    .notify_valid, .notify_idx, .notify_dir,
    .rx_lkp_sock, .rx_lkp_hit, .rx_lkp_idx, .rx_lkp_entry,
    .rx_upd_valid, .rx_upd_idx, .rx_upd_wr_ptr,
    .tx_rd_idx, .tx_rd_entry,
    .tx_upd_valid, .tx_upd_idx, .tx_upd_rd_ptr,
    .link_up, .rx_overflow(rx_ovf), .rx_overflow_idx(rx_ovf_idx), .rx_overflow_len(rx_ovf_len),
    .nic_error, .nic_error_code,
    .irq_io, .irq_evt
  );

  udp_rx_engine #(.N_ENTRIES(N_ENTRIES)) u_rx (
    .clk, .rst_n, .local_ip,
    .in_valid(mac_rx_valid), .in_ready(mac_rx_ready), .in_data(mac_rx_data),
    .in_keep(mac_rx_keep), .in_last(mac_rx_last),
    .norm_valid(norm_rx_valid), .norm_ready(norm_rx_ready), .norm_data(norm_rx_data),
    .norm_keep(norm_rx_keep), .norm_last(norm_rx_last),
    .dma_wr_valid(rx_dma_valid), .dma_wr_ready(rx_dma_ready),
    .dma_wr_addr(rx_dma_addr), .dma_wr_data(rx_dma_data),
    .lkp_sock(rx_lkp_sock), .lkp_hit(rx_lkp_hit), .lkp_idx(rx_lkp_idx), .lkp_entry(rx_lkp_entry),
    .upd_valid(rx_upd_valid), .upd_idx(rx_upd_idx), .upd_wr_ptr(rx_upd_wr_ptr),
    .overflow(rx_ovf), .overflow_idx(rx_ovf_idx), .overflow_len(rx_ovf_len),
    .fast_frame(rx_fast_frame), .norm_frame(rx_norm_frame)
  );

  logic              off_tx_valid, off_tx_ready, off_tx_last;
  logic [DATA_W-1:0] off_tx_data;
  logic [KEEP_W-1:0] off_tx_keep;

  udp_tx_engine #(.N_ENTRIES(N_ENTRIES)) u_tx (
    .clk, .rst_n, .local_mac, .peer_mac, .local_ip,
    .notify_valid(notify_valid && notify_dir == DIR_TX), .notify_idx,
    .ent_idx(tx_rd_idx), .ent(tx_rd_entry),
    .upd_valid(tx_upd_valid), .upd_idx(tx_upd_idx), .upd_rd_ptr(tx_upd_rd_ptr),
    .dma_rd_valid(tx_dma_valid), .dma_rd_ready(tx_dma_ready), .dma_rd_addr(tx_dma_addr),
    .dma_rsp_valid(tx_dma_rsp_valid), .dma_rsp_data(tx_dma_rsp_data),
    .out_valid(off_tx_valid), .out_ready(off_tx_ready), .out_data(off_tx_data),
    .out_keep(off_tx_keep), .out_last(off_tx_last),
    .frame_sent(tx_fast_frame)
  );

  logic [1:0] mux_ready;
  assign norm_tx_ready = mux_ready[0];
  assign off_tx_ready  = mux_ready[1];

  tx_frame_mux u_txmux (
    .clk, .rst_n,
    .in_valid({off_tx_valid, norm_tx_valid}), .in_ready(mux_ready),
    .in_data('{norm_tx_data, off_tx_data}), .in_keep('{norm_tx_keep, off_tx_keep}),
    .in_last({off_tx_last, norm_tx_last}),
    .out_valid(mac_tx_valid), .out_ready(mac_tx_ready), .out_data(mac_tx_data),
    .out_keep(mac_tx_keep), .out_last(mac_tx_last)
  );

endmodule
