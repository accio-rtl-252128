// accio_pkg: types and constants shared by the Accio I/O Connection Table
// (ICT) and the fast-path UDP offload engine.
//
// An ICT entry holds what the document lists for a connection: a socket
// identifier, the owning address-space identifier (ASID), the flow direction,
// the DMA ring buffer address and length, read and write pointers into the
// ring, and state bits (valid, accelerated, thread suspended, interrupt flag).
// Field widths, the register map and the ring record format are this design's
// own choices; the document does not give them.
//
// Ring pointers are free-running byte counters. The byte address of a pointer
// is buf_addr + (ptr & (buf_len-1)), so ring lengths are powers of two, and
// the bytes held are wr_ptr - rd_ptr. Every ring record is one 64-bit
// descriptor word followed by the payload padded to whole 64-bit words.
package accio_pkg;

  localparam int unsigned DATA_W  = 64;   // system bus width (document: 64 bits)
  localparam int unsigned KEEP_W  = DATA_W / 8;
  localparam int unsigned ADDR_W  = 32;   // physical address width
  localparam int unsigned PTR_W   = 32;   // free-running ring pointer width
  localparam int unsigned ASID_W  = 16;   // RISC-V Sv39 ASID width
  localparam int unsigned SOCK_W  = 16;   // socket identifier = local UDP port

  typedef enum logic {
    DIR_RX = 1'b0,   // incoming flow: NIC writes the ring, thread reads it
    DIR_TX = 1'b1    // outgoing flow: thread writes the ring, NIC reads it
  } dir_e;

  typedef struct packed {
    logic              valid;     // slot in use
    logic              accel;     // connection is in the accelerated state
    logic              susp;      // a thread is suspended on this entry
    logic              irq_en;    // wake the thread with the I/O interrupt (high priority)
    dir_e              dir;
    logic [ASID_W-1:0] asid;
    logic [SOCK_W-1:0] sock;
    logic [ADDR_W-1:0] buf_addr;
    logic [PTR_W-1:0]  buf_len;   // bytes, power of two
    logic [PTR_W-1:0]  rd_ptr;
    logic [PTR_W-1:0]  wr_ptr;
  } ict_entry_t;

  // Per-entry MMIO registers, 8 bytes apart, 64 bytes per entry.
  typedef enum logic [2:0] {
    REG_CTRL  = 3'd0,  // sock [15:0], asid [31:16], dir [32], valid [33], accel [34], susp [35], irq_en [36]
    REG_ADDR  = 3'd1,
    REG_LEN   = 3'd2,
    REG_RDPTR = 3'd3,
    REG_WRPTR = 3'd4,
    REG_WAIT  = 3'd5   // store: suspend the caller unless the entry is already ready
  } ict_reg_e;

  // Global registers, in the page above the entries.
  typedef enum logic [2:0] {
    GREG_READY_POP = 3'd0,  // load: {valid at 63, high class at 62, entry at [15:0]}, pops the ready queue
    GREG_IRQ       = 3'd1,  // load: {rq_any_hi, rq_valid, evt_irq, io_irq, io_pending} at [4:0]; store: acknowledge I/O interrupt
    GREG_CUR_ACCEL = 3'd2,  // running an accelerated I/O thread (the extra ASID bit)
    GREG_EVENT_POP = 3'd3,  // load: {valid at 63, overflow at 62, event at [27:0]}, pops the event queue
    GREG_STATS     = 3'd4   // load: {ready-queue occupancy at [40:32], wake-up count at [31:0]}
  } ict_greg_e;

  // CPU-side MMIO access (one outstanding, answered the next cycle).
  typedef struct packed {
    logic              valid;
    logic              write;
    logic [15:0]       addr;    // byte offset inside the ICT window
    logic [DATA_W-1:0] wdata;
    logic              kernel;  // privilege of the access
    logic [ASID_W-1:0] asid;    // ASID of the running process
  } mmio_req_t;

  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] rdata;
    logic              fault;   // memory protection exception
  } mmio_rsp_t;

  // Control events reported to software.
  typedef enum logic [3:0] {
    EV_LINK_DOWN   = 4'd1,
    EV_LINK_UP     = 4'd2,
    EV_RX_OVERFLOW = 4'd3,  // fast-path frame dropped, ring full
    EV_NIC_ERROR   = 4'd4
  } event_code_e;

  typedef struct packed {
    event_code_e code;
    logic [7:0]  entry;
    logic [15:0] info;
  } event_t;

  // Frame headers, Ethernet II + IPv4 without options + UDP = 42 bytes.
  localparam int unsigned HDR_BYTES   = 42;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;

  // Ones'-complement checksum of the 20-byte IPv4 header (checksum field zero).
  function automatic logic [15:0] ipv4_checksum(input logic [15:0] total_len,
                                                input logic [15:0] ident,
                                                input logic [31:0] src_ip,
                                                input logic [31:0] dst_ip);
    logic [31:0] s;
    s = 32'h4500 + {16'd0, total_len} + {16'd0, ident} + 32'h4000 + 32'h4011
      + {16'd0, src_ip[31:16]} + {16'd0, src_ip[15:0]}
      + {16'd0, dst_ip[31:16]} + {16'd0, dst_ip[15:0]};
    s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    return ~s[15:0];
  endfunction

endpackage
