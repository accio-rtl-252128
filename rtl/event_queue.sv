// event_queue: the ICT control event queue.
//
// The NIC reports exceptional conditions here (link going down or up, a
// fast-path frame dropped because its ring was full, a NIC error) so that the
// operating system can take the connection back to the ordinary I/O path.
// The document gives the queue, its sources and a dedicated interrupt line;
// the depth, the event format and the overflow flag are this design's own.
//
// Link state arrives as a level (link_up) and is turned into LINK_DOWN and
// LINK_UP events on its edges. rx_overflow and nic_error are one-cycle pulses.
// If several sources fire in one cycle they are queued in the order link,
// overflow, error; the queue accepts up to three events per cycle. When the
// FIFO is full a new event is lost and the sticky `overflow` flag is set; it
// clears when software pops. evt_irq is high while the queue holds an event.
// pop_req removes the head event (head/head_valid) at the clock edge.
module event_queue
  import accio_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_up,
  input  logic        rx_overflow,
  input  logic [7:0]  rx_overflow_entry,
  input  logic [15:0] rx_overflow_len,
  input  logic        nic_error,
  input  logic [15:0] nic_error_code,
  input  logic        pop_req,
  output logic        head_valid,
  output event_t      head,
  output logic        overflow,
  output logic        evt_irq
);
  localparam int unsigned AW = $clog2(DEPTH);

  event_t             mem [DEPTH];
  logic [AW:0]        wptr, rptr;
  logic               link_q;
  event_t             in_ev [3];
  logic [2:0]         in_v;

  always_comb begin
    in_v[0]  = link_up != link_q;
    in_ev[0] = '{code: link_up ? EV_LINK_UP : EV_LINK_DOWN, entry: 8'd0, info: 16'd0};
    in_v[1]  = rx_overflow;
    in_ev[1] = '{code: EV_RX_OVERFLOW, entry: rx_overflow_entry, info: rx_overflow_len};
    in_v[2]  = nic_error;
    in_ev[2] = '{code: EV_NIC_ERROR, entry: 8'd0, info: nic_error_code};
  end

  assign head_valid = wptr != rptr;
  assign head       = mem[rptr[AW-1:0]];
  assign evt_irq    = head_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      link_q   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      automatic logic [AW:0] w = wptr;
      automatic logic [AW:0] r = rptr;
      automatic logic        ovf = overflow;
      link_q <= link_up;
      if (pop_req && head_valid) begin
        r   = r + 1'b1;
        ovf = 1'b0;
      end
      for (int k = 0; k < 3; k++) begin
        if (in_v[k]) begin
          if ((w - r) < (AW+1)'(DEPTH)) begin
            mem[w[AW-1:0]] <= in_ev[k];
            w = w + 1'b1;
          end else begin
            ovf = 1'b1;
          end
        end
      end
      wptr     <= w;
      rptr     <= r;
      overflow <= ovf;
    end
  end
endmodule
