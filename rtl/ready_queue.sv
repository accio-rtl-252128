// ready_queue: the hardware I/O ready queue of the ICT.
//
// When the NIC finishes an operation that a suspended thread was waiting for,
// the ICT pushes that entry's index here. The kernel scheduler pops the next
// ready entry through a kernel-only register and resumes the thread recorded
// in the entry. The document asks for a queue with a simple round-robin
// scheduler, and says entries whose interrupt flag is set are of higher
// priority than ordinary ones. This design keeps one ready bit per ICT entry
// (an entry is in the queue at most once) and two round-robin arbiters: pop
// returns the next high-priority entry after the last one served, and an
// ordinary entry only when no high-priority entry is ready.
//
// Interface: push (push_mask, one bit per entry, with push_hi_mask giving each
// entry's class, so several entries can be woken in one cycle) and clear (drop
// an entry when its slot is freed) act at the clock edge. pop_valid/pop_idx show the entry a
// pop would return, combinationally; pop_req removes it at the clock edge. A
// push and a pop of the same entry in one cycle leave it queued.
module ready_queue #(
  parameter int unsigned N_ENTRIES = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_ENTRIES-1:0]         push_mask,
  input  logic [N_ENTRIES-1:0]         push_hi_mask,
  input  logic                         clear_valid,
  input  logic [$clog2(N_ENTRIES)-1:0] clear_idx,
  input  logic                         pop_req,
  output logic                         pop_valid,
  output logic [$clog2(N_ENTRIES)-1:0] pop_idx,
  output logic                         pop_hi,
  output logic                         any_hi,
  output logic [$clog2(N_ENTRIES):0]   count
);
  localparam int unsigned IW = $clog2(N_ENTRIES);

  logic [N_ENTRIES-1:0] rdy_hi, rdy_lo;
  logic [IW-1:0]        rr_hi, rr_lo;   // index served last in each class
  logic                 hit_hi, hit_lo;
  logic [IW-1:0]        sel_hi, sel_lo;

  rr_pick #(.N(N_ENTRIES)) u_pick_hi (.req(rdy_hi), .last(rr_hi), .found(hit_hi), .idx(sel_hi));
  rr_pick #(.N(N_ENTRIES)) u_pick_lo (.req(rdy_lo), .last(rr_lo), .found(hit_lo), .idx(sel_lo));

  assign any_hi    = hit_hi;
  assign pop_valid = hit_hi | hit_lo;
  assign pop_hi    = hit_hi;
  assign pop_idx   = hit_hi ? sel_hi : sel_lo;

  always_comb begin
    count = '0;
    for (int i = 0; i < N_ENTRIES; i++)
      count += (IW+1)'(rdy_hi[i] | rdy_lo[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_hi <= '0;
      rdy_lo <= '0;
      rr_hi  <= IW'(N_ENTRIES - 1);
      rr_lo  <= IW'(N_ENTRIES - 1);
    end else begin
      if (pop_req && pop_valid) begin
        if (hit_hi) begin
          rdy_hi[sel_hi] <= 1'b0;
          rr_hi          <= sel_hi;
        end else begin
          rdy_lo[sel_lo] <= 1'b0;
          rr_lo          <= sel_lo;
        end
      end
      if (clear_valid) begin
        rdy_hi[clear_idx] <= 1'b0;
        rdy_lo[clear_idx] <= 1'b0;
      end
      for (int i = 0; i < N_ENTRIES; i++) begin
        if (push_mask[i]) begin
          rdy_hi[i] <= push_hi_mask[i];
          rdy_lo[i] <= !push_hi_mask[i];
        end
      end
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop_req |-> pop_valid)
    else $error("ready_queue: pop of an empty queue");

endmodule
