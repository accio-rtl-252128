// tx_frame_mux: shares the one transmit port of the MAC between the normal
// traffic engine and the fast-path offload engine.
//
// Whole frames are passed: once a source has offered a word and won, the port
// stays with it until its last word has been accepted. When both sources wait, they take turns
// (round-robin over frames), so neither path can starve the other. The
// document only says that the offload engine is integrated with the normal
// traffic engine of the NIC; the arbitration policy is this design's choice.
// Input 0 is the normal path, input 1 the offload path. The mux adds no
// latency: valid, data and ready pass through combinationally.
module tx_frame_mux
  import accio_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        in_valid,
  output logic [1:0]        in_ready,
  input  logic [DATA_W-1:0] in_data [2],
  input  logic [KEEP_W-1:0] in_keep [2],
  input  logic [1:0]        in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [KEEP_W-1:0] out_keep,
  output logic              out_last
);
  logic busy, cur, last_won, pick;

  // source that would win a new frame
  always_comb begin
    if (in_valid[0] && in_valid[1]) pick = !last_won;
    else                            pick = in_valid[1];
  end

  logic src;
  assign src       = busy ? cur : pick;
  assign out_valid = in_valid[src];
  assign out_data  = in_data[src];
  assign out_keep  = in_keep[src];
  assign out_last  = in_last[src];
  always_comb begin
    in_ready      = '0;
    in_ready[src] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cur      <= 1'b0;
      last_won <= 1'b1;
    end else if (!busy) begin
      // the grant is taken as soon as a frame is offered, accepted or not,
      // so a stalled word never changes source
      if (out_valid) begin
        cur      <= src;
        last_won <= src;
        busy     <= !(out_ready && out_last);
      end
    end else if (out_valid && out_ready && out_last) begin
      busy <= 1'b0;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && src == $past(src))
    else $error("tx_frame_mux: source changed while the port was stalled");
endmodule
