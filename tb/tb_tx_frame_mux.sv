// tb_tx_frame_mux: self-checking test of the transmit frame mux.
// Two sources send numbered multi-word frames with random valid gaps while
// the output applies random back-pressure. Checked: every word arrives in
// order within its frame, frames are never interleaved, no word is lost, and
// when both sources wait the grant alternates.
`timescale 1ns/1ps
module tb_tx_frame_mux;
  import accio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready, in_last;
  logic [DATA_W-1:0] in_data [2];
  logic [KEEP_W-1:0] in_keep [2];
  logic out_valid, out_ready, out_last;
  logic [DATA_W-1:0] out_data;
  logic [KEEP_W-1:0] out_keep;
  int checks = 0, failures = 0;
  localparam int FRAMES = 40;

  tx_frame_mux dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // word = {src, frame, word index, frame length}
  function automatic logic [63:0] mk(input int s, input int f, input int w, input int len);
    return {8'(s), 24'(f), 16'(w), 16'(len)};
  endfunction

  int sent_f [2], sent_w [2];
  int len_of [2][FRAMES];
  initial foreach (len_of[s, f]) len_of[s][f] = 1 + (s * 7 + f * 3) % 5;

  // sources
  for (genvar s = 0; s < 2; s++) begin : g_src
    always_ff @(posedge clk) begin
      if (rst_n) begin
        if (in_valid[s] && in_ready[s]) begin
          if (in_last[s]) begin sent_f[s] <= sent_f[s] + 1; sent_w[s] <= 0; end
          else sent_w[s] <= sent_w[s] + 1;
        end
      end
    end
    always_comb begin
      in_data[s] = mk(s, sent_f[s], sent_w[s], sent_f[s] < FRAMES ? len_of[s][sent_f[s]] : 0);
      in_keep[s] = 8'hFF;
      in_last[s] = sent_f[s] < FRAMES && sent_w[s] == len_of[s][sent_f[s]] - 1;
    end
  end

  bit go [2];
  always_ff @(posedge clk) begin
    // a source keeps valid high once raised until the word is taken
    for (int s = 0; s < 2; s++)
      if (!in_valid[s] || in_ready[s]) go[s] <= $urandom_range(0, 3) != 0;
    out_ready <= $urandom_range(0, 3) != 0;
  end
  always_comb for (int s = 0; s < 2; s++) in_valid[s] = rst_n && go[s] && sent_f[s] < FRAMES;

  // checker
  int exp_w [2], got_frames [2];
  int cur_src = -1;
  int both_waiting_switches = 0, grants_when_both = 0;
  int last_src = -1;
  bit both_at_start;
  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      automatic int s = out_data[63:56];
      automatic int f = out_data[55:32];
      automatic int w = out_data[31:16];
      automatic int l = out_data[15:0];
      checks++;
      if (cur_src != -1 && s != cur_src) begin failures++; $display("FAIL: interleaved frames"); end
      if (f != got_frames[s] || w != exp_w[s]) begin
        failures++; $display("FAIL: src %0d got f%0d w%0d expected f%0d w%0d", s, f, w, got_frames[s], exp_w[s]);
      end
      if (out_last != (w == l - 1)) begin failures++; $display("FAIL: last flag"); end
      if (cur_src == -1 && both_at_start) begin
        grants_when_both++;
        if (s != last_src) both_waiting_switches++;
      end
      if (cur_src == -1) last_src = s;
      if (out_last) begin cur_src = -1; exp_w[s] = 0; got_frames[s]++; end
      else begin cur_src = s; exp_w[s]++; end
    end
  end
  always_comb both_at_start = in_valid[0] && in_valid[1];

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (got_frames[0] == FRAMES && got_frames[1] == FRAMES);
    repeat (2) @(posedge clk);
    checks++;
    if (grants_when_both == 0 || both_waiting_switches != grants_when_both) begin
      failures++;
      $display("FAIL: alternation %0d of %0d", both_waiting_switches, grants_when_both);
    end
    $display("frames both-waiting grants: %0d", grants_when_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
