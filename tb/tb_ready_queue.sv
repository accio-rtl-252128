// tb_ready_queue: self-checking test of the hardware I/O ready queue.
// A reference model (two bit vectors and two round-robin pointers kept in the
// testbench) predicts every pop. Checked: interrupt-flagged entries leave
// before ordinary ones, round-robin order inside each class, an entry pushed
// twice is queued once, clearing a freed slot, simultaneous push of several
// entries, and a random push/pop/clear mix.
`timescale 1ns/1ps
module tb_ready_queue;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] push_mask, push_hi_mask;
  logic clear_valid; logic [2:0] clear_idx;
  logic pop_req, pop_valid, pop_hi, any_hi;
  logic [2:0] pop_idx; logic [3:0] count;
  int checks = 0, failures = 0;

  ready_queue #(.N_ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit m_hi[N], m_lo[N];
  int r_hi = N-1, r_lo = N-1;
  function automatic int ref_pick(ref bit v[N], input int last);
    for (int i = 1; i <= N; i++) if (v[(last+i)%N]) return (last+i)%N;
    return -1;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic push(input int idx, input bit hi);
    push_mask = '0; push_hi_mask = '0;
    push_mask[idx] = 1; push_hi_mask[idx] = hi;
    @(posedge clk); #1;
    push_mask = '0;
    m_hi[idx] = hi; m_lo[idx] = !hi;
  endtask

  task automatic pop_and_check();
    int e; bit ehi;
    e = ref_pick(m_hi, r_hi); ehi = e >= 0;
    if (e < 0) e = ref_pick(m_lo, r_lo);
    check(pop_valid == (e >= 0), $sformatf("pop_valid %0d expected %0d", pop_valid, e >= 0));
    if (e >= 0 && pop_valid) begin   // a missing entry is already counted above
      check(pop_idx == e && pop_hi == ehi, $sformatf("pop got %0d/%0d expected %0d/%0d", pop_idx, pop_hi, e, ehi));
      pop_req = 1; @(posedge clk); #1; pop_req = 0;
      if (ehi) begin m_hi[e] = 0; r_hi = e; end else begin m_lo[e] = 0; r_lo = e; end
    end
  endtask

  function automatic int ref_count();
    int c = 0;
    for (int i = 0; i < N; i++) c += (m_hi[i] || m_lo[i]);
    return c;
  endfunction

  initial begin
    push_mask = '0; push_hi_mask = '0; clear_valid = 0; clear_idx = 0; pop_req = 0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    check(!pop_valid && count == 0, "empty after reset");
    // ordinary entries 2 and 5, then high-priority 6 and 1
    push(2, 0); push(5, 0); push(6, 1); push(1, 1);
    check(count == 4 && any_hi, "count 4, high ready");
    // expected order: 1 then 6 (high, RR from N-1), then 2, 5
    for (int i = 0; i < 4; i++) pop_and_check();
    check(count == 0, "drained");
    // duplicate push
    push(3, 0); push(3, 0);
    check(count == 1, "duplicate push queued once");
    // clear a freed slot
    clear_valid = 1; clear_idx = 3; @(posedge clk); #1; clear_valid = 0;
    m_lo[3] = 0;
    check(count == 0 && !pop_valid, "clear removes entry");
    // several wake-ups in one cycle
    push_mask = 8'b1010_0101; push_hi_mask = 8'b1000_0001;
    @(posedge clk); #1; push_mask = '0;
    foreach (m_hi[i]) if (8'b1010_0101 >> i & 1) begin m_hi[i] = (8'b1000_0001 >> i) & 1; m_lo[i] = !m_hi[i]; end
    check(count == 4, "four pushed at once");
    while (ref_count() > 0) pop_and_check();
    // random mix
    for (int t = 0; t < 400; t++) begin
      automatic int op = $urandom_range(0, 2);
      if (op == 0) push($urandom_range(0, N-1), $urandom_range(0, 1));
      else if (op == 1) pop_and_check();
      else begin
        automatic int c = $urandom_range(0, N-1);
        clear_valid = 1; clear_idx = 3'(c); @(posedge clk); #1; clear_valid = 0;
        m_hi[c] = 0; m_lo[c] = 0;
      end
      check(count == ref_count(), "count matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
