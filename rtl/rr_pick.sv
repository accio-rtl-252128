// rr_pick: round-robin selection. Returns the first set request bit after
// position `last`, wrapping around, so the requester served last has the
// lowest priority next time. Purely combinational.
module rr_pick #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] last,
  output logic                 found,
  output logic [$clog2(N)-1:0] idx
);
  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      automatic logic [$clog2(N)-1:0] j = $clog2(N)'((int'(last) + i) % N);
      if (!found && req[j]) begin
        found = 1'b1;
        idx   = j;
      end
    end
  end
endmodule
