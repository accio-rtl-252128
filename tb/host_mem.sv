// host_mem: behavioural model of host DRAM behind the system bus, for the
// testbenches. One 64-bit write port and one 64-bit read port, each with a
// ready that drops at random (STALL_PCT percent of cycles) to exercise
// back-pressure; a read answers LATENCY cycles after it is accepted, in
// order. Addresses are byte addresses of whole words; WORDS words are held.
// The testbench reaches the contents directly through `mem`.
module host_mem #(
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned LATENCY   = 3,
  parameter int unsigned STALL_PCT = 25
) (
  input  logic        clk,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_addr,
  input  logic [63:0] wr_data,
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic [31:0] rd_addr,
  output logic        rsp_valid,
  output logic [63:0] rsp_data
);
  logic [63:0] mem [WORDS];
  logic [LATENCY-1:0] pipe_v = '0;
  logic [63:0]        pipe_d [LATENCY];
  int writes = 0, reads = 0;
  int stall_pct = STALL_PCT;   // a testbench may change it while running

  initial foreach (mem[i]) mem[i] = '0;

  always_ff @(posedge clk) begin
    wr_ready <= $urandom_range(0, 99) >= stall_pct;
    rd_ready <= $urandom_range(0, 99) >= stall_pct;
    if (wr_valid && wr_ready) begin
      mem[(wr_addr >> 3) % WORDS] <= wr_data;
      writes <= writes + 1;
    end
    pipe_v <= {pipe_v[LATENCY-2:0], rd_valid && rd_ready};
    pipe_d[0] <= mem[(rd_addr >> 3) % WORDS];
    for (int i = 1; i < LATENCY; i++) pipe_d[i] <= pipe_d[i-1];
    if (rd_valid && rd_ready) reads <= reads + 1;
  end
  assign rsp_valid = pipe_v[LATENCY-1];
  assign rsp_data  = pipe_d[LATENCY-1];
endmodule
