// req_filter: the filter in front of the wakeup lines of matrix B, one
// slice per issue-queue entry.
//
// Signal C is the request of the entry at the input of the select logic;
// signal D is the entry's result notification from the output of the select
// logic (the matrix-A wakeup line). For an instruction whose latency is
// shorter than the scheduling loop, C is passed (its consumers in matrix B
// are woken while it is still competing) and D is dropped; for every other
// instruction D is passed and C dropped. Purely combinational.
module req_filter #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  input  logic [N-1:0] short_lat,
  output logic [N-1:0] lines_b
);

  always_comb lines_b = (c & short_lat) | (d & ~short_lat);

endmodule
