// zero_detect: zero-detection logic (ZDL).
//
// Asserts zdl when no one-cycle (short) instruction that is competing at the
// input of the select logic this cycle has been left unselected. Only then
// have all producers that woke rows of matrix B actually been selected, so
// those rows may join the select input in the next cycle. Purely
// combinational: sel_req and grant are from the same cycle.
module zero_detect #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] sel_req,
  input  logic [N-1:0] grant,
  input  logic [N-1:0] short_lat,
  output logic         zdl
);

  always_comb zdl = ((sel_req & short_lat & ~grant) == '0);

endmodule
