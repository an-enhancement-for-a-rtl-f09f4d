// logic_m: merges the two request signals of every entry into the single
// request the select logic observes.
//
// Per entry: request_A OR (request_B AND zdl) is registered; the registered
// value, masked by the entry's issued bit, is the request at the select
// input in the next cycle. The issued bit is set when the select logic grants
// the entry, so a second copy of the request (matrix A waking an instruction
// that was already selected through matrix B) is dropped. Both flip-flops
// of an entry are cleared when the entry is allocated (this design's choice;
// it keeps a stale request of the previous occupant away from the new one).
// Timing: requests presented in cycle t compete in cycle t+1; issued takes
// effect the cycle after the grant.
module logic_m #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_a,
  input  logic [N-1:0] req_b,
  input  logic         zdl,
  input  logic [N-1:0] grant,
  input  logic [N-1:0] alloc,
  output logic [N-1:0] sel_req,
  output logic [N-1:0] issued
);

  logic [N-1:0] req_q;
  logic [N-1:0] issued_q;

  assign sel_req = req_q & ~issued_q;
  assign issued  = issued_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_q    <= '0;
      issued_q <= '0;
    end else begin
      req_q    <= (req_a | (req_b & {N{zdl}})) & ~alloc;
      issued_q <= (issued_q | grant) & ~alloc;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~sel_req) == '0)
    else $error("logic_m: grant without request");

endmodule
