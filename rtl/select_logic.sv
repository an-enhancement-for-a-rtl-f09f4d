// select_logic: oldest-first select for W issue slots.
//
// Up to W requesting entries are picked per cycle. Slot k takes the oldest
// request not picked by slots 0..k-1 that can still find its resource: at
// most MEM_PORTS memory operations (loads and store-address parts) per
// cycle, and a multiply only when the single, non-pipelined multiplier is
// free and no earlier slot took it. Age comes from an age matrix
// (older[i][j]: entry j is older than entry i), which orders all occupied
// entries totally, so each slot picks at most one entry.
// Purely combinational: grant is valid in the same cycle as req.
module select_logic #(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 4,
  parameter int unsigned MEM_PORTS = 2,
  localparam int unsigned IW       = $clog2(N)
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0][N-1:0]  older,
  input  logic [N-1:0]         is_mem,
  input  logic [N-1:0]         is_mul,
  input  logic                 mul_free,
  output logic [N-1:0]         grant,
  output logic [W-1:0]         slot_valid,
  output logic [W-1:0][IW-1:0] slot_idx
);

  always_comb begin
    logic [N-1:0] cand;
    logic [N-1:0] pick;
    int unsigned  mem_used;
    logic         mul_used;

    grant      = '0;
    slot_valid = '0;
    slot_idx   = '0;
    mem_used   = 0;
    mul_used   = !mul_free;
    for (int k = 0; k < W; k++) begin
      cand = req & ~grant;
      if (mem_used >= MEM_PORTS) cand = cand & ~is_mem;
      if (mul_used)              cand = cand & ~is_mul;
      pick = '0;
      for (int i = 0; i < N; i++)
        pick[i] = cand[i] && ((cand & older[i]) == '0);
      for (int i = 0; i < N; i++) begin
        if (pick[i]) begin
          slot_valid[k] = 1'b1;
          slot_idx[k]   = IW'(i);
        end
      end
      grant = grant | pick;
      if ((pick & is_mem) != '0) mem_used = mem_used + 1;
      if ((pick & is_mul) != '0) mul_used = 1'b1;
    end
  end

endmodule
