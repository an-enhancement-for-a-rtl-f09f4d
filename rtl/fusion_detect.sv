// fusion_detect: dispatch-time detection of instruction fusing (E-F mode).
//
// A dispatched instruction is fused with a producer when: it waits for
// exactly one operand and that operand's producer is a one-cycle instruction
// that is in the issue queue and not yet selected, both belong to the same
// dynamic basic block (equal tags), and the producer has no fused consumer
// yet (only the first consumer in program order is fused). Dispatch slots
// are in program order, so an earlier slot claims a producer before a later
// one. A producer dispatched in the same cycle is not a candidate. A fused
// consumer may compete for selection as soon as its producer is selected.
// Purely combinational.
module fusion_detect #(
  parameter int unsigned N   = 32,
  parameter int unsigned DW  = 4,
  parameter int unsigned BBW = 8,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic                  enable,
  input  logic [DW-1:0]         disp_valid,
  input  logic [DW-1:0][N-1:0]  disp_dep,
  input  logic [DW-1:0][BBW-1:0] disp_bb,
  input  logic [N-1:0]          iq_valid,
  input  logic [N-1:0]          iq_short,
  input  logic [N-1:0]          iq_busy,
  input  logic [N-1:0]          iq_has_fused,
  input  logic [N-1:0][BBW-1:0] iq_bb,
  output logic [DW-1:0]         fuse,
  output logic [DW-1:0][IW-1:0] fuse_src
);

  always_comb begin
    logic [N-1:0]  taken;
    logic [N-1:0]  dep;
    logic [IW-1:0] src;
    taken    = iq_has_fused;
    fuse     = '0;
    fuse_src = '0;
    for (int k = 0; k < DW; k++) begin
      dep = disp_dep[k];
      src = '0;
      for (int j = 0; j < N; j++)
        if (dep[j]) src = IW'(j);
      fuse_src[k] = src;
      if (enable && disp_valid[k] && (dep != '0) && ((dep & (dep - 1)) == 0) && iq_valid[src] && iq_short[src]
          && !iq_busy[src] && !taken[src] && (iq_bb[src] == disp_bb[k])) begin
        fuse[k]    = 1'b1;
        taken[src] = 1'b1;
      end
    end
  end

endmodule
