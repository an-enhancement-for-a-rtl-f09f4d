// age_matrix: relative age of issue-queue entries, the priority information
// used by the oldest-first select logic.
//
// older[i][j] = 1 means entry j holds an instruction older than entry i.
// When entry i is allocated its row is loaded with the set of occupied
// entries (all older), plus lower-numbered entries allocated in the same
// cycle (dispatch fills free entries in program order, lowest index first).
// At the same time column i is cleared in every other row, since the new
// instruction is younger than all of them. Rows of free entries are ignored
// by the users (their requests are zero). This structure is this design's
// own choice; the document only says the select logic gets priority
// information. Timing: older reflects allocations from the previous cycles.
module age_matrix #(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        valid,
  input  logic [N-1:0]        alloc,
  output logic [N-1:0][N-1:0] older
);

  logic [N-1:0][N-1:0] older_q;
  assign older = older_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      older_q <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (alloc[i]) begin
          for (int j = 0; j < N; j++)
            older_q[i][j] <= (valid[j] && !alloc[j]) || (alloc[j] && (j < i));
        end else begin
          older_q[i] <= older_q[i] & ~alloc;
        end
      end
    end
  end

endmodule
