// wakeup_matrix: instruction-by-instruction wakeup matrix (wired-OR style).
//
// Each issue-queue entry owns one row and one column. A row holds one
// dependence bit per column: bit j set means "this instruction waits for the
// instruction in entry j". When a producer is to wake its consumers its
// column line is driven for one cycle; every row clears the matching bit.
// A valid row whose remaining bits are all clear (taking this cycle's lines
// into account) raises its request. Clearing the bits makes a pulsed line
// equivalent to a line that stays set, and lets the column be reused as soon
// as its line has fired once.
//
// The scheduler instantiates this module twice: matrix A (every instruction,
// lines from selected instructions) and matrix B (instructions that wait for
// a one-cycle producer, lines from the filter).
//
// Timing: a row written in cycle t (wr_en) can request from cycle t+1; lines
// present in the write cycle are already applied to the written bits. req is
// combinational from the stored state and this cycle's lines.
module wakeup_matrix #(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        wr_en,
  input  logic [N-1:0][N-1:0] wr_dep,
  input  logic [N-1:0]        lines,
  input  logic [N-1:0]        clr,
  output logic [N-1:0]        req
);

  logic [N-1:0]        valid_q;
  logic [N-1:0][N-1:0] dep_q;

  always_comb begin
    for (int i = 0; i < N; i++)
      req[i] = valid_q[i] && ((dep_q[i] & ~lines) == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      dep_q   <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (wr_en[i]) begin
          valid_q[i] <= 1'b1;
          dep_q[i]   <= wr_dep[i] & ~lines;
        end else begin
          if (clr[i]) valid_q[i] <= 1'b0;
          dep_q[i] <= dep_q[i] & ~lines;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (wr_en & valid_q & ~clr) == '0)
    else $error("wakeup_matrix: row written while still occupied");

endmodule
