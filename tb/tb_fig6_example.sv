// tb_fig6_example: replays the six-instruction example of the enhanced
// scheduler with a single issue slot and checks, cycle by cycle, when each
// instruction is selected:
//   1. load r1 <- []        selected in cycle 2
//   2. load r2 <- []        selected in cycle 3
//   3. add  r3 <- r1        selected in cycle 5
//   4. load r4 <- [r3]      selected in cycle 6 (woken in matrix B in cycle 5,
//                           back-to-back with instruction 3)
//   5. add  r5 <- r1, r2    selected in cycle 7
//   6. add  r6 <- r4, r5    selected in cycle 9 (woken in both matrices, 8)
// Instructions 1-3 are dispatched in cycle 0 and 4-6 in cycle 1 (a fused
// producer must already be in the queue). Two schedulers run side by side: one
// without fusing (base enhancement) and one with it; instruction 4, which
// waits only for the one-cycle instruction 3 of the same basic block, is
// then fused and kept out of matrix B, with the same schedule. It also checks
// that matrix B wakes instruction 4 in cycle 5, that the ZDL is active in
// cycle 5 and that the late matrix-A request of instruction 4 is dropped by
// its issued bit (instruction 4 is selected once).
module tb_fig6_example;
  import sched_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned NI = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = -100;

  localparam int unsigned DW = 4;
  logic [DW-1:0]          disp_valid;
  op_e  [DW-1:0]          disp_op;
  logic [DW-1:0][N-1:0]   disp_dep;
  logic [DW-1:0][7:0]     disp_bb;
  logic [1:0][DW-1:0]          alloc_ok;
  logic [1:0][DW-1:0][IW-1:0]  alloc_idx;
  logic [1:0][0:0]             issue_valid;
  logic [1:0][0:0][IW-1:0]     issue_idx;
  logic [1:0][N-1:0]           wake_a;
  logic [1:0]                  zdl;

  enhanced_scheduler #(.N(N), .W(1), .DW(DW), .FUSION(1'b0)) dut_e (
    .clk, .rst_n, .alloc_ok(alloc_ok[0]), .alloc_idx(alloc_idx[0]),
    .disp_valid, .disp_op, .disp_dep, .disp_bb,
    .issue_valid(issue_valid[0]), .issue_idx(issue_idx[0]), .wake_a(wake_a[0]), .zdl(zdl[0]));

  enhanced_scheduler #(.N(N), .W(1), .DW(DW), .FUSION(1'b1)) dut_ef (
    .clk, .rst_n, .alloc_ok(alloc_ok[1]), .alloc_idx(alloc_idx[1]),
    .disp_valid, .disp_op, .disp_dep, .disp_bb,
    .issue_valid(issue_valid[1]), .issue_idx(issue_idx[1]), .wake_a(wake_a[1]), .zdl(zdl[1]));

  // expected selection cycle of instructions 1..6
  int exp_sel [NI] = '{2, 3, 5, 6, 7, 9};
  int sel_cycle [2][NI];
  int sel_count [2][NI];
  int ent [NI];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  // watchdog
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    disp_valid = '0;
    disp_op    = '{default: OP_ALU};
    disp_dep   = '0;
    disp_bb    = '0;
    foreach (sel_cycle[d, i]) begin
      sel_cycle[d][i] = -1;
      sel_count[d][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // cycle 0: dispatch instructions 1-3 (both schedulers allocate alike)
    cycle = 0;
    for (int i = 0; i < 3; i++) ent[i] = int'(alloc_idx[0][i]);
    check(alloc_idx[0] == alloc_idx[1], "both schedulers allocate the same entries");
    disp_valid = 4'b0111;
    disp_op[0] = OP_LOAD;
    disp_op[1] = OP_LOAD;
    disp_op[2] = OP_ALU;  disp_dep[2][ent[0]] = 1'b1;
    @(negedge clk);
    // cycle 1: dispatch instructions 4-6
    for (int i = 0; i < 3; i++) ent[3 + i] = int'(alloc_idx[0][i]);
    check(alloc_idx[0] == alloc_idx[1], "both schedulers allocate the same entries");
    disp_dep   = '0;
    disp_op[0] = OP_LOAD; disp_dep[0][ent[2]] = 1'b1;
    disp_op[1] = OP_ALU;  disp_dep[1][ent[0]] = 1'b1; disp_dep[1][ent[1]] = 1'b1;
    disp_op[2] = OP_ALU;  disp_dep[2][ent[3]] = 1'b1; disp_dep[2][ent[4]] = 1'b1;
    @(negedge clk);
    disp_valid = '0;
    disp_dep   = '0;
    // placement in the matrices: instructions 4 and 6 wait for one-cycle
    // producers and go to matrix B in the base enhancement; with fusing,
    // instruction 4 is fused with 3 and only 6 goes to B.
    check(dut_e.u_matrix_b.valid_q[ent[3]] && dut_e.u_matrix_b.valid_q[ent[5]], "E: rows 4 and 6 in matrix B");
    check(!dut_e.u_matrix_b.valid_q[ent[0]] && !dut_e.u_matrix_b.valid_q[ent[1]]
          && !dut_e.u_matrix_b.valid_q[ent[2]] && !dut_e.u_matrix_b.valid_q[ent[4]], "E: rows 1,2,3,5 not in matrix B");
    check(!dut_ef.u_matrix_b.valid_q[ent[3]] && dut_ef.u_matrix_b.valid_q[ent[5]], "E-F: row 4 fused, row 6 in matrix B");
    check(dut_ef.fused_q[ent[3]] && !dut_e.fused_q[ent[3]], "E-F: instruction 4 fused");
    for (cycle = 2; cycle <= 12; cycle++) begin
      for (int d = 0; d < 2; d++) begin
        if (issue_valid[d][0]) begin
          for (int i = 0; i < NI; i++) begin
            if (int'(issue_idx[d][0]) == ent[i]) begin
              sel_cycle[d][i] = cycle;
              sel_count[d][i]++;
            end
          end
        end
      end
      if (cycle == 5) begin
        check(dut_e.u_matrix_b.req[ent[3]] && !dut_e.u_matrix_a.req[ent[3]],
              "E: instruction 4 wakes in matrix B, not A, in cycle 5");
        check(zdl[0] == 1'b1, "E: ZDL active at the end of cycle 5");
      end
      if (cycle == 4)
        check(!dut_e.u_matrix_b.req[ent[3]], "E: instruction 4 not woken in matrix B in cycle 4");
      if (cycle == 6)
        check(dut_e.u_matrix_a.req[ent[3]], "E: instruction 4 wakes in matrix A in cycle 6");
      if (cycle == 8)
        check(dut_e.u_matrix_a.req[ent[5]] && dut_e.u_matrix_b.req[ent[5]],
              "E: instruction 6 wakes in both matrices in cycle 8");
      if (cycle == 7)
        check(!dut_e.u_matrix_a.req[ent[5]], "E: instruction 6 not woken in cycle 7");
      @(negedge clk);
    end
    for (int d = 0; d < 2; d++) begin
      for (int i = 0; i < NI; i++) begin
        check(sel_cycle[d][i] == exp_sel[i],
              $sformatf("%s instruction %0d selected in cycle %0d, expected %0d",
                        (d != 0) ? "E-F" : "E", i + 1, sel_cycle[d][i], exp_sel[i]));
        check(sel_count[d][i] == 1, $sformatf("instruction %0d selected once", i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
