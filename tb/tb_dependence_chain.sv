// tb_dependence_chain: the central property of the enhancement. A chain of
// dependent one-cycle (ALU) instructions, each reading the previous result,
// must issue one instruction per cycle although the scheduling loop takes two
// cycles: consumer k is woken in matrix B while producer k-1 is still
// competing, and the ZDL lets it compete in the very next cycle. A plain
// two-cycle loop would issue one chain element every other cycle. The chain
// is run on a scheduler without fusing and on one with fusing, then a chain
// through a load checks that a 3-cycle producer spaces its consumer by exactly
// 3 cycles and a multiply chain by 10.
module tb_dependence_chain;
  import sched_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned DW = 4;
  localparam int          LEN = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

  logic [DW-1:0]          disp_valid;
  op_e  [DW-1:0]          disp_op;
  logic [DW-1:0][N-1:0]   disp_dep;
  logic [DW-1:0][7:0]     disp_bb;
  logic [1:0][DW-1:0]          alloc_ok;
  logic [1:0][DW-1:0][IW-1:0]  alloc_idx;
  logic [1:0][3:0]             issue_valid;
  logic [1:0][3:0][IW-1:0]     issue_idx;
  logic [1:0][N-1:0]           wake_a;
  logic [1:0]                  zdl;

  enhanced_scheduler #(.FUSION(1'b0)) dut_e (
    .clk, .rst_n, .alloc_ok(alloc_ok[0]), .alloc_idx(alloc_idx[0]),
    .disp_valid, .disp_op, .disp_dep, .disp_bb,
    .issue_valid(issue_valid[0]), .issue_idx(issue_idx[0]), .wake_a(wake_a[0]), .zdl(zdl[0]));

  enhanced_scheduler #(.FUSION(1'b1)) dut_ef (
    .clk, .rst_n, .alloc_ok(alloc_ok[1]), .alloc_idx(alloc_idx[1]),
    .disp_valid, .disp_op, .disp_dep, .disp_bb,
    .issue_valid(issue_valid[1]), .issue_idx(issue_idx[1]), .wake_a(wake_a[1]), .zdl(zdl[1]));

  int ent [LEN];
  int sel [2][LEN];
  bit woke [LEN];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Dispatches a chain of LEN instructions of the given operation classes,
  // DW per cycle, each depending on the one before, and records when each is
  // selected in both schedulers.
  task automatic run_chain(input op_e first_op, input op_e rest_op);
    int next;
    next = 0;
    foreach (sel[d, i]) sel[d][i] = -1;
    foreach (woke[i]) woke[i] = 1'b0;
    for (int c = 0; c < 60; c++) begin
      cycle = c;
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < 4; k++)
          if (issue_valid[d][k])
            for (int i = 0; i < next; i++)
              if (int'(issue_idx[d][k]) == ent[i] && sel[d][i] < 0) sel[d][i] = c;
      for (int i = 0; i < next; i++)
        if (wake_a[0][ent[i]] && sel[0][i] >= 0) woke[i] = 1'b1;
      disp_valid = '0;
      disp_dep   = '0;
      check(alloc_idx[0] == alloc_idx[1], "both schedulers allocate the same entries");
      for (int k = 0; k < int'(DW); k++) begin
        if (next < LEN && alloc_ok[0][k]) begin
          disp_valid[k] = 1'b1;
          disp_op[k]    = (next == 0) ? first_op : rest_op;
          disp_bb[k]    = 8'd1;
          // parent still in the queue unless its wakeup line has fired
          if (next > 0 && !woke[next - 1]) disp_dep[k][ent[next - 1]] = 1'b1;
          ent[next] = int'(alloc_idx[0][k]);
          next++;
        end
      end
      @(negedge clk);
    end
    disp_valid = '0;
  endtask

  initial begin
    disp_valid = '0;
    disp_op    = '{default: OP_ALU};
    disp_dep   = '0;
    disp_bb    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // chain of one-cycle instructions: one per cycle in both modes
    run_chain(OP_ALU, OP_ALU);
    for (int d = 0; d < 2; d++)
      for (int i = 1; i < LEN; i++)
        check(sel[d][i] == sel[d][i - 1] + 1,
              $sformatf("%s ALU chain element %0d selected in %0d, previous in %0d",
                        (d != 0) ? "E-F" : "E", i, sel[d][i], sel[d][i - 1]));

    // load chain: each load waits 3 cycles for the previous one
    run_chain(OP_LOAD, OP_LOAD);
    for (int d = 0; d < 2; d++)
      for (int i = 1; i < 8; i++)
        check(sel[d][i] == sel[d][i - 1] + int'(LAT_LOAD),
              $sformatf("load chain element %0d selected in %0d, previous in %0d", i, sel[d][i], sel[d][i - 1]));

    // multiply chain: 10 cycles apart
    run_chain(OP_MUL, OP_MUL);
    for (int d = 0; d < 2; d++)
      for (int i = 1; i < 4; i++)
        check(sel[d][i] == sel[d][i - 1] + int'(LAT_MUL),
              $sformatf("multiply chain element %0d selected in %0d, previous in %0d", i, sel[d][i], sel[d][i - 1]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
