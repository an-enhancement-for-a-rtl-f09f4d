// tb_enhanced_scheduler: end-to-end random test of the enhanced scheduler at
// its default size (32 entries, 4 issue slots, 4 dispatch slots, 2 memory
// ports, fusing on).
//
// The testbench plays the renamer/dispatcher: it generates a program of
// NUM_INSTR instructions (ALU, load, STA/STD pairs, multiply) whose sources
// are recent earlier instructions, grouped in basic blocks, dispatches them in
// order into the entries offered by alloc_idx, and names as parents only
// producers whose wakeup line has not fired yet. From issue_valid/issue_idx
// and wake_a it checks, against its own model of the latencies:
//   * no instruction is selected before every parent's result is usable
//     (selection cycle >= parent selection + parent latency): the scheduler
//     must never be speculative;
//   * every instruction is selected exactly once and released afterwards;
//   * a load is never selected before every older store-address part (STA)
//     has been selected (the scheduler adds those dependences itself);
//   * at most 2 memory operations per cycle, multiplies at least 10 apart;
//   * the wakeup line of an instruction fires max(1, L-1) cycles after its
//     selection;
//   * a stronger timing bound: once the last parent's result is usable, an
//     instruction is selected within a bounded number of cycles.
// It counts the mechanisms of the design and fails if one never happened:
// back-to-back issue of a one-cycle producer and its consumer through matrix
// B, back-to-back issue of a fused pair, a matrix-B request held back by the
// ZDL, a request dropped by the issued bit, the memory-port limit, the busy
// multiplier, a full queue stalling dispatch, and a load dispatched while an
// older STA was still pending.
module tb_enhanced_scheduler;
  import sched_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned W  = 4;
  localparam int unsigned DW = 4;
  localparam int unsigned IW = $clog2(N);
  localparam int NUM_INSTR   = 3000;
  localparam int MAX_WAIT    = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic [DW-1:0]          alloc_ok;
  logic [DW-1:0][IW-1:0]  alloc_idx;
  logic [DW-1:0]          disp_valid;
  op_e  [DW-1:0]          disp_op;
  logic [DW-1:0][N-1:0]   disp_dep;
  logic [DW-1:0][7:0]     disp_bb;
  logic [W-1:0]           issue_valid;
  logic [W-1:0][IW-1:0]   issue_idx;
  logic [N-1:0]           wake_a;
  logic                   zdl;

  enhanced_scheduler dut (
    .clk, .rst_n, .alloc_ok, .alloc_idx, .disp_valid, .disp_op, .disp_dep, .disp_bb,
    .issue_valid, .issue_idx, .wake_a, .zdl);

  // program
  op_e op      [NUM_INSTR];
  int  src     [NUM_INSTR][2];   // -1: none
  int  bb      [NUM_INSTR];
  // run-time record
  int  entry   [NUM_INSTR];
  int  sel_at  [NUM_INSTR];
  int  wake_at [NUM_INSTR];
  int  disp_at [NUM_INSTR];
  int  owner   [N];              // instruction in each entry, -1 when free
  int  slot_ent [DW];
  int  next_disp = 0;
  int  n_selected = 0;
  int  last_mul = -1000;

  // mechanism counters
  int n_b2b_b = 0, n_b2b_fused = 0, n_zdl_hold = 0, n_issued_drop = 0;
  int n_mem_limit = 0, n_mul_busy = 0, n_disp_stall = 0, n_in_b = 0, n_fused = 0, n_load_sta = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  function automatic int lat(op_e o);
    return int'(op_latency(o));
  endfunction

  // an older STA has been dispatched but its wakeup line has not fired yet
  function automatic bit sta_in_flight(int i);
    for (int s = i - 1; s >= 0 && s >= i - 200; s--)
      if (op[s] == OP_STA && wake_at[s] < 0) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int usable_at(int p);
    return sel_at[p] + lat(op[p]);
  endfunction

  // watchdog
  initial begin
    repeat (NUM_INSTR * 20) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d selected", n_selected, NUM_INSTR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program generation
  initial begin
    automatic int cur_bb = 0;
    for (int i = 0; i < NUM_INSTR; i++) begin
      int r;
      r = int'($urandom_range(99));
      if (i > 0 && op[i-1] == OP_STA) op[i] = OP_STD;
      else if (r < 55) op[i] = OP_ALU;
      else if (r < 80) op[i] = OP_LOAD;
      else if (r < 92) op[i] = OP_STA;
      else op[i] = OP_MUL;
      for (int s = 0; s < 2; s++) begin
        int d;
        d = int'($urandom_range(9)) + 1;
        src[i][s] = (i - d >= 0 && $urandom_range(99) < (s == 0 ? 80 : 35)) ? i - d : -1;
      end
      if (src[i][1] == src[i][0]) src[i][1] = -1;
      if ($urandom_range(5) == 0) cur_bb++;
      bb[i] = cur_bb;
      sel_at[i] = -1;
      wake_at[i] = -1;
      disp_at[i] = -1;
      entry[i] = -1;
    end
  end

  initial begin
    disp_valid = '0;
    disp_op    = '{default: OP_ALU};
    disp_dep   = '0;
    disp_bb    = '0;
    for (int e = 0; e < N; e++) owner[e] = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    while (n_selected < NUM_INSTR || next_disp < NUM_INSTR) begin
      int mem_cnt;
      cycle++;
      // ---- observe this cycle's selections
      mem_cnt = 0;
      for (int k = 0; k < W; k++) begin
        if (issue_valid[k]) begin
          int e, i;
          e = int'(issue_idx[k]);
          i = owner[e];
          check(i >= 0, "selected entry holds an instruction");
          if (i >= 0) begin
            check(sel_at[i] < 0, $sformatf("instruction %0d selected once", i));
            sel_at[i] = cycle;
            n_selected++;
            if (uses_mem(op[i])) mem_cnt++;
            if (op[i] == OP_MUL) begin
              check(cycle - last_mul >= int'(LAT_MUL), "multiplier not pipelined");
              last_mul = cycle;
            end
            if (op[i] == OP_LOAD) begin
              for (int s = 0; s < i; s++) begin
                if (op[s] == OP_STA) begin
                  check(sel_at[s] >= 0 && cycle >= sel_at[s] + 1,
                        $sformatf("load %0d selected in %0d before older STA %0d", i, cycle, s));
                end
              end
            end
            for (int s = 0; s < 2; s++) begin
              int p;
              p = src[i][s];
              if (p >= 0) begin
                check(sel_at[p] >= 0 && cycle >= usable_at(p),
                      $sformatf("instruction %0d selected in %0d before parent %0d is usable", i, cycle, p));
                if (sel_at[p] >= 0 && cycle == sel_at[p] + 1 && lat(op[p]) == 1) begin
                  if (dut.fused_q[e]) n_b2b_fused++;
                  else n_b2b_b++;
                end
              end
            end
          end
        end
      end
      check(mem_cnt <= 2, "memory ports");
      // ---- mechanisms visible inside
      if (((dut.u_logic_m.req_b & ~dut.u_logic_m.req_a) != '0) && !zdl) n_zdl_hold++;
      if ((dut.u_logic_m.req_q & dut.u_logic_m.issued_q) != '0) n_issued_drop++;
      if (mem_cnt == 2 && ((dut.sel_req & ~dut.grant & dut.mem_q) != '0)) n_mem_limit++;
      if (dut.mul_busy_q != '0 && ((dut.sel_req & dut.mul_q) != '0)) n_mul_busy++;
      // ---- wakeup lines / release
      for (int e = 0; e < N; e++) begin
        if (wake_a[e]) begin
          int i;
          i = owner[e];
          check(i >= 0 && sel_at[i] >= 0, "wakeup line of a selected instruction");
          if (i >= 0 && sel_at[i] >= 0) begin
            check(cycle - sel_at[i] == int'(wake_delay(op[i])),
                  $sformatf("wakeup line of %0d after %0d cycles", i, cycle - sel_at[i]));
            wake_at[i] = cycle;
            owner[e] = -1;
          end
        end
      end
      // ---- liveness: every instruction in the queue whose parents are usable
      // is selected within MAX_WAIT cycles
      for (int e = 0; e < N; e++) begin
        int i;
        i = owner[e];
        if (i >= 0 && sel_at[i] < 0) begin
          int ready;
          ready = disp_at[i] + 1;
          for (int s = 0; s < 2; s++)
            if (src[i][s] >= 0)
              ready = (sel_at[src[i][s]] < 0) ? cycle : ((usable_at(src[i][s]) > ready) ? usable_at(src[i][s]) : ready);
          if (cycle - ready > MAX_WAIT) begin
            check(1'b0, $sformatf("instruction %0d starves", i));
            disp_at[i] = cycle;
          end
        end
      end
      // ---- dispatch (in program order)
      disp_valid = '0;
      disp_dep   = '0;
      if (next_disp < NUM_INSTR && !alloc_ok[0]) n_disp_stall++;
      for (int k = 0; k < DW; k++) begin
        if (next_disp < NUM_INSTR && alloc_ok[k] && $urandom_range(7) != 0) begin
          int i;
          i = next_disp;
          disp_valid[k] = 1'b1;
          disp_op[k]    = op[i];
          disp_bb[k]    = 8'(bb[i]);
          for (int s = 0; s < 2; s++) begin
            int p;
            p = src[i][s];
            if (p >= 0 && wake_at[p] < 0) disp_dep[k][entry[p]] = 1'b1;
          end
          if (op[i] == OP_LOAD && sta_in_flight(i)) n_load_sta++;
          entry[i]   = int'(alloc_idx[k]);
          slot_ent[k] = entry[i];
          owner[entry[i]] = i;
          disp_at[i] = cycle;
          next_disp++;
        end else begin
          break;
        end
      end
      @(negedge clk);
      for (int k = 0; k < DW; k++) begin
        if (disp_valid[k]) begin
          if (dut.u_matrix_b.valid_q[slot_ent[k]]) n_in_b++;
          if (dut.fused_q[slot_ent[k]]) n_fused++;
        end
      end
      disp_valid = '0;
      if (cycle > NUM_INSTR * 20) break;
    end
    // everything issued and released
    for (int i = 0; i < NUM_INSTR; i++)
      check(sel_at[i] >= 0, $sformatf("instruction %0d selected", i));
    repeat (LAT_MUL + 2) begin
      cycle++;
      for (int e = 0; e < N; e++) if (wake_a[e]) owner[e] = -1;
      @(negedge clk);
    end
    for (int e = 0; e < N; e++) begin
      check(owner[e] < 0, $sformatf("queue empties: entry %0d holds %0d", e, owner[e]));
      if (owner[e] >= 0) $display("  op %s sel %0d disp %0d", op[owner[e]].name(), sel_at[owner[e]], disp_at[owner[e]]);
    end
    $display("cycles=%0d IPC=%0.2f b2b_via_B=%0d b2b_fused=%0d zdl_hold=%0d issued_drop=%0d mem_limit=%0d mul_busy=%0d disp_stall=%0d in_B=%0d fused=%0d load_behind_sta=%0d",
             cycle, real'(NUM_INSTR) / real'(cycle), n_b2b_b, n_b2b_fused, n_zdl_hold, n_issued_drop,
             n_mem_limit, n_mul_busy, n_disp_stall, n_in_b, n_fused, n_load_sta);
    check(n_b2b_b > 0, "back-to-back through matrix B happened");
    check(n_b2b_fused > 0, "back-to-back of a fused pair happened");
    check(n_zdl_hold > 0, "ZDL held a matrix-B request");
    check(n_issued_drop > 0, "issued bit dropped a request");
    check(n_mem_limit > 0, "memory-port limit reached");
    check(n_mul_busy > 0, "busy multiplier delayed a multiply");
    check(n_disp_stall > 0, "full queue stalled dispatch");
    check(n_load_sta > 0, "load dispatched behind a pending STA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
