// enhanced_scheduler: integer issue-queue scheduler whose wakeup/select loop
// is pipelined over two cycles, with the non-speculative enhancement that
// lets dependants of one-cycle instructions issue back-to-back.
//
// Structure (one slice of each per issue-queue entry):
//   * wakeup matrix A holds every instruction. Its lines (wake_a) fire when a
//     selected instruction's result becomes usable: one cycle after
//     selection for one-cycle operations, latency-1 cycles after selection
//     for longer ones. A woken row requests, logic M registers the request,
//     and the select logic sees it one cycle later: selection -> wakeup ->
//     selection of a dependant takes two cycles.
//   * wakeup matrix B holds only instructions that wait for at least one
//     one-cycle producer. Its lines come from the filter: a one-cycle
//     producer drives its B line already while it is competing at the select
//     input (signal C), a longer producer at the same time as its A line
//     (signal D). B thus computes, one cycle early, what the current
//     one-cycle candidates will wake.
//   * the zero-detection logic (ZDL) tells logic M when every one-cycle
//     candidate of this cycle has been selected; only then do matrix-B
//     requests pass to the select input, so nothing is issued speculatively.
//   * logic M merges request_A with (request_B AND ZDL) and masks the result
//     with the issued bit, so each instruction is selected once.
//   * the select logic picks the W oldest requests (age matrix), with at most
//     MEM_PORTS memory operations per cycle and one non-pipelined multiplier.
//   * a load is made dependent on every older store-address part (STA) in
//     the queue, so it cannot issue before them.
//   * with FUSION set, a dispatched instruction that waits only for one
//     one-cycle producer of the same basic block (the first such consumer) is
//     fused with it: it is kept out of matrix B and requests as soon as its
//     producer has been granted.
//
// Interface: dispatch offers DW slots per cycle. alloc_idx[k] names the entry
// slot k will take (lowest free entries first) and alloc_ok[k] says whether
// one exists; the dispatcher must only raise disp_valid[k] with alloc_ok[k],
// and expresses dependences as a vector of producer entries (disp_dep[k]),
// naming only producers whose wake_a line has not fired in an earlier cycle.
// Dependences of loads on older STAs are added inside and need not be given.
// The selected entries of each cycle come out on issue_valid/issue_idx.
// wake_a is the per-entry matrix-A wakeup line; the entry is free again from
// the next cycle.
//
// What follows the published scheme: the two matrices, filter, ZDL, logic M
// with issued bits, oldest-first select, the latency classes, the timing of
// wakeup lines, and loads waiting for all older STAs. This design's own
// choices: the entry allocation and release policy, the age matrix, the
// port/multiplier model, the basic-block tag used for fusing and how a fused
// request enters logic M.
module enhanced_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 4,
  parameter int unsigned DW        = 4,
  parameter int unsigned MEM_PORTS = 2,
  parameter int unsigned BBW       = 8,
  parameter bit          FUSION    = 1'b1,
  localparam int unsigned IW       = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // dispatch
  output logic [DW-1:0]          alloc_ok,
  output logic [DW-1:0][IW-1:0]  alloc_idx,
  input  logic [DW-1:0]          disp_valid,
  input  op_e  [DW-1:0]          disp_op,
  input  logic [DW-1:0][N-1:0]   disp_dep,
  input  logic [DW-1:0][BBW-1:0] disp_bb,
  // issue
  output logic [W-1:0]           issue_valid,
  output logic [W-1:0][IW-1:0]   issue_idx,
  // result notification / entry release
  output logic [N-1:0]           wake_a,
  output logic                   zdl
);

  // ---------------------------------------------------------------- state
  logic [N-1:0]                valid_q;
  logic [N-1:0]                short_q, mem_q, mul_q, sta_q;
  logic [N-1:0][BBW-1:0]       bb_q;
  logic [N-1:0][LAT_W-1:0]     dly_q;
  logic [N-1:0][LAT_W-1:0]     cnt_q;
  logic [N-1:0]                fused_q, fready_q, has_fused_q, bfired_q;
  logic [N-1:0][IW-1:0]        fsrc_q;
  logic [LAT_W-1:0]            mul_busy_q;

  // ------------------------------------------------------------ allocation
  logic [N-1:0] alloc;
  logic [DW-1:0] disp_go;

  always_comb begin
    logic [N-1:0] used;
    used      = '0;
    alloc_ok  = '0;
    alloc_idx = '0;
    for (int k = 0; k < DW; k++) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (!valid_q[i] && !used[i]) begin
          alloc_ok[k]  = 1'b1;
          alloc_idx[k] = IW'(i);
        end
      end
      if (alloc_ok[k]) used[alloc_idx[k]] = 1'b1;
    end
  end

  always_comb begin
    disp_go = disp_valid & alloc_ok;
    alloc   = '0;
    for (int k = 0; k < DW; k++)
      if (disp_go[k]) alloc[alloc_idx[k]] = 1'b1;
  end

  // ---------------------------------------------------------- scheduling loop
  logic [N-1:0] sel_req, grant, issued;
  logic [N-1:0] req_a, req_b, req_f, lines_b;
  logic [N-1:0][N-1:0] older;
  logic [DW-1:0] fuse;
  logic [DW-1:0][IW-1:0] fuse_src;

  // Signal D: matrix-A wakeup lines from the result timers.
  always_comb begin
    for (int i = 0; i < N; i++)
      wake_a[i] = (cnt_q[i] == LAT_W'(1));
  end

  // Class of entries, including those allocated this cycle, so that a
  // consumer may name a producer dispatched in the same cycle.
  logic [N-1:0] short_eff;
  always_comb begin
    short_eff = short_q;
    for (int k = 0; k < DW; k++)
      if (disp_go[k]) short_eff[alloc_idx[k]] = is_short(disp_op[k]);
  end

  // Memory ordering: a load waits for every older store-address part still
  // in the queue, including those dispatched in earlier slots of this cycle.
  logic [DW-1:0][N-1:0] dep_eff;
  always_comb begin
    logic [N-1:0] sta_pend;
    sta_pend = valid_q & sta_q;
    for (int k = 0; k < DW; k++) begin
      dep_eff[k] = disp_dep[k];
      if (disp_op[k] == OP_LOAD) dep_eff[k] = dep_eff[k] | sta_pend;
      if (disp_go[k] && disp_op[k] == OP_STA) sta_pend[alloc_idx[k]] = 1'b1;
    end
  end

  // Rows written into the two matrices.
  logic [N-1:0]        wr_a, wr_b;
  logic [N-1:0][N-1:0] wr_dep_a, wr_dep_b;
  always_comb begin
    wr_a     = alloc;
    wr_b     = '0;
    wr_dep_a = '0;
    wr_dep_b = '0;
    for (int k = 0; k < DW; k++) begin
      if (disp_go[k]) begin
        wr_dep_a[alloc_idx[k]] = dep_eff[k];
        wr_dep_b[alloc_idx[k]] = dep_eff[k] & ~(bfired_q & ~alloc);
        wr_b[alloc_idx[k]]     = !fuse[k] && ((dep_eff[k] & short_eff) != '0);
      end
    end
  end

  wakeup_matrix #(.N(N)) u_matrix_a (
    .clk, .rst_n,
    .wr_en (wr_a), .wr_dep(wr_dep_a),
    .lines (wake_a), .clr(wake_a),
    .req   (req_a)
  );

  wakeup_matrix #(.N(N)) u_matrix_b (
    .clk, .rst_n,
    .wr_en (wr_b), .wr_dep(wr_dep_b),
    .lines (lines_b), .clr(wake_a),
    .req   (req_b)
  );

  req_filter #(.N(N)) u_filter (
    .c(sel_req), .d(wake_a), .short_lat(short_q), .lines_b(lines_b)
  );

  zero_detect #(.N(N)) u_zdl (
    .sel_req(sel_req), .grant(grant), .short_lat(short_q), .zdl(zdl)
  );

  // Fused consumers request once their producer has been granted.
  always_comb begin
    for (int i = 0; i < N; i++)
      req_f[i] = valid_q[i] && fused_q[i] && (fready_q[i] || grant[fsrc_q[i]]);
  end

  logic_m #(.N(N)) u_logic_m (
    .clk, .rst_n,
    .req_a  (req_a | req_f),
    .req_b  (req_b),
    .zdl    (zdl),
    .grant  (grant),
    .alloc  (alloc),
    .sel_req(sel_req),
    .issued (issued)
  );

  age_matrix #(.N(N)) u_age (
    .clk, .rst_n, .valid(valid_q), .alloc(alloc), .older(older)
  );

  select_logic #(.N(N), .W(W), .MEM_PORTS(MEM_PORTS)) u_select (
    .req       (sel_req),
    .older     (older),
    .is_mem    (mem_q),
    .is_mul    (mul_q),
    .mul_free  (mul_busy_q == '0),
    .grant     (grant),
    .slot_valid(issue_valid),
    .slot_idx  (issue_idx)
  );

  fusion_detect #(.N(N), .DW(DW), .BBW(BBW)) u_fusion (
    .enable      (FUSION),
    .disp_valid  (disp_go),
    .disp_dep    (dep_eff),
    .disp_bb     (disp_bb),
    .iq_valid    (valid_q),
    .iq_short    (short_q),
    .iq_busy     (issued | grant),
    .iq_has_fused(has_fused_q),
    .iq_bb       (bb_q),
    .fuse        (fuse),
    .fuse_src    (fuse_src)
  );

  // ------------------------------------------------------------ entry state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q     <= '0;
      short_q     <= '0;
      mem_q       <= '0;
      mul_q       <= '0;
      sta_q       <= '0;
      bb_q        <= '0;
      dly_q       <= '0;
      cnt_q       <= '0;
      fused_q     <= '0;
      fready_q    <= '0;
      has_fused_q <= '0;
      bfired_q    <= '0;
      fsrc_q      <= '0;
      mul_busy_q  <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (wake_a[i]) valid_q[i] <= 1'b0;
        if (grant[i])
          cnt_q[i] <= dly_q[i];
        else if (cnt_q[i] != '0)
          cnt_q[i] <= cnt_q[i] - LAT_W'(1);
        if (lines_b[i]) bfired_q[i] <= 1'b1;
        if (fused_q[i] && grant[fsrc_q[i]]) fready_q[i] <= 1'b1;
      end
      for (int k = 0; k < DW; k++) begin
        if (fuse[k]) has_fused_q[fuse_src[k]] <= 1'b1;
      end
      for (int k = 0; k < DW; k++) begin
        if (disp_go[k]) begin
          valid_q[alloc_idx[k]]     <= 1'b1;
          short_q[alloc_idx[k]]     <= is_short(disp_op[k]);
          mem_q[alloc_idx[k]]       <= uses_mem(disp_op[k]);
          mul_q[alloc_idx[k]]       <= (disp_op[k] == OP_MUL);
          sta_q[alloc_idx[k]]       <= (disp_op[k] == OP_STA);
          bb_q[alloc_idx[k]]        <= disp_bb[k];
          dly_q[alloc_idx[k]]       <= wake_delay(disp_op[k]);
          cnt_q[alloc_idx[k]]       <= '0;
          fused_q[alloc_idx[k]]     <= fuse[k];
          fsrc_q[alloc_idx[k]]      <= fuse_src[k];
          fready_q[alloc_idx[k]]    <= 1'b0;
          has_fused_q[alloc_idx[k]] <= 1'b0;
          bfired_q[alloc_idx[k]]    <= 1'b0;
        end
      end
      if ((grant & mul_q) != '0)
        mul_busy_q <= LAT_W'(LAT_MUL - 1);
      else if (mul_busy_q != '0)
        mul_busy_q <= mul_busy_q - LAT_W'(1);
    end
  end

  // --------------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n) (disp_valid & ~alloc_ok) == '0)
    else $error("enhanced_scheduler: dispatch without a free entry");
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~valid_q) == '0)
    else $error("enhanced_scheduler: grant of an empty entry");

endmodule
