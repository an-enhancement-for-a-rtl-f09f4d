// tb_fusion_detect: checks the dispatch-time fusing decision against a
// reference written from the rules: a slot fuses when fusing is enabled, the
// slot is valid, it waits for exactly one producer, that producer is an
// occupied, one-cycle, not yet selected entry of the same basic block with no
// fused consumer yet, and no earlier slot of the same cycle has claimed it.
// Dependence vectors are drawn so that single-producer slots, shared
// producers and all the disqualifying cases occur.
module tb_fusion_detect;
  localparam int unsigned N = 32, DW = 4, BBW = 8, IW = $clog2(N);
  int checks = 0, failures = 0, n_fuse = 0, n_claimed = 0;
  logic enable;
  logic [DW-1:0] disp_valid, fuse, expv;
  logic [DW-1:0][N-1:0] disp_dep;
  logic [DW-1:0][BBW-1:0] disp_bb;
  logic [N-1:0] iq_valid, iq_short, iq_busy, iq_has_fused;
  logic [N-1:0][BBW-1:0] iq_bb;
  logic [DW-1:0][IW-1:0] fuse_src;

  fusion_detect dut (
    .enable, .disp_valid, .disp_dep, .disp_bb, .iq_valid, .iq_short, .iq_busy,
    .iq_has_fused, .iq_bb, .fuse, .fuse_src);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] taken;
      enable       = ($urandom_range(7) != 0);
      disp_valid   = DW'($urandom);
      iq_valid     = ~($urandom & $urandom);
      iq_short     = ~($urandom & $urandom);
      iq_busy      = $urandom & $urandom;
      iq_has_fused = $urandom & $urandom & $urandom;
      for (int i = 0; i < N; i++) iq_bb[i] = BBW'($urandom_range(1));
      for (int k = 0; k < DW; k++) begin
        int p;
        p = int'($urandom_range(7));         // few producers, so slots share them
        disp_dep[k] = '0;
        disp_dep[k][p] = 1'b1;
        if ($urandom_range(3) == 0) disp_dep[k][$urandom_range(N - 1)] = 1'b1;
        if ($urandom_range(9) == 0) disp_dep[k] = '0;
        disp_bb[k] = BBW'($urandom_range(1));
      end
      #1;
      taken = iq_has_fused;
      expv = '0;
      for (int k = 0; k < DW; k++) begin
        int cnt, p;
        cnt = 0; p = 0;
        for (int j = 0; j < N; j++) if (disp_dep[k][j]) begin cnt++; p = j; end
        if (enable && disp_valid[k] && cnt == 1 && iq_valid[p] && iq_short[p] && !iq_busy[p]
            && iq_bb[p] == disp_bb[k]) begin
          if (taken[p]) n_claimed++;
          else begin
            expv[k] = 1; taken[p] = 1;
            check(int'(fuse_src[k]) == p, $sformatf("slot %0d fuses with entry %0d", k, p));
          end
        end
      end
      check(fuse == expv, $sformatf("fuse %b expected %b", fuse, expv));
      if (expv != '0) n_fuse++;
    end
    check(n_fuse > 100 && n_claimed > 10, "fusions and already-claimed producers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
