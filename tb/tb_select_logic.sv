// tb_select_logic: checks the oldest-first select logic against a greedy
// reference: walking the requests from oldest to youngest, take each one
// while issue slots remain, unless it needs a memory port and MEM_PORTS are
// already used, or needs the multiplier and it is busy or already taken.
// The age order is a random permutation each trial; the test also checks
// that slot k holds the k-th granted entry in age order.
module tb_select_logic;
  localparam int unsigned N = 32, W = 4, MP = 2, IW = $clog2(N);
  int checks = 0, failures = 0, n_full = 0, n_memcut = 0;
  logic [N-1:0] req, is_mem, is_mul, grant, expv;
  logic [N-1:0][N-1:0] older;
  logic mul_free;
  logic [W-1:0] slot_valid;
  logic [W-1:0][IW-1:0] slot_idx;
  int rank [N];
  int order [N];

  select_logic dut (
    .req, .older, .is_mem, .is_mul, .mul_free, .grant, .slot_valid, .slot_idx);

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
    for (int t = 0; t < 2000; t++) begin
      int slots, mem, k;
      bit mul_taken;
      // random age permutation: order[r] = entry of age rank r (0 = oldest)
      for (int i = 0; i < N; i++) order[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = int'($urandom_range(i));
        tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      for (int r = 0; r < N; r++) rank[order[r]] = r;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          older[i][j] = rank[j] < rank[i];
      req    = (t % 3 == 0) ? ($urandom & $urandom & $urandom) : ($urandom & $urandom);
      is_mem = $urandom & $urandom;
      is_mul = ~is_mem & $urandom & $urandom & $urandom;
      mul_free = $urandom_range(3) != 0;
      #1;
      expv = '0; slots = 0; mem = 0; mul_taken = !mul_free; k = 0;
      for (int r = 0; r < N; r++) begin
        int e;
        e = order[r];
        if (req[e] && slots < W) begin
          if (is_mem[e] && mem >= MP) begin
            n_memcut++;
          end else if (!(is_mul[e] && mul_taken)) begin
            expv[e] = 1;
            check(slot_valid[k] && int'(slot_idx[k]) == e,
                  $sformatf("slot %0d holds entry %0d", k, e));
            k++;
            slots++;
            if (is_mem[e]) mem++;
            if (is_mul[e]) mul_taken = 1;
          end
        end
      end
      for (int s = k; s < W; s++) check(!slot_valid[s], "unused slot is empty");
      check(grant == expv, $sformatf("grant %h expected %h", grant, expv));
      if (slots == W) n_full++;
    end
    check(n_full > 0 && n_memcut > 0, "full issue and memory-port cut-off both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
