// tb_age_matrix: allocates and frees entries at random (up to 4 per cycle,
// lowest index first within a cycle, as the dispatcher does) and keeps a
// reference allocation sequence number per entry. Every cycle, for every pair
// of occupied entries, older[i][j] must say whether j was allocated before i.
module tb_age_matrix;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] valid, alloc;
  logic [N-1:0][N-1:0] older;
  longint seq [N];
  longint next_seq = 0;

  age_matrix dut (.clk, .rst_n, .valid, .alloc, .older);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    valid = '0; alloc = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      int n;
      // check the current state
      bad = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (valid[i] && valid[j] && i != j && older[i][j] != (seq[j] < seq[i])) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: %0d wrong age bits at step %0d", bad, t);
      end
      // next cycle: free some, allocate up to four free entries
      alloc = '0; n = 0;
      for (int i = 0; i < N; i++) begin
        if (!valid[i] && n < 4 && $urandom_range(2) == 0) begin
          alloc[i] = 1; n++;
        end
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (alloc[i]) begin
          valid[i] = 1; seq[i] = next_seq++;
        end else if (valid[i] && $urandom_range(5) == 0) begin
          valid[i] = 0;
        end
      end
      alloc = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
