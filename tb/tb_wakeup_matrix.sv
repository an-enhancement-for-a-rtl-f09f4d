// tb_wakeup_matrix: checks the instruction-by-instruction wakeup matrix
// against a reference that keeps, per row, the set of columns it still waits
// for. Rows are written with random dependence vectors, columns fire at
// random, rows are cleared at random; every cycle the request vector must
// equal "valid and no column still awaited once this cycle's lines are
// applied". A directed start checks a two-parent row that wakes only when
// its second parent's line fires, and a write whose dependence is satisfied
// by a line in the same cycle.
module tb_wakeup_matrix;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0, n_wake = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] wr_en, lines, clr, req;
  logic [N-1:0][N-1:0] wr_dep;
  logic [N-1:0] m_valid;
  logic [N-1:0][N-1:0] m_dep;
  logic [N-1:0] expv;

  wakeup_matrix dut (.clk, .rst_n, .wr_en, .wr_dep, .lines, .clr, .req);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; wr_dep = '0; lines = '0; clr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(req == '0, "empty after reset");
    // row 3 waits for columns 7 and 9; row 4 waits for 7, whose line fires now
    wr_en[3] = 1; wr_dep[3][7] = 1; wr_dep[3][9] = 1;
    wr_en[4] = 1; wr_dep[4][7] = 1; lines[7] = 1;
    @(negedge clk);
    wr_en = '0; wr_dep = '0; lines = '0;
    check(req[4] == 1'b1, "row written with its line active requests next cycle");
    check(req[3] == 1'b0, "row 3 still waits for column 9");
    @(negedge clk);
    check(req[3] == 1'b0, "row 3 keeps waiting");
    lines[9] = 1;
    #1 check(req[3] == 1'b1, "row 3 requests in the cycle its last line fires");
    @(negedge clk);
    lines = '0;
    check(req[3] == 1'b1, "request holds");
    clr = 32'h18;
    @(negedge clk);
    clr = '0;
    check(req == '0, "cleared rows do not request");
    // random against the model
    m_valid = '0; m_dep = '0;
    for (int t = 0; t < 3000; t++) begin
      wr_en = ~m_valid & $urandom & $urandom;
      for (int i = 0; i < N; i++) wr_dep[i] = $urandom & $urandom & $urandom;
      lines = $urandom & $urandom & $urandom;
      clr   = m_valid & $urandom & $urandom & $urandom;
      #1;
      for (int i = 0; i < N; i++) expv[i] = m_valid[i] && ((m_dep[i] & ~lines) == '0);
      check(req == expv, $sformatf("req %h expected %h", req, expv));
      if (expv != '0) n_wake++;
      for (int i = 0; i < N; i++) begin
        if (wr_en[i]) begin
          m_valid[i] = 1; m_dep[i] = wr_dep[i] & ~lines;
        end else begin
          if (clr[i]) m_valid[i] = 0;
          m_dep[i] = m_dep[i] & ~lines;
        end
      end
      @(negedge clk);
    end
    check(n_wake > 100, "rows woke");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
