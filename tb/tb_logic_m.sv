// tb_logic_m: checks logic M against a cycle model of its two flip-flops per
// entry. Each cycle: the select input equals last cycle's
// (request_A | request_B & zdl) with allocation clearing it, masked by the
// issued bits; issued accumulates grants until the entry is reallocated.
// Grants are drawn only from the current requests. Also checks the two
// cases by name: a matrix-B request blocked while zdl is 0, and a second
// request after the grant dropped by the issued bit.
module tb_logic_m;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req_a, req_b, grant, alloc, sel_req, issued;
  logic zdl;
  logic [N-1:0] m_req, m_iss;

  logic_m dut (.clk, .rst_n, .req_a, .req_b, .zdl, .grant, .alloc, .sel_req, .issued);

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
    req_a = '0; req_b = '0; grant = '0; alloc = '0; zdl = 0;
    m_req = '0; m_iss = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // directed: B request blocked by zdl = 0, passed by zdl = 1
    req_b = 32'h1; zdl = 0;
    @(negedge clk);
    check(sel_req[0] == 1'b0, "request_B blocked while zdl is 0");
    zdl = 1;
    @(negedge clk);
    check(sel_req[0] == 1'b1, "request_B passed when zdl is 1");
    grant = 32'h1; req_b = '0; req_a = 32'h1;
    @(negedge clk);
    grant = '0;
    check(issued[0] == 1'b1, "issued bit set by the grant");
    check(sel_req[0] == 1'b0, "later request_A dropped by the issued bit");
    alloc = 32'h1; req_a = '0;
    @(negedge clk);
    alloc = '0;
    check(issued[0] == 1'b0 && sel_req[0] == 1'b0, "allocation clears the entry");
    // random against the model
    m_req = '0; m_iss = '0;
    for (int t = 0; t < 2000; t++) begin
      check(sel_req == (m_req & ~m_iss), $sformatf("sel_req %h expected %h", sel_req, m_req & ~m_iss));
      check(issued == m_iss, "issued bits");
      req_a = $urandom & $urandom;
      req_b = $urandom & $urandom;
      zdl   = 1'($urandom_range(1));
      grant = sel_req & $urandom;
      alloc = ~sel_req & $urandom & $urandom & $urandom;
      m_req = (req_a | (req_b & {N{zdl}})) & ~alloc;
      m_iss = (m_iss | grant) & ~alloc;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
