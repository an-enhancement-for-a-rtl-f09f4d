// tb_req_filter: exhaustive-by-random check of the matrix-B line filter.
// For every entry the line must equal C when the entry is a short-latency
// instruction and D otherwise; compared with a bitwise reference over many
// random vectors.
module tb_req_filter;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  logic [N-1:0] c, d, s, lines_b, expv;

  req_filter dut (.c(c), .d(d), .short_lat(s), .lines_b(lines_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      c = $urandom; d = $urandom; s = $urandom;
      #1;
      for (int i = 0; i < N; i++) begin
        expv[i] = s[i] ? c[i] : d[i];
      end
      checks++;
      if (lines_b !== expv) begin
        failures++;
        $display("FAIL: c=%h d=%h s=%h got %h expected %h", c, d, s, lines_b, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
