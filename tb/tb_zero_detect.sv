// tb_zero_detect: checks the zero-detection logic. zdl must be 1 exactly when
// no short-latency request at the select input is left without a grant.
// Random vectors with sparse requests, so both outcomes occur often.
module tb_zero_detect;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0, n_one = 0, n_zero = 0;
  logic [N-1:0] r, g, s;
  logic zdl, expv;

  zero_detect dut (.sel_req(r), .grant(g), .short_lat(s), .zdl(zdl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      r = $urandom & $urandom & $urandom;
      s = $urandom;
      g = r & ($urandom | $urandom | (t[0] ? '1 : '0));
      #1;
      expv = 1'b1;
      for (int i = 0; i < N; i++)
        if (r[i] && s[i] && !g[i]) expv = 1'b0;
      if (expv) n_one++; else n_zero++;
      checks++;
      if (zdl !== expv) begin
        failures++;
        $display("FAIL: r=%h g=%h s=%h zdl=%b expected %b", r, g, s, zdl, expv);
      end
    end
    checks++;
    if (n_one == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
