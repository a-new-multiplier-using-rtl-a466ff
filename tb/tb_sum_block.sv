// tb_sum_block - checks s_k = c_{k-1} ? n_k : m_k (s_0 = m_0) for random
// independent m, n and c, and s = m ^ (c << 1) when n = ~m as in the adder.
module tb_sum_block;
  localparam int W = 64;
  logic [W-1:0] m, n, c, s, expected;
  int           checks = 0, failures = 0;

  sum_block #(.W(W)) dut (.m(m), .n(n), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      m = {$urandom, $urandom};
      c = {$urandom, $urandom};
      n = (t % 2 == 0) ? {$urandom, $urandom} : ~m;
      #1;
      expected[0] = m[0];
      for (int k = 1; k < W; k++) expected[k] = c[k-1] ? n[k] : m[k];
      checks++;
      if (s != expected) begin
        failures++;
        $display("FAIL m=%h n=%h c=%h s=%h expected %h", m, n, c, s, expected);
      end
      if (t % 2 == 1) begin
        checks++;
        if (s != (m ^ {c[W-2:0], 1'b0})) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
