// tb_partial_adder_slices - for random and corner operands checks every bit
// slice against one-bit arithmetic: {o_i, m_i} = a_i + b_i and
// {i_i, n_i} = a_i + b_i + 1.
module tb_partial_adder_slices;
  localparam int W = 64;
  logic [W-1:0] a, b, m, o, n, i;
  int           checks = 0, failures = 0;

  partial_adder_slices #(.W(W)) dut (.a(a), .b(b), .m(m), .o(o), .n(n), .i(i));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      case (t)
        0:       begin a = '0; b = '0; end
        1:       begin a = '1; b = '1; end
        2:       begin a = '1; b = '0; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      #1;
      for (int k = 0; k < W; k++) begin
        checks++;
        if ({o[k], m[k]} != 2'(int'(a[k]) + int'(b[k])) ||
            {i[k], n[k]} != 2'(int'(a[k]) + int'(b[k]) + 1)) begin
          failures++;
          $display("FAIL bit %0d a=%b b=%b -> m%b o%b n%b i%b", k, a[k], b[k], m[k], o[k], n[k], i[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
