// tb_half_adder - exhaustive check of the (2,2) counter: {co, s} must equal
// the arithmetic sum of the two bits.
module tb_half_adder;
  logic [1:0] x;
  logic       s, co;
  int         checks = 0, failures = 0;

  half_adder dut (.x(x), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(x[0]) + int'(x[1]))) begin
        failures++;
        $display("FAIL x=%b got co=%b s=%b", x, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
