// tb_full_adder - exhaustive check of the (3,2) counter: for all eight
// inputs, {co, s} must equal the arithmetic sum of the three bits.
module tb_full_adder;
  logic [2:0] x;
  logic       s, co;
  int         checks = 0, failures = 0;

  full_adder dut (.x(x), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(x[0]) + int'(x[1]) + int'(x[2]))) begin
        failures++;
        $display("FAIL x=%b got co=%b s=%b", x, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
