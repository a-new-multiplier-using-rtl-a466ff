// tb_pipe_reg - drives random words into a 64-bit pipeline register and
// checks that every word appears on q exactly one clock edge later.
module tb_pipe_reg;
  localparam int W = 64;
  logic         clk = 1'b0;
  logic [W-1:0] d, q, prev;
  int           checks = 0, failures = 0;

  pipe_reg #(.WIDTH(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      d    = {$urandom, $urandom};
      prev = d;
      @(posedge clk);
      #1;
      checks++;
      if (q != prev) begin
        failures++;
        $display("FAIL t=%0d q=%h expected %h", t, q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
