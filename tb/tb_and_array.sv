// tb_and_array - checks the partial-product matrix for N = 32 and N = 4.
// For random and corner operands: every column holds exactly the products
// a_i & b_j with i + j = c (checked as a count of ones per column), nothing
// lies above the column height min(c+1, 2N-1-c), and the weighted sum of the
// matrix equals a * b.
module tb_and_array;
  localparam int NA = 32;
  localparam int NB = 4;

  logic [NA-1:0]            a32, b32;
  logic [2*NA-1:0][NA-1:0]  pp32;
  logic [NB-1:0]            a4, b4;
  logic [2*NB-1:0][NB-1:0]  pp4;
  int                       checks = 0, failures = 0;

  and_array #(.N(NA)) dut32 (.a(a32), .b(b32), .pp(pp32));
  and_array #(.N(NB)) dut4  (.a(a4),  .b(b4),  .pp(pp4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    logic [127:0] sum;
    int           ones, expect_ones, h;
    sum = '0;
    for (int c = 0; c < 2 * NA; c++) begin
      h = (c < NA) ? c + 1 : ((c < 2 * NA - 1) ? 2 * NA - 1 - c : 0);
      ones = 0;
      expect_ones = 0;
      for (int k = 0; k < NA; k++) begin
        if (pp32[c][k]) begin
          ones++;
          sum += 128'(1) << c;
          if (k >= h) begin
            failures++;
            $display("FAIL N=32 bit above height c=%0d k=%0d", c, k);
          end
        end
      end
      for (int i = 0; i < NA; i++)
        if (c - i >= 0 && c - i < NA) expect_ones += int'(a32[i] & b32[c-i]);
      checks++;
      if (ones != expect_ones) begin
        failures++;
        $display("FAIL N=32 column %0d has %0d ones, expected %0d", c, ones, expect_ones);
      end
    end
    checks++;
    if (sum != 128'(64'(a32) * 64'(b32))) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h matrix sum %h", a32, b32, sum);
    end
  endtask

  task automatic check4();
    int sum, h;
    sum = 0;
    for (int c = 0; c < 2 * NB; c++) begin
      h = (c < NB) ? c + 1 : ((c < 2 * NB - 1) ? 2 * NB - 1 - c : 0);
      for (int k = 0; k < NB; k++) begin
        if (pp4[c][k]) begin
          sum += 1 << c;
          if (k >= h) failures++;
        end
      end
    end
    checks++;
    if (sum != int'(a4) * int'(b4)) begin
      failures++;
      $display("FAIL N=4 a=%0d b=%0d matrix sum %0d", a4, b4, sum);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: begin a32 = '1; b32 = '1; end
        1: begin a32 = '0; b32 = '1; end
        2: begin a32 = 32'h8000_0001; b32 = 32'hFFFF_FFFF; end
        default: begin a32 = $urandom; b32 = $urandom; end
      endcase
      #1;
      check32();
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      check4();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
