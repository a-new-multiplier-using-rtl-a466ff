// tb_wallace_section - checks whole Wallace sections fed by the AND-array.
//
// 32-bit: layers 1-4 then layers 5-8, as split by the first pipeline
// register. 16-bit: layers 1-6. 4-bit: layers 1-2. With random and corner
// operands it checks that
//   * the weighted sum of the matrix equals a * b after every section;
//   * after the last layer no column holds more than two bits, and for the
//     32-bit multiplier columns 0..8 hold at most one (the final adder starts
//     at the tenth column);
//   * the number of bit positions that ever carry a one is 252 after layer 4
//     and 117 after layer 8 of the 32-bit tree (the sizes of registers R1
//     and R2).
// It also checks the adder placement tables of wallace_pkg against the
// mixed-adder counts per layer (4-bit: 4 4; 16-bit: 76 51 33 24 16 16;
// 32-bit: 321 215 144 97 65 39 26 31) and the layer counts per operand width
// (4: 2, 8: 4, 16: 6, 32: 8, 64: 10).
module tb_wallace_section;
  import wallace_pkg::*;

  logic [31:0]          a32, b32;
  logic [63:0][31:0]    pp32, s1, s2;
  logic [15:0]          a16, b16;
  logic [31:0][15:0]    pp16, s16;
  logic [3:0]           a4, b4;
  logic [7:0][3:0]      pp4, s4;
  int                   checks = 0, failures = 0;

  and_array #(.N(32)) u_and32 (.a(a32), .b(b32), .pp(pp32));
  wallace_section #(.N(32), .FIRST(1), .COUNT(4)) dut1 (.din(pp32), .dout(s1));
  wallace_section #(.N(32), .FIRST(5), .COUNT(4)) dut2 (.din(s1),   .dout(s2));
  and_array #(.N(16)) u_and16 (.a(a16), .b(b16), .pp(pp16));
  wallace_section #(.N(16), .FIRST(1), .COUNT(6)) dut16 (.din(pp16), .dout(s16));
  and_array #(.N(4)) u_and4 (.a(a4), .b(b4), .pp(pp4));
  wallace_section #(.N(4), .FIRST(1), .COUNT(2)) dut4 (.din(pp4), .dout(s4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0][31:0] seen1, seen2;

  task automatic expect_int(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    int xa32 [8] = '{321, 215, 144, 97, 65, 39, 26, 31};
    int xa16 [6] = '{76, 51, 33, 24, 16, 16};
    logic [127:0] w1, w2, w16, w4;
    int cnt1, cnt2, h;

    for (int l = 0; l < 8; l++) expect_int($sformatf("adders N=32 layer %0d", l + 1), layer_adders(32, l + 1), xa32[l]);
    for (int l = 0; l < 6; l++) expect_int($sformatf("adders N=16 layer %0d", l + 1), layer_adders(16, l + 1), xa16[l]);
    expect_int("adders N=4 layer 1", layer_adders(4, 1), 4);
    expect_int("adders N=4 layer 2", layer_adders(4, 2), 4);
    expect_int("layers N=4", num_layers(4), 2);
    expect_int("layers N=8", num_layers(8), 4);
    expect_int("layers N=16", num_layers(16), 6);
    expect_int("layers N=32", num_layers(32), 8);
    expect_int("layers N=64", num_layers(64), 10);
    expect_int("adder base N=32", adder_base(32), 9);

    seen1 = '0;
    seen2 = '0;
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0:       begin a32 = '1; b32 = '1; end
        1:       begin a32 = '0; b32 = '0; end
        default: begin a32 = $urandom; b32 = $urandom; end
      endcase
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      a4  = 4'(t);
      b4  = 4'(t >> 4);
      #1;
      w1 = '0; w2 = '0; w16 = '0; w4 = '0;
      for (int c = 0; c < 64; c++) begin
        h = 0;
        for (int k = 0; k < 32; k++) begin
          if (s1[c][k]) begin w1 += 128'(1) << c; seen1[c][k] = 1'b1; end
          if (s2[c][k]) begin w2 += 128'(1) << c; seen2[c][k] = 1'b1; h = k + 1; end
        end
        if (h > 2 || (c < 9 && h > 1)) begin
          failures++;
          $display("FAIL N=32 column %0d uses position %0d after layer 8", c, h - 1);
        end
      end
      for (int c = 0; c < 32; c++)
        for (int k = 0; k < 16; k++)
          if (s16[c][k]) begin
            w16 += 128'(1) << c;
            if (k >= 2) begin failures++; $display("FAIL N=16 column %0d taller than 2", c); end
          end
      for (int c = 0; c < 8; c++)
        for (int k = 0; k < 4; k++)
          if (s4[c][k]) begin
            w4 += 128'(1) << c;
            if (k >= 2) begin failures++; $display("FAIL N=4 column %0d taller than 2", c); end
          end
      checks += 4;
      if (w1 != 128'(64'(a32) * 64'(b32))) begin failures++; $display("FAIL N=32 after layer 4: %h*%h", a32, b32); end
      if (w2 != 128'(64'(a32) * 64'(b32))) begin failures++; $display("FAIL N=32 after layer 8: %h*%h", a32, b32); end
      if (w16 != 128'(32'(a16) * 32'(b16))) begin failures++; $display("FAIL N=16: %h*%h", a16, b16); end
      if (w4 != 128'(8'(a4) * 8'(b4)))     begin failures++; $display("FAIL N=4: %h*%h", a4, b4); end
    end
    cnt1 = 0;
    cnt2 = 0;
    for (int c = 0; c < 64; c++)
      for (int k = 0; k < 32; k++) begin
        cnt1 += int'(seen1[c][k]);
        cnt2 += int'(seen2[c][k]);
      end
    expect_int("live bits after layer 4", cnt1, 252);
    expect_int("live bits after layer 8", cnt2, 117);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
