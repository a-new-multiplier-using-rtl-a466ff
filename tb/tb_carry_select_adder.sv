// tb_carry_select_adder - compares the 64-bit and the 55-bit carry select
// adders with the + operator on random operands and on carry-chain corner
// cases (all ones plus one, alternating patterns, zero).
module tb_carry_select_adder;
  localparam int WA = 64;
  localparam int WB = 55;

  logic [WA-1:0] aa, ba, sa;
  logic [WB-1:0] ab, bb, sb;
  logic          ca, cb;
  int            checks = 0, failures = 0;

  carry_select_adder #(.W(WA)) dut64 (.a(aa), .b(ba), .s(sa), .cout(ca));
  carry_select_adder #(.W(WB)) dut55 (.a(ab), .b(bb), .s(sb), .cout(cb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WA:0] ref64;
    logic [WB:0] ref55;
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0:       begin aa = '1; ba = 64'd1; end
        1:       begin aa = '1; ba = '1; end
        2:       begin aa = '0; ba = '0; end
        3:       begin aa = {32{2'b10}}; ba = {32{2'b01}}; end
        4:       begin aa = {32{2'b10}}; ba = {32{2'b11}}; end
        default: begin aa = {$urandom, $urandom}; ba = {$urandom, $urandom}; end
      endcase
      ab = aa[WB-1:0];
      bb = ba[WB-1:0];
      if (t == 0) ab = '1;
      #1;
      ref64 = {1'b0, aa} + {1'b0, ba};
      ref55 = {1'b0, ab} + {1'b0, bb};
      checks++;
      if ({ca, sa} != ref64) begin
        failures++;
        $display("FAIL W=64 %h + %h = %b %h expected %h", aa, ba, ca, sa, ref64);
      end
      checks++;
      if ({cb, sb} != ref55) begin
        failures++;
        $display("FAIL W=55 %h + %h = %b %h expected %h", ab, bb, cb, sb, ref55);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
