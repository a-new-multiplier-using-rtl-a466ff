// tb_carry_flag_channel - checks the logarithmic carry tree against the
// sequential carry rule c_k = c_{k-1} ? i_k : o_k (c_{-1} = 0), for fully
// random primary carries (including pairs no adder produces) and for pairs
// made from real operands, at W = 64 and at the 55 bits used inside the
// multiplier.
module tb_carry_flag_channel;
  localparam int WA = 64;
  localparam int WB = 55;

  logic [WA-1:0] oa, ia, ca;
  logic [WB-1:0] ob, ib, cb;
  logic          couta, coutb;
  int            checks = 0, failures = 0;

  carry_flag_channel #(.W(WA)) dut64 (.o(oa), .i(ia), .c(ca), .cout(couta));
  carry_flag_channel #(.W(WB)) dut55 (.o(ob), .i(ib), .c(cb), .cout(coutb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WA-1:0] ripple(logic [WA-1:0] o, logic [WA-1:0] i, int w);
    logic [WA-1:0] c = '0;
    logic          prev = 1'b0;
    for (int k = 0; k < w; k++) begin
      c[k] = prev ? i[k] : o[k];
      prev = c[k];
    end
    return c;
  endfunction

  initial begin
    logic [WA-1:0] x, y, ref_c;
    for (int t = 0; t < 400; t++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (t % 2 == 0) begin
        oa = x;     ia = y;            // arbitrary pairs
      end else begin
        oa = x & y; ia = x | y;        // pairs of a real addition
      end
      if (t == 1) begin oa = '0; ia = '1; end   // longest propagate chain
      ob = oa[WB-1:0];
      ib = ia[WB-1:0];
      #1;
      ref_c = ripple(oa, ia, WA);
      checks++;
      if (ca != ref_c || couta != ref_c[WA-1]) begin
        failures++;
        $display("FAIL W=64 o=%h i=%h c=%h expected %h", oa, ia, ca, ref_c);
      end
      ref_c = ripple(oa, ia, WB);
      checks++;
      if (cb != ref_c[WB-1:0] || coutb != ref_c[WB-1]) begin
        failures++;
        $display("FAIL W=55 o=%h i=%h c=%h expected %h", ob, ib, cb, ref_c[WB-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
