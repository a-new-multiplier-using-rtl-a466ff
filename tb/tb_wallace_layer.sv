// tb_wallace_layer - checks single Wallace layers with random bit matrices.
//
// For every layer under test the input matrix is filled with random bits up
// to given column heights. Each check requires that the weighted sum of the
// output matrix equals that of the input (a layer only regroups bits), and
// for the 4-bit layers that the output column heights are exactly those
// listed for the 4 x 4 example (after layer 1: 1 3 2 3 2 1 1, after layer 2:
// 2 2 2 2 1 1 1, highest column first): no bit above the height is ever set
// and every position below it is set at least once. The 16-bit and 32-bit
// first layers must keep every column within 11 and 22 bits.
module tb_wallace_layer;
  typedef bit [127:0][63:0] big_t;
  typedef int               hts_t [128];

  logic [7:0][3:0]     d41, q41, d42, q42;
  logic [31:0][15:0]   d161, q161;
  logic [63:0][31:0]   d321, q321;
  int                  checks = 0, failures = 0;

  wallace_layer #(.N(4),  .LAYER(1)) dut41  (.din(d41),  .dout(q41));
  wallace_layer #(.N(4),  .LAYER(2)) dut42  (.din(d42),  .dout(q42));
  wallace_layer #(.N(16), .LAYER(1)) dut161 (.din(d161), .dout(q161));
  wallace_layer #(.N(32), .LAYER(1)) dut321 (.din(d321), .dout(q321));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic hts_t pp_heights(int n);
    hts_t h;
    for (int c = 0; c < 128; c++) h[c] = (c < n) ? c + 1 : ((c < 2 * n - 1) ? 2 * n - 1 - c : 0);
    return h;
  endfunction

  function automatic big_t random_matrix(int n, hts_t h);
    big_t m = '0;
    for (int c = 0; c < 2 * n; c++)
      for (int k = 0; k < h[c]; k++) m[c][k] = 1'($urandom);
    return m;
  endfunction

  function automatic logic [255:0] weight(int n, big_t m);
    logic [255:0] s = '0;
    for (int c = 0; c < 2 * n; c++)
      for (int k = 0; k < 64; k++) if (m[c][k]) s += 256'(1) << c;
    return s;
  endfunction

  // ones ever seen per position of the 4-bit layer outputs
  bit [7:0][3:0] seen41, seen42;

  task automatic check(string name, int n, big_t din, big_t dout, int maxh,
                       ref bit [7:0][3:0] seen, input hts_t exact, input bit use_exact);
    checks++;
    if (weight(n, din) != weight(n, dout)) begin
      failures++;
      $display("FAIL %s weighted sum changed", name);
    end
    for (int c = 0; c < 2 * n; c++)
      for (int k = 0; k < 64; k++)
        if (dout[c][k]) begin
          if (k >= maxh || (use_exact && k >= exact[c])) begin
            failures++;
            $display("FAIL %s bit above the column height: c=%0d k=%0d", name, c, k);
          end
          if (use_exact && n == 4) seen[c][k] = 1'b1;
        end
  endtask

  initial begin
    hts_t h4_0, h4_1, h4_2, h16, h32, none;
    big_t m;
    h4_0 = pp_heights(4);
    h16  = pp_heights(16);
    h32  = pp_heights(32);
    h4_1 = '{default: 0};
    h4_2 = '{default: 0};
    none = '{default: 0};
    // column heights of the 4 x 4 example, column 0 first
    h4_1[0:6] = '{1, 1, 2, 3, 2, 3, 1};
    h4_2[0:6] = '{1, 1, 1, 2, 2, 2, 2};
    seen41 = '0;
    seen42 = '0;
    for (int t = 0; t < 400; t++) begin
      m = random_matrix(4, h4_0);  for (int c = 0; c < 8;  c++) d41[c]  = m[c][3:0];
      m = random_matrix(4, h4_1);  for (int c = 0; c < 8;  c++) d42[c]  = m[c][3:0];
      m = random_matrix(16, h16);  for (int c = 0; c < 32; c++) d161[c] = m[c][15:0];
      m = random_matrix(32, h32);  for (int c = 0; c < 64; c++) d321[c] = m[c][31:0];
      #1;
      begin
        big_t i41 = '0, o41 = '0, i42 = '0, o42 = '0, i161 = '0, o161 = '0, i321 = '0, o321 = '0;
        bit [7:0][3:0] dummy;
        for (int c = 0; c < 8; c++)  begin i41[c][3:0] = d41[c]; o41[c][3:0] = q41[c];
                                           i42[c][3:0] = d42[c]; o42[c][3:0] = q42[c]; end
        for (int c = 0; c < 32; c++) begin i161[c][15:0] = d161[c]; o161[c][15:0] = q161[c]; end
        for (int c = 0; c < 64; c++) begin i321[c][31:0] = d321[c]; o321[c][31:0] = q321[c]; end
        check("N=4 layer 1", 4, i41, o41, 4, seen41, h4_1, 1'b1);
        check("N=4 layer 2", 4, i42, o42, 4, seen42, h4_2, 1'b1);
        check("N=16 layer 1", 16, i161, o161, 11, dummy, none, 1'b0);
        check("N=32 layer 1", 32, i321, o321, 22, dummy, none, 1'b0);
      end
    end
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < 4; k++) begin
        if (k < h4_1[c]) begin
          checks++;
          if (!seen41[c][k]) begin failures++; $display("FAIL N=4 layer 1 c=%0d k=%0d never set", c, k); end
        end
        if (k < h4_2[c]) begin
          checks++;
          if (!seen42[c][k]) begin failures++; $display("FAIL N=4 layer 2 c=%0d k=%0d never set", c, k); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
