// tb_multiplier_sizes - the multiplier built at the other operand widths
// discussed for the Wallace structure: 4 bits (exhaustive), 8, 16 and 64
// bits (random and all-ones operands). Each instance issues one operand pair
// per clock and checks every product and the three-cycle latency. The 64-bit
// instance checks its 128-bit products with wide arithmetic.
module tb_multiplier_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic vin = 1'b0;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  logic [3:0]   a4,  b4;   logic [7:0]   p4;   logic v4;
  logic [7:0]   a8,  b8;   logic [15:0]  p8;   logic v8;
  logic [15:0]  a16, b16;  logic [31:0]  p16;  logic v16;
  logic [63:0]  a64, b64;  logic [127:0] p64;  logic v64;

  wallace_multiplier #(.N(4))  dut4  (.clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a4),  .b(b4),  .out_valid(v4),  .p(p4));
  wallace_multiplier #(.N(8))  dut8  (.clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a8),  .b(b8),  .out_valid(v8),  .p(p8));
  wallace_multiplier #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a16), .b(b16), .out_valid(v16), .p(p16));
  wallace_multiplier #(.N(64)) dut64 (.clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a64), .b(b64), .out_valid(v64), .p(p64));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected products by issue cycle, one slot per cycle
  typedef struct {
    logic [7:0]   e4;
    logic [15:0]  e8;
    logic [31:0]  e16;
    logic [127:0] e64;
    logic         valid;
  } exp_t;
  exp_t hist [4096];
  int   n_out = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n && cycle >= 3 && hist[cycle-3].valid) begin
      exp_t e;
      e = hist[cycle-3];
      n_out++;
      checks += 4;
      if (!(v4 && v8 && v16 && v64)) begin failures++; $display("FAIL out_valid missing at cycle %0d", cycle); end
      if (p4  != e.e4)  begin failures++; $display("FAIL N=4 got %h expected %h", p4, e.e4); end
      if (p8  != e.e8)  begin failures++; $display("FAIL N=8 got %h expected %h", p8, e.e8); end
      if (p16 != e.e16) begin failures++; $display("FAIL N=16 got %h expected %h", p16, e.e16); end
      if (p64 != e.e64) begin failures++; $display("FAIL N=64 got %h expected %h", p64, e.e64); end
    end else if (rst_n && (v4 || v8 || v16 || v64)) begin
      failures++;
      $display("FAIL unexpected out_valid at cycle %0d", cycle);
    end
  end

  initial begin
    foreach (hist[i]) hist[i].valid = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1100; t++) begin
      @(negedge clk);
      vin = (t % 7 != 6);                // a bubble every seventh cycle
      {a4, b4} = 8'(t);
      a8  = 8'($urandom);  b8  = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom};
      if (t == 5) begin a8 = '1; b8 = '1; a16 = '1; b16 = '1; a64 = '1; b64 = '1; end
      hist[cycle].valid = vin;
      hist[cycle].e4  = 8'(a4) * 8'(b4);
      hist[cycle].e8  = 16'(a8) * 16'(b8);
      hist[cycle].e16 = 32'(a16) * 32'(b16);
      hist[cycle].e64 = 128'(a64) * 128'(b64);
    end
    @(negedge clk);
    vin = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out < 900) begin failures++; $display("FAIL only %0d products", n_out); end
    $display("products=%0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
