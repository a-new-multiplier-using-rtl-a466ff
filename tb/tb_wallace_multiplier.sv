// tb_wallace_multiplier - end-to-end test of the 32-bit pipelined multiplier
// at its default size.
//
// Operand pairs enter at up to one per clock. A scoreboard queue holds the
// expected products; every output with out_valid must match the oldest
// entry and must arrive exactly three rising edges after its operands were
// sampled. The stimulus exercises, and the bench counts:
//   * back-to-back issue with three products in flight at once (the
//     pipelining the design exists for);
//   * bubbles (cycles without operands) that must not produce outputs;
//   * corner operands: zero, one, all ones, single bits, which drive the
//     longest carry paths in the Wallace tree and the final adder.
// A mechanism that never happened counts as a failure.
module tb_wallace_multiplier;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        out_valid;
  logic [63:0] p;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_full = 0, n_bubble = 0, n_corner = 0, n_out = 0;

  typedef struct {
    logic [63:0] prod;
    int          issue_cycle;
  } exp_t;
  exp_t q[$];

  wallace_multiplier dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: sample the outputs just after each rising edge
  int inflight = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      n_out++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h at cycle %0d", p, cycle);
      end else begin
        e = q.pop_front();
        if (p != e.prod) begin
          failures++;
          $display("FAIL product %h expected %h", p, e.prod);
        end
        checks++;
        if (cycle - e.issue_cycle != 3) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 3", cycle - e.issue_cycle);
        end
      end
    end
  end

  // operands are applied after a falling edge and sampled on the next rise
  task automatic issue(logic [31:0] x, logic [31:0] y);
    exp_t e;
    @(negedge clk);
    a = x;
    b = y;
    in_valid = 1'b1;
    e.prod = 64'(x) * 64'(y);
    e.issue_cycle = cycle;   // edges counted from the one that samples the operands
    q.push_back(e);
  endtask

  task automatic bubble();
    @(negedge clk);
    in_valid = 1'b0;
    a = $urandom;
    b = $urandom;
    n_bubble++;
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'hAAAA_AAAA, 32'h7FFF_FFFF};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // corner operands, back to back
    foreach (corner[i]) foreach (corner[j]) begin
      issue(corner[i], corner[j]);
      n_corner++;
    end
    bubble();
    // random bursts separated by random bubbles
    for (int t = 0; t < 3000; t++) begin
      if ($urandom % 5 == 0) bubble();
      else issue($urandom, $urandom);
    end
    bubble();
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never came out", q.size());
    end
    checks += 3;
    if (n_full == 0)   begin failures++; $display("FAIL pipeline never held three products"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    if (n_corner == 0) begin failures++; $display("FAIL no corner operands"); end
    $display("products=%0d full-pipeline cycles=%0d bubbles=%0d corner pairs=%0d",
             n_out, n_full, n_bubble, n_corner);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // three products in flight: operands being sampled while two are inside
  always @(posedge clk) if (rst_n && in_valid && q.size() >= 3) n_full++;
endmodule
