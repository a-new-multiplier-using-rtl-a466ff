// wallace_multiplier - pipelined N x N unsigned multiplier built from an
// AND-array, a Wallace structure of mixed adders and a carry select adder.
//
// Data flow (N = 32, delays in two-input gate delays):
//   stage 1  AND-array (1) and Wallace layers 1-4 (8), register R1
//   stage 2  Wallace layers 5-8 (8), register R2
//   stage 3  carry select adder on columns 9..63 (8), register R3 = product
// Each stage is about ten gate delays including its register, so a new
// operand pair can enter every clock cycle while three products are in
// flight. The register positions follow that delay balance: R1 after half
// of the Wallace layers, R2 at the end of the Wallace structure.
//
// R1 and R2 hold only the bits that exist at their cut (252 and 117 for
// N = 32). After the last layer the columns below column 9 hold a single bit
// each, so they go straight into the product and the two-operand adder only
// spans columns 9..63 (55 bits). The carry out of that adder is always zero
// for a product of two N-bit numbers and is left unused.
//
// Interface and timing: a, b and in_valid are sampled by the first pipeline
// register on a rising clock edge; p shows the product, with out_valid high,
// three rising edges after the operands were applied (latency 3, one result
// per cycle). Operands are unsigned. The valid flags and their asynchronous
// active-low reset are this implementation's addition for the user's
// convenience; the data registers have no reset.
module wallace_multiplier
  import wallace_pkg::*;
#(
  parameter int N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);
  localparam int LAYERS = num_layers(N);       // 8 for N = 32
  localparam int SPLIT  = LAYERS / 2;          // R1 after layer 4
  localparam int R1_W   = layer_bits(N, SPLIT);  // 252
  localparam int R2_W   = layer_bits(N, LAYERS); // 117
  localparam int BASE   = adder_base(N);       // 9: lowest column with two bits
  localparam int ADD_W  = 2 * N - BASE;        // 55

  typedef logic [2*N-1:0][N-1:0] matrix_t;

  // ---- stage 1: AND-array and first Wallace section ----
  matrix_t            pp, w1;
  logic [R1_W-1:0]    r1_d, r1_q;

  and_array #(.N(N)) u_and (.a(a), .b(b), .pp(pp));
  wallace_section #(.N(N), .FIRST(1), .COUNT(SPLIT)) u_wallace1 (.din(pp), .dout(w1));
  matrix_pack #(.N(N), .LAYER(SPLIT)) u_pack1 (.m(w1), .flat(r1_d));
  pipe_reg #(.WIDTH(R1_W)) u_r1 (.clk(clk), .d(r1_d), .q(r1_q));

  // ---- stage 2: second Wallace section ----
  matrix_t            m1, w2;
  logic [R2_W-1:0]    r2_d, r2_q;

  matrix_unpack #(.N(N), .LAYER(SPLIT)) u_unpack1 (.flat(r1_q), .m(m1));
  wallace_section #(.N(N), .FIRST(SPLIT + 1), .COUNT(LAYERS - SPLIT)) u_wallace2 (
    .din(m1), .dout(w2)
  );
  matrix_pack #(.N(N), .LAYER(LAYERS)) u_pack2 (.m(w2), .flat(r2_d));
  pipe_reg #(.WIDTH(R2_W)) u_r2 (.clk(clk), .d(r2_d), .q(r2_q));

  // ---- stage 3: two-operand carry select adder ----
  matrix_t            m2;
  logic [2*N-1:0]     row0, row1, prod;
  logic [ADD_W-1:0]   sum_hi;
  logic               unused_cout;

  matrix_unpack #(.N(N), .LAYER(LAYERS)) u_unpack2 (.flat(r2_q), .m(m2));
  for (genvar c = 0; c < 2 * N; c++) begin : g_rows
    assign row0[c] = m2[c][0];
    assign row1[c] = m2[c][1];
  end

  carry_select_adder #(.W(ADD_W)) u_adder (
    .a(row0[2*N-1:BASE]), .b(row1[2*N-1:BASE]), .s(sum_hi), .cout(unused_cout)
  );
  assign prod = {sum_hi, row0[BASE-1:0]};
  pipe_reg #(.WIDTH(2 * N)) u_r3 (.clk(clk), .d(prod), .q(p));

  // ---- valid flags travelling with the data ----
  logic [2:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

  // the columns below BASE hold one bit after the last layer
  initial begin
    assert (LAYERS >= 2 && BASE >= 1 && BASE < 2 * N)
      else $error("wallace_multiplier: unsupported operand width %0d", N);
  end
endmodule
