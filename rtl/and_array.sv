// and_array - the partial-product generator of the multiplier.
//
// An N x N array of 2-input AND gates forms every a_i & b_j at once, one gate
// delay. The products are delivered as the column matrix the Wallace layers
// work on: pp[c][k] is a bit of weight 2^c. Column c holds the products with
// i + j = c, ordered by increasing j; positions above the column's height
// (min(c+1, 2N-1-c)) and column 2N-1 are zero. Purely combinational.
// The ordering inside a column is this implementation's choice.
module and_array #(
  parameter int N = 32
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [2*N-1:0][N-1:0]   pp
);
  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    // lowest j of column c and its number of products
    localparam int J0 = (c < N) ? 0 : c - N + 1;
    localparam int H  = (c < N) ? c + 1 : ((c < 2 * N - 1) ? 2 * N - 1 - c : 0);
    for (genvar k = 0; k < N; k++) begin : g_bit
      if (k < H) begin : g_and
        assign pp[c][k] = a[c-J0-k] & b[J0+k];
      end else begin : g_zero
        assign pp[c][k] = 1'b0;
      end
    end
  end
endmodule
