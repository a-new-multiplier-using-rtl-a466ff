// matrix_unpack - restores the bit matrix after layer LAYER from the flat
// vector made by matrix_pack. Positions above each column's height are
// zero. Pure wiring.
module matrix_unpack
  import wallace_pkg::*;
#(
  parameter int N     = 32,
  parameter int LAYER = 4,
  parameter int BITS  = layer_bits(N, LAYER)
) (
  input  logic [BITS-1:0]       flat,
  output logic [2*N-1:0][N-1:0] m
);
  localparam colv_t H = heights(N, LAYER);
  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int OFF = bit_offset(N, LAYER, c);
    for (genvar k = 0; k < N; k++) begin : g_bit
      if (k < int'(H[c])) begin : g_data
        assign m[c][k] = flat[OFF+k];
      end else begin : g_zero
        assign m[c][k] = 1'b0;
      end
    end
  end
endmodule
