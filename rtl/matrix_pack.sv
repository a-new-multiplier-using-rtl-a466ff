// matrix_pack - squeezes the bit matrix after layer LAYER into a flat vector.
//
// A pipeline register inside the Wallace structure only needs one flip-flop
// per bit that actually exists (252 after layer 4 and 117 after layer 8 of
// the 32-bit multiplier), not one per position of the 2N x N matrix. The bits
// are laid out column by column, lowest column first, lowest position first
// (offsets from wallace_pkg::bit_offset). Pure wiring.
module matrix_pack
  import wallace_pkg::*;
#(
  parameter int N     = 32,
  parameter int LAYER = 4,
  parameter int BITS  = layer_bits(N, LAYER)
) (
  input  logic [2*N-1:0][N-1:0] m,
  output logic [BITS-1:0]       flat
);
  localparam colv_t H = heights(N, LAYER);
  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int OFF = bit_offset(N, LAYER, c);
    for (genvar k = 0; k < int'(H[c]); k++) begin : g_bit
      assign flat[OFF+k] = m[c][k];
    end
  end
endmodule
