// wallace_layer - one layer of mixed adders of the Wallace structure.
//
// All adders of a layer work at the same time, so a layer costs one
// full-adder delay (two gate delays). The layer takes the bit matrix left by
// layer LAYER-1 (din[c][k] has weight 2^c) and returns the matrix after layer
// LAYER. Where the full and half adders sit in each column is fixed at
// elaboration by wallace_pkg; for N = 32 the eight layers use 321, 215, 144,
// 97, 65, 39, 26 and 31 mixed adders.
//
// Inside column c of the result: first the sums of the column's full adders,
// then the half-adder sum or the bits passed through untouched, then the
// carries of column c-1 (full-adder carries first). Bits above the column's
// new height are zero. Purely combinational.
//
// Interface: din and dout are 2N columns of N bit positions; only the
// positions below the column heights of wallace_pkg carry data, the rest of
// din must be zero and the rest of dout is zero.
module wallace_layer
  import wallace_pkg::*;
#(
  parameter int N     = 32,
  parameter int LAYER = 1
) (
  input  logic [2*N-1:0][N-1:0] din,
  output logic [2*N-1:0][N-1:0] dout
);
  localparam colv_t HIN = heights(N, LAYER - 1);
  localparam colv_t HA  = ha_flags(N, HIN);

  // per-column adder sums and carries, FA outputs first, then the HA output
  logic [2*N-1:0][N-1:0] sm;
  logic [2*N-1:0][N-1:0] cy;

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int F   = int'(HIN[c]) / 3;          // full adders
    localparam int R   = int'(HIN[c]) % 3;          // leftover bits
    localparam int A   = int'(HA[c]);               // half adder present
    localparam int POS = F + ((A != 0) ? 1 : R);    // first carry-in slot
    localparam int NCI = (c == 0) ? 0 : int'(HIN[c-1]) / 3 + int'(HA[c-1]);

    for (genvar k = 0; k < N; k++) begin : g_add
      if (k < F) begin : g_fa
        full_adder u_fa (.x(din[c][3*k +: 3]), .s(sm[c][k]), .co(cy[c][k]));
      end else if (k == F && A != 0) begin : g_ha
        half_adder u_ha (.x(din[c][3*F +: 2]), .s(sm[c][k]), .co(cy[c][k]));
      end else begin : g_none
        assign sm[c][k] = 1'b0;
        assign cy[c][k] = 1'b0;
      end
    end

    for (genvar k = 0; k < N; k++) begin : g_out
      if (k < F || (k == F && A != 0)) begin : g_sum
        assign dout[c][k] = sm[c][k];
      end else if (k < POS) begin : g_pass
        assign dout[c][k] = din[c][3*F + (k - F)];
      end else if (k < POS + NCI) begin : g_carry
        assign dout[c][k] = cy[c-1][k-POS];
      end else begin : g_zero
        assign dout[c][k] = 1'b0;
      end
    end
  end
endmodule
