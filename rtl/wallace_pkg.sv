// wallace_pkg - shape of the Wallace bit matrix, computed at elaboration.
//
// The Wallace structure is described column by column: after the AND-array,
// column c of an N x N product holds min(c+1, 2N-1-c) bits, and every layer
// of mixed adders shrinks the columns by about 3/2 until no column holds more
// than two bits. The functions below work out, for any operand width N, how
// many bits each column holds after each layer and where the adders go. The
// RTL modules use them as constants, so the hardware is fixed at
// elaboration; nothing here is evaluated at run time.
//
// Placement rule of one layer (the rule that reproduces the per-layer adder
// counts and register sizes quoted for the 16-bit and 32-bit multipliers):
//   * every complete group of three bits in a column gets a full adder;
//   * one or two bits left over pass straight through, except that a pair of
//     leftover bits gets a half adder
//       - in the lowest column that holds exactly two bits (this lets the
//         columns at the low end settle to single bits one by one, so the
//         final two-operand adder can start above them), and
//       - in any column that would otherwise exceed the layer's target
//         height, the height reached if every leftover pair had a half adder.
//   * sums stay in their column; carries move to the next column up.
// Layers are added until every column holds at most two bits.
//
// Bit order inside a column after a layer: full-adder sums first, then the
// half-adder sum or the pass-through bits, then the carries from the column
// below. This order is a choice of this implementation.
package wallace_pkg;

  // Largest operand width the constant tables support.
  localparam int MAXN = 64;
  localparam int MAXC = 2 * MAXN;

  // One 8-bit entry per column (heights, adder counts or flags).
  typedef bit [MAXC-1:0][7:0] colv_t;

  // Column heights of the AND-array output.
  function automatic colv_t initial_heights(int n);
    colv_t h = '0;
    for (int c = 0; c < 2 * n - 1; c++) h[c] = 8'((c < n) ? c + 1 : 2 * n - 1 - c);
    return h;
  endfunction

  function automatic int max_height(int n, colv_t h);
    int m = 0;
    for (int c = 0; c < 2 * n; c++) if (int'(h[c]) > m) m = int'(h[c]);
    return m;
  endfunction

  // Half-adder flags (1 in entry c: column c has a half adder) of a layer
  // whose input column heights are h.
  function automatic colv_t ha_flags(int n, colv_t h);
    colv_t ha  = '0;
    int    t   = 0;
    int    cin = 0;
    int    low = -1;
    int    f, r, o;
    // target height: every leftover pair gets a half adder
    for (int c = 0; c < 2 * n; c++) begin
      f   = int'(h[c]) / 3;
      r   = int'(h[c]) % 3;
      o   = f + ((r > 0) ? 1 : 0) + cin;
      if (o > t) t = o;
      cin = f + ((r == 2) ? 1 : 0);
    end
    for (int c = 0; c < 2 * n; c++) if (low < 0 && h[c] == 8'd2) low = c;
    cin = 0;
    for (int c = 0; c < 2 * n; c++) begin
      f = int'(h[c]) / 3;
      r = int'(h[c]) % 3;
      if (r == 2 && (c == low || f + r + cin > t)) ha[c] = 8'd1;
      cin = f + int'(ha[c]);
    end
    return ha;
  endfunction

  // Column heights after one layer whose input heights are h.
  function automatic colv_t next_heights(int n, colv_t h);
    colv_t ha  = ha_flags(n, h);
    colv_t o   = '0;
    int    cin = 0;
    int    f, r;
    for (int c = 0; c < 2 * n; c++) begin
      f    = int'(h[c]) / 3;
      r    = int'(h[c]) % 3;
      o[c] = 8'(f + ((ha[c] != 0) ? 1 : r) + cin);
      cin  = f + int'(ha[c]);
    end
    return o;
  endfunction

  // Column heights after `layer` layers (layer 0 is the AND-array output).
  function automatic colv_t heights(int n, int layer);
    colv_t h = initial_heights(n);
    for (int l = 0; l < layer; l++) h = next_heights(n, h);
    return h;
  endfunction

  // Number of Wallace layers needed to reach at most two bits per column.
  function automatic int num_layers(int n);
    colv_t h = initial_heights(n);
    int    l = 0;
    for (int k = 0; k < 4 * MAXN; k++) begin
      if (max_height(n, h) > 2) begin
        h = next_heights(n, h);
        l++;
      end
    end
    return l;
  endfunction

  // Mixed adders (full plus half) used in layer `layer` (1-based).
  function automatic int layer_adders(int n, int layer);
    colv_t h  = heights(n, layer - 1);
    colv_t ha = ha_flags(n, h);
    int    s  = 0;
    for (int c = 0; c < 2 * n; c++) s += int'(h[c]) / 3 + int'(ha[c]);
    return s;
  endfunction

  // Total number of bits in the matrix after `layer` layers.
  function automatic int layer_bits(int n, int layer);
    colv_t h = heights(n, layer);
    int    s = 0;
    for (int c = 0; c < 2 * n; c++) s += int'(h[c]);
    return s;
  endfunction

  // Position of the first bit of column c when the matrix after `layer`
  // layers is packed column by column, lowest column first.
  function automatic int bit_offset(int n, int layer, int col);
    colv_t h = heights(n, layer);
    int    s = 0;
    for (int c = 0; c < col; c++) s += int'(h[c]);
    return s;
  endfunction

  // Lowest column that still holds two bits after the last layer: the
  // two-operand adder starts here, every column below holds a single bit.
  function automatic int adder_base(int n);
    colv_t h   = heights(n, num_layers(n));
    int    low = 2 * n;
    for (int c = 2 * n - 1; c >= 0; c--) if (h[c] == 8'd2) low = c;
    return low;
  endfunction

endpackage
