// wallace_section - COUNT consecutive Wallace layers, FIRST..FIRST+COUNT-1.
//
// The multiplier cuts its Wallace structure into two sections with a
// pipeline register between them: layers 1-4 (eight gate delays after the
// AND-array) and layers 5-8 (eight gate delays before the final adder). This
// module chains the wallace_layer instances of one such section. Purely
// combinational; din is the matrix entering layer FIRST, dout the matrix
// leaving layer FIRST+COUNT-1 (column format as in wallace_layer).
module wallace_section #(
  parameter int N     = 32,
  parameter int FIRST = 1,
  parameter int COUNT = 4
) (
  input  logic [2*N-1:0][N-1:0] din,
  output logic [2*N-1:0][N-1:0] dout
);
  logic [2*N-1:0][N-1:0] stage [COUNT+1];

  assign stage[0] = din;
  for (genvar l = 0; l < COUNT; l++) begin : g_layer
    wallace_layer #(.N(N), .LAYER(FIRST + l)) u_layer (
      .din (stage[l]),
      .dout(stage[l+1])
    );
  end
  assign dout = stage[COUNT];
endmodule
