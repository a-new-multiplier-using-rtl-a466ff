// full_adder - (3,2) counter, the main mixed adder of the Wallace layers.
//
// Adds three bits of the same column: s keeps the column's weight, co goes
// to the next column up. Purely combinational. The gate form (two XORs for
// the sum, majority for the carry) is this implementation's choice; only the
// function is fixed by the design.
module full_adder (
  input  logic [2:0] x,
  output logic       s,
  output logic       co
);
  assign s  = x[0] ^ x[1] ^ x[2];
  assign co = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
endmodule
