// half_adder - (2,2) counter, the second kind of mixed adder.
//
// Adds two bits of the same column: s keeps the column's weight, co goes to
// the next column up. Used in a Wallace layer only where a column's leftover
// pair must be shortened (see wallace_pkg). Purely combinational.
module half_adder (
  input  logic [1:0] x,
  output logic       s,
  output logic       co
);
  assign s  = x[0] ^ x[1];
  assign co = x[0] & x[1];
endmodule
