// fa_cell: full adder used as a (3,2)-counter.
//
// Counts the ones among three input bits and gives the count as a sum bit s
// (weight 1) and a carry bit c (weight 2): s = x ^ y ^ z, c = majority(x,y,z).
// Two XOR levels on the sum path. Purely combinational.
module fa_cell (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  logic xy;

  assign xy = x ^ y;
  assign s  = xy ^ z;
  assign c  = (x & y) | (xy & z);

endmodule
