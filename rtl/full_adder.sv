// full_adder: processing element of the folded-tree multiplier's PE row.
// Adds three bits: s = x ^ y ^ z, c = majority(x, y, z). Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
