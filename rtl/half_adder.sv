// half_adder: processing element of the folded-tree multiplier's PE row.
// Adds two bits: s = x ^ y, c = x & y. Combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
