// sub_unit: the ALU's subtraction unit (opcode 001), A - B.
//
// The difference is formed as A + ~B + 1 on a Ladner-Fischer prefix adder
// (lf_prefix_adder with carry-in 1). The carry out is the "no borrow" flag,
// so {~cout, diff} is the exact 9-bit two's-complement difference; it is
// sign-extended to the 16-bit output, so A < B gives a negative result
// (for example 1 - 2 = 16'hFFFF). Reusing the prefix adder and the
// sign-extension are this design's choices; only the operation is fixed.
//
// The result register runs on the gated clock en_sub and has no reset (the
// ALU reads it only after clocking it); the result is valid after the first
// gated clock edge.
module sub_unit #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic                 gclk,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [OUT_WIDTH-1:0] result
);

  logic [WIDTH-1:0] diff;
  logic             no_borrow;
  logic [WIDTH:0]   diff_ext;   // 9-bit two's-complement difference

  lf_prefix_adder #(.WIDTH(WIDTH)) u_lfa (
    .a    (a),
    .b    (~b),
    .cin  (1'b1),
    .sum  (diff),
    .cout (no_borrow)
  );

  assign diff_ext = {~no_borrow, diff};

  always_ff @(posedge gclk) begin
    result <= OUT_WIDTH'($signed(diff_ext));
  end

endmodule
