// ladner_fischer: the ALU's addition unit (opcode 000), A + B.
//
// The sum comes from lf_prefix_adder, a Ladner-Fischer parallel-prefix adder
// (generate/propagate pre-processing, a prefix carry tree, XOR
// post-processing). The 9-bit sum, carry included, is zero-extended to the
// 16-bit ALU output width and captured in a result register.
//
// The register runs on the unit's own gated clock (en_add): while another
// operation is selected the clock is stopped and the register, and so the
// unit's switching, is frozen. The result is valid from the first gated
// clock edge after the operands were presented. The register has no reset:
// its clock is stopped during reset, and the ALU reads it only after the
// unit has been clocked with the current operands.
module ladner_fischer #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic                 gclk,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [OUT_WIDTH-1:0] result
);

  logic [WIDTH-1:0] sum;
  logic             cout;

  lf_prefix_adder #(.WIDTH(WIDTH)) u_lfa (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (sum),
    .cout (cout)
  );

  always_ff @(posedge gclk) begin
    result <= OUT_WIDTH'({cout, sum});
  end

endmodule
