// or_unit: the ALU's logical OR unit (opcode 100), bitwise A | B.
//
// One OR gate per bit; the 8-bit result is zero-extended to the 16-bit
// output width and captured in a result register clocked by the unit's
// gated clock (en_or), so the unit is frozen while another operation is
// selected. The result is valid after the first gated clock edge. The
// register has no reset: the ALU reads it only after clocking it.
module or_unit #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic                 gclk,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [OUT_WIDTH-1:0] result
);

  always_ff @(posedge gclk) begin
    result <= OUT_WIDTH'(a | b);
  end

endmodule
