// alu_controller: opcode decode and unit enables of the clock-gated ALU.
//
// On every rising clock edge:
//   rst = 0 : the unit enables, the operand registers and the multiplier
//             start are cleared (reset is active low and synchronous);
//   rst = 1 : the opcode is decoded into the one-hot enables ADD_select,
//             SUB_select, MUL_select, AND_select, OR_select (none for codes
//             101..111) and the operands A and B are registered.
// The enables drive the clock gates of the five functional units, and the
// registered operands feed all units. mul_start is a one-cycle pulse, issued
// with the enable when multiplication is newly selected or when A or B
// change while it stays selected, that (re)starts the iterative multiplier.
// Registering the operands and the start rule are this design's choices.
//
// Timing: opcode and operands sampled at edge k appear on sel, a_q and b_q
// after edge k; the selected unit's gated clock then first ticks at k+1.
module alu_controller
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       opcode,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  output unit_sel_t        sel,
  output logic [WIDTH-1:0] a_q,
  output logic [WIDTH-1:0] b_q,
  output logic             mul_start
);

  unit_sel_t next_sel;

  assign next_sel = decode_opcode(opcode);

  always_ff @(posedge clk) begin
    if (!rst) begin
      sel       <= '0;
      a_q       <= '0;
      b_q       <= '0;
      mul_start <= 1'b0;
    end else begin
      sel       <= next_sel;
      a_q       <= a_in;
      b_q       <= b_in;
      mul_start <= next_sel.mul_sel && (!sel.mul_sel || a_in != a_q || b_in != b_q);
    end
  end

  // Out of reset, at most one functional unit is ever enabled.
  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst) $onehot0(sel));

endmodule
