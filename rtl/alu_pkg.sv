// alu_pkg: types and constants shared by the 8-bit clock-gated ALU.
//
// The opcode encoding is the ALU's operation table: 000 add, 001 subtract,
// 010 multiply, 011 bitwise AND, 100 bitwise OR. Codes 101..111 select no
// unit and the ALU output is zero. unit_sel_t is the one-hot set of unit
// enables (ADD_select .. OR_select) that the controller registers and that
// the clock gates turn into the per-unit gated clocks en_add .. en_or.
package alu_pkg;

  typedef enum logic [2:0] {
    OP_ADD = 3'b000,
    OP_SUB = 3'b001,
    OP_MUL = 3'b010,
    OP_AND = 3'b011,
    OP_OR  = 3'b100
  } opcode_e;

  // One-hot unit enables; at most one bit is set.
  typedef struct packed {
    logic add_sel;
    logic sub_sel;
    logic mul_sel;
    logic and_sel;
    logic or_sel;
  } unit_sel_t;

  // Opcode decoder shared by the controller and by the testbenches' models.
  function automatic unit_sel_t decode_opcode(input logic [2:0] opcode);
    unit_sel_t s;
    s = '0;
    case (opcode)
      OP_ADD:  s.add_sel = 1'b1;
      OP_SUB:  s.sub_sel = 1'b1;
      OP_MUL:  s.mul_sel = 1'b1;
      OP_AND:  s.and_sel = 1'b1;
      OP_OR:   s.or_sel  = 1'b1;
      default: s = '0;
    endcase
    return s;
  endfunction

endpackage
