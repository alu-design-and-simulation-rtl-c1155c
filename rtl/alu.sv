// alu: 8-bit ALU with a Ladner-Fischer adder, a folded-tree multiplier and
// per-unit clock gating.
//
// Operations (opcode): 000 A+B, 001 A-B, 010 A*B, 011 A AND B, 100 A OR B;
// any other code gives ALU_OUT = 0. rst is active low: while rst = 0 the
// enables, registered operands and ALU_OUT are cleared at each clock edge.
//
// Structure: alu_controller registers the operands and decodes the opcode
// into one-hot enables. Each functional unit (ladner_fischer, sub_unit,
// folded_tree_multiplier, and_unit, or_unit) has its own clock_gate, so only
// the selected unit is clocked (gated clocks en_add, en_sub, en_mul, en_and,
// en_or); the others hold their last result. ALU_OUT is a register that
// takes the result of the unit selected one cycle earlier.
//
// Timing (rising edges of clk): opcode, A and B sampled at edge k give
// ALU_OUT after edge k+2 for add, subtract, AND and OR. A multiplication
// takes WIDTH more gated-clock iterations: ALU_OUT reads 0 after edge k+2
// and the product after edge k+WIDTH+2 (k+10 at WIDTH = 8); changing A or B
// while 010 stays selected restarts it. The operand and output registers,
// the latch-based gates and this latency are this design's choices; the
// operation table, the widths (8-bit operands, 16-bit ALU_OUT), the active-
// low reset and the opcode-driven gated clocks follow the ALU's definition.
module alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2:0]           opcode,
  input  logic [WIDTH-1:0]     A,
  input  logic [WIDTH-1:0]     B,
  output logic [OUT_WIDTH-1:0] ALU_OUT
);

  unit_sel_t        sel;       // enables registered by the controller
  unit_sel_t        sel_d;     // the same, one cycle later: output select
  logic [WIDTH-1:0] a_q, b_q;
  logic             mul_start;

  logic en_add, en_sub, en_mul, en_and, en_or;   // gated clocks
  logic [OUT_WIDTH-1:0] add_res, sub_res, mul_res, and_res, or_res;
  logic                 mul_done;

  alu_controller #(.WIDTH(WIDTH)) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .opcode    (opcode),
    .a_in      (A),
    .b_in      (B),
    .sel       (sel),
    .a_q       (a_q),
    .b_q       (b_q),
    .mul_start (mul_start)
  );

  clock_gate u_gate_add (.clk(clk), .en(sel.add_sel), .gclk(en_add));
  clock_gate u_gate_sub (.clk(clk), .en(sel.sub_sel), .gclk(en_sub));
  clock_gate u_gate_mul (.clk(clk), .en(sel.mul_sel), .gclk(en_mul));
  clock_gate u_gate_and (.clk(clk), .en(sel.and_sel), .gclk(en_and));
  clock_gate u_gate_or  (.clk(clk), .en(sel.or_sel),  .gclk(en_or));

  ladner_fischer #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) u_add (
    .gclk(en_add), .a(a_q), .b(b_q), .result(add_res));

  sub_unit #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) u_sub (
    .gclk(en_sub), .a(a_q), .b(b_q), .result(sub_res));

  folded_tree_multiplier #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) u_mul (
    .gclk(en_mul), .start(mul_start), .a(a_q), .b(b_q),
    .result(mul_res), .done(mul_done));

  and_unit #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) u_and (
    .gclk(en_and), .a(a_q), .b(b_q), .result(and_res));

  or_unit #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) u_or (
    .gclk(en_or), .a(a_q), .b(b_q), .result(or_res));

  always_ff @(posedge clk) begin
    if (!rst) begin
      sel_d   <= '0;
      ALU_OUT <= '0;
    end else begin
      sel_d <= sel;
      unique case (1'b1)
        sel_d.add_sel: ALU_OUT <= add_res;
        sel_d.sub_sel: ALU_OUT <= sub_res;
        sel_d.mul_sel: ALU_OUT <= mul_done ? mul_res : '0;
        sel_d.and_sel: ALU_OUT <= and_res;
        sel_d.or_sel:  ALU_OUT <= or_res;
        default:       ALU_OUT <= '0;
      endcase
    end
  end

endmodule
