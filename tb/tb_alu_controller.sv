// tb_alu_controller: self-checking testbench of the ALU controller.
//
// Drives random opcodes (all eight codes), operands and reset, and after
// every rising clock edge compares the registered unit enables, operands and
// multiplier start pulse with a model written here: enables one-hot from
// the operation table (none for 101..111), everything cleared when rst was
// 0, and start raised when multiply is newly selected or its operands
// change. Runs of repeated opcodes and operands make both kinds of start
// (and their absence) occur; the test counts each and fails if one never
// happened. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_alu_controller;
  import alu_pkg::*;

  localparam int unsigned WIDTH = 8;

  logic             clk = 1'b0;
  logic             rst = 1'b0;
  logic [2:0]       opcode = '0;
  logic [WIDTH-1:0] a_in = '0, b_in = '0;
  unit_sel_t        sel;
  logic [WIDTH-1:0] a_q, b_q;
  logic             mul_start;
  int checks = 0, failures = 0;
  int n_new_mul = 0, n_operand_restart = 0, n_mul_hold = 0, n_reset = 0;

  always #5 clk = ~clk;

  alu_controller #(.WIDTH(WIDTH)) dut (
    .clk(clk), .rst(rst), .opcode(opcode), .a_in(a_in), .b_in(b_in),
    .sel(sel), .a_q(a_q), .b_q(b_q), .mul_start(mul_start));

  function automatic logic [4:0] model_sel(input logic [2:0] op);
    // bit order: add, sub, mul, and, or
    case (op)
      3'b000:  return 5'b10000;
      3'b001:  return 5'b01000;
      3'b010:  return 5'b00100;
      3'b011:  return 5'b00010;
      3'b100:  return 5'b00001;
      default: return 5'b00000;
    endcase
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [4:0]       m_sel   = '0;
    logic [WIDTH-1:0] m_a     = '0, m_b = '0;
    logic             m_start = 1'b0;
    logic [4:0]       nxt;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      rst = (cyc < 2) ? 1'b0 : (($urandom % 50) != 0);
      if (($urandom % 4) == 0) opcode = 3'($urandom);
      if (($urandom % 4) == 0) a_in = WIDTH'($urandom);
      if (($urandom % 4) == 0) b_in = WIDTH'($urandom);
      // Model of the edge about to happen.
      if (!rst) begin
        n_reset++;
        m_sel = '0; m_a = '0; m_b = '0; m_start = 1'b0;
      end else begin
        nxt = model_sel(opcode);
        m_start = nxt[2] && (!m_sel[2] || a_in != m_a || b_in != m_b);
        if (nxt[2] && !m_sel[2]) n_new_mul++;
        else if (nxt[2] && m_start) n_operand_restart++;
        else if (nxt[2]) n_mul_hold++;
        m_sel = nxt; m_a = a_in; m_b = b_in;
      end
      @(posedge clk); #1;
      check(32'(sel), 32'(m_sel), "unit enables");
      check(32'(a_q), 32'(m_a), "operand A register");
      check(32'(b_q), 32'(m_b), "operand B register");
      check(32'(mul_start), 32'(m_start), "multiplier start");
    end
    checks++;
    if (n_new_mul == 0 || n_operand_restart == 0 || n_mul_hold == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL coverage: new=%0d restart=%0d hold=%0d reset=%0d",
               n_new_mul, n_operand_restart, n_mul_hold, n_reset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
