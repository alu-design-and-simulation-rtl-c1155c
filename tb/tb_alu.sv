// tb_alu: end-to-end self-checking testbench of the clock-gated 8-bit ALU,
// at its default parameters.
//
// Part 1 replays operation sequences of the ALU's published waveforms (for
// example 255+158 = 413, 200-45 = 155, 9*8 = 72, 15 AND 8 = 8, 255 OR 50 =
// 255) and checks each result and its latency: 2 clock edges after the
// inputs are sampled for add, subtract, AND and OR, WIDTH+2 for multiply,
// and ALU_OUT = 0 in reset and for opcodes 101..111.
// Part 2 drives random runs of opcodes, operands and resets and compares
// ALU_OUT after every edge with a cycle model kept here (operand and enable
// registers, gated units, an 8-edge multiplier, the output register), with
// results computed by plain integer arithmetic.
// Throughout, it watches the five gated clocks: a unit's clock may tick only
// while its enable is set, and every gated clock must tick at some point.
// It counts each mechanism (every operation, reset, invalid opcode, a
// multiply restarted by new operands, a multiply interrupted by another
// operation) and fails if one never happened. Ends with a TB_RESULT line;
// a watchdog stops a hung run.
module tb_alu;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned OUTW  = 16;

  logic             clk = 1'b0;
  logic             rst = 1'b0;
  logic [2:0]       opcode = '0;
  logic [WIDTH-1:0] A = '0, B = '0;
  logic [OUTW-1:0]  ALU_OUT;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_op [8];
  int n_reset = 0, n_mul_restart = 0, n_mul_interrupt = 0;
  int n_gclk [5];          // gated clock edges: add, sub, mul, and, or
  int n_stray = 0;         // gated clock edges of a unit that is not selected

  always #5 clk = ~clk;

  alu dut (.clk(clk), .rst(rst), .opcode(opcode), .A(A), .B(B), .ALU_OUT(ALU_OUT));

  // Gated clocks: count edges and check each only ticks while enabled.
  always @(posedge dut.en_add) begin n_gclk[0]++; if (!dut.u_ctrl.sel.add_sel) n_stray++; end
  always @(posedge dut.en_sub) begin n_gclk[1]++; if (!dut.u_ctrl.sel.sub_sel) n_stray++; end
  always @(posedge dut.en_mul) begin n_gclk[2]++; if (!dut.u_ctrl.sel.mul_sel) n_stray++; end
  always @(posedge dut.en_and) begin n_gclk[3]++; if (!dut.u_ctrl.sel.and_sel) n_stray++; end
  always @(posedge dut.en_or)  begin n_gclk[4]++; if (!dut.u_ctrl.sel.or_sel)  n_stray++; end

  task automatic check(input logic [OUTW-1:0] got, input logic [OUTW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [OUTW-1:0] ref_result(input logic [2:0] op, input logic [WIDTH-1:0] x,
                                                 input logic [WIDTH-1:0] y);
    case (op)
      3'b000:  return OUTW'(int'(x) + int'(y));
      3'b001:  return OUTW'(int'(x) - int'(y));
      3'b010:  return OUTW'(int'(x) * int'(y));
      3'b011:  return OUTW'(x & y);
      3'b100:  return OUTW'(x | y);
      default: return '0;
    endcase
  endfunction

  // Part 1: apply one operation, hold it, and check the result appears
  // exactly at its latency.
  task automatic directed(input logic [2:0] op, input logic [WIDTH-1:0] x,
                          input logic [WIDTH-1:0] y, input logic [OUTW-1:0] expected);
    int lat;
    lat = (op == 3'b010) ? WIDTH + 2 : 2;
    @(negedge clk);
    opcode = op; A = x; B = y;
    n_op[op]++;
    repeat (lat) @(posedge clk);
    #1;
    if (op == 3'b010) check(ALU_OUT, '0, $sformatf("multiply %0d*%0d still busy", x, y));
    @(posedge clk); #1;
    check(ALU_OUT, expected, $sformatf("op %03b on %0d, %0d at latency %0d", op, x, y, lat));
    check(expected, ref_result(op, x, y), "published value against integer arithmetic");
    repeat (2) @(posedge clk); #1;
    check(ALU_OUT, expected, $sformatf("op %03b on %0d, %0d held", op, x, y));
  endtask

  // Cycle model of the ALU for part 2.
  logic [2:0]       m_op_q;              // opcode held by the enable register
  logic [WIDTH-1:0] m_a_q, m_b_q;
  logic             m_start;
  logic [2:0]       m_op_d;              // output select
  logic [OUTW-1:0]  m_res [5];           // last result of each unit
  logic             m_mul_busy, m_mul_done;
  int               m_mul_cnt;
  logic [WIDTH-1:0] m_mul_a, m_mul_b;
  logic [OUTW-1:0]  m_out;

  function automatic int unit_of(input logic [2:0] op);
    return (op <= 3'b100) ? int'(op) : -1;
  endfunction

  // Advance the model by one rising clock edge, with the inputs of that edge.
  task automatic model_edge(input logic r, input logic [2:0] op,
                            input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    logic [OUTW-1:0] new_out;
    // Output register: select delayed by one edge.
    if (!r) new_out = '0;
    else begin
      case (m_op_d)
        3'b000, 3'b001, 3'b011, 3'b100: new_out = m_res[m_op_d];
        3'b010:  new_out = m_mul_done ? m_res[2] : '0;
        default: new_out = '0;
      endcase
    end
    // Gated units tick when the registered enable selects them.
    case (m_op_q)
      3'b000, 3'b001, 3'b011, 3'b100: m_res[m_op_q] = ref_result(m_op_q, m_a_q, m_b_q);
      3'b010: begin
        if (m_start) begin
          m_mul_busy = 1'b1; m_mul_done = 1'b0; m_mul_cnt = 0;
          m_mul_a = m_a_q; m_mul_b = m_b_q;
        end else if (m_mul_busy) begin
          m_mul_cnt++;
          if (m_mul_cnt == WIDTH) begin
            m_mul_busy = 1'b0; m_mul_done = 1'b1;
            m_res[2] = ref_result(3'b010, m_mul_a, m_mul_b);
          end
        end
      end
      default: ;
    endcase
    m_op_d = r ? m_op_q : 3'b111;
    // Controller registers.
    if (!r) begin
      m_op_q = 3'b111; m_a_q = '0; m_b_q = '0; m_start = 1'b0;
    end else begin
      m_start = (op == 3'b010) && (m_op_q != 3'b010 || x != m_a_q || y != m_b_q);
      if (op == 3'b010 && m_op_q == 3'b010 && m_start) n_mul_restart++;
      if (m_op_q == 3'b010 && op != 3'b010 && m_mul_busy) n_mul_interrupt++;
      m_op_q = (op <= 3'b100) ? op : 3'b111;
      m_a_q = x; m_b_q = y;
    end
    m_out = new_out;
  endtask

  initial begin
    // Reset: ALU_OUT is zero while rst = 0.
    rst = 1'b0; opcode = 3'b001; A = 8'd255; B = 8'd255;
    repeat (3) @(posedge clk); #1;
    check(ALU_OUT, '0, "zero in reset");
    n_reset++;
    @(negedge clk); rst = 1'b1;

    // Part 1: sequences of the published waveforms.
    directed(3'b000, 8'd255, 8'd158, 16'd413);
    directed(3'b001, 8'd200, 8'd45,  16'd155);
    directed(3'b010, 8'd9,   8'd8,   16'd72);
    directed(3'b000, 8'd55,  8'd25,  16'd80);
    directed(3'b001, 8'd200, 8'd85,  16'd115);
    directed(3'b011, 8'd15,  8'd8,   16'd8);
    directed(3'b100, 8'd255, 8'd50,  16'd255);
    directed(3'b010, 8'd12,  8'd5,   16'd60);
    directed(3'b011, 8'hFF,  8'h32,  16'h0032);
    directed(3'b100, 8'h7D,  8'hFF,  16'h00FF);
    directed(3'b000, 8'hFF,  8'hFF,  16'h01FE);
    directed(3'b001, 8'hFA,  8'h32,  16'h00C8);
    directed(3'b011, 8'hFA,  8'hFF,  16'h00FA);
    directed(3'b100, 8'hFF,  8'h33,  16'h00FF);
    directed(3'b010, 8'hFF,  8'hFF,  16'hFE01);
    directed(3'b001, 8'd1,   8'd2,   16'hFFFF);
    directed(3'b101, 8'd7,   8'd9,   16'd0);
    directed(3'b111, 8'd7,   8'd9,   16'd0);

    // Part 2: random runs against the cycle model, starting from reset.
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1;
    model_edge(1'b0, opcode, A, B);
    m_res = '{default: '0};
    m_mul_busy = 1'b0; m_mul_done = 1'b0; m_mul_cnt = 0;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      rst = (($urandom % 200) != 0);
      if (!rst) n_reset++;
      // Runs: the opcode is kept for a random stretch, long enough for a
      // multiply to finish most of the time.
      if (($urandom % 12) == 0) opcode = 3'($urandom);
      if (($urandom % 20) == 0) A = WIDTH'($urandom);
      if (($urandom % 20) == 0) B = WIDTH'($urandom);
      n_op[opcode]++;
      @(posedge clk); #1;
      model_edge(rst, opcode, A, B);
      check(ALU_OUT, m_out, $sformatf("cycle %0d op %03b", cyc, opcode));
    end

    // Mechanisms that must have happened.
    for (int op = 0; op < 8; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("FAIL opcode %03b never used", op); end
    end
    for (int u = 0; u < 5; u++) begin
      checks++;
      if (n_gclk[u] == 0) begin failures++; $display("FAIL gated clock %0d never ticked", u); end
    end
    checks++;
    if (n_stray != 0) begin failures++; $display("FAIL %0d gated clock edges of unselected units", n_stray); end
    checks++;
    if (n_reset == 0 || n_mul_restart == 0 || n_mul_interrupt == 0) begin
      failures++;
      $display("FAIL coverage: reset=%0d mul restart=%0d mul interrupt=%0d",
               n_reset, n_mul_restart, n_mul_interrupt);
    end
    $display("mechanisms: add=%0d sub=%0d mul=%0d and=%0d or=%0d invalid=%0d reset=%0d mul_restart=%0d mul_interrupt=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5] + n_op[6] + n_op[7],
             n_reset, n_mul_restart, n_mul_interrupt);
    $display("gated clock edges: en_add=%0d en_sub=%0d en_mul=%0d en_and=%0d en_or=%0d",
             n_gclk[0], n_gclk[1], n_gclk[2], n_gclk[3], n_gclk[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
