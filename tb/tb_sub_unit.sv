// tb_sub_unit: self-checking testbench of sub_unit, the ALU's subtraction unit.
//
// Applies all 65,536 pairs of 8-bit operands, one per gated clock edge, and
// compares the registered result with A - B as a sign-extended two's-complement value, worked out here with
// ordinary integer arithmetic. It also checks that the result holds while
// the gated clock is stopped, and runs random operands through a 16-bit
// instance (32-bit result) to exercise the width parameter.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_sub_unit;

  localparam int unsigned WIDTH     = 8;
  localparam int unsigned OUT_WIDTH = 16;
  localparam int unsigned W2        = 16;
  localparam int unsigned OUTW2     = 32;

  logic                 clk = 1'b0;
  logic                 gate_en = 1'b1;
  logic                 gclk;
  logic [WIDTH-1:0]     a = '0, b = '0;
  logic [OUT_WIDTH-1:0] result;
  logic [W2-1:0]        a2 = '0, b2 = '0;
  logic [OUTW2-1:0]     result2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign gclk = clk & gate_en;   // the testbench gates its own clock

  sub_unit #(.WIDTH(WIDTH), .OUT_WIDTH(OUT_WIDTH)) dut (
    .gclk(gclk), .a(a), .b(b), .result(result));

  sub_unit #(.WIDTH(W2), .OUT_WIDTH(OUTW2)) dut16 (
    .gclk(gclk), .a(a2), .b(b2), .result(result2));

  task automatic check(input logic [OUTW2-1:0] got, input logic [OUTW2-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [OUT_WIDTH-1:0] held;
    logic [OUT_WIDTH-1:0] exp8;   // reference, truncated to the output width
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      a = WIDTH'(i >> 8);
      b = WIDTH'(i);
      @(posedge clk); #1;
      exp8 = OUT_WIDTH'(a) - OUT_WIDTH'(b);
      check(OUTW2'(result), OUTW2'(exp8), $sformatf("8-bit a=%0d b=%0d", a, b));
    end
    // Clock stopped: new operands must not reach the result.
    held = result;
    @(negedge clk); gate_en = 1'b0; a = 8'h5A; b = 8'hC3;
    repeat (3) @(posedge clk); #1;
    check(OUTW2'(result), OUTW2'(held), "hold while the clock is gated off");
    @(negedge clk); gate_en = 1'b1;
    @(posedge clk); #1;
    exp8 = OUT_WIDTH'(a) - OUT_WIDTH'(b);
    check(OUTW2'(result), OUTW2'(exp8), "update once the clock runs again");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a2 = W2'($urandom);
      b2 = W2'($urandom);
      @(posedge clk); #1;
      check(result2, OUTW2'(a2) - OUTW2'(b2), $sformatf("16-bit a=%0d b=%0d", a2, b2));
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
