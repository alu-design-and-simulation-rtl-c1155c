// tb_folded_tree_multiplier: self-checking testbench of the folded-tree
// multiplier.
//
// For all 65,536 pairs of 8-bit operands it pulses start, counts the gated
// clock edges until done, and checks both the product (against integer
// multiplication) and the latency: done must rise exactly WIDTH edges after
// the start edge, and not before. It also checks that a start in the middle
// of a computation restarts it with the new operands, that stopping the
// gated clock mid-computation only delays the product, and runs random
// operands through a 16-bit instance. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_folded_tree_multiplier;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned OUTW  = 16;
  localparam int unsigned W2    = 16;
  localparam int unsigned OUTW2 = 32;

  logic              clk = 1'b0;
  logic              gate_en = 1'b1;
  logic              gclk;
  logic              start = 1'b0, start2 = 1'b0;
  logic [WIDTH-1:0]  a = '0, b = '0;
  logic [OUTW-1:0]   result;
  logic              done;
  logic [W2-1:0]     a2 = '0, b2 = '0;
  logic [OUTW2-1:0]  result2;
  logic              done2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign gclk = clk & gate_en;

  folded_tree_multiplier #(.WIDTH(WIDTH), .OUT_WIDTH(OUTW)) dut (
    .gclk(gclk), .start(start), .a(a), .b(b), .result(result), .done(done));

  folded_tree_multiplier #(.WIDTH(W2), .OUT_WIDTH(OUTW2)) dut16 (
    .gclk(gclk), .start(start2), .a(a2), .b(b2), .result(result2), .done(done2));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Start one 8-bit multiplication and return the number of edges to done.
  task automatic run8(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y, output int edges);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    edges = 0;
    while (!done && edges < 4 * WIDTH) begin
      @(posedge clk); #1;
      edges++;
    end
  endtask

  initial begin
    int edges;
    for (int i = 0; i < 65536; i++) begin
      run8(WIDTH'(i >> 8), WIDTH'(i), edges);
      check(64'(result), 64'(a) * 64'(b), $sformatf("product %0d*%0d", a, b));
      check(64'(edges), 64'(WIDTH), $sformatf("latency %0d*%0d", a, b));
    end

    // Restart in the middle of a computation.
    @(negedge clk); a = 8'd201; b = 8'd77; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    a = 8'd9; b = 8'd8; start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    check(64'(done), 64'(0), "done low after a restart");
    edges = 0;
    while (!done && edges < 4 * WIDTH) begin @(posedge clk); #1; edges++; end
    check(64'(result), 64'(72), "restarted product 9*8");
    check(64'(edges), 64'(WIDTH), "restarted latency");

    // Gated clock stopped for five cycles in the middle of a computation.
    @(negedge clk); a = 8'd12; b = 8'd5; start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk); gate_en = 1'b0;
    repeat (5) @(negedge clk);
    check(64'(done), 64'(0), "frozen while the clock is gated off");
    gate_en = 1'b1;
    edges = 0;
    while (!done && edges < 4 * WIDTH) begin @(posedge clk); #1; edges++; end
    check(64'(result), 64'(60), "product 12*5 after a clock pause");
    check(64'(edges), 64'(WIDTH - 1), "edges left after the pause");

    // 16-bit instance, random operands.
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a2 = W2'($urandom); b2 = W2'($urandom); start2 = 1'b1;
      @(posedge clk); #1; start2 = 1'b0;
      edges = 0;
      while (!done2 && edges < 4 * W2) begin @(posedge clk); #1; edges++; end
      check(64'(result2), 64'(a2) * 64'(b2), $sformatf("16-bit product %0d*%0d", a2, b2));
      check(64'(edges), 64'(W2), "16-bit latency");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
