// tb_clock_gate: self-checking testbench of the latch-based clock gate.
//
// Every 1 ns it compares gclk with clk AND the enable as it stood at the end
// of the last clock-low phase, which is what the gate must pass. The enable
// is changed at random times, in the high phase as well as the low phase, so
// the test also shows that a change while the clock is high never shortens
// or adds a pulse. It also counts gated rising edges against the number of
// clock cycles whose low phase ended with the enable set.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
`timescale 1ns / 1ps
module tb_clock_gate;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  logic en_at_rise = 1'b0;   // enable sampled at the end of the low phase
  int   exp_edges = 0, got_edges = 0;
  int   checks = 0, failures = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  // 10 ns clock, checked on a 1 ns grid offset from every edge.
  initial forever begin
    #5 en_at_rise = en; clk = 1'b1;
    if (en_at_rise) exp_edges++;
    #5 clk = 1'b0;
  end

  always @(posedge gclk) got_edges++;

  // Random enable changes on a 0.5 ns grid offset 0.25 ns from the clock
  // edges, inside either clock phase.
  initial begin
    #0.25;
    forever begin
      #(0.5 + ($urandom % 17) * 0.5);
      en = ~en;
    end
  end

  initial begin
    #0.1;
    repeat (20000) begin
      #1;
      checks++;
      if (gclk !== (clk & en_at_rise)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL at %0t: clk=%0b en=%0b gclk=%0b", $time, clk, en, gclk);
      end
    end
    checks++;
    if (got_edges != exp_edges) begin
      failures++;
      $display("FAIL gated edges %0d expected %0d", got_edges, exp_edges);
    end
    checks++;
    if (exp_edges == 0) begin
      failures++;
      $display("FAIL the enable never opened the gate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
