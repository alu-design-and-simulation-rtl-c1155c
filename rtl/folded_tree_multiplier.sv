// folded_tree_multiplier: the ALU's multiplication unit (opcode 010), A * B.
//
// Instead of a full array or tree of adders (WIDTH rows of half/full-adder
// processing elements), the tree is folded onto a single row of WIDTH PEs,
// one half adder for bit 0 and full adders above it, which is reused once
// per iteration. In iteration i the row adds partial product A & {B[i]}
// (an AND gate per bit) to the upper half of the running product; the row's
// carry and sum bits and the lower product half then shift right by one.
// A small FSM with an iteration counter sequences the reuse: the counter is
// incremented every iteration and compared with the iteration count
// (ITER_COUNT = WIDTH); when it reaches it, the 2*WIDTH-bit product in the
// PE row's registers is copied to the output register and done is raised.
//
// Interface and timing (all on the gated clock en_mul):
//   start  - sampled on a gated clock edge: loads a and b, clears done and
//            begins; a start during a computation restarts it.
//   result - the product, written by the edge that ends the last iteration
//            (WIDTH edges after the start edge); it keeps the previous
//            product while a computation runs.
//   done   - high while result holds the product of the last start.
// The shift-and-add schedule and the start/done handshake are this design's
// choices; folding onto reused HA/FA PEs under a counter and an FSM is the
// ALU's multiplier scheme. The clock stops whenever another opcode is
// selected, which freezes the FSM. There is
// no reset: the clock is stopped while the ALU is in reset, and every use
// begins with start, which puts the FSM, counter and registers in order.
module folded_tree_multiplier #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic                 gclk,
  input  logic                 start,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [OUT_WIDTH-1:0] result,
  output logic                 done
);

  localparam int unsigned ITER_COUNT = WIDTH;
  localparam int unsigned CNT_W      = $clog2(ITER_COUNT + 1);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_RUN  = 2'd1,
    S_DONE = 2'd2
  } state_e;

  state_e           state;
  logic [CNT_W-1:0] iter_cnt;
  logic [WIDTH-1:0] mcand;     // multiplicand, held for all iterations
  logic [WIDTH-1:0] acc_hi;    // upper half of the running product
  logic [WIDTH-1:0] prod_lo;   // lower product half / remaining multiplier bits

  // One row of processing elements: acc_hi + (mcand & {WIDTH{prod_lo[0]}}).
  logic [WIDTH-1:0] pp;        // partial product bits
  logic [WIDTH-1:0] row_sum;
  logic [WIDTH-1:0] row_carry;

  assign pp = mcand & {WIDTH{prod_lo[0]}};

  half_adder u_pe0 (
    .x (acc_hi[0]),
    .y (pp[0]),
    .s (row_sum[0]),
    .c (row_carry[0])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_pe
    full_adder u_pe (
      .x (acc_hi[i]),
      .y (pp[i]),
      .z (row_carry[i-1]),
      .s (row_sum[i]),
      .c (row_carry[i])
    );
  end

  always_ff @(posedge gclk) begin
    if (start) begin
      state    <= S_RUN;
      iter_cnt <= '0;
      mcand    <= a;
      acc_hi   <= '0;
      prod_lo  <= b;
      done     <= 1'b0;
    end else begin
      case (state)
        S_RUN: begin
          acc_hi   <= {row_carry[WIDTH-1], row_sum[WIDTH-1:1]};
          prod_lo  <= {row_sum[0], prod_lo[WIDTH-1:1]};
          iter_cnt <= iter_cnt + 1'b1;
          if (iter_cnt == CNT_W'(ITER_COUNT - 1)) begin
            state  <= S_DONE;
            done   <= 1'b1;
            result <= OUT_WIDTH'({row_carry[WIDTH-1], row_sum, prod_lo[WIDTH-1:1]});
          end
        end
        default: ;   // S_IDLE and S_DONE hold
      endcase
    end
  end

endmodule
