// lf_prefix_adder: combinational Ladner-Fischer parallel-prefix adder.
//
// Three stages, as in the classic prefix-adder formulation:
//   1. pre-processing:  g_i = a_i & b_i, p_i = a_i ^ b_i for every bit;
//   2. carry tree:      black cells combine (G,P) pairs,
//                       G = G_hi | (P_hi & G_lo), P = P_hi & P_lo;
//   3. post-processing: s_i = p_i ^ c_(i-1).
// The carry tree is the Ladner-Fischer arrangement: one row of black cells
// forms pairs on the odd bits, a Sklansky (divide and conquer) tree over the
// odd bits follows, and a last row of gray cells fills in the even bits from
// their odd neighbour. Depth is log2(WIDTH)+1 cell levels and the fan-out of
// the Sklansky part is halved compared with a full Sklansky tree.
// The carry-in is folded into bit 0's generate term, so the same adder also
// serves the subtractor (a + ~b + 1).
//
// Parameters: WIDTH, a power of two of at least 2 (8 in this ALU).
// Purely combinational: no clock, no state.
module lf_prefix_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned HALF       = WIDTH / 2;
  localparam int unsigned ODD_LEVELS = (HALF > 1) ? $clog2(HALF) : 0;
  localparam int unsigned LEVELS     = ODD_LEVELS + 2;

  // gg[l][i] / pp[l][i]: group generate / propagate of bit i after level l.
  logic [WIDTH-1:0] gg [LEVELS];
  logic [WIDTH-1:0] pp [LEVELS];
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] carry;   // carry[i] = carry out of bit i

  always_comb begin
    int unsigned j;
    // Pre-processing stage.
    p      = a ^ b;
    gg[0]  = a & b;
    pp[0]  = p;
    gg[0][0] = gg[0][0] | (p[0] & cin);

    // Level 1: black cells on the odd bits pair each with its lower neighbour.
    gg[1] = gg[0];
    pp[1] = pp[0];
    for (int unsigned i = 1; i < WIDTH; i += 2) begin
      gg[1][i] = gg[0][i] | (pp[0][i] & gg[0][i-1]);
      pp[1][i] = pp[0][i] & pp[0][i-1];
    end

    // Levels 2..: Sklansky tree over the odd bits (odd bit i = 2k+1).
    for (int unsigned s = 1; s <= ODD_LEVELS; s++) begin
      gg[s+1] = gg[s];
      pp[s+1] = pp[s];
      for (int unsigned k = 0; k < HALF; k++) begin
        if (((k >> (s - 1)) & 1) == 1) begin
          j = ((k >> (s - 1)) << (s - 1)) - 1;
          gg[s+1][2*k+1] = gg[s][2*k+1] | (pp[s][2*k+1] & gg[s][2*j+1]);
          pp[s+1][2*k+1] = pp[s][2*k+1] & pp[s][2*j+1];
        end
      end
    end

    // Last level: gray cells on the even bits; odd bits are already complete.
    carry = gg[LEVELS-1];
    for (int unsigned i = 2; i < WIDTH; i += 2)
      carry[i] = gg[0][i] | (pp[0][i] & gg[LEVELS-1][i-1]);

    // Post-processing stage.
    sum  = p ^ {carry[WIDTH-2:0], cin};
    cout = carry[WIDTH-1];
  end

endmodule
