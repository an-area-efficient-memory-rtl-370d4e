// Kogge-Stone parallel-prefix adder.
//
// Each bit forms a propagate p = x ^ y and a generate g = x & y. The carry in
// is folded into the generate of bit 0, and $clog2(W) prefix levels then
// combine (g, p) pairs at distances 1, 2, 4, ... so that after the last level
// every bit holds the group generate of all bits below it, which is the carry
// into the next bit. The sum is p ^ carry. This is the structure of the
// four-bit adder the design uses in every phase-accumulator slice; the width is
// a parameter, with 4 as its default.
//
// Interface: x, y and cin in, sum and cout out. Purely combinational.
module ks_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // g_l[k] / p_l[k]: group generate and propagate after k prefix levels.
  logic [W-1:0] g_l [LEVELS+1];
  logic [W-1:0] p_l [LEVELS+1];
  logic [W-1:0] p;
  logic [W:0]   carry;

  assign p = x ^ y;

  assign g_l[0] = {x[W-1:1] & y[W-1:1], (x[0] & y[0]) | (p[0] & cin)};
  assign p_l[0] = p;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << k)) begin : g_cell
        // Black cell: merge with the group 2**k bits below.
        assign g_l[k+1][i] = g_l[k][i] | (p_l[k][i] & g_l[k][i-(1<<k)]);
        assign p_l[k+1][i] = p_l[k][i] & p_l[k][i-(1<<k)];
      end else begin : g_pass
        assign g_l[k+1][i] = g_l[k][i];
        assign p_l[k+1][i] = p_l[k][i];
      end
    end
  end

  assign carry = {g_l[LEVELS], cin};
  assign sum   = p ^ carry[W-1:0];
  assign cout  = carry[W];

endmodule
