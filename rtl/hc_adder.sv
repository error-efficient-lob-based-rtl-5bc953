// hc_adder: W-bit Han-Carlson parallel-prefix adder with carry in and out.
//
// The Han-Carlson adder is the adder the multipliers use for their final
// summation and, in this design, also inside every arithmetic unit (where a
// subtraction is an addition of the inverted operand with carry in = 1).
// Structure:
//   * pre-processing: g = a & b, p = a ^ b per bit; the carry in is folded
//     into the generate of bit 0;
//   * a Kogge-Stone prefix tree over the odd bit positions only: the first
//     level joins each odd bit with the even bit below it (span 1), level k
//     joins odd bit i with odd bit i - 2^k, for clog2(W) levels in all;
//   * one extra level gives every even bit i >= 2 its carry from odd bit i-1;
//   * post-processing: sum = p ^ carry.
// The prefix cells are the usual (G, P) o (G', P') = (G | P & G', P & P').
// The published LOBAM design names the Han-Carlson adder and cites it as a fast prefix
// adder; the tree shown here is the textbook form of that adder.
// Purely combinational; no clock.
module hc_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int L = (W > 1) ? $clog2(W) : 1;  // odd-bit Kogge-Stone levels

  logic [W-1:0] g0, p0;
  logic [W-1:0] gs [0:L];
  logic [W-1:0] ps [0:L];
  logic [W-1:0] gf;                             // group generate of bits [i:0]
  logic [W:0]   c;

  always_comb begin
    g0    = a & b;
    p0    = a ^ b;
    g0[0] = (a[0] & b[0]) | (p0[0] & cin);
  end

  assign gs[0] = g0;
  assign ps[0] = p0;

  // Kogge-Stone tree over the odd positions.
  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int D = 1 << k;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if ((i % 2 == 1) && (i - D >= 0)) begin : g_cell
        assign gs[k+1][i] = gs[k][i] | (ps[k][i] & gs[k][i-D]);
        assign ps[k+1][i] = ps[k][i] & ps[k][i-D];
      end else begin : g_pass
        assign gs[k+1][i] = gs[k][i];
        assign ps[k+1][i] = ps[k][i];
      end
    end
  end

  // Final level: even positions take the prefix of the odd bit below them.
  for (genvar i = 0; i < W; i++) begin : g_even
    if ((i % 2 == 0) && (i >= 2)) begin : g_cell
      assign gf[i] = gs[L][i] | (ps[L][i] & gs[L][i-1]);
    end else begin : g_pass
      assign gf[i] = gs[L][i];
    end
  end

  assign c[0]     = cin;
  assign c[W:1]   = gf;
  assign sum      = p0 ^ c[W-1:0];
  assign cout     = c[W];

endmodule
